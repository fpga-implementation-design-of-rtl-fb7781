// baud_gen: programmable baud generator for the micro UART.
//
// A clock divider counts system clock cycles (clk_div) up to a dividing
// factor (CLK_DIV) that a multiplexer picks by the 3-bit baud select, and
// emits a one-cycle tick, tx_tick, each time it wraps: tx_tick is the
// transmitter's baud clock, 32 ticks per bit. A divide-by-2 stage turns
// it into rx_tick, the receiver's baud clock, 16 ticks per bit, so both
// sides run at the same baud rate:
//   baud rate = f_clk / (32 * CLK_DIV),  CLK_DIV = 2**baud_sel.
// The mux-plus-divider structure, the x32 / x16 relation of the two baud
// clocks and the 8-bit divider width follow the design; the divisor table
// is this design's choice (see uart_pkg). The baud clocks are produced as
// single-cycle clock enables in the system clock domain rather than as
// derived clocks, so the whole UART is one clock domain. A change of
// baud_sel takes effect at once; the divider restarts if it is already
// past the new factor.
module baud_gen
  import uart_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,       // synchronous, active high
  input  logic [BAUD_SEL_W-1:0] baud_sel,
  output logic                  tx_tick,   // 32 x baud rate
  output logic                  rx_tick    // 16 x baud rate
);

  logic [DIV_W-1:0] clk_div_factor;   // CLK_DIV: selected dividing factor
  logic [DIV_W-1:0] clk_div;          // divider count
  logic             half;             // divide-by-2 phase for the receiver
  logic             wrap;

  assign clk_div_factor = baud_div(baud_sel);
  assign wrap           = (clk_div >= clk_div_factor - DIV_W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_div <= '0;
      half    <= 1'b0;
      tx_tick <= 1'b0;
      rx_tick <= 1'b0;
    end else begin
      tx_tick <= wrap;
      rx_tick <= wrap & half;
      if (wrap) begin
        clk_div <= '0;
        half    <= ~half;
      end else begin
        clk_div <= clk_div + DIV_W'(1);
      end
    end
  end

endmodule
