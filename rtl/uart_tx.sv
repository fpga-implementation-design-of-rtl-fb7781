// uart_tx: micro UART transmitter.
//
// A one-cycle xmit pulse while the transmitter is idle loads the 8-bit
// data and its parity bit into the serializer and starts a frame. A state
// machine, clocked by the transmitter baud tick (32 ticks per bit), holds
// each bit cell for 32 ticks with the 5-bit bit-cell counter and counts
// the data and parity bits with the 4-bit transmitted-bit counter. The
// serial output comes from a 3-input multiplexer steered by a 2-bit select
// (xmit_sel): constant 0 for the start bit, the serializer's LSB for the
// eight data bits (LSB first) and the parity bit, and constant 1 for the
// stop bit and while idle, including during reset.
//
// xmit_done is a registered flag that is high while the transmitter is
// idle and can take a new byte; it falls on the clock after an accepted
// xmit pulse and rises again at the end of the stop bit. An xmit pulse
// while xmit_done is low is ignored.
//
// The counters, serializer, output multiplexer with its 1'b0 / 1'b1
// inputs and 2-bit select, and the registered done flag follow the
// transmitter block diagram. Sending the parity bit from a ninth
// serializer stage, even parity by default, and ignoring a write while
// busy are this design's choices. The output multiplexer is driven only by
// registers, so the pin does not glitch between bit cells.
//
// Timing: the start bit begins on the clock after the xmit pulse; each
// bit lasts 32 tx_ticks; a frame is 11 x 32 = 352 ticks.
module uart_tx
  import uart_pkg::*;
#(
  parameter bit PARITY_ODD = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst,         // synchronous, active high
  input  logic                 tx_tick,     // 32 x baud rate clock enable
  input  logic                 xmit,        // one-cycle: send xmit_data
  input  logic [DATA_BITS-1:0] xmit_data,
  output logic                 uart_xmit,   // serial output, idle high
  output logic                 xmit_done    // idle, ready for a new byte
);

  tx_state_e            state;
  tx_sel_e              xmit_sel;
  logic [TX_CELL_W-1:0] bit_cell_cntr;
  logic [BITCNT_W-1:0]  bit_cntr;           // transmitted-bit counter
  logic [DATA_BITS:0]   shift_reg;          // serializer: {parity, data}
  logic                 cell_done;

  assign cell_done = tx_tick && (bit_cell_cntr == TX_CELL_W'(TX_OVERSAMPLE - 1));

  always_comb begin
    unique case (xmit_sel)
      TXSEL_ZERO:  uart_xmit = 1'b0;
      TXSEL_SHIFT: uart_xmit = shift_reg[0];
      default:     uart_xmit = 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= TX_IDLE;
      xmit_sel      <= TXSEL_ONE;
      bit_cell_cntr <= '0;
      bit_cntr      <= '0;
      shift_reg     <= '1;
      xmit_done     <= 1'b1;
    end else begin
      if (cell_done)                        bit_cell_cntr <= '0;
      else if (state != TX_IDLE && tx_tick) bit_cell_cntr <= bit_cell_cntr + 1'b1;

      unique case (state)
        TX_IDLE: begin
          if (xmit) begin
            shift_reg     <= {parity_bit(xmit_data, PARITY_ODD), xmit_data};
            bit_cell_cntr <= '0;
            bit_cntr      <= '0;
            xmit_sel      <= TXSEL_ZERO;
            xmit_done     <= 1'b0;
            state         <= TX_START;
          end
        end
        TX_START: begin
          if (cell_done) begin
            xmit_sel <= TXSEL_SHIFT;
            state    <= TX_DATA;
          end
        end
        TX_DATA: begin
          if (cell_done) begin
            shift_reg <= {1'b1, shift_reg[DATA_BITS:1]};
            bit_cntr  <= bit_cntr + 1'b1;
            if (bit_cntr == BITCNT_W'(DATA_BITS)) begin
              xmit_sel <= TXSEL_ONE;
              state    <= TX_STOP;
            end
          end
        end
        TX_STOP: begin
          if (cell_done) begin
            xmit_done <= 1'b1;
            state     <= TX_IDLE;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // xmit_done is exactly "in the idle state"; the bit counter never passes
  // the parity bit.
  a_done_idle: assert property (@(posedge clk) disable iff (rst)
                                xmit_done == (state == TX_IDLE));
  a_bit_range: assert property (@(posedge clk) disable iff (rst)
                                bit_cntr <= BITCNT_W'(DATA_BITS + 1));

endmodule
