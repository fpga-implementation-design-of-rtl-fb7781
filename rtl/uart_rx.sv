// uart_rx: micro UART receiver with parity, framing and overrun detection.
//
// The serial input goes through a dual-rank synchronizer (sync2). A state
// machine, clocked by the receiver baud tick (16 ticks per bit), waits in
// IDLE for the synchronized line to be 0. It then counts 8 ticks with the
// 4-bit bit-cell counter to the middle of the start bit and checks that
// the line is still 0 (a shorter low pulse is dropped as noise). From
// there it samples every 16 ticks: eight data bits, shifted LSB first
// into the 8-bit de-serializer, then the parity bit, counted by the 4-bit
// received-bit counter, and finally the stop bit. The first data bit is
// thus sampled 24 ticks after the start bit was seen, each later bit 16
// ticks after the one before.
//
// When the stop bit has been sampled the byte is copied to rec_data and
// rec_ready is set. Along with it the three status flags are updated for
// that frame:
//   parity_err  - parity over data and parity bit is wrong (even parity,
//                 or odd with PARITY_ODD = 1)
//   framing_err - the stop bit was 0
//   overrun_err - rec_ready was still set: the previous byte had not been
//                 read and has now been overwritten
// A read pulse clears rec_ready; the flags hold until the next frame ends.
//
// The block structure (synchronizer, bit-cell counter, received-bit
// counter, de-serializer, state machine, registered ready flag) and the
// sampling points follow the design. The states, the rule that the flags
// describe the last frame, that an overrun overwrites the held byte, and
// that a frame with an error is still delivered are this design's
// choices.
//
// Timing: rec_ready rises one clock after the rx_tick that samples the
// stop bit, 168 ticks after the tick that first sees the start bit.
module uart_rx
  import uart_pkg::*;
#(
  parameter bit PARITY_ODD = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst,          // synchronous, active high
  input  logic                 rx_tick,      // 16 x baud rate clock enable
  input  logic                 rx,           // serial input, idle high
  input  logic                 read_pulse,   // one-cycle: byte has been read
  output logic [DATA_BITS-1:0] rec_data,
  output logic                 rec_ready,
  output logic                 parity_err,
  output logic                 framing_err,
  output logic                 overrun_err
);

  rx_state_e              state;
  logic                   rec_dat;      // synchronized serial input
  logic [RX_CELL_W-1:0]   bit_cell_cntr;
  logic [BITCNT_W-1:0]    bit_cntr;     // received-bit counter
  logic [DATA_BITS-1:0]   shift_reg;    // de-serializer
  logic                   par_bit;
  logic                   cell_done;    // bit-cell counter at its last tick

  sync2 #(.RESET_VAL(1'b1)) u_sync (
    .clk (clk),
    .rst (rst),
    .d   (rx),
    .q   (rec_dat)
  );

  assign cell_done = (state == RX_START) ? (bit_cell_cntr == RX_CELL_W'(RX_OVERSAMPLE/2 - 1))
                                         : (bit_cell_cntr == RX_CELL_W'(RX_OVERSAMPLE - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= RX_IDLE;
      bit_cell_cntr <= '0;
      bit_cntr      <= '0;
      shift_reg     <= '0;
      par_bit       <= 1'b0;
      rec_data      <= '0;
      rec_ready     <= 1'b0;
      parity_err    <= 1'b0;
      framing_err   <= 1'b0;
      overrun_err   <= 1'b0;
    end else begin
      if (read_pulse) rec_ready <= 1'b0;

      if (rx_tick) begin
        if (state == RX_IDLE || cell_done) bit_cell_cntr <= '0;
        else                               bit_cell_cntr <= bit_cell_cntr + 1'b1;

        unique case (state)
          RX_IDLE: begin
            if (!rec_dat) state <= RX_START;
          end
          RX_START: begin
            if (cell_done) begin
              bit_cntr <= '0;
              state    <= rec_dat ? RX_IDLE : RX_DATA;   // false start: back to idle
            end
          end
          RX_DATA: begin
            if (cell_done) begin
              bit_cntr <= bit_cntr + 1'b1;
              if (bit_cntr < BITCNT_W'(DATA_BITS)) begin
                shift_reg <= {rec_dat, shift_reg[DATA_BITS-1:1]};
              end else begin
                par_bit <= rec_dat;
                state   <= RX_STOP;
              end
            end
          end
          RX_STOP: begin
            if (cell_done) begin
              rec_data    <= shift_reg;
              rec_ready   <= 1'b1;
              overrun_err <= rec_ready & ~read_pulse;
              framing_err <= ~rec_dat;
              parity_err  <= (par_bit != parity_bit(shift_reg, PARITY_ODD));
              state       <= RX_IDLE;
            end
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

  // The received-bit counter covers eight data bits and the parity bit.
  a_bit_range: assert property (@(posedge clk) disable iff (rst)
                                bit_cntr <= BITCNT_W'(DATA_BITS + 1));

endmodule
