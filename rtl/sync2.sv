// sync2: dual-rank synchronizer for the receiver's serial input.
//
// The asynchronous serial line passes through two flip-flops clocked by
// the UART clock before any logic looks at it, so that a metastable first
// stage has a full clock period to settle. The output follows the input
// with two clock cycles of latency. Both stages reset to RESET_VAL, which
// is 1, the idle level of the serial line, so that reset never makes a
// false start bit. The two-stage structure is the receiver block
// diagram's; the reset value is this design's choice.
module sync2 #(
  parameter bit RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic d,       // asynchronous input
  output logic q        // synchronized output, two cycles later
);

  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
