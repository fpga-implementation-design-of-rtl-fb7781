// micro_uart: 8-bit asynchronous serial port with selectable baud rate.
//
// The UART joins a baud generator, a receiver and a transmitter behind
// one 8-bit bidirectional CPU bus with active-low read and write strobes.
// All of it runs on the master clock mclkx16; the baud generator divides
// that clock by a factor picked with baud_sel and gives the transmitter a
// tick at 32 x the baud rate and the receiver one at 16 x the baud rate:
//   baud rate = f(mclkx16) / (32 * 2**baud_sel).
// Frames are 1 start bit, 8 data bits LSB first, 1 parity bit (even by
// default, odd with PARITY_ODD = 1) and 1 stop bit.
//
// CPU side (all strobes synchronous to mclkx16, active low):
//   write - on its falling edge the byte on data is handed to the
//           transmitter, provided txrdy is high; otherwise it is dropped.
//   read  - while low the UART drives the last received byte onto data;
//           its falling edge clears rxrdy.
//   txrdy, rxrdy, parityerr, framingerr, overrun - status pins; the three
//           error pins describe the most recently received frame.
// tx is high during reset and whenever no frame is being sent.
//
// The pin list and their meanings follow the design's pin description,
// with baud_sel added as the baud-rate select seen in its waveforms. The
// active-high synchronous reset, edge-detected strobes and the rule for a
// write while the transmitter is busy are this design's choices.
module micro_uart
  import uart_pkg::*;
#(
  parameter bit PARITY_ODD = 1'b0
) (
  input  logic                  mclkx16,    // master clock
  input  logic                  reset,      // master reset, active high
  input  logic [BAUD_SEL_W-1:0] baud_sel,   // baud-rate select
  input  logic                  read,       // active-low read strobe
  input  logic                  write,      // active-low write strobe
  inout  wire  [DATA_BITS-1:0]  data,       // bidirectional CPU data bus
  input  logic                  rx,         // serial input, idle high
  output logic                  tx,         // serial output, idle high
  output logic                  rxrdy,
  output logic                  txrdy,
  output logic                  parityerr,
  output logic                  framingerr,
  output logic                  overrun
);

  logic                 tx_tick, rx_tick;
  logic                 read_q, write_q;
  logic                 read_pulse, write_pulse;
  logic [DATA_BITS-1:0] rec_data;

  // Falling-edge detection of the CPU strobes.
  always_ff @(posedge mclkx16) begin
    if (reset) begin
      read_q  <= 1'b1;
      write_q <= 1'b1;
    end else begin
      read_q  <= read;
      write_q <= write;
    end
  end

  assign read_pulse  = read_q  & ~read;
  assign write_pulse = write_q & ~write;

  assign data = read ? 'z : rec_data;

  baud_gen u_baud (
    .clk      (mclkx16),
    .rst      (reset),
    .baud_sel (baud_sel),
    .tx_tick  (tx_tick),
    .rx_tick  (rx_tick)
  );

  uart_rx #(.PARITY_ODD(PARITY_ODD)) u_rx (
    .clk         (mclkx16),
    .rst         (reset),
    .rx_tick     (rx_tick),
    .rx          (rx),
    .read_pulse  (read_pulse),
    .rec_data    (rec_data),
    .rec_ready   (rxrdy),
    .parity_err  (parityerr),
    .framing_err (framingerr),
    .overrun_err (overrun)
  );

  uart_tx #(.PARITY_ODD(PARITY_ODD)) u_tx (
    .clk       (mclkx16),
    .rst       (reset),
    .tx_tick   (tx_tick),
    .xmit      (write_pulse),
    .xmit_data (data),
    .uart_xmit (tx),
    .xmit_done (txrdy)
  );

endmodule
