// uart_pkg: constants and types shared by the micro UART blocks.
//
// The frame is fixed at one start bit (0), eight data bits sent LSB
// first, one parity bit and one stop bit (1): eleven bit cells. The
// transmitter divides each bit cell into 32 ticks of its baud clock, the
// receiver into 16 ticks of its own baud clock, which runs at half the
// transmitter's rate. The baud-rate divisor table (divisor 2**sel for
// the 3-bit baud select) is this design's choice: the select width and
// the divisor of 1 for select 0 follow the baud generator's waveform,
// the other entries are not given and were chosen as powers of two so
// that the eight selectable rates form the usual x2 ladder.
package uart_pkg;

  localparam int unsigned DATA_BITS    = 8;   // data bits per frame
  localparam int unsigned TX_OVERSAMPLE = 32; // Tx baud clock = baud rate * 32
  localparam int unsigned RX_OVERSAMPLE = 16; // Rx baud clock = baud rate * 16
  localparam int unsigned TX_CELL_W    = $clog2(TX_OVERSAMPLE); // 5-bit bit-cell counter
  localparam int unsigned RX_CELL_W    = $clog2(RX_OVERSAMPLE); // 4-bit bit-cell counter
  localparam int unsigned BITCNT_W     = 4;   // transmitted / received bit counters
  localparam int unsigned BAUD_SEL_W   = 3;   // eight selectable baud rates
  localparam int unsigned DIV_W        = 8;   // clock-divider width (CLK_DIV[7:0])

  // Selector of the transmitter's output multiplexer (xmitDataSel).
  typedef enum logic [1:0] {
    TXSEL_ZERO  = 2'd0,   // constant 0: start bit
    TXSEL_ONE   = 2'd1,   // constant 1: idle and stop bit
    TXSEL_SHIFT = 2'd2    // serializer output: data and parity bits
  } tx_sel_e;

  typedef enum logic [1:0] {
    TX_IDLE,
    TX_START,
    TX_DATA,     // eight data bits and the parity bit
    TX_STOP
  } tx_state_e;

  typedef enum logic [1:0] {
    RX_IDLE,     // wait for a 1 -> 0 transition on the line
    RX_START,    // wait to the middle of the start bit and confirm it
    RX_DATA,     // sample eight data bits and the parity bit
    RX_STOP      // sample the stop bit and deliver the byte
  } rx_state_e;

  // Clock-divider value selected by the baud-rate multiplexer.
  function automatic logic [DIV_W-1:0] baud_div(input logic [BAUD_SEL_W-1:0] sel);
    return DIV_W'(1) << sel;
  endfunction

  // Parity bit that makes data plus parity even (odd = 0) or odd (odd = 1).
  function automatic logic parity_bit(input logic [DATA_BITS-1:0] data, input logic odd);
    return (^data) ^ odd;
  endfunction

endpackage
