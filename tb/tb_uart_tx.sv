// tb_uart_tx: self-checking test of the transmitter.
// The testbench makes its own transmitter tick (one every T clocks, so a
// bit lasts 32*T clocks), writes random bytes and decodes the serial line
// itself: it samples the middle of each of the eleven bit cells counted
// from the clock the write was taken, and checks start bit 0, the data
// bits LSB first, even parity (odd parity on a second instance) and stop
// bit 1. A monitor checks that every edge on the line falls a whole
// number of bit times (32 ticks) after the start edge. It also checks that
// the line is high while idle, that xmit_done is low for one frame time
// (352 ticks), and that a write while busy is ignored.
module tb_uart_tx;
  import uart_pkg::*;
  localparam int T   = 2;             // clocks per transmitter tick
  localparam int BIT = 32 * T;        // clocks per bit

  logic clk = 1'b0;
  logic rst, tick, xmit;
  logic [7:0] xmit_data;
  logic tx, done, tx_o, done_o;
  int checks = 0, failures = 0;
  int tick_cnt = 0;
  longint cycle = 0;

  uart_tx dut (.clk(clk), .rst(rst), .tx_tick(tick), .xmit(xmit), .xmit_data(xmit_data),
               .uart_xmit(tx), .xmit_done(done));
  uart_tx #(.PARITY_ODD(1'b1)) dut_odd (.clk(clk), .rst(rst), .tx_tick(tick), .xmit(xmit),
               .xmit_data(xmit_data), .uart_xmit(tx_o), .xmit_done(done_o));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    tick_cnt <= (tick_cnt == T - 1) ? 0 : tick_cnt + 1;
  end
  assign tick = (tick_cnt == T - 1);

  // Edge monitor: every transition of the line during a frame must lie a
  // whole number of bit times (32*T clocks, within one tick) after the
  // start edge; the clock on which xmit_done rises is recorded.
  longint start_edge = -1, done_rise = -1;
  logic   tx_q = 1'b1, done_q = 1'b1;
  always @(posedge clk) begin
    tx_q   <= tx;
    done_q <= done;
    if (tx_q && !tx && done_q) start_edge <= cycle;
    if (!done_q && done) done_rise <= cycle;
    if (!rst && tx_q != tx && !(tx_q && done_q)) begin
      longint off;
      off = (cycle - start_edge) % BIT;
      check(off <= T || off >= BIT - T,
            $sformatf("line edge %0d clocks after start, not on a bit boundary", cycle - start_edge));
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // Write one byte and decode the frame on the line.
  task automatic send_and_check(input logic [7:0] d, input bit poke_busy);
    logic [10:0] exp, exp_o;
    longint t0, tdone;
    exp   = {1'b1, ^d, d, 1'b0};
    exp_o = {1'b1, ~^d, d, 1'b0};
    @(negedge clk);
    check(done && tx, "idle: xmit_done high, line high");
    xmit = 1'b1; xmit_data = d;
    @(negedge clk);
    xmit = 1'b0; xmit_data = 8'($urandom);
    t0 = cycle;
    check(!done, "xmit_done falls after write");
    for (int i = 0; i < 11; i++) begin
      repeat (BIT / 2) @(negedge clk);
      check(tx == exp[i], $sformatf("byte %02h bit %0d = %b expected %b", d, i, tx, exp[i]));
      check(tx_o == exp_o[i], $sformatf("odd: byte %02h bit %0d", d, i));
      if (poke_busy && i == 4) begin
        xmit = 1'b1;
        @(negedge clk);
        xmit = 1'b0;
        repeat (BIT / 2 - 1) @(negedge clk);
      end else begin
        repeat (BIT / 2) @(negedge clk);
      end
    end
    while (!done) @(negedge clk);
    @(negedge clk);                    // let the monitor record the rise
    tdone = done_rise - t0;
    check(tdone >= 351 * T - 1 && tdone <= 352 * T + 1,
          $sformatf("frame took %0d clocks, expected %0d..%0d", tdone, 351 * T - 1, 352 * T + 1));
  endtask

  initial begin
    rst = 1'b1; xmit = 1'b0; xmit_data = '0;
    repeat (5) @(negedge clk);
    check(tx && tx_o, "line high in reset");
    rst = 1'b0;
    repeat (100) @(negedge clk);
    check(tx && done, "line high while idle");
    send_and_check(8'h45, 1'b0);
    send_and_check(8'h00, 1'b0);
    send_and_check(8'hFF, 1'b0);
    send_and_check(8'h96, 1'b1);   // write while busy: must not disturb the frame
    repeat (3 * BIT) @(negedge clk);
    check(tx && done, "no extra frame after write while busy");
    for (int n = 0; n < 12; n++) begin
      send_and_check(8'($urandom), 1'b0);
      repeat ($urandom_range(0, 3 * T)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
