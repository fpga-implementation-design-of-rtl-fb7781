// tb_uart_rx: self-checking test of the receiver.
// The testbench makes its own receiver tick (one every T clocks, so a bit
// lasts 16*T clocks) and drives serial frames built from the frame format
// (start 0, eight data bits LSB first, parity, stop 1). It checks the
// received byte, rec_ready and the three error flags against the frame it
// sent: good frames, wrong parity, a 0 stop bit, two frames without a read
// (overrun), a low glitch shorter than half a bit (must be ignored) and
// frames sent 3 % fast and slow. A second receiver with odd parity listens
// to the same line. The latency from the start edge to rec_ready is
// checked against 168 ticks plus synchronizer and tick-phase delay.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int T   = 4;             // clocks per receiver tick
  localparam int BIT = 16 * T;        // clocks per bit

  logic clk = 1'b0;
  logic rst, tick, rx, read_pulse;
  logic [7:0] rec_data, rec_data_o;
  logic rec_ready, parity_err, framing_err, overrun_err;
  logic rec_ready_o, parity_err_o, framing_err_o, overrun_err_o;
  int checks = 0, failures = 0;
  int tick_cnt = 0;
  longint cycle = 0;

  uart_rx dut (.clk(clk), .rst(rst), .rx_tick(tick), .rx(rx), .read_pulse(read_pulse),
               .rec_data(rec_data), .rec_ready(rec_ready), .parity_err(parity_err),
               .framing_err(framing_err), .overrun_err(overrun_err));

  uart_rx #(.PARITY_ODD(1'b1)) dut_odd (.clk(clk), .rst(rst), .rx_tick(tick), .rx(rx),
               .read_pulse(read_pulse), .rec_data(rec_data_o), .rec_ready(rec_ready_o),
               .parity_err(parity_err_o), .framing_err(framing_err_o), .overrun_err(overrun_err_o));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    tick_cnt <= (tick_cnt == T - 1) ? 0 : tick_cnt + 1;
  end
  assign tick = (tick_cnt == T - 1);

  initial begin
    repeat (200000) @(posedge clk);
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

  // Drive one frame; bit period in clocks, parity inverted when bad_par.
  task automatic send_frame(input logic [7:0] d, input bit bad_par, input logic stop,
                            input int bitlen);
    logic [10:0] frame;
    frame = {stop, (^d) ^ bad_par, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rx = frame[i];
      repeat (bitlen) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  task automatic do_read();
    @(negedge clk) read_pulse = 1'b1;
    @(negedge clk) read_pulse = 1'b0;
  endtask

  // Wait for rec_ready to rise, at most a few bits after the frame ended.
  task automatic wait_ready(output bit seen);
    seen = 0;
    for (int i = 0; i < 4 * BIT; i++) begin
      if (rec_ready) begin seen = 1; break; end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] d;
    bit seen;
    longint t0, lat;
    rst = 1'b1; rx = 1'b1; read_pulse = 1'b0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (3 * BIT) @(negedge clk);
    check(!rec_ready && !parity_err && !framing_err && !overrun_err, "flags clear after reset");

    // Good frames; latency measured on the first ones.
    for (int n = 0; n < 20; n++) begin
      d = 8'($urandom);
      if (n == 0) d = 8'h45;
      t0 = cycle;
      fork
        send_frame(d, 1'b0, 1'b1, BIT);
        begin
          @(posedge rec_ready);
          lat = cycle - t0;
        end
      join
      wait_ready(seen);
      check(seen, "rec_ready after good frame");
      check(rec_data == d, $sformatf("data %02h expected %02h", rec_data, d));
      check(!parity_err && !framing_err && !overrun_err, "no error on good frame");
      check(parity_err_o && rec_data_o == d, "odd-parity receiver flags even-parity frame");
      check(lat >= 168 * T + 1 && lat <= 169 * T + 2,
            $sformatf("latency %0d clocks, expected %0d..%0d", lat, 168 * T + 1, 169 * T + 2));
      do_read();
      check(!rec_ready, "read clears rec_ready");
      repeat ($urandom_range(0, BIT)) @(negedge clk);
    end

    // Parity error.
    send_frame(8'hA5, 1'b1, 1'b1, BIT);
    wait_ready(seen);
    check(seen && rec_data == 8'hA5 && parity_err && !framing_err && !overrun_err,
          "parity error flagged");
    check(!parity_err_o, "odd-parity receiver accepts the inverted parity");
    do_read();

    // Framing error: stop bit 0, then line back to idle.
    send_frame(8'h3C, 1'b0, 1'b0, BIT);
    wait_ready(seen);
    check(seen && rec_data == 8'h3C && framing_err && !parity_err, "framing error flagged");
    do_read();
    repeat (2 * BIT) @(negedge clk);

    // Overrun: two frames, no read between them.
    send_frame(8'h11, 1'b0, 1'b1, BIT);
    wait_ready(seen);
    check(seen && !overrun_err, "first frame, no overrun yet");
    repeat (BIT) @(negedge clk);
    send_frame(8'h22, 1'b0, 1'b1, BIT);
    repeat (BIT) @(negedge clk);
    check(rec_ready && overrun_err && rec_data == 8'h22, "overrun flagged, new byte held");
    do_read();

    // Next good frame clears the error flags.
    send_frame(8'h5A, 1'b0, 1'b1, BIT);
    wait_ready(seen);
    check(seen && rec_data == 8'h5A && !overrun_err && !parity_err && !framing_err,
          "flags cleared by next good frame");
    do_read();

    // Glitch shorter than half a bit: must not start a frame.
    rx = 1'b0;
    repeat (BIT / 4) @(negedge clk);
    rx = 1'b1;
    repeat (12 * BIT) @(negedge clk);
    check(!rec_ready, "short glitch ignored");

    // Baud-rate mismatch of +-3 %.
    send_frame(8'hC3, 1'b0, 1'b1, BIT * 97 / 100);
    wait_ready(seen);
    check(seen && rec_data == 8'hC3 && !framing_err && !parity_err, "3% fast transmitter");
    do_read();
    send_frame(8'h69, 1'b0, 1'b1, BIT * 103 / 100);
    wait_ready(seen);
    check(seen && rec_data == 8'h69 && !framing_err && !parity_err, "3% slow transmitter");
    do_read();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
