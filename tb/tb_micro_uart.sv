// tb_micro_uart: end-to-end test of two micro UARTs wired to each other,
// A's tx to B's rx and B's tx to A's rx, each with its own CPU bus driven
// through the active-low read and write strobes and the bidirectional
// data bus. Both run with the default parameters.
//
// For every one of the eight baud selects both sides send a byte at the
// same time (full duplex) and each reads the other's byte back over its
// bus. Then, at the fastest rate, the testbench takes over B's serial
// input and sends hand-made frames to provoke each receive error, and
// exercises the remaining mechanisms:
//   baud      - a transfer at each baud select, timed: one frame must take
//               11 bit times of 32 * 2**sel clocks
//   parity    - frame with wrong parity sets parityerr
//   framing   - frame with a 0 stop bit sets framingerr
//   overrun   - two frames without a read set overrun
//   busy      - a write while txrdy is low is dropped
//   glitch    - a low pulse shorter than half a bit is not a start bit
// Each mechanism is counted; one that never happened is a failure.
module tb_micro_uart;
  import uart_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic [2:0] baud_sel;
  // CPU side of A and B
  logic rd_a, wr_a, rd_b, wr_b;
  logic [7:0] drv_a, drv_b;
  logic en_a, en_b;
  wire  [7:0] data_a, data_b;
  logic tx_a, tx_b, rx_b;
  logic rxrdy_a, txrdy_a, perr_a, ferr_a, ovr_a;
  logic rxrdy_b, txrdy_b, perr_b, ferr_b, ovr_b;
  // Serial line into B: A's tx, or the testbench's own frames.
  logic inject, inj_line;
  int checks = 0, failures = 0;
  int n_baud = 0, n_parity = 0, n_framing = 0, n_overrun = 0, n_busy = 0, n_glitch = 0;
  longint cycle = 0;

  assign data_a = en_a ? drv_a : 'z;
  assign data_b = en_b ? drv_b : 'z;
  assign rx_b   = inject ? inj_line : tx_a;

  micro_uart ua (.mclkx16(clk), .reset(reset), .baud_sel(baud_sel), .read(rd_a), .write(wr_a),
                 .data(data_a), .rx(tx_b), .tx(tx_a), .rxrdy(rxrdy_a), .txrdy(txrdy_a),
                 .parityerr(perr_a), .framingerr(ferr_a), .overrun(ovr_a));
  micro_uart ub (.mclkx16(clk), .reset(reset), .baud_sel(baud_sel), .read(rd_b), .write(wr_b),
                 .data(data_b), .rx(rx_b), .tx(tx_b), .rxrdy(rxrdy_b), .txrdy(txrdy_b),
                 .parityerr(perr_b), .framingerr(ferr_b), .overrun(ovr_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  final $display("simulated %0d clock cycles", cycle);

  initial begin
    repeat (2000000) @(posedge clk);
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

  // CPU write: data on the bus, write strobe low for two clocks.
  task automatic cpu_write(input bit b, input logic [7:0] d);
    @(negedge clk);
    if (b) begin drv_b = d; en_b = 1'b1; wr_b = 1'b0; end
    else   begin drv_a = d; en_a = 1'b1; wr_a = 1'b0; end
    repeat (2) @(negedge clk);
    wr_a = 1'b1; wr_b = 1'b1;
    @(negedge clk);
    if (b) en_b = 1'b0; else en_a = 1'b0;
  endtask

  // CPU read: strobe low, sample the bus the UART drives, strobe high.
  task automatic cpu_read(input bit b, output logic [7:0] d);
    @(negedge clk);
    if (b) rd_b = 1'b0; else rd_a = 1'b0;
    repeat (2) @(negedge clk);
    d = b ? data_b : data_a;
    rd_a = 1'b1; rd_b = 1'b1;
    @(negedge clk);
  endtask

  task automatic inject_frame(input logic [7:0] d, input bit bad_par, input logic stop,
                              input int bitlen);
    logic [10:0] frame;
    frame = {stop, (^d) ^ bad_par, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      inj_line = frame[i];
      repeat (bitlen) @(negedge clk);
    end
    inj_line = 1'b1;
  endtask

  task automatic wait_rxrdy_b(input int limit, output bit seen);
    seen = 0;
    for (int i = 0; i < limit; i++) begin
      if (rxrdy_b) begin seen = 1; break; end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] da, db, got;
    longint t0, ta, tb;
    int bitlen;
    bit seen;
    reset = 1'b1; baud_sel = '0;
    rd_a = 1'b1; wr_a = 1'b1; rd_b = 1'b1; wr_b = 1'b1;
    en_a = 1'b0; en_b = 1'b0; drv_a = '0; drv_b = '0;
    inject = 1'b0; inj_line = 1'b1;
    repeat (5) @(negedge clk);
    check(tx_a && tx_b, "tx high during reset");
    reset = 1'b0;
    repeat (5) @(negedge clk);
    check(txrdy_a && txrdy_b && !rxrdy_a && !rxrdy_b, "ready flags after reset");

    // Full-duplex transfer at every baud rate.
    for (int sel = 7; sel >= 0; sel--) begin
      baud_sel = 3'(sel);
      bitlen = 32 << sel;
      repeat (bitlen) @(negedge clk);
      da = (sel == 0) ? 8'h45 : 8'($urandom); db = 8'($urandom);
      fork
        cpu_write(1'b0, da);
        cpu_write(1'b1, db);
      join
      t0 = cycle;
      ta = -1; tb = -1;
      while ((ta < 0 || tb < 0) && cycle - t0 < 14 * bitlen) begin
        @(negedge clk);
        if (rxrdy_b && tb < 0) tb = cycle - t0;
        if (rxrdy_a && ta < 0) ta = cycle - t0;
      end
      check(ta >= 0 && tb >= 0, $sformatf("sel %0d: both bytes arrived", sel));
      // Received 10.5 bit times after the write (stop-bit middle).
      check(tb > 10 * bitlen && tb < 11 * bitlen,
            $sformatf("sel %0d: B received after %0d clocks, bit = %0d", sel, tb, bitlen));
      cpu_read(1'b1, got);
      check(got == da, $sformatf("sel %0d: B read %02h expected %02h", sel, got, da));
      cpu_read(1'b0, got);
      check(got == db, $sformatf("sel %0d: A read %02h expected %02h", sel, got, db));
      check(!rxrdy_a && !rxrdy_b, "read clears rxrdy");
      check(!perr_a && !ferr_a && !ovr_a && !perr_b && !ferr_b && !ovr_b, "no errors");
      while (!(txrdy_a && txrdy_b)) @(negedge clk);
      // A frame is 11 bits long: txrdy returns after 11 bit times.
      check(cycle - t0 >= 11 * bitlen - 4 && cycle - t0 <= 11 * bitlen + 4,
            $sformatf("sel %0d: frame time %0d expected %0d", sel, cycle - t0, 11 * bitlen));
      if (got == db && ta >= 0 && tb >= 0) n_baud++;
    end

    // Error frames into B at the fastest rate.
    baud_sel = 3'd0;
    bitlen = 32;
    inject = 1'b1;
    repeat (2 * bitlen) @(negedge clk);

    inject_frame(8'hA7, 1'b1, 1'b1, bitlen);
    wait_rxrdy_b(bitlen, seen);
    check(seen && perr_b && !ferr_b && !ovr_b, "parity error");
    cpu_read(1'b1, got);
    check(got == 8'hA7, "byte with parity error still readable");
    if (perr_b) n_parity++;

    inject_frame(8'h18, 1'b0, 1'b0, bitlen);
    wait_rxrdy_b(bitlen, seen);
    check(seen && ferr_b && !perr_b, "framing error");
    cpu_read(1'b1, got);
    if (ferr_b) n_framing++;
    repeat (2 * bitlen) @(negedge clk);

    inject_frame(8'h01, 1'b0, 1'b1, bitlen);
    wait_rxrdy_b(bitlen, seen);
    check(seen && !ovr_b && !ferr_b, "first byte of overrun pair");
    inject_frame(8'h02, 1'b0, 1'b1, bitlen);
    repeat (bitlen) @(negedge clk);
    check(rxrdy_b && ovr_b, "overrun");
    cpu_read(1'b1, got);
    check(got == 8'h02, "overrun keeps newest byte");
    if (ovr_b) n_overrun++;

    // Glitch on the line: no byte.
    inj_line = 1'b0;
    repeat (bitlen / 4) @(negedge clk);
    inj_line = 1'b1;
    repeat (12 * bitlen) @(negedge clk);
    check(!rxrdy_b, "glitch ignored");
    if (!rxrdy_b) n_glitch++;
    inject = 1'b0;

    // Write while busy is dropped: A sends 5C, then 77 while busy.
    cpu_write(1'b0, 8'h5C);
    check(!txrdy_a, "txrdy low while sending");
    cpu_write(1'b0, 8'h77);
    wait_rxrdy_b(14 * bitlen, seen);
    cpu_read(1'b1, got);
    check(seen && got == 8'h5C, "first byte delivered");
    wait_rxrdy_b(14 * bitlen, seen);
    check(!seen, "write while busy dropped");
    if (!seen && got == 8'h5C) n_busy++;

    $display("mechanisms: baud=%0d parity=%0d framing=%0d overrun=%0d busy=%0d glitch=%0d",
             n_baud, n_parity, n_framing, n_overrun, n_busy, n_glitch);
    check(n_baud == 8, "all eight baud rates used");
    check(n_parity > 0, "parity error happened");
    check(n_framing > 0, "framing error happened");
    check(n_overrun > 0, "overrun happened");
    check(n_busy > 0, "write while busy happened");
    check(n_glitch > 0, "glitch rejection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
