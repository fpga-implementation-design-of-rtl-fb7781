// tb_baud_gen: checks the baud generator's dividing factors.
// For each of the eight baud selects it measures the number of clock
// cycles between consecutive tx_ticks (must be 2**sel) and between
// consecutive rx_ticks (must be twice that, so the receiver clock is the
// transmitter clock divided by 2), and checks that rx_tick only fires
// together with tx_tick.
module tb_baud_gen;
  import uart_pkg::*;
  logic clk = 1'b0;
  logic rst;
  logic [BAUD_SEL_W-1:0] baud_sel;
  logic tx_tick, rx_tick;
  int checks = 0, failures = 0;
  longint cycle = 0;

  baud_gen dut (.clk(clk), .rst(rst), .baud_sel(baud_sel), .tx_tick(tx_tick), .rx_tick(rx_tick));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint last_tx, last_rx;
    int ntx, nrx;
    rst = 1'b1;
    baud_sel = '0;
    for (int sel = 0; sel < 8; sel++) begin
      rst = 1'b1;
      baud_sel = BAUD_SEL_W'(sel);
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      last_tx = -1; last_rx = -1; ntx = 0; nrx = 0;
      while (nrx < 12) begin
        @(posedge clk);
        #1;
        if (rx_tick && !tx_tick) begin
          checks++; failures++;
          $display("sel %0d: rx_tick without tx_tick", sel);
        end
        if (tx_tick) begin
          if (last_tx >= 0) begin
            checks++;
            if (cycle - last_tx != longint'(1) << sel) begin
              failures++;
              $display("sel %0d: tx tick interval %0d expected %0d", sel, cycle - last_tx, 1 << sel);
            end
          end
          last_tx = cycle; ntx++;
        end
        if (rx_tick) begin
          if (last_rx >= 0) begin
            checks++;
            if (cycle - last_rx != longint'(2) << sel) begin
              failures++;
              $display("sel %0d: rx tick interval %0d expected %0d", sel, cycle - last_rx, 2 << sel);
            end
          end
          last_rx = cycle; nrx++;
        end
      end
      checks++;
      if (ntx < 2 * nrx - 1 || ntx > 2 * nrx + 1) begin
        failures++;
        $display("sel %0d: %0d tx ticks for %0d rx ticks", sel, ntx, nrx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
