// tb_sync2: checks the dual-rank synchronizer.
// After reset both stages must hold 1 (the idle line level); after that
// the output must equal the input of two clock cycles earlier, checked
// against a random input sequence kept in a history shift register.
module tb_sync2;
  logic clk = 1'b0;
  logic rst, d, q;
  logic [1:0] hist;
  int checks = 0, failures = 0;

  sync2 dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d   = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q !== 1'b1) begin failures++; $display("reset value %b, expected 1", q); end
    rst  = 1'b0;
    hist = 2'b11;             // both stages hold the reset value
    for (int i = 0; i < 500; i++) begin
      d = 1'($urandom);
      @(posedge clk);
      hist = {hist[0], d};
      #1;
      checks++;
      // Output after this edge is the input sampled one edge earlier.
      if (q !== hist[1]) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", i, q, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
