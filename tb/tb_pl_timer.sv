// tb_pl_timer -- the timer must count exactly the clocks during which `run` is high,
// hold while it is low and return to zero on `clr`.
module tb_pl_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [31:0] count;
  int unsigned expect_n = 0;

  pl_timer dut (.clk, .rst_n, .clr, .run, .count);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (count !== 0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 300; t++) begin
      int n;
      n = $urandom_range(1, 40);
      run = $urandom_range(1);
      repeat (n) @(negedge clk);
      if (run) expect_n += n;
      checks++;
      if (count !== expect_n) begin failures++; $display("FAIL count %0d exp %0d", count, expect_n); end
      if (t % 50 == 49) begin
        clr = 1; @(negedge clk); clr = 0; expect_n = 0;
        checks++; if (count !== 0) begin failures++; $display("FAIL clear"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
