// tb_as_unit -- runs AS <- A x S on random FrodoKEM-640 sized data: S is loaded once,
// then several batches of four A rows (first, a middle one and the last batch 159)
// are loaded and multiplied. Every result of every run is compared with a product
// computed here mod 2^16, results of earlier batches must survive later runs, and
// each run must finish in 8*320 issue clocks plus at most 4.
module tb_as_unit;
  import frodo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic a_we = 0, s_we = 0, start = 0, busy, done, r_re = 0;
  logic [1:0] a_bank = 0;
  logic [8:0] a_addr = 0;
  logic [11:0] s_addr = 0;
  word_t a_wdata = 0, s_wdata = 0;
  logic [7:0] blk = 0;
  logic [9:0] r_row = 0;
  logic [2:0] r_col = 0;
  entry_t r_data;

  as_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t S [640][8];
  entry_t A [4][640];
  entry_t expect_as [640][8];
  logic   have [640];

  task automatic run_batch(int b);
    int cyc;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 640; k++) A[r][k] = 16'($urandom);
    for (int r = 0; r < 4; r++)
      for (int m = 0; m < 320; m++) begin
        @(negedge clk); a_we = 1; a_bank = 2'(r); a_addr = 9'(m);
        a_wdata = {A[r][2*m+1], A[r][2*m]};
      end
    @(negedge clk); a_we = 0; blk = 8'(b); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 2560 || cyc > 2564) begin failures++; $display("FAIL batch %0d took %0d clocks", b, cyc); end
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < 8; j++) begin
        int unsigned s;
        s = 0;
        for (int k = 0; k < 640; k++) s += A[r][k] * S[k][j];
        expect_as[4*b + r][j] = s[15:0];
      end
    for (int r = 0; r < 4; r++) have[4*b + r] = 1;
  endtask

  task automatic check_all();
    for (int row = 0; row < 640; row++) if (have[row])
      for (int j = 0; j < 8; j++) begin
        @(negedge clk); r_re = 1; r_row = 10'(row); r_col = 3'(j);
        @(negedge clk); r_re = 0;
        checks++;
        if (r_data !== expect_as[row][j]) begin
          failures++; $display("FAIL AS[%0d][%0d] got %h exp %h", row, j, r_data, expect_as[row][j]);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 640; i++) have[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 640; k++) for (int j = 0; j < 8; j++) S[k][j] = 16'($urandom);
    for (int j = 0; j < 8; j++)
      for (int m = 0; m < 320; m++) begin
        @(negedge clk); s_we = 1; s_addr = 12'(320*j + m); s_wdata = {S[2*m+1][j], S[2*m][j]};
      end
    @(negedge clk); s_we = 0;
    run_batch(0);
    check_all();
    run_batch(77);
    run_batch(159);
    check_all();
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
