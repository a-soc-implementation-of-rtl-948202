// tb_sa_unit -- runs S'A <- S' x A on random FrodoKEM-640 sized data with a reduced
// number of batches per half: both halves of S' are loaded in turn, batches 0 (which
// overwrites), then further batches (which accumulate) are run with fresh A rows,
// and the whole 8x640 result is compared with the partial product computed here
// (mod 2^16) over the batches that were run. Each run must take 4*640 issue clocks
// plus at most 3.
module tb_sa_unit;
  import frodo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic a_we = 0, sp_we = 0, start = 0, busy, done, r_re = 0, half = 0, sp_bank = 0;
  logic [1:0] a_bank = 0;
  logic [8:0] a_addr = 0;
  logic [9:0] sp_addr = 0;
  word_t a_wdata = 0, sp_wdata = 0;
  logic [7:0] blk = 0;
  logic [12:0] r_idx = 0;
  entry_t r_data;

  sa_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t SP [8][640];
  entry_t A [640][640];     // only the rows of the batches run are filled
  int     batches [4] = '{0, 1, 100, 159};
  int unsigned acc [8][640];
  int     runs_acc = 0;

  task automatic load_half(int h);
    for (int i = 0; i < 4; i++)
      for (int g = 0; g < 160; g++)
        for (int b = 0; b < 2; b++) begin
          @(negedge clk); sp_we = 1; sp_bank = 1'(b); sp_addr = 10'(160*i + g);
          sp_wdata = {SP[4*h + i][4*g + 2*b + 1], SP[4*h + i][4*g + 2*b]};
        end
    @(negedge clk); sp_we = 0;
  endtask

  task automatic run_batch(int g, int h);
    int cyc;
    for (int r = 0; r < 4; r++)
      for (int m = 0; m < 320; m++) begin
        @(negedge clk); a_we = 1; a_bank = 2'(r); a_addr = 9'(m);
        a_wdata = {A[4*g + r][2*m+1], A[4*g + r][2*m]};
      end
    @(negedge clk); a_we = 0; blk = 8'(g); half = 1'(h); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 2560 || cyc > 2563) begin failures++; $display("FAIL batch %0d took %0d", g, cyc); end
    if (g != 0) runs_acc++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) for (int k = 0; k < 640; k++) SP[i][k] = 16'($urandom);
    for (int q = 0; q < 4; q++)
      for (int r = 0; r < 4; r++) for (int j = 0; j < 640; j++)
        A[4*batches[q] + r][j] = 16'($urandom);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 640; j++) begin
      acc[i][j] = 0;
      for (int q = 0; q < 4; q++) for (int p = 0; p < 4; p++)
        acc[i][j] += SP[i][4*batches[q] + p] * A[4*batches[q] + p][j];
    end
    for (int h = 0; h < 2; h++) begin
      load_half(h);
      // batch 0 twice: the second run must overwrite, not add to, the first
      run_batch(0, h);
      for (int q = 0; q < 4; q++) run_batch(batches[q], h);
    end
    for (int idx = 0; idx < 5120; idx++) begin
      @(negedge clk); r_re = 1; r_idx = 13'(idx);
      @(negedge clk); r_re = 0;
      checks++;
      if (r_data !== acc[idx / 640][idx % 640][15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL S'A[%0d][%0d] got %h exp %h", idx / 640, idx % 640, r_data, acc[idx/640][idx%640][15:0]);
      end
    end
    checks++;
    if (runs_acc != 6) begin failures++; $display("FAIL accumulate runs %0d", runs_acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
