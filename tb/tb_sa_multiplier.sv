// tb_sa_multiplier -- random S' and A entries, with and without the earlier partial
// sum: the registered output must equal prev*acc + sum of the four products, mod
// 2^16, one clock later, with valid_o following valid_i.
module tb_sa_multiplier;
  import frodo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, valid_i = 0, acc = 0, valid_o;
  entry_t s_i [4];
  entry_t a_i [4];
  entry_t prev_i, sum_o;

  sa_multiplier dut (.clk, .valid_i, .acc, .s_i, .a_i, .prev_i, .sum_o, .valid_o);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      valid_i = 1; acc = $urandom_range(1); prev_i = 16'($urandom);
      e = acc ? prev_i : 0;
      for (int p = 0; p < 4; p++) begin
        s_i[p] = 16'($urandom); a_i[p] = 16'($urandom);
        e += s_i[p] * a_i[p];
      end
      @(negedge clk);
      valid_i = 0;
      checks++;
      if (sum_o !== e[15:0] || valid_o !== 1'b1) begin
        failures++; $display("FAIL t=%0d got %h exp %h", t, sum_o, e[15:0]);
      end
      @(negedge clk);
      checks++;
      if (valid_o !== 1'b0) begin failures++; $display("FAIL valid_o stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
