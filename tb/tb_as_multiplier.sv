// tb_as_multiplier -- streams random packed words of four A rows and one S column
// into the datapath and checks the four dot products (mod 2^16) two clocks after the
// last word, over several dot products of random length, with idle clocks between
// words.
module tb_as_multiplier;
  import frodo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, valid = 0, first = 0;
  word_t a_word [4];
  word_t s_word;
  entry_t acc [4];

  as_multiplier dut (.clk, .valid, .first, .a_word, .s_word, .acc_o(acc));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref_sum [4];
    for (int t = 0; t < 40; t++) begin
      int len;
      len = (t == 0) ? 320 : $urandom_range(1, 64);
      for (int r = 0; r < 4; r++) ref_sum[r] = 0;
      for (int m = 0; m < len; m++) begin
        @(negedge clk);
        valid = 1; first = (m == 0);
        s_word = $urandom;
        for (int r = 0; r < 4; r++) begin
          a_word[r] = $urandom;
          ref_sum[r] += a_word[r][15:0] * s_word[15:0] + a_word[r][31:16] * s_word[31:16];
        end
        if ($urandom_range(3) == 0) begin
          @(negedge clk); valid = 0; s_word = $urandom; a_word[0] = $urandom;
        end
      end
      @(negedge clk); valid = 0; first = 0; s_word = $urandom;
      @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (acc[r] !== ref_sum[r][15:0]) begin
          failures++; $display("FAIL t=%0d row %0d got %h exp %h", t, r, acc[r], ref_sum[r][15:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
