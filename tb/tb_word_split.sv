// tb_word_split -- block D: random words must come out as their low and high 16-bit
// halves one clock later, and a word presented with `en` low must not be taken.
module tb_word_split;
  import frodo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en;
  word_t w;
  entry_t lo, hi;

  word_split dut (.clk, .en, .word_i(w), .lo_o(lo), .hi_o(hi));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prev;
    en = 0; w = '0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      w = $urandom; en = 1;
      @(negedge clk);
      checks++;
      if (lo !== w[15:0] || hi !== w[31:16]) begin
        failures++; $display("FAIL word %h -> %h %h", w, hi, lo);
      end
      prev = w;
      w = $urandom; en = 0;
      @(negedge clk);
      checks++;
      if ({hi, lo} !== prev) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
