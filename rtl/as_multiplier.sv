// as_multiplier -- datapath of AS <- A x S for four rows of A at once.
//
// Five "D" blocks split the incoming 32-bit words into 16-bit entries: one per row
// buffer of A (entries A[r][2m] and A[r][2m+1]) and one for S (entries S[2m][j] and
// S[2m+1][j] of the current column j of S). Eight multipliers form the products of
// each row's pair with the shared S pair, and four adders (Sigma) add each row's two
// products into that row's running dot product. Over m = 0..319 the four
// accumulators therefore hold AS[r][j] for the four rows. Arithmetic is modulo 2^16.
//
// Timing: the words arrive with `valid`; `first` marks m = 0 and clears the sum.
// The D stage adds one clock, so acc_o reflects a word two clocks after it was
// presented. The count of D blocks, multipliers and adders follows the original
// schematic; reading Sigma as a running accumulator is a choice made here.
module as_multiplier
  import frodo_pkg::*;
#(
  parameter int unsigned LANES = ROWS
) (
  input  logic   clk,
  input  logic   valid,
  input  logic   first,
  input  word_t  a_word [LANES],
  input  word_t  s_word,
  output entry_t acc_o  [LANES]
);

  entry_t a_lo [LANES];
  entry_t a_hi [LANES];
  entry_t s_lo, s_hi;
  logic   valid_d, first_d;

  for (genvar r = 0; r < LANES; r++) begin : g_da
    word_split u_d (.clk, .en(valid), .word_i(a_word[r]), .lo_o(a_lo[r]), .hi_o(a_hi[r]));
  end
  word_split u_ds (.clk, .en(valid), .word_i(s_word), .lo_o(s_lo), .hi_o(s_hi));

  always_ff @(posedge clk) begin
    valid_d <= valid;
    first_d <= first;
  end

  for (genvar r = 0; r < LANES; r++) begin : g_mac
    entry_t p_lo, p_hi;
    always_comb begin
      p_lo = entry_t'(a_lo[r] * s_lo);
      p_hi = entry_t'(a_hi[r] * s_hi);
    end
    always_ff @(posedge clk)
      if (valid_d) acc_o[r] <= (first_d ? entry_t'(0) : acc_o[r]) + p_lo + p_hi;
  end

endmodule
