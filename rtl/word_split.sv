// word_split -- block "D" of the A x S multiplier: separates one 32-bit bus word into
// the two 16-bit matrix entries that the host packed into it.
//
// The host concatenates two consecutive entries in one word, the entry with the
// lower index in bits 15:0 and the next one in bits 31:16. The split is registered,
// so D also forms one pipeline stage between the block RAM outputs and the
// multipliers (latency one clock, `en` gates the register). Registering D is a
// choice made here.
module word_split
  import frodo_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  word_t  word_i,
  output entry_t lo_o,
  output entry_t hi_o
);

  always_ff @(posedge clk)
    if (en) begin
      lo_o <= word_i[15:0];
      hi_o <= word_i[31:16];
    end

endmodule
