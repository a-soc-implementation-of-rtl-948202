// sa_multiplier -- datapath of S'A <- S' x A: four multipliers feeding one adder.
//
// Multiplier p forms S'[i][4g+p] * A[4g+p][j] for the four rows of A held in the row
// buffers; the adder (Sigma) sums the four products and, when `acc` is set, the
// partial result of earlier batches read back from the S'A buffer. Arithmetic is
// modulo 2^16. The sum is registered: `sum_o` and `valid_o` follow the inputs by one
// clock. Four multipliers and one adder follow the original schematic; adding the
// earlier partial result inside Sigma is a choice made here.
module sa_multiplier
  import frodo_pkg::*;
#(
  parameter int unsigned LANES = ROWS
) (
  input  logic   clk,
  input  logic   valid_i,
  input  logic   acc,
  input  entry_t s_i   [LANES],
  input  entry_t a_i   [LANES],
  input  entry_t prev_i,
  output entry_t sum_o,
  output logic   valid_o
);

  entry_t sum;

  always_comb begin
    sum = acc ? prev_i : entry_t'(0);
    for (int p = 0; p < LANES; p++) sum = sum + entry_t'(s_i[p] * a_i[p]);
  end

  always_ff @(posedge clk) begin
    valid_o <= valid_i;
    if (valid_i) sum_o <= sum;
  end

endmodule
