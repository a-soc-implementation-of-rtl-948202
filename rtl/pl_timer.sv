// pl_timer -- the dedicated timer in the programmable logic that measures processing
// time in clock cycles.
//
// A 32-bit up-counter: `clr` sets it to zero, otherwise it counts every clock while
// `run` is high and holds its value while `run` is low. The host reads `count`
// before and after an operation. Only the existence of a PL timer is given by the
// architecture; width, clear and enable are chosen here (32 bits cover 42 s at
// 100 MHz). Reset clears the count.
module pl_timer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             run,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (run) count <= count + 1'b1;

endmodule
