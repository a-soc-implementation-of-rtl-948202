// bram_sdp -- simple dual-port block RAM: one synchronous write port, one read port
// with a registered output (one clock of read latency), as FPGA block RAM provides.
//
// All matrix buffers of the accelerators are built from it: the four 320x32 row
// buffers of A, the 2560x32 buffer of S, the result buffers of AS and S'A and the two
// 640x32 buffers of S'. Contents are not reset; whoever reads a location writes it
// first. A read and a write of the same address in one clock return the old data.
module bram_sdp #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 320,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
