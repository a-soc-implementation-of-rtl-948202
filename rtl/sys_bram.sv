// sys_bram -- the system BRAM of the SHAKE128 engine: 2583 words of 64 bits that hold
// first the message and afterwards the squeezed output.
//
// Host side: a 32-bit port, word address h_addr = 2*w + k reaches bits 32k+31:32k of
// 64-bit word w, so two consecutive host words are concatenated into one memory word
// (host word 2w in the low half). Bytes are little-endian throughout: message byte
// 8w+b sits in bits 8b+7:8b of word w, matching the Keccak lane order. Core side: a
// 64-bit read port and a 64-bit write port. `core_sel` gives both ports to the core
// (while it runs) or to the host. Reads are registered, one clock of latency.
// The size follows the original architecture; the byte order and the port
// arrangement are chosen here.
module sys_bram
  import frodo_pkg::*;
#(
  parameter int unsigned DEPTH = SYS_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned HAW  = AW + 1
) (
  input  logic           clk,
  input  logic           core_sel,
  // host, 32 bits
  input  logic           h_we,
  input  logic [HAW-1:0] h_addr,
  input  word_t          h_wdata,
  input  logic           h_re,
  output word_t          h_rdata,
  // core, 64 bits
  input  logic           c_we,
  input  logic [AW-1:0]  c_waddr,
  input  lane_t          c_wdata,
  input  logic           c_re,
  input  logic [AW-1:0]  c_raddr,
  output lane_t          c_rdata
);

  logic [1:0][31:0] mem [DEPTH];
  logic [1:0][31:0] rd;
  logic             h_half_q;
  logic [AW-1:0]    h_word;

  assign h_word = h_addr[HAW-1:1];

  always_ff @(posedge clk) begin
    if (core_sel) begin
      if (c_we && 32'(c_waddr) < DEPTH) mem[c_waddr] <= c_wdata;
      if (c_re) rd <= (32'(c_raddr) < DEPTH) ? mem[c_raddr] : '0;
    end else begin
      if (h_we && 32'(h_word) < DEPTH) mem[h_word][h_addr[0]] <= h_wdata;
      if (h_re) begin
        rd       <= (32'(h_word) < DEPTH) ? mem[h_word] : '0;
        h_half_q <= h_addr[0];
      end
    end
  end

  assign c_rdata = rd;
  assign h_rdata = rd[h_half_q];

endmodule
