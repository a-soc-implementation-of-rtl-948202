// shake_unit -- the SHAKE128 accelerator: system BRAM, SHAKE128 controller and
// Keccak-f[1600] round, wired as three instances.
//
// The host writes the message into the system BRAM through the 32-bit port (four
// bytes per word, little-endian), sets msg_len and out_len in bytes and pulses
// `start`. While `busy` the BRAM belongs to the controller, which absorbs the
// message, runs the permutation one round per clock and writes the output over the
// message from word 0 on. After `done` the host reads the output through the same
// 32-bit port (read data one clock after h_re). See shake128_core for the timing.
module shake_unit
  import frodo_pkg::*;
#(
  parameter int unsigned DEPTH = SYS_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_we,
  input  logic [AW:0] h_addr,
  input  word_t       h_wdata,
  input  logic        h_re,
  output word_t       h_rdata,
  input  logic        start,
  input  logic [15:0] msg_len,
  input  logic [15:0] out_len,
  output logic        busy,
  output logic        done
);

  logic          mem_re, mem_we;
  logic [AW-1:0] mem_raddr, mem_waddr;
  lane_t         mem_rdata, mem_wdata;
  kstate_t       k_in, k_out;
  logic [4:0]    k_round;

  sys_bram #(.DEPTH(DEPTH)) u_bram (
    .clk, .core_sel(busy),
    .h_we, .h_addr, .h_wdata, .h_re, .h_rdata,
    .c_we(mem_we), .c_waddr(mem_waddr), .c_wdata(mem_wdata),
    .c_re(mem_re), .c_raddr(mem_raddr), .c_rdata(mem_rdata));

  shake128_core #(.DEPTH(DEPTH)) u_core (
    .clk, .rst_n, .start, .msg_len, .out_len, .busy, .done,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata,
    .k_state_o(k_in), .k_round, .k_state_i(k_out));

  keccak_round u_keccak (.state_i(k_in), .round_idx(k_round), .state_o(k_out));

endmodule
