// tb_shake128_core -- the absorb/squeeze controller against a memory modelled here
// (one clock read latency) and a Keccak round instance: messages and outputs of
// several block counts are compared with the reference model, the core must write
// exactly ceil(out_len/168)*21 words from word 0 on, must never read past the blocks
// it absorbs, and `busy` must span the run.
module tb_shake128_core;
  import frodo_pkg::*;
  import keccak_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] msg_len = 0, out_len = 0;
  logic mem_re, mem_we;
  logic [11:0] mem_raddr, mem_waddr;
  lane_t mem_rdata, mem_wdata;
  kstate_t k_o, k_i;
  logic [4:0] k_round;
  lane_t mem [2583];
  int writes, max_read;

  shake128_core dut (.clk, .rst_n, .start, .msg_len, .out_len, .busy, .done,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata,
    .k_state_o(k_o), .k_round, .k_state_i(k_i));
  keccak_round u_k (.state_i(k_o), .round_idx(k_round), .state_o(k_i));

  always_ff @(posedge clk) begin
    if (mem_re) begin
      mem_rdata <= mem[mem_raddr];
      if (int'(mem_raddr) > max_read) max_read = int'(mem_raddr);
    end
    if (mem_we) begin
      mem[mem_waddr] <= mem_wdata;
      writes++;
    end
  end

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int mlen, int olen);
    bytes_t msg, e;
    bit ok = 1;
    msg = new[mlen];
    foreach (msg[i]) msg[i] = 8'($urandom);
    for (int w = 0; w < 2583; w++) mem[w] = {$urandom, $urandom};
    foreach (msg[i]) mem[i / 8][8 * (i % 8) +: 8] = msg[i];
    writes = 0; max_read = -1;
    @(negedge clk); msg_len = 16'(mlen); out_len = 16'(olen); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    while (!done) @(negedge clk);
    e = shake128(msg, olen);
    foreach (e[i]) if (mem[i / 8][8 * (i % 8) +: 8] !== e[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL digest mlen %0d olen %0d", mlen, olen); end
    checks++;
    if (writes != 21 * ((olen + 167) / 168)) begin failures++; $display("FAIL %0d words written", writes); end
    checks++;
    if (max_read != 21 * (mlen / 168 + 1) - 1) begin failures++; $display("FAIL read up to %0d", max_read); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 32);
    run(33, 168);
    run(168, 400);
    run(2000, 1000);
    run(5000, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
