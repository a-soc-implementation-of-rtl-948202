// tb_shake_unit -- SHAKE128 through the host port of the engine: messages of lengths
// around the 168-byte block boundaries (including empty and the padding landing in a
// block of its own) and outputs of one and of several blocks are compared with the
// reference model; the empty message is also checked against the published first
// bytes of SHAKE128(""). Each run must take 46 clocks per absorbed block plus 21 per
// squeezed block plus 24 per further squeezed block (plus at most 2).
module tb_shake_unit;
  import frodo_pkg::*;
  import keccak_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, h_we = 0, h_re = 0, start = 0, busy, done;
  logic [12:0] h_addr = 0;
  word_t h_wdata = 0, h_rdata;
  logic [15:0] msg_len = 0, out_len = 0;

  shake_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int mlen, int olen, output bytes_t got);
    bytes_t msg;
    int cyc, nabs, nsq, expc;
    msg = new[mlen];
    foreach (msg[i]) msg[i] = 8'($urandom);
    for (int w = 0; w < (mlen + 3) / 4; w++) begin
      @(negedge clk); h_we = 1; h_addr = 13'(w);
      for (int b = 0; b < 4; b++) h_wdata[8*b +: 8] = (4*w + b < mlen) ? msg[4*w + b] : 8'($urandom);
    end
    @(negedge clk); h_we = 0; msg_len = 16'(mlen); out_len = 16'(olen); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    nabs = mlen / 168 + 1;
    nsq = (olen + 167) / 168;
    expc = 46 * nabs + 21 * nsq + 24 * (nsq - 1);
    checks++;
    if (cyc < expc || cyc > expc + 2) begin
      failures++; $display("FAIL mlen %0d olen %0d took %0d clocks, expected %0d", mlen, olen, cyc, expc);
    end
    got = new[olen];
    for (int w = 0; w < (olen + 3) / 4; w++) begin
      @(negedge clk); h_re = 1; h_addr = 13'(w);
      @(negedge clk); h_re = 0;
      for (int b = 0; b < 4; b++) if (4*w + b < olen) got[4*w + b] = h_rdata[8*b +: 8];
    end
    begin
      bytes_t e;
      bit ok = 1;
      e = shake128(msg, olen);
      foreach (e[i]) if (e[i] !== got[i]) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("FAIL digest mlen %0d olen %0d", mlen, olen); end
    end
  endtask

  initial begin
    bytes_t got;
    logic [127:0] kat = 128'h7f9c2ba4e88f827d616045507605853e;
    int lens [10] = '{0, 1, 7, 135, 167, 168, 169, 336, 500, 1000};
    int outs [4]  = '{32, 168, 169, 600};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 16, got);
    checks++;
    for (int i = 0; i < 16; i++)
      if (got[i] !== kat[127 - 8*i -: 8]) begin failures++; $display("FAIL KAT byte %0d", i); break; end
    for (int t = 0; t < 10; t++) run(lens[t], outs[t % 4], got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
