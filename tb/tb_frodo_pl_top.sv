// tb_frodo_pl_top -- end-to-end test of the accelerator at its default size, driven
// only through the AXI4-Lite port, as the processor software would drive it for
// FrodoKEM-640:
//   * AS <- A x S: S (640x8) is loaded once, then A is streamed in all 160 batches
//     of four rows, each batch started and polled until done; the whole 640x8
//     result is read back and compared with a product computed here (mod 2^16).
//   * S'A <- S' x A: for each half of S' (rows 0-3, then 4-7) the half is loaded
//     and all 160 batches of A are streamed again; the 8x640 result is compared.
//   * SHAKE128 at the sizes FrodoKEM-640 uses: hashing a 9616-byte public key to 16
//     bytes, expanding a 17-byte seed to the 20608 bytes of S, E and E'' (the
//     largest output, filling 2583 words of the system BRAM) and a message of an
//     exact number of blocks (padding in a block of its own), compared with the
//     reference model.
//   * the PL timer, run across the S'A pass, must have counted its clocks.
// The counts of batches run, S'A overwrite and accumulate runs, half switches,
// multi-block absorbs and squeezes, padding-only blocks, busy polls and timer runs
// are reported; a mechanism that never happened counts as a failure.
module tb_frodo_pl_top;
  import frodo_pkg::*;
  import keccak_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [18:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic [1:0] s_bresp, s_rresp;

  frodo_pl_top dut (.*);

  always #5 clk = ~clk;
  longint unsigned cycles = 0;
  always @(posedge clk) cycles++;
  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI master ----------------
  task automatic wr(int region, int off, logic [31:0] data);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = 19'((region << 15) | (off << 2));
    s_wvalid = 1; s_wdata = data; s_bready = 1;
    #1;
    while (!s_awready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    #1;
    while (!s_bvalid) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); s_bready = 0;
  endtask

  task automatic rd(int region, int off, output logic [31:0] data);
    @(negedge clk);
    s_arvalid = 1; s_araddr = 19'((region << 15) | (off << 2)); s_rready = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); s_arvalid = 0;
    #1;
    while (!s_rvalid) begin @(negedge clk); #1; end
    data = s_rdata;
    @(posedge clk);
    @(negedge clk); s_rready = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_as_runs = 0, n_sa_first = 0, n_sa_acc = 0, n_half = 0, n_busy_polls = 0;
  int n_multi_absorb = 0, n_multi_squeeze = 0, n_pad_block = 0, n_timer = 0;

  // poll STATUS until the unit is idle and its done flag is set; a unit that
  // never finishes ends the test
  task automatic wait_done(int bit_idx);
    logic [31:0] st;
    int polls = 0;
    do begin
      rd(0, 1, st);
      if (st[bit_idx]) n_busy_polls++;
      polls++;
      if (polls > 20000) begin
        failures++;
        $display("FAIL unit %0d never finished", bit_idx);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end while (st[bit_idx] || !st[8 + bit_idx]);
  endtask

  // ---------------- data ----------------
  entry_t A  [640][640];
  entry_t S  [640][8];
  entry_t SP [8][640];

  task automatic load_a(int region, int g);
    for (int r = 0; r < 4; r++)
      for (int m = 0; m < 320; m++)
        wr(region, 512 * r + m, {A[4*g + r][2*m + 1], A[4*g + r][2*m]});
  endtask

  task automatic test_as();
    logic [31:0] d;
    int bad = 0;
    for (int j = 0; j < 8; j++)
      for (int m = 0; m < 320; m++) wr(2, 320 * j + m, {S[2*m + 1][j], S[2*m][j]});
    for (int g = 0; g < 160; g++) begin
      load_a(1, g);
      wr(0, 2, g);
      wr(0, 0, 32'h1);
      wait_done(0);
      n_as_runs++;
    end
    for (int i = 0; i < 640; i++)
      for (int j = 0; j < 8; j++) begin
        int unsigned s;
        s = 0;
        for (int k = 0; k < 640; k++) s += A[i][k] * S[k][j];
        rd(3, 8 * i + j, d);
        checks++;
        if (d !== {16'd0, s[15:0]}) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL AS[%0d][%0d] got %h exp %h", i, j, d, s[15:0]);
        end
      end
  endtask

  task automatic test_sa();
    logic [31:0] d, t0, t1;
    int bad = 0;
    longint unsigned c0, c1;
    wr(0, 6, 32'h2);            // clear timer
    wr(0, 6, 32'h1);            // run
    c0 = cycles;
    for (int h = 0; h < 2; h++) begin
      for (int i = 0; i < 4; i++)
        for (int g = 0; g < 160; g++)
          for (int b = 0; b < 2; b++)
            wr(5, 1024 * b + 160 * i + g, {SP[4*h + i][4*g + 2*b + 1], SP[4*h + i][4*g + 2*b]});
      if (h == 1) n_half++;
      for (int g = 0; g < 160; g++) begin
        load_a(4, g);
        wr(0, 3, (h << 8) | g);
        wr(0, 0, 32'h2);
        wait_done(1);
        if (g == 0) n_sa_first++; else n_sa_acc++;
      end
    end
    wr(0, 6, 32'h0);            // stop
    c1 = cycles;
    rd(0, 7, t1);
    checks++;
    // the timer runs from the clock after the run write to the clock of the stop write
    if (t1 < 32'(c1 - c0 - 16) || t1 > 32'(c1 - c0)) begin
      failures++; $display("FAIL timer %0d for %0d clocks", t1, c1 - c0);
    end else n_timer++;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 640; j++) begin
        int unsigned s;
        s = 0;
        for (int k = 0; k < 640; k++) s += SP[i][k] * A[k][j];
        rd(6, 640 * i + j, d);
        checks++;
        if (d !== {16'd0, s[15:0]}) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL S'A[%0d][%0d] got %h exp %h", i, j, d, s[15:0]);
        end
      end
  endtask

  task automatic test_shake(int mlen, int olen);
    bytes_t msg, e;
    logic [31:0] d;
    int bad = 0;
    msg = new[mlen];
    foreach (msg[i]) msg[i] = 8'($urandom);
    for (int w = 0; w < (mlen + 3) / 4; w++) begin
      logic [31:0] v;
      for (int b = 0; b < 4; b++) v[8*b +: 8] = (4*w + b < mlen) ? msg[4*w + b] : 8'h00;
      wr(7, w, v);
    end
    wr(0, 4, mlen);
    wr(0, 5, olen);
    wr(0, 0, 32'h4);
    wait_done(2);
    if (mlen >= 168) n_multi_absorb++;
    if (olen > 168) n_multi_squeeze++;
    if (mlen % 168 == 0 && mlen > 0) n_pad_block++;
    e = shake128(msg, olen);
    for (int w = 0; w < (olen + 3) / 4; w++) begin
      rd(7, w, d);
      for (int b = 0; b < 4; b++) if (4*w + b < olen) begin
        checks++;
        if (d[8*b +: 8] !== e[4*w + b]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL SHAKE(%0d,%0d) byte %0d", mlen, olen, 4*w + b);
        end
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 640; i++) for (int k = 0; k < 640; k++) A[i][k] = 16'($urandom);
    for (int k = 0; k < 640; k++) for (int j = 0; j < 8; j++) S[k][j] = 16'($urandom);
    for (int i = 0; i < 8; i++) for (int k = 0; k < 640; k++) SP[i][k] = 16'($urandom);
    repeat (4) @(negedge clk);
    rst_n = 1;
    test_as();
    $display("AS done at cycle %0d", cycles);
    test_sa();
    $display("S'A done at cycle %0d", cycles);
    test_shake(9616, 16);
    test_shake(17, 20608);
    test_shake(336, 200);
    $display("SHAKE done at cycle %0d", cycles);
    need("AS batch run", n_as_runs);
    need("S'A first batch (overwrite)", n_sa_first);
    need("S'A accumulate batch", n_sa_acc);
    need("S' half switch", n_half);
    need("busy seen while polling", n_busy_polls);
    need("multi-block absorb", n_multi_absorb);
    need("multi-block squeeze", n_multi_squeeze);
    need("padding-only block", n_pad_block);
    need("timer measurement", n_timer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
