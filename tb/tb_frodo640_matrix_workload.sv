// tb_frodo640_matrix_workload -- the FrodoKEM-640 matrix work of key generation and
// encapsulation run on the accelerator the way the processor software would run it,
// at full size and only through the AXI4-Lite port:
//   * A is never stored: each of its 640 rows is regenerated from a 16-byte seed on
//     the SHAKE128 engine (row i = SHAKE128(i as 2 little-endian bytes || seed, 1280
//     bytes), read as 640 little-endian 16-bit entries), read back and written to the
//     row buffers of both matrix engines, four rows per batch;
//   * during the first pass over A the AS and S'A engines are started together on
//     each batch; the second pass (second half of S') feeds only the S'A engine;
//   * software then forms B = AS + E and B' = S'A + E' modulo q = 2^15, with S, S',
//     E and E' small signed values as FrodoKEM samples them.
// B and B' are compared with values computed here from the reference SHAKE128. The
// number of times both matrix engines were seen busy at once is reported and must
// be non-zero.
module tb_frodo640_matrix_workload;
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
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  int n_both_busy = 0;

  // wait until every unit in `mask` (STATUS bits 2:0) is idle with its done flag set
  task automatic wait_done(logic [2:0] mask);
    logic [31:0] st;
    int polls = 0;
    do begin
      rd(0, 1, st);
      if (st[0] && st[1]) n_both_busy++;
      polls++;
      if (polls > 20000) begin
        failures++;
        $display("FAIL units %b never finished", mask);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end while ((st[2:0] & mask) != 0 || (st[10:8] & mask) != mask);
  endtask

  byte unsigned seed [16];
  entry_t A  [640][640];     // reference A, from the reference SHAKE128
  int     bad_rows = 0;
  entry_t S  [640][8];
  entry_t E  [640][8];
  entry_t SP [8][640];
  entry_t EP [8][640];

  function automatic entry_t small_sample();
    int v;
    v = $urandom_range(24) - 12;
    return entry_t'(v);
  endfunction

  // generate row i of A on the SHAKE engine and copy it into the A buffers
  task automatic gen_row(int i, int row_in_batch, bit to_as);
    logic [31:0] d;
    wr(7, 0, {seed[1], seed[0], 8'(i >> 8), 8'(i)});
    for (int w = 1; w < 5; w++) wr(7, w, {seed[4*w + 1], seed[4*w], seed[4*w - 1], seed[4*w - 2]});
    wr(0, 4, 18);
    wr(0, 5, 1280);
    wr(0, 0, 32'h4);
    wait_done(3'b100);
    checks++;
    for (int m = 0; m < 320; m++) begin
      rd(7, m, d);
      if (d !== {A[i][2*m + 1], A[i][2*m]}) begin
        failures++;
        if (bad_rows++ < 5) $display("FAIL row %0d of A, word %0d: %h", i, m, d);
        break;
      end
      wr(4, 512 * row_in_batch + m, d);
      if (to_as) wr(1, 512 * row_in_batch + m, d);
    end
  endtask

  initial begin
    logic [31:0] d;
    int bad = 0;
    foreach (seed[k]) seed[k] = 8'($urandom);
    for (int k = 0; k < 640; k++) for (int j = 0; j < 8; j++) begin S[k][j] = small_sample(); E[k][j] = small_sample(); end
    for (int i = 0; i < 8; i++) for (int k = 0; k < 640; k++) begin SP[i][k] = small_sample(); EP[i][k] = small_sample(); end
    // reference: A from the reference SHAKE128
    for (int i = 0; i < 640; i++) begin
      bytes_t msg, row;
      msg = new[18];
      msg[0] = 8'(i); msg[1] = 8'(i >> 8);
      for (int k = 0; k < 16; k++) msg[2 + k] = seed[k];
      row = shake128(msg, 1280);
      for (int j = 0; j < 640; j++) A[i][j] = {row[2*j + 1], row[2*j]};
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 8; j++)
      for (int m = 0; m < 320; m++) wr(2, 320 * j + m, {S[2*m + 1][j], S[2*m][j]});
    for (int h = 0; h < 2; h++) begin
      for (int i = 0; i < 4; i++)
        for (int g = 0; g < 160; g++)
          for (int b = 0; b < 2; b++)
            wr(5, 1024 * b + 160 * i + g, {SP[4*h + i][4*g + 2*b + 1], SP[4*h + i][4*g + 2*b]});
      for (int g = 0; g < 160; g++) begin
        for (int r = 0; r < 4; r++) gen_row(4 * g + r, r, h == 0);
        wr(0, 3, (h << 8) | g);
        if (h == 0) begin
          wr(0, 2, g);
          wr(0, 0, 32'h3);          // AS and S'A together
          wait_done(3'b011);
        end else begin
          wr(0, 0, 32'h2);
          wait_done(3'b010);
        end
      end
      $display("pass %0d over A done at cycle %0d", h, cycles);
    end
    // B = AS + E mod q
    for (int i = 0; i < 640; i++)
      for (int j = 0; j < 8; j++) begin
        int unsigned s;
        s = 0;
        for (int k = 0; k < 640; k++) s += A[i][k] * S[k][j];
        rd(3, 8 * i + j, d);
        checks++;
        if (15'(d[15:0] + E[i][j]) !== 15'(s + E[i][j])) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL B[%0d][%0d] got %h exp %h", i, j, d, s);
        end
      end
    // B' = S'A + E' mod q
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 640; j++) begin
        int unsigned s;
        s = 0;
        for (int k = 0; k < 640; k++) s += SP[i][k] * A[k][j];
        rd(6, 640 * i + j, d);
        checks++;
        if (15'(d[15:0] + EP[i][j]) !== 15'(s + EP[i][j])) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL B'[%0d][%0d]", i, j);
        end
      end
    checks++;
    $display("both matrix engines busy at once: %0d polls", n_both_busy);
    if (n_both_busy == 0) begin failures++; $display("FAIL engines never ran together"); end
    $display("finished at cycle %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
