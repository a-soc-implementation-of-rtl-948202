// as_unit -- hardware part of B <- AS + E: computes AS <- A x S, four rows of A per run.
//
// Buffers: four 320x32 row buffers of A (one row of 640 entries each, two entries
// per word), one 2560x32 buffer holding all of S (stored as the 8 columns of S, 320
// words per column, word m of column j = {S[2m+1][j], S[2m][j]}), and four result
// buffers of AS (one per row of the four-row batch, 160 batches x 8 columns each).
// The host fills A and S through the write ports, writes the batch index and pulses
// `start`. For j = 0..7 and m = 0..319 the controller reads word m of every A row
// and word m of column j of S; the as_multiplier accumulates four dot products and,
// after the last m of a column, AS[4*blk+r][j] is written to result buffer r at
// address 8*blk + j. One batch takes 8*320 = 2560 issue clocks plus 3 clocks of
// pipeline; `done` pulses for one clock at the end, `busy` is high meanwhile.
// Results are read with `r_re`, `r_row` (0..639) and `r_col` (0..7), data one clock
// later. The host may only access the buffers while `busy` is low.
//
// The buffer sizes, the four-row batches, the packing of two entries per word and
// the datapath follow the original architecture, as does leaving the addition of E
// to software; the S layout, the result layout and the handshake are chosen here.
module as_unit
  import frodo_pkg::*;
#(
  parameter int unsigned A_DEPTH  = N / 2,             // 320 words per row of A
  parameter int unsigned NCOL     = NBAR,              // columns of S
  parameter int unsigned NBLK     = N / ROWS,          // 160 batches of four rows
  localparam int unsigned S_DEPTH = NCOL * A_DEPTH,    // 2560
  localparam int unsigned R_DEPTH = NBLK * NCOL,       // 1280 per result buffer
  localparam int unsigned AAW     = $clog2(A_DEPTH),
  localparam int unsigned SAW     = $clog2(S_DEPTH),
  localparam int unsigned RAW     = $clog2(R_DEPTH),
  localparam int unsigned BLW     = $clog2(NBLK),
  localparam int unsigned CW      = (NCOL > 1) ? $clog2(NCOL) : 1,
  localparam int unsigned ROWW    = $clog2(NBLK * ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host writes of A
  input  logic             a_we,
  input  logic [1:0]       a_bank,
  input  logic [AAW-1:0]   a_addr,
  input  word_t            a_wdata,
  // host writes of S
  input  logic             s_we,
  input  logic [SAW-1:0]   s_addr,
  input  word_t            s_wdata,
  // control
  input  logic             start,
  input  logic [BLW-1:0]   blk,
  output logic             busy,
  output logic             done,
  // host reads of AS
  input  logic             r_re,
  input  logic [ROWW-1:0]  r_row,
  input  logic [CW-1:0]    r_col,
  output entry_t           r_data
);

  // ---------------- control counters ----------------
  logic           run;
  logic [AAW-1:0] m;
  logic [CW-1:0]  j;
  logic [BLW-1:0] blk_q;
  logic           issue, issue_first, issue_last;

  assign issue       = run;
  assign issue_first = (m == '0);
  assign issue_last  = (32'(m) == A_DEPTH - 1);

  // pipeline: stage1 = RAM output, stage2 = D output, stage3 = accumulator output
  logic          v1, f1, l1, l2, l3;
  logic [CW-1:0] j1, j2, j3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; m <= '0; j <= '0; blk_q <= '0;
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; l2 <= 1'b0; l3 <= 1'b0;
      j1 <= '0; j2 <= '0; j3 <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        run <= 1'b1; m <= '0; j <= '0; blk_q <= blk;
      end else if (run) begin
        if (issue_last) begin
          m <= '0;
          if (32'(j) == NCOL - 1) run <= 1'b0;
          else j <= j + 1'b1;
        end else begin
          m <= m + 1'b1;
        end
      end
      v1 <= issue; f1 <= issue && issue_first; l1 <= issue && issue_last; j1 <= j;
      l2 <= l1; j2 <= j1;
      l3 <= l2; j3 <= j2;
      if (l3 && 32'(j3) == NCOL - 1) done <= 1'b1;
    end
  end

  assign busy = run | v1 | l2 | l3;

  // ---------------- buffers of A and S ----------------
  word_t a_rdata [ROWS];
  word_t s_rdata;

  for (genvar r = 0; r < ROWS; r++) begin : g_abuf
    bram_sdp #(.WIDTH(BW), .DEPTH(A_DEPTH)) u_a (
      .clk, .we(a_we && a_bank == 2'(r)), .waddr(a_addr), .wdata(a_wdata),
      .re(issue), .raddr(m), .rdata(a_rdata[r]));
  end

  bram_sdp #(.WIDTH(BW), .DEPTH(S_DEPTH)) u_s (
    .clk, .we(s_we), .waddr(s_addr), .wdata(s_wdata),
    .re(issue), .raddr(SAW'(32'(j) * A_DEPTH + 32'(m))), .rdata(s_rdata));

  // ---------------- multiplier ----------------
  entry_t acc [ROWS];

  as_multiplier #(.LANES(ROWS)) u_mul (
    .clk, .valid(v1), .first(f1), .a_word(a_rdata), .s_word(s_rdata), .acc_o(acc));

  // ---------------- result buffers of AS ----------------
  entry_t           rd [ROWS];
  logic [1:0]       r_bank_q;
  logic [RAW-1:0]   w_addr, rd_addr;

  assign w_addr  = RAW'(32'(blk_q) * NCOL + 32'(j3));
  assign rd_addr = RAW'(32'(r_row >> 2) * NCOL + 32'(r_col));

  for (genvar r = 0; r < ROWS; r++) begin : g_rbuf
    bram_sdp #(.WIDTH(EW), .DEPTH(R_DEPTH)) u_r (
      .clk, .we(l3), .waddr(w_addr), .wdata(acc[r]),
      .re(r_re && r_row[1:0] == 2'(r)), .raddr(rd_addr), .rdata(rd[r]));
  end

  always_ff @(posedge clk) if (r_re) r_bank_q <= r_row[1:0];
  assign r_data = rd[r_bank_q];

endmodule
