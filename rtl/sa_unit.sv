// sa_unit -- hardware part of B' <- S'A + E': computes S'A <- S' x A, accumulating over
// batches of four rows of A.
//
// Buffers: four 320x32 row buffers of A (rows 4g..4g+3, two entries per word, exactly
// as in as_unit), two 640x32 buffers holding half of S' (four of its eight rows), and
// one 5120x16 buffer for the whole 8x640 result S'A. S' buffer b, address 160*i + g,
// holds {S'[h4+i][4g+2b+1], S'[h4+i][4g+2b]} (h4 = 4*half): each 32-bit word is split
// into its upper and lower 16 bits, so the two buffers deliver the four entries
// S'[i][4g..4g+3] that meet the four rows of A in the current batch.
//
// The host loads A rows 4g..4g+3 (and, once per half, the S' half), writes `blk` = g
// and `half`, and pulses `start`. For i = 0..3 and j = 0..639 the controller reads
// A[4g+p][j] from every row buffer, the four S' entries and, for g > 0, the partial
// S'A[4*half+i][j]; the sa_multiplier adds the four products to it and the result is
// written back one clock later. A run takes 4*640 = 2560 issue clocks plus 2 of
// pipeline; `done` pulses at the end. The whole product needs 160 batches for each of
// the two halves of S'. Results are read with `r_re`/`r_idx` (index 640*i + j), data
// one clock later, only while `busy` is low.
//
// Buffer sizes, the half-of-S' organisation and the four-multiplier datapath follow
// the original architecture; the S' word layout, the result buffer size, accumulation
// by read-modify-write and the handshake are chosen here.
module sa_unit
  import frodo_pkg::*;
#(
  parameter int unsigned NCOLS    = N,                  // columns of A and of S'A
  parameter int unsigned NBLK     = N / ROWS,           // 160 batches of four rows
  parameter int unsigned NROW     = NBAR,               // rows of S'
  localparam int unsigned A_DEPTH = NCOLS / 2,          // 320
  localparam int unsigned SP_DEPTH = (NROW / 2) * NBLK, // 640
  localparam int unsigned R_DEPTH = NROW * NCOLS,       // 5120
  localparam int unsigned AAW     = $clog2(A_DEPTH),
  localparam int unsigned SPW     = $clog2(SP_DEPTH),
  localparam int unsigned RAW     = $clog2(R_DEPTH),
  localparam int unsigned BLW     = $clog2(NBLK),
  localparam int unsigned JW      = $clog2(NCOLS),
  localparam int unsigned IW      = $clog2(NROW / 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host writes of A
  input  logic            a_we,
  input  logic [1:0]      a_bank,
  input  logic [AAW-1:0]  a_addr,
  input  word_t           a_wdata,
  // host writes of S' (buffer 0 or 1)
  input  logic            sp_we,
  input  logic            sp_bank,
  input  logic [SPW-1:0]  sp_addr,
  input  word_t           sp_wdata,
  // control
  input  logic            start,
  input  logic [BLW-1:0]  blk,
  input  logic            half,
  output logic            busy,
  output logic            done,
  // host reads of S'A
  input  logic            r_re,
  input  logic [RAW-1:0]  r_idx,
  output entry_t          r_data
);

  logic           run;
  logic [JW-1:0]  j;
  logic [IW-1:0]  i;
  logic [BLW-1:0] blk_q;
  logic           half_q;
  logic           issue_last_j;

  assign issue_last_j = (32'(j) == NCOLS - 1);

  logic           v1, v2;
  logic           j0_1;
  logic [RAW-1:0] ra_1, ra_2;

  logic [RAW-1:0] res_addr;
  assign res_addr = RAW'((32'(half_q) * (NROW / 2) + 32'(i)) * NCOLS + 32'(j));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; j <= '0; i <= '0; blk_q <= '0; half_q <= 1'b0;
      v1 <= 1'b0; j0_1 <= 1'b0; ra_1 <= '0; ra_2 <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        run <= 1'b1; j <= '0; i <= '0; blk_q <= blk; half_q <= half;
      end else if (run) begin
        if (issue_last_j) begin
          j <= '0;
          if (32'(i) == NROW / 2 - 1) run <= 1'b0;
          else i <= i + 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end
      v1 <= run; j0_1 <= j[0]; ra_1 <= res_addr;
      ra_2 <= ra_1;
      if (v2 && !v1) done <= 1'b1;
    end
  end

  assign busy = run | v1 | v2;

  // ---------------- buffers of A and S' ----------------
  word_t  a_rdata [ROWS];
  entry_t a_ent   [ROWS];
  word_t  sp_rdata [2];
  entry_t sp_ent  [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_abuf
    bram_sdp #(.WIDTH(BW), .DEPTH(A_DEPTH)) u_a (
      .clk, .we(a_we && a_bank == 2'(r)), .waddr(a_addr), .wdata(a_wdata),
      .re(run), .raddr(AAW'(j >> 1)), .rdata(a_rdata[r]));
    assign a_ent[r] = j0_1 ? a_rdata[r][31:16] : a_rdata[r][15:0];
  end

  for (genvar b = 0; b < 2; b++) begin : g_spbuf
    bram_sdp #(.WIDTH(BW), .DEPTH(SP_DEPTH)) u_sp (
      .clk, .we(sp_we && sp_bank == 1'(b)), .waddr(sp_addr), .wdata(sp_wdata),
      .re(run), .raddr(SPW'(32'(i) * NBLK + 32'(blk_q))), .rdata(sp_rdata[b]));
    assign sp_ent[2*b]   = sp_rdata[b][15:0];
    assign sp_ent[2*b+1] = sp_rdata[b][31:16];
  end

  // ---------------- multiplier and S'A buffer ----------------
  entry_t prev, sum;
  logic   acc_q;

  always_ff @(posedge clk) if (start && !busy) acc_q <= (blk != '0);

  sa_multiplier #(.LANES(ROWS)) u_mul (
    .clk, .valid_i(v1), .acc(acc_q), .s_i(sp_ent), .a_i(a_ent), .prev_i(prev),
    .sum_o(sum), .valid_o(v2));

  bram_sdp #(.WIDTH(EW), .DEPTH(R_DEPTH)) u_res (
    .clk, .we(v2), .waddr(ra_2), .wdata(sum),
    .re(run || (r_re && !busy)), .raddr(run ? res_addr : r_idx), .rdata(prev));

  assign r_data = prev;

endmodule
