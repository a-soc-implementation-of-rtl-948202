// shake128_core -- the SHAKE128 instance: absorb and squeeze control around an
// external Keccak-f[1600] round.
//
// The message, msg_len bytes, lies in the system BRAM from word 0 on. Absorb: for
// each 168-byte block the core reads its 21 lanes over the 64-bit bus and XORs them
// into the 1600-bit state; in the last block the bytes past the message are masked
// to zero and the SHAKE padding is applied (0x1F at byte msg_len, 0x80 at byte 167).
// After every block the state goes through the 24 rounds of Keccak-f[1600], one round
// per clock, via k_state_o/k_state_i. Squeeze: the first 168 bytes (21 lanes) of the
// state are written back into the same BRAM from word 0 on, a block at a time, with a
// permutation between blocks, until at least out_len bytes have been written. Output
// is written in whole blocks, so ceil(out_len/168)*21 words are overwritten.
// Both lengths are bounded by the BRAM, 2583*8 = 20664 bytes: words past its end
// read as zero and output past its end is dropped.
//
// Timing: `start` is taken while idle; each absorb block costs 21 + 1 + 24 clocks and
// each squeeze block 21 clocks plus 24 for every further block; `done` pulses for one
// clock at the end and `busy` is high in between. The rate, the three-instance split,
// one Keccak-f evaluation per state hand-over and the in-place output follow the
// original architecture; block-granular output, byte order and handshake are chosen
// here.
module shake128_core
  import frodo_pkg::*;
#(
  parameter int unsigned DEPTH = SYS_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   msg_len,
  input  logic [15:0]   out_len,
  output logic          busy,
  output logic          done,
  // system BRAM
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  lane_t         mem_rdata,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output lane_t         mem_wdata,
  // Keccak-f[1600] round
  output kstate_t       k_state_o,
  output logic [4:0]    k_round,
  input  kstate_t       k_state_i
);

  localparam int unsigned RATE_BYTES = RATE_LANES * 8;

  typedef enum logic [2:0] {S_IDLE, S_ABSORB, S_ABS_LAST, S_PERM, S_SQUEEZE} state_e;
  state_e st;

  kstate_t      state;
  logic [4:0]   lane, lane_d;
  logic         rd_valid;
  logic [4:0]   round;
  logic         squeezing;
  logic [15:0]  base;      // first byte of the current block
  logic [AW-1:0] blk_word; // first BRAM word of the current block
  logic [15:0]  mlen_q, olen_q;
  logic         last_abs;

  assign last_abs = (32'(base) + RATE_BYTES > 32'(mlen_q));

  // masking and padding of the lane that arrives from the BRAM
  lane_t in_lane;
  always_comb begin
    for (int b = 0; b < 8; b++) begin
      int unsigned k;
      k = 32'(base) + 8 * 32'(lane_d) + b;
      in_lane[8*b +: 8] = (k < 32'(mlen_q)) ? mem_rdata[8*b +: 8] : 8'h00;
      if (last_abs && k == 32'(mlen_q)) in_lane[8*b +: 8] = in_lane[8*b +: 8] ^ 8'h1F;
      if (last_abs && lane_d == 5'(RATE_LANES - 1) && b == 7)
        in_lane[8*b +: 8] = in_lane[8*b +: 8] ^ 8'h80;
    end
  end

  assign mem_re    = (st == S_ABSORB);
  assign mem_raddr = AW'(32'(blk_word) + 32'(lane));
  assign mem_we    = (st == S_SQUEEZE);
  assign mem_waddr = AW'(32'(blk_word) + 32'(lane));
  assign mem_wdata = state[lane];
  assign k_state_o = state;
  assign k_round   = round;
  assign busy      = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lane <= '0; lane_d <= '0; rd_valid <= 1'b0; round <= '0;
      squeezing <= 1'b0; base <= '0; blk_word <= '0; mlen_q <= '0; olen_q <= '0;
      done <= 1'b0;
      for (int k = 0; k < 25; k++) state[k] <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= (st == S_ABSORB);
      lane_d   <= lane;
      if (rd_valid) state[lane_d] <= state[lane_d] ^ in_lane;
      unique case (st)
        S_IDLE: if (start) begin
          for (int k = 0; k < 25; k++) state[k] <= '0;
          mlen_q <= msg_len; olen_q <= out_len;
          base <= '0; blk_word <= '0; lane <= '0; squeezing <= 1'b0;
          st <= S_ABSORB;
        end
        S_ABSORB: begin
          if (32'(lane) == RATE_LANES - 1) begin
            lane <= '0;
            st   <= S_ABS_LAST;
          end else lane <= lane + 1'b1;
        end
        S_ABS_LAST: begin      // last lane of the block is XORed in this clock
          round <= '0;
          st    <= S_PERM;
        end
        S_PERM: begin
          state <= k_state_i;
          round <= round + 1'b1;
          if (32'(round) == ROUNDS - 1) begin
            if (squeezing) st <= S_SQUEEZE;
            else if (last_abs) begin
              squeezing <= 1'b1;
              base <= '0; blk_word <= '0;
              st <= (olen_q == '0) ? S_IDLE : S_SQUEEZE;
              if (olen_q == '0) done <= 1'b1;
            end else begin
              base     <= base + 16'(RATE_BYTES);
              blk_word <= blk_word + AW'(RATE_LANES);
              st       <= S_ABSORB;
            end
          end
        end
        S_SQUEEZE: begin
          if (32'(lane) == RATE_LANES - 1) begin
            lane     <= '0;
            base     <= base + 16'(RATE_BYTES);
            blk_word <= blk_word + AW'(RATE_LANES);
            round    <= '0;
            if (32'(base) + RATE_BYTES >= 32'(olen_q)) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else st <= S_PERM;
          end else lane <= lane + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
