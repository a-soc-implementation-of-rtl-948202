// keccak_round -- one round of the Keccak-f[1600] permutation, purely combinational.
//
// The five steps theta, rho, pi, chi and iota are applied in sequence to the
// 1600-bit state, so that the SHAKE128 controller can advance the permutation by one
// full round per clock and finishes Keccak-f[1600] in 24 clocks. The state is
// 25 lanes of 64 bits, lane (x,y) at index x+5*y, bit i of a lane being bit i of
// the lane's little-endian byte string, as in FIPS 202. `round_idx` selects the
// iota constant. Doing all five steps in one clock follows the original
// architecture; reading that as one round (not all 24) per clock is a choice made here.
module keccak_round
  import frodo_pkg::*;
(
  input  kstate_t     state_i,
  input  logic [4:0]  round_idx,
  output kstate_t     state_o
);

  lane_t c [5];
  lane_t d [5];
  kstate_t th, pi_s;

  function automatic lane_t rotl(lane_t v, int unsigned r);
    return (r == 0) ? v : ((v << r) | (v >> (64 - r)));
  endfunction

  always_comb begin
    // theta: column parities
    for (int x = 0; x < 5; x++)
      c[x] = state_i[x] ^ state_i[x+5] ^ state_i[x+10] ^ state_i[x+15] ^ state_i[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++)
      th[i] = state_i[i] ^ d[i%5];
    // rho and pi: B[y, 2x+3y] = rot(A[x,y], r[x,y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        pi_s[y + 5*((2*x + 3*y) % 5)] = rotl(th[x + 5*y], KECCAK_RHO[x + 5*y]);
    // chi
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        state_o[x + 5*y] = pi_s[x + 5*y] ^ (~pi_s[(x+1)%5 + 5*y] & pi_s[(x+2)%5 + 5*y]);
    // iota
    state_o[0] = state_o[0] ^ ((round_idx < 5'(ROUNDS)) ? KECCAK_RC[round_idx] : 64'd0);
  end

endmodule
