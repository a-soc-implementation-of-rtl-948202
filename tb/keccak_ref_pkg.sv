// keccak_ref_pkg -- reference models for the testbenches: Keccak-f[1600] and SHAKE128
// written from the FIPS 202 definitions. The rotation offsets are generated by the
// (x,y) -> (y, 2x+3y) walk and the round constants by the degree-8 LFSR, so that
// nothing here shares a table with the RTL.
package keccak_ref_pkg;

  typedef logic [63:0] ref_state_t [5][5];   // [x][y]
  typedef byte unsigned bytes_t [];

  function automatic logic rc_bit(int t);
    logic [7:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 8'h01;
    for (int i = 1; i <= t % 255; i++) begin
      logic b;
      b = r[7];
      r = {r[6:0], 1'b0};
      if (b) r = r ^ 8'h71;
    end
    return r[0];
  endfunction

  function automatic logic [63:0] rot(logic [63:0] v, int n);
    n = n % 64;
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic void ref_round(ref ref_state_t a, input int ir);
    logic [63:0] c [5];
    logic [63:0] b [5][5];
    int x, y, t, nx;
    for (x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (x = 0; x < 5; x++)
      for (y = 0; y < 5; y++)
        a[x][y] = a[x][y] ^ c[(x + 4) % 5] ^ rot(c[(x + 1) % 5], 1);
    // rho by the walk, in place
    x = 1; y = 0;
    for (t = 0; t < 24; t++) begin
      a[x][y] = rot(a[x][y], ((t + 1) * (t + 2) / 2) % 64);
      nx = y; y = (2 * x + 3 * y) % 5; x = nx;
    end
    // pi
    for (x = 0; x < 5; x++)
      for (y = 0; y < 5; y++)
        b[x][y] = a[(x + 3 * y) % 5][x];
    // chi
    for (x = 0; x < 5; x++)
      for (y = 0; y < 5; y++)
        a[x][y] = b[x][y] ^ ((~b[(x + 1) % 5][y]) & b[(x + 2) % 5][y]);
    // iota
    for (int j = 0; j <= 6; j++)
      if (rc_bit(j + 7 * ir)) a[0][0][(1 << j) - 1] = ~a[0][0][(1 << j) - 1];
  endfunction

  function automatic void ref_permute(ref ref_state_t a);
    for (int ir = 0; ir < 24; ir++) ref_round(a, ir);
  endfunction

  // SHAKE128 of msg, returning outlen bytes
  function automatic bytes_t shake128(bytes_t msg, int outlen);
    ref_state_t a;
    byte unsigned blk [168];
    bytes_t out;
    int nblk, pos;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = '0;
    nblk = msg.size() / 168 + 1;
    for (int k = 0; k < nblk; k++) begin
      for (int i = 0; i < 168; i++) begin
        pos = 168 * k + i;
        blk[i] = (pos < msg.size()) ? msg[pos] : 8'h00;
        if (pos == msg.size()) blk[i] = blk[i] ^ 8'h1F;
      end
      if (k == nblk - 1) blk[167] = blk[167] ^ 8'h80;
      for (int i = 0; i < 168; i++)
        a[(i / 8) % 5][(i / 8) / 5][8 * (i % 8) +: 8] ^= blk[i];
      ref_permute(a);
    end
    out = new[outlen];
    pos = 0;
    while (pos < outlen) begin
      for (int i = 0; i < 168 && pos < outlen; i++) begin
        out[pos] = a[(i / 8) % 5][(i / 8) / 5][8 * (i % 8) +: 8];
        pos++;
      end
      if (pos < outlen) ref_permute(a);
    end
    return out;
  endfunction

endpackage
