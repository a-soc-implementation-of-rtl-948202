// frodo_pkg -- constants shared by the FrodoKEM-640 programmable-logic accelerators.
//
// FrodoKEM-640 works on n = 640 and nbar = 8 with 16-bit matrix entries; all matrix
// arithmetic is carried out modulo 2^16 (the modulus q = 2^15 divides it, so the host
// can reduce afterwards). Matrix A is produced by the host four rows at a time; the
// host bus is 32 bits wide, so two 16-bit entries travel in one bus word. The SHAKE128
// rate is 168 bytes, i.e. 21 lanes of 64 bits. The Keccak-f[1600] round constants
// and rotation offsets are the standard FIPS 202 values.
package frodo_pkg;

  localparam int unsigned N          = 640;  // matrix dimension n
  localparam int unsigned NBAR       = 8;    // matrix dimension nbar
  localparam int unsigned ROWS       = 4;    // rows of A held at one time
  localparam int unsigned EW         = 16;   // entry width
  localparam int unsigned BW         = 32;   // host bus width
  localparam int unsigned RATE_LANES = 21;   // SHAKE128 rate, 168 bytes
  localparam int unsigned ROUNDS     = 24;   // Keccak-f[1600] rounds
  localparam int unsigned SYS_DEPTH  = 2583; // 64-bit words of the system BRAM

  typedef logic [EW-1:0] entry_t;
  typedef logic [BW-1:0] word_t;
  typedef logic [63:0]   lane_t;
  typedef lane_t         kstate_t [25];     // lane (x,y) at index x + 5*y

  // iota round constants, round 0 first
  localparam logic [63:0] KECCAK_RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // rho rotation offsets, indexed x + 5*y
  localparam int unsigned KECCAK_RHO [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14
  };

endpackage
