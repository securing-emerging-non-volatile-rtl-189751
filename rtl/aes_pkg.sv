// Shared types and GF(2^8) arithmetic for the AES-128 encryption core.
//
// The 128-bit state follows the usual AES byte order: byte 0 is bits
// [127:120], and byte i sits in row i%4, column i/4 of the 4x4 state.
// The S-box is not stored as a table; it is computed from its definition,
// the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (inverse of
// 0 taken as 0) followed by the affine map b ^ rotl(b,1..4) ^ 0x63.
// The inverse is x^254, built from square-and-multiply. The arithmetic is the
// AES standard's; computing the S-box rather than tabulating it, and the byte
// order, are this design's choices.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NUM_ROUNDS       = 10;  // AES-128: rounds 1..10 after round 0
  localparam int unsigned STAGES           = 4;   // SubBytes, ShiftRows, MixColumns, AddRoundKey
  localparam int unsigned CYCLES_PER_BLOCK = (NUM_ROUNDS + 1) * STAGES;  // 44 reference cycles

  // Multiply by x (0x02) in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication, shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 = a^(2+4+8+16+32+64+128).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq, r;
    sq = gf_mul(a, a);       // a^2
    r  = sq;
    for (int i = 0; i < 6; i++) begin
      sq = gf_mul(sq, sq);   // a^4, a^8, ... a^128
      r  = gf_mul(r, sq);
    end
    return r;                // inverse of 0 comes out as 0
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Round constant used to derive round key r (r = 1..10).
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t c;
    c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

  function automatic byte_t get_byte(input state_t s, input int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

endpackage
