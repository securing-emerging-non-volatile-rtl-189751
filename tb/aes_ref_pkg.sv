// Reference AES-128 model for the testbenches, written independently of the
// RTL: the S-box comes from exponent/logarithm tables over the generator 0x03
// (inverse of g^i is g^(255-i)), and the cipher works on a byte array in
// FIPS-197 order. Also a reference xorshift128 generator.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  u8  exp_t [256];
  int log_t [256];
  bit ready = 0;

  function automatic u8 mul3(u8 a);
    u8 a2;
    a2 = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    return a2 ^ a;
  endfunction

  function automatic void init();
    u8 v;
    if (ready) return;
    v = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = v;
      log_t[v] = i;
      v = mul3(v);
    end
    ready = 1;
  endfunction

  function automatic u8 sbox(u8 a);
    u8 inv, s;
    init();
    inv = (a == 0) ? 8'h00 : exp_t[(255 - log_t[a]) % 255];
    s = 8'h63;
    for (int k = 0; k < 5; k++)
      s ^= u8'((inv << k) | (inv >> (8 - k)));
    return s;
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    init();
    if (a == 0 || b == 0) return 8'h00;
    return exp_t[(log_t[a] + log_t[b]) % 255];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[8*i +: 8] = sbox(s[8*i +: 8]);
    return r;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    u8 a[16], b[16];
    logic [127:0] r;
    for (int i = 0; i < 16; i++) a[i] = s[127 - 8*i -: 8];
    // b[row + 4*col] = a[row + 4*((col + row) % 4)]
    for (int col = 0; col < 4; col++)
      for (int row = 0; row < 4; row++)
        b[row + 4*col] = a[row + 4*((col + row) % 4)];
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = b[i];
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    u8 a[16], b[16];
    logic [127:0] r;
    for (int i = 0; i < 16; i++) a[i] = s[127 - 8*i -: 8];
    for (int c = 0; c < 4; c++) begin
      b[4*c+0] = mul(2, a[4*c+0]) ^ mul(3, a[4*c+1]) ^ a[4*c+2]         ^ a[4*c+3];
      b[4*c+1] = a[4*c+0]         ^ mul(2, a[4*c+1]) ^ mul(3, a[4*c+2]) ^ a[4*c+3];
      b[4*c+2] = a[4*c+0]         ^ a[4*c+1]         ^ mul(2, a[4*c+2]) ^ mul(3, a[4*c+3]);
      b[4*c+3] = mul(3, a[4*c+0]) ^ a[4*c+1]         ^ a[4*c+2]         ^ mul(2, a[4*c+3]);
    end
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = b[i];
    return r;
  endfunction

  // Round key r (0..10) of a cipher key.
  function automatic logic [127:0] round_key(logic [127:0] key, int r);
    logic [31:0] w[44];
    logic [31:0] t;
    u8 rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]) ^ rc, sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        rc = mul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s;
    s = pt ^ round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= round_key(key, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] xorshift_next(logic [127:0] st);
    logic [31:0] x, y, z, w, t;
    {x, y, z, w} = st;
    repeat (4) begin
      t = x ^ (x << 11);
      x = y; y = z; z = w;
      w = w ^ (w >> 19) ^ t ^ (t >> 8);
    end
    return {x, y, z, w};
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
