// One step of the AES-128 key schedule, computed on the fly.
// From round key r-1 (words w0..w3) and the round constant for round r it
// forms round key r:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 0, 0, 0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// Combinational. The core keeps the current round key in an SDRR and applies
// this step once per round, so no key table is stored. The published core
// only names its key scheduler; the on-the-fly form is this design's choice.
module aes_key_expand
  import aes_pkg::*;
(
  input  state_t     key_in,    // round key r-1
  input  logic [3:0] round,     // r, 1..10
  output state_t     key_out    // round key r
);

  logic [31:0] w [4];
  logic [31:0] n [4];
  logic [31:0] t;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127 - 32*i -: 32];
    t = {sbox(w[3][23:16]) ^ rcon(round), sbox(w[3][15:8]), sbox(w[3][7:0]), sbox(w[3][31:24])};
    n[0] = w[0] ^ t;
    n[1] = w[1] ^ n[0];
    n[2] = w[2] ^ n[1];
    n[3] = w[3] ^ n[2];
  end

  assign key_out = {n[0], n[1], n[2], n[3]};

endmodule
