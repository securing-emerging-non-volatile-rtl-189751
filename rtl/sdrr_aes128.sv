// AES-128 encryption core protected with secure double rate registers.
//
// The datapath is the iterative reference core: an inner-round pipeline of
// four combinational layers, SubBytes -> ShiftRows -> MixColumns ->
// AddRoundKey, each followed by its own pipeline register, with the
// AddRoundKey register fed back to SubBytes. One round takes four reference
// periods and a block 44 (round 0 is AddRoundKey only, round 10 has no
// MixColumns; the missing layers are bypassed so that every round has the
// same four stages). Every register of the datapath, and the round-key
// register, is an SDRR clocked at twice the reference rate: on each "real"
// clk edge it captures the real datum and on each "random" edge a fresh
// random word, so each combinational layer spends half of every reference
// period evaluating random data and every register pair always holds one real
// and one random word.
//
// Interface (all on clk, the doubled clock; rst_n synchronous, active low):
//   in_valid/in_ready  plaintext `pt` and `key` are taken on a clk edge where
//                      both are 1; in_ready is only ever 1 ahead of real edges
//   out_valid/ct       ciphertext; out_valid is 1 for one reference period
//                      (two clk cycles), ct holds until the next result
//   sel_real           the reference-clock phase: 1 ahead of a real edge
//   busy               a block is in the pipeline
//   prng_seed          seeds the random sources while rst_n is low
// Latency from the accepting edge to out_valid is 44 reference periods
// (88 clk cycles); a new block can be accepted on the edge that ends the
// previous one.
//
// Following the published design: the four-stage inner-round pipeline, the
// 44-period schedule and the replacement of every pipeline register by an
// SDRR. This design's own choices: the key scheduler (on the fly, one step per
// round, its register also an SDRR), the handshake, the pseudo-random
// generators (one per SDRR, each seeded with prng_seed XOR a different
// constant), and a plain output register for the ciphertext, which is public.
module sdrr_aes128
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] prng_seed,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [127:0] pt,
  input  logic [127:0] key,
  output logic         out_valid,
  output logic [127:0] ct,
  output logic         sel_real,
  output logic         busy
);

  // SDRR index: 0 SubBytes, 1 ShiftRows, 2 MixColumns, 3 AddRoundKey, 4 round key
  localparam int unsigned NREG = 5;

  logic       load, bypass_sb, bypass_mc, key_step, last;
  logic [3:0] key_round;

  aes_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .sel_real, .load, .busy,
    .round(), .stage(), .bypass_sb, .bypass_mc, .key_step, .key_round, .last
  );

  state_t rnd [NREG];
  state_t d   [NREG];
  state_t q   [NREG];

  for (genvar k = 0; k < NREG; k++) begin : g_reg
    localparam logic [127:0] SALT = {4{32'h9e37_79b9 * (k + 1)}};
    sdrr_prng u_prng (
      .clk, .rst_n,
      .seed (prng_seed ^ SALT),
      .rnd  (rnd[k])
    );
    sdrr #(.WIDTH(128)) u_sdrr (
      .clk, .rst_n, .sel_real, .d(d[k]), .rnd(rnd[k]), .q(q[k]), .q1()
    );
  end

  state_t sb_out, sr_out, mc_out, ark_out, key_next;

  aes_sub_bytes     u_sb  (.din(q[3]), .bypass(bypass_sb), .dout(sb_out));
  aes_shift_rows    u_sr  (.din(q[0]), .bypass(bypass_sb), .dout(sr_out));
  aes_mix_columns   u_mc  (.din(q[1]), .bypass(bypass_mc), .dout(mc_out));
  aes_add_round_key u_ark (.din(q[2]), .round_key(q[4]), .dout(ark_out));
  aes_key_expand    u_ks  (.key_in(q[4]), .round(key_round), .key_out(key_next));

  assign d[0] = sb_out;
  assign d[1] = sr_out;
  assign d[2] = mc_out;
  assign d[3] = load ? pt : ark_out;
  assign d[4] = load ? key : (key_step ? key_next : q[4]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ct        <= '0;
    end else if (sel_real) begin
      out_valid <= last;
      if (last) ct <= ark_out;
    end
  end

endmodule
