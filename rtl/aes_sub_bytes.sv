// SubBytes layer: the AES S-box applied to each of the 16 state bytes.
// Combinational. With `bypass` set the state passes unchanged; the core uses
// that in round 0, which has only AddRoundKey. The layer is the standard AES
// one; the bypass mux is how this design lets round 0 travel the same
// four-stage pipeline as the other rounds.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   bypass,
  output state_t dout
);

  state_t sub;

  always_comb begin
    for (int i = 0; i < 16; i++)
      sub[127 - 8*i -: 8] = sbox(din[127 - 8*i -: 8]);
  end

  assign dout = bypass ? din : sub;

endmodule
