// AddRoundKey layer: bitwise XOR of the state with the current round key.
// Combinational, no bypass (every round has it). This is the standard AES
// layer, the last of the four stages of the published inner-round pipeline.
module aes_add_round_key
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t round_key,
  output state_t dout
);

  assign dout = din ^ round_key;

endmodule
