// ShiftRows layer: row r of the 4x4 state is rotated left by r bytes.
// Output byte (row r, column c) takes input byte (row r, column (c+r) mod 4).
// Combinational; `bypass` passes the state unchanged (round 0). The layer is
// the standard AES one; the bypass is this design's way of running round 0
// through the same pipeline.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   bypass,
  output state_t dout
);

  state_t shf;

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shf[127 - 8*(4*c + r) -: 8] = din[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end

  assign dout = bypass ? din : shf;

endmodule
