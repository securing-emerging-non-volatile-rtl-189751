// MixColumns layer: each column is multiplied by the circulant matrix
// [2 3 1 1] over GF(2^8). With a[] the column bytes, output row r is
// 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3] (indices mod 4). Combinational;
// `bypass` passes the state unchanged, as in round 0 and in round 10, which
// has no MixColumns. Layer as in the standard; the bypass is this design's.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  input  logic   bypass,
  output state_t dout
);

  state_t mix;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = din[127 - 8*(4*c + r) -: 8];
      for (int r = 0; r < 4; r++)
        mix[127 - 8*(4*c + r) -: 8] = xtime(a[r]) ^ (xtime(a[(r+1)%4]) ^ a[(r+1)%4])
                                    ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end

  assign dout = bypass ? din : mix;

endmodule
