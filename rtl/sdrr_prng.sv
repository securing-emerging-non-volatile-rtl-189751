// Random word source for the SDRRs.
//
// A xorshift128 generator (four 32-bit words x, y, z, w; one step is
// t = x ^ (x << 11), x,y,z <= y,z,w, w <= w ^ (w >> 19) ^ t ^ (t >> 8))
// unrolled four times, so every clock produces a completely new 128-bit
// state, which is the output word. The state loads `seed` during reset, with
// bit 0 forced to 1 so that it can never be all zeros. The output changes on
// every clk edge; the SDRRs only use it on random edges.
//
// The published core needs random data for every SDRR but does not say where
// it comes from. This pseudo-random generator is this design's stand-in; a
// product would feed the SDRRs from a true random number generator.
module sdrr_prng (
  input  logic         clk,
  input  logic         rst_n,   // synchronous, active low: loads seed
  input  logic [127:0] seed,
  output logic [127:0] rnd
);

  logic [127:0] state_q, state_d;

  always_comb begin
    logic [31:0] x, y, z, w, t;
    {x, y, z, w} = state_q;
    for (int i = 0; i < 4; i++) begin
      t = x ^ (x << 11);
      x = y;
      y = z;
      z = w;
      w = w ^ (w >> 19) ^ t ^ (t >> 8);
    end
    state_d = {x, y, z, w};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= seed | 128'd1;
    else        state_q <= state_d;
  end

  assign rnd = state_q;

endmodule
