// Secure double rate register (SDRR).
//
// Replaces one conventional pipeline register of the reference core. Two
// registers are cascaded behind an input multiplexer, and both are clocked by
// clk, which runs at twice the reference clock rate. `sel_real` plays the role
// of the reference clock: on every clk edge where it is 1 the first register
// loads the real datum `d`, and on every edge where it is 0 it loads the random
// word `rnd`. The second register always copies the first. So at any moment one
// of the two registers holds real data and the other random data, and the
// output `q` (the second register) alternates: random during the first half of
// each reference period, real during the second half, just before the next
// real capture. Seen on real-capture edges only, the SDRR is an ordinary
// register with a latency of one reference period.
//
// The mux, the two cascaded registers, the doubled clock and the use of the
// reference clock as select follow the SDRR as published. Taking the output
// from the second register, the synchronous active-low reset to zero and the
// exported first-register value `q1` (for observation) are choices of this
// design.
module sdrr #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,       // CK, twice the reference rate
  input  logic             rst_n,     // synchronous, active low
  input  logic             sel_real,  // 1: capture d on this edge, 0: capture rnd
  input  logic [WIDTH-1:0] d,         // real datum from the combinational stage
  input  logic [WIDTH-1:0] rnd,       // fresh random word
  output logic [WIDTH-1:0] q,         // second register, feeds the next stage
  output logic [WIDTH-1:0] q1         // first register
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q1 <= '0;
      q  <= '0;
    end else begin
      q1 <= sel_real ? d : rnd;
      q  <= q1;
    end
  end

endmodule
