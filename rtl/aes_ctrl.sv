// Control for the SDRR-protected AES-128 core.
//
// Generates the select signal of all SDRRs and sequences the rounds.
// `sel_real` is a toggle flip-flop on the doubled clock, so it is the
// reference clock of the unprotected core: edges of clk where it is 1 are
// "real" edges (the SDRRs capture real data, the control state advances),
// edges where it is 0 are "random" edges (the SDRRs capture random words and
// the control state holds). One reference period therefore spans two clk
// cycles. It comes out of reset at 0, so the first edge after reset is a
// random edge.
//
// A block is accepted on a real edge where in_valid and in_ready are both 1
// (`load`). The block then needs 44 reference periods, 11 rounds of 4 stages:
// the counter runs 0..43, round = count/4 and stage = count%4, and in period
// count the live datum is in the combinational layer of that stage. On the
// real edge that ends count 43 (`last`) the ciphertext is captured and a new
// block may be accepted on the same edge, so back-to-back blocks leave every
// 44 reference periods. SubBytes and ShiftRows are bypassed in round 0 and
// MixColumns in rounds 0 and 10; the key step runs on the real edge that ends
// stage 3 of rounds 0..9.
//
// The FSM and the 44-period schedule follow the reference core; the
// handshake, the reset values and the toggle-flip-flop form of the select
// signal are this design's choices.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       sel_real,     // 1: this clk edge is a real edge
  output logic       load,         // accept plaintext and key on this edge
  output logic       busy,
  output logic [3:0] round,        // 0..10
  output logic [1:0] stage,        // 0 SubBytes, 1 ShiftRows, 2 MixColumns, 3 AddRoundKey
  output logic       bypass_sb,    // also used for ShiftRows
  output logic       bypass_mc,
  output logic       key_step,     // advance round key on this real edge
  output logic [3:0] key_round,    // round number of the key being computed
  output logic       last          // final AddRoundKey result is captured on this real edge
);

  typedef enum logic {IDLE, RUN} state_e;
  state_e state;

  assign busy      = (state == RUN);
  assign last      = busy && (round == 4'(NUM_ROUNDS)) && (stage == 2'd3);
  assign in_ready  = sel_real && (!busy || last);
  assign load      = in_valid && in_ready;
  assign bypass_sb = (round == 4'd0);
  assign bypass_mc = (round == 4'd0) || (round == 4'(NUM_ROUNDS));
  assign key_step  = busy && (stage == 2'd3) && (round != 4'(NUM_ROUNDS));
  assign key_round = round + 4'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_real <= 1'b0;
      state    <= IDLE;
      round    <= '0;
      stage    <= '0;
    end else begin
      sel_real <= !sel_real;
      if (sel_real) begin
        if (load) begin
          state <= RUN;
          round <= '0;
          stage <= '0;
        end else if (last) begin
          state <= IDLE;
          round <= '0;
          stage <= '0;
        end else if (busy) begin
          stage <= stage + 2'd1;
          if (stage == 2'd3) round <= round + 4'd1;
        end
      end
    end
  end

  // Control only moves on real edges.
  property p_hold_on_random;
    @(posedge clk) disable iff (!rst_n) !sel_real |=> $stable({state, round, stage});
  endproperty
  a_hold_on_random: assert property (p_hold_on_random);

  // A block leaves 44 reference periods (88 clk cycles) after it was taken.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> ##(2*CYCLES_PER_BLOCK) (last && sel_real));

  a_round_range: assert property (@(posedge clk) disable iff (!rst_n) round <= 4'(NUM_ROUNDS));

endmodule
