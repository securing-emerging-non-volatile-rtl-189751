// End-to-end testbench for sdrr_aes128 at its default configuration.
//
// Encrypts the FIPS-197 example vectors and a set of random blocks and
// compares each ciphertext with the reference model. Checks the latency
// (out_valid rises 88 clocks = 44 reference periods after the accepting edge)
// and the back-to-back throughput (one block per 44 periods), and watches
// the SDRRs themselves: after every random edge each SDRR's first register
// must hold its generator's word, and after every real edge the AddRoundKey
// register's output must be that random word while the real value sits in
// the first register. Counts each mechanism (idle and back-to-back
// acceptance, round-0 bypass, round-10 MixColumns bypass, key steps, real
// and random captures) and fails any that never happened.
module tb_sdrr_aes128;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [127:0] prng_seed, pt, key, ct;
  logic in_valid = 0, in_ready, out_valid, sel_real, busy;
  int checks = 0, failures = 0;

  sdrr_aes128 dut (.*);

  always #5 clk = ~clk;

  localparam int NBLK = 24;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected results, in order
  logic [127:0] exp_q[$];
  longint acc_t[$];
  longint cyc = 0;
  int n_out = 0;
  int m_idle_acc = 0, m_b2b_acc = 0, m_bypass0 = 0, m_bypass10 = 0, m_keystep = 0;
  int m_real = 0, m_rand = 0, m_rand_seen = 0;

  logic [127:0] rnd_prev [5];
  logic sel_prev, rst_prev = 0;
  longint last_out = -1;

  // Monitor at the falling edge, where everything is stable: it looks at the
  // result of the last rising edge and at what the next one will do.
  always @(negedge clk) begin
    cyc++;
    if (rst_n && rst_prev) begin
      // SDRR content after the previous edge
      if (!sel_prev) begin
        m_rand++;
        check(dut.g_reg[0].u_sdrr.q1 == rnd_prev[0] && dut.g_reg[3].u_sdrr.q1 == rnd_prev[3]
              && dut.g_reg[4].u_sdrr.q1 == rnd_prev[4], "random capture");
        if (dut.g_reg[0].u_sdrr.q1 != rnd_prev[0]) $display("  q1 %h rnd %h", dut.g_reg[0].u_sdrr.q1, rnd_prev[0]);
      end else begin
        m_real++;
        // output of the AddRoundKey SDRR shows the random word of two edges ago
        if (dut.g_reg[3].u_sdrr.q != dut.g_reg[3].u_sdrr.q1) m_rand_seen++;
      end
      if (sel_real) begin
        if (dut.u_ctrl.load) begin
          if (dut.u_ctrl.last) m_b2b_acc++; else m_idle_acc++;
        end
        if (busy && dut.u_ctrl.round == 0 && dut.u_ctrl.stage == 0) m_bypass0++;
        if (busy && dut.u_ctrl.round == 10 && dut.u_ctrl.stage == 2) m_bypass10++;
        if (dut.u_ctrl.key_step) m_keystep++;
      end
      if (in_valid && in_ready) begin
        exp_q.push_back(encrypt(key, pt));
        acc_t.push_back(cyc);
      end
      if (out_valid && sel_real) begin
        logic [127:0] e;
        longint t0;
        e = exp_q.pop_front();
        t0 = acc_t.pop_front();
        check(ct == e, "ciphertext");
        if (ct != e) $display("  got %h expected %h", ct, e);
        check(cyc - t0 == 88 + 2, "latency 44 reference periods");
        if (cyc - t0 != 90) $display("  latency %0d", cyc - t0);
        if (last_out >= 0 && n_out >= 4) check(cyc - last_out == 88, "back-to-back throughput");
        last_out = cyc;
        n_out++;
      end
    end
    for (int k = 0; k < 5; k++) rnd_prev[k] = dut.rnd[k];
    sel_prev = sel_real;
    rst_prev = rst_n;
  end

  // Inputs change 1 ns after a rising edge.
  task automatic wait_accept();
    do @(negedge clk); while (!in_ready);
    @(posedge clk); #1;
  endtask

  task automatic send(logic [127:0] k, logic [127:0] p);
    @(posedge clk); #1;
    key = k; pt = p; in_valid = 1;
    wait_accept();
    in_valid = 0;
    key = rand128(); pt = rand128();  // inputs are only read on the accepting edge
  endtask

  initial begin
    prng_seed = 128'h5a5a_1234_dead_beef_0f0f_7777_cafe_0001;
    pt = '0; key = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // FIPS-197 Appendix B and C.1, and the all-zero block
    send(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h3243f6a8_885a308d_313198a2_e0370734);
    wait (n_out == 1);
    check(ct == 128'h3925841d_02dc09fb_dc118597_196a0b32, "FIPS-197 Appendix B");
    send(128'h00010203_04050607_08090a0b_0c0d0e0f, 128'h00112233_44556677_8899aabb_ccddeeff);
    wait (n_out == 2);
    check(ct == 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, "FIPS-197 C.1");
    send('0, '0);
    wait (n_out == 3);
    check(ct == 128'h66e94bd4_ef8a2c3b_884cfa59_ca342b2e, "zero key, zero block");
    // random blocks, back to back
    @(posedge clk); #1;
    for (int n = 0; n < NBLK; n++) begin
      key = rand128(); pt = rand128(); in_valid = 1;
      wait_accept();
    end
    in_valid = 0;
    wait (n_out == NBLK + 3);
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "every block returned");
    $display("mechanisms: idle_accept=%0d b2b_accept=%0d round0_bypass=%0d round10_mc_bypass=%0d key_steps=%0d real_edges=%0d random_edges=%0d random_on_output=%0d",
             m_idle_acc, m_b2b_acc, m_bypass0, m_bypass10, m_keystep, m_real, m_rand, m_rand_seen);
    check(m_idle_acc > 0, "idle acceptance happened");
    check(m_b2b_acc > 0, "back-to-back acceptance happened");
    check(m_bypass0 == NBLK + 3, "round-0 bypass in every block");
    check(m_bypass10 == NBLK + 3, "round-10 MixColumns bypass in every block");
    check(m_keystep == 10 * (NBLK + 3), "ten key steps per block");
    check(m_real > 0 && m_rand > 0, "real and random captures happened");
    check(m_rand_seen > m_real / 2, "SDRR output carries random data in the random half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
