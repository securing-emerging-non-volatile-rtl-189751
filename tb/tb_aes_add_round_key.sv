// Testbench for aes_add_round_key: the round-0 step of the FIPS-197
// example, then random state/key pairs.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, round_key, dout;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dout=%h", what, dout); end
  endtask

  initial begin
    din = 128'h3243f6a8_885a308d_313198a2_e0370734;
    round_key = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c; #1;
    check(dout == 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, "FIPS-197 round 0");
    for (int n = 0; n < 200; n++) begin
      logic [127:0] e;
      din = rand128(); round_key = rand128(); #1;
      e = '0;
      for (int b = 0; b < 128; b++) e[b] = (din[b] != round_key[b]);
      check(dout == e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
