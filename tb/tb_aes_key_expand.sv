// Testbench for aes_key_expand: chains the step through rounds 1..10 for the
// FIPS-197 key and checks published round keys, then random keys against the
// reference key schedule.
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  logic [127:0] key_in, key_out;
  logic [3:0] round;
  int checks = 0, failures = 0;

  aes_key_expand dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s round=%0d key_out=%h", what, round, key_out); end
  endtask

  initial begin
    logic [127:0] k, k0;
    k = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      key_in = k; round = 4'(r); #1;
      if (r == 1)  check(key_out == 128'ha0fafe17_88542cb1_23a33939_2a6c7605, "FIPS round key 1");
      if (r == 2)  check(key_out == 128'hf2c295f2_7a96b943_5935807a_7359f67f, "FIPS round key 2");
      if (r == 10) check(key_out == 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "FIPS round key 10");
      k = key_out;
    end
    for (int n = 0; n < 30; n++) begin
      k0 = rand128(); k = k0;
      for (int r = 1; r <= 10; r++) begin
        key_in = k; round = 4'(r); #1;
        check(key_out == round_key(k0, r), "random key");
        k = key_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
