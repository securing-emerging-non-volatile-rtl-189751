// Testbench for aes_sub_bytes: published S-box entries, random states
// against the reference model, and the bypass.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  logic bypass;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s din=%h dout=%h", what, din, dout); end
  endtask

  initial begin
    bypass = 0;
    // FIPS-197 S-box entries: 00->63 01->7c 53->ed ff->16 10->ca 9a->b8 c9->dd 3c->eb ...
    din = 128'h00_01_53_ff_10_9a_c9_3c_11_22_33_44_55_66_77_88; #1;
    check(dout == 128'h63_7c_ed_16_ca_b8_dd_eb_82_93_c3_1b_fc_33_f5_c4, "known S-box entries");
    // exhaustive: every byte value in every position
    for (int v = 0; v < 256; v += 16) begin
      for (int i = 0; i < 16; i++) din[127 - 8*i -: 8] = 8'(v + i);
      #1; check(dout == sub_bytes(din), "table sweep");
    end
    for (int n = 0; n < 200; n++) begin
      din = rand128(); #1;
      check(dout == sub_bytes(din), "random state");
    end
    bypass = 1;
    for (int n = 0; n < 20; n++) begin
      din = rand128(); #1;
      check(dout == din, "bypass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
