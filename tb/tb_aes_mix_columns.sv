// Testbench for aes_mix_columns: published column test vectors, random
// states against the reference, and the bypass.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  logic bypass;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.*);

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
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6; #1;
    check(dout == 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, "known columns");
    din = 128'hd4d4d4d5_2d26314c_00000000_ffffffff; #1;
    check(dout == mix_columns(din), "second vector");
    for (int n = 0; n < 200; n++) begin
      din = rand128(); #1;
      check(dout == mix_columns(din), "random state");
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
