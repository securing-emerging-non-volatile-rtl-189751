// Testbench for aes_shift_rows: a labelled state whose expected image is
// written out by hand, random states against the reference, and the bypass.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  logic bypass;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.*);

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
    // byte i holds i; columns are 4 consecutive bytes
    din = 128'h00_01_02_03_04_05_06_07_08_09_0a_0b_0c_0d_0e_0f; #1;
    check(dout == 128'h00_05_0a_0f_04_09_0e_03_08_0d_02_07_0c_01_06_0b, "labelled state");
    for (int n = 0; n < 200; n++) begin
      din = rand128(); #1;
      check(dout == shift_rows(din), "random state");
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
