// Testbench for sdrr: drives random real and random words with the select
// toggling as in the core (and also held for a while), and checks after
// every edge that the first register took d when sel_real was 1 and rnd when
// it was 0, and that the output register holds the first register's previous
// value. Also checks that after a real capture the output alternates
// random, real over the next two edges.
module tb_sdrr;
  import aes_ref_pkg::*;

  localparam int unsigned W = 128;
  logic clk = 0, rst_n = 0, sel_real = 0;
  logic [W-1:0] d, rnd, q, q1;
  int checks = 0, failures = 0;

  sdrr #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [W-1:0] d_s, r_s, q1_s, real_v;
    bit sel_s;
    d = '0; rnd = '0;
    @(negedge clk); @(negedge clk);
    check(q == '0 && q1 == '0, "reset");
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d   = rand128();
      rnd = rand128();
      sel_real = (i < 300) ? !sel_real : ($urandom_range(0, 1) == 1);
      d_s = d; r_s = rnd; sel_s = sel_real; q1_s = q1;
      @(posedge clk); #1;
      check(q1 == (sel_s ? d_s : r_s), "first register capture");
      check(q == q1_s, "second register copies first");
    end
    // real capture, then one random edge: q shows random then real
    @(negedge clk); sel_real = 1; d = rand128(); real_v = d; rnd = rand128();
    @(negedge clk); sel_real = 0; r_s = rnd; d = rand128(); rnd = rand128();
    check(q1 == real_v && q != real_v, "real held in first register only");
    @(negedge clk);
    check(q == real_v && q1 != real_v, "real moved to output, random in first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
