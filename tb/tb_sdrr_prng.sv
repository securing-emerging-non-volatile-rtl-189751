// Testbench for sdrr_prng: the reset value is the seed with bit 0 set, every
// following word matches a reference xorshift128 model, an all-zero seed does
// not lock up, and consecutive words differ.
module tb_sdrr_prng;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [127:0] seed, rnd;
  int checks = 0, failures = 0;

  sdrr_prng dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rnd=%h", what, rnd); end
  endtask

  initial begin
    logic [127:0] m, prev;
    for (int pass = 0; pass < 2; pass++) begin
      seed = (pass == 0) ? 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210 : '0;
      rst_n = 0;
      @(negedge clk); @(negedge clk);
      m = seed | 128'd1;
      check(rnd == m, "seed loaded");
      rst_n = 1;
      for (int i = 0; i < 500; i++) begin
        prev = rnd;
        @(negedge clk);
        m = xorshift_next(m);
        check(rnd == m, "sequence");
        check(rnd != prev && rnd != '0, "fresh word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
