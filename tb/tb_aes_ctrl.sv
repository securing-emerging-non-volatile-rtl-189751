// Testbench for aes_ctrl: checks that sel_real toggles every clock, that the
// state only moves on real edges, the 44-period schedule (round/stage,
// bypass and key-step signals in every period), that `last` comes exactly
// 44 real edges after `load`, and back-to-back acceptance on `last`.
module tb_aes_ctrl;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, sel_real, load, busy, bypass_sb, bypass_mc, key_step, last;
  logic [3:0] round, key_round;
  logic [1:0] stage;
  int checks = 0, failures = 0;

  aes_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t cnt round=%0d stage=%0d", what, $time, round, stage); end
  endtask

  // Expected schedule, tracked on real edges only.
  int cnt = -1;        // -1 idle, else 0..43
  int key_steps = 0, loads = 0, lasts = 0, b2b = 0;
  logic prev_sel, prev_rst = 0;

  // Monitor at the falling edge: it sees the result of the last rising edge
  // and predicts the next one. Inputs change 1 ns after a rising edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (prev_rst) check(sel_real != prev_sel, "sel_real toggles");
      check(in_ready == (sel_real && (cnt < 0 || cnt == 43)), "in_ready");
      if (cnt >= 0) begin
        check(busy, "busy while running");
        check(round == 4'(cnt / 4) && stage == 2'(cnt % 4), "round/stage");
        check(bypass_sb == (cnt / 4 == 0), "SubBytes/ShiftRows bypass");
        check(bypass_mc == (cnt / 4 == 0 || cnt / 4 == 10), "MixColumns bypass");
        check(key_step == (cnt % 4 == 3 && cnt / 4 < 10), "key step");
        if (key_step) check(key_round == round + 1, "key round");
        check(last == (cnt == 43), "last");
      end else begin
        check(!busy && !last, "idle");
      end
      if (sel_real) begin
        if (key_step) key_steps++;
        if (last) lasts++;
        if (load) begin
          loads++;
          if (last) b2b++;
          cnt = 0;
        end else if (cnt == 43) cnt = -1;
        else if (cnt >= 0) cnt++;
      end
    end
    prev_sel = sel_real;
    prev_rst = rst_n;
  end

  task automatic wait_load();
    do @(negedge clk); while (!load);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // one block, valid raised ahead of a random edge and held
    repeat (3) @(posedge clk);
    #1 in_valid = 1;
    wait_load();
    in_valid = 0;
    repeat (120) @(posedge clk);
    // two blocks back to back
    #1 in_valid = 1;
    wait_load();
    wait_load();
    in_valid = 0;
    repeat (100) @(posedge clk);
    check(loads == 3 && lasts == 3, "three blocks done");
    check(b2b == 1, "one back-to-back acceptance");
    check(key_steps == 30, "ten key steps per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
