// tb_dgc: checks the dynamic gain control.
//   1. Long PDOUT runs (30 cycles, as while pulling in): no gain step.
//   2. Short runs of 3 (locked dither): after 64 reversals the next gain set
//      is applied, i.e. one step every 64*3 = 192 cycles (+-3), three steps
//      in all, with the gains 16/255 -> 4/64 -> 2/16 -> 1/8.
//   3. After the last set, locked rises 256 cycles after the 64th reversal.
//   4. A long run in the middle of counting restarts the count.
module tb_dgc;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b0, en = 1'b0, pdout = 1'b0;
  dlf_gain_t gain;
  logic [1:0] stage;
  logic gain_step, locked;
  int checks = 0, failures = 0;
  int cyc = 0, last_evt = 0, n_steps = 0;
  int step_cyc [$];
  int lock_cyc = -1;

  dgc dut (.*);

  always #125000 ref_clk = ~ref_clk;
  always @(posedge ref_clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge ref_clk) begin
    #1;
    if (gain_step) step_cyc.push_back(cyc);
    if (locked && lock_cyc < 0) lock_cyc = cyc;
  end

  initial begin
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1'b1;
    check(gain.alpha == 8'd16 && gain.beta == 8'd255 && stage == 0, "first set after reset");
    en = 1'b1;
    // 1. pull-in: long runs.
    for (int i = 0; i < 1500; i++) begin
      @(negedge ref_clk) pdout = (i / 30) % 2 == 1;
    end
    check(step_cyc.size() == 0, "no step while runs are long");
    // 4. 40 reversals of short runs, then one long run: count restarts.
    for (int i = 0; i < 120; i++) @(negedge ref_clk) pdout = (i / 3) % 2 == 0;
    for (int i = 0; i < 40; i++) @(negedge ref_clk) pdout = 1'b1;
    check(step_cyc.size() == 0, "long run restarts the lock count");
    // 2. dither.
    last_evt = cyc;
    for (int i = 0; i < 1200; i++) @(negedge ref_clk) pdout = (i / 3) % 2 == 0;
    check(step_cyc.size() == 3, $sformatf("three gain steps (got %0d)", step_cyc.size()));
    if (step_cyc.size() == 3) begin
      check(step_cyc[0] - last_evt >= 192 && step_cyc[0] - last_evt <= 200,
            $sformatf("first step after 192-200 cycles (the first short run joins the long one) (got %0d)", step_cyc[0] - last_evt));
      check(step_cyc[1] - step_cyc[0] == 192, "second step 192 cycles later");
      check(step_cyc[2] - step_cyc[1] == 192, "third step 192 cycles later");
    end
    check(stage == 2'd3 && gain.alpha == 8'd1 && gain.beta == 8'd8, "final gains 1/8");
    // 3. settle then locked.
    check(lock_cyc > 0 && step_cyc.size() == 3 && lock_cyc - step_cyc[2] == 192 + 256,
          $sformatf("lock 192+256 cycles after last step (got %0d)", lock_cyc - step_cyc[2]));
    // en = 0 returns to the first set.
    @(negedge ref_clk) en = 1'b0;
    @(posedge ref_clk); #1;
    check(!locked && stage == 0 && gain.alpha == 8'd16, "disable resets the controller");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge ref_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
