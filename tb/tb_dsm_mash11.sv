// tb_dsm_mash11: checks the MASH 1-1 modulator.
// For several (code, K) pairs, including K = 2^19 and calibrated moduli,
// the switch sum y = SDMOut1 + SDMOut2 + SDMOut3 - 1 must satisfy, at every
// cycle n after the start, |sum(y) - n*code/K| <= 3: the modulator's
// running error stays bounded (its noise is shaped, not integrated), so its
// average is exactly code/K.  Also checks y in {-1..2} (second-order MASH
// output range), SDMOut3 = not SDMOut2 one cycle earlier, and the reset
// state (sum 1).
module tb_dsm_mash11;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  logic dsm_clk = 1'b0, rst_n = 1'b0;
  logic [DSM_W-1:0] code;
  logic [DSM_W:0] k_mod;
  logic sdm_out1, sdm_out2, sdm_out3, prev2;
  int checks = 0, failures = 0;

  dsm_mash11 dut (.*);

  always #1428 dsm_clk = ~dsm_clk;

  task automatic run(input int c, input int k, input int n);
    longint acc = 0, y;
    real err, maxerr = 0.0;
    int bad = 0;
    rst_n = 1'b0;
    code = DSM_W'(c);
    k_mod = (DSM_W+1)'(k);
    #3000;
    checks++;
    if ({sdm_out1, sdm_out2, sdm_out3} !== 3'b001) begin failures++; $display("FAIL reset state"); end
    @(negedge dsm_clk) rst_n = 1'b1;
    @(posedge dsm_clk); #1;   // first clock: outputs still reflect nothing
    prev2 = sdm_out2;
    for (int i = 1; i <= n; i++) begin
      @(posedge dsm_clk); #1;
      y = longint'(sdm_out1) + longint'(sdm_out2) + longint'(sdm_out3) - 1;
      if (sdm_out3 != !prev2) bad++;
      prev2 = sdm_out2;
      acc += y;
      err = real'(acc) - real'(i) * real'(c) / real'(k);
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      if (y < -1 || y > 2) bad++;
    end
    checks++;
    if (maxerr > 3.0 || bad != 0) begin
      failures++;
      $display("FAIL code=%0d K=%0d: max running error %f, bad=%0d", c, k, maxerr, bad);
    end else
      $display("code=%0d K=%0d: max running error %f", c, k, maxerr);
  endtask

  initial begin
    code = '0;
    k_mod = 20'd524288;
    run(131072, 524288, 20000);
    run(393216, 524288, 20000);
    run(1, 524288, 5000);
    run(524287, 524288, 5000);
    run(135647, 516096, 20000);
    run(100000, 300001, 20000);
    for (int j = 0; j < 4; j++) begin
      automatic int k = $urandom_range(262144, 1048575);
      run($urandom_range(0, (k < 524288 ? k : 524288) - 1), k, 10000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge dsm_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
