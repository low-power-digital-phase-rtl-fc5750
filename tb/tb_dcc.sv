// tb_dcc: checks the DCO calibration circuit against an ideal oscillator and
// counter.  The testbench model turns the DCC's code into a frequency
// f = F_LO + gain * code (modulus 2^19 during calibration) and returns, each
// reference period, the number of whole DCO clocks in that period (with the
// fraction carried over, as a free-running counter would).  For the three
// DCO gains 610, 750 and 915 Hz/LSB and a few offsets it checks:
//   - the gain after normalisation, F_RANGE' / K, is within 0.1 % of the
//     target 400 MHz / 2^19;
//   - L is within 100 codes of (f(D1) - 1.4 GHz) / (400 MHz / 2^19);
//   - busy lasts 16 + 64 + 16 + 64 + 1 = 161 reference periods, and K and
//     L are neutral (2^19, 0) until done;
//   - with en = 0: done at once, K = 2^19, L = 0.
module tb_dcc;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [CNT_W-1:0] cap = '0;
  logic busy, done;
  logic [DSM_W-1:0] cal_code;
  logic [K_W-1:0] k_mod;
  logic signed [DLF_W-1:0] l_off;
  int checks = 0, failures = 0;
  real f_lo = 1.2965e9, gain_hz = 751.0, frac = 0.0;

  dcc dut (.*);

  always #125000 ref_clk = ~ref_clk;

  // Ideal oscillator + counter: one count per reference period.
  always @(negedge ref_clk) begin
    real n;
    n = (f_lo + gain_hz * real'(cal_code)) / 4.0e6 + frac;
    cap <= CNT_W'($rtoi(n));
    frac = n - real'($rtoi(n));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input real flo, input real g);
    int nbusy = 0, neutral_bad = 0;
    real k_norm, l_exp, target_g;
    f_lo = flo; gain_hz = g;
    rst_n = 1'b0; en = 1'b1;
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1'b1;
    while (!done) begin
      @(posedge ref_clk); #1;
      if (busy) nbusy++;
      if (!done && (k_mod != K_W'(524288) || l_off != 0)) neutral_bad++;
      if (nbusy > 1000) break;
    end
    target_g = 400.0e6 / 524288.0;
    k_norm = g * 524288.0 / real'(k_mod);
    // Gain-corrected offset: the normalised line's offset at code 0.
    l_exp = (flo - 1.3e9) / target_g;
    $display("gain %0.0f Hz/LSB, f_lo %e: K=%0d -> %0.2f Hz/LSB (target %0.2f, error %0.3f %%), L=%0d (expected %0.0f)",
             g, flo, k_mod, k_norm, target_g, 100.0 * (k_norm - target_g) / target_g, l_off, l_exp);
    check(nbusy == 161, $sformatf("busy for 161 periods (got %0d)", nbusy));
    check(neutral_bad == 0, "K, L neutral until done");
    check(k_norm > target_g * 0.999 && k_norm < target_g * 1.001, "normalised gain within 0.1 %");
    check(real'(l_off) > l_exp - 100.0 && real'(l_off) < l_exp + 100.0, "offset L");
  endtask

  initial begin
    run(1.2965e9, 751.0);    // typical corner: 393.8 MHz over 2^19
    run(1.2555e9, 776.0);    // slow corner:    406.9 MHz
    run(1.3100e9, 610.0);
    run(1.2900e9, 750.0);
    run(1.2800e9, 915.0);
    // no calibration
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1'b1;
    repeat (2) @(posedge ref_clk); #1;
    check(done && !busy && k_mod == K_W'(524288) && l_off == 0, "bypass when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge ref_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
