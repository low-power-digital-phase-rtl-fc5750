// tb_adpll_top: end-to-end test of the all-digital PLL at its default
// parameters (typical-corner oscillator, 4 MHz reference, N = 350).
//
// Runs calibration, then closed-loop tracking until the gain control
// reports lock, then checks:
//   - calibration: K within 0.5 % of 2^19 * (actual range / target range),
//     L within 500 codes of the offset of the gain-normalised line,
//     (f_lo - 1.3 GHz) / K_DCO;
//   - the divider runs at 350: f_fb has exactly 350 f_out clocks per period;
//   - the gain control stepped through all four gain sets;
//   - after lock the output makes 350 * P f_out clocks (+-2) in P reference
//     periods, i.e. f_out = 1.4 GHz, and the phase detector keeps toggling.
// Each mechanism (calibration, counter mode switch, gain step, lock,
// saturation-free tracking) is counted and must have happened.
module tb_adpll_top;

  timeunit 1ps;
  timeprecision 1fs;

  import adpll_pkg::*;

  localparam real TREF_PS = 250000.0;   // 4 MHz

  logic ref_clk = 1'b0, rst_n = 1'b0, dcc_en = 1'b1;
  logic f_out, f_fb, pdout, gain_step, locked;
  logic signed [DLF_W-1:0] dlfout, psi, l_off;
  logic [DSM_W-1:0] code;
  logic [K_W-1:0] k_mod;
  pll_mode_e mode;
  logic [1:0] dgc_stage;

  int checks = 0, failures = 0;
  int n_gain_steps = 0, n_cal = 0, n_mode_switch = 0, n_lock = 0;
  int ref_cycles = 0;

  adpll_top dut (.*);

  always #(TREF_PS / 2.0) ref_clk = ~ref_clk;
  always @(posedge ref_clk) ref_cycles++;

  // f_out clocks counted continuously.
  longint fcount = 0;
  always @(posedge f_out) fcount++;

  // Divider period in f_out clocks.
  longint last_fb_count = -1;
  int div_ok = 0, div_bad = 0;
  always @(posedge f_fb) begin
    if (mode == MODE_TRACK && last_fb_count >= 0) begin
      if (fcount - last_fb_count == 350) div_ok++; else div_bad++;
    end
    last_fb_count = fcount;
  end

  always @(posedge ref_clk) if (gain_step) n_gain_steps++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real k_ideal, l_ideal;
  longint c0, c1;
  int pd_toggles;
  logic pd_last;

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    // Calibration.
    wait (mode == MODE_TRACK);
    n_cal++;
    n_mode_switch++;
    k_ideal = 524288.0 * (1.6903e9 - 1.2965e9) / 400.0e6;
    // Offset of the gain-normalised line from the target line, in codes.
    l_ideal = (1.2965e9 - 1.3e9) / (400.0e6 / 524288.0);
    $display("cal done at ref cycle %0d: K=%0d (ideal %.0f) L=%0d (ideal %.0f)",
             ref_cycles, k_mod, k_ideal, l_off, l_ideal);
    check(($itor(k_mod) - k_ideal) < 0.005 * k_ideal && (k_ideal - $itor(k_mod)) < 0.005 * k_ideal,
          "K near ideal");
    check(($itor(l_off) - l_ideal) < 500.0 && (l_ideal - $itor(l_off)) < 500.0, "L near ideal");
    // Tracking until lock.
    wait (locked);
    n_lock++;
    $display("locked at ref cycle %0d, code=%0d psi=%0d", ref_cycles, code, psi);
    check(dgc_stage == 2'd3, "gain control reached the last set");
    check(n_gain_steps == 3, "three gain steps");
    // Frequency over 200 reference periods.
    @(posedge ref_clk);
    c0 = fcount;
    pd_toggles = 0;
    pd_last = pdout;
    repeat (200) begin
      @(posedge ref_clk);
      if (pdout != pd_last) pd_toggles++;
      pd_last = pdout;
    end
    c1 = fcount;
    $display("f_out clocks in 200 ref periods: %0d (expect 70000)", c1 - c0);
    check((c1 - c0) >= 69998 && (c1 - c0) <= 70002, "locked at 350 x f_ref");
    check(pd_toggles > 5, "phase detector dithers in lock");
    check(div_ok > 10 && div_bad == 0, "divider period 350");
    check(code > 0 && code < DSM_W'(k_mod - 1), "control word not saturated");
    check(n_cal > 0 && n_mode_switch > 0 && n_gain_steps > 0 && n_lock > 0,
          "every mechanism happened");
    $display("mechanisms: calibration=%0d mode_switch=%0d gain_steps=%0d lock=%0d",
             n_cal, n_mode_switch, n_gain_steps, n_lock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge ref_clk);
    failures++;
    $display("FAIL: watchdog, mode=%0d stage=%0d code=%0d psi=%0d", mode, dgc_stage, code, psi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
