// tb_adpll_corners: runs the whole PLL (calibration, pull-in, gain steps,
// lock) for the five process corners of the oscillator's tuning range
// (TT 1.2965-1.6903, SS 1.2555-1.6624, FF 1.2542-1.6432, SNFP 1.2835-1.7086,
// FNSP 1.2828-1.6453 GHz), for raw DCO gains of 610 and 915 Hz/LSB, and
// for the range measured on silicon (1.338-1.715 GHz).
// Every instance must lock at 1.4 GHz within 12000 reference periods, with
// a calibrated gain within 0.1 % of the target.  The corner ranges are the
// design's simulated ones; the two extreme gains and the common 1.25 GHz
// bottom frequency used for them are this testbench's choice.
module tb_adpll_corners;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NU = 8;
  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic [NU-1:0] fin;
  int nc [NU];
  int nf [NU];
  int lc [NU];
  int checks = 0, failures = 0;

  always #125000 ref_clk = ~ref_clk;

  adpll_corner_run #(.F_LO_HZ(1.2965e9), .F_HI_HZ(1.6903e9), .NAME("TT"))
    u_tt   (.ref_clk, .rst_n, .finished(fin[0]), .nchecks(nc[0]), .nfail(nf[0]), .lock_cycle(lc[0]));
  adpll_corner_run #(.F_LO_HZ(1.2555e9), .F_HI_HZ(1.6624e9), .NAME("SS"))
    u_ss   (.ref_clk, .rst_n, .finished(fin[1]), .nchecks(nc[1]), .nfail(nf[1]), .lock_cycle(lc[1]));
  adpll_corner_run #(.F_LO_HZ(1.2542e9), .F_HI_HZ(1.6432e9), .NAME("FF"))
    u_ff   (.ref_clk, .rst_n, .finished(fin[2]), .nchecks(nc[2]), .nfail(nf[2]), .lock_cycle(lc[2]));
  adpll_corner_run #(.F_LO_HZ(1.2835e9), .F_HI_HZ(1.7086e9), .NAME("SNFP"))
    u_snfp (.ref_clk, .rst_n, .finished(fin[3]), .nchecks(nc[3]), .nfail(nf[3]), .lock_cycle(lc[3]));
  adpll_corner_run #(.F_LO_HZ(1.2828e9), .F_HI_HZ(1.6453e9), .NAME("FNSP"))
    u_fnsp (.ref_clk, .rst_n, .finished(fin[4]), .nchecks(nc[4]), .nfail(nf[4]), .lock_cycle(lc[4]));
  // 610 Hz/LSB: 319.8 MHz over 2^19; 915 Hz/LSB: 479.7 MHz over 2^19.
  adpll_corner_run #(.F_LO_HZ(1.2500e9), .F_HI_HZ(1.2500e9 + 610.0 * 524288.0), .NAME("610Hz/LSB"))
    u_g610 (.ref_clk, .rst_n, .finished(fin[5]), .nchecks(nc[5]), .nfail(nf[5]), .lock_cycle(lc[5]));
  adpll_corner_run #(.F_LO_HZ(1.2500e9), .F_HI_HZ(1.2500e9 + 915.0 * 524288.0), .NAME("915Hz/LSB"))
    u_g915 (.ref_clk, .rst_n, .finished(fin[6]), .nchecks(nc[6]), .nfail(nf[6]), .lock_cycle(lc[6]));
  // Range of the oscillator as measured on silicon.
  adpll_corner_run #(.F_LO_HZ(1.338e9), .F_HI_HZ(1.715e9), .NAME("measured"))
    u_meas (.ref_clk, .rst_n, .finished(fin[7]), .nchecks(nc[7]), .nfail(nf[7]), .lock_cycle(lc[7]));

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    wait (&fin);
    for (int i = 0; i < NU; i++) begin
      checks += nc[i];
      failures += nf[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge ref_clk);
    failures++;
    for (int i = 0; i < NU; i++) if (!fin[i]) $display("FAIL: instance %0d never locked", i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
