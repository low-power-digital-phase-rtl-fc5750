// adpll_corner_run: one PLL with a given oscillator corner, plus its own
// checks, for the corner-sweep testbench.  After reset it waits for lock,
// then checks that 200 reference periods hold 70000 +-2 output clocks
// (1.4 GHz) and that the calibrated gain F_RANGE'/K is within 0.1 % of the
// target 400 MHz / 2^19.  Results come out on ports.  The 1.4 GHz target
// and the 400 MHz / 2^19 gain are the design's; the 200-period window and
// the tolerances are this testbench's choice.
module adpll_corner_run #(
  parameter real   F_LO_HZ = 1.2965e9,
  parameter real   F_HI_HZ = 1.6903e9,
  parameter string NAME    = "TT"
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic finished,
  output int   nchecks,
  output int   nfail,
  output int   lock_cycle
);
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  logic f_out, f_fb, pdout, gain_step, locked;
  logic signed [DLF_W-1:0] dlfout, psi, l_off;
  logic [DSM_W-1:0] code;
  logic [K_W-1:0] k_mod;
  pll_mode_e mode;
  logic [1:0] dgc_stage;
  longint fcount = 0, c0;
  int cyc = 0;
  real g;

  adpll_top #(.F_LO_HZ(F_LO_HZ), .F_HI_HZ(F_HI_HZ)) dut (
    .ref_clk, .rst_n, .dcc_en(1'b1), .f_out, .f_fb, .pdout, .dlfout, .psi,
    .code, .k_mod, .l_off, .mode, .dgc_stage, .gain_step, .locked
  );

  always @(posedge f_out) fcount++;
  always @(posedge ref_clk) cyc++;

  initial begin
    finished = 1'b0; nchecks = 0; nfail = 0; lock_cycle = -1;
    wait (rst_n);
    wait (locked);
    lock_cycle = cyc;
    @(posedge ref_clk);
    c0 = fcount;
    repeat (200) @(posedge ref_clk);
    nchecks++;
    if (fcount - c0 < 69998 || fcount - c0 > 70002) begin
      nfail++;
      $display("FAIL %s: %0d clocks in 200 periods", NAME, fcount - c0);
    end
    g = (F_HI_HZ - F_LO_HZ) / real'(k_mod);
    nchecks++;
    if (g < 762.94 * 0.999 || g > 762.94 * 1.001) begin
      nfail++;
      $display("FAIL %s: calibrated gain %0.2f Hz/LSB", NAME, g);
    end
    $display("%s: K=%0d L=%0d gain %0.2f Hz/LSB, locked at period %0d, %0d clocks/200 periods",
             NAME, k_mod, l_off, g, lock_cycle, fcount - c0);
    finished = 1'b1;
  end
endmodule
