// tb_dlf: checks the loop filter against a reference model written with
// plain integers: s = +1 for PDOUT = 0 and -1 for PDOUT = 1,
// Psi <= sat(Psi + alpha*s), DLFOUT <= sat(Psi_new + beta*s), both one
// reference cycle after the PDOUT they use; en = 0 clears both.  Random
// PDOUT, random gains (changed now and then) and long one-sided runs that
// drive Psi into saturation in a narrow instance.
module tb_dlf;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  localparam int W = 10;   // narrow so that saturation is reached
  logic ref_clk = 1'b0, rst_n = 1'b0, en = 1'b0, pdout = 1'b0;
  dlf_gain_t gain;
  logic signed [W-1:0] psi, dlfout;
  int checks = 0, failures = 0, n_sat = 0;
  longint m_psi = 0, m_out = 0, s, t;

  dlf #(.W(W)) dut (.*);

  always #125000 ref_clk = ~ref_clk;

  function automatic longint satw(input longint v);
    longint hi = (64'sd1 <<< (W-1)) - 1, lo = -(64'sd1 <<< (W-1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  initial begin
    gain = '{alpha: 8'd3, beta: 8'd24};
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge ref_clk);
      if (i % 200 == 0) gain = '{alpha: 8'($urandom_range(1, 16)), beta: 8'($urandom_range(8, 128))};
      en = !(i >= 1500 && i < 1510);
      // Mostly random; every 500 cycles a 300-cycle run of one sign.
      if ((i % 500) < 300 && i >= 500) pdout = (i / 500) % 2 == 1;
      else pdout = 1'($urandom_range(0, 1));
      s = pdout ? -1 : 1;
      if (!en) begin
        m_psi = 0; m_out = 0;
      end else begin
        t = satw(m_psi + s * longint'(gain.alpha));
        m_out = satw(t + s * longint'(gain.beta));
        if (t != m_psi + s * longint'(gain.alpha)) n_sat++;
        m_psi = t;
      end
      @(posedge ref_clk); #1;
      checks++;
      if (psi != m_psi || dlfout != m_out) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: psi=%0d/%0d out=%0d/%0d", i, psi, m_psi, dlfout, m_out);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("saturated cycles: %0d", n_sat);
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
