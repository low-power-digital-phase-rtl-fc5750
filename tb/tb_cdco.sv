// tb_cdco: checks the calibration DCO (offset/saturation, modulator at
// f_OUT/4, analog model) end to end.  For each setting the control word must
// be base + DLFOUT - L clipped to [0, K-1], and after the filter has settled
// the output must run at F_LO + (F_HI - F_LO) * code / K, measured over
// 20 us to within 2 clocks (about 70 ppb, i.e. about 130 code steps).
// DSM_CLK must make a quarter of the output clocks.
module tb_cdco;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  localparam real FLO = 1.2965e9, FHI = 1.6903e9;

  logic rst_n = 1'b0;
  logic [DSM_W-1:0] base_code = DSM_W'(131072), code;
  logic signed [DLF_W-1:0] dlfout = '0, l_off = '0;
  logic [K_W-1:0] k_mod = K_W'(524288);
  logic dsm_clk, fout;
  int checks = 0, failures = 0;
  longint nf = 0, nd = 0;

  cdco dut (.*);

  always @(posedge fout) nf++;
  always @(posedge dsm_clk) nd++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic setting(input int b, input int d, input int l, input int k, input int want_code);
    longint f0, d0;
    real want_f, got;
    base_code = DSM_W'(b); dlfout = DLF_W'(d); l_off = DLF_W'(l); k_mod = K_W'(k);
    #1;
    check(int'(code) == want_code, $sformatf("code %0d expected %0d", code, want_code));
    #15000000;
    f0 = nf; d0 = nd;
    #20000000;
    want_f = FLO + (FHI - FLO) * real'(want_code) / real'(k);
    got = real'(nf - f0);
    check(got > want_f * 20.0e-6 - 2.0 && got < want_f * 20.0e-6 + 2.0,
          $sformatf("%0.0f clocks in 20 us, expected %0.1f", got, want_f * 20.0e-6));
    check((nd - d0) * 4 >= (nf - f0) - 4 && (nd - d0) * 4 <= (nf - f0) + 4, "DSM_CLK = f_OUT / 4");
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    setting(131072, 0, 0, 524288, 131072);
    setting(131072, 1000, -500, 516096, 132572);
    setting(131072, -2069, -6636, 516096, 135639);
    setting(131072, 300000, 0, 400000, 399999);   // clipped at K-1
    setting(131072, -200000, 0, 524288, 0);       // clipped at 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
