// tb_dco_analog: checks the behavioural IDAC/filter/oscillator model.
//   - switches giving 1 unit: f = F_LO (1.2965 GHz): 12965 +-1 clocks in 10 us;
//   - 2 units: f = F_HI (1.6903 GHz) after the filter settles;
//   - a 1/2-unit square wave at 87.5 MHz (well above the 500 kHz filter):
//     f = (F_LO + F_HI)/2 within 0.1 %;
//   - filter time constant: 1 us after a step from 1 to 2 units the output
//     has moved 1-(1+wT)e^-wT (two equal poles, w = 2 pi 800 kHz) of the way,
//     checked within 2 % of the range;
//   - en = 0 stops the clock.
module tb_dco_analog;
  timeunit 1ps;
  timeprecision 1fs;

  logic en = 1'b0, s1 = 1'b0, s2 = 1'b0, s3 = 1'b1, fout;
  int checks = 0, failures = 0;
  longint n = 0;
  real f_meas, expect_f, x;

  dco_analog dut (.en, .sdm_out1(s1), .sdm_out2(s2), .sdm_out3(s3), .fout);

  always @(posedge fout) n++;

  task automatic measure(input real win_ps, output real f);
    longint n0 = n;
    #(win_ps);
    f = real'(n - n0) / (win_ps * 1.0e-12);
  endtask

  task automatic check_f(input real f, input real want, input real tol, input string what);
    checks++;
    if (f < want * (1.0 - tol) || f > want * (1.0 + tol)) begin
      failures++;
      $display("FAIL %s: %e Hz, expected %e", what, f, want);
    end else $display("%s: %e Hz", what, f);
  endtask

  initial begin
    #1000 en = 1'b1;
    #20000000;
    measure(10.0e6, f_meas);
    check_f(f_meas, 1.2965e9, 1.0e-4, "1 unit");
    // step to 2 units; check the response at 1 us
    s1 = 1'b1;
    #900000;
    // 300 clocks centred near t = 1 us, timed edge to edge
    begin
      realtime ta, tb;
      @(posedge fout) ta = $realtime;
      repeat (300) @(posedge fout);
      tb = $realtime;
      f_meas = 300.0 / ((tb - ta) * 1.0e-12);
    end
    x = 2.0 * 3.14159265 * 800.0e3 * 1.0e-6;
    expect_f = 1.2965e9 + 393.8e6 * (1.0 - (1.0 + x) * $exp(-x));
    check_f(f_meas, expect_f, 0.02 * 393.8e6 / expect_f, "step response at 1 us");
    #30000000;
    measure(10.0e6, f_meas);
    check_f(f_meas, 1.6903e9, 1.0e-4, "2 units");
    // square wave between 1 and 2 units
    fork
      begin : sq
        forever begin #5714 s1 = ~s1; end
      end
      begin
        #30000000;
        measure(20.0e6, f_meas);
        check_f(f_meas, 1.4934e9, 1.0e-3, "1.5 units average");
        disable sq;
      end
    join
    en = 1'b0;
    #1000 n = 0;
    #100000;
    checks++;
    if (n != 0 || fout != 1'b0) begin failures++; $display("FAIL en=0 still oscillates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
