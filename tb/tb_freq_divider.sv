// tb_freq_divider: checks the divide-by-350 at 1.3, 1.4 and 1.7 GHz, the
// lowest, nominal and highest output frequencies the divider must handle.
// For each input frequency f:
//   Frequency-detector mode: f_fb stays low and cap reads f / 4 MHz +-1
//   (325, 350, 425).
//   Divide mode: every f_fb period is exactly 350 input clocks with 175
//   high and 175 low, so 40 periods take 40 * 350 / f (10 us at 1.4 GHz).
// The ratio 350 and the 1.3 / 1.7 GHz test points are the design's; the
// run lengths and tolerances are this testbench's choice.
module tb_freq_divider;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  logic fout_clk = 1'b0, rst_n = 1'b0, mode_div = 1'b0, ref_clk = 1'b0;
  logic f_fb, cap_stb;
  logic [CNT_W-1:0] cap;
  int checks = 0, failures = 0;
  realtime half_ps = 357.142857;

  freq_divider dut (.*);

  always #125000 ref_clk = ~ref_clk;
  always begin
    #(half_ps) fout_clk = ~fout_clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input real f_hz);
    int exp_cap = int'(f_hz / 4.0e6);
    real t_exp = 40.0 * 350.0 / f_hz * 1.0e12;
    rst_n = 1'b0;
    mode_div = 1'b0;
    half_ps = 0.5e12 / f_hz;
    #3000 rst_n = 1'b1;
    begin
      int high = 0, ncap = 0, badcap = 0;
      repeat (20) begin
        @(posedge fout_clk); #1;
        if (f_fb) high++;
      end
      repeat (5) @(posedge ref_clk);
      repeat (4500) begin
        @(posedge fout_clk); #1;
        if (f_fb) high++;
        if (cap_stb) begin ncap++; if (cap < CNT_W'(exp_cap - 1) || cap > CNT_W'(exp_cap + 1)) badcap++; end
      end
      check(high == 0, $sformatf("%0.1f GHz: f_fb low in frequency-detector mode", f_hz / 1.0e9));
      check(ncap >= 9 && badcap == 0, $sformatf("%0.1f GHz: cap reads %0d", f_hz / 1.0e9, exp_cap));
    end
    @(negedge fout_clk) mode_div = 1'b1;
    repeat (2000) @(posedge fout_clk);
    begin
      int hi = 0, lo = 0, bad = 0, n = 0;
      realtime t0, t1;
      logic prev;
      @(posedge f_fb);
      t0 = $realtime;
      prev = 1'b1;
      while (n < 40) begin
        @(posedge fout_clk); #1;
        if (f_fb) hi++; else lo++;
        if (f_fb && !prev) begin
          n++;
          if (hi != 175 || lo != 175) bad++;
          hi = 0; lo = 0;
        end
        prev = f_fb;
      end
      t1 = $realtime;
      check(bad == 0, $sformatf("%0.1f GHz: each period 175 high + 175 low clocks", f_hz / 1.0e9));
      check((t1 - t0) > t_exp - 1000.0 && (t1 - t0) < t_exp + 1000.0,
            $sformatf("%0.1f GHz: 40 periods in %0.3f us", f_hz / 1.0e9, t_exp / 1.0e6));
    end
  endtask

  initial begin
    run(1.4e9);
    run(1.3e9);
    run(1.7e9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
