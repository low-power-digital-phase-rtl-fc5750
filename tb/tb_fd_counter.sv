// tb_fd_counter: checks the shared counter.
//   Frequency-detector mode, f_OUT = 1 GHz and 1.4 GHz against a 4 MHz
//   reference: one cap_stb per reference period (41 in a window of 40
//   periods that starts just after a reference edge), cap = 250 / 350 (+-1,
//   the synchroniser may slip one clock) and the caps add up to exactly
//   41 * 250 (+-1) / 41 * 350 (+-1).
//   Divide mode: the count runs 0..174 and tc is high once every 175 clocks,
//   while the count is 174.
module tb_fd_counter;
  timeunit 1ps;
  timeprecision 1fs;
  import adpll_pkg::*;

  logic fout_clk = 1'b0, rst_n = 1'b0, mode_div = 1'b0, ref_clk = 1'b0;
  logic [CNT_W-1:0] count, cap;
  logic tc, cap_stb;
  int checks = 0, failures = 0;
  real half_ps = 500.0;

  fd_counter dut (.*);

  always #125000 ref_clk = ~ref_clk;
  always #(half_ps) fout_clk = ~fout_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fd_run(input int expect_n);
    int nstb = 0, sum = 0, bad = 0;
    repeat (3) @(posedge ref_clk);
    fork
      begin : mon
        forever begin
          @(posedge fout_clk); #1;
          if (cap_stb) begin
            nstb++; sum += int'(cap);
            if (cap < CNT_W'(expect_n - 1) || cap > CNT_W'(expect_n + 1)) bad++;
          end
        end
      end
      begin
        repeat (40) @(posedge ref_clk);
        #20000;
        disable mon;
      end
    join
    check(nstb == 41, $sformatf("41 captures (got %0d)", nstb));
    check(bad == 0, $sformatf("each capture %0d +-1", expect_n));
    check(sum >= 41 * expect_n - 1 && sum <= 41 * expect_n + 1,
          $sformatf("sum %0d = 41 x %0d", sum, expect_n));
  endtask

  initial begin
    #3000 rst_n = 1'b1;
    fd_run(250);
    half_ps = 357.142857;
    fd_run(350);
    // divide mode
    @(negedge fout_clk) mode_div = 1'b1;
    repeat (1100) @(posedge fout_clk);   // counter may first run up from its FD value
    begin
      int since = -1, bad_period = 0, bad_cnt = 0, ntc = 0;
      logic [CNT_W-1:0] prev;
      @(posedge fout_clk); #1; prev = count;
      repeat (175 * 20) begin
        @(posedge fout_clk); #1;
        if (count != ((prev == 174) ? 0 : prev + 1)) bad_cnt++;
        prev = count;
        if (since >= 0) since++;
        if (tc) begin
          ntc++;
          if (count != 174) bad_cnt++;
          if (since >= 0 && since != 175) bad_period++;
          since = 0;
        end
      end
      check(ntc == 20, $sformatf("20 terminal pulses (got %0d)", ntc));
      check(bad_period == 0, "tc period 175");
      check(bad_cnt == 0, "count sequence 0..174");
    end
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
