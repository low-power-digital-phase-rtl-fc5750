// tb_bbpd: checks the bang-bang phase detector.  A random feedback level is
// set before every reference edge; PDOUT must equal the level sampled two
// reference edges earlier (two flip-flops), and be 0 right after reset.
module tb_bbpd;
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_clk = 1'b0, rst_n = 1'b0, fb_clk = 1'b0, pdout;
  int checks = 0, failures = 0;
  logic hist [$];

  bbpd dut (.*);

  always #125000 ref_clk = ~ref_clk;

  initial begin
    repeat (2) @(posedge ref_clk);
    checks++; if (pdout !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge ref_clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge ref_clk);
      fb_clk = 1'($urandom_range(0, 1));
      hist.push_back(fb_clk);
      @(posedge ref_clk); #1;
      if (hist.size() >= 2) begin
        checks++;
        if (pdout !== hist[hist.size()-2]) begin
          failures++;
          $display("FAIL cycle %0d: pdout=%0b expected %0b", i, pdout, hist[hist.size()-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge ref_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
