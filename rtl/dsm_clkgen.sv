// dsm_clkgen: divide-by-4 of the DCO output, the delta-sigma modulator's
// oversampling clock DSM_CLK (a quarter of the output frequency).
//
// A two-bit counter on the DCO clock; its upper bit is DSM_CLK with a 50 %
// duty cycle.  Asynchronous active-low reset (this design's choice).
module dsm_clkgen (
  input  logic fout_clk,
  input  logic rst_n,
  output logic dsm_clk
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [1:0] cnt;

  always_ff @(posedge fout_clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 2'd1;
  end

  assign dsm_clk = cnt[1];

endmodule
