// freq_divider: divide-by-350 feedback divider (175 x 2) with re-sync DFF.
//
// The shared counter (fd_counter) divides the DCO clock by 175 while
// tracking; a divide-by-2 flip-flop toggles once per 175 clocks, and a
// re-sync flip-flop clocked by the DCO output retimes the result so the
// divider's internal delays do not accumulate into the feedback edge.  f_fb
// therefore has a period of exactly 350 DCO clocks and a 50 % duty cycle.
// During calibration (mode_div = 0) the divide-by-2 is held at 0 and the
// counter works as the frequency detector; its captured count is passed out.
//
// In silicon the divide-by-2 is clocked by the divide-by-175 output; here it
// is a synchronous toggle enabled by the counter's terminal pulse, which
// gives the same edges on the f_OUT grid.
//
// Interface: fout_clk domain, asynchronous active-low reset.
// Timing: f_fb rises two f_OUT cycles after the counter wraps.
module freq_divider
  import adpll_pkg::*;
#(
  parameter int unsigned W      = CNT_W,
  parameter int unsigned DIV_TC = 175
) (
  input  logic         fout_clk,
  input  logic         rst_n,
  input  logic         mode_div,
  input  logic         ref_clk,
  output logic         f_fb,
  output logic [W-1:0] cap,
  output logic         cap_stb
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] count;
  logic         tc, div2_q;

  fd_counter #(.W(W), .DIV_TC(DIV_TC)) u_cnt (
    .fout_clk, .rst_n, .mode_div, .ref_clk,
    .count, .tc, .cap, .cap_stb
  );

  always_ff @(posedge fout_clk or negedge rst_n) begin
    if (!rst_n) begin
      div2_q <= 1'b0;
      f_fb   <= 1'b0;
    end else begin
      if (!mode_div) div2_q <= 1'b0;
      else if (tc)   div2_q <= ~div2_q;
      f_fb <= div2_q;
    end
  end

endmodule
