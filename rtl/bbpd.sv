// bbpd: bang-bang phase detector.
//
// Two D flip-flops in series, both clocked by the reference clock f_REF,
// sample the feedback clock f_FB.  The first flop decides whether f_FB was
// already high at the f_REF rising edge (feedback early, PDOUT = 1) or still
// low (feedback late, PDOUT = 0); the second flop resamples it so that a
// metastable first stage has a full reference period to resolve.  In the
// silicon the first stage is a sense-amplifier flip-flop followed by an SR
// latch for a small dead zone; here it is an ordinary flip-flop, which has
// no dead zone at all.
//
// Interface: ref_clk (4 MHz), asynchronous active-low reset rst_n, fb_clk
// (the divided DCO clock, sampled as data), pdout (1 = feedback leads).
// Timing: pdout reflects the f_FB level at the f_REF edge one reference
// period earlier (one cycle of loop delay).  The reset value (0) is this
// design's choice.
module bbpd (
  input  logic ref_clk,
  input  logic rst_n,
  input  logic fb_clk,
  output logic pdout
);

  timeunit 1ps;
  timeprecision 1fs;

  logic sample_q;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q <= 1'b0;
      pdout    <= 1'b0;
    end else begin
      sample_q <= fb_clk;
      pdout    <= sample_q;
    end
  end

endmodule
