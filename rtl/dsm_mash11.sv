// dsm_mash11: second-order MASH 1-1 delta-sigma modulator with a
// programmable modulus.
//
// Two first-order stages in cascade.  Stage 1 adds the digital code to its
// accumulator; when the sum reaches the modulus K it produces a carry and
// keeps the sum minus K.  Stage 2 does the same with stage 1's new residue as
// its input.  Three registered outputs drive three equal IDAC current
// switches: SDMOut1 = stage-1 carry delayed one clock, SDMOut2 = stage-2
// carry delayed one clock, SDMOut3 = the inverse of SDMOut2 delayed one more
// clock.  Their sum minus one is
//   y = z^-1 * code/K - z^-1 (1 - z^-1)^2 * e2 / K,
// i.e. the code divided by K with second-order shaped quantisation noise.
// Over time the three switches carry on average 1 + code/K units.
//
// The modulus K is the gain-normalisation handle of the DCO calibration:
// dividing by K instead of by 2^19 scales the oscillator gain by 2^19/K.
// With K = 2^19 the modulator is an ordinary 19-bit accumulator pair.
// The code must stay below K (the caller saturates it).  Stage 2 takes
// stage 1's residue before stage 1's register, so that the three outputs
// as drawn in the design (each a single register stage) cancel stage 1's
// quantisation error exactly.
//
// Interface: dsm_clk (f_OUT/4), asynchronous active-low reset, code
// (unsigned, DSM_W bits), k_mod (modulus, DSM_W+1 bits).
// Timing: one dsm_clk of latency from code to SDMOut1/SDMOut2.
module dsm_mash11
  import adpll_pkg::*;
#(
  parameter int unsigned W = DSM_W
) (
  input  logic         dsm_clk,
  input  logic         rst_n,
  input  logic [W-1:0] code,
  input  logic [W:0]   k_mod,
  output logic         sdm_out1,
  output logic         sdm_out2,
  output logic         sdm_out3
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [W:0]   acc1, acc2;          // residues, always below k_mod
  logic [W+1:0] sum1, sum2;
  logic [W:0]   res1, res2;
  logic         c1, c2;

  always_comb begin
    sum1 = {1'b0, acc1} + {2'b00, code};
    c1   = (sum1 >= {1'b0, k_mod});
    res1 = c1 ? (W+1)'(sum1 - {1'b0, k_mod}) : sum1[W:0];
    sum2 = {1'b0, acc2} + {1'b0, res1};
    c2   = (sum2 >= {1'b0, k_mod});
    res2 = c2 ? (W+1)'(sum2 - {1'b0, k_mod}) : sum2[W:0];
  end

  always_ff @(posedge dsm_clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1     <= '0;
      acc2     <= '0;
      sdm_out1 <= 1'b0;
      sdm_out2 <= 1'b0;
      sdm_out3 <= 1'b1;
    end else begin
      acc1     <= res1;
      acc2     <= res2;
      sdm_out1 <= c1;
      sdm_out2 <= c2;
      sdm_out3 <= ~sdm_out2;
    end
  end

endmodule
