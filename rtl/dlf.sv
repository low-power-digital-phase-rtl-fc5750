// dlf: dynamic loop filter (proportional-integral, bang-bang input).
//
// PDOUT selects a sign: PDOUT = 1 (feedback early) gives -1, PDOUT = 0 gives
// +1.  The sign times beta forms the forward path; the sign times alpha is
// accumulated in the integral path Psi.  DLFOUT = beta*s + Psi, where Psi
// already includes the current alpha*s.  The sum is captured in an output
// register, the register the design places between the loop filter and the
// DCO; with the phase detector's own flop this gives the loop delay D = 2.
// alpha and beta come from the dynamic gain control and may change at any
// reference edge; Psi is kept across a change so the loop keeps its
// frequency.
//
// Interface: ref_clk domain, asynchronous active-low reset.  en = 0 clears Psi
// and DLFOUT (loop open).  psi and dlfout are signed two's complement.
// Timing: one reference period from pdout to dlfout.  Psi saturates at the
// signed range instead of wrapping; the widths and saturation are this
// design's choice.
module dlf
  import adpll_pkg::*;
#(
  parameter int unsigned W = DLF_W
) (
  input  logic                ref_clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                pdout,
  input  dlf_gain_t           gain,
  output logic signed [W-1:0] psi,
  output logic signed [W-1:0] dlfout
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam logic signed [W+1:0] MAXV = (W+2)'((64'sd1 <<< (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(64'sd1 <<< (W-1));

  logic signed [W+1:0] a_term, b_term, psi_sum, out_sum;
  logic signed [W-1:0] psi_next;

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > MAXV)      return MAXV[W-1:0];
    else if (v < MINV) return MINV[W-1:0];
    else               return v[W-1:0];
  endfunction

  always_comb begin
    a_term   = pdout ? -$signed({2'b00, W'(gain.alpha)}) : $signed({2'b00, W'(gain.alpha)});
    b_term   = pdout ? -$signed({2'b00, W'(gain.beta)})  : $signed({2'b00, W'(gain.beta)});
    psi_sum  = (W+2)'(psi) + a_term;
    psi_next = sat(psi_sum);
    out_sum  = (W+2)'(psi_next) + b_term;
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      psi    <= '0;
      dlfout <= '0;
    end else if (!en) begin
      psi    <= '0;
      dlfout <= '0;
    end else begin
      psi    <= psi_next;
      dlfout <= sat(out_sum);
    end
  end

endmodule
