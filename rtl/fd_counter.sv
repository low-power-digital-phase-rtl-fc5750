// fd_counter: the shared f_OUT counter, used as the frequency detector during
// calibration and as the divide-by-175 during tracking.
//
// A CNT_W-bit up-counter clocked by the DCO output.  Its reset is never
// applied directly: a reset request is first captured by a flip-flop (Res_Q)
// and the counter clears on the following edge, which keeps the reset free
// of races with the fast clock.
//   mode_div = 0 (frequency detector): the reference clock is synchronised
//     into the f_OUT domain by two flip-flops; its rising edge requests the
//     reset.  When Res_Q clears the counter, count+1 (the number of f_OUT
//     rising edges since the previous reset, i.e. in one reference period)
//     is captured into cap and cap_stb pulses for one f_OUT cycle.
//   mode_div = 1 (divide-by-175): the request is raised at count DIV_TC-2
//     (173), so Res_Q is high while the count is 174 and the counter wraps to
//     0: a period of DIV_TC (175) clocks.  tc is Res_Q, one f_OUT cycle high
//     per period.
// The silicon builds the counter from 2-bit ripple stages re-synchronised by
// CLK2..CLK8; this model is a plain synchronous counter with the same count
// sequence.  Width 10 (1023 > 2 GHz / 4 MHz) is this design's choice.
//
// Interface: fout_clk domain, asynchronous active-low reset; ref_clk is only
// sampled as data.  cap is stable for most of each reference period.
module fd_counter
  import adpll_pkg::*;
#(
  parameter int unsigned W      = CNT_W,
  parameter int unsigned DIV_TC = 175
) (
  input  logic         fout_clk,
  input  logic         rst_n,
  input  logic         mode_div,
  input  logic         ref_clk,
  output logic [W-1:0] count,
  output logic         tc,
  output logic [W-1:0] cap,
  output logic         cap_stb
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [2:0] ref_sync;      // two synchronising stages plus edge history
  logic       res_req, res_q;

  assign res_req = mode_div ? (count == W'(DIV_TC - 2))
                            : (ref_sync[1] & ~ref_sync[2]);
  assign tc      = mode_div & res_q;

  always_ff @(posedge fout_clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sync <= '0;
      res_q    <= 1'b0;
      count    <= '0;
      cap      <= '0;
      cap_stb  <= 1'b0;
    end else begin
      ref_sync <= {ref_sync[1:0], ref_clk};
      res_q    <= res_req;
      cap_stb  <= 1'b0;
      if (res_q) begin
        count <= '0;
        if (!mode_div) begin
          cap     <= count + W'(1);
          cap_stb <= 1'b1;
        end
      end else begin
        count <= count + W'(1);
      end
    end
  end

endmodule
