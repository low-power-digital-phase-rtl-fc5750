// dgc: dynamic gain control for the loop filter.
//
// After the loop closes the filter starts with the first, largest set of
// gains (alpha, beta) for a fast pull-in.  Once locked, the integral path Psi
// only vibrates up and down around its average, so PDOUT keeps changing sign
// after short runs.  The lock test used here: every PDOUT run of equal
// values not longer than RUN_MAX reference periods counts as one reversal;
// LOCK_CNT reversals in a row without an over-long run mean "locked at this
// gain".  Then the next, smaller gain set is applied and the test starts
// again.  After the last set (alpha = 1, beta = 8) the controller waits
// SETTLE_CYCLES reference periods and raises locked.
//
// Gain sets 16/255, 4/64, 2/16 before the final 1/8, the run-length lock test
// and its thresholds are this design's choices; the final gains and the
// flow (initial gains, lock test, change gains, last set?, settle, lock)
// follow the design specification.
//
// Interface: ref_clk domain, asynchronous active-low reset, en = 0 holds the
// controller at the first gain set.  gain is registered; stage tells which
// set is in use; gain_step pulses for one cycle when the set changes.
module dgc
  import adpll_pkg::*;
#(
  parameter int unsigned NSETS         = 4,
  parameter dlf_gain_t   GAINS [NSETS] = '{'{8'd16, 8'd255}, '{8'd4, 8'd64},
                                           '{8'd2, 8'd16}, '{8'd1, 8'd8}},
  parameter int unsigned RUN_MAX       = 16,
  parameter int unsigned LOCK_CNT      = 64,
  parameter int unsigned SETTLE_CYCLES = 256
) (
  input  logic                     ref_clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     pdout,
  output dlf_gain_t                gain,
  output logic [$clog2(NSETS)-1:0] stage,
  output logic                     gain_step,
  output logic                     locked
);

  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {S_TRACK, S_SETTLE, S_LOCKED} dgc_state_e;

  localparam int unsigned SW = $clog2(NSETS);
  localparam int unsigned RW = $clog2(RUN_MAX + 2);
  localparam int unsigned LW = $clog2(LOCK_CNT + 1);
  localparam int unsigned TW = $clog2(SETTLE_CYCLES + 1);

  dgc_state_e      state;
  logic            last_pd;
  logic [RW-1:0]   run_len;
  logic [LW-1:0]   rev_cnt;
  logic [TW-1:0]   settle_cnt;
  logic            reversal, run_long, lock_hit;

  assign reversal = (pdout != last_pd) && (run_len <= RW'(RUN_MAX));
  assign run_long = (pdout == last_pd) && (run_len >= RW'(RUN_MAX));
  assign lock_hit = reversal && (rev_cnt == LW'(LOCK_CNT - 1));

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_TRACK;
      stage      <= '0;
      gain       <= GAINS[0];
      gain_step  <= 1'b0;
      locked     <= 1'b0;
      last_pd    <= 1'b0;
      run_len    <= '0;
      rev_cnt    <= '0;
      settle_cnt <= '0;
    end else if (!en) begin
      state      <= S_TRACK;
      stage      <= '0;
      gain       <= GAINS[0];
      gain_step  <= 1'b0;
      locked     <= 1'b0;
      last_pd    <= pdout;
      run_len    <= '0;
      rev_cnt    <= '0;
      settle_cnt <= '0;
    end else begin
      gain_step <= 1'b0;
      last_pd   <= pdout;
      // Length of the current run of equal PDOUT values (saturating).
      if (pdout != last_pd)            run_len <= RW'(1);
      else if (run_len <= RW'(RUN_MAX)) run_len <= run_len + RW'(1);

      case (state)
        S_TRACK: begin
          if (run_long) begin
            rev_cnt <= '0;
          end else if (lock_hit) begin
            rev_cnt <= '0;
            if (stage == SW'(NSETS - 1)) begin
              state <= S_SETTLE;
            end else begin
              stage     <= stage + SW'(1);
              gain      <= GAINS[stage + SW'(1)];
              gain_step <= 1'b1;
            end
          end else if (reversal) begin
            rev_cnt <= rev_cnt + LW'(1);
          end
        end
        S_SETTLE: begin
          if (settle_cnt == TW'(SETTLE_CYCLES - 1)) begin
            state  <= S_LOCKED;
            locked <= 1'b1;
          end else begin
            settle_cnt <= settle_cnt + TW'(1);
          end
        end
        default: ;
      endcase
    end
  end

endmodule
