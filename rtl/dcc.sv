// dcc: DCO calibration circuit (offset L and gain normalisation K).
//
// Before the loop is closed the DCC drives the DCO open-loop and measures it
// with the frequency detector (the shared counter counts DCO clocks per
// reference period, cap):
//   1. apply code D1 (the nominal 1.4 GHz code), wait WAIT_CYC reference
//      periods for the analog filter, add up MEAS_CYC counts -> S1;
//      L = (f1' - f1) / K_DCO, in codes, where f1 is the target frequency of
//      D1 on the target tuning line.  In counts:
//      L = (S1 - S1_TGT) * F_REF * 2^19 / (MEAS_CYC * F_RANGE).
//   2. apply code D2, wait, measure -> S2.  The measured gain over the
//      target gain is (S2 - S1) / (S2_TGT - S1_TGT); the modulator modulus
//      that restores the target gain is K = 2^19 * (S2 - S1) / (S2_TGT - S1_TGT).
//   3. remove the gain error from L: with the gain normalised, the line is
//      shifted by L0 = L - D1 * (K - 2^19) / 2^19 codes, not by L (with
//      L_GAIN_CORR = 0 the offset is used as measured);
//   4. raise done and release K and L (both stay at their neutral values,
//      2^19 and 0, while the DCC still drives codes); K and L stay applied to the DCO while the loop tracks.
// The divisions are by constants and become fixed-point multiplications with
// FR fractional bits, computed at elaboration from the frequency plan.
// With en = 0 the DCC goes straight to done with K = 2^19 and L = 0 (no
// calibration).
//
// The procedure (D1 then D2, eq. L = (f1'-f1)/K_DCO, K applied as the
// modulator's accumulator length) follows the design; the gain correction
// of step 3 is this design's addition (it keeps the pull-in error of the
// loop small when the raw gain is far from its target).  Summing several
// periods per measurement, the choice D2 = 3 * 2^17, WAIT_CYC, MEAS_CYC and
// the clamp of K to [2^18, 2^20-1] are this design's own choices.
//
// Interface: ref_clk domain, asynchronous active-low reset.  cap is
// captured in the f_OUT domain a few DCO cycles after each reference edge
// and is stable at the next reference edge.  busy is high while the DCC owns
// the DCO (cal_code valid).
module dcc
  import adpll_pkg::*;
#(
  parameter int unsigned      CW       = CNT_W,
  parameter int unsigned      D1       = 131072,
  parameter int unsigned      D2       = 393216,
  parameter int unsigned      WAIT_CYC = 16,
  parameter int unsigned      MEAS_CYC = 64,
  parameter longint unsigned  FREF     = F_REF_HZ,
  parameter longint unsigned  FMIN     = F_MIN_HZ,
  parameter longint unsigned  FRANGE   = F_RANGE_HZ,
  parameter bit               L_GAIN_CORR = 1'b1
) (
  input  logic                    ref_clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [CW-1:0]           cap,
  output logic                    busy,
  output logic                    done,
  output logic [DSM_W-1:0]        cal_code,
  output logic [K_W-1:0]          k_mod,
  output logic signed [DLF_W-1:0] l_off
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned FR = 16;
  localparam int unsigned SW = 24;   // width of a count sum
  localparam int unsigned PW = 56;   // width of a scaled product

  // Target frequencies of D1/D2 and the target count sums.
  localparam longint unsigned F1_TGT = FMIN + ((FRANGE * D1) >> DSM_W);
  localparam longint unsigned F2_TGT = FMIN + ((FRANGE * D2) >> DSM_W);
  localparam longint unsigned S1_TGT = (MEAS_CYC * F1_TGT + FREF / 2) / FREF;
  // Codes per counted clock, 2^FR fixed point.
  localparam longint unsigned LSCALE =
      ((64'd1 << (FR + DSM_W)) * FREF + (MEAS_CYC * FRANGE) / 2) / (MEAS_CYC * FRANGE);
  // 2^19 / (target count difference), 2^FR fixed point.
  localparam longint unsigned KSCALE = (LSCALE * (64'd1 << DSM_W)) / 64'(D2 - D1);

  localparam logic [K_W-1:0] K_NOM = K_W'(64'd1 << DSM_W);
  localparam logic [K_W-1:0] K_MIN = K_W'(64'd1 << (DSM_W - 1));
  localparam logic [K_W-1:0] K_MAX = '1;

  typedef enum logic [2:0] {
    C_IDLE, C_WAIT1, C_MEAS1, C_WAIT2, C_MEAS2, C_CALC, C_DONE
  } dcc_state_e;

  dcc_state_e state;
  logic [15:0] cyc;
  logic [SW-1:0] acc, s1;
  logic signed [PW-1:0] l_prod, k_prod;
  logic signed [PW-1:0] k_val;
  logic signed [DLF_W-1:0] l_val;   // offset, held back until done
  logic signed [PW-1:0] k_new, l_corr;

  always_comb begin
    l_prod = ($signed({{(PW-SW){1'b0}}, acc}) - PW'(S1_TGT)) * $signed(PW'(LSCALE));
    k_prod = ($signed({{(PW-SW){1'b0}}, acc}) - $signed({{(PW-SW){1'b0}}, s1}))
             * $signed(PW'(KSCALE));
    k_val  = (k_prod + PW'(64'd1 << (FR - 1))) >>> FR;
    if (k_val < $signed(PW'(K_MIN)))      k_new = PW'(K_MIN);
    else if (k_val > $signed(PW'(K_MAX))) k_new = PW'(K_MAX);
    else                                  k_new = k_val;
    // D1 * (K - 2^19) / 2^19: the part of f1' - f1 that is gain error.
    l_corr = ((k_new - PW'(K_NOM)) * $signed(PW'(D1)) + PW'(64'd1 << (DSM_W - 1))) >>> DSM_W;
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      cyc      <= '0;
      acc      <= '0;
      s1       <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      cal_code <= DSM_W'(D1);
      k_mod    <= K_NOM;
      l_off    <= '0;
      l_val    <= '0;
    end else begin
      case (state)
        C_IDLE: begin
          if (en) begin
            state    <= C_WAIT1;
            busy     <= 1'b1;
            cal_code <= DSM_W'(D1);
            cyc      <= '0;
          end else begin
            state <= C_DONE;
            done  <= 1'b1;
          end
        end
        C_WAIT1, C_WAIT2: begin
          acc <= '0;
          if (cyc == 16'(WAIT_CYC - 1)) begin
            cyc   <= '0;
            state <= (state == C_WAIT1) ? C_MEAS1 : C_MEAS2;
          end else begin
            cyc <= cyc + 16'd1;
          end
        end
        C_MEAS1, C_MEAS2: begin
          acc <= acc + SW'(cap);
          if (cyc == 16'(MEAS_CYC - 1)) begin
            cyc   <= '0;
            state <= (state == C_MEAS1) ? C_WAIT2 : C_CALC;
          end else begin
            cyc <= cyc + 16'd1;
          end
          if (state == C_MEAS1 && cyc == 16'(MEAS_CYC - 1)) cal_code <= DSM_W'(D2);
        end
        C_CALC: begin
          // acc holds S2 here; the offset is taken from S1 (see below).
          k_mod <= k_new[K_W-1:0];
          l_off <= L_GAIN_CORR ? DLF_W'($signed(PW'(l_val)) - l_corr) : l_val;
          state <= C_DONE;
          busy  <= 1'b0;
          done  <= 1'b1;
        end
        default: ;
      endcase
      // Offset L from the first measurement, as soon as it is complete.
      if (state == C_MEAS1 && cyc == 16'(MEAS_CYC - 1)) begin
        s1 <= acc + SW'(cap);
      end
      if (state == C_WAIT2 && cyc == 16'd0) begin
        l_val <= DLF_W'((l_prod + PW'(64'd1 << (FR - 1))) >>> FR);
      end
    end
  end

  // A count sum must never reach the top of its width.
  a_no_overflow: assert property (@(posedge ref_clk) disable iff (!rst_n)
                                  acc < {1'b0, {(SW-1){1'b1}}});

endmodule
