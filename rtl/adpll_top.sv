// adpll_top: low-power all-digital PLL with DCO self-calibration.
//
// Loop: bang-bang phase detector (bbpd) -> dynamic loop filter (dlf, gains
// from dgc) -> calibration DCO (cdco: code offset and saturation, MASH 1-1
// modulator at f_OUT/4, IDAC/filter/ring-oscillator model) -> divide-by-350
// (freq_divider) -> back to the phase detector.  With a 4 MHz reference the
// loop settles at 1.4 GHz.
//
// Sequence after reset:
//   calibration (dcc_en = 1): the loop is open, the DCC drives codes D1 and
//     D2, the shared counter works as frequency detector, and the DCC
//     computes the offset L and the modulator modulus K;
//   tracking: the counter becomes the divide-by-175, the loop filter starts
//     from the nominal code 2^17 minus L, and the gain control steps the
//     filter gains down to alpha = 1, beta = 8, then raises locked.
// With dcc_en = 0 tracking starts at once with K = 2^19 and L = 0.
//
// Interface: ref_clk (4 MHz) and rst_n (asynchronous, active low) in; the RF
// clock f_out, the divided clock f_fb and observation signals out.  The
// oscillator model parameters F_LO_HZ/F_HI_HZ set the process corner (default:
// typical, 1.2965-1.6903 GHz).  The nominal code 2^17 for 1.4 GHz follows from
// this design's target tuning line (1.3 GHz + 400 MHz * code / 2^19).
module adpll_top
  import adpll_pkg::*;
#(
  parameter real         F_LO_HZ = 1.2965e9,
  parameter real         F_HI_HZ = 1.6903e9,
  parameter int unsigned D_INIT  = 131072
) (
  input  logic                    ref_clk,
  input  logic                    rst_n,
  input  logic                    dcc_en,
  output logic                    f_out,
  output logic                    f_fb,
  output logic                    pdout,
  output logic signed [DLF_W-1:0] dlfout,
  output logic signed [DLF_W-1:0] psi,
  output logic [DSM_W-1:0]        code,
  output logic [K_W-1:0]          k_mod,
  output logic signed [DLF_W-1:0] l_off,
  output pll_mode_e               mode,
  output logic [1:0]              dgc_stage,
  output logic                    gain_step,
  output logic                    locked
);

  timeunit 1ps;
  timeprecision 1fs;

  logic                cal_busy, cal_done, track, dsm_clk, cap_stb;
  logic [CNT_W-1:0]    cap;
  logic [DSM_W-1:0]    cal_code, base_code;
  dlf_gain_t           gain;

  assign track     = cal_done;
  assign mode      = !rst_n ? MODE_IDLE : (track ? MODE_TRACK : MODE_CAL);
  assign base_code = cal_busy ? cal_code : DSM_W'(D_INIT);

  bbpd u_pd (.ref_clk, .rst_n, .fb_clk(f_fb), .pdout);

  dgc u_dgc (
    .ref_clk, .rst_n, .en(track), .pdout,
    .gain, .stage(dgc_stage), .gain_step, .locked
  );

  dlf u_dlf (.ref_clk, .rst_n, .en(track), .pdout, .gain, .psi, .dlfout);

  dcc u_dcc (
    .ref_clk, .rst_n, .en(dcc_en), .cap,
    .busy(cal_busy), .done(cal_done), .cal_code, .k_mod, .l_off
  );

  cdco #(.F_LO_HZ(F_LO_HZ), .F_HI_HZ(F_HI_HZ)) u_dco (
    .rst_n, .base_code, .dlfout, .l_off, .k_mod,
    .code, .dsm_clk, .fout(f_out)
  );

  freq_divider u_div (
    .fout_clk(f_out), .rst_n, .mode_div(track), .ref_clk,
    .f_fb, .cap, .cap_stb
  );

endmodule
