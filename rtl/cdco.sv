// cdco: calibration DCO, the controlled oscillator with its digital front end.
//
// The 19-bit control word is formed from the base code (the nominal
// 1.4 GHz code while tracking, or the calibration code D1/D2), plus the loop
// filter output, minus the calibrated offset L, and saturated to
// [0, K-1].  A MASH 1-1 delta-sigma modulator with modulus K, clocked at a
// quarter of the output frequency (DSM_CLK), turns it into three switch
// signals for the current DAC; the analog model (IDAC, 2nd-order filter,
// ring oscillator) produces f_OUT.  The oscillator's own output clocks the
// modulator, so the loop from code to frequency is closed inside this block.
//
// Combining the offset and saturation before the modulator, and the
// saturation limits, are this design's choices; the modulator, the
// modulus-based gain normalisation and DSM_CLK = f_OUT/4 follow the design.
//
// Interface: rst_n (asynchronous, active low) also holds the oscillator off;
// base_code, dlfout, l_off and k_mod are quasi-static words from the 4 MHz
// domain that the modulator samples on its own clock (they change at most
// once per reference period, hundreds of DSM_CLK cycles apart).
// code is the saturated control word, for observation.
module cdco
  import adpll_pkg::*;
#(
  parameter real F_LO_HZ = 1.2965e9,
  parameter real F_HI_HZ = 1.6903e9,
  parameter real POLE_HZ = 800.0e3
) (
  input  logic                    rst_n,
  input  logic [DSM_W-1:0]        base_code,
  input  logic signed [DLF_W-1:0] dlfout,
  input  logic signed [DLF_W-1:0] l_off,
  input  logic [K_W-1:0]          k_mod,
  output logic [DSM_W-1:0]        code,
  output logic                    dsm_clk,
  output logic                    fout
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SW = DLF_W + 2;

  logic signed [SW-1:0] sum;
  logic                 s1, s2, s3;

  always_comb begin
    sum = $signed({{(SW-DSM_W){1'b0}}, base_code}) + SW'(dlfout) - SW'(l_off);
    if (sum < 0)
      code = '0;
    else if (sum >= $signed({{(SW-K_W){1'b0}}, k_mod}))
      code = DSM_W'({{(SW-K_W){1'b0}}, k_mod} - 1);
    else
      code = sum[DSM_W-1:0];
  end

  dsm_clkgen u_clkgen (.fout_clk(fout), .rst_n, .dsm_clk);

  dsm_mash11 u_dsm (
    .dsm_clk, .rst_n, .code, .k_mod,
    .sdm_out1(s1), .sdm_out2(s2), .sdm_out3(s3)
  );

  dco_analog #(.F_LO_HZ(F_LO_HZ), .F_HI_HZ(F_HI_HZ), .POLE_HZ(POLE_HZ)) u_osc (
    .en(rst_n), .sdm_out1(s1), .sdm_out2(s2), .sdm_out3(s3), .fout
  );

endmodule
