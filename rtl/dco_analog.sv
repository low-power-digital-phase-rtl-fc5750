// dco_analog: behavioural model (not synthesizable) of the analog part of the
// DCO: the three-switch current DAC, its second-order low-pass filter and the
// three-stage current-starved ring oscillator.
//
// The three modulator outputs each steer one unit of IDAC current.  The sum
// (0..3 units) passes through two real poles at POLE_HZ (800 kHz each, about
// 500 kHz at -3 dB) and sets the oscillator frequency
//   f = F_LO_HZ + (F_HI_HZ - F_LO_HZ) * (filtered_units - 1),
// so a steady code/K duty gives F_LO + code/K * (F_HI - F_LO): one switch
// step spans the whole tuning range, as in the design.  F_LO/F_HI default to
// the typical-corner range 1.2965-1.6903 GHz; other corners are set through
// the parameters.  The filter is advanced at every output half period with
// the exact step response of each pole.  Edge times are accumulated as real
// numbers and only rounded to the 1 fs time grid when waited for, so the
// mean frequency is exact to far below one code step.  The tuning line is
// linear, the oscillator has no phase noise, and the frequency is clamped at
// F_LO/2 in filter transients: all three are simplifications of this model.
//
// Interface: en starts the oscillator (fout held low while en = 0);
// sdm_out1..3 from the modulator; fout is the RF output clock.
module dco_analog #(
  parameter real F_LO_HZ = 1.2965e9,
  parameter real F_HI_HZ = 1.6903e9,
  parameter real POLE_HZ = 800.0e3
) (
  input  logic en,
  input  logic sdm_out1,
  input  logic sdm_out2,
  input  logic sdm_out3,
  output logic fout
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam real PI = 3.14159265358979;

  real y1, y2;          // filter state in IDAC units
  real f_hz, half_ps;   // present frequency and half period
  real t_next;          // exact time of the next edge, ps
  real a;               // one-pole step factor for this half period
  real units;

  initial begin
    fout   = 1'b0;
    y1     = 1.0;
    y2     = 1.0;
    f_hz   = F_LO_HZ;
    t_next = 0.0;
  end

  always begin
    if (!en) begin
      fout = 1'b0;
      wait (en);
      t_next = $realtime;
    end
    units   = real'(int'(sdm_out1) + int'(sdm_out2) + int'(sdm_out3));
    half_ps = 0.5e12 / f_hz;
    a       = 1.0 - $exp(-2.0 * PI * POLE_HZ * half_ps * 1.0e-12);
    y1      = y1 + a * (units - y1);
    y2      = y2 + a * (y1 - y2);
    f_hz    = F_LO_HZ + (F_HI_HZ - F_LO_HZ) * (y2 - 1.0);
    if (f_hz < 0.5 * F_LO_HZ) f_hz = 0.5 * F_LO_HZ;
    t_next  = t_next + half_ps;
    #(t_next - $realtime);
    fout = en ? ~fout : 1'b0;
  end

endmodule
