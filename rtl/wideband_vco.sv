// wideband_vco: behavioural model of the wide-band quadrature VCO.
// This is not synthesizable logic; it stands in for the analog oscillator.
//
// The frequency follows the control voltage linearly,
//   f = F_START_HZ + KVCO_HZ_PER_V * (vc - V_START),
// clamped to F_MIN_HZ..F_MAX_HZ. Each clock period is produced as four equal
// quarters: CKI rises, a quarter later CKQ rises, then CKI falls, then CKQ
// falls, so CKQ lags CKI by 90 degrees. The quarter length is recomputed from
// vc at every quarter, so the frequency follows vc with a delay of at most a
// quarter period. Every quarter also carries a small uniform random jitter
// (+-JITTER_PS), as a real oscillator does; without it a loop that settles on
// an exact rational multiple of the bit rate samples the data at fixed points
// and the detectors stop seeing any frequency error. freq_hz reports the
// present (jitter-free) frequency. The quadrature
// outputs and a 400 MHz start frequency follow the published design; the
// linear tuning curve and its numbers are this design's choice, sized so that
// the clamp range 200 MHz..1.3 GHz covers 400 Mb/s..2.6 Gb/s at half rate.
`timescale 1ps / 1fs
module wideband_vco
  import fll_pkg::*;
#(
  parameter real F_START_HZ    = VCO_F_START_HZ,
  parameter real V_START       = VCO_V_START,
  parameter real KVCO_HZ_PER_V = VCO_KVCO_HZ_PER_V,
  parameter real F_MIN_HZ      = VCO_F_MIN_HZ,
  parameter real F_MAX_HZ      = VCO_F_MAX_HZ,
  parameter real JITTER_PS     = VCO_JITTER_PS
) (
  input  real  vc,       // control voltage, volts
  output logic cki,      // in-phase clock
  output logic ckq,      // quadrature clock
  output real  freq_hz   // present oscillation frequency
);

  function automatic real f_of(real v);
    real f;
    f = F_START_HZ + KVCO_HZ_PER_V * (v - V_START);
    if (f < F_MIN_HZ) f = F_MIN_HZ;
    if (f > F_MAX_HZ) f = F_MAX_HZ;
    return f;
  endfunction

  // Quarter period in picoseconds, with uniform random jitter of +-JITTER_PS.
  function automatic real quarter_ps(real v);
    real j;
    j = JITTER_PS * (real'($urandom_range(2000)) - 1000.0) / 1000.0;
    return 0.25e12 / f_of(v) + j;
  endfunction

  assign freq_hz = f_of(vc);

  // One clock period per pass, in four quarters.
  always begin
    {cki, ckq} = 2'b10;
    #(quarter_ps(vc));
    {cki, ckq} = 2'b11;
    #(quarter_ps(vc));
    {cki, ckq} = 2'b01;
    #(quarter_ps(vc));
    {cki, ckq} = 2'b00;
    #(quarter_ps(vc));
  end

endmodule
