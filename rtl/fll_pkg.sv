// fll_pkg: types and constants shared by the frequency-locked-loop blocks.
//
// updn_t bundles an UP/DN request pair, the form in which every detector of the
// loop (coarse, fine and their combination) hands its decision to the next
// stage. The real-valued constants are the defaults of the analog behavioural
// models (charge pump, loop capacitor, VCO); they are this design's own choice,
// picked so that the loop covers the 400 Mb/s to 2.6 Gb/s range with a VCO that
// starts at 400 MHz.
`timescale 1ps / 1fs
package fll_pkg;

  typedef struct packed {
    logic up;   // raise the clock frequency
    logic dn;   // lower the clock frequency
  } updn_t;

  // Wide-band VCO: f = F_START_HZ + KVCO_HZ_PER_V * (vc - V_START), clamped.
  localparam real VCO_F_START_HZ    = 400.0e6;
  localparam real VCO_V_START       = 0.65;
  localparam real VCO_KVCO_HZ_PER_V = 2.5e9;
  localparam real VCO_F_MIN_HZ      = 200.0e6;   // 400 Mb/s half-rate
  localparam real VCO_F_MAX_HZ      = 1.3e9;     // 2.6 Gb/s half-rate
  localparam real VCO_JITTER_PS     = 2.0;       // per quarter period, uniform

  // Charge pump and loop capacitor.
  localparam real CP_I_A      = 40.0e-6;
  localparam real CP_C_F      = 50.0e-12;
  localparam real CP_VDD      = 1.8;
  localparam real CP_STEP_PS  = 10.0;

endpackage
