// charge_pump: behavioural model of the charge pump and its loop capacitor Cp.
// This is not synthesizable logic; it stands in for the analog circuit.
//
// While UP_FD is high a current I_CP_A charges Cp, while DN_FD is high the same
// current discharges it (both together cancel), and the capacitor voltage VC
// tunes the VCO. The model integrates in fixed steps of STEP_PS picoseconds:
// VC += (UP - DN) * I_CP_A * STEP / C_P_F, clamped to 0..VDD. VC starts at
// V_INIT and is never reset, so a new acquisition begins from the present
// frequency. Only the existence of the charge pump and of a single capacitor
// as the loop filter comes from the published design; the current, the
// capacitance and the start voltage are this design's own numbers.
`timescale 1ps / 1fs
module charge_pump
  import fll_pkg::*;
#(
  parameter real I_CP_A  = CP_I_A,
  parameter real C_P_F   = CP_C_F,
  parameter real V_INIT  = VCO_V_START,
  parameter real VDD     = CP_VDD,
  parameter real STEP_PS = CP_STEP_PS
) (
  input  updn_t fd,   // UP_FD / DN_FD
  output real   vc    // control voltage on Cp, volts
);

  localparam real DV = I_CP_A * STEP_PS * 1.0e-12 / C_P_F;  // volts per step

  real v_cp;

  initial v_cp = V_INIT;

  always begin
    #(STEP_PS);
    if (fd.up && !fd.dn)      v_cp = v_cp + DV;
    else if (fd.dn && !fd.up) v_cp = v_cp - DV;
    if (v_cp > VDD) v_cp = VDD;
    if (v_cp < 0.0) v_cp = 0.0;
  end

  assign vc = v_cp;

endmodule
