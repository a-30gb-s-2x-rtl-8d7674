// cp_lf: behavioural model of the charge pump and loop filter.
// Not synthesizable: it integrates real-valued quantities in time steps.
//
// While up (dn) is high the pump sources (sinks) ICP_UA microamperes into a
// series resistor R_OHM and capacitor C_PF to ground. The capacitor voltage
// integrates the current (the frequency-tracking path); the current through
// the resistor adds a proportional step (the phase-tracking path). The
// output vctrl = vcap + i*R is clamped to the 0 to 0.9 V supply and drives
// the VCO. The model integrates in fixed STEP_PS steps and starts at
// V_INIT. The source design names the charge pump and loop filter but gives
// neither topology nor values; all values here are model choices.
module cp_lf #(
  parameter real ICP_UA  = 100.0,
  parameter real R_OHM   = 50.0,
  parameter real C_PF    = 400.0,
  parameter real V_INIT  = 0.2,
  parameter real V_MAX   = 0.9,
  parameter real STEP_PS = 1.0
) (
  input  logic up,
  input  logic dn,
  output real  vctrl
);
  timeunit 1ps;
  timeprecision 1fs;

  real vcap;
  real i_ua;
  real v;

  initial begin
    vcap  = V_INIT;
    vctrl = V_INIT;
    forever begin
      #(STEP_PS);
      i_ua = (up ? ICP_UA : 0.0) - (dn ? ICP_UA : 0.0);
      // dV = I dt / C with I in uA, dt in ps, C in pF: uA*ps/pF = 1e-6 V
      vcap = vcap + i_ua * STEP_PS / C_PF * 1.0e-6;
      if (vcap < 0.0)   vcap = 0.0;
      if (vcap > V_MAX) vcap = V_MAX;
      v = vcap + i_ua * 1.0e-6 * R_OHM;
      if (v < 0.0)   v = 0.0;
      if (v > V_MAX) v = V_MAX;
      vctrl = v;
    end
  end

endmodule
