// Behavioural model of the analog side of the impedance calibration, for
// simulation only: a dummy n-leg and a dummy p-leg, each a passive resistor
// in parallel with binary-weighted transistors switched by the trial code,
// compared against the external 150 Ohm resistor. A comparator output of 1
// means the leg resistance is still above 150 Ohm (leg too weak).
//   R_leg = 1 / (1/R_PASSIVE + code * G_UNIT)
// The passive resistors are 180 Ohm (p-leg) as described for the driver;
// the n-leg passive value and the unit conductances are the model's own and
// are parameters so a test can move the optimum code.
`timescale 1ps/1ps
module zq_leg_model #(
  parameter real R_ZQ    = 150.0,
  parameter real RN_PASS = 200.0,
  parameter real GN_UNIT = 0.00012,
  parameter real RP_PASS = 180.0,
  parameter real GP_UNIT = 0.00006
) (
  input  logic [3:0] vol_trial,
  input  logic [4:0] voh_trial,
  output logic       pd_cmp,
  output logic       pu_cmp
);
  function automatic real r_leg(real r_pass, real g_unit, int code);
    return 1.0 / (1.0 / r_pass + code * g_unit);
  endfunction

  assign pd_cmp = r_leg(RN_PASS, GN_UNIT, int'(vol_trial)) > R_ZQ;
  assign pu_cmp = r_leg(RP_PASS, GP_UNIT, int'(voh_trial)) > R_ZQ;
endmodule
