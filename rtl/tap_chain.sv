// Behavioural model of a tapped delay line.
//
// Each element stands for one delay tap of the chip (two balanced NAND gates
// used as inverters) and delays its input by TAP_PS picoseconds. taps[0] is
// the input itself and taps[i] the input after i elements. The model is not
// synthesizable logic: it gives the delay lines of the PHY their timing in
// simulation. Each element is inertial, as a gate is: a pulse shorter than
// one tap does not pass.
`timescale 1ps/1ps
module tap_chain #(
  parameter int  N_TAPS = 64,
  parameter real TAP_PS = ddr2_phy_pkg::TAP_PS_DEFAULT
) (
  input  logic              din,
  output logic [N_TAPS:0]   taps
);
  assign taps[0] = din;
  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    assign #(TAP_PS) taps[i+1] = taps[i];
  end
endmodule
