// Digital-to-time converter (behavioural model): a programmable delay line.
//
// A chain of N_TAPS delay taps whose outputs are combined by an AND-OR
// multiplexer under a one-hot select: sel[i] = 1 delays din by i taps. Used
// as the 192-tap main delay line of the RCDLL (selected by the DLL shift
// register) and, with 64 taps, inside the slave and programmable delay lines
// and as the dummy line that matches their intrinsic delay. The chain is a
// timing model; the select multiplexer is ordinary logic. With no select bit
// set the output is held low.
`timescale 1ps/1ps
module dtc #(
  parameter int  N_TAPS = 192,
  parameter real TAP_PS = ddr2_phy_pkg::TAP_PS_DEFAULT
) (
  input  logic              din,
  input  logic [N_TAPS-1:0] sel,
  output logic              dout
);
  logic [N_TAPS-1:0] taps;

  tap_chain #(.N_TAPS(N_TAPS - 1), .TAP_PS(TAP_PS)) u_chain (.din(din), .taps(taps));

  assign dout = |(taps & sel);
endmodule
