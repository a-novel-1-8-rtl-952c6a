// Slave delay line (SDL), behavioural model.
//
// Holds a 6-bit tap count, loaded from deg90_taps on a clock edge where
// `load` is high, decodes it 6-to-64 into a one-hot select and delays `din`
// through a 64-tap DTC by that many taps. Loaded with a quarter of the clock
// period (measured by the RCDLL) it shifts a clock or strobe by 90 degrees.
// The tap count resets to 0 and then keeps the last loaded value. The
// register and decoder are synthesizable; the tap chain is a timing model.
`timescale 1ps/1ps
module sdl #(
  parameter real TAP_PS = ddr2_phy_pkg::TAP_PS_DEFAULT
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              load,
  input  logic [ddr2_phy_pkg::TAPSEL_W-1:0] taps,
  input  logic                              din,
  output logic                              dout
);
  import ddr2_phy_pkg::*;

  logic [TAPSEL_W-1:0] taps_q;
  logic [SDL_TAPS-1:0] sel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    taps_q <= '0;
    else if (load) taps_q <= taps;

  tap_decoder #(.IN_W(TAPSEL_W)) u_dec (.in(taps_q), .out(sel));

  dtc #(.N_TAPS(SDL_TAPS), .TAP_PS(TAP_PS)) u_dtc (.din(din), .sel(sel), .dout(dout));
endmodule
