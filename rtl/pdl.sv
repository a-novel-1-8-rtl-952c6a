// Programmable delay line (PDL), behavioural model.
//
// A 64-tap delay line whose setting belongs to an external data-capture
// training engine. The engine puts a tap count on the shared pdl_taps bus
// and raises this slice's select_pd; the count is stored on the next rising
// edge of the slice clock and decoded 6-to-64 into the tap select of a 64-tap
// DTC. Resets to 0 taps. Reading select_pd as a per-slice load enable is this
// design's interpretation of that pin. The register and decoder are
// synthesizable; the tap chain is a timing model.
`timescale 1ps/1ps
module pdl #(
  parameter real TAP_PS = ddr2_phy_pkg::TAP_PS_DEFAULT
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              select_pd,
  input  logic [ddr2_phy_pkg::TAPSEL_W-1:0] pdl_taps,
  input  logic                              din,
  output logic                              dout
);
  import ddr2_phy_pkg::*;

  logic [TAPSEL_W-1:0] setting;
  logic [SDL_TAPS-1:0] sel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         setting <= '0;
    else if (select_pd) setting <= pdl_taps;

  tap_decoder #(.IN_W(TAPSEL_W)) u_dec (.in(setting), .out(sel));

  dtc #(.N_TAPS(SDL_TAPS), .TAP_PS(TAP_PS)) u_dtc (.din(din), .sel(sel), .dout(dout));
endmodule
