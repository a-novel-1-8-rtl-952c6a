// Encoder of the RCDLL: turns the TDC thermometer code into binary numbers.
//
// period_taps is the number of ones in the 256-bit code (a count rather than
// an edge search, so an isolated bubble in the code costs one tap at most);
// 256 needs the full 9 bits. deg90_taps is a quarter of that, rounded down
// and limited to 63 so that it fits the 64-tap slave delay lines.
// Combinational.
`timescale 1ps/1ps
module tdc_encoder #(
  parameter int N_TAPS = ddr2_phy_pkg::TDC_TAPS
) (
  input  logic [N_TAPS-1:0]                 code,
  output logic [ddr2_phy_pkg::PERIOD_W-1:0] period_taps,
  output logic [ddr2_phy_pkg::TAPSEL_W-1:0] deg90_taps
);
  import ddr2_phy_pkg::*;

  logic [PERIOD_W-1:0] quarter;

  always_comb begin
    period_taps = '0;
    for (int i = 0; i < N_TAPS; i++)
      period_taps = period_taps + PERIOD_W'(code[i]);
    quarter = period_taps >> 2;
    deg90_taps = (quarter > PERIOD_W'(SDL_TAPS - 1)) ? TAPSEL_W'(SDL_TAPS - 1)
                                                     : quarter[TAPSEL_W-1:0];
  end
endmodule
