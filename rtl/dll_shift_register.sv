// Shift register of the RCDLL: one-hot tap select of the 192-tap DTC.
//
// Resets to tap 0 (least delay). shift_left moves the hot bit one tap up
// (one tap more delay), shift_right one tap down; both stop at the ends of
// the line. If both are requested nothing moves.
`timescale 1ps/1ps
module dll_shift_register #(
  parameter int N_TAPS = ddr2_phy_pkg::DTC_TAPS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_left,
  input  logic              shift_right,
  output logic [N_TAPS-1:0] sel
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      sel <= N_TAPS'(1);
    else if (shift_left && !shift_right && !sel[N_TAPS-1])
      sel <= {sel[N_TAPS-2:0], 1'b0};
    else if (shift_right && !shift_left && !sel[0])
      sel <= {1'b0, sel[N_TAPS-1:1]};

  initial assert (N_TAPS >= 2);
endmodule
