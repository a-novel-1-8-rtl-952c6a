// Register-controlled delay-locked loop (RCDLL).
//
// From the incoming dfi_clk it produces dfi_clk0 (0 degrees) and dfi_clk90
// (90 degrees), measures the dfi_clk period in taps, and removes the skew
// between dfi_clk and the PHY's internal clock as it arrives at the flops.
//
//   dfi_clk -> DTC_192 -+-> dummy DTC_64 (0 taps) -> dfi_clk0
//                       +-> SDL (deg90_taps)      -> dfi_clk90
//
// The dummy line has the same structure as the SDL, so the only difference
// between the two outputs is deg90_taps taps. The TDC and encoder give
// period_taps and deg90_taps = period_taps/4. dfi_clk0_buff is dfi_clk0
// brought back from a leaf of the clock tree; the phase detector compares it
// with dfi_clk (and with dfi_clk one tap later) and the control FSM moves
// the DTC_192 tap through the shift register until the leaf clock is within
// one tap of dfi_clk, then raises `done` and keeps correcting. measure_req
// repeats the period measurement at any time. All control logic runs on
// dfi_clk. The structure follows the block diagram; the dead-zone detector
// and the acquisition rule are described in dll_ctrl_fsm and bbpd. The delay
// lines are behavioural timing models. The one-tap reference for the phase
// detector is a one-element chain; its bit 0 is dfi_clk itself and stays
// unread (lint reports it as unused).
`timescale 1ps/1ps
module rcdll #(
  parameter real TAP_PS     = ddr2_phy_pkg::TAP_PS_DEFAULT,
  parameter int  SHIFT_WAIT = 16
) (
  input  logic                              dfi_clk,
  input  logic                              rst_n,
  input  logic                              measure_req,
  input  logic                              dfi_clk0_buff,
  output logic                              dfi_clk0,
  output logic                              dfi_clk90,
  output logic [ddr2_phy_pkg::PERIOD_W-1:0] period_taps,
  output logic [ddr2_phy_pkg::TAPSEL_W-1:0] deg90_taps,
  output logic                              load_taps,
  output logic                              done
);
  import ddr2_phy_pkg::*;

  logic [TDC_TAPS-1:0] code;
  logic                code_valid, launch;
  logic                early, late, shift_left, shift_right;
  logic [DTC_TAPS-1:0] dtc_sel;
  logic                clk_dly;
  logic [1:0]          clk_taps;

  // TDC and encoder
  tdc_256 #(.N_TAPS(TDC_TAPS), .TAP_PS(TAP_PS)) u_tdc (
    .clk(dfi_clk), .rst_n, .launch, .code, .code_valid);

  tdc_encoder #(.N_TAPS(TDC_TAPS)) u_enc (.code, .period_taps, .deg90_taps);

  // Phase detection against dfi_clk and dfi_clk one tap later
  tap_chain #(.N_TAPS(1), .TAP_PS(TAP_PS)) u_ref_tap (.din(dfi_clk), .taps(clk_taps));

  bbpd u_bbpd (.clk(dfi_clk), .clk_d1(clk_taps[1]), .rst_n, .fb(dfi_clk0_buff), .early, .late);

  dll_ctrl_fsm #(.SHIFT_WAIT(SHIFT_WAIT)) u_fsm (
    .clk(dfi_clk), .rst_n, .measure_req, .code_valid, .early, .late,
    .launch, .load_taps, .shift_left, .shift_right, .done);

  dll_shift_register #(.N_TAPS(DTC_TAPS)) u_shreg (
    .clk(dfi_clk), .rst_n, .shift_left, .shift_right, .sel(dtc_sel));

  // Clock path
  dtc #(.N_TAPS(DTC_TAPS), .TAP_PS(TAP_PS)) u_dtc192 (.din(dfi_clk), .sel(dtc_sel), .dout(clk_dly));

  dtc #(.N_TAPS(SDL_TAPS), .TAP_PS(TAP_PS)) u_dummy (
    .din(clk_dly), .sel(SDL_TAPS'(1)), .dout(dfi_clk0));

  sdl #(.TAP_PS(TAP_PS)) u_sdl (
    .clk(dfi_clk), .rst_n, .load(load_taps), .taps(deg90_taps), .din(clk_dly), .dout(dfi_clk90));
endmodule
