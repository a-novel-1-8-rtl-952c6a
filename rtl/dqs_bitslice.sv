// DQS bit-slice: read-strobe conditioning and write-strobe generation.
//
// Read: read_dqs from the receiver goes through the DSMS (glitch masking),
// a programmable delay line (PDL, training offset) and a slave delay line
// (SDL) loaded with deg90_taps, giving masked_dqs90: the strobe shifted by
// a quarter period into the middle of the data eye, used by the DQ slices to
// capture data on both edges. A second SDL with the same setting and an
// inverter give masked_dqs90_d, whose rising edges follow each falling edge
// of masked_dqs90 by a quarter period and clock the DQ read FIFOs.
// Write: sel_wd picks dfi_wrdata_en or the training engine's
// calib_dfi_wrdata_en for the write-DQS generator, which drives write_dqs,
// tx_en and rx_en. Both SDLs take deg90_taps when load_taps is seen on a
// rising dfi_clk0 edge. Structure as in the DQS slice diagram.
`timescale 1ps/1ps
module dqs_bitslice #(
  parameter real TAP_PS = ddr2_phy_pkg::TAP_PS_DEFAULT
) (
  input  logic                              dfi_clk0,
  input  logic                              rst_n,
  // read
  input  logic                              read_dqs,
  input  logic                              dfi_rddata_en,
  input  logic [ddr2_phy_pkg::TAPSEL_W-1:0] pdl_taps,
  input  logic                              select_pd,
  input  logic [ddr2_phy_pkg::TAPSEL_W-1:0] deg90_taps,
  input  logic                              load_taps,
  output logic                              dqs_mask,
  output logic                              masked_dqs90,
  output logic                              masked_dqs90_d,
  // write
  input  logic                              sel_wd,
  input  logic                              dfi_wrdata_en,
  input  logic                              calib_dfi_wrdata_en,
  output logic                              write_dqs,
  output logic                              tx_en,
  output logic                              rx_en
);
  logic masked_dqs, dqs_pdl, dqs90_dly;

  dsms u_dsms (
    .clk(dfi_clk0), .rst_n, .dfi_rddata_en, .read_dqs,
    .mask(dqs_mask), .masked_dqs);

  pdl #(.TAP_PS(TAP_PS)) u_pdl (
    .clk(dfi_clk0), .rst_n, .select_pd, .pdl_taps, .din(masked_dqs), .dout(dqs_pdl));

  sdl #(.TAP_PS(TAP_PS)) u_sdl90 (
    .clk(dfi_clk0), .rst_n, .load(load_taps), .taps(deg90_taps), .din(dqs_pdl), .dout(masked_dqs90));

  sdl #(.TAP_PS(TAP_PS)) u_sdl180 (
    .clk(dfi_clk0), .rst_n, .load(load_taps), .taps(deg90_taps), .din(masked_dqs90), .dout(dqs90_dly));

  assign masked_dqs90_d = !dqs90_dly;

  write_dqs_gen u_wdqs (
    .clk0(dfi_clk0), .rst_n,
    .wrdata_en(sel_wd ? calib_dfi_wrdata_en : dfi_wrdata_en),
    .write_dqs, .tx_en, .rx_en);
endmodule
