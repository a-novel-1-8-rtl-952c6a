// DDR2 PHY for one byte lane: DFI on one side, SSTL pad signals on the other.
//
// Clocking: the RCDLL turns dfi_clk into dfi_clk0 and dfi_clk90 and deskews
// dfi_clk0 against dfi_clk using dfi_clk0_buff, which the clock tree returns
// from one of its leaves (bring dfi_clk0 out, through the tree, back in).
// Everything else runs on dfi_clk0, with dfi_clk90 framing the write beats
// and the received strobe clocking the read capture.
//
// Datapath: eight DQ bit-slices and a DM slice serialise DFI write data
// (two bits per DQ per cycle, bit 2i+1 first) to double rate; the DQS slice
// generates the write strobe and pad enables, and on reads masks the glitches
// of the received strobe, shifts it by 90 degrees and hands it to the DQ
// slices, which capture both edges and pass the data through per-bit FIFOs
// to dfi_rddata. The address/control slice registers the DFI command bus.
// The impedance calibration produces the pull-up/pull-down codes of the
// driver legs.
//
// The SSTL drivers, receivers, dummy legs and comparators are analog and are
// not part of this RTL: their digital signals are ports (dq_out/dq_in,
// dqs_out/dqs_in, tx_en/rx_en, calibration codes and comparator inputs).
// dfi_rddata_valid is the flag of DQ slice 0. select_pd has one bit per DQ
// slice plus one for the DQS slice; pdl_taps is a shared bus. ck is dfi_clk0
// for the differential clock pad. The block structure is that of the
// architecture diagram; widths of address and bank are this design's choice.
// rst_n also disables the slice-agreement assertion below, so lint sees it
// used both as an asynchronous reset and in a clocked expression; the
// assertion is simulation-only and adds no logic.
`timescale 1ps/1ps
module ddr2_phy_top
  import ddr2_phy_pkg::*;
#(
  parameter real TAP_PS     = TAP_PS_DEFAULT,
  parameter int  SHIFT_WAIT = 16,
  parameter int  FIFO_DEPTH = 8
) (
  // clocks, reset, RCDLL
  input  logic                    dfi_clk,
  input  logic                    rst_n,
  input  logic                    measure_req,
  output logic                    dfi_clk0,
  input  logic                    dfi_clk0_buff,
  output logic                    done,
  output logic [PERIOD_W-1:0]     period_taps,
  // DFI command
  input  logic [ADDR_W-1:0]       dfi_address,
  input  logic [BA_W-1:0]         dfi_bank,
  input  logic                    dfi_cke,
  input  logic                    dfi_ras_n,
  input  logic                    dfi_cas_n,
  input  logic                    dfi_we_n,
  input  logic                    dfi_odt,
  // DFI write
  input  logic [2*DQ_BITS-1:0]    dfi_wrdata,
  input  logic [1:0]              dfi_wrdata_mask,
  input  logic                    dfi_wrdata_en,
  // DFI read
  input  logic                    dfi_rddata_en,
  output logic [2*DQ_BITS-1:0]    dfi_rddata,
  output logic                    dfi_rddata_valid,
  // training / calibration engine
  input  logic                    sel_wd,
  input  logic [2*DQ_BITS-1:0]    calib_dfi_wrdata,
  input  logic [1:0]              calib_dfi_wrdata_mask,
  input  logic                    calib_dfi_wrdata_en,
  input  logic [TAPSEL_W-1:0]     pdl_taps,
  input  logic [DQ_BITS:0]        select_pd,      // [DQ_BITS] = DQS slice
  input  logic                    rinc,
  input  logic                    fifo_reset_n,
  // SSTL side: command
  output logic                    ck,
  output logic [ADDR_W-1:0]       addr,
  output logic [BA_W-1:0]         ba,
  output logic                    cke,
  output logic                    ras_n,
  output logic                    cas_n,
  output logic                    we_n,
  output logic                    odt,
  // SSTL side: data
  output logic [DQ_BITS-1:0]      dq_out,
  input  logic [DQ_BITS-1:0]      dq_in,
  output logic                    dm_out,
  output logic                    dqs_out,
  input  logic                    dqs_in,
  output logic                    tx_en,
  output logic                    rx_en,
  output logic                    dqs_mask,
  // impedance calibration
  input  logic                    zq_div4,
  input  logic                    sstl_calib_act,
  input  logic                    zq_pd_cmp,
  input  logic                    zq_pu_cmp,
  output logic [VOL_W-1:0]        zq_vol_trial,
  output logic [VOH_W-1:0]        zq_voh_trial,
  output logic [VOL_W-1:0]        vol,
  output logic [VOH_W-1:0]        voh,
  output logic [VOL_W-1:0]        vol300,
  output logic [VOH_W-1:0]        voh300,
  output logic                    zq_pd_calib_done,
  output logic                    zq_calib_done
);
  logic                dfi_clk90;
  logic [TAPSEL_W-1:0] deg90_taps;
  logic                load_taps;
  logic                masked_dqs90, masked_dqs90_d;
  logic [DQ_BITS-1:0]  slice_valid;

  rcdll #(.TAP_PS(TAP_PS), .SHIFT_WAIT(SHIFT_WAIT)) u_rcdll (
    .dfi_clk, .rst_n, .measure_req, .dfi_clk0_buff, .dfi_clk0, .dfi_clk90,
    .period_taps, .deg90_taps, .load_taps, .done);

  assign ck = dfi_clk0;

  addr_ctrl_regs #(.ADDR_W(ADDR_W), .BA_W(BA_W)) u_addr_ctrl (
    .dfi_clk0, .rst_n, .dfi_address, .dfi_bank, .dfi_cke, .dfi_ras_n,
    .dfi_cas_n, .dfi_we_n, .dfi_odt, .addr, .ba, .cke, .ras_n, .cas_n, .we_n, .odt);

  for (genvar i = 0; i < DQ_BITS; i++) begin : g_dq
    dq_bitslice #(.TAP_PS(TAP_PS), .FIFO_DEPTH(FIFO_DEPTH)) u_dq (
      .dfi_clk0, .dfi_clk90, .rst_n, .sel_wd,
      .dfi_wrdata(dfi_wrdata[2*i +: 2]), .calib_dfi_wrdata(calib_dfi_wrdata[2*i +: 2]),
      .write_dq(dq_out[i]), .read_dq(dq_in[i]), .pdl_taps, .select_pd(select_pd[i]),
      .masked_dqs90, .masked_dqs90_d, .rinc, .fifo_reset_n,
      .dfi_rddata(dfi_rddata[2*i +: 2]), .dfi_rddata_valid(slice_valid[i]));
  end

  assign dfi_rddata_valid = slice_valid[0];

  ddr_write_path u_dm (
    .dfi_clk0, .dfi_clk90, .rst_n, .sel_wd, .wrdata(dfi_wrdata_mask),
    .calib_wrdata(calib_dfi_wrdata_mask), .write_dq(dm_out));

  dqs_bitslice #(.TAP_PS(TAP_PS)) u_dqs (
    .dfi_clk0, .rst_n, .read_dqs(dqs_in), .dfi_rddata_en, .pdl_taps,
    .select_pd(select_pd[DQ_BITS]), .deg90_taps, .load_taps, .dqs_mask,
    .masked_dqs90, .masked_dqs90_d, .sel_wd, .dfi_wrdata_en, .calib_dfi_wrdata_en,
    .write_dqs(dqs_out), .tx_en, .rx_en);

  impedance_calib #(.VOL_W(VOL_W), .VOH_W(VOH_W)) u_zq (
    .clk(dfi_clk0), .rst_n, .div4(zq_div4), .sstl_calib_act, .pd_cmp(zq_pd_cmp),
    .pu_cmp(zq_pu_cmp), .vol_trial(zq_vol_trial), .voh_trial(zq_voh_trial),
    .vol, .voh, .vol300, .voh300, .pd_calib_done(zq_pd_calib_done), .calib_done(zq_calib_done));

  // All slices see the same strobe, so their FIFOs move in step.
  a_slices_in_step: assert property (@(posedge dfi_clk0) disable iff (!rst_n)
    slice_valid == '0 || slice_valid == '1);
endmodule
