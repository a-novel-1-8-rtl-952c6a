// DQ bit-slice: everything the PHY does for one data bit.
//
// Write path: see ddr_write_path (two DFI bits per dfi_clk0 cycle in, one
// double-rate bit out on write_dq, beats aligned to dfi_clk90 phases).
// Read path: the received bit read_dq passes a 64-tap programmable delay
// line (PDL) set by a training engine through pdl_taps/select_pd. The
// delayed bit is captured into q1 on the rising and into q2 on the falling
// edge of masked_dqs90 (the cleaned, 90-degree-shifted strobe from the DQS
// slice), and {q1, q2} is written into the read FIFO on the rising edge of
// masked_dqs90_d, which follows each falling strobe edge by a quarter
// period. The FIFO is read on dfi_clk0 when rinc is high and gives
// dfi_rddata (bit 1 = first beat) with dfi_rddata_valid. fifo_reset_n and
// rinc let a training engine clear and drain the FIFO. Structure as in the
// bit-slice diagram; FIFO depth is this design's choice.
`timescale 1ps/1ps
module dq_bitslice #(
  parameter real TAP_PS     = ddr2_phy_pkg::TAP_PS_DEFAULT,
  parameter int  FIFO_DEPTH = 8
) (
  input  logic                              dfi_clk0,
  input  logic                              dfi_clk90,
  input  logic                              rst_n,
  // write path
  input  logic                              sel_wd,
  input  logic [1:0]                        dfi_wrdata,
  input  logic [1:0]                        calib_dfi_wrdata,
  output logic                              write_dq,
  // read path
  input  logic                              read_dq,
  input  logic [ddr2_phy_pkg::TAPSEL_W-1:0] pdl_taps,
  input  logic                              select_pd,
  input  logic                              masked_dqs90,
  input  logic                              masked_dqs90_d,
  input  logic                              rinc,
  input  logic                              fifo_reset_n,
  output logic [1:0]                        dfi_rddata,
  output logic                              dfi_rddata_valid
);
  logic dq_dly, q1, q2;
  logic fifo_full;

  ddr_write_path u_wr (
    .dfi_clk0, .dfi_clk90, .rst_n, .sel_wd,
    .wrdata(dfi_wrdata), .calib_wrdata(calib_dfi_wrdata), .write_dq);

  pdl #(.TAP_PS(TAP_PS)) u_pdl (
    .clk(dfi_clk0), .rst_n, .select_pd, .pdl_taps, .din(read_dq), .dout(dq_dly));

  always_ff @(posedge masked_dqs90 or negedge rst_n)
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= dq_dly;

  always_ff @(negedge masked_dqs90 or negedge rst_n)
    if (!rst_n) q2 <= 1'b0;
    else        q2 <= dq_dly;

  read_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(2)) u_fifo (
    .wclk(masked_dqs90_d), .wdata({q1, q2}), .rclk(dfi_clk0), .rinc,
    .reset_n(rst_n), .fifo_reset_n, .rdata(dfi_rddata),
    .rddata_valid(dfi_rddata_valid), .full(fifo_full));

  // A burst never fills the FIFO when it is drained on time.
  property p_no_overflow;
    @(posedge masked_dqs90_d) disable iff (!rst_n || !fifo_reset_n) !fifo_full;
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
