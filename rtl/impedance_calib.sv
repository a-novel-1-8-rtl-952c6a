// Impedance calibration mechanism of the SSTL I/Os.
//
// Two binary searches run one after the other: the pull-down FSM finds the
// 4-bit Vol code for which a dummy n-leg matches the external 150 Ohm
// resistor, then the pull-up FSM finds the 5-bit Voh code for a dummy p-leg.
// The trial codes drive the dummy legs (vol_trial, voh_trial) and the FSMs
// read the analog comparators (pd_cmp, pu_cmp, 1 = leg still too weak).
// Both FSMs step on a divided clock, dfi_clk0 / 2 or, with div4 = 1 (for
// 533 MHz), dfi_clk0 / 4, so the comparator has time to settle; here the
// division is a clock-enable pulse on dfi_clk0. A pulse on sstl_calib_act
// is held until the next divided tick and starts the pull-down search; its
// done flag starts the pull-up search. When a search ends, its code is
// copied to the output register (vol, voh) that the I/Os use, which keeps
// the previous value during a re-calibration. The 300 Ohm legs take the same
// codes shifted right by two bits (vol300, voh300). pd_calib_done and
// calib_done (both searches finished) stay high until the next activation.
`timescale 1ps/1ps
module impedance_calib #(
  parameter int VOL_W = ddr2_phy_pkg::VOL_W,
  parameter int VOH_W = ddr2_phy_pkg::VOH_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             div4,
  input  logic             sstl_calib_act,
  input  logic             pd_cmp,
  input  logic             pu_cmp,
  output logic [VOL_W-1:0] vol_trial,
  output logic [VOH_W-1:0] voh_trial,
  output logic [VOL_W-1:0] vol,
  output logic [VOH_W-1:0] voh,
  output logic [VOL_W-1:0] vol300,
  output logic [VOH_W-1:0] voh300,
  output logic             pd_calib_done,
  output logic             calib_done
);
  logic [1:0] div_cnt;
  logic       tick;
  logic       act_pend, pu_pend;
  logic       pd_done_q, pu_done_q;
  logic       pd_done, pu_done;

  // divided clock as a one-in-2 / one-in-4 enable
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= div_cnt + 1'b1;

  assign tick = div4 ? (div_cnt == 2'd3) : div_cnt[0];

  // hold the activation pulse, and the pull-down done edge, until a tick
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      act_pend  <= 1'b0;
      pu_pend   <= 1'b0;
      pd_done_q <= 1'b0;
      pu_done_q <= 1'b0;
    end else begin
      pd_done_q <= pd_done;
      pu_done_q <= pu_done;
      if (sstl_calib_act)          act_pend <= 1'b1;
      else if (tick)               act_pend <= 1'b0;
      if (pd_done && !pd_done_q)   pu_pend  <= 1'b1;
      else if (tick)               pu_pend  <= 1'b0;
    end

  zq_sar_fsm #(.N(VOL_W)) u_pd_fsm (
    .clk, .rst_n, .tick, .start(act_pend), .cmp(pd_cmp), .code(vol_trial), .done(pd_done));

  zq_sar_fsm #(.N(VOH_W)) u_pu_fsm (
    .clk, .rst_n, .tick, .start(pu_pend), .cmp(pu_cmp), .code(voh_trial), .done(pu_done));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vol <= '0;
      voh <= '0;
    end else begin
      if (pd_done && !pd_done_q) vol <= vol_trial;
      if (pu_done && !pu_done_q) voh <= voh_trial;
    end

  assign vol300        = vol >> 2;
  assign voh300        = voh >> 2;
  // flags rise with the output registers, one cycle after the FSM ends
  assign pd_calib_done = pd_done && pd_done_q && !act_pend;
  assign calib_done    = pd_calib_done && pu_done && pu_done_q && !pu_pend;
endmodule
