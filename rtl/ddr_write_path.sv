// Write path of a DQ bit-slice; on its own it is the DM bit-slice.
//
// Turns two single-rate DFI bits per dfi_clk0 cycle into one double-rate
// output bit. Bit 1 of the DFI pair is the first beat, bit 0 the second.
//   1. sel_wd chooses between the memory controller's data and the
//      training engine's calib data;
//   2. both bits are captured on the falling edge of dfi_clk0 (qa0, qa1),
//      half a cycle after the DFI launched them;
//   3. qp takes the first beat on the next rising edge, qn the second beat
//      on the next falling edge;
//   4. write_dq = qp while dfi_clk90 is high, qn while it is low.
// Each register is thus stable for the whole half cycle in which it is
// selected, and every beat on write_dq lasts exactly one dfi_clk90 phase.
// Latency: the first beat of DFI cycle k appears at the dfi_clk90 rising
// edge 1.25 cycles after the rising dfi_clk0 edge of cycle k. Registers are
// reset low. This pipeline follows the slice diagram and write waveform.
`timescale 1ps/1ps
module ddr_write_path (
  input  logic       dfi_clk0,
  input  logic       dfi_clk90,
  input  logic       rst_n,
  input  logic       sel_wd,
  input  logic [1:0] wrdata,
  input  logic [1:0] calib_wrdata,
  output logic       write_dq
);
  logic [1:0] d;
  logic       qa0, qa1, qp, qn;

  assign d = sel_wd ? calib_wrdata : wrdata;

  always_ff @(negedge dfi_clk0 or negedge rst_n)
    if (!rst_n) begin
      qa0 <= 1'b0;
      qa1 <= 1'b0;
      qn  <= 1'b0;
    end else begin
      qa0 <= d[1];
      qa1 <= d[0];
      qn  <= qa1;
    end

  always_ff @(posedge dfi_clk0 or negedge rst_n)
    if (!rst_n) qp <= 1'b0;
    else        qp <= qa0;

  assign write_dq = dfi_clk90 ? qp : qn;
endmodule
