// Dynamic Strobe Masking System (DSMS).
//
// Produces a clean read strobe from the received DQS, which carries glitches
// while the line is undriven before the preamble and after the postamble.
// The mask is sized from the DFI read enable and the strobe itself rather
// than from a calibrated window:
//   * `expected` counts, on dfi_clk0, the cycles in which dfi_rddata_en is
//     high; in a 1:1 DFI each such cycle is one strobe pulse (two beats);
//   * `received` counts, on the falling edges of read_dqs, the pulses that
//     passed while the mask was open.
// Both counters are Gray coded, so their comparison can cross the two clock
// domains with only one bit changing at a time. The mask is high while the
// counts differ: it opens when read data is announced and closes right after
// the falling edge of the last expected pulse, whatever the burst length.
// masked_dqs = read_dqs AND mask. Reset clears both counters (mask closed).
// The document gives only the function of this block; this counting scheme
// is this design's own. A glitch that arrives after dfi_rddata_en but before
// the real preamble would be counted as a pulse.
`timescale 1ps/1ps
module dsms #(
  parameter int CNT_W = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dfi_rddata_en,
  input  logic read_dqs,
  output logic mask,
  output logic masked_dqs
);
  logic [CNT_W-1:0] exp_bin, exp_gray;
  logic [CNT_W-1:0] rcv_bin, rcv_gray;
  logic [CNT_W-1:0] exp_next, rcv_next;

  assign exp_next = exp_bin + 1'b1;
  assign rcv_next = rcv_bin + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      exp_bin  <= '0;
      exp_gray <= '0;
    end else if (dfi_rddata_en) begin
      exp_bin  <= exp_next;
      exp_gray <= exp_next ^ (exp_next >> 1);
    end

  always_ff @(negedge read_dqs or negedge rst_n)
    if (!rst_n) begin
      rcv_bin  <= '0;
      rcv_gray <= '0;
    end else if (mask) begin
      rcv_bin  <= rcv_next;
      rcv_gray <= rcv_next ^ (rcv_next >> 1);
    end

  assign mask       = (exp_gray != rcv_gray);
  assign masked_dqs = read_dqs & mask;
endmodule
