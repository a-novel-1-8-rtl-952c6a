// Write-DQS generator of the DQS slice.
//
// Generates the write strobe and the pad enables from dfi_clk0 and the
// (already multiplexed) write-data enable. wrdata_en high in DFI cycle k
// means the DQ slices drive that cycle's two beats during cycle k+1, first
// beat while dfi_clk90 is high. The FSM state is two flops:
//   burst_q - set on the rising edge of dfi_clk0 from wrdata_en: the strobe
//             is high in the low half of dfi_clk0 during the burst, so it
//             rises at the falling edge of dfi_clk0 (centre of the first
//             beat) and falls at the next rising edge (centre of the second);
//   post_q  - burst_q re-sampled on the falling edge: it extends the drive
//             by half a cycle after the last strobe edge.
// tx_en = burst_q | post_q, so the pad drives the strobe low for half a
// cycle before the first rising edge (write preamble) and for half a cycle
// after the last falling edge (write postamble), both 0.5 tCK as the text
// states. rx_en is the complement of tx_en (an assumption). write_dqs is
// formed as a dfi_clk0-selected choice between the two half-cycle values,
// the same glitch-free scheme as the DQ serializer.
`timescale 1ps/1ps
module write_dqs_gen (
  input  logic clk0,
  input  logic rst_n,
  input  logic wrdata_en,
  output logic write_dqs,
  output logic tx_en,
  output logic rx_en
);
  logic burst_q, post_q;

  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n) burst_q <= 1'b0;
    else        burst_q <= wrdata_en;

  always_ff @(negedge clk0 or negedge rst_n)
    if (!rst_n) post_q <= 1'b0;
    else        post_q <= burst_q;

  // High half of dfi_clk0: strobe low. Low half: strobe high during a burst.
  assign write_dqs = clk0 ? 1'b0 : burst_q;
  assign tx_en     = burst_q | post_q;
  assign rx_en     = !tx_en;
endmodule
