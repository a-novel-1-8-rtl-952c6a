// Bang-bang phase detector of the RCDLL, with a one-tap dead zone.
//
// The feedback clock fb (dfi_clk0 at a leaf of the clock tree) is sampled on
// the rising edge of the reference clk and again on the rising edge of
// clk_d1, the reference delayed by one tap. If fb is already high at clk its
// edge is early and delay must be added (`early`); if it is still low one tap
// later it is late and delay must be removed (`late`). Low then high means
// the edges are within one tap and neither output is set. Both decisions are
// re-registered on clk, so they are valid two reference cycles after the
// phase relation they describe.
`timescale 1ps/1ps
module bbpd (
  input  logic clk,
  input  logic clk_d1,
  input  logic rst_n,
  input  logic fb,
  output logic early,
  output logic late
);
  logic s_ref, s_ref_d1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s_ref <= 1'b0;
    else        s_ref <= fb;

  always_ff @(posedge clk_d1 or negedge rst_n)
    if (!rst_n) s_ref_d1 <= 1'b1;
    else        s_ref_d1 <= fb;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      early <= 1'b0;
      late  <= 1'b0;
    end else begin
      early <= s_ref;
      late  <= !s_ref_d1 && !s_ref;
    end
endmodule
