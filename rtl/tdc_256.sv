// Time-to-digital converter of the RCDLL (behavioural model).
//
// Measures the period of `clk` in delay taps. When `launch` is seen on a
// rising edge, a step is launched into a 256-tap delay chain; on the next
// rising edge the 256 tap outputs are sampled. Every tap the step has passed
// reads 1, so `code` is a thermometer code whose number of ones is the clock
// period divided by the tap delay (periods longer than 256 taps saturate).
// `code_valid` is high for the one cycle after the sample; the launch flop is
// then cleared so the chain drains before the next measurement. The flops
// are ordinary logic; the chain is a timing model. Only the delayed taps
// 1..256 are sampled: tap 0 is the step itself, so that bit of the chain
// output is left unread on purpose (lint reports it as unused).
`timescale 1ps/1ps
module tdc_256 #(
  parameter int  N_TAPS = ddr2_phy_pkg::TDC_TAPS,
  parameter real TAP_PS = ddr2_phy_pkg::TAP_PS_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              launch,
  output logic [N_TAPS-1:0] code,
  output logic              code_valid
);
  logic            step;
  logic [N_TAPS:0] taps;

  tap_chain #(.N_TAPS(N_TAPS), .TAP_PS(TAP_PS)) u_chain (.din(step), .taps(taps));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      step       <= 1'b0;
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= step;
      if (step) begin
        code <= taps[N_TAPS:1];
        step <= 1'b0;
      end else if (launch) begin
        step <= 1'b1;
      end
    end
endmodule
