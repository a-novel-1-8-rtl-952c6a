// Binary-to-one-hot decoder (6-to-64 in the slave and programmable delay
// lines): out[i] is high when in == i. Purely combinational.
`timescale 1ps/1ps
module tap_decoder #(
  parameter int IN_W = 6
) (
  input  logic [IN_W-1:0]       in,
  output logic [(1<<IN_W)-1:0]  out
);
  always_comb begin
    out     = '0;
    out[in] = 1'b1;
  end
endmodule
