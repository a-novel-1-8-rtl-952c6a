// Address/control slice: one register per DFI address and command signal.
//
// On every rising edge of dfi_clk0 the DFI address, bank, cke, ras_n, cas_n,
// we_n and odt are stored and driven to the SSTL outputs, one cycle after
// the DFI presented them. Reset gives a deselected, idle bus: cke and odt
// low, the active-low command signals high (a NOP), address zero. The reset
// values and the widths are this design's own choices.
`timescale 1ps/1ps
module addr_ctrl_regs #(
  parameter int ADDR_W = ddr2_phy_pkg::ADDR_W,
  parameter int BA_W   = ddr2_phy_pkg::BA_W
) (
  input  logic              dfi_clk0,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] dfi_address,
  input  logic [BA_W-1:0]   dfi_bank,
  input  logic              dfi_cke,
  input  logic              dfi_ras_n,
  input  logic              dfi_cas_n,
  input  logic              dfi_we_n,
  input  logic              dfi_odt,
  output logic [ADDR_W-1:0] addr,
  output logic [BA_W-1:0]   ba,
  output logic              cke,
  output logic              ras_n,
  output logic              cas_n,
  output logic              we_n,
  output logic              odt
);
  always_ff @(posedge dfi_clk0 or negedge rst_n)
    if (!rst_n) begin
      addr  <= '0;
      ba    <= '0;
      cke   <= 1'b0;
      ras_n <= 1'b1;
      cas_n <= 1'b1;
      we_n  <= 1'b1;
      odt   <= 1'b0;
    end else begin
      addr  <= dfi_address;
      ba    <= dfi_bank;
      cke   <= dfi_cke;
      ras_n <= dfi_ras_n;
      cas_n <= dfi_cas_n;
      we_n  <= dfi_we_n;
      odt   <= dfi_odt;
    end
endmodule
