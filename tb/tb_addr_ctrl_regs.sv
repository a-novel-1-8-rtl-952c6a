// Self-checking test of addr_ctrl_regs: reset values, then random DFI
// command words that must appear on the outputs one dfi_clk0 cycle later.
`timescale 1ps/1ps
module tb_addr_ctrl_regs;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [13:0] a_in, addr;
  logic [2:0]  b_in, ba;
  logic [4:0]  c_in;
  logic cke, ras_n, cas_n, we_n, odt;
  logic [21:0] prev;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;
  always #938 clk = ~clk;

  addr_ctrl_regs dut (.dfi_clk0(clk), .rst_n, .dfi_address(a_in), .dfi_bank(b_in),
    .dfi_cke(c_in[4]), .dfi_ras_n(c_in[3]), .dfi_cas_n(c_in[2]), .dfi_we_n(c_in[1]),
    .dfi_odt(c_in[0]), .addr, .ba, .cke, .ras_n, .cas_n, .we_n, .odt);

  initial begin
    a_in = '0; b_in = '0; c_in = '0;
    #3000;
    checks++;
    if ({addr, ba, cke, ras_n, cas_n, we_n, odt} !== {14'd0, 3'd0, 5'b01110}) begin
      failures++; $display("FAIL reset values");
    end
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk) #100;
      prev = {a_in, b_in, c_in};
      a_in = 14'($urandom); b_in = 3'($urandom); c_in = 5'($urandom);
      @(posedge clk) #1;
      checks++;
      if ({addr, ba, cke, ras_n, cas_n, we_n, odt} !== {a_in, b_in, c_in}) begin
        failures++; $display("FAIL word %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
