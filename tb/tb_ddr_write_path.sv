// Self-checking test of ddr_write_path: random DFI bit pairs, first from the
// controller and then from the training input (sel_wd = 1), must appear on
// write_dq as two beats per cycle, first beat (bit 1) during dfi_clk90 high
// and second beat during dfi_clk90 low, 1.25 cycles after the DFI cycle.
`timescale 1ps/1ps
module tb_ddr_write_path;
  localparam int T = 2000;
  logic clk0 = 1'b0, clk90 = 1'b0, rst_n = 1'b1, sel_wd = 1'b0;
  logic [1:0] wrdata = '0, calib = '0;
  logic write_dq;
  logic [1:0] sent [$];
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  always #(T/2) clk0 = ~clk0;
  initial begin #(T/4); forever #(T/2) clk90 = ~clk90; end

  ddr_write_path dut (.dfi_clk0(clk0), .dfi_clk90(clk90), .rst_n, .sel_wd,
    .wrdata, .calib_wrdata(calib), .write_dq);

  initial begin
    #(3 * T) rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      logic [1:0] v;
      @(posedge clk0);
      #100;
      v = 2'($urandom_range(0, 3));
      sel_wd = (k >= 100);
      if (sel_wd) begin calib = v; wrdata = ~v; end
      else        begin wrdata = v; calib = ~v; end
      sent.push_back(v);
    end
  end

  // sample in the middle of each dfi_clk90 phase
  initial begin
    int k = 0;
    #(3 * T);
    @(posedge clk0);   // the cycle in which the first word is launched
    @(posedge clk0);
    while (k < 200) begin
      logic [1:0] exp;
      @(posedge clk90); #(T/4);
      exp = sent[k];
      checks++;
      if (write_dq !== exp[1]) begin failures++; $display("FAIL word %0d first beat", k); end
      @(negedge clk90); #(T/4);
      checks++;
      if (write_dq !== exp[0]) begin failures++; $display("FAIL word %0d second beat", k); end
      k++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
