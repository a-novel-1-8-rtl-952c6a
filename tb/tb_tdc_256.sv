// Self-checking test of tdc_256: for several clock periods (200 to 533 MHz)
// a measurement must give a thermometer code whose number of ones is the
// period divided by the tap delay (within one tap), code_valid two cycles
// after launch, and no stale ones from the previous measurement.
`timescale 1ps/1ps
module tb_tdc_256;
  localparam real TAP = 47.3;
  logic clk = 1'b0, rst_n = 1'b1, launch = 1'b0;
  logic [255:0] code;
  logic code_valid;
  int half = 938;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  always #(half) clk = ~clk;

  tdc_256 dut (.clk, .rst_n, .launch, .code, .code_valid);

  initial begin
    int halves [4] = '{938, 1250, 1875, 2500};
    #3000 rst_n = 1'b1;
    foreach (halves[k]) begin
      int ones, cyc;
      bit thermo;
      real exp;
      half = halves[k];
      repeat (12) @(posedge clk);
      @(negedge clk) launch = 1'b1;
      @(negedge clk) launch = 1'b0;
      cyc = 1;
      while (!code_valid) begin @(negedge clk); cyc++; end
      ones = $countones(code);
      thermo = 1;
      for (int i = 1; i < 256; i++) if (code[i] && !code[i-1]) thermo = 0;
      exp = 2.0 * half / TAP;
      checks++;
      if (ones < $rtoi(exp) - 1 || ones > $rtoi(exp) + 1 || !thermo || cyc != 2) begin
        failures++;
        $display("FAIL T=%0d ones=%0d exp=%0.1f thermo=%0b cycles=%0d", 2*half, ones, exp, thermo, cyc);
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
