// Self-checking test of tdc_encoder: thermometer codes of every length 0..256
// (and codes with one bubble) must give period_taps = number of ones and
// deg90_taps = min(period/4, 63).
`timescale 1ps/1ps
module tb_tdc_encoder;
  logic [255:0] code;
  logic [8:0]   period_taps;
  logic [5:0]   deg90_taps;
  int checks = 0, failures = 0;

  tdc_encoder dut (.code, .period_taps, .deg90_taps);

  task automatic check(int ones);
    int exp90;
    #1;
    exp90 = (ones / 4 > 63) ? 63 : ones / 4;
    checks++;
    if (period_taps != 9'(ones) || deg90_taps != 6'(exp90)) begin
      failures++;
      $display("FAIL ones=%0d period=%0d deg90=%0d (exp %0d)", ones, period_taps, deg90_taps, exp90);
    end
  endtask

  initial begin
    for (int n = 0; n <= 256; n++) begin
      code = '0;
      for (int i = 0; i < n; i++) code[i] = 1'b1;
      check(n);
    end
    // a bubble: one zero inside the ones and one extra one above the edge
    for (int k = 0; k < 20; k++) begin
      int n = 8 + int'($urandom_range(0, 200));
      int b = int'($urandom_range(1, n - 2));
      code = '0;
      for (int i = 0; i < n; i++) code[i] = 1'b1;
      code[b] = 1'b0;
      code[n] = 1'b1;
      check(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
