// Self-checking test of dtc (192 taps): for a set of tap selections the delay
// from a rising input edge to the rising output edge must be the number of
// taps times the tap delay (within rounding of the simulator's 1 ps step).
`timescale 1ps/1ps
module tb_dtc;
  localparam real TAP = 47.3;
  logic din = 1'b0, dout;
  logic [191:0] sel;
  int checks = 0, failures = 0;

  dtc dut (.din, .sel, .dout);

  initial begin
    int taps [8] = '{0, 1, 2, 17, 40, 100, 150, 191};
    foreach (taps[k]) begin
      realtime t0, t1, exp;
      sel = '0;
      sel[taps[k]] = 1'b1;
      din = 1'b0;
      #12000;
      t0 = $realtime;
      din = 1'b1;
      if (taps[k] > 0) @(posedge dout);
      else #0.0;
      t1 = $realtime;
      exp = taps[k] * TAP;
      checks++;
      if (dout !== 1'b1 || (t1 - t0) < exp - taps[k] * 0.5 - 1 || (t1 - t0) > exp + taps[k] * 0.5 + 1) begin
        failures++;
        $display("FAIL taps=%0d delay=%0t expected %0.1f", taps[k], t1 - t0, exp);
      end
      // the falling edge takes the same path
      #5000 din = 1'b0;
      t0 = $realtime;
      if (taps[k] > 0) @(negedge dout);
      t1 = $realtime;
      checks++;
      if ((t1 - t0) < exp - taps[k] * 0.5 - 1 || (t1 - t0) > exp + taps[k] * 0.5 + 1) begin
        failures++;
        $display("FAIL falling taps=%0d delay=%0t", taps[k], t1 - t0);
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
