// Self-checking test of sdl: after loading a tap count the delay from din to
// dout must be that many taps; without `load` the setting must not change.
`timescale 1ps/1ps
module tb_sdl;
  localparam real TAP = 47.3;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, din = 1'b0, dout;
  logic [5:0] taps = '0;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  always #1000 clk = ~clk;

  sdl dut (.clk, .rst_n, .load, .taps, .din, .dout);

  task automatic measure(int n);
    realtime t0;
    #5000 din = 1'b1;
    t0 = $realtime;
    if (n > 0) @(posedge dout);
    checks++;
    if ($realtime - t0 < n * TAP - n * 0.5 - 1 || $realtime - t0 > n * TAP + n * 0.5 + 1) begin
      failures++;
      $display("FAIL expected %0d taps, delay %0t", n, $realtime - t0);
    end
    #5000 din = 1'b0;
  endtask

  initial begin
    int vals [6] = '{0, 1, 9, 10, 39, 63};
    #2500 rst_n = 1'b1;
    measure(0);
    foreach (vals[k]) begin
      @(negedge clk) begin taps = 6'(vals[k]); load = 1'b1; end
      @(negedge clk) load = 1'b0;
      measure(vals[k]);
    end
    // new value on the bus without load: setting stays at 63
    @(negedge clk) taps = 6'd5;
    repeat (2) @(negedge clk);
    measure(63);
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
