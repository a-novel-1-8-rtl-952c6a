// Self-checking test of zq_sar_fsm (4-bit, as the pull-down search): for
// every target code the comparator model reports "leg still too weak" while
// the trial code is at most the target; the search must end on the target
// after N + 2 divided-clock ticks, pass through IDLE -> READY -> MSB trial,
// and hold the result until the next start.
`timescale 1ps/1ps
module tb_zq_sar_fsm;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b1, tick = 1'b0, start = 1'b0;
  logic [N-1:0] code;
  logic cmp, done;
  int target = 0;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;
  always #1000 clk = ~clk;
  // divided clock: one tick every second cycle
  always @(posedge clk) tick <= rst_n ? !tick : 1'b0;
  assign cmp = (int'(code) <= target);

  zq_sar_fsm #(.N(N)) dut (.clk, .rst_n, .tick, .start, .cmp, .code, .done);

  initial begin
    #3000 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    checks++; if (code !== '0 || done) begin failures++; $display("FAIL idle state"); end
    for (target = 0; target < (1 << N); target++) begin
      int ticks = 0;
      bit saw_msb = 0;
      @(negedge clk) start = 1'b1;
      @(posedge clk iff tick);
      #1 start = 1'b0;
      ticks = 1;
      while (!done && ticks < 20) begin
        @(posedge clk iff tick);
        #1;
        ticks++;
        if (ticks == 2 && code == N'(1 << (N - 1))) saw_msb = 1;
      end
      checks++;
      if (code !== N'(target) || ticks != N + 2 || !saw_msb) begin
        failures++;
        $display("FAIL target %0d: code %0d after %0d ticks (msb trial %0b)", target, code, ticks, saw_msb);
      end
      repeat (10) @(posedge clk);
      checks++;
      if (!done || code !== N'(target)) begin failures++; $display("FAIL result not held"); end
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
