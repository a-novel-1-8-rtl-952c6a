// Self-checking test of rcdll at 533 MHz (1876 ps period) with a 600 ps
// clock-tree delay between dfi_clk0 and dfi_clk0_buff:
//  * period_taps equals the period divided by the tap delay (within 1) and
//    deg90_taps is a quarter of it;
//  * `done` rises, and from then on the rising edge of dfi_clk0_buff is
//    within about one tap of the rising edge of dfi_clk;
//  * dfi_clk90 follows dfi_clk0 by deg90_taps taps;
//  * measure_req drops `done`, repeats the measurement and locks again.
`timescale 1ps/1ps
module tb_rcdll;
  localparam real TAP  = 47.3;
  localparam int  HALF = 938;
  localparam int  TREE = 600;
  logic dfi_clk = 1'b0, rst_n = 1'b1, measure_req = 1'b0;
  logic dfi_clk0, dfi_clk90, dfi_clk0_buff, load_taps, done;
  logic [8:0] period_taps;
  logic [5:0] deg90_taps;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  realtime t_ref, t_c0, t_c90, t_fb;

  always #(HALF) dfi_clk = ~dfi_clk;
  assign #(TREE) dfi_clk0_buff = dfi_clk0;

  always @(posedge dfi_clk)       t_ref = $realtime;
  always @(posedge dfi_clk0)      t_c0  = $realtime;
  always @(posedge dfi_clk90)     t_c90 = $realtime;
  always @(posedge dfi_clk0_buff) t_fb  = $realtime;

  rcdll #(.SHIFT_WAIT(8)) dut (.dfi_clk, .rst_n, .measure_req, .dfi_clk0_buff,
    .dfi_clk0, .dfi_clk90, .period_taps, .deg90_taps, .load_taps, .done);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_lock();
    realtime skew, d90;
    repeat (4) @(posedge dfi_clk);
    @(posedge dfi_clk0_buff);
    #1;
    // distance from the nearest dfi_clk rising edge
    skew = t_fb - t_ref;
    if (skew > HALF) skew = skew - 2 * HALF;
    check($sformatf("feedback within a tap of dfi_clk (skew %0.0f ps)", skew), skew >= -2 && skew <= TAP + 2);
    @(posedge dfi_clk90);
    #1;
    d90 = t_c90 - t_c0;
    check($sformatf("dfi_clk90 - dfi_clk0 = %0.0f ps for %0d taps", d90, deg90_taps),
          d90 >= deg90_taps * TAP - deg90_taps * 0.5 - 2 && d90 <= deg90_taps * TAP + deg90_taps * 0.5 + 2);
  endtask

  initial begin
    real exp_p;
    int cyc;
    #(5 * HALF) rst_n = 1'b1;
    cyc = 0;
    while (!done && cyc < 3000) begin @(posedge dfi_clk); cyc++; end
    check("done within 3000 cycles", done);
    exp_p = 2.0 * HALF / TAP;
    check($sformatf("period_taps %0d for %0.1f", period_taps, exp_p),
          period_taps >= $rtoi(exp_p) - 1 && period_taps <= $rtoi(exp_p) + 1);
    check("deg90_taps = period/4", deg90_taps == 6'(period_taps >> 2));
    check_lock();
    // stays locked
    repeat (200) @(posedge dfi_clk);
    check("still done", done);
    check_lock();
    // repeat measurement
    @(negedge dfi_clk) measure_req = 1'b1;
    @(negedge dfi_clk) measure_req = 1'b0;
    repeat (2) @(posedge dfi_clk);
    check("done dropped by measure_req", !done);
    cyc = 0;
    while (!done && cyc < 200) begin @(posedge dfi_clk); cyc++; end
    check("done again after re-measure", done);
    check_lock();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
