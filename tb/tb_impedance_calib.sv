// Self-checking test of impedance_calib with a resistor/comparator model:
//  * after sstl_calib_act the pull-down search runs first, then the pull-up
//    search; the final codes are the largest codes whose leg is still at or
//    above 150 Ohm, worked out here by a linear scan of the model;
//  * vol300/voh300 are the codes shifted right by two;
//  * the run takes (6 + 7) divided ticks plus hand-over cycles, with the
//    divider at /2 and at /4;
//  * during a re-calibration the output codes keep their old values.
`timescale 1ps/1ps
module tb_impedance_calib;
  localparam int HALF = 938;
  logic clk = 1'b0, rst_n = 1'b1, div4 = 1'b0, act = 1'b0;
  logic pd_cmp, pu_cmp, pd_done, calib_done;
  logic [3:0] vol_trial, vol, vol300;
  logic [4:0] voh_trial, voh, voh300;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;
  always #(HALF) clk = ~clk;

  impedance_calib dut (.clk, .rst_n, .div4, .sstl_calib_act(act), .pd_cmp, .pu_cmp,
    .vol_trial, .voh_trial, .vol, .voh, .vol300, .voh300, .pd_calib_done(pd_done), .calib_done);

  zq_leg_model u_legs (.vol_trial, .voh_trial, .pd_cmp, .pu_cmp);

  function automatic int best(real r_pass, real g, int n);
    int b = 0;
    for (int c = 0; c < (1 << n); c++)
      if (1.0 / (1.0 / r_pass + c * g) > 150.0) b = c;
    return b;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit d4, bit recal);
    int cyc = 0, pd_cyc = 0;
    int exp_vol = best(200.0, 0.00012, 4), exp_voh = best(180.0, 0.00006, 5);
    logic [3:0] old_vol = vol;
    logic [4:0] old_voh = voh;
    bit kept = 1;
    div4 = d4;
    @(negedge clk) act = 1'b1;
    @(negedge clk) act = 1'b0;
    while (!calib_done && cyc < 200) begin
      @(posedge clk); #1; cyc++;
      if (pd_done && pd_cyc == 0) pd_cyc = cyc;
      if (recal && !pd_done && vol !== old_vol) kept = 0;
      if (recal && !calib_done && voh !== old_voh) kept = 0;
    end
    check($sformatf("vol %0d expected %0d", vol, exp_vol), vol == 4'(exp_vol));
    check($sformatf("voh %0d expected %0d", voh, exp_voh), voh == 5'(exp_voh));
    check("vol300", vol300 == 4'(exp_vol >> 2));
    check("voh300", voh300 == 5'(exp_voh >> 2));
    // pull-down: 6 ticks; pull-up: 7 ticks more, started on the next tick
    check($sformatf("pull-down first, done after %0d cycles", pd_cyc),
          pd_cyc > 5 * (d4 ? 4 : 2) && pd_cyc <= 7 * (d4 ? 4 : 2));
    check($sformatf("total %0d cycles", cyc), cyc >= 13 * (d4 ? 4 : 2) && cyc <= 15 * (d4 ? 4 : 2));
    if (recal) check("outputs kept during re-calibration", kept);
  endtask

  initial begin
    #(3 * HALF) rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check("idle after reset", !pd_done && !calib_done && vol_trial == 0);
    run(1'b0, 1'b0);
    run(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
