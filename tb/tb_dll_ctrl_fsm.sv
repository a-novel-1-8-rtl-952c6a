// Self-checking test of dll_ctrl_fsm, driving its inputs directly: launch
// after reset, load_taps after code_valid, the settle time between
// decisions, acquisition by adding taps only, lock and `done`, tracking in
// both directions, and a repeat measurement on measure_req.
`timescale 1ps/1ps
module tb_dll_ctrl_fsm;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  logic measure_req = 0, code_valid = 0, early = 0, late = 0;
  logic launch, load_taps, shift_left, shift_right, done;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  int n_launch = 0, n_load = 0, n_left = 0, n_right = 0;
  int last_shift_cyc = -100, cyc = 0, min_gap = 1000;

  always #500 clk = ~clk;

  dll_ctrl_fsm #(.SHIFT_WAIT(W)) dut (.clk, .rst_n, .measure_req, .code_valid, .early, .late,
    .launch, .load_taps, .shift_left, .shift_right, .done);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (launch) n_launch++;
    if (load_taps) n_load++;
    if (shift_left) n_left++;
    if (shift_right) n_right++;
    if (shift_left || shift_right) begin
      if (cyc - last_shift_cyc < min_gap) min_gap = cyc - last_shift_cyc;
      last_shift_cyc = cyc;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1200 rst_n = 1'b1;
    repeat (W + 2) @(negedge clk);
    check("no launch while the TDC chain drains", n_launch == 0);
    repeat (3) @(negedge clk);
    check("one launch after reset", n_launch == 1);
    check("no done before lock", !done);
    @(negedge clk) code_valid = 1'b1;
    @(negedge clk) code_valid = 1'b0;
    repeat (2) @(negedge clk);
    check("load_taps after code_valid", n_load == 1);
    // acquisition: both early and late make it add delay
    late = 1'b1;
    repeat (6 * (W + 2)) @(negedge clk);
    check("acquire adds taps on late", n_left >= 4 && n_right == 0);
    check("settle gap between shifts", min_gap >= W + 1);
    check("no done during acquisition", !done);
    late = 1'b0;
    repeat (2 * (W + 2)) @(negedge clk);
    check("done after in-window decision", done);
    // tracking
    n_left = 0; n_right = 0;
    late = 1'b1;
    repeat (3 * (W + 2)) @(negedge clk);
    late = 1'b0;
    check("track removes taps when late", n_right >= 2 && n_left == 0);
    check("done kept while tracking", done);
    n_left = 0; n_right = 0;
    early = 1'b1;
    repeat (3 * (W + 2)) @(negedge clk);
    early = 1'b0;
    check("track adds taps when early", n_left >= 2 && n_right == 0);
    // repeat measurement
    repeat (W + 2) @(negedge clk);
    @(negedge clk) measure_req = 1'b1;
    @(negedge clk) measure_req = 1'b0;
    repeat (2) @(negedge clk);
    check("launch on measure_req", n_launch == 2);
    check("done dropped during measurement", !done);
    @(negedge clk) code_valid = 1'b1;
    @(negedge clk) code_valid = 1'b0;
    repeat (W + 4) @(negedge clk);
    check("second load", n_load == 2);
    check("done again without re-acquisition", done);
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
