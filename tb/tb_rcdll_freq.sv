// Self-checking test of rcdll across its operating range. Five copies of the
// DLL run side by side, each with its own clock and tap delay:
//   case 0: 200 MHz, typical tap (47.3 ps)
//   case 1: 400 MHz, typical tap
//   case 2: 533 MHz, slow-corner tap (77.7 ps)
//   case 3: 533 MHz, fast-corner tap (30.8 ps)
//   case 4: 200 MHz, fast-corner tap (the longest period in taps, ~162)
// Each has a 600 ps clock tree between dfi_clk0 and dfi_clk0_buff. For each
// case the test checks that `done` rises, that period_taps is the period
// divided by the tap delay (within one tap) and deg90_taps a quarter of it,
// that the leaf clock then lies within about one tap of dfi_clk, and that
// dfi_clk90 follows dfi_clk0 by deg90_taps taps. The simulator rounds each
// tap to whole picoseconds, and the expected values use the rounded tap.
`timescale 1ps/1ps
module tb_rcdll_freq;
  localparam int N_CASES = 5;
  localparam int HALF_PS [N_CASES] = '{2500, 1250, 938, 938, 2500};
  localparam int TAP_X10 [N_CASES] = '{473, 473, 777, 308, 308};
  localparam int TREE = 600;

  logic rst_n = 1'b1;
  int   checks = 0, failures = 0;
  logic [N_CASES-1:0] finished = '0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  initial #20000 rst_n = 1'b1;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < N_CASES; g++) begin : g_case
    localparam int  HALF  = HALF_PS[g];
    localparam real TAP   = TAP_X10[g] / 10.0;
    localparam int  TAP_R = (TAP_X10[g] + 5) / 10;

    logic dfi_clk = 1'b0;
    logic dfi_clk0, dfi_clk90, dfi_clk0_buff, load_taps, done;
    logic [8:0] period_taps;
    logic [5:0] deg90_taps;
    realtime t_ref, t_c0, t_c90, t_fb;

    always #(HALF) if (!finished[g]) dfi_clk = ~dfi_clk;   // stops once checked
    assign #(TREE) dfi_clk0_buff = dfi_clk0;

    always @(posedge dfi_clk)       t_ref = $realtime;
    always @(posedge dfi_clk0)      t_c0  = $realtime;
    always @(posedge dfi_clk90)     t_c90 = $realtime;
    always @(posedge dfi_clk0_buff) t_fb  = $realtime;

    rcdll #(.TAP_PS(TAP), .SHIFT_WAIT(8)) dut (.dfi_clk, .rst_n,
      .measure_req(1'b0), .dfi_clk0_buff, .dfi_clk0, .dfi_clk90,
      .period_taps, .deg90_taps, .load_taps, .done);

    initial begin
      int cyc, exp_p;
      realtime skew, d90;
      @(posedge rst_n);
      cyc = 0;
      while (!done && cyc < 4000) begin @(posedge dfi_clk); cyc++; end
      check($sformatf("case %0d: done within 4000 cycles", g), done);
      exp_p = (2 * HALF) / TAP_R;
      check($sformatf("case %0d: period_taps %0d, expected %0d", g, period_taps, exp_p),
            int'(period_taps) >= exp_p - 1 && int'(period_taps) <= exp_p + 1);
      check($sformatf("case %0d: deg90_taps %0d = period/4", g, deg90_taps),
            deg90_taps == 6'(period_taps >> 2));
      repeat (8) @(posedge dfi_clk);
      @(posedge dfi_clk0_buff);
      #1;
      skew = t_fb - t_ref;
      if (skew > HALF) skew = skew - 2 * HALF;
      check($sformatf("case %0d: leaf clock within a tap of dfi_clk (skew %0.0f ps)", g, skew),
            skew >= -2 && skew <= TAP_R + 2);
      @(posedge dfi_clk90);
      #1;
      d90 = t_c90 - t_c0;
      check($sformatf("case %0d: dfi_clk90 - dfi_clk0 = %0.0f ps for %0d taps", g, d90, deg90_taps),
            d90 >= deg90_taps * TAP_R - 2 && d90 <= deg90_taps * TAP_R + 2);
      check($sformatf("case %0d: still locked", g), done);
      finished[g] = 1'b1;
    end
  end

  initial begin
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * 2500 * 6000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
