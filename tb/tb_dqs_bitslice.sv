// Self-checking test of dqs_bitslice at 533 MHz with deg90_taps = 10:
//  * read: a glitchy strobe around a BL8 burst gives exactly 4 pulses on
//    masked_dqs90, each 10 taps after the received edge (15 taps after the
//    PDL is set to 5), and 4 rising edges of masked_dqs90_d, each a further
//    10 taps after a falling edge of masked_dqs90;
//  * write: 4 strobe pulses from dfi_wrdata_en, and with sel_wd = 1 from
//    calib_dfi_wrdata_en only.
`timescale 1ps/1ps
module tb_dqs_bitslice;
  localparam real TAP  = 47.3;
  localparam int  HALF = 938;
  logic clk0 = 1'b0, rst_n = 1'b1;
  logic read_dqs = 1'b0, rddata_en = 1'b0, select_pd = 1'b0, load_taps = 1'b0;
  logic [5:0] pdl_taps = '0, deg90_taps = '0;
  logic sel_wd = 1'b0, wr_en = 1'b0, cal_en = 1'b0;
  logic dqs_mask, masked_dqs90, masked_dqs90_d, write_dqs, tx_en, rx_en;
  int checks = 0, failures = 0;
  int n90 = 0, n90d = 0, nw = 0, bad90 = 0, bad90d = 0, exp_taps = 10;
  realtime t_dqs_rise, t_90_fall;

  initial #10 rst_n = 1'b0;
  always #(HALF) clk0 = ~clk0;

  dqs_bitslice dut (.dfi_clk0(clk0), .rst_n, .read_dqs, .dfi_rddata_en(rddata_en), .pdl_taps,
    .select_pd, .deg90_taps, .load_taps, .dqs_mask, .masked_dqs90, .masked_dqs90_d, .sel_wd,
    .dfi_wrdata_en(wr_en), .calib_dfi_wrdata_en(cal_en), .write_dqs, .tx_en, .rx_en);

  function automatic bit near(realtime d, int taps);
    return d >= taps * TAP - taps * 0.5 - 2 && d <= taps * TAP + taps * 0.5 + 2;
  endfunction

  always @(posedge read_dqs) t_dqs_rise = $realtime;
  always @(posedge masked_dqs90) begin
    n90++;
    if (!near($realtime - t_dqs_rise, exp_taps)) bad90++;
  end
  always @(negedge masked_dqs90) t_90_fall = $realtime;
  always @(posedge masked_dqs90_d) if (rst_n) begin
    n90d++;
    if (!near($realtime - t_90_fall, 10)) bad90d++;
  end
  always @(posedge write_dqs) nw++;

  task automatic glitch(int w);
    read_dqs = 1'b1; #(w); read_dqs = 1'b0;
  endtask

  task automatic read_burst();
    n90 = 0; n90d = 0; bad90 = 0; bad90d = 0;
    @(posedge clk0) #300 glitch(100);
    @(posedge clk0) #100 rddata_en = 1'b1;
    repeat (4) @(posedge clk0);
    #100 rddata_en = 1'b0;
    @(posedge clk0);
    repeat (4) begin
      @(posedge clk0) read_dqs = 1'b1;
      @(negedge clk0) read_dqs = 1'b0;
    end
    @(negedge clk0) #200 glitch(120);
    repeat (4) @(posedge clk0);
    checks++; if (n90 != 4 || bad90 != 0) begin failures++; $display("FAIL masked_dqs90: %0d pulses, %0d misplaced", n90, bad90); end
    checks++; if (n90d != 4 || bad90d != 0) begin failures++; $display("FAIL masked_dqs90_d: %0d edges, %0d misplaced", n90d, bad90d); end
  endtask

  task automatic write_burst(bit use_cal);
    nw = 0;
    sel_wd = use_cal;
    @(posedge clk0) #100 begin wr_en = !use_cal; cal_en = use_cal; end
    repeat (4) @(posedge clk0);
    #100 begin wr_en = 1'b0; cal_en = 1'b0; end
    repeat (4) @(posedge clk0);
    checks++; if (nw != 4) begin failures++; $display("FAIL write strobe %0d pulses (sel_wd %0b)", nw, use_cal); end
    // the unselected enable must do nothing
    nw = 0;
    @(posedge clk0) #100 begin wr_en = use_cal; cal_en = !use_cal; end
    repeat (4) @(posedge clk0);
    #100 begin wr_en = 1'b0; cal_en = 1'b0; end
    repeat (4) @(posedge clk0);
    checks++; if (nw != 0) begin failures++; $display("FAIL unselected enable made %0d pulses", nw); end
  endtask

  initial begin
    #(3 * HALF) rst_n = 1'b1;
    @(negedge clk0) begin deg90_taps = 6'd10; load_taps = 1'b1; end
    @(negedge clk0) load_taps = 1'b0;
    repeat (4) @(posedge clk0);
    read_burst();
    @(negedge clk0) begin pdl_taps = 6'd5; select_pd = 1'b1; end
    @(negedge clk0) select_pd = 1'b0;
    exp_taps = 15;
    repeat (4) @(posedge clk0);
    read_burst();
    write_burst(1'b0);
    write_burst(1'b1);
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
