// End-to-end test of ddr2_phy_top at its default parameters, 533 MHz
// (1066 Mbit/s per pin). The testbench plays the memory controller on the
// DFI side and a DDR2 device on the pad side (write capture on the strobe
// edges, read bursts with a one-cycle preamble, edge-aligned data and
// glitches while the strobe line floats), plus a 600 ps clock tree and the
// resistor/comparator model of the calibration legs. Sequence:
//   1. reset, wait for the RCDLL to lock; check dfi_clk0_buff against dfi_clk
//      and period_taps;
//   2. impedance calibration;
//   3. BL8 writes from the controller and one from the training inputs
//      (sel_wd); the device model stores the beats it captures on DQS, and
//      every DQS edge must lie at least 350 ps from any DQ/DM transition;
//   4. BL8 reads of the same data, including the bit pattern
//      1,0,0,1,0,0,1,0 on DQ0 that must give the DFI words 10, 01, 00, 10;
//   5. a PDL setting from the training inputs, a FIFO reset, a repeat
//      period measurement, then more reads.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
`timescale 1ps/1ps
module tb_ddr2_phy_top;
  import ddr2_phy_pkg::*;
  localparam int HALF = 938;
  localparam int T    = 2 * HALF;
  localparam int CL   = 4;

  logic dfi_clk = 1'b0, rst_n = 1'b0, measure_req = 1'b0;
  logic dfi_clk0, dfi_clk0_buff, done;
  logic [PERIOD_W-1:0] period_taps;
  logic [ADDR_W-1:0] dfi_address = '0, addr;
  logic [BA_W-1:0] dfi_bank = '0, ba;
  logic dfi_cke = 1'b0, dfi_ras_n = 1'b1, dfi_cas_n = 1'b1, dfi_we_n = 1'b1, dfi_odt = 1'b0;
  logic [15:0] dfi_wrdata = '0, calib_dfi_wrdata = '0, dfi_rddata;
  logic [1:0] dfi_wrdata_mask = '0, calib_dfi_wrdata_mask = '0;
  logic dfi_wrdata_en = 1'b0, calib_dfi_wrdata_en = 1'b0, dfi_rddata_en = 1'b0, dfi_rddata_valid;
  logic sel_wd = 1'b0, rinc = 1'b1, fifo_reset_n = 1'b1;
  logic [5:0] pdl_taps = '0;
  logic [8:0] select_pd = '0;
  logic ck, cke, ras_n, cas_n, we_n, odt;
  logic [7:0] dq_out, dq_in = '0;
  logic dm_out, dqs_out, dqs_in = 1'b0, tx_en, rx_en, dqs_mask;
  logic zq_div4 = 1'b1, sstl_calib_act = 1'b0, zq_pd_cmp, zq_pu_cmp, zq_pd_calib_done, zq_calib_done;
  logic [3:0] zq_vol_trial, vol, vol300;
  logic [4:0] zq_voh_trial, voh, voh300;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lock = 0, n_remeasure = 0, n_zq = 0, n_wr_strobe = 0, n_rd_words = 0;
  int n_glitch_masked = 0, n_train_write = 0, n_pdl = 0, n_fifo_reset = 0, n_pattern = 0, n_cmd = 0;

  // reset held from time 0, with a falling edge at 10 ps for the flops
  // whose clocks are still idle
  initial begin #5 rst_n = 1'b1; #5 rst_n = 1'b0; end
  always #(HALF) dfi_clk = ~dfi_clk;
  assign #600 dfi_clk0_buff = dfi_clk0;   // clock-tree insertion delay

  ddr2_phy_top dut (.*);

  zq_leg_model u_legs (.vol_trial(zq_vol_trial), .voh_trial(zq_voh_trial),
                       .pd_cmp(zq_pd_cmp), .pu_cmp(zq_pu_cmp));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------------
  // DDR2 device model: 8 bits x 64 locations of beats
  logic [7:0] mem [64];
  logic [5:0] wr_ptr;
  always @(posedge dqs_out) if (tx_en) begin
    mem[wr_ptr] = dq_out; wr_ptr = wr_ptr + 1'b1; n_wr_strobe++;
  end
  always @(negedge dqs_out) if (tx_en) begin
    mem[wr_ptr] = dq_out; wr_ptr = wr_ptr + 1'b1;
  end

  // Write strobe centring: while the pad drives, no DQ or DM transition may
  // come closer than EYE_MARGIN to a DQS edge. Ideally each edge sits a
  // quarter period (469 ps) from the data transitions on either side.
  // Checked once the DLL has locked, before which nothing is written.
  localparam int EYE_MARGIN = 350;
  realtime t_dq_change = 0, t_dqs_edge = 0, min_gap = 1.0e9;
  int n_dqs_edges = 0, n_eye_viol = 0;
  always @({dm_out, dq_out}) if (tx_en && done) begin
    t_dq_change = $realtime;
    if (t_dq_change - t_dqs_edge < min_gap) min_gap = t_dq_change - t_dqs_edge;
    if (t_dq_change - t_dqs_edge < EYE_MARGIN) n_eye_viol++;
  end
  always @(dqs_out) if (tx_en && done) begin
    t_dqs_edge = $realtime;
    n_dqs_edges++;
    if (t_dqs_edge - t_dq_change < min_gap) min_gap = t_dqs_edge - t_dq_change;
    if (t_dqs_edge - t_dq_change < EYE_MARGIN) n_eye_viol++;
  end

  // glitch on the floating strobe line; counted when the DSMS masks it
  task automatic glitch(int w);
    dqs_in = 1'b1;
    #(w / 2);
    if (!dqs_mask) n_glitch_masked++;
    #(w - w / 2) dqs_in = 1'b0;
  endtask

  // device side of a read burst starting at beat address a (4 strobes)
  task automatic device_read(logic [5:0] a);
    repeat (CL - 1) @(posedge ck);
    #300 glitch(110);                       // line floating
    #250 glitch(80);
    @(posedge ck);                          // preamble: driven low
    for (int i = 0; i < 4; i++) begin
      @(posedge ck) begin dqs_in = 1'b1; dq_in = mem[a + 2*i]; end
      @(negedge ck) begin dqs_in = 1'b0; dq_in = mem[a + 2*i + 1]; end
    end
    @(posedge ck);                          // postamble
    #200 glitch(120);
  endtask

  // ---------------------------------------------------------------------
  // controller side, driven 100 ps after the dfi_clk rising edge
  task automatic dfi_cycle();
    @(posedge dfi_clk) #100;
  endtask

  task automatic command(logic ras, logic cas, logic we, logic [ADDR_W-1:0] a);
    dfi_cycle();
    {dfi_ras_n, dfi_cas_n, dfi_we_n} = {ras, cas, we};
    dfi_address = a;
    dfi_bank = 3'(a);
    dfi_cycle();
    {dfi_ras_n, dfi_cas_n, dfi_we_n} = 3'b111;
  endtask

  // expected read words: word j of a burst = {beat 2j, beat 2j+1} per DQ
  logic [15:0] exp_q [$];

  function automatic logic [15:0] dfi_word(logic [7:0] b0, logic [7:0] b1);
    logic [15:0] w;
    for (int i = 0; i < 8; i++) w[2*i +: 2] = {b0[i], b1[i]};
    return w;
  endfunction

  task automatic write_burst(logic [5:0] a, logic [7:0] beats [8], bit training);
    wr_ptr = a;
    command(1'b1, 1'b0, 1'b0, ADDR_W'(a));
    sel_wd = training;
    for (int j = 0; j < 4; j++) begin
      if (j > 0) dfi_cycle();
      if (training) begin
        calib_dfi_wrdata_en = 1'b1;
        calib_dfi_wrdata = dfi_word(beats[2*j], beats[2*j+1]);
        dfi_wrdata = ~calib_dfi_wrdata;
      end else begin
        dfi_wrdata_en = 1'b1;
        dfi_wrdata = dfi_word(beats[2*j], beats[2*j+1]);
      end
    end
    dfi_cycle();
    dfi_wrdata_en = 1'b0;
    calib_dfi_wrdata_en = 1'b0;
    repeat (4) dfi_cycle();
    sel_wd = 1'b0;
    for (int b = 0; b < 8; b++)
      check($sformatf("device stored beat %0d of write at %0d", b, a), mem[a + b] === beats[b]);
    if (training) n_train_write++;
  endtask

  task automatic read_burst(logic [5:0] a);
    for (int j = 0; j < 4; j++) exp_q.push_back(dfi_word(mem[a + 2*j], mem[a + 2*j + 1]));
    command(1'b1, 1'b0, 1'b1, ADDR_W'(a));
    fork
      device_read(a);
      begin
        repeat (CL - 1) dfi_cycle();
        dfi_rddata_en = 1'b1;
        repeat (4) dfi_cycle();
        dfi_rddata_en = 1'b0;
      end
    join
    repeat (6) dfi_cycle();
    check("all read words delivered", exp_q.size() == 0);
  endtask

  // read data monitor (PHY side, dfi_clk0)
  logic [1:0] dq0_words [$];
  always @(posedge dfi_clk0) if (dfi_rddata_valid) begin
    n_rd_words++;
    dq0_words.push_back(dfi_rddata[1:0]);
    check($sformatf("read word %0d", n_rd_words), exp_q.size() != 0 && dfi_rddata === exp_q[0]);
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  // command bus: the DFI command presented in a dfi_clk cycle is on the pads
  // after the next rising edge of dfi_clk0 (which leads dfi_clk by the
  // clock-tree delay once the DLL is locked)
  always @(posedge dfi_clk0) if (rst_n && done) begin
    logic [2:0] cmd_in;
    logic [ADDR_W-1:0] addr_in;
    cmd_in = {dfi_ras_n, dfi_cas_n, dfi_we_n};
    addr_in = dfi_address;
    #1;
    if (cmd_in != 3'b111) begin
      n_cmd++;
      check("command and address on the pads", {ras_n, cas_n, we_n} == cmd_in && addr == addr_in && ba == 3'(addr_in));
    end
  end

  realtime t_ref, t_fb;
  always @(posedge dfi_clk) t_ref = $realtime;
  always @(posedge dfi_clk0_buff) t_fb = $realtime;

  task automatic check_skew();
    realtime s;
    @(posedge dfi_clk0_buff) #1;
    s = t_fb - t_ref;
    if (s > HALF) s = s - T;
    check($sformatf("clock tree leaf within one tap of dfi_clk (%0.0f ps)", s), s >= -2 && s <= 50);
  endtask

  initial begin
    logic [7:0] beats [8];
    int cyc;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    #(5 * HALF) rst_n = 1'b1;
    dfi_cke = 1'b1;
    // 1. DLL lock
    cyc = 0;
    while (!done && cyc < 4000) begin dfi_cycle(); cyc++; end
    check("RCDLL locked", done);
    if (done) n_lock++;
    check($sformatf("period_taps %0d", period_taps), period_taps >= 38 && period_taps <= 41);
    check_skew();
    // 2. impedance calibration (divider /4 for 533 MHz)
    dfi_cycle(); sstl_calib_act = 1'b1;
    dfi_cycle(); sstl_calib_act = 1'b0;
    cyc = 0;
    while (!zq_calib_done && cyc < 200) begin dfi_cycle(); cyc++; end
    check("impedance calibration finished", zq_calib_done);
    check("calibration codes", vol == 4'd13 && voh == 5'd18 && vol300 == 4'd3 && voh300 == 5'd4);
    if (zq_calib_done) n_zq++;
    // 3. writes
    beats = '{8'h01, 8'hFE, 8'hFC, 8'h03, 8'hA4, 8'h5A, 8'h3D, 8'hC2};   // DQ0: 1,0,0,1,0,0,1,0
    write_burst(6'd0, beats, 1'b0);
    for (int k = 1; k < 4; k++) begin
      foreach (beats[b]) beats[b] = 8'($urandom);
      write_burst(6'(8 * k), beats, k == 3);
    end
    // 4. reads
    dq0_words.delete();
    read_burst(6'd0);
    n_pattern = 0;
    if (dq0_words.size() == 4 && dq0_words[0] == 2'b10 && dq0_words[1] == 2'b01 &&
        dq0_words[2] == 2'b00 && dq0_words[3] == 2'b10) n_pattern++;
    check("DQ0 words 10, 01, 00, 10", n_pattern == 1);
    for (int k = 1; k < 4; k++) read_burst(6'(8 * k));
    // 5a. PDL setting on all slices, reads still correct
    dfi_cycle(); pdl_taps = 6'd3; select_pd = '1;
    dfi_cycle(); select_pd = '0;
    n_pdl++;
    read_burst(6'd8);
    // 5b. FIFO reset: a burst that is not read out is discarded
    rinc = 1'b0;
    command(1'b1, 1'b0, 1'b1, ADDR_W'(16));
    fork
      device_read(6'd16);
      begin repeat (CL - 1) dfi_cycle(); dfi_rddata_en = 1'b1; repeat (4) dfi_cycle(); dfi_rddata_en = 1'b0; end
    join
    repeat (6) dfi_cycle();
    fifo_reset_n = 1'b0;
    dfi_cycle(); fifo_reset_n = 1'b1;
    rinc = 1'b1;
    cyc = n_rd_words;
    repeat (6) dfi_cycle();
    check("FIFO reset discarded the burst", n_rd_words == cyc);
    n_fifo_reset++;
    read_burst(6'd24);
    // 5c. repeat period measurement
    dfi_cycle(); measure_req = 1'b1;
    dfi_cycle(); measure_req = 1'b0;
    dfi_cycle();
    check("done dropped during re-measurement", !done);
    cyc = 0;
    while (!done && cyc < 500) begin dfi_cycle(); cyc++; end
    check("locked again", done);
    if (done) n_remeasure++;
    check_skew();
    read_burst(6'd0);
    // mechanisms
    check("mechanism: DLL lock",              n_lock > 0);
    check("mechanism: re-measure",            n_remeasure > 0);
    check("mechanism: impedance calibration", n_zq > 0);
    check("mechanism: write strobe",          n_wr_strobe > 0);
    check("mechanism: read words",            n_rd_words > 0);
    check("mechanism: glitches masked",       n_glitch_masked > 0);
    check("mechanism: training write path",   n_train_write > 0);
    check("mechanism: PDL training setting",  n_pdl > 0);
    check("mechanism: FIFO reset",            n_fifo_reset > 0);
    check("mechanism: command registers",     n_cmd > 0);
    check($sformatf("write DQS edges centred in the DQ eye (%0d edges, closest transition %0.0f ps)",
                    n_dqs_edges, min_gap), n_dqs_edges > 0 && n_eye_viol == 0);
    $display("mechanisms: lock=%0d remeasure=%0d zq=%0d wr_strobes=%0d rd_words=%0d glitches_masked=%0d train_wr=%0d pdl=%0d fifo_reset=%0d cmds=%0d",
             n_lock, n_remeasure, n_zq, n_wr_strobe, n_rd_words, n_glitch_masked, n_train_write, n_pdl, n_fifo_reset, n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
