// Self-checking test of dq_bitslice at 533 MHz. The testbench produces the
// strobes the DQS slice would give: masked_dqs90 a quarter period after the
// edge-aligned read data, and masked_dqs90_d its inverse a further quarter
// period later.
//  * read: the BL8 sequence 1,0,0,1,0,0,1,0 must come out as the DFI words
//    10, 01, 00, 10 under dfi_rddata_valid, then random bursts, also with
//    the PDL set to 4 taps;
//  * write: random words through the write path appear as beats on write_dq.
`timescale 1ps/1ps
module tb_dq_bitslice;
  localparam int T = 1876;
  logic clk0 = 1'b0, clk90 = 1'b0, rst_n = 1'b1;
  logic sel_wd = 1'b0, select_pd = 1'b0, rinc = 1'b1, fifo_reset_n = 1'b1;
  logic [1:0] wrdata = '0, calib = '0, rddata;
  logic [5:0] pdl_taps = '0;
  logic read_dq = 1'b0, dqs90 = 1'b0, dqs90_d = 1'b1, write_dq, valid;
  logic [1:0] exp_q [$];
  int checks = 0, failures = 0, words = 0;

  initial #10 rst_n = 1'b0;
  always #(T/2) clk0 = ~clk0;
  initial begin #(T/4); forever #(T/2) clk90 = ~clk90; end

  dq_bitslice dut (.dfi_clk0(clk0), .dfi_clk90(clk90), .rst_n, .sel_wd, .dfi_wrdata(wrdata),
    .calib_dfi_wrdata(calib), .write_dq, .read_dq, .pdl_taps, .select_pd,
    .masked_dqs90(dqs90), .masked_dqs90_d(dqs90_d), .rinc, .fifo_reset_n,
    .dfi_rddata(rddata), .dfi_rddata_valid(valid));

  always @(posedge clk0) if (valid) begin
    checks++;
    words++;
    if (exp_q.size() == 0 || rddata !== exp_q[0]) begin
      failures++;
      $display("FAIL read word %0d: %b", words, rddata);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  // one read burst of 2*n beats, data edge aligned, strobe centred
  task automatic read_burst(logic [15:0] bits, int n);
    @(posedge clk0);
    for (int i = 0; i < n; i++) begin
      exp_q.push_back({bits[2*i], bits[2*i+1]});
      fork
        begin read_dq = bits[2*i]; #(T/2) read_dq = bits[2*i+1]; end
        begin #(T/4) dqs90 = 1'b1; #(T/2) dqs90 = 1'b0; end
        begin #(T/2) dqs90_d = 1'b0; #(T/2) dqs90_d = 1'b1; end
      join_none
      #(T);
    end
    #(T/2) read_dq = 1'b0;
    repeat (6) @(posedge clk0);
  endtask

  initial begin
    #(3 * T) rst_n = 1'b1;
    repeat (3) @(posedge clk0);
    // first beat in bit 0 of `bits`: 1,0,0,1,0,0,1,0
    read_burst(16'b0100_1001, 4);
    checks++; if (words != 4) begin failures++; $display("FAIL %0d words for BL8", words); end
    repeat (10) read_burst(16'($urandom), 4);
    @(negedge clk0) begin pdl_taps = 6'd4; select_pd = 1'b1; end
    @(negedge clk0) select_pd = 1'b0;
    repeat (10) read_burst(16'($urandom), 4);
    checks++; if (words != 84 || exp_q.size() != 0) begin failures++; $display("FAIL %0d words", words); end
    // write path: words launched in cycle k appear 1.25 cycles later
    for (int k = 0; k < 20; k++) begin
      logic [1:0] v = 2'($urandom);
      @(posedge clk0) #100 wrdata = v;
      @(posedge clk90) #(T/4);
      @(posedge clk90) #(T/4);
      checks++; if (write_dq !== v[1]) begin failures++; $display("FAIL write first beat"); end
      @(negedge clk90) #(T/4);
      checks++; if (write_dq !== v[0]) begin failures++; $display("FAIL write second beat"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
