// Self-checking test of dsms: a read strobe with glitches while the line
// floats before the burst and after the postamble. For BL8 (4 cycles of
// dfi_rddata_en) and BL4 (2 cycles) the masked strobe must carry exactly 4
// and 2 clean pulses of full width with the same edges as the real strobe, no glitch may
// pass, and the mask must be closed after the last falling edge.
`timescale 1ps/1ps
module tb_dsms;
  localparam int HALF = 938;
  logic clk = 1'b0, rst_n = 1'b1, rddata_en = 1'b0, read_dqs = 1'b0;
  logic mask, masked_dqs;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  int n_rise = 0, n_bad = 0;
  bit real_pulse = 0;

  always #(HALF) clk = ~clk;

  dsms dut (.clk, .rst_n, .dfi_rddata_en(rddata_en), .read_dqs, .mask, .masked_dqs);

  realtime t_rise;
  always @(posedge masked_dqs) begin
    n_rise++;
    t_rise = $realtime;
    if (!real_pulse) n_bad++;
  end
  // every clean pulse keeps the full width of the real strobe pulse
  always @(negedge masked_dqs) begin
    checks++;
    if ($realtime - t_rise < HALF - 2) begin
      failures++;
      $display("FAIL pulse of %0t ps", $realtime - t_rise);
    end
  end

  task automatic glitch(int w);
    read_dqs = 1'b1; #(w); read_dqs = 1'b0;
  endtask

  task automatic burst(int cycles);
    // glitches before the read is announced
    @(posedge clk) #300 glitch(90);
    #400 glitch(150);
    // DFI read-data enable for `cycles` cycles
    @(posedge clk) #100 rddata_en = 1'b1;
    repeat (cycles) @(posedge clk);
    #100 rddata_en = 1'b0;
    // preamble (low) then the strobe pulses, edge aligned to clk
    @(posedge clk);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk) begin real_pulse = 1; read_dqs = 1'b1; end
      @(negedge clk) read_dqs = 1'b0;
      #1 real_pulse = 0;
    end
    // postamble, then glitches while the line floats
    @(negedge clk) #200 glitch(120);
    #300 glitch(60);
    #50;
  endtask

  initial begin
    #(3 * HALF) rst_n = 1'b1;
    repeat (2) @(posedge clk);
    checks++; if (mask) begin failures++; $display("FAIL mask open after reset"); end
    burst(4);
    checks++; if (n_rise != 4) begin failures++; $display("FAIL BL8: %0d pulses", n_rise); end
    checks++; if (n_bad != 0) begin failures++; $display("FAIL BL8: %0d glitches passed", n_bad); end
    checks++; if (mask) begin failures++; $display("FAIL BL8: mask still open"); end
    n_rise = 0;
    repeat (3) @(posedge clk);
    burst(2);
    checks++; if (n_rise != 2) begin failures++; $display("FAIL BL4: %0d pulses", n_rise); end
    checks++; if (n_bad != 0) begin failures++; $display("FAIL BL4: %0d glitches passed", n_bad); end
    checks++; if (mask) begin failures++; $display("FAIL BL4: mask still open"); end
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
