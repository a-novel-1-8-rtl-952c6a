// Self-checking test of write_dqs_gen: for a 4-cycle and a 2-cycle write
// enable the strobe must have 4 and 2 pulses, each rising at a falling edge
// of dfi_clk0 and falling at the next rising edge, tx_en must lead the first
// rising edge and trail the last falling edge by half a clock period
// (write preamble and postamble), and rx_en must be the complement of tx_en.
`timescale 1ps/1ps
module tb_write_dqs_gen;
  localparam int HALF = 938;
  logic clk0 = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic write_dqs, tx_en, rx_en;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  int n_rise = 0, n_misaligned = 0;
  realtime t_tx_rise, t_tx_fall, t_first_rise, t_last_fall;

  always #(HALF) clk0 = ~clk0;

  write_dqs_gen dut (.clk0, .rst_n, .wrdata_en(en), .write_dqs, .tx_en, .rx_en);

  always @(posedge write_dqs) begin
    n_rise++;
    if (n_rise == 1) t_first_rise = $realtime;
    if (clk0 !== 1'b0) n_misaligned++;
  end
  always @(negedge write_dqs) begin
    t_last_fall = $realtime;
    if (clk0 !== 1'b1) n_misaligned++;
  end
  always @(posedge tx_en) t_tx_rise = $realtime;
  always @(negedge tx_en) t_tx_fall = $realtime;
  always @(posedge clk0 or negedge clk0) if (rst_n) begin
    #1;
    checks++;
    if (rx_en !== !tx_en) begin failures++; $display("FAIL rx_en"); end
  end

  task automatic write(int cycles);
    n_rise = 0;
    @(posedge clk0) #100 en = 1'b1;
    repeat (cycles) @(posedge clk0);
    #100 en = 1'b0;
    repeat (4) @(posedge clk0);
    checks++; if (n_rise != cycles) begin failures++; $display("FAIL %0d pulses for %0d cycles", n_rise, cycles); end
    checks++; if (t_first_rise - t_tx_rise != HALF) begin failures++; $display("FAIL preamble %0t", t_first_rise - t_tx_rise); end
    checks++; if (t_tx_fall - t_last_fall != HALF) begin failures++; $display("FAIL postamble %0t", t_tx_fall - t_last_fall); end
  endtask

  initial begin
    #(3 * HALF) rst_n = 1'b1;
    repeat (2) @(posedge clk0);
    write(4);
    write(2);
    checks++; if (n_misaligned != 0) begin failures++; $display("FAIL %0d misaligned edges", n_misaligned); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
