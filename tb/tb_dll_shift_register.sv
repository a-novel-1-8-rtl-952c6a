// Self-checking test of dll_shift_register: random left/right shifts are
// compared with an integer tap position kept by the testbench, including
// saturation at both ends of the 192-tap line.
`timescale 1ps/1ps
module tb_dll_shift_register;
  logic clk = 1'b0, rst_n = 1'b1, sl = 1'b0, sr = 1'b0;
  logic [191:0] sel;
  int pos = 0;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  always #500 clk = ~clk;

  dll_shift_register dut (.clk, .rst_n, .shift_left(sl), .shift_right(sr), .sel);

  task automatic check_pos();
    logic [191:0] exp;
    exp = '0;
    exp[pos] = 1'b1;
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL expected tap %0d", pos);
    end
  endtask

  initial begin
    #1200 rst_n = 1'b1;
    check_pos();
    for (int k = 0; k < 3000; k++) begin
      int mode;
      @(negedge clk);
      // phases: climb to the top, random walk, descend to the bottom
      mode = (k < 250) ? 0 : (k < 2700) ? 1 : 2;
      sl = (mode == 0) ? 1'b1 : (mode == 2) ? 1'b0 : 1'($urandom_range(0, 1));
      sr = (mode == 2) ? 1'b1 : (mode == 0) ? 1'b0 : 1'($urandom_range(0, 1));
      @(posedge clk);
      if (sl && !sr && pos < 191) pos++;
      else if (sr && !sl && pos > 0) pos--;
      #1;
      check_pos();
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
