// Self-checking test of bbpd: three feedback clocks with known offsets from
// the reference (early by 200 ps, late by 200 ps, 20 ps after the reference,
// i.e. inside the one-tap window) must give early, late and neither.
`timescale 1ps/1ps
module tb_bbpd;
  localparam int T = 1876;
  logic clk = 1'b0, clk_d1, rst_n = 1'b1;
  logic fb_early = 1'b0, fb_late = 1'b0, fb_in = 1'b0;
  logic e0, l0, e1, l1, e2, l2;
  int checks = 0, failures = 0;

  initial #10 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  always #(T/2) clk = ~clk;
  assign #47 clk_d1 = clk;
  initial begin #(T - 200); forever #(T/2) fb_early = ~fb_early; end
  initial begin #(200);     forever #(T/2) fb_late  = ~fb_late;  end
  initial begin #(20);      forever #(T/2) fb_in    = ~fb_in;    end

  bbpd u0 (.clk, .clk_d1, .rst_n, .fb(fb_early), .early(e0), .late(l0));
  bbpd u1 (.clk, .clk_d1, .rst_n, .fb(fb_late),  .early(e1), .late(l1));
  bbpd u2 (.clk, .clk_d1, .rst_n, .fb(fb_in),    .early(e2), .late(l2));

  task automatic expect2(string what, logic e, logic l, logic ee, logic el);
    checks++;
    if (e !== ee || l !== el) begin
      failures++;
      $display("FAIL %s: early=%b late=%b, expected %b %b", what, e, l, ee, el);
    end
  endtask

  initial begin
    #(3*T) rst_n = 1'b1;
    repeat (3) @(posedge clk);
    repeat (10) begin
      @(posedge clk); #100;
      expect2("early fb", e0, l0, 1'b1, 1'b0);
      expect2("late fb",  e1, l1, 1'b0, 1'b1);
      expect2("aligned",  e2, l2, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200*T);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
