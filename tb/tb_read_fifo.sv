// Self-checking test of read_fifo: bursts of 4 words written on a gated
// strobe-like clock are read on an unrelated clock in order, with
// rddata_valid once per word; rinc low holds the data back; fifo_reset_n
// empties the FIFO.
`timescale 1ps/1ps
module tb_read_fifo;
  logic wclk = 1'b0, rclk = 1'b0, rinc = 1'b1, reset_n = 1'b1, fifo_reset_n = 1'b1;
  logic [1:0] wdata = '0, rdata;
  logic rddata_valid, full;
  logic [1:0] sent [$];
  int checks = 0, failures = 0, got = 0;

  initial #10 reset_n = 1'b0;   // a real falling edge for the asynchronous resets

  always #937 rclk = ~rclk;

  read_fifo dut (.wclk, .wdata, .rclk, .rinc, .reset_n, .fifo_reset_n, .rdata, .rddata_valid, .full);

  always @(posedge rclk) if (rddata_valid) begin
    checks++;
    got++;
    if (sent.size() == 0 || rdata !== sent[0]) begin
      failures++;
      $display("FAIL word %0d: got %b", got, rdata);
    end
    if (sent.size() != 0) void'(sent.pop_front());
  end

  task automatic burst(int n);
    for (int i = 0; i < n; i++) begin
      logic [1:0] v = 2'($urandom_range(0, 3));
      #400 wdata = v;
      #400 wclk = 1'b1;
      sent.push_back(v);
      #900 wclk = 1'b0;
    end
  endtask

  initial begin
    #5000 reset_n = 1'b1;
    repeat (10) begin
      burst(4);
      #(5000 + $urandom_range(0, 3000));
    end
    #20000;
    checks++; if (got != 40) begin failures++; $display("FAIL read %0d words", got); end
    // held back while rinc is low
    rinc = 1'b0;
    burst(4);
    #20000;
    checks++; if (got != 40) begin failures++; $display("FAIL read while rinc low"); end
    rinc = 1'b1;
    #20000;
    checks++; if (got != 44) begin failures++; $display("FAIL words not released (%0d)", got); end
    // fifo_reset_n discards what is stored
    rinc = 1'b0;
    burst(3);
    #5000 fifo_reset_n = 1'b0;
    sent.delete();
    #3000 fifo_reset_n = 1'b1;
    rinc = 1'b1;
    #20000;
    checks++; if (got != 44) begin failures++; $display("FAIL reset did not empty (%0d)", got); end
    burst(4);
    #20000;
    checks++; if (got != 48) begin failures++; $display("FAIL after reset (%0d)", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
