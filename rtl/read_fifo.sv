// Read FIFO of a DQ bit-slice: moves captured read data from the strobe
// domain to the dfi_clk0 domain.
//
// Write side: on each rising edge of wclk (masked_DQS90_d) one 2-bit word,
// the two beats captured on the previous strobe pulse, is stored. Read side:
// on a rising edge of rclk (dfi_clk0) where rinc is high and the FIFO is not
// empty, the oldest word is put on rdata and rddata_valid is high for that
// cycle. Pointers are Gray coded and cross domains through two-flop
// synchronisers, so a word is readable 2 to 3 rclk edges after it is
// written. The write clock stops between bursts; the full flag is computed
// from a synchronised read pointer and is therefore conservative. Either
// reset_n or fifo_reset_n low empties the FIFO (asynchronously).
// Depth and synchroniser length are this design's choices.
`timescale 1ps/1ps
module read_fifo #(
  parameter int DEPTH = 8,
  parameter int WIDTH = 2
) (
  input  logic             wclk,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             rinc,
  input  logic             reset_n,
  input  logic             fifo_reset_n,
  output logic [WIDTH-1:0] rdata,
  output logic             rddata_valid,
  output logic             full
);
  localparam int AW = $clog2(DEPTH);

  logic             rst_n;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wbin, wgray, rbin, rgray;
  logic [AW:0]      rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]      wbin_next, rbin_next;
  logic             empty;

  assign rst_n = reset_n & fifo_reset_n;

  // write domain
  assign wbin_next = wbin + 1'b1;
  assign full      = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge rst_n)
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (!full) begin
        wbin  <= wbin_next;
        wgray <= wbin_next ^ (wbin_next >> 1);
      end
    end

  always_ff @(posedge wclk)
    if (!full) mem[wbin[AW-1:0]] <= wdata;

  // read domain
  assign rbin_next = rbin + 1'b1;
  assign empty     = (rgray == wgray_r2);

  always_ff @(posedge rclk or negedge rst_n)
    if (!rst_n) begin
      rbin         <= '0;
      rgray        <= '0;
      wgray_r1     <= '0;
      wgray_r2     <= '0;
      rdata        <= '0;
      rddata_valid <= 1'b0;
    end else begin
      wgray_r1     <= wgray;
      wgray_r2     <= wgray_r1;
      rddata_valid <= rinc && !empty;
      if (rinc && !empty) begin
        rdata <= mem[rbin[AW-1:0]];
        rbin  <= rbin_next;
        rgray <= rbin_next ^ (rbin_next >> 1);
      end
    end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("read_fifo: DEPTH must be a power of two of at least 4");
endmodule
