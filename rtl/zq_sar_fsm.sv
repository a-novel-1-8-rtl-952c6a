// Binary-search FSM of the impedance calibration (used as pdFSM, N = 4, for
// the pull-down code Vol and as puFSM, N = 5, for the pull-up code Voh).
//
// All state changes happen on clock edges where `tick` (the divided clock)
// is high. From IDLE (code 0) a pending `start` moves it to READY, then to
// the first search step with only the MSB of the trial code set. In each
// search step it samples the comparator: cmp = 1 means the dummy leg is
// still weaker than the external resistor, so the bit under test is kept;
// otherwise it is cleared. The next lower bit is then set for trial. After
// the LSB has been decided the FSM enters DONE, raises `done` and holds the
// final code until the next `start`. A full search takes N + 2 ticks. The
// state sequence follows the text; the comparator polarity (a larger code
// enables more parallel devices, i.e. lower resistance) is this design's
// reading.
`timescale 1ps/1ps
module zq_sar_fsm #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         start,
  input  logic         cmp,
  output logic [N-1:0] code,
  output logic         done
);
  import ddr2_phy_pkg::*;

  localparam int BW = (N > 1) ? $clog2(N) : 1;

  zq_state_e     state;
  logic [BW-1:0] bit_idx;

  assign done = (state == ZQ_DONE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= ZQ_IDLE;
      code    <= '0;
      bit_idx <= '0;
    end else if (tick) begin
      unique case (state)
        ZQ_IDLE, ZQ_DONE:
          if (start) begin
            state <= ZQ_READY;
            code  <= '0;
          end
        ZQ_READY: begin
          state     <= ZQ_SEARCH;
          code      <= '0;
          code[N-1] <= 1'b1;
          bit_idx   <= BW'(N - 1);
        end
        ZQ_SEARCH: begin
          if (!cmp) code[bit_idx] <= 1'b0;
          if (bit_idx == 0) state <= ZQ_DONE;
          else begin
            code[bit_idx - 1'b1] <= 1'b1;
            bit_idx              <= bit_idx - 1'b1;
          end
        end
        default: state <= ZQ_IDLE;
      endcase
    end
endmodule
