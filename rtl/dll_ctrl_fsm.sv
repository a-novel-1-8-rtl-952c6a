// Control FSM of the RCDLL.
//
// After reset the FSM first waits SHIFT_WAIT cycles (SETTLE) so that the
// TDC delay chain holds no stale edge, then runs this sequence, which is
// repeated whenever measure_req is seen:
//   MEASURE   - pulse `launch` to the TDC;
//   WAIT_CODE - wait for the TDC's code_valid (the encoder output is then
//               the period in taps);
//   LOAD      - pulse `load_taps` so the slave delay lines take deg90_taps;
//   SETTLE    - wait SHIFT_WAIT cycles for new delays to reach the feedback
//               input and the phase detector pipeline;
//   ACQUIRE   - first alignment: while the phase detector reports early or
//               late, add one tap and settle again (starting from zero delay
//               the feedback edge is moved forward until it falls in the
//               one-tap window); the first in-window decision locks the loop;
//   TRACK     - locked, `done` high: one tap is added (early) or removed
//               (late) whenever the detector leaves the window, each followed
//               by SETTLE.
// A repeat measurement drops `done` and keeps the current delay setting;
// after the new deg90_taps is loaded the loop goes straight back to TRACK.
// The sequence follows the text; the acquisition rule, the settle time and
// the dead-zone tracking are this design's own choices. Clocked by dfi_clk.
`timescale 1ps/1ps
module dll_ctrl_fsm #(
  parameter int SHIFT_WAIT = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic measure_req,
  input  logic code_valid,
  input  logic early,
  input  logic late,
  output logic launch,
  output logic load_taps,
  output logic shift_left,
  output logic shift_right,
  output logic done
);
  import ddr2_phy_pkg::*;

  localparam int WAIT_W = $clog2(SHIFT_WAIT + 1);

  dll_state_e        state;
  logic [WAIT_W-1:0] wait_cnt;
  logic              locked;
  logic              measured;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= DLL_SETTLE;
      wait_cnt    <= WAIT_W'(SHIFT_WAIT);
      locked      <= 1'b0;
      measured    <= 1'b0;
      done        <= 1'b0;
      launch      <= 1'b0;
      load_taps   <= 1'b0;
      shift_left  <= 1'b0;
      shift_right <= 1'b0;
    end else begin
      launch      <= 1'b0;
      load_taps   <= 1'b0;
      shift_left  <= 1'b0;
      shift_right <= 1'b0;
      if (measure_req && state != DLL_MEASURE && state != DLL_WAIT_CODE) begin
        state <= DLL_MEASURE;
        done  <= 1'b0;
      end else begin
        unique case (state)
          DLL_MEASURE: begin
            launch <= 1'b1;
            done   <= 1'b0;
            state  <= DLL_WAIT_CODE;
          end
          DLL_WAIT_CODE:
            if (code_valid) state <= DLL_LOAD;
          DLL_LOAD: begin
            load_taps <= 1'b1;
            measured  <= 1'b1;
            wait_cnt  <= WAIT_W'(SHIFT_WAIT);
            state     <= DLL_SETTLE;
          end
          DLL_SETTLE:
            if (wait_cnt != 0) wait_cnt <= wait_cnt - 1'b1;
            else if (!measured)
              state <= DLL_MEASURE;
            else begin
              state <= locked ? DLL_TRACK : DLL_ACQUIRE;
              done  <= locked;
            end
          DLL_ACQUIRE:
            if (early || late) begin
              shift_left <= 1'b1;
              wait_cnt   <= WAIT_W'(SHIFT_WAIT);
              state      <= DLL_SETTLE;
            end else begin
              locked <= 1'b1;
              done   <= 1'b1;
              state  <= DLL_TRACK;
            end
          DLL_TRACK:
            if (early || late) begin
              shift_left  <= early;
              shift_right <= late;
              wait_cnt    <= WAIT_W'(SHIFT_WAIT);
              state       <= DLL_SETTLE;
            end
          default: state <= DLL_MEASURE;
        endcase
      end
    end
endmodule
