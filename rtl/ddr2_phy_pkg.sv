// Shared constants and types of the DDR2 PHY.
//
// The tap delay (TAP_PS) is the nominal delay of one delay-line element,
// two balanced NAND gates in series, at the typical corner and 27 C. All
// delay lines of the PHY (TDC, DTC_192, DTC_64, PDL, SDL) are built from
// this element. The widths of period_taps (9 bits) and deg90_taps (6 bits)
// follow the RCDLL description; the DFI address and bank widths are this
// design's own choice (a 1 Gb x8 DDR2 device needs 14 and 3).
`timescale 1ps/1ps
package ddr2_phy_pkg;

  localparam real TAP_PS_DEFAULT = 47.3;   // TT, 1.0 V, 27 C

  localparam int TDC_TAPS   = 256;         // TDC length
  localparam int DTC_TAPS   = 192;         // main DLL delay line
  localparam int SDL_TAPS   = 64;          // slave / programmable delay lines
  localparam int PERIOD_W   = 9;           // period_taps<8:0>
  localparam int TAPSEL_W   = 6;           // deg90_taps<5:0>, pdl_taps<5:0>

  localparam int DQ_BITS    = 8;           // one byte lane
  localparam int ADDR_W     = 14;
  localparam int BA_W       = 3;

  localparam int VOL_W      = 4;           // pull-down calibration code
  localparam int VOH_W      = 5;           // pull-up calibration code

  // RCDLL control FSM states
  typedef enum logic [2:0] {
    DLL_MEASURE,    // launch an edge into the TDC
    DLL_WAIT_CODE,  // wait for the sampled thermometer code
    DLL_LOAD,       // load deg90_taps into the slave delay lines
    DLL_SETTLE,     // let the new delays reach the feedback input
    DLL_ACQUIRE,    // first alignment: add delay until in the window
    DLL_TRACK       // locked: correct in both directions
  } dll_state_e;

  // Impedance-calibration binary-search FSM states
  typedef enum logic [1:0] {
    ZQ_IDLE,
    ZQ_READY,
    ZQ_SEARCH,
    ZQ_DONE
  } zq_state_e;

endpackage
