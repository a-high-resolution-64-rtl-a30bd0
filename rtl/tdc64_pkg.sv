// tdc64_pkg: sizes and nominal timing shared by the 64-phase counter TDC.
//
// The phase count, the 500 MHz reference clock and the 8-bit counters are
// the design's published figures. The 15-bit width of the sum follows the
// width of the result bus of the hardware build; 14 bits would already hold
// 64 x 255. Times are in picoseconds.
package tdc64_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_PHASES     = 64;     // phase clocks and counters
  localparam int unsigned CNT_W        = 8;      // width of each phase counter
  localparam int unsigned SUM_W        = 15;     // width of the summed result
  localparam realtime     CLK_PERIOD   = 2000.0; // 500 MHz reference, ps
  // phase step = CLK_PERIOD / N_PHASES = 31.25 ps (5.625 degrees)
endpackage
