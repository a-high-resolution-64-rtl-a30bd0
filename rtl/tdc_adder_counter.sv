// tdc_adder_counter (AC): adds the outputs of all phase counters.
//
// The sum of the 64 channel counts is the number of 31.25 ps steps in the
// measured window, i.e. the converter's result (inst_soma). The published
// design gives only this function; here it is a purely combinational sum,
// which a synthesis tool maps to an adder tree. Its output settles a few
// nanoseconds after the last counter stops, and is only sampled (by the
// D-latch vector) once the window has closed and the counters are still.
//
// Interface: count[k] is channel k; sum is their total, SUM_W bits wide
// (the default 15 bits holds 64 x 255 with a bit to spare).
module tdc_adder_counter #(
  parameter int unsigned N_PHASES = 64,
  parameter int unsigned CNT_W    = 8,
  parameter int unsigned SUM_W    = 15
) (
  input  logic [N_PHASES-1:0][CNT_W-1:0] count,
  output logic [SUM_W-1:0]               sum
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    sum = '0;
    for (int k = 0; k < N_PHASES; k++) sum += SUM_W'(count[k]);
  end
endmodule
