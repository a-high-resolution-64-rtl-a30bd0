// tdc_multiphase_clock (MPC): behavioural model of the 64-phase clock tree.
//
// This is a behavioural model: in the FPGA the phases come from buffers whose
// routing delays were tuned by hand, which no synthesizable description can
// reproduce. Phase k has its rising edge k x PHASE_STEP after that of CLK0:
//   - CLK0 is the reference clock itself;
//   - CLK(N/2) is the inverted reference (180 degrees);
//   - CLK1 .. CLK(N/2-1) are the reference delayed by k x PHASE_STEP;
//   - CLK(N/2+1) .. CLK(N-1) are the inverted reference delayed by
//     (k - N/2) x PHASE_STEP.
// With N = 64 and a 2000 ps period the step is 31.25 ps, or 5.625 degrees:
// half a period divided into 32 equal parts. The split into one inversion
// and delayed copies is the published one; taking the upper half as delayed
// copies of the inverted clock (so no buffer is longer than half a period)
// is this model's choice.
//
// Interface: clk_in is the reference; clk_ph[k] is phase k. Delays are
// transport delays, so every phase keeps the reference duty cycle.
module tdc_multiphase_clock #(
  parameter int unsigned N_PHASES   = 64,      // number of phases (even)
  parameter realtime     CLK_PERIOD = 2000.0   // ps, reference period
) (
  input  logic                clk_in,
  output logic [N_PHASES-1:0] clk_ph
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned HALF = N_PHASES / 2;
  localparam realtime     STEP = CLK_PERIOD / N_PHASES;

  logic clk_inv;
  assign clk_inv = ~clk_in;

  assign clk_ph[0]    = clk_in;
  assign clk_ph[HALF] = clk_inv;

  for (genvar k = 1; k < HALF; k++) begin : g_buf
    // delay buffer for phase k and for phase k + N/2
    always @(clk_in)  clk_ph[k]        <= #(k * STEP) clk_in;
    always @(clk_inv) clk_ph[HALF + k] <= #(k * STEP) clk_inv;
  end
endmodule
