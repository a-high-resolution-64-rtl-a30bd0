// tdc_counter_set (CS): the 64 independent phase counters.
//
// Channel k is an 8-bit counter clocked by phase clock k and enabled by the
// Time Measured window, as in the published design. Each counter sees the
// same window through a clock shifted by k/64 of a period, so together they
// count every 31.25 ps step of the window (Equation: resolution = clock
// period / number of phases).
//
// Interface: clk_ph[k] clocks channel k; count[k] is its value. clr is a
// clear that must be held for at least one full reference period so every
// phase domain sees it on one of its edges (tdc64 holds it for two).
// rst_n clears all counters asynchronously.
module tdc_counter_set #(
  parameter int unsigned N_PHASES = 64,
  parameter int unsigned CNT_W    = 8
) (
  input  logic [N_PHASES-1:0]            clk_ph,
  input  logic                           rst_n,
  input  logic                           clr,
  input  logic                           tm,
  output logic [N_PHASES-1:0][CNT_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar k = 0; k < N_PHASES; k++) begin : g_ch
    tdc_phase_counter #(.CNT_W(CNT_W)) u_cnt (
      .clk   (clk_ph[k]),
      .rst_n (rst_n),
      .clr   (clr),
      .tm    (tm),
      .count (count[k])
    );
  end
endmodule
