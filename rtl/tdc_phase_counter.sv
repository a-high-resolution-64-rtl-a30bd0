// tdc_phase_counter: one channel of the counter set.
//
// A CNT_W-bit up-counter clocked by a single phase clock. On each rising
// edge of that clock it adds one while the Time Measured window (tm) is
// high, so after the window it holds the number of its clock's rising edges
// that fell inside it. It wraps at 2^CNT_W (no saturation; the published
// design does not describe one). clr is a synchronous clear in this clock's
// domain and wins over counting; rst_n clears asynchronously.
//
// tm arrives asynchronously, exactly as in the published design: the
// measurement is the very act of sampling it. In hardware a sample taken
// during a transition of tm resolves to either count, which is the +/-1 LSB
// quantisation of the converter.
module tdc_phase_counter #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,    // one phase of the clock tree
  input  logic             rst_n,  // asynchronous, active low
  input  logic             clr,    // synchronous clear, active high
  input  logic             tm,     // count enable (Time Measured)
  output logic [CNT_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (tm)  count <= count + 1'b1;
  end
endmodule
