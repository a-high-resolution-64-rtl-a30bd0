// tdc_dlatch_vector (DV): holds the final result of a measurement.
//
// On a rising clk edge with sample_ena high the running sum (inst_soma) is
// copied into end_soma, which then holds it until the next capture; this is
// the value read out by the host. The published block is named a D-latch
// vector but is drawn with a clock input; it is written here as a bank of
// enabled flip-flops, which avoids latches in the fabric. rst_n (asynchronous)
// and rst_sync (synchronous, active high) both clear the held value.
//
// Timing: end_soma changes one clk period after sample_ena is seen.
module tdc_dlatch_vector #(
  parameter int unsigned SUM_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rst_sync,
  input  logic             sample_ena,
  input  logic [SUM_W-1:0] inst_soma,
  output logic [SUM_W-1:0] end_soma
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          end_soma <= '0;
    else if (rst_sync)   end_soma <= '0;
    else if (sample_ena) end_soma <= inst_soma;
  end
endmodule
