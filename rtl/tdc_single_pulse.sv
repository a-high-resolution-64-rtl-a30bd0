// tdc_single_pulse (SP): one-cycle pulse after the stop event.
//
// Pulse B (the stop) is asynchronous to the reference clock, so it passes a
// two-flop synchroniser; a third flop keeps its previous value and the
// output sample_ena is high for exactly one clk cycle after each rising edge
// of Pulse B. The published design gives the function (a momentary pulse
// after Pulse B that marks the end of the measurement and triggers the
// capture of the result); the synchroniser and edge detector are this
// design's choice.
//
// Timing: sample_ena rises on the 3rd rising clk edge after Pulse B rises
// (2 to 3 clk periods, 4 to 6 ns at 500 MHz), long after every phase counter
// has stopped. rst_n clears the flops asynchronously. An assertion checks
// that the strobe never lasts more than one cycle.
module tdc_single_pulse (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_b,
  output logic sample_ena
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [2:0] sync;   // [0],[1]: synchroniser, [2]: previous level

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], pulse_b};
  end

  assign sample_ena = sync[1] & ~sync[2];

  // sample_ena is a single-cycle strobe: never high on two edges in a row
  a_single_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                   sample_ena |=> !sample_ena);
endmodule
