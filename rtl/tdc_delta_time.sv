// tdc_delta_time (DT): turns the two event pulses into the measurement window.
//
// Time Measured (TM) is the exclusive-OR of Pulse A (start) and Pulse B
// (stop): it is high from the rising edge of A to the rising edge of B,
// and it is the count enable of every phase counter. The XOR gate is the
// design's own; it is purely combinational and has no clock.
//
// Note that an XOR also opens a second window between the falling edges of
// A and B when both pulses return low one after the other. The converter
// samples only after the rising edge of B, so counts of such a trailing
// window must be cleared with rst_sync before the next start (see tdc64).
module tdc_delta_time (
  input  logic pulse_a,   // start event (Pulse A)
  input  logic pulse_b,   // stop event (Pulse B)
  output logic tm         // Time Measured window (delta_interval)
);
  timeunit 1ps;
  timeprecision 1fs;

  assign tm = pulse_a ^ pulse_b;
endmodule
