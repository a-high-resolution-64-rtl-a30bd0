// tdc_clock_gen (CG): behavioural model of the 500 MHz gated ring oscillator.
//
// This is a behavioural model, not synthesizable logic: the oscillation
// period comes from propagation delays that only exist in the FPGA fabric.
// The structure follows the published one: three D-latches in a ring, each
// with an active-low asynchronous reset and an active-high enable (gate),
// and the ring closed through one inverter in a delay chain of INV_DELAY
// (1000 ps). The latches are modelled with zero delay, so the half period is
// INV_DELAY and the output runs at 1 / (2 x 1000 ps) = 500 MHz.
//
// The ring is by design a combinational loop through three level-sensitive
// latches: synthesis tools report the loop and the latches, and that is the
// oscillator itself, not a fault. On an FPGA it needs the loop to be kept
// (no optimisation across the latches) and its delay constrained.
//
// Interface: rst_n low forces all latches to 0 and stops the ring; enable
// low freezes the latches (the ring stalls at its present level). clk is the
// output of the third latch. In reset the latches hold 0 and the inverter
// presents 1, so the first rising edge of clk comes as soon as rst_n and
// enable are both high; edges then follow every INV_DELAY.
module tdc_clock_gen #(
  parameter realtime INV_DELAY = 1000.0   // ps, delay of the inverter chain
) (
  input  logic rst_n,    // asynchronous, active low
  input  logic enable,   // latch gate, active high
  output logic clk       // 500 MHz reference (CLK0 source)
);
  timeunit 1ps;
  timeprecision 1fs;

  logic q1, q2, q3;      // the three latch outputs
  logic inv_out;         // inverter output after the delay chain

  // Delay chain with the single inverter: transport delay of INV_DELAY.
  initial inv_out = 1'b1;
  always @(q3) inv_out <= #(INV_DELAY) ~q3;

  // Three transparent-high D-latches with asynchronous active-low reset.
  always_latch begin
    if (!rst_n)      q1 = 1'b0;
    else if (enable) q1 = inv_out;
  end
  always_latch begin
    if (!rst_n)      q2 = 1'b0;
    else if (enable) q2 = q1;
  end
  always_latch begin
    if (!rst_n)      q3 = 1'b0;
    else if (enable) q3 = q2;
  end

  assign clk = q3;
endmodule
