// tdc64: 64-phase counter time-to-digital converter, 31.25 ps LSB.
//
// A 500 MHz ring oscillator (CG) drives a tree of 64 clocks spaced 31.25 ps
// apart (MPC). The interval between the rising edges of pulse_a (start) and
// pulse_b (stop) becomes a window, Time Measured, by an XOR (DT). Each of 64
// 8-bit counters (CS) counts the rising edges of its own phase inside the
// window; their sum (AC) is the interval in units of 2000 ps / 64. A single
// pulse after the stop (SP) captures the sum into the output register (DV).
// A 300 ns interval gives 64 x 150 = 9600.
//
// The blocks and their connections are the published ones. This design adds
// the control of the counter clear: two clk cycles after each capture the
// counters are cleared automatically (so the next measurement starts from
// zero while end_soma holds the result), and an external rst_sync clears
// both the counters and the held result. Both clears are stretched to two
// reference periods so every phase domain sees one.
//
// Interface:
//   reset      active-low asynchronous reset of the oscillator and all flops
//   enable     oscillator enable (high: running)
//   rst_sync   synchronous clear, active high, at least one clk cycle
//   pulse_a/b  start / stop events, asynchronous, active on the rising edge
//   clk        the 500 MHz reference (CLK0), brought out for the host
//   delta_interval  the measurement window
//   inst_soma  the running sum of the counters
//   sample_ena one clk cycle, 2-3 cycles after the stop edge
//   end_soma   the result, valid from the clk edge after sample_ena
// Operation: pulse_a rises, pulse_b rises 0.03-510 ns later (each counter
// holds at most 255 counts); end_soma updates about 6-8 ns after pulse_b.
// Before the next start, the window must be closed with no trailing window
// counted: lower both pulses together, or pulse rst_sync after they fall.
module tdc64
  import tdc64_pkg::*;
(
  input  logic             reset,
  input  logic             enable,
  input  logic             rst_sync,
  input  logic             pulse_a,
  input  logic             pulse_b,
  output logic             clk,
  output logic             delta_interval,
  output logic [SUM_W-1:0] inst_soma,
  output logic             sample_ena,
  output logic [SUM_W-1:0] end_soma
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_PHASES-1:0]            clk_ph;
  logic [N_PHASES-1:0][CNT_W-1:0] count;
  logic [1:0]                     capt_d;   // cycles after a capture
  logic [1:0]                     rsync_d;  // stretched rst_sync
  logic                           cs_clr;

  tdc_delta_time u_dt (
    .pulse_a (pulse_a),
    .pulse_b (pulse_b),
    .tm      (delta_interval)
  );

  tdc_clock_gen u_cg (
    .rst_n  (reset),
    .enable (enable),
    .clk    (clk)
  );

  tdc_multiphase_clock #(
    .N_PHASES   (N_PHASES),
    .CLK_PERIOD (CLK_PERIOD)
  ) u_mpc (
    .clk_in (clk),
    .clk_ph (clk_ph)
  );

  tdc_counter_set #(
    .N_PHASES (N_PHASES),
    .CNT_W    (CNT_W)
  ) u_cs (
    .clk_ph (clk_ph),
    .rst_n  (reset),
    .clr    (cs_clr),
    .tm     (delta_interval),
    .count  (count)
  );

  tdc_adder_counter #(
    .N_PHASES (N_PHASES),
    .CNT_W    (CNT_W),
    .SUM_W    (SUM_W)
  ) u_ac (
    .count (count),
    .sum   (inst_soma)
  );

  tdc_single_pulse u_sp (
    .clk        (clk),
    .rst_n      (reset),
    .pulse_b    (pulse_b),
    .sample_ena (sample_ena)
  );

  tdc_dlatch_vector #(
    .SUM_W (SUM_W)
  ) u_dv (
    .clk        (clk),
    .rst_n      (reset),
    .rst_sync   (rst_sync),
    .sample_ena (sample_ena),
    .inst_soma  (inst_soma),
    .end_soma   (end_soma)
  );

  // Counter clear: two cycles after each capture, or two after rst_sync.
  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      capt_d  <= '0;
      rsync_d <= '0;
    end else begin
      capt_d  <= {capt_d[0], sample_ena};
      rsync_d <= {rsync_d[0], rst_sync};
    end
  end

  assign cs_clr = (|capt_d) | (|rsync_d);
endmodule
