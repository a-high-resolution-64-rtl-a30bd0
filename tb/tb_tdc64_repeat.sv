// tb_tdc64_repeat: repeated 300 ns measurements from a square-wave source.
//
// Models a two-channel generator: pulse_a and pulse_b are square waves of
// period GEN_PERIOD, pulse_b delayed by 300 ns plus a random jitter of up to
// +/-2 LSB (62.5 ps). Both rise and fall, so each period also opens a
// trailing window between the falling edges; a host model reads end_soma
// after each sample_ena and pulses rst_sync once both pulses are low. The
// generator period is 1 us here, shorter than a real 10 kHz source, so the
// simulation stays short; the converter does nothing in between.
//
// Every sample is checked against the count of 31.25 ps instants inside its
// window, and the mean of all samples must be within 0.5 of
// 300 ns / 31.25 ps = 9600. The mean and standard deviation are printed.
module tb_tdc64_repeat;
  timeunit 1ps;
  timeprecision 1fs;
  import tdc64_pkg::*;

  localparam int      N_SAMPLES  = 200;
  localparam realtime GEN_PERIOD = 1_000_000.0;   // ps
  localparam longint  STEP_FS    = 31250;

  logic             reset, enable, rst_sync, pulse_a, pulse_b;
  logic             clk, delta_interval, sample_ena;
  logic [SUM_W-1:0] inst_soma, end_soma;

  int     checks = 0, failures = 0;
  int     n_trailing = 0, n_rsync = 0;
  longint t_ref;
  real    sum_x = 0.0, sum_x2 = 0.0;

  tdc64 dut (.*);

  function automatic longint now_fs();
    return longint'($realtime * 1000.0);
  endfunction

  function automatic longint fdiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(real'(N_SAMPLES + 10) * GEN_PERIOD);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ta, tb, exp_n, jit;
    realtime t_start;
    real mean, sd;
    reset = 1'b0; enable = 1'b1; rst_sync = 1'b0;
    pulse_a = 1'b0; pulse_b = 1'b0;
    #(10ns);
    reset = 1'b1;
    @(posedge clk);
    t_ref = now_fs();
    #(20_000.0 + 3.217);
    for (int i = 0; i < N_SAMPLES; i++) begin
      t_start = $realtime;
      jit = longint'($urandom_range(0, 125000)) - 62500;   // fs
      pulse_a = 1'b1;
      ta = now_fs();
      #(300_000.0 + real'(jit) / 1000.0);
      pulse_b = 1'b1;
      tb = now_fs();
      exp_n = fdiv(tb - t_ref - 1, STEP_FS) - fdiv(ta - t_ref, STEP_FS);
      @(posedge sample_ena);
      @(posedge clk);
      #1;
      check(end_soma == SUM_W'(exp_n),
            $sformatf("sample %0d: %0d expected %0d", i, end_soma, exp_n));
      sum_x  += real'(end_soma);
      sum_x2 += real'(end_soma) * real'(end_soma);
      // second half of the generator period: both fall 300 ns apart
      #(t_start + GEN_PERIOD / 2 - $realtime);
      pulse_a = 1'b0;
      #(300_000.0 + real'(jit) / 1000.0);
      pulse_b = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      if (inst_soma != '0) n_trailing++;
      // host clears the trailing window
      @(posedge clk);
      rst_sync = 1'b1;
      @(posedge clk);
      rst_sync = 1'b0;
      repeat (3) @(posedge clk);
      #1;
      check(inst_soma == '0 && end_soma == '0, "rst_sync clear");
      if (inst_soma == '0) n_rsync++;
      #(t_start + GEN_PERIOD + 0.013 * real'(i % 7) - $realtime);
    end
    mean = sum_x / N_SAMPLES;
    sd   = $sqrt(sum_x2 / N_SAMPLES - mean * mean);
    $display("samples=%0d mean=%0.3f sd=%0.3f resolution=%0.4f ps",
             N_SAMPLES, mean, sd, 300_000.0 / mean);
    check(mean > 9599.5 && mean < 9600.5, $sformatf("mean %0.3f", mean));
    check(n_trailing > 0, "trailing window never seen");
    check(n_rsync > 0, "rst_sync clear never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
