// tb_tdc64: end-to-end test of the 64-phase TDC at its default sizes.
//
// The reference clock is started, its first rising edge t_ref is observed,
// and intervals are then measured between a rising pulse_a and a rising
// pulse_b. The expected result is computed here from the nominal timing
// alone: phase k of the tree rises at t_ref + k x 31.25 ps + n x 2000 ps, so
// the phases together rise at every t_ref + j x 31.25 ps, and the result is
// the number of those instants strictly inside (t_a, t_b). Start and stop
// times carry odd femtosecond offsets so no edge ties with a pulse.
//
// Covered: the 300 ns interval of the design (64 x 150 = 9600); a sweep of
// 21 intervals from 290 to 310 ns in 1 ns steps with varying sub-step
// offsets; the latency from the stop to sample_ena (2-3 clk periods); the
// automatic counter clear after each capture; the rst_sync clear after a
// trailing XOR window; and gating of the oscillator by enable. Each of these
// mechanisms is counted and must happen at least once.
module tb_tdc64;
  timeunit 1ps;
  timeprecision 1fs;
  import tdc64_pkg::*;

  localparam longint STEP_FS   = 31250;     // 31.25 ps in fs
  localparam longint PERIOD_FS = 2000000;   // 2000 ps in fs

  logic             reset, enable, rst_sync, pulse_a, pulse_b;
  logic             clk, delta_interval, sample_ena;
  logic [SUM_W-1:0] inst_soma, end_soma;

  int checks = 0, failures = 0;
  int n_capture = 0, n_auto_clear = 0, n_rsync_clear = 0, n_gating = 0;
  longint t_ref;   // a rising edge of clk, fs

  tdc64 dut (.*);

  function automatic longint now_fs();
    return longint'($realtime * 1000.0);
  endfunction

  // floor division for possibly negative numerators
  function automatic longint fdiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  // phase edges strictly inside (ta, tb)
  function automatic longint expected_count(longint ta, longint tb);
    return (fdiv(tb - t_ref - 1, STEP_FS)) - fdiv(ta - t_ref, STEP_FS);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic find_ref();
    @(posedge clk);
    t_ref = now_fs();
  endtask

  // Measure one interval of interval_fs; start offset from a clk edge off_fs.
  task automatic measure(input longint interval_fs, input longint off_fs);
    longint ta, tb, exp_n, t_stop;
    int cyc;
    @(posedge clk);
    #(real'(off_fs) / 1000.0);
    pulse_a = 1'b1;
    ta = now_fs();
    #(real'(interval_fs) / 1000.0);
    pulse_b = 1'b1;
    tb = now_fs();
    t_stop = tb;
    exp_n = expected_count(ta, tb);
    // the nominal LSB count must be within one of interval / 31.25 ps
    check((exp_n - interval_fs / STEP_FS) <= 1 && (interval_fs / STEP_FS - exp_n) <= 1,
          "reference count far from interval / 31.25 ps");
    cyc = 0;
    while (!sample_ena && cyc < 10) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    check(sample_ena == 1'b1, "sample_ena did not come");
    check(cyc >= 2 && cyc <= 3,
          $sformatf("sample_ena after %0d clk edges, expected 2 or 3", cyc));
    check(inst_soma == SUM_W'(exp_n),
          $sformatf("inst_soma %0d expected %0d", inst_soma, exp_n));
    @(posedge clk);
    #1;
    check(sample_ena == 1'b0, "sample_ena longer than one cycle");
    check(end_soma == SUM_W'(exp_n),
          $sformatf("interval %0d fs: end_soma %0d expected %0d",
                    interval_fs, end_soma, exp_n));
    if (end_soma == SUM_W'(exp_n)) n_capture++;
    $display("interval %0.3f ps -> %0d (expected %0d), stop-to-sample %0d cycles",
             real'(interval_fs) / 1000.0, end_soma, exp_n, cyc);
    // counters clear automatically two cycles after the capture
    repeat (3) @(posedge clk);
    #1;
    check(inst_soma == '0, "counters not cleared after capture");
    check(end_soma == SUM_W'(exp_n), "result not held after counter clear");
    if (inst_soma == '0 && end_soma == SUM_W'(exp_n)) n_auto_clear++;
    // close the window with both pulses together: no trailing window
    pulse_a = 1'b0;
    pulse_b = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin : watchdog
    #(100us);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint iv;
    longint t0, t1;
    int edges;
    reset = 1'b0; enable = 1'b1; rst_sync = 1'b0;
    pulse_a = 1'b0; pulse_b = 1'b0;
    #(10ns);
    check(end_soma == '0 && inst_soma == '0, "not cleared by reset");
    reset = 1'b1;
    find_ref();
    // oscillator period
    t0 = now_fs();
    @(posedge clk);
    t1 = now_fs();
    check(t1 - t0 == PERIOD_FS, $sformatf("clk period %0d fs", t1 - t0));
    repeat (4) @(posedge clk);

    // the design's reference measurement: 300 ns -> 9600
    measure(64'd300_000_000 + 7_123, 64'd250_321);
    check(end_soma == 15'd9600, $sformatf("300 ns gave %0d, expected 9600", end_soma));

    // linearity sweep, 290 ns to 310 ns in 1 ns steps
    for (int i = 0; i <= 20; i++) begin
      iv = 64'd290_000_000 + longint'(i) * 1_000_000 + longint'($urandom_range(1, 31249));
      measure(iv, longint'($urandom_range(1, 1999)) * 1000 + 17);
    end

    // trailing window: pulses fall one after the other, counters collect it
    @(posedge clk);
    pulse_a = 1'b1;
    #(40ns);
    pulse_b = 1'b1;
    wait (sample_ena);
    repeat (6) @(posedge clk);
    pulse_a = 1'b0;
    #(40ns);
    pulse_b = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(inst_soma != '0, "trailing window not counted");
    @(posedge clk);
    rst_sync = 1'b1;
    @(posedge clk);
    rst_sync = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(inst_soma == '0 && end_soma == '0, "rst_sync did not clear");
    if (inst_soma == '0 && end_soma == '0) n_rsync_clear++;

    // oscillator gating: no clk edges while enable is low
    enable = 1'b0;
    #(3ns);
    edges = 0;
    fork
      begin : count_edges
        forever begin @(posedge clk); edges++; end
      end
      #(50ns);
    join_any
    disable fork;
    check(edges == 0, $sformatf("%0d clk edges while disabled", edges));
    enable = 1'b1;
    find_ref();
    @(posedge clk);
    check(now_fs() - t_ref == PERIOD_FS, "clk period after re-enable");
    if (edges == 0 && now_fs() - t_ref == PERIOD_FS) n_gating++;
    // phase relation is new after the restart: measure again
    repeat (4) @(posedge clk);
    measure(64'd300_000_000 + 11_777, 64'd1_234_567);

    check(n_capture > 0,     "no capture observed");
    check(n_auto_clear > 0,  "no automatic clear observed");
    check(n_rsync_clear > 0, "no rst_sync clear observed");
    check(n_gating > 0,      "no oscillator gating observed");
    $display("mechanisms: capture=%0d auto_clear=%0d rst_sync_clear=%0d gating=%0d",
             n_capture, n_auto_clear, n_rsync_clear, n_gating);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
