// tb_tdc_clock_gen: checks the ring oscillator model.
// While rst_n is low clk must stay low. After release the first rising edge
// must come at once (the inverter output is already high) and every period must be 2000 ps with 1000 ps high
// (500 MHz, 50 % duty). With enable low there must be no edges; with enable
// high again oscillation resumes at the same period.
module tb_tdc_clock_gen;
  timeunit 1ps;
  timeprecision 1fs;

  logic rst_n, enable, clk;
  int checks = 0, failures = 0;
  int edges;
  realtime t1, t2;

  tdc_clock_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(2us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; enable = 1;
    #(10ns);
    check(clk == 1'b0, "clk not low in reset");
    rst_n = 1;
    #1;
    check(clk == 1'b1, "no rising edge at reset release");
    #(998.0);
    check(clk == 1'b1, "first high phase shorter than 1000 ps");
    #(2.0);
    check(clk == 1'b0, "first high phase longer than 1000 ps");
    @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      t1 = $realtime;
      @(negedge clk);
      t2 = $realtime;
      @(posedge clk);
      check(t2 - t1 == 1000.0, $sformatf("high time %0.3f ps", t2 - t1));
      check($realtime - t1 == 2000.0, $sformatf("period %0.3f ps", $realtime - t1));
    end
    enable = 0;
    #(500);
    edges = 0;
    fork
      forever begin @(clk); edges++; end
      #(40ns);
    join_any
    disable fork;
    check(edges == 0, $sformatf("%0d edges while disabled", edges));
    enable = 1;
    @(posedge clk);
    t1 = $realtime;
    @(posedge clk);
    check($realtime - t1 == 2000.0, "period after re-enable");
    rst_n = 0;
    #(1);
    check(clk == 1'b0, "reset does not force clk low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
