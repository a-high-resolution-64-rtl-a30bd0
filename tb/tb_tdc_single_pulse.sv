// tb_tdc_single_pulse: checks the one-cycle sample pulse after pulse_b.
// pulse_b rises at random points of the 2000 ps clock period; sample_ena
// must then be high for exactly one clk cycle, its rising clk edge being the
// 2nd or 3rd after pulse_b. A falling pulse_b and a pulse_b held high must
// give no further pulse.
module tb_tdc_single_pulse;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n, pulse_b, sample_ena;
  int checks = 0, failures = 0;
  int high_cycles, first_cycle;

  tdc_single_pulse dut (.*);

  always #(1000.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // watch 8 clk edges after a change of pulse_b
  task automatic observe();
    high_cycles = 0;
    first_cycle = -1;
    for (int c = 1; c <= 8; c++) begin
      @(posedge clk);
      #1;
      if (sample_ena) begin
        high_cycles++;
        if (first_cycle < 0) first_cycle = c;
      end
    end
  endtask

  initial begin : watchdog
    #(5us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pulse_b = 1'b0;
    #(5000.0);
    rst_n = 1'b1;
    check(sample_ena == 1'b0, "pulse without input");
    for (int i = 0; i < 20; i++) begin
      @(posedge clk);
      #(real'($urandom_range(1, 1999)) + 0.5);
      pulse_b = 1'b1;
      observe();
      check(high_cycles == 1, $sformatf("sample_ena high for %0d cycles", high_cycles));
      check(first_cycle == 2 || first_cycle == 3,
            $sformatf("sample_ena on clk edge %0d after pulse_b", first_cycle));
      pulse_b = 1'b0;
      observe();
      check(high_cycles == 0, "pulse on falling pulse_b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
