// tb_tdc_multiphase_clock: checks the spacing of the 64 phase clocks.
// A 500 MHz reference is applied. For each phase k the time of its rising
// edge after a reference rising edge must be k x 31.25 ps (modulo the
// period), and each phase must stay high for 1000 ps.
module tb_tdc_multiphase_clock;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 64;
  logic          clk_in = 1'b0;
  logic [N-1:0]  clk_ph;
  int checks = 0, failures = 0;
  realtime t_rise [N];
  realtime t_fall [N];
  realtime t_ref;

  tdc_multiphase_clock dut (.*);

  always #(1000.0) clk_in = ~clk_in;

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge clk_ph[k]) t_rise[k] = $realtime;
    always @(negedge clk_ph[k]) t_fall[k] = $realtime;
  end

  initial begin : watchdog
    #(1us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk_in);
    t_ref = $realtime;
    #(1990.0);   // every phase has risen once after t_ref
    for (int k = 0; k < N; k++) begin
      checks++;
      if (t_rise[k] - t_ref != k * 31.25) begin
        failures++;
        $display("FAIL: phase %0d rises %0.3f ps after CLK0", k, t_rise[k] - t_ref);
      end
    end
    #(2000.0);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (t_fall[k] - t_rise[k] != 1000.0 && t_rise[k] - t_fall[k] != 1000.0) begin
        failures++;
        $display("FAIL: phase %0d high time wrong", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
