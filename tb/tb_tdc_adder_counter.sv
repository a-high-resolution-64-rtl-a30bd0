// tb_tdc_adder_counter: checks the 64-input sum against a reference sum.
// Corner cases (all zero, all 150 = the 300 ns result 9600, all 255) and
// random count vectors are applied; the sum must match a sum computed in
// the testbench with wide integers.
module tb_tdc_adder_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 64;
  logic [N-1:0][7:0] count;
  logic [14:0]       sum;
  int checks = 0, failures = 0;

  tdc_adder_counter dut (.*);

  task automatic apply_and_check();
    int ref_sum = 0;
    for (int k = 0; k < N; k++) ref_sum += int'(count[k]);
    #10;
    checks++;
    if (int'(sum) != ref_sum) begin
      failures++;
      $display("FAIL: sum %0d expected %0d", sum, ref_sum);
    end
  endtask

  initial begin : watchdog
    #(1us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count = '0;                                   apply_and_check();
    for (int k = 0; k < N; k++) count[k] = 8'd150; apply_and_check();
    checks++; if (sum != 15'd9600) failures++;
    for (int k = 0; k < N; k++) count[k] = 8'd255; apply_and_check();
    checks++; if (sum != 15'd16320) failures++;
    for (int i = 0; i < 40; i++) begin
      for (int k = 0; k < N; k++) count[k] = 8'($urandom);
      apply_and_check();
    end
    for (int k = 0; k < N; k++) count[k] = (k == 37) ? 8'd1 : 8'd0;
    apply_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
