// tb_tdc_dlatch_vector: checks capture and hold of the result register.
// Random values are driven on inst_soma; end_soma must take the value
// present at a clk edge with sample_ena high, keep it while inst_soma moves
// on, and be cleared by rst_sync and by rst_n.
module tb_tdc_dlatch_vector;
  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 1'b0, rst_n, rst_sync, sample_ena;
  logic [14:0] inst_soma, end_soma, held;
  int checks = 0, failures = 0;

  tdc_dlatch_vector dut (.*);

  always #(1000.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(5us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rst_sync = 1'b0; sample_ena = 1'b0; inst_soma = 15'd1234;
    #(3000.0);
    check(end_soma == '0, "not cleared by rst_n");
    rst_n = 1'b1;
    held = '0;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      inst_soma  = 15'($urandom);
      sample_ena = ($urandom_range(0, 2) == 0);
      if (sample_ena) held = inst_soma;
      @(posedge clk);
      #1;
      check(end_soma == held, $sformatf("end_soma %0d expected %0d", end_soma, held));
    end
    @(negedge clk);
    sample_ena = 1'b1; inst_soma = 15'd9600;
    @(negedge clk);
    sample_ena = 1'b0; inst_soma = 15'd0;
    repeat (3) @(negedge clk);
    check(end_soma == 15'd9600, "result not held");
    rst_sync = 1'b1;
    @(negedge clk);
    rst_sync = 1'b0;
    check(end_soma == '0, "not cleared by rst_sync");
    sample_ena = 1'b1; inst_soma = 15'd77;
    @(negedge clk);
    sample_ena = 1'b0;
    rst_n = 1'b0;
    #1;
    check(end_soma == '0, "rst_n not asynchronous");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
