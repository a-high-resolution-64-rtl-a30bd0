// tb_tdc_delta_time: exhaustive check of the start/stop window gate.
// All four input combinations are applied; tm must be high exactly when one
// pulse is high and the other low (the window between the two edges).
module tb_tdc_delta_time;
  timeunit 1ps;
  timeprecision 1fs;

  logic pulse_a, pulse_b, tm;
  int checks = 0, failures = 0;

  tdc_delta_time dut (.*);

  initial begin : watchdog
    #(1us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 4; v++) begin
        {pulse_a, pulse_b} = 2'(v);
        #10;
        checks++;
        if (tm !== ((v == 1) || (v == 2))) begin
          failures++;
          $display("FAIL: a=%0b b=%0b tm=%0b", pulse_a, pulse_b, tm);
        end
      end
    end
    // a start/stop sequence: window opens on A, closes on B
    pulse_a = 0; pulse_b = 0; #10;
    pulse_a = 1; #10;
    checks++; if (!tm) failures++;
    pulse_b = 1; #10;
    checks++; if (tm) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
