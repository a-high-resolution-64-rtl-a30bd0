// tb_tdc_counter_set: checks the 64 phase counters against an edge count.
// The testbench makes 64 ideal phase clocks itself (phase k first rises at
// T0 + k x 31.25 ps, period 2000 ps) and opens the count window tm between
// two chosen instants. Each counter must then hold the number of rising
// edges of its own phase inside the window. Also checked: the synchronous
// clear, counting held off while tm is low, and wrap-around at 256.
module tb_tdc_counter_set;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 64;
  localparam int W = 8;
  localparam realtime T0 = 5000.0;

  logic [N-1:0]        clk_ph;
  logic                rst_n, clr, tm;
  logic [N-1:0][W-1:0] count;
  int checks = 0, failures = 0;

  tdc_counter_set dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_clk
    initial begin
      clk_ph[k] = 1'b0;
      #(T0 + k * 31.25);
      forever begin
        clk_ph[k] = 1'b1;
        #(1000.0);
        clk_ph[k] = 1'b0;
        #(1000.0);
      end
    end
  end

  // rising edges of phase k strictly inside (ta, tb)
  function automatic int edges_in(int k, realtime ta, realtime tb);
    int n = 0;
    for (realtime t = T0 + k * 31.25; t < tb; t += 2000.0)
      if (t > ta) n++;
    return n;
  endfunction

  task automatic window(input realtime ta, input realtime tb);
    #(ta - $realtime);
    tm = 1'b1;
    #(tb - ta);
    tm = 1'b0;
    #(4000.0);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (count[k] != W'(edges_in(k, ta, tb))) begin
        failures++;
        $display("FAIL: counter %0d = %0d expected %0d", k, count[k],
                 W'(edges_in(k, ta, tb)));
      end
    end
  endtask

  task automatic clear();
    @(posedge clk_ph[0]);
    clr = 1'b1;
    #(2500.0);
    clr = 1'b0;
    #(100.0);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (count[k] != '0) begin failures++; $display("FAIL: counter %0d not cleared", k); end
    end
  endtask

  initial begin : watchdog
    #(10us);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0; tm = 1'b0;
    #(1000.0);
    rst_n = 1'b1;
    #(9000.0);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (count[k] != '0) begin failures++; $display("FAIL: counter %0d counted with tm low", k); end
    end
    window(20_010.3, 320_017.9);         // 300 ns: 150 per counter
    for (int k = 0; k < N; k++) begin
      checks++;
      if (count[k] != 8'd150) failures++;
    end
    clear();
    window(330_000.1 + 513.7, 330_000.1 + 513.7 + 17_777.7);
    clear();
    window(360_000.4, 360_000.4 + 600_000.0);  // 300 edges: wraps to 44
    checks++;
    if (count[0] != 8'd44) begin failures++; $display("FAIL: no wrap, %0d", count[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
