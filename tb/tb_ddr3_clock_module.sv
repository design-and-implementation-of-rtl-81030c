// tb_ddr3_clock_module: measures the generated clocks against the 2x input
// clock: clk has twice the input period with a 50% duty cycle, clk_90 lags
// clk by a quarter of its period, ext_clk/ext_clk_n are clk and its
// complement, and rst_n is low during reset and rises two clk edges after it.
module tb_ddr3_clock_module;
  logic clk_in = 0, reset_n = 1;
  always #2 clk_in = ~clk_in;           // 4 time units per input period
  logic clk, clk_90, ext_clk, ext_clk_n, rst_n;
  int checks = 0, failures = 0;

  ddr3_clock_module dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  realtime t_clk_rise, t_clk_fall, t_90_rise, t_prev_rise;
  int n_edges = 0;

  initial begin
    #1 reset_n = 0;
    #20;
    check(!rst_n, "rst_n low in reset");
    check(!clk && !clk_90, "clocks stopped low in reset");
    @(negedge clk_in);
    reset_n = 1;
    @(posedge clk);
    check(!rst_n, "rst_n still low after one clk edge");
    @(posedge clk);
    #0.1 check(rst_n, "rst_n high after two clk edges");
    t_prev_rise = $realtime - 0.1;
    for (int i = 0; i < 50; i++) begin
      @(posedge clk);
      t_clk_rise = $realtime;
      check(t_clk_rise - t_prev_rise == 8.0, $sformatf("clk period %0.2f", t_clk_rise - t_prev_rise));
      t_prev_rise = t_clk_rise;
      @(posedge clk_90);
      t_90_rise = $realtime;
      check(t_90_rise - t_clk_rise == 2.0, $sformatf("clk_90 lag %0.2f", t_90_rise - t_clk_rise));
      @(negedge clk);
      t_clk_fall = $realtime;
      check(t_clk_fall - t_clk_rise == 4.0, "clk duty cycle");
      check(ext_clk == clk && ext_clk_n == !clk, "memory clock pair");
      @(negedge clk_90);
      check($realtime - t_clk_fall == 2.0, "clk_90 falling lag");
      check(ext_clk == clk && ext_clk_n == !clk, "memory clock pair (low)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
