// tb_ddr3_delay_counter: loads random wait values and checks that `done`
// rises exactly N cycles after the load (next cycle for N = 0 or 1), stays
// low before that, and that a new load restarts the count.
module tb_ddr3_delay_counter;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic load = 0, done;
  logic [17:0] value = '0;
  int checks = 0, failures = 0;

  ddr3_delay_counter #(.WIDTH(18)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    check(done, "done after reset");
    for (int t = 0; t < 60; t++) begin
      int n, expect_n;
      n = (t < 5) ? t : $urandom_range(0, (t % 10 == 0) ? 3000 : 40);
      if (t == 7) n = 200000;
      expect_n = (n == 0) ? 1 : n;
      load = 1; value = 18'(n);
      @(negedge clk);
      load = 0;
      for (int c = 1; c < expect_n; c++) begin
        check(!done, $sformatf("done early: N=%0d at cycle %0d", n, c));
        @(negedge clk);
      end
      check(done, $sformatf("done on time for N=%0d", n));
      if (t == 10) begin               // reload while counting
        load = 1; value = 18'd20;
        @(negedge clk);
        load = 0; value = 18'd5;
        repeat (3) @(negedge clk);
        load = 1;
        @(negedge clk);
        load = 0;
        repeat (4) begin check(!done, "reload restarts"); @(negedge clk); end
        check(done, "reload done after 5");
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
