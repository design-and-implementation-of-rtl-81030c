// tb_ddr3_refresh_ctrl: checks that a refresh request appears exactly every
// T_REFI cycles once enabled, that acknowledged requests are removed, that
// unanswered ones accumulate up to MAX_OWED (ref_urgent) and no further, and
// that nothing is requested while disabled.
module tb_ddr3_refresh_ctrl;
  localparam int T_REFI = 50, MAX_OWED = 8;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic enable = 0, ref_ack = 0, ref_req, ref_urgent;
  int checks = 0, failures = 0;

  ddr3_refresh_ctrl #(.T_REFI(T_REFI), .MAX_OWED(MAX_OWED)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  initial begin
    int c;
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (3 * T_REFI) begin @(negedge clk); check(!ref_req, "no request while disabled"); end
    enable = 1;
    // answer each request at once: a request every T_REFI cycles
    c = 0;
    begin
      int last;
      last = -1;
      for (int k = 0; k < 6 * T_REFI + 5; k++) begin
        @(negedge clk);
        c++;
        ref_ack = 0;
        if (ref_req) begin
          if (last < 0) check(c == T_REFI, $sformatf("first request after %0d cycles", c));
          else          check(c - last == T_REFI, $sformatf("interval %0d cycles", c - last));
          last    = c;
          ref_ack = 1;
        end
      end
      check(last > 5 * T_REFI, "requests kept coming");
      @(negedge clk);
      ref_ack = 0;
    end
    // stop answering: requests pile up to MAX_OWED
    repeat ((MAX_OWED + 3) * T_REFI) @(negedge clk);
    check(ref_req && ref_urgent, "urgent after MAX_OWED intervals");
    for (int i = 0; i < MAX_OWED; i++) begin
      check(ref_req, $sformatf("owed refresh %0d still requested", i));
      ref_ack = 1; @(negedge clk); ref_ack = 0;
      if (i == 0) check(!ref_urgent, "urgent clears after one ack");
    end
    check(!ref_req, "owed count saturated at MAX_OWED");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
