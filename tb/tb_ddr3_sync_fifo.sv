// tb_ddr3_sync_fifo: random push/pop test of the FIFO against a queue model.
// Checks head data, full, empty and count every cycle, including pushes into
// a full FIFO and pops from an empty one being ignored (assertions are turned
// off around those on purpose).
module tb_ddr3_sync_fifo;
  localparam int WIDTH = 64, DEPTH = 8;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, full, empty;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [WIDTH-1:0] q [$];

  ddr3_sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  initial begin
    $assertoff;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == q.size(), $sformatf("count %0d expected %0d", count, q.size()));
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() != 0) check(rdata == q[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      // phases biased towards filling and towards draining
      push  = ($urandom_range(0, 99) < ((i / 200) % 2 ? 70 : 30));
      pop   = ($urandom_range(0, 99) < ((i / 200) % 2 ? 30 : 70));
      wdata = {$urandom, $urandom};
      @(posedge clk);
      begin
        int n_before;
        n_before = q.size();
        if (pop && n_before != 0) void'(q.pop_front());
        if (push && n_before < DEPTH) q.push_back(wdata);
      end
    end
    check(n_full > 0 && n_empty > 0, "both full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
