// tb_ddr3_queue_control: host protocol and FIFOs of the queue control.
// A random host issues reads and writes whenever busy is low and supplies
// write words on d_req; a slow random consumer pops the command/address and
// write data heads. Checks: command codes (01 normal read, 10 write, 11 fast
// read, 00 fast write) and burst-chop flag, addresses and write words with
// masks come out in order; d_req is high for exactly 4 (or 2) cycles per
// write; busy is seen high when the queues fill; words pushed into the read
// FIFO come out on dataout with r_valid in order; w_valid follows w_done.
module tb_ddr3_queue_control;
  import ddr3_pkg::*;
  localparam int DQ_W = 32, ADDR_W = 27, DEPTH = 8, MW = 2 * DQ_W / 8;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] raddr = '0, addr_head;
  logic [3:0] b_size = 8;
  logic r_req = 0, w_req = 0, fast = 0;
  logic [2*DQ_W-1:0] datain = '0, dataout, wf_data, rf_data = '0;
  logic [MW-1:0] dm_in = '0, wf_mask;
  logic busy, d_req, r_valid, w_valid, cmd_empty, cmd_pop = 0, w_done = 0, wf_pop = 0, rf_push = 0;
  cmd_entry_t cmd_head;
  logic [$clog2(DEPTH+1)-1:0] wr_words;

  ddr3_queue_control #(.DQ_W(DQ_W), .ADDR_W(ADDR_W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_busy = 0, n_dreq = 0, exp_dreq = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  cmd_entry_t        ec [$];
  logic [ADDR_W-1:0] ea [$];
  logic [2*DQ_W+MW-1:0] ew [$];
  logic [2*DQ_W-1:0] er [$];
  int words_due = 0;

  // host, acting at the falling edge
  always @(negedge clk) if (rst_n) begin
    r_req = 0; w_req = 0;
    if (d_req) begin
      logic [2*DQ_W-1:0] d;
      logic [MW-1:0] m;
      d = {$urandom, $urandom}; m = MW'($urandom);
      datain = d; dm_in = m;
      ew.push_back({m, d});
      n_dreq++;
    end
    if (busy) n_busy++;
    if (!busy && $urandom_range(0, 2) == 0) begin
      cmd_entry_t c;
      bit wr, f, bc;
      wr = $urandom_range(0, 1); f = $urandom_range(0, 1); bc = $urandom_range(0, 3) == 0;
      raddr  = ADDR_W'($urandom);
      b_size = bc ? 4'd4 : 4'd8;
      fast   = f;
      c.bc4  = bc;
      c.op   = wr ? (f ? OP_FAST_WRITE : OP_WRITE) : (f ? OP_FAST_READ : OP_READ);
      ec.push_back(c); ea.push_back(raddr);
      if (wr) begin w_req = 1; exp_dreq += bc ? 2 : 4; end
      else    r_req = 1;
    end
  end

  // consumer
  int dwait = 0;
  always @(negedge clk) if (rst_n) begin
    cmd_pop = 0; wf_pop = 0;
    if (!cmd_empty && $urandom_range(0, 3) == 0) begin
      check(ec.size() != 0, "command without request");
      if (ec.size() != 0) begin
        check(cmd_head == ec[0], $sformatf("command %b expected %b", cmd_head, ec[0]));
        check(addr_head == ea[0], "address in order");
        void'(ec.pop_front()); void'(ea.pop_front());
      end
      cmd_pop = 1;
    end
    if (wr_words != 0 && $urandom_range(0, 2) == 0 && ew.size() != 0) begin
      check({wf_mask, wf_data} == ew[0], "write word and mask in order");
      void'(ew.pop_front());
      wf_pop = 1;
    end
  end

  // read return path and w_valid
  always @(negedge clk) if (rst_n) begin
    if (r_valid) begin
      check(er.size() != 0 && dataout == er[0], "read word in order");
      if (er.size() != 0) void'(er.pop_front());
    end
    rf_push = ($urandom_range(0, 1) == 0);
    rf_data = {$urandom, $urandom};
    if (rf_push) er.push_back(rf_data);
    w_done = ($urandom_range(0, 9) == 0);
  end
  always @(posedge clk) if (rst_n) check(w_valid == w_done, "w_valid follows w_done");

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (5000) @(negedge clk);
    check(n_busy > 0, "busy seen");
    check(n_dreq > 0 && n_dreq >= exp_dreq - 4 && n_dreq <= exp_dreq, $sformatf("d_req cycles %0d, expected %0d", n_dreq, exp_dreq));
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
