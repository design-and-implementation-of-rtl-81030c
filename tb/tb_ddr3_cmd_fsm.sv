// tb_ddr3_cmd_fsm: the command state machine with the bank management block.
// Requests are presented as FIFO heads; every command the state machine sends
// is recorded with its cycle and compared with the expected sequence for each
// case of the state diagram:
//   read to an idle bank           ACT, RD (A10=1) tRCD later
//   fast write, fast same-row read WR (A10=0), then RD with no ACT (row hit)
//   other row in the open bank     PRE (not before tRAS), ACT (tRP later), WR
//   write waiting for its data     no WR until the write FIFO holds the burst
//   refresh with a row open        PRE ALL, REF (tRP later), ref_ack, tRFC
//   refresh with no row open       REF only
//   normal access after auto-precharge  ACT no sooner than tRP after the
//                                  access has finished
// wr_start/rd_start must come with WR/RD, cmd_pop once per request, w_done
// once per write.
module tb_ddr3_cmd_fsm;
  import ddr3_pkg::*;
  localparam int CS_W = 8, BA_W = 3, ROW_W = 14, COL_W = 10;
  localparam int CL = 6, CWL = 5, T_RCD = 6, T_RP = 6, T_RAS = 15, T_WR = 6, T_RFC = 20;
  localparam int ADDR_W = 3 + ROW_W + BA_W + COL_W - 3;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic init_done = 0, ref_req = 0, ref_ack, cmd_empty, cmd_pop, w_done;
  ddr_req_t init_req = REQ_NOP, req;
  cmd_entry_t cmd_head;
  logic [ADDR_W-1:0] addr_head;
  logic [3:0] wr_words = 0;
  logic [2:0] look_rank, ev_rank;
  logic [BA_W-1:0] look_bank, ev_bank;
  logic [ROW_W-1:0] look_row, ev_row;
  logic look_open, look_can_act, look_can_pre, any_open, all_ready;
  logic ev_act, ev_pre, ev_autopre, ev_pre_all, wr_start, rd_start, start_bc4;
  logic [2:0] state_o;

  ddr3_cmd_fsm #(.CS_W(CS_W), .BA_W(BA_W), .ROW_W(ROW_W), .COL_W(COL_W), .CL(CL), .CWL(CWL),
                 .T_RCD(T_RCD), .T_WR(T_WR), .T_RFC(T_RFC)) dut (.*);
  ddr3_bank_mgmt #(.CS_W(CS_W), .BA_W(BA_W), .ROW_W(ROW_W), .T_RAS(T_RAS), .T_RP(T_RP)) u_banks (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  // request queue (FIFO heads)
  cmd_entry_t qc [$];
  logic [ADDR_W-1:0] qa [$];
  assign cmd_empty = (qc.size() == 0);
  assign cmd_head  = cmd_empty ? '0 : qc[0];
  assign addr_head = cmd_empty ? '0 : qa[0];

  // command log
  ddr_cmd_e lc [$];
  longint   lt [$];
  bit       la10 [$];
  longint   cyc = 0;
  int       n_pop = 0, n_wdone = 0, n_ack = 0;
  always @(posedge clk) begin
    cyc++;
    if (req.valid) begin
      lc.push_back(req.cmd); lt.push_back(cyc); la10.push_back(req.a10);
      if (req.cmd == DDR_WR) check(wr_start && !rd_start, "wr_start with WR");
      if (req.cmd == DDR_RD) check(rd_start && !wr_start, "rd_start with RD");
    end else begin
      check(!wr_start && !rd_start, "no start without a command");
    end
    if (cmd_pop) begin
      n_pop++;
      void'(qc.pop_front()); void'(qa.pop_front());
    end
    if (w_done) n_wdone++;
    if (ref_ack) n_ack++;
  end

  function automatic logic [ADDR_W-1:0] mk(int rank, int row, int bank, int col);
    return {3'(rank), 14'(row), 3'(bank), 7'(col)};
  endfunction

  task automatic issue(op_e op, logic [ADDR_W-1:0] a);
    cmd_entry_t c;
    c.op = op; c.bc4 = 0;
    @(negedge clk);
    qc.push_back(c); qa.push_back(a);
  endtask

  task automatic settle(int n = 200);
    int g;
    g = 0;
    while ((qc.size() != 0 || state_o != 3'd1) && g < 2000) begin @(negedge clk); g++; end
    repeat (n) @(negedge clk);
  endtask

  task automatic expect_seq(ddr_cmd_e e [$], string what);
    check(lc.size() == e.size(), $sformatf("%s: %0d commands, expected %0d", what, lc.size(), e.size()));
    for (int i = 0; i < e.size() && i < lc.size(); i++)
      check(lc[i] == e[i], $sformatf("%s: command %0d is %s, expected %s", what, i, lc[i].name(), e[i].name()));
  endtask

  task automatic clear_log();
    lc.delete(); lt.delete(); la10.delete();
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (5) @(negedge clk);
    init_done = 1;
    repeat (3) @(negedge clk);

    // 1. normal read, bank idle
    clear_log();
    issue(OP_READ, mk(0, 5, 1, 2));
    settle();
    expect_seq('{DDR_ACT, DDR_RD}, "read to idle bank");
    if (lt.size() == 2) begin
      check(lt[1] - lt[0] >= T_RCD, "tRCD");
      check(la10[1], "normal read uses auto-precharge");
    end

    // 2. fast write, then fast read of the same row: row hit
    clear_log();
    wr_words = 4;
    issue(OP_FAST_WRITE, mk(1, 9, 3, 0));
    issue(OP_FAST_READ,  mk(1, 9, 3, 5));
    settle();
    expect_seq('{DDR_ACT, DDR_WR, DDR_RD}, "fast write then same-row read");
    if (lt.size() == 3) check(!la10[1] && !la10[2], "fast accesses leave the row open");

    // 3. another row in that bank: precharge, activate
    clear_log();
    issue(OP_WRITE, mk(1, 10, 3, 1));
    settle();
    expect_seq('{DDR_PRE, DDR_ACT, DDR_WR}, "row miss in an open bank");
    if (lt.size() == 3) begin
      check(lt[1] - lt[0] >= T_RP, "tRP between PRE and ACT");
      check(la10[2], "normal write uses auto-precharge");
    end

    // 4. auto-precharged bank: ACT waits tRP after the access finished
    clear_log();
    issue(OP_READ, mk(1, 10, 3, 1));
    settle();
    expect_seq('{DDR_ACT, DDR_RD}, "bank closed by auto-precharge");

    // 5. write waits for its data
    clear_log();
    wr_words = 2;
    issue(OP_WRITE, mk(2, 1, 0, 0));
    repeat (60) @(negedge clk);
    check(lc.size() == 0 || lc[lc.size()-1] != DDR_WR, "no WR before the burst's data is there");
    wr_words = 4;
    settle();
    expect_seq('{DDR_ACT, DDR_WR}, "write after its data arrived");

    // 6. refresh with an open row, then with none
    issue(OP_FAST_READ, mk(3, 2, 2, 0));
    settle();
    clear_log();
    @(negedge clk);
    ref_req = 1;
    while (!ref_ack) @(negedge clk);
    @(negedge clk);
    ref_req = 0;
    settle(T_RFC + 10);
    expect_seq('{DDR_PRE, DDR_REF}, "refresh with a row open");
    if (lt.size() == 2) begin
      check(la10[0], "precharge all");
      check(lt[1] - lt[0] >= T_RP, "tRP before REF");
    end
    clear_log();
    ref_req = 1;
    issue(OP_READ, mk(3, 2, 2, 0));     // refresh has priority
    while (!ref_ack) @(negedge clk);
    @(negedge clk);
    ref_req = 0;
    settle();
    expect_seq('{DDR_REF, DDR_ACT, DDR_RD}, "refresh first, banks idle");
    if (lt.size() == 3) check(lt[1] - lt[0] >= T_RFC, "tRFC after REF");

    check(n_pop == 8, $sformatf("%0d pops, expected 8", n_pop));
    check(n_wdone == 3, $sformatf("%0d w_done, expected 3", n_wdone));
    check(n_ack == 2, "two refresh acknowledgements");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
