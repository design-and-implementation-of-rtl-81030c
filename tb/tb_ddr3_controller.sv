// tb_ddr3_controller: end-to-end test of the DDR3 controller.
//
// The controller drives one behavioural DDR3 rank model per chip select. A
// host driver issues reads and writes through the request/busy/d_req
// protocol; a scoreboard keeps the expected contents of every 64-bit word
// written (with byte masks applied) and checks every word read back, in
// order. The memory models check the DDR3 command timing and count their
// violations as failures. The test also checks
//   - the mode register values against CL, CWL and tWR,
//   - the read latency (READ on the pins to first r_valid = CL + 3 cycles)
//     and one word per cycle during a read burst,
//   - the refresh interval (never more than 9 x tREFI between refreshes),
// and that each mechanism happened at least once: activate into an idle
// bank, precharge of a different open row, row hit (idle straight to read or
// write), auto-precharge and open-page accesses, refresh with and without
// open banks (precharge all), burst chop 4, masked write bytes, queue full
// (busy), several ranks.
// The power-up waits and the refresh interval are shortened to keep the run
// short; all other parameters are the defaults.
module tb_ddr3_controller;
  import ddr3_pkg::*;

  localparam int DQ_W = 32, BA_W = 3, ROW_W = 14, COL_W = 10, CS_W = 8;
  localparam int CL = 6, CWL = 5, T_RCD = 6, T_RP = 6, T_RAS = 15, T_WR = 6, T_RFC = 64;
  localparam int T_REFI = 700;
  localparam int ADDR_W = $clog2(CS_W) + ROW_W + BA_W + COL_W - 3;
  localparam int NBL = DQ_W / 8;
  localparam int N_RANDOM = 300;

  logic clk_in = 0, reset_n = 1;
  always #1.25 clk_in = ~clk_in;          // 800 MHz -> 400 MHz memory clock

  logic [ADDR_W-1:0]   raddr = '0;
  logic [3:0]          b_size = 4'd8;
  logic                r_req = 0, w_req = 0, fast = 0;
  logic [2*DQ_W-1:0]   datain = '0, dataout;
  logic [2*NBL-1:0]    dm_in = '0;
  logic busy, d_req, r_valid, w_valid, init_done, clk;
  logic [2:0] ctrl_state;
  logic ext_clk, ext_clk_n, ddr_reset_n, cke, ras_n, cas_n, we_n, dq_oe, dqs_oe;
  logic [CS_W-1:0] cs_n;
  logic [BA_W-1:0] ba;
  logic [ROW_W-1:0] sa;
  logic [NBL-1:0] dm, dqs_o, dqs_i;
  logic [DQ_W-1:0] dq_o, dq_i;

  ddr3_controller #(.T_RESET(20), .T_CKE(40), .T_XPR(10), .T_ZQINIT(64), .T_REFI(T_REFI)) dut (
    .clk_in, .reset_n, .raddr, .b_size, .r_req, .w_req, .fast, .datain, .dm_in,
    .busy, .d_req, .r_valid, .w_valid, .dataout, .init_done, .clk, .ctrl_state,
    .ext_clk, .ext_clk_n, .ddr_reset_n, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .sa,
    .dm, .dq_o, .dq_oe, .dq_i, .dqs_o, .dqs_oe, .dqs_i
  );

  // ---------------- memory ----------------
  logic [DQ_W-1:0] m_dq  [CS_W];
  logic [NBL-1:0]  m_dqs [CS_W];
  logic [CS_W-1:0] m_drv;
  int unsigned     m_err [CS_W];
  int unsigned     m_ref [CS_W];
  longint          m_gap [CS_W];

  for (genvar r = 0; r < CS_W; r++) begin : g_rank
    ddr3_model #(.DQ_W(DQ_W), .BA_W(BA_W), .ROW_W(ROW_W), .CL(CL), .CWL(CWL), .T_RCD(T_RCD),
                 .T_RP(T_RP), .T_RAS(T_RAS), .T_WR(T_WR), .T_RFC(T_RFC)) u_mem (
      .ck(ext_clk), .reset_n(ddr_reset_n), .cke, .cs_n(cs_n[r]), .ras_n, .cas_n, .we_n, .ba, .a(sa),
      .dm, .dq_in(dq_o), .dq_in_en(dq_oe), .dqs_in(dqs_o), .dqs_in_en(dqs_oe),
      .dq_out(m_dq[r]), .dqs_out(m_dqs[r]), .driving(m_drv[r])
    );
    assign m_err[r] = u_mem.errors;
    assign m_ref[r] = u_mem.n_ref;
    assign m_gap[r] = u_mem.max_ref_gap;
  end

  always_comb begin
    dq_i  = '0;
    dqs_i = '0;
    for (int r = 0; r < CS_W; r++) begin
      dq_i  |= m_dq[r];
      dqs_i |= m_dqs[r];
    end
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  bit trace = $test$plusargs("trace");
  logic [2*DQ_W-1:0] sb [longint];          // expected word per {raddr, word}
  longint            exp_q [$];             // keys of words still to be read
  logic [2*DQ_W-1:0] exp_v [$];             // their values when the read was queued
  int unsigned       n_busy = 0, n_dreq = 0, n_act = 0, n_pre = 0, n_preall = 0;
  int unsigned       n_ref = 0, n_rd_ap = 0, n_rd_open = 0;
  int unsigned       n_wr_ap = 0, n_wr_open = 0, n_bc4 = 0, n_mask = 0, n_hit = 0;
  int unsigned       n_wvalid = 0, n_rvalid = 0;
  bit [CS_W-1:0]     ranks_used = '0;
  logic [2:0]        prev_state = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  function automatic longint wkey(logic [ADDR_W-1:0] a, int w);
    return longint'(a) * 4 + w;
  endfunction

  // read data check and read latency / rate check
  longint cyc = 0, rd_cmd_cyc[$];
  int     rv_run = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (init_done && r_valid) begin
      n_rvalid++;
      if (exp_q.size() == 0) check(0, "r_valid with no read outstanding");
      else begin
        longint k;
        logic [2*DQ_W-1:0] e;
        k = exp_q.pop_front();
        e = exp_v.pop_front();
        check(dataout === e, $sformatf("read word %0h: got %h expected %h", k, dataout, e));
      end
    end
  end

  // command bus monitor: the pins are stable from one clk edge to the next
  bit first_word = 0;
  int burst_words = 0, burst_len = 0;
  always @(negedge clk) begin
    if (init_done && cs_n != '1) begin
      for (int r = 0; r < CS_W; r++) if (!cs_n[r] && cs_n != '0) ranks_used[r] = 1'b1;
      unique case ({ras_n, cas_n, we_n})
        3'b011: n_act++;
        3'b010: begin if (sa[10]) n_preall++; else n_pre++; if (trace && sa[10]) $display("[%0t] PREALL", $time); end
        3'b001: begin n_ref++; if (trace) $display("[%0t] REF", $time); end
        3'b101: begin
          if (sa[10]) n_rd_ap++; else n_rd_open++;
          if (!sa[12]) n_bc4++;
          rd_cmd_cyc.push_back(cyc);
          burst_len = sa[12] ? 4 : 2;
        end
        3'b100: begin
          if (sa[10]) n_wr_ap++; else n_wr_open++;
          if (!sa[12]) n_bc4++;
        end
        default: ;
      endcase
    end
  end

  // latency: first r_valid CL+3 cycles after READ is on the pins, then one
  // word per cycle
  always @(negedge clk) begin
    if (!init_done) begin
      rv_run = 0;
    end else if (r_valid && rv_run == 0) begin
      longint c0;
      c0 = rd_cmd_cyc.pop_front();
      check(cyc - c0 == CL + 3, $sformatf("read latency %0d cycles, expected %0d", cyc - c0, CL + 3));
      rv_run = 1;
    end else if (rv_run != 0) begin
      if (rv_run < burst_len) check(r_valid, "read burst words not on consecutive cycles");
      rv_run = (rv_run < burst_len && r_valid) ? rv_run + 1 : 0;
      if (!init_done) begin
      rv_run = 0;
    end else if (r_valid && rv_run == 0) begin  // next burst started right away
        longint c0;
        c0 = rd_cmd_cyc.pop_front();
        check(cyc - c0 == CL + 3, "read latency of a following burst");
        rv_run = 1;
      end
    end
  end

  always @(negedge clk) begin
    if (dq_oe && dm != '0) n_mask++;
    if (w_valid) n_wvalid++;
    if (d_req) n_dreq++;
    if (prev_state == 3'd1 && (ctrl_state == 3'd4 || ctrl_state == 3'd5)) n_hit++;
    prev_state <= ctrl_state;
  end

  // ---------------- host driver ----------------
  function automatic logic [ADDR_W-1:0] mk_addr(int rank, int row, int bank, int col);
    return {3'(rank), 14'(row), 3'(bank), 7'(col)};
  endfunction

  task automatic wait_not_busy();
    @(negedge clk);
    if (busy) n_busy++;
    while (busy) @(negedge clk);
  endtask

  task automatic host_write(logic [ADDR_W-1:0] a, bit f, bit bc4, bit masked);
    int nw;
    logic [2*DQ_W-1:0] w;
    logic [2*NBL-1:0]  m;
    nw = bc4 ? 2 : 4;
    wait_not_busy();
    w_req = 1; raddr = a; fast = f; b_size = bc4 ? 4'd4 : 4'd8;
    @(negedge clk);
    w_req = 0;
    for (int i = 0; i < nw; i++) begin
      while (!d_req) @(negedge clk);
      w = {$urandom, $urandom};
      m = masked ? (2*NBL)'($urandom) : '0;
      datain = w; dm_in = m;
      begin
        logic [2*DQ_W-1:0] old;
        old = sb.exists(wkey(a, i)) ? sb[wkey(a, i)] : '0;
        for (int b = 0; b < 2 * NBL; b++) if (m[b]) w[8*b +: 8] = old[8*b +: 8];
        sb[wkey(a, i)] = w;
        if (trace) $display("[%0t] host write %h word %0d data %h mask %b -> %h", $time, a, i, datain, m, w);
      end
      @(negedge clk);
    end
  endtask

  task automatic host_read(logic [ADDR_W-1:0] a, bit f, bit bc4);
    wait_not_busy();
    r_req = 1; raddr = a; fast = f; b_size = bc4 ? 4'd4 : 4'd8;
    for (int i = 0; i < (bc4 ? 2 : 4); i++) begin
      exp_q.push_back(wkey(a, i));
      exp_v.push_back(sb.exists(wkey(a, i)) ? sb[wkey(a, i)] : '0);
    end
    @(negedge clk);
    r_req = 0;
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp_q.size() != 0 || !dut.cmd_empty || dut.ctrl_state != 3'd1) && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    check(guard < 20000, "queue drained");
  endtask

  // ---------------- test program ----------------
  initial begin
    logic [ADDR_W-1:0] a0, a1, a2;
    #1 reset_n = 0;
    repeat (5) @(posedge clk_in);
    reset_n = 1;
    wait (init_done);
    @(negedge clk);
    // mode registers as loaded into rank 0
    check(g_rank[0].u_mem.mr[0] == mr0_value(CL, T_WR), "MR0 value");
    check(g_rank[0].u_mem.mr[0][6:4] == 3'b010 && g_rank[0].u_mem.mr[0][2] == 1'b0, "MR0 CAS latency 6");
    check(g_rank[0].u_mem.mr[2][5:3] == 3'(CWL - 5), "MR2 CAS write latency");
    check(g_rank[0].u_mem.mr[0][1:0] == 2'b01, "MR0 burst length on the fly");

    // 1. normal (auto-precharge) write and read, two ranks
    a0 = mk_addr(0, 3, 2, 5);
    a1 = mk_addr(5, 100, 7, 1);
    host_write(a0, 0, 0, 0);
    host_write(a1, 0, 0, 0);
    host_read(a0, 0, 0);
    host_read(a1, 0, 0);
    drain();

    // 2. fast accesses: row hits, then a different row in the same bank
    a0 = mk_addr(1, 20, 4, 0);
    a1 = mk_addr(1, 20, 4, 9);
    a2 = mk_addr(1, 21, 4, 2);
    host_write(a0, 1, 0, 0);
    host_write(a1, 1, 0, 0);     // same row: hit
    host_read(a0, 1, 0);         // hit
    host_write(a2, 1, 0, 0);     // different row: precharge + activate
    host_read(a1, 0, 0);         // back to row 20, closes it
    host_read(a2, 0, 0);
    drain();

    // 3. burst chop 4 and masked writes
    a0 = mk_addr(2, 7, 1, 3);
    host_write(a0, 0, 1, 0);
    host_read(a0, 0, 1);
    host_write(a0, 0, 0, 1);
    host_read(a0, 0, 0);
    drain();

    // 4. leave a row open and wait past a refresh
    host_write(mk_addr(3, 9, 6, 4), 1, 0, 0);
    drain();
    repeat (2 * T_REFI) @(negedge clk);
    host_read(mk_addr(3, 9, 6, 4), 1, 0);
    drain();

    // 5. back-to-back requests fill the queues
    for (int i = 0; i < 12; i++) host_write(mk_addr(4, i, i % 8, i), i % 2, 0, 0);
    for (int i = 0; i < 12; i++) host_read(mk_addr(4, i, i % 8, i), 0, 0);
    drain();

    // 6. random traffic over a small address set (many hits and misses)
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [ADDR_W-1:0] a;
      bit bc4;
      a   = mk_addr($urandom_range(0, CS_W - 1), $urandom_range(0, 3), $urandom_range(0, 7),
                    $urandom_range(0, 3));
      bc4 = ($urandom_range(0, 5) == 0);
      if ($urandom_range(0, 1) == 0) host_write(a, $urandom_range(0, 1), bc4, $urandom_range(0, 3) == 0);
      else                           host_read(a, $urandom_range(0, 1), bc4);
    end
    drain();
    repeat (100) @(negedge clk);

    // ---------------- final checks ----------------
    for (int r = 0; r < CS_W; r++) begin
      check(m_err[r] == 0, $sformatf("rank %0d: %0d DDR3 rule violations", r, m_err[r]));
      check(m_ref[r] > 0, $sformatf("rank %0d refreshed", r));
      check(m_gap[r] <= 9 * T_REFI, $sformatf("rank %0d refresh gap %0d", r, m_gap[r]));
    end
    check(n_wvalid == g_rank[0].u_mem.n_wr + g_rank[1].u_mem.n_wr + g_rank[2].u_mem.n_wr +
          g_rank[3].u_mem.n_wr + g_rank[4].u_mem.n_wr + g_rank[5].u_mem.n_wr +
          g_rank[6].u_mem.n_wr + g_rank[7].u_mem.n_wr, "one w_valid per write burst");
    $display("mechanisms: act=%0d pre=%0d pre_all=%0d ref=%0d rd_ap=%0d rd_open=%0d wr_ap=%0d wr_open=%0d bc4=%0d mask=%0d hit=%0d busy=%0d d_req=%0d ranks=%b",
             n_act, n_pre, n_preall, n_ref, n_rd_ap, n_rd_open, n_wr_ap, n_wr_open,
             n_bc4, n_mask, n_hit, n_busy, n_dreq, ranks_used);
    check(n_act > 0, "activate happened");
    check(n_pre > 0, "precharge of a different open row happened");
    check(n_preall > 0, "refresh with open banks (precharge all first) happened");
    check(n_ref > n_preall, "refresh with all banks already idle happened");
    check(n_rd_ap > 0 && n_wr_ap > 0, "normal (auto-precharge) accesses happened");
    check(n_rd_open > 0 && n_wr_open > 0, "fast (open-page) accesses happened");
    check(n_bc4 > 0, "burst chop 4 happened");
    check(n_mask > 0, "masked write bytes happened");
    check(n_hit > 0, "row hits happened");
    check(n_busy > 0, "busy (queue full) happened");
    check(n_dreq > 0, "d_req happened");
    check(ranks_used == '1, "every rank accessed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
