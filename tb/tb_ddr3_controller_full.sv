// tb_ddr3_controller_full: the controller at its default parameters (32-bit
// DQ, 8 ranks, DDR3-800 timing, 200 us / 500 us power-up waits, tREFI of
// 3120 cycles) against eight DDR3 rank models. One complete operation: the
// full power-up sequence, then a normal and a fast write and read-back of a
// burst in every rank, a burst-chop pair, and two refresh intervals of idle
// time. Checks the data, the power-up waits (RESET# low at least 80000
// cycles, CKE low at least 200000 more), the DDR3 timing rules in the models,
// and that refresh keeps up.
module tb_ddr3_controller_full;
  localparam int DQ_W = 32, NBL = DQ_W / 8, CS_W = 8, ADDR_W = 27;

  logic clk_in = 0, reset_n = 1;
  always #0.625 clk_in = ~clk_in;          // 1.6 GHz -> 400 MHz memory clock

  logic [ADDR_W-1:0]   raddr = '0;
  logic [3:0]          b_size = 4'd8;
  logic                r_req = 0, w_req = 0, fast = 0;
  logic [2*DQ_W-1:0]   datain = '0, dataout;
  logic [2*NBL-1:0]    dm_in = '0;
  logic busy, d_req, r_valid, w_valid, init_done, clk;
  logic [2:0] ctrl_state;
  logic ext_clk, ext_clk_n, ddr_reset_n, cke, ras_n, cas_n, we_n, dq_oe, dqs_oe;
  logic [CS_W-1:0] cs_n;
  logic [2:0] ba;
  logic [13:0] sa;
  logic [NBL-1:0] dm, dqs_o, dqs_i;
  logic [DQ_W-1:0] dq_o, dq_i;

  ddr3_controller dut (
    .clk_in, .reset_n, .raddr, .b_size, .r_req, .w_req, .fast, .datain, .dm_in,
    .busy, .d_req, .r_valid, .w_valid, .dataout, .init_done, .clk, .ctrl_state,
    .ext_clk, .ext_clk_n, .ddr_reset_n, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .sa,
    .dm, .dq_o, .dq_oe, .dq_i, .dqs_o, .dqs_oe, .dqs_i
  );

  logic [DQ_W-1:0] m_dq  [CS_W];
  logic [NBL-1:0]  m_dqs [CS_W];
  logic [CS_W-1:0] m_drv;
  int unsigned     m_err [CS_W];
  int unsigned     m_ref [CS_W];
  longint          m_gap [CS_W];

  for (genvar r = 0; r < CS_W; r++) begin : g_rank
    ddr3_model u_mem (
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

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  // power-up waits, counted in memory clock cycles
  longint cyc = 0, reset_low = 0, cke_low_after = 0;
  always @(posedge ext_clk) begin
    cyc++;
    if (reset_n && !ddr_reset_n) reset_low++;
    if (ddr_reset_n && !cke) cke_low_after++;
  end

  logic [2*DQ_W-1:0] sb [longint];
  logic [2*DQ_W-1:0] exp_v [$];
  always @(negedge clk) if (init_done && r_valid) begin
    check(exp_v.size() != 0, "read word expected");
    if (exp_v.size() != 0) check(dataout == exp_v.pop_front(), "read data");
  end

  task automatic host_write(logic [ADDR_W-1:0] a, bit f, bit bc4);
    @(negedge clk);
    while (busy) @(negedge clk);
    w_req = 1; raddr = a; fast = f; b_size = bc4 ? 4'd4 : 4'd8;
    @(negedge clk);
    w_req = 0;
    for (int i = 0; i < (bc4 ? 2 : 4); i++) begin
      while (!d_req) @(negedge clk);
      datain = {$urandom, $urandom};
      sb[longint'(a) * 4 + i] = datain;
      @(negedge clk);
    end
  endtask

  task automatic host_read(logic [ADDR_W-1:0] a, bit f, bit bc4);
    @(negedge clk);
    while (busy) @(negedge clk);
    r_req = 1; raddr = a; fast = f; b_size = bc4 ? 4'd4 : 4'd8;
    for (int i = 0; i < (bc4 ? 2 : 4); i++) exp_v.push_back(sb[longint'(a) * 4 + i]);
    @(negedge clk);
    r_req = 0;
  endtask

  initial begin
    #1 reset_n = 0;
    #10 reset_n = 1;
    wait (init_done);
    check(reset_low >= 80000, $sformatf("RESET# low for %0d cycles", reset_low));
    check(cke_low_after >= 200000, $sformatf("CKE low for %0d cycles after RESET#", cke_low_after));
    for (int r = 0; r < CS_W; r++) begin
      host_write({3'(r), 14'(100 + r), 3'(r), 7'(r)}, 0, 0);
      host_write({3'(r), 14'(200 + r), 3'(7 - r), 7'(5)}, 1, 0);
    end
    host_write({3'd2, 14'd7, 3'd3, 7'd1}, 0, 1);
    for (int r = 0; r < CS_W; r++) begin
      host_read({3'(r), 14'(100 + r), 3'(r), 7'(r)}, 1, 0);
      host_read({3'(r), 14'(200 + r), 3'(7 - r), 7'(5)}, 0, 0);
    end
    host_read({3'd2, 14'd7, 3'd3, 7'd1}, 0, 1);
    repeat (2 * 3120 + 500) @(negedge clk);
    check(exp_v.size() == 0, "all reads returned");
    for (int r = 0; r < CS_W; r++) begin
      check(m_err[r] == 0, $sformatf("rank %0d: %0d DDR3 rule violations", r, m_err[r]));
      check(m_ref[r] >= 2, $sformatf("rank %0d refreshed %0d times", r, m_ref[r]));
      check(m_gap[r] <= 9 * 3120, "refresh interval");
    end
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
