// tb_ddr3_bank_mgmt: random activate / precharge / auto-precharge /
// precharge-all events against a reference table kept in absolute cycle
// times: a bank may be activated T_RP cycles after it closed (for an
// auto-precharge: T_RP after the later of the event and tRAS expiry), and
// precharged T_RAS cycles after its activate. Every cycle the looked-up
// bank's open flag, row, may-activate and may-precharge outputs and the
// any_open / all_ready summaries are compared with the reference.
module tb_ddr3_bank_mgmt;
  localparam int CS_W = 8, BA_W = 3, ROW_W = 14, T_RAS = 15, T_RP = 6;
  localparam int NB = CS_W << BA_W;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic [2:0] look_rank = 0, ev_rank = 0;
  logic [BA_W-1:0] look_bank = 0, ev_bank = 0;
  logic [ROW_W-1:0] look_row, ev_row = 0;
  logic look_open, look_can_act, look_can_pre, any_open, all_ready;
  logic ev_act = 0, ev_pre = 0, ev_autopre = 0, ev_pre_all = 0;
  int checks = 0, failures = 0;
  int n_act = 0, n_pre = 0, n_ap = 0, n_pa = 0;

  ddr3_bank_mgmt #(.CS_W(CS_W), .BA_W(BA_W), .ROW_W(ROW_W), .T_RAS(T_RAS), .T_RP(T_RP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  bit          r_open [NB];
  int          r_row [NB];
  longint      r_act_ok [NB];   // first cycle at which ACT is allowed
  longint      r_pre_ok [NB];   // first cycle at which PRE is allowed
  longint      cyc = 0;

  initial begin
    for (int i = 0; i < NB; i++) begin
      r_open[i] = 0; r_row[i] = 0; r_act_ok[i] = 0; r_pre_ok[i] = 0;
    end
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int li, ei;
      bit e_ready, e_any;
      @(negedge clk);
      cyc++;
      // compare the lookup chosen in the previous cycle's setting
      li = {look_rank, look_bank};
      check(look_open == r_open[li], $sformatf("open flag of bank %0d", li));
      if (r_open[li]) check(look_row == ROW_W'(r_row[li]), "open row");
      check(look_can_act == (cyc >= r_act_ok[li]), $sformatf("can_act of bank %0d (cycle %0d, ok at %0d)", li, cyc, r_act_ok[li]));
      check(look_can_pre == (cyc >= r_pre_ok[li]), $sformatf("can_pre of bank %0d", li));
      e_ready = 1; e_any = 0;
      for (int i = 0; i < NB; i++) begin
        if (r_open[i]) e_any = 1;
        if (cyc < r_act_ok[i] || (r_open[i] && cyc < r_pre_ok[i])) e_ready = 0;
      end
      check(any_open == e_any, "any_open");
      check(all_ready == e_ready, "all_ready");
      // next event, legal for the bank it targets; few banks to get reuse
      ev_act = 0; ev_pre = 0; ev_autopre = 0; ev_pre_all = 0;
      ev_rank = 3'($urandom_range(0, 1));
      ev_bank = BA_W'($urandom_range(0, 3));
      ev_row  = ROW_W'($urandom);
      ei = {ev_rank, ev_bank};
      case ($urandom_range(0, 9))
        0, 1, 2, 3: if (!r_open[ei] && cyc >= r_act_ok[ei]) ev_act = 1;
        4, 5:       if (r_open[ei] && cyc >= r_pre_ok[ei]) ev_pre = 1;
        6, 7:       if (r_open[ei]) ev_autopre = 1;
        8:          if (t % 50 == 0 && e_ready) ev_pre_all = 1;
        default: ;
      endcase
      look_rank = 3'($urandom_range(0, 1));
      look_bank = BA_W'($urandom_range(0, 3));
      // reference update: the event takes effect from the next cycle
      if (ev_act) begin
        n_act++; r_open[ei] = 1; r_row[ei] = int'(ev_row); r_pre_ok[ei] = cyc + 1 + T_RAS;
      end
      if (ev_pre) begin
        n_pre++; r_open[ei] = 0; r_act_ok[ei] = cyc + 1 + T_RP;
      end
      if (ev_autopre) begin
        longint from;
        n_ap++;
        from = (r_pre_ok[ei] > cyc + 1) ? r_pre_ok[ei] : cyc + 1;
        r_open[ei] = 0; r_act_ok[ei] = from + T_RP;
      end
      if (ev_pre_all) begin
        n_pa++;
        for (int i = 0; i < NB; i++) begin r_open[i] = 0; r_act_ok[i] = cyc + 1 + T_RP; end
      end
    end
    check(n_act > 100 && n_pre > 50 && n_ap > 50 && n_pa > 0, "all event kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
