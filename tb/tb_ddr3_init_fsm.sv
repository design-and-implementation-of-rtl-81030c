// tb_ddr3_init_fsm: runs the power-up sequence with shortened waits and
// checks the JEDEC order and spacing: RESET# low for T_RESET cycles, CKE low
// for T_CKE more, then MRS to MR2, MR3, MR1, MR0 (tXPR after CKE, tMRD apart),
// ZQCL tMOD after MR0, init_done tZQinit after ZQCL; all to every rank.
// Each wait must be at least its parameter and at most two cycles more.
// Mode register words are compared with values worked out by hand for
// CL 6, CWL 5, tWR 6: MR0 = 0x0521, MR1 = 0x0004, MR2 = MR3 = 0.
module tb_ddr3_init_fsm;
  import ddr3_pkg::*;
  localparam int T_RESET = 30, T_CKE = 50, T_XPR = 12, T_MRD = 4, T_MOD = 12, T_ZQINIT = 40;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic ddr_reset_n, cke, init_done;
  ddr_req_t req;
  int checks = 0, failures = 0;

  ddr3_init_fsm #(.CL(6), .CWL(5), .T_WR(6), .T_RESET(T_RESET), .T_CKE(T_CKE), .T_XPR(T_XPR),
                  .T_MRD(T_MRD), .T_MOD(T_MOD), .T_ZQINIT(T_ZQINIT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  task automatic gap(longint d, int want, string what);
    check(d >= want && d <= want + 2, $sformatf("%s: %0d cycles, expected %0d", what, d, want));
  endtask

  longint cyc = 0, t_reset_hi = -1, t_cke_hi = -1, t_done = -1;
  longint t_cmd [$];
  ddr_req_t cmds [$];

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (ddr_reset_n && t_reset_hi < 0) t_reset_hi = cyc;
    if (cke && t_cke_hi < 0) t_cke_hi = cyc;
    if (init_done && t_done < 0) t_done = cyc;
    if (req.valid) begin
      t_cmd.push_back(cyc);
      cmds.push_back(req);
      check(cke && ddr_reset_n, "command only with CKE and RESET# high");
    end
    if (!ddr_reset_n) check(!cke, "CKE low while in reset");
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    wait (init_done);
    repeat (20) @(negedge clk);
    check(cmds.size() == 5, $sformatf("%0d commands, expected 5", cmds.size()));
    if (cmds.size() == 5) begin
      gap(t_reset_hi - 1, T_RESET, "RESET# low");
      gap(t_cke_hi - t_reset_hi, T_CKE, "CKE low after RESET#");
      gap(t_cmd[0] - t_cke_hi, T_XPR, "tXPR");
      for (int i = 0; i < 4; i++) begin
        check(cmds[i].cmd == DDR_MRS && cmds[i].all_ranks, "MRS to every rank");
        check(cmds[i].bank == 3'(i == 0 ? 2 : i == 1 ? 3 : i == 2 ? 1 : 0), "mode register order 2,3,1,0");
      end
      gap(t_cmd[1] - t_cmd[0], T_MRD, "tMRD");
      gap(t_cmd[2] - t_cmd[1], T_MRD, "tMRD");
      gap(t_cmd[3] - t_cmd[2], T_MRD, "tMRD");
      gap(t_cmd[4] - t_cmd[3], T_MOD, "tMOD");
      check(cmds[4].cmd == DDR_ZQC && cmds[4].a10 && cmds[4].all_ranks, "ZQCL");
      gap(t_done - t_cmd[4], T_ZQINIT, "tZQinit");
      check(cmds[0].row == 14'h0000, "MR2 value");
      check(cmds[1].row == 14'h0000, "MR3 value");
      check(cmds[2].row == 14'h0004, "MR1 value");
      check(cmds[3].row == 14'h0521, $sformatf("MR0 value %h", cmds[3].row));
    end
    check(init_done, "init_done stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
