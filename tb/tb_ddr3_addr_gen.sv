// tb_ddr3_addr_gen: drives random command records and checks the registered
// DDR3 pins one cycle later against the DDR3 command truth table worked out
// here: chip selects, RAS#/CAS#/WE#, bank address, row on ACTIVATE, column
// with A10 (auto-precharge) and A12 (burst of 8) on READ/WRITE, A10 on
// PRECHARGE and ZQ calibration, mode register value on MRS, deselect when idle.
module tb_ddr3_addr_gen;
  import ddr3_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  ddr_req_t req = REQ_NOP;
  logic [7:0] cs_n;
  logic ras_n, cas_n, we_n;
  logic [2:0] ba;
  logic [13:0] sa;
  int checks = 0, failures = 0;

  ddr3_addr_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  initial begin
    ddr_req_t r;
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    check(cs_n == 8'hff, "deselected after reset");
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] e_cs;
      logic [2:0] e_cmd;
      logic [13:0] e_sa;
      r = REQ_NOP;
      r.valid     = ($urandom_range(0, 9) != 0);
      r.cmd       = ddr_cmd_e'($urandom_range(0, 7));
      r.all_ranks = $urandom_range(0, 3) == 0;
      r.rank      = 3'($urandom);
      r.bank      = 3'($urandom);
      r.row       = 14'($urandom);
      r.col       = 10'($urandom);
      r.a10       = 1'($urandom);
      r.bc4       = 1'($urandom);
      req = r;
      @(negedge clk);
      // expected pins
      e_cs  = 8'hff;
      e_cmd = 3'b111;
      e_sa  = '0;
      if (r.valid) begin
        e_cs  = r.all_ranks ? 8'h00 : ~(8'h01 << r.rank);
        case (r.cmd)
          DDR_MRS: e_cmd = 3'b000;
          DDR_REF: e_cmd = 3'b001;
          DDR_PRE: e_cmd = 3'b010;
          DDR_ACT: e_cmd = 3'b011;
          DDR_WR:  e_cmd = 3'b100;
          DDR_RD:  e_cmd = 3'b101;
          DDR_ZQC: e_cmd = 3'b110;
          default: e_cmd = 3'b111;
        endcase
        if (r.cmd == DDR_ACT || r.cmd == DDR_MRS) e_sa = r.row;
        if (r.cmd == DDR_RD || r.cmd == DDR_WR)   e_sa = {1'b0, !r.bc4, 1'b0, r.a10, r.col};
        if (r.cmd == DDR_PRE || r.cmd == DDR_ZQC) e_sa = {3'b000, r.a10, 10'b0};
      end
      check(cs_n == e_cs, $sformatf("cs_n %b expected %b", cs_n, e_cs));
      check({ras_n, cas_n, we_n} == e_cmd, $sformatf("command pins %b expected %b", {ras_n, cas_n, we_n}, e_cmd));
      check(sa == e_sa, $sformatf("address %h expected %h (cmd %s)", sa, e_sa, r.cmd.name()));
      if (r.valid) check(ba == r.bank, "bank address");
    end
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
