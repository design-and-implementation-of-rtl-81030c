// tb_ddr3_data_path: DDR data path with the real clock module.
// Write: after a wr_start in cycle t the test expects DQS preamble (DQS
// enabled, low) in cycle t+1+CWL, then DQS rising edges in cycles t+2+CWL
// onward, each in the middle of a DQ beat: beat 2j is the low half of write
// word j, beat 2j+1 the high half, with the matching DM bits; 4 words per
// burst of 8, 2 for burst chop 4, popped one per cycle.
// Read: the test drives beats edge-aligned with clk from cycle t+2+CL after
// rd_start, like a DDR3 device with CAS latency CL, and expects each pair as
// one word {second beat, first beat} pushed to the read FIFO in cycles
// t+3+CL onward, one per cycle.
module tb_ddr3_data_path;
  localparam int DQ_W = 32, CL = 6, CWL = 5, NBL = DQ_W / 8;
  logic clk_in = 0, reset_n = 1;
  always #1.25 clk_in = ~clk_in;
  logic clk, clk_90, ext_clk, ext_clk_n, rst_n;
  ddr3_clock_module u_clk (.*);

  logic wr_start = 0, rd_start = 0, start_bc4 = 0;
  logic [2*DQ_W-1:0] wf_data, rf_data;
  logic [2*NBL-1:0] wf_mask;
  logic wf_pop, rf_push, dq_oe, dqs_oe;
  logic [DQ_W-1:0] dq_o, dq_i = '0;
  logic [NBL-1:0] dqs_o, dm_o;

  ddr3_data_path #(.DQ_W(DQ_W), .CL(CL), .CWL(CWL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  // write FIFO model: head shown, popped on wf_pop
  logic [2*DQ_W+2*NBL-1:0] wq [$];
  assign {wf_mask, wf_data} = (wq.size() != 0) ? wq[0] : '0;
  always @(posedge clk) if (wf_pop) begin
    if (wq.size() == 0) check(0, "pop from an empty write FIFO");
    else void'(wq.pop_front());
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // write beats seen on DQS edges
  logic [DQ_W-1:0] beats [$];
  logic [NBL-1:0]  bmask [$];
  longint          first_rise = -1, pre_cyc = -1;
  always @(posedge dqs_o[0]) if (dqs_oe) begin
    if (first_rise < 0) first_rise = cyc;
    beats.push_back(dq_o); bmask.push_back(dm_o);
  end
  always @(negedge dqs_o[0]) if (dqs_oe) begin
    beats.push_back(dq_o); bmask.push_back(dm_o);
  end
  always @(negedge clk) if (dqs_oe && !dq_oe && pre_cyc < 0) pre_cyc = cyc;

  // read side: device model driving edge-aligned beats
  logic [DQ_W-1:0] rbeats [$];
  longint          rd_from = -1;
  int              rd_n = 0;
  always @(posedge ext_clk) begin
    if (rd_from >= 0 && cyc >= rd_from && rd_n < rbeats.size()) begin dq_i <= rbeats[rd_n]; rd_n++; end
    else dq_i <= 32'hdeadbeef;
  end
  always @(negedge ext_clk) begin
    if (rd_from >= 0 && cyc >= rd_from && rd_n < rbeats.size() && rd_n % 2 == 1) begin dq_i <= rbeats[rd_n]; rd_n++; end
  end
  logic [2*DQ_W-1:0] rwords [$];
  longint            rpush [$];
  always @(negedge clk) if (rf_push) begin rwords.push_back(rf_data); rpush.push_back(cyc); end

  initial begin
    #1 reset_n = 0;
    #20 reset_n = 1;
    repeat (5) @(negedge clk);
    for (int it = 0; it < 40; it++) begin
      bit bc4;
      int nw;
      longint t;
      logic [2*DQ_W+2*NBL-1:0] words [4];
      bc4 = (it % 3 == 2);
      nw = bc4 ? 2 : 4;
      // ---- write burst ----
      for (int i = 0; i < nw; i++) begin
        words[i] = {(2*NBL)'($urandom), $urandom, $urandom};
        wq.push_back(words[i]);
      end
      beats.delete(); bmask.delete(); first_rise = -1; pre_cyc = -1;
      @(negedge clk);
      wr_start = 1; start_bc4 = bc4; t = cyc;
      @(negedge clk);
      wr_start = 0;
      repeat (CWL + 8) @(negedge clk);
      check(first_rise == t + 2 + CWL, $sformatf("first DQS rise in cycle %0d, expected %0d", first_rise - t, 2 + CWL));
      check(pre_cyc == t + 1 + CWL, "DQS preamble one cycle before the data");
      check(beats.size() == 2 * nw, $sformatf("%0d write beats, expected %0d", beats.size(), 2 * nw));
      check(wq.size() == 0, "all write words popped");
      for (int i = 0; i < 2 * nw && i < beats.size(); i++) begin
        logic [DQ_W-1:0] e;
        logic [NBL-1:0]  m;
        e = (i % 2 == 0) ? words[i/2][DQ_W-1:0] : words[i/2][2*DQ_W-1:DQ_W];
        m = (i % 2 == 0) ? words[i/2][2*DQ_W +: NBL] : words[i/2][2*DQ_W+NBL +: NBL];
        check(beats[i] == e, $sformatf("write beat %0d %h expected %h", i, beats[i], e));
        check(bmask[i] == m, $sformatf("write mask beat %0d", i));
      end
      // ---- read burst ----
      rbeats.delete(); rwords.delete(); rpush.delete(); rd_n = 0;
      for (int i = 0; i < 2 * nw; i++) rbeats.push_back($urandom);
      @(negedge clk);
      rd_start = 1; start_bc4 = bc4; t = cyc;
      rd_from = t + 2 + CL;
      @(negedge clk);
      rd_start = 0;
      repeat (CL + 10) @(negedge clk);
      rd_from = -1;
      check(rwords.size() == nw, $sformatf("%0d read words, expected %0d", rwords.size(), nw));
      for (int i = 0; i < nw && i < rwords.size(); i++) begin
        check(rwords[i] == {rbeats[2*i+1], rbeats[2*i]}, $sformatf("read word %0d", i));
        check(rpush[i] == t + 3 + CL + i, $sformatf("read word %0d pushed in cycle %0d, expected %0d", i, rpush[i] - t, 3 + CL + i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
