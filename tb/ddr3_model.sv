// ddr3_model: behavioural model of one rank of DDR3 SDRAM, for simulation.
//
// Not synthesizable. It decodes the commands on the rising edge of CK while
// its chip select is low, stores written data in a sparse array and returns
// it on reads, and checks the controller against the DDR3 rules it can see:
//   - no ACTIVATE, READ or WRITE before the mode registers and ZQCL are done
//   - ACTIVATE only to an idle bank, tRP after its precharge (also after an
//     auto-precharge), READ/WRITE only to an open bank, tRCD after ACTIVATE
//   - PRECHARGE no sooner than tRAS after ACTIVATE
//   - REFRESH only with all banks idle, no command within tRFC after it
//   - write data: the first DQS rising edge CWL cycles after WRITE (with a
//     quarter-cycle margin) and all beats within the burst's cycles
// Every violation adds one to `errors`. Read data is driven edge-aligned
// with CK: beat 2j on the rising edge of cycle CL+j after READ, beat 2j+1 on
// the falling edge. Write beats are taken on both edges of DQS. DM high masks
// a byte. A burst starts at a column that is a multiple of 8; A12 low means
// burst chop 4. Unwritten locations read as zero. Outside its read bursts
// the model drives zeros, so the outputs of several ranks can be OR-ed.
module ddr3_model #(
  parameter int DQ_W  = 32,
  parameter int BA_W  = 3,
  parameter int ROW_W = 14,
  parameter int CL    = 6,
  parameter int CWL   = 5,
  parameter int T_RCD = 6,
  parameter int T_RP  = 6,
  parameter int T_RAS = 15,
  parameter int T_WR  = 6,
  parameter int T_RFC = 64
) (
  input  logic                ck,
  input  logic                reset_n,
  input  logic                cke,
  input  logic                cs_n,
  input  logic                ras_n,
  input  logic                cas_n,
  input  logic                we_n,
  input  logic [BA_W-1:0]     ba,
  input  logic [ROW_W-1:0]    a,
  input  logic [DQ_W/8-1:0]   dm,
  input  logic [DQ_W-1:0]     dq_in,
  input  logic                dq_in_en,
  input  logic [DQ_W/8-1:0]   dqs_in,
  input  logic                dqs_in_en,
  output logic [DQ_W-1:0]     dq_out,
  output logic [DQ_W/8-1:0]   dqs_out,
  output logic                driving
);
  localparam int NB  = 1 << BA_W;
  localparam int NBL = DQ_W / 8;

  int unsigned     errors = 0;
  int unsigned     n_cmds = 0, n_ref = 0, n_act = 0, n_rd = 0, n_wr = 0;
  longint          cyc = 0;
  logic [13:0]     mr [4];
  bit              mr_done [4];
  bit              zq_done = 0;
  bit              bank_open [NB];
  logic [ROW_W-1:0] open_row [NB];
  longint          act_at [NB];
  longint          free_at [NB];      // earliest cycle for the next ACTIVATE
  longint          ref_until = 0;
  longint          last_ref = -1, max_ref_gap = 0;
  logic [DQ_W-1:0] mem [longint];

  // pending read
  bit              rd_busy = 0;
  longint          rd_at;
  longint          rd_base;
  int              rd_beats, rd_j;
  // pending write
  bit              wr_busy = 0;
  longint          wr_at;
  longint          wr_base;
  int              wr_beats, wr_n;
  bit              wr_first_seen;

  initial begin
    dq_out  = '0;
    dqs_out = '0;
    driving = 1'b0;
    for (int b = 0; b < NB; b++) begin
      bank_open[b] = 0;
      open_row[b]  = '0;
      act_at[b]    = -1000;
      free_at[b]   = 0;
    end
    for (int i = 0; i < 4; i++) begin
      mr[i] = '0;
      mr_done[i] = 0;
    end
  end

  function automatic longint key(logic [BA_W-1:0] b, logic [ROW_W-1:0] r, logic [9:0] c);
    return longint'({b, r, c});
  endfunction

  task automatic err(string what);
    errors++;
    $display("[%0t] ddr3_model: %s", $time, what);
  endtask

  function automatic logic [DQ_W-1:0] read_word(longint k);
    return mem.exists(k) ? mem[k] : '0;
  endfunction

  always @(posedge ck) begin
    cyc++;
    // ---- command decode ----
    if (reset_n && cke && !cs_n && {ras_n, cas_n, we_n} != 3'b111) begin
      logic [2:0] c;
      c = {ras_n, cas_n, we_n};
      n_cmds++;
      if (cyc < ref_until) err("command within tRFC of REFRESH");
      if ((c == 3'b011 || c == 3'b101 || c == 3'b100) && !(zq_done && mr_done[0] && mr_done[1] && mr_done[2] && mr_done[3]))
        err("access before initialization completed");
      unique case (c)
        3'b000: begin                                   // MRS
          mr[ba[1:0]]      = 14'(a);
          mr_done[ba[1:0]] = 1;
        end
        3'b110: if (a[10]) zq_done = 1;                 // ZQCL
        3'b001: begin                                   // REFRESH
          n_ref++;
          for (int b = 0; b < NB; b++) begin
            if (bank_open[b]) err("REFRESH with a bank open");
            if (cyc < free_at[b]) err("REFRESH before tRP");
          end
          if (last_ref >= 0 && cyc - last_ref > max_ref_gap) max_ref_gap = cyc - last_ref;
          last_ref  = cyc;
          ref_until = cyc + T_RFC;
        end
        3'b010: begin                                   // PRECHARGE
          for (int b = 0; b < NB; b++) begin
            if (a[10] || b == int'(ba)) begin
              if (bank_open[b]) begin
                if (cyc - act_at[b] < T_RAS) err("PRECHARGE before tRAS");
                bank_open[b] = 0;
                free_at[b]   = cyc + T_RP;
              end
            end
          end
        end
        3'b011: begin                                   // ACTIVATE
          n_act++;
          if (bank_open[ba]) err("ACTIVATE to an open bank");
          if (cyc < free_at[ba]) err("ACTIVATE before tRP");
          bank_open[ba] = 1;
          open_row[ba]  = a;
          act_at[ba]    = cyc;
        end
        3'b101, 3'b100: begin                           // READ / WRITE
          longint ap_from;
          if (!bank_open[ba]) err("READ/WRITE to a closed bank");
          if (cyc - act_at[ba] < T_RCD) err("READ/WRITE before tRCD");
          if (a[2:0] != 3'b000) err("burst not aligned to 8 columns");
          if (c == 3'b101) begin
            n_rd++;
            if (rd_busy) err("READ while a read burst is pending");
            rd_busy  = 1;
            rd_at    = cyc + CL;
            rd_base  = key(ba, open_row[ba], a[9:0]);
            rd_beats = a[12] ? 8 : 4;
            rd_j     = 0;
            ap_from  = cyc + 4;
          end else begin
            n_wr++;
            if (wr_busy) err("WRITE while a write burst is pending");
            wr_busy       = 1;
            wr_at         = cyc;
            wr_base       = key(ba, open_row[ba], a[9:0]);
            wr_beats      = a[12] ? 8 : 4;
            wr_n          = 0;
            wr_first_seen = 0;
            ap_from       = cyc + CWL + 4 + T_WR;
          end
          if (a[10]) begin                              // auto-precharge
            if (ap_from < act_at[ba] + T_RAS) ap_from = act_at[ba] + T_RAS;
            bank_open[ba] = 0;
            free_at[ba]   = ap_from + T_RP;
          end
        end
        default: ;
      endcase
    end
    // ---- read data, even beats ----
    driving <= 1'b0;
    dq_out  <= '0;
    dqs_out <= '0;
    if (rd_busy && cyc >= rd_at) begin
      dq_out  <= read_word(rd_base + 2 * rd_j);
      dqs_out <= '1;
      driving <= 1'b1;
    end
    // ---- write: burst must be complete within its cycles ----
    if (wr_busy && cyc > wr_at + CWL + wr_beats / 2) begin
      if (wr_n != wr_beats) err($sformatf("write burst got %0d of %0d beats", wr_n, wr_beats));
      wr_busy = 0;
    end
  end

  always @(negedge ck) begin
    if (rd_busy && cyc >= rd_at) begin
      dq_out  <= read_word(rd_base + 2 * rd_j + 1);
      dqs_out <= '0;
      rd_j++;
      if (2 * rd_j >= rd_beats) rd_busy = 0;
    end
  end

  task automatic take_beat();
    logic [DQ_W-1:0] old, nw;
    longint k;
    if (!wr_busy) return;              // a burst for another rank
    if (wr_n >= wr_beats) begin
      err("write burst longer than its burst length");
      return;
    end
    k   = wr_base + wr_n;
    old = read_word(k);
    nw  = dq_in;
    for (int i = 0; i < NBL; i++) if (dm[i]) nw[8*i +: 8] = old[8*i +: 8];
    mem[k] = nw;
    if ($test$plusargs("trace")) $display("[%0t] mem beat %0h <= %h (dm %b)", $time, k, nw, dm);
    wr_n++;
  endtask

  always @(posedge dqs_in[0]) begin
    if (dqs_in_en && dq_in_en) begin
      if (wr_busy && !wr_first_seen) begin
        wr_first_seen = 1;
        if (cyc - wr_at != CWL) err($sformatf("first write DQS %0d cycles after WRITE, CWL is %0d", cyc - wr_at, CWL));
      end
      take_beat();
    end
  end

  always @(negedge dqs_in[0]) begin
    if (dqs_in_en && dq_in_en) take_beat();
  end
endmodule
