// ddr3_cmd_fsm: control and timing (command state machine) of the controller.
//
// States, after the state diagram of the design:
//   INIT      the initialization sequence runs; its commands pass through
//   IDLE      waits for work. A refresh that is owed comes first; otherwise
//             the oldest queued request is taken. If its row is already open
//             in its bank ("same row") it goes straight to WRITE or READ;
//             otherwise it goes through REACTIVE.
//   REACTIVE  closes the bank's open row if a different one is open
//             (PRECHARGE, after tRAS), then opens the wanted row (ACTIVATE,
//             after tRP) and waits tRCD.
//   WRITE     sends WRITE and starts the write data burst; waits until the
//             burst and the write recovery time are over ("WR done").
//   READ      sends READ and starts read capture; waits until the burst has
//             been captured ("RD done").
//   REFRESH   precharges all banks if any is open, then sends AUTO REFRESH to
//             every rank and waits tRFC.
// Normal reads and writes use auto-precharge (A10 = 1), so the row closes
// after them; fast ones leave it open for a following same-row access.
// Requests are served strictly in order. The request address is
// {rank, row, bank, column[COL_W-1:3]}: bursts are aligned to 8 beats.
//
// Interface: the heads of the command and address FIFOs come in with
// `cmd_empty`; `cmd_pop` removes both. `wr_words` is the write data FIFO's
// fill; a write waits until its whole burst (4 words, 2 for burst chop) is
// there. `req` goes to the address generator (on the pins one cycle later).
// `wr_start`/`rd_start` tell the data path that a WRITE/READ is being sent in
// this cycle; `w_done` pulses when a write is finished. Waits are timed with
// the clock counter, bank timing with the bank management block.
// The states and their arcs follow the state diagram; the sub-steps and the
// DDR3 timing they keep are this design's own.
module ddr3_cmd_fsm
  import ddr3_pkg::*;
#(
  parameter int CS_W   = 8,
  parameter int BA_W   = 3,
  parameter int ROW_W  = 14,
  parameter int COL_W  = 10,
  parameter int ADDR_W = $clog2(CS_W) + ROW_W + BA_W + COL_W - 3,
  parameter int CL     = 6,
  parameter int CWL    = 5,
  parameter int T_RCD  = 6,
  parameter int T_WR   = 6,
  parameter int T_RFC  = 64,
  parameter int WC_W   = 4    // width of the write FIFO fill count
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // initialization control
  input  logic                     init_done,
  input  ddr_req_t                 init_req,
  // refresh control
  input  logic                     ref_req,
  output logic                     ref_ack,
  // queue control
  input  logic                     cmd_empty,
  input  cmd_entry_t               cmd_head,
  input  logic [ADDR_W-1:0]        addr_head,
  input  logic [WC_W-1:0]          wr_words,
  output logic                     cmd_pop,
  output logic                     w_done,
  // bank management
  output logic [$clog2(CS_W)-1:0]  look_rank,
  output logic [BA_W-1:0]          look_bank,
  input  logic                     look_open,
  input  logic [ROW_W-1:0]         look_row,
  input  logic                     look_can_act,
  input  logic                     look_can_pre,
  input  logic                     any_open,
  input  logic                     all_ready,
  output logic                     ev_act,
  output logic                     ev_pre,
  output logic                     ev_autopre,
  output logic                     ev_pre_all,
  output logic [$clog2(CS_W)-1:0]  ev_rank,
  output logic [BA_W-1:0]          ev_bank,
  output logic [ROW_W-1:0]         ev_row,
  // address generation and data path
  output ddr_req_t                 req,
  output logic                     wr_start,
  output logic                     rd_start,
  output logic                     start_bc4,
  // observation
  output logic [2:0]               state_o
);
  localparam int RK_W = $clog2(CS_W);
  localparam int CNT_W = 10;

  typedef enum logic [2:0] {
    C_INIT, C_IDLE, C_REFRESH, C_REACTIVE, C_WRITE, C_READ
  } cstate_e;

  cstate_e    state, next_state;
  logic [1:0] phase, next_phase;

  // Request fields
  logic [RK_W-1:0]    rq_rank;
  logic [ROW_W-1:0]   rq_row;
  logic [BA_W-1:0]    rq_bank;
  logic [COL_W-4:0]   rq_colhi;
  logic               rq_read, rq_fast, rq_bc4;
  logic [WC_W-1:0]    rq_words;
  logic               row_hit;
  logic            ap_pending;
  logic [RK_W-1:0] ap_rank;
  logic [BA_W-1:0] ap_bank;


  assign {rq_rank, rq_row, rq_bank, rq_colhi} = addr_head;
  assign rq_read  = op_is_read(cmd_head.op);
  assign rq_fast  = op_is_fast(cmd_head.op);
  assign rq_bc4   = cmd_head.bc4;
  assign rq_words = rq_bc4 ? WC_W'(2) : WC_W'(4);
  assign row_hit  = look_open && (look_row == rq_row);

  assign look_rank = rq_rank;
  assign look_bank = rq_bank;
  assign ev_row    = rq_row;
  assign ev_rank   = ev_autopre ? ap_rank : rq_rank;
  assign ev_bank   = ev_autopre ? ap_bank : rq_bank;
  assign state_o   = state;

  // Clock counter
  logic             cnt_load, cnt_done;
  logic [CNT_W-1:0] cnt_value;
  ddr3_delay_counter #(.WIDTH(CNT_W)) u_clock_counter (
    .clk, .rst_n, .load(cnt_load), .value(cnt_value), .done(cnt_done)
  );

  function automatic ddr_req_t bank_cmd(ddr_cmd_e c, logic [RK_W-1:0] rk, logic [BA_W-1:0] bk);
    ddr_req_t r;
    r       = REQ_NOP;
    r.valid = 1'b1;
    r.cmd   = c;
    r.rank  = 3'(rk);
    r.bank  = 3'(bk);
    return r;
  endfunction

  always_comb begin
    next_state = state;
    next_phase = phase;
    req        = REQ_NOP;
    ref_ack    = 1'b0;
    cmd_pop    = 1'b0;
    w_done     = 1'b0;
    ev_act     = 1'b0;
    ev_pre     = 1'b0;
    ev_autopre = 1'b0;
    ev_pre_all = 1'b0;
    wr_start   = 1'b0;
    rd_start   = 1'b0;
    start_bc4  = rq_bc4;
    cnt_load   = 1'b0;
    cnt_value  = '0;

    unique case (state)
      C_INIT: begin
        req = init_req;
        if (init_done) next_state = C_IDLE;
      end

      C_IDLE: begin
        next_phase = 2'd0;
        if (ref_req) begin
          next_state = C_REFRESH;
        end else if (!cmd_empty && (rq_read || wr_words >= rq_words)) begin
          if (row_hit) next_state = rq_read ? C_READ : C_WRITE;
          else         next_state = C_REACTIVE;
        end
      end

      C_REFRESH: begin
        unique case (phase)
          2'd0: if (all_ready) begin         // close every open row
            if (any_open) begin
              req           = bank_cmd(DDR_PRE, '0, '0);
              req.all_ranks = 1'b1;
              req.a10       = 1'b1;
              ev_pre_all    = 1'b1;
            end
            next_phase = 2'd1;
          end
          2'd1: if (all_ready) begin         // tRP has passed
            req           = bank_cmd(DDR_REF, '0, '0);
            req.all_ranks = 1'b1;
            ref_ack       = 1'b1;
            cnt_load      = 1'b1;
            cnt_value     = CNT_W'(T_RFC);
            next_phase    = 2'd2;
          end
          default: if (cnt_done) begin
            next_state = C_IDLE;
            next_phase = 2'd0;
          end
        endcase
      end

      C_REACTIVE: begin
        unique case (phase)
          2'd0: begin
            if (!look_open) begin
              next_phase = 2'd1;
            end else if (look_can_pre) begin // a different row is open
              req        = bank_cmd(DDR_PRE, rq_rank, rq_bank);
              ev_pre     = 1'b1;
              next_phase = 2'd1;
            end
          end
          2'd1: if (look_can_act) begin
            req        = bank_cmd(DDR_ACT, rq_rank, rq_bank);
            req.row    = 14'(rq_row);
            ev_act     = 1'b1;
            cnt_load   = 1'b1;
            cnt_value  = CNT_W'(T_RCD);
            next_phase = 2'd2;
          end
          default: if (cnt_done) begin
            next_state = rq_read ? C_READ : C_WRITE;
            next_phase = 2'd0;
          end
        endcase
      end

      C_WRITE, C_READ: begin
        if (phase == 2'd0) begin
          req       = bank_cmd(state == C_READ ? DDR_RD : DDR_WR, rq_rank, rq_bank);
          req.col   = 10'({rq_colhi, 3'b000});
          req.a10   = !rq_fast;
          req.bc4   = rq_bc4;
          wr_start  = (state == C_WRITE);
          rd_start  = (state == C_READ);
          cmd_pop   = 1'b1;
          cnt_load  = 1'b1;
          cnt_value = (state == C_WRITE) ? CNT_W'(CWL + 4 + T_WR + 2) : CNT_W'(CL + 4 + 2);
          next_phase = 2'd1;
        end else if (cnt_done) begin
          w_done     = (state == C_WRITE);
          ev_autopre = ap_pending;
          next_state = C_IDLE;
          next_phase = 2'd0;
        end
      end

      default: next_state = C_IDLE;
    endcase
  end

  // The request is popped when its READ/WRITE is sent, but its bank closes
  // (auto-precharge) only when the access is over: keep rank and bank here.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_INIT;
      phase      <= 2'd0;
      ap_pending <= 1'b0;
      ap_rank    <= '0;
      ap_bank    <= '0;
    end else begin
      state <= next_state;
      phase <= next_phase;
      if (cmd_pop) begin
        ap_pending <= !rq_fast;
        ap_rank    <= rq_rank;
        ap_bank    <= rq_bank;
      end else if (ev_autopre) begin
        ap_pending <= 1'b0;
      end
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) cmd_pop |-> !cmd_empty);
  a_ref_in_idle_banks: assert property (@(posedge clk) disable iff (!rst_n)
                                        ref_ack |-> !any_open);
endmodule
