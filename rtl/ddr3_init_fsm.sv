// ddr3_init_fsm: initialization control of the DDR3 controller.
//
// Before any read or write the DDR3 memory must be initialized; afterwards it
// rests in IDLE. This state machine walks through the JEDEC DDR3 power-up
// sequence:
//   RESET  hold the memory's RESET# and CKE low for T_RESET cycles (200 us)
//   CKE    release RESET#, keep CKE low for T_CKE cycles (500 us)
//   XPR    raise CKE, send NOPs for T_XPR cycles (tXPR)
//   MR2, MR3, MR1, MR0   load the mode registers, T_MRD apart; T_MOD after MR0
//   ZQCL   long ZQ calibration, then T_ZQINIT cycles
//   DONE   init_done = 1 (the "init done" arc to idle)
// Every state sends its command in its first cycle (to all chip selects) and
// loads the clock counter with its wait; it leaves when the counter is done.
// Mode registers: burst length on the fly (BL8 or burst chop 4), CL, tWR and
// CWL taken from the parameters. The sequence itself is the DDR3 standard's;
// the description names the initialization state machine only, so the steps
// and their waits are taken from the standard.
//
// Output `req` is one command for the address generator, valid for one cycle.
module ddr3_init_fsm
  import ddr3_pkg::*;
#(
  parameter int CL       = 6,
  parameter int CWL      = 5,
  parameter int T_WR     = 6,
  parameter int T_RESET  = 80000,
  parameter int T_CKE    = 200000,
  parameter int T_XPR    = 68,
  parameter int T_MRD    = 4,
  parameter int T_MOD    = 12,
  parameter int T_ZQINIT = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  output logic     ddr_reset_n,
  output logic     cke,
  output ddr_req_t req,
  output logic     init_done
);
  localparam int CNT_W = 18;

  typedef enum logic [3:0] {
    I_RESET, I_CKE, I_XPR, I_MR2, I_MR3, I_MR1, I_MR0, I_ZQCL, I_DONE
  } istate_e;

  istate_e state, next_state;
  logic    entered;           // first cycle of the state has passed
  logic    load, done;
  logic [CNT_W-1:0] wait_cycles;

  ddr3_delay_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk, .rst_n, .load, .value(wait_cycles), .done
  );

  function automatic ddr_req_t mrs(logic [2:0] mr, logic [13:0] value);
    ddr_req_t r;
    r           = REQ_NOP;
    r.valid     = 1'b1;
    r.cmd       = DDR_MRS;
    r.all_ranks = 1'b1;
    r.bank      = mr;
    r.row       = value;
    return r;
  endfunction

  always_comb begin
    next_state  = state;
    req         = REQ_NOP;
    load        = 1'b0;
    wait_cycles = '0;
    unique case (state)
      I_RESET: wait_cycles = CNT_W'(T_RESET);
      I_CKE:   wait_cycles = CNT_W'(T_CKE);
      I_XPR:   wait_cycles = CNT_W'(T_XPR);
      I_MR2:   begin wait_cycles = CNT_W'(T_MRD); req = mrs(3'd2, mr2_value(CWL)); end
      I_MR3:   begin wait_cycles = CNT_W'(T_MRD); req = mrs(3'd3, '0); end
      I_MR1:   begin wait_cycles = CNT_W'(T_MRD); req = mrs(3'd1, mr1_value()); end
      I_MR0:   begin wait_cycles = CNT_W'(T_MOD); req = mrs(3'd0, mr0_value(CL, T_WR)); end
      I_ZQCL: begin
        wait_cycles   = CNT_W'(T_ZQINIT);
        req.valid     = 1'b1;
        req.cmd       = DDR_ZQC;
        req.all_ranks = 1'b1;
        req.a10       = 1'b1;
      end
      I_DONE: ;
      default: ;
    endcase
    if (state == I_DONE) begin
      req = REQ_NOP;
    end else if (!entered) begin
      load = 1'b1;
    end else begin
      req = REQ_NOP;
      if (done) next_state = istate_e'(state + 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= I_RESET;
      entered <= 1'b0;
    end else begin
      state   <= next_state;
      entered <= (next_state == state);
    end
  end

  assign ddr_reset_n = (state != I_RESET);
  assign cke         = (state != I_RESET) && (state != I_CKE);
  assign init_done   = (state == I_DONE);
endmodule
