// ddr3_bank_mgmt: bank management of the DDR3 controller.
//
// A DDR3 device has eight banks, chosen by BA[2:0] (bank n for BA = n), and
// each bank can hold one row open in its sense amplifiers. This block keeps,
// for every bank of every rank (chip select), whether a row is open and which,
// and two countdowns:
//   act_wait  cycles until the bank may be activated again (tRP after its
//             precharge, including a precharge done by auto-precharge)
//   pre_wait  cycles until the open row may be closed (tRAS after activate)
// The command state machine looks up one bank (`look_rank`, `look_bank`) and
// reports each command it issues through the `ev_*` inputs:
//   ev_act      ACTIVATE of `ev_row` in bank (ev_rank, ev_bank)
//   ev_pre      PRECHARGE of that bank
//   ev_autopre  the column access with auto-precharge has finished; the bank
//               closes as soon as tRAS allows and is free tRP later
//   ev_pre_all  PRECHARGE ALL, sent to every rank before a refresh
// `any_open` and `all_ready` let the refresh path know whether a precharge-all
// is needed and allowed. The table is updated one cycle after the event.
// The eight banks and their selection follow the description; the timers are
// this design's own choice for meeting the DDR3 timing rules.
module ddr3_bank_mgmt #(
  parameter int CS_W  = 8,
  parameter int BA_W  = 3,
  parameter int ROW_W = 14,
  parameter int T_RAS = 15,
  parameter int T_RP  = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(CS_W)-1:0]  look_rank,
  input  logic [BA_W-1:0]          look_bank,
  output logic                     look_open,
  output logic [ROW_W-1:0]         look_row,
  output logic                     look_can_act,
  output logic                     look_can_pre,
  input  logic                     ev_act,
  input  logic                     ev_pre,
  input  logic                     ev_autopre,
  input  logic                     ev_pre_all,
  input  logic [$clog2(CS_W)-1:0]  ev_rank,
  input  logic [BA_W-1:0]          ev_bank,
  input  logic [ROW_W-1:0]         ev_row,
  output logic                     any_open,
  output logic                     all_ready
);
  localparam int NB = CS_W * (1 << BA_W);
  localparam int IW = $clog2(NB);
  localparam int TW = $clog2(T_RAS + T_RP + 1);

  logic [NB-1:0]    open_q;
  logic [ROW_W-1:0] row_q    [NB];
  logic [TW-1:0]    act_wait [NB];
  logic [TW-1:0]    pre_wait [NB];

  logic [IW-1:0] look_idx, ev_idx;
  assign look_idx = {look_rank, look_bank};
  assign ev_idx   = {ev_rank, ev_bank};

  assign look_open    = open_q[look_idx];
  assign look_row     = row_q[look_idx];
  assign look_can_act = (act_wait[look_idx] == '0);
  assign look_can_pre = (pre_wait[look_idx] == '0);
  assign any_open     = |open_q;

  always_comb begin
    all_ready = 1'b1;
    for (int i = 0; i < NB; i++) begin
      if (act_wait[i] != '0 || (open_q[i] && pre_wait[i] != '0)) all_ready = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q <= '0;
      for (int i = 0; i < NB; i++) begin
        row_q[i]    <= '0;
        act_wait[i] <= '0;
        pre_wait[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NB; i++) begin
        if (act_wait[i] != '0) act_wait[i] <= act_wait[i] - 1'b1;
        if (pre_wait[i] != '0) pre_wait[i] <= pre_wait[i] - 1'b1;
        if (ev_pre_all) begin
          open_q[i]   <= 1'b0;
          act_wait[i] <= TW'(T_RP);
        end
      end
      if (ev_act) begin
        open_q[ev_idx]   <= 1'b1;
        row_q[ev_idx]    <= ev_row;
        pre_wait[ev_idx] <= TW'(T_RAS);
      end
      if (ev_pre) begin
        open_q[ev_idx]   <= 1'b0;
        act_wait[ev_idx] <= TW'(T_RP);
      end
      if (ev_autopre) begin
        open_q[ev_idx]   <= 1'b0;
        // the precharge starts when tRAS has passed (pre_wait is 1 in the
        // last cycle before that)
        act_wait[ev_idx] <= ((pre_wait[ev_idx] != '0) ? pre_wait[ev_idx] - 1'b1 : '0) + TW'(T_RP);
      end
    end
  end

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({ev_act, ev_pre, ev_autopre, ev_pre_all}));
  a_act_closed: assert property (@(posedge clk) disable iff (!rst_n)
                                 ev_act |-> !open_q[ev_idx] && act_wait[ev_idx] == '0);
endmodule
