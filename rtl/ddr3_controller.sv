// ddr3_controller: DDR3 SDRAM controller, top level.
//
// A host issues read and write requests of whole bursts (8 beats, or 4 with
// burst chop) on a simple request/busy interface; the controller queues them,
// initializes the DDR3 memory after reset, keeps it refreshed, opens and
// closes rows bank by bank, and moves the data over the double-data-rate DQ
// bus with its DQS strobes.
//
// Blocks (after the controller's block diagram):
//   ddr3_clock_module   clk, clk_90 and the memory clock pair from clk_in (2x)
//   ddr3_queue_control  address, command, write data and read data FIFOs
//   ddr3_init_fsm       DDR3 power-up and mode register sequence
//   ddr3_cmd_fsm        control and timing: idle/refresh/reactive/write/read
//   ddr3_bank_mgmt      open row and timing of each bank of each rank
//   ddr3_refresh_ctrl   refresh interval counter
//   ddr3_addr_gen       registered command/address pins
//   ddr3_data_path      DDR data control (DQ, DQS, DM)
//
// Interface: host side in the clk domain (see ddr3_queue_control for the
// protocol); the memory side has CK/CK#, RESET#, CKE, CS#[CS_W], RAS#, CAS#,
// WE#, BA[BA_W], A[ROW_W], DM, and DQ/DQS split into output, output-enable
// and input for the bidirectional pad buffers, which are not part of this
// RTL. Request address: raddr = {rank, row, bank, column[COL_W-1:3]}.
// `fast` marks a request as open-page (no auto-precharge).
// Defaults: 32-bit DQ (64-bit host words), 8 banks, 14 row and 10 column
// bits, 8 chip selects, DDR3-800 timing at a 400 MHz memory clock, counted
// in memory clock cycles. The bank count, the 64-bit write data width, the
// FIFO depth of 8 and the 14-bit row address follow the description; the
// timing values are the DDR3 standard's and this design's own.
module ddr3_controller
  import ddr3_pkg::*;
#(
  parameter int DQ_W     = 32,
  parameter int BA_W     = 3,
  parameter int ROW_W    = 14,
  parameter int COL_W    = 10,
  parameter int CS_W     = 8,
  parameter int FIFO_DEPTH = 8,
  parameter int CL       = 6,
  parameter int CWL      = 5,
  parameter int T_RCD    = 6,
  parameter int T_RP     = 6,
  parameter int T_RAS    = 15,
  parameter int T_WR     = 6,
  parameter int T_RFC    = 64,
  parameter int T_REFI   = 3120,
  parameter int T_MRD    = 4,
  parameter int T_MOD    = 12,
  parameter int T_ZQINIT = 512,
  parameter int T_XPR    = 68,
  parameter int T_RESET  = 80000,
  parameter int T_CKE    = 200000,
  localparam int ADDR_W  = $clog2(CS_W) + ROW_W + BA_W + COL_W - 3
) (
  input  logic                  clk_in,
  input  logic                  reset_n,
  // host
  input  logic [ADDR_W-1:0]     raddr,
  input  logic [3:0]            b_size,
  input  logic                  r_req,
  input  logic                  w_req,
  input  logic                  fast,
  input  logic [2*DQ_W-1:0]     datain,
  input  logic [2*DQ_W/8-1:0]   dm_in,
  output logic                  busy,
  output logic                  d_req,
  output logic                  r_valid,
  output logic                  w_valid,
  output logic [2*DQ_W-1:0]     dataout,
  output logic                  init_done,
  output logic                  clk,
  output logic [2:0]            ctrl_state,
  // DDR3 memory
  output logic                  ext_clk,
  output logic                  ext_clk_n,
  output logic                  ddr_reset_n,
  output logic                  cke,
  output logic [CS_W-1:0]       cs_n,
  output logic                  ras_n,
  output logic                  cas_n,
  output logic                  we_n,
  output logic [BA_W-1:0]       ba,
  output logic [ROW_W-1:0]      sa,
  output logic [DQ_W/8-1:0]     dm,
  output logic [DQ_W-1:0]       dq_o,
  output logic                  dq_oe,
  input  logic [DQ_W-1:0]       dq_i,
  output logic [DQ_W/8-1:0]     dqs_o,
  output logic                  dqs_oe,
  input  logic [DQ_W/8-1:0]     dqs_i
);
  localparam int RK_W = $clog2(CS_W);
  localparam int WC_W = $clog2(FIFO_DEPTH + 1);

  logic clk_90, rst_n;

  ddr3_clock_module u_clock (
    .clk_in, .reset_n, .clk, .clk_90, .ext_clk, .ext_clk_n, .rst_n
  );

  // queue control <-> command FSM / data path
  logic                 cmd_empty, cmd_pop, w_done;
  cmd_entry_t           cmd_head;
  logic [ADDR_W-1:0]    addr_head;
  logic [WC_W-1:0]      wr_words;
  logic [2*DQ_W-1:0]    wf_data, rf_data;
  logic [2*DQ_W/8-1:0]  wf_mask;
  logic                 wf_pop, rf_push;

  ddr3_queue_control #(.DQ_W(DQ_W), .ADDR_W(ADDR_W), .DEPTH(FIFO_DEPTH)) u_queue (
    .clk, .rst_n, .raddr, .b_size, .r_req, .w_req, .fast, .datain, .dm_in,
    .busy, .d_req, .r_valid, .w_valid, .dataout,
    .cmd_empty, .cmd_head, .addr_head, .wr_words, .cmd_pop, .w_done,
    .wf_data, .wf_mask, .wf_pop, .rf_push, .rf_data
  );

  ddr_req_t init_req, req;

  ddr3_init_fsm #(
    .CL(CL), .CWL(CWL), .T_WR(T_WR), .T_RESET(T_RESET), .T_CKE(T_CKE),
    .T_XPR(T_XPR), .T_MRD(T_MRD), .T_MOD(T_MOD), .T_ZQINIT(T_ZQINIT)
  ) u_init (
    .clk, .rst_n, .ddr_reset_n, .cke, .req(init_req), .init_done
  );

  logic ref_req, ref_ack, ref_urgent;

  ddr3_refresh_ctrl #(.T_REFI(T_REFI)) u_refresh (
    .clk, .rst_n, .enable(init_done), .ref_ack, .ref_req, .ref_urgent
  );

  logic [RK_W-1:0]  look_rank, ev_rank;
  logic [BA_W-1:0]  look_bank, ev_bank;
  logic [ROW_W-1:0] look_row, ev_row;
  logic look_open, look_can_act, look_can_pre, any_open, all_ready;
  logic ev_act, ev_pre, ev_autopre, ev_pre_all;

  ddr3_bank_mgmt #(.CS_W(CS_W), .BA_W(BA_W), .ROW_W(ROW_W), .T_RAS(T_RAS), .T_RP(T_RP)) u_banks (
    .clk, .rst_n, .look_rank, .look_bank, .look_open, .look_row, .look_can_act, .look_can_pre,
    .ev_act, .ev_pre, .ev_autopre, .ev_pre_all, .ev_rank, .ev_bank, .ev_row,
    .any_open, .all_ready
  );

  logic wr_start, rd_start, start_bc4;

  ddr3_cmd_fsm #(
    .CS_W(CS_W), .BA_W(BA_W), .ROW_W(ROW_W), .COL_W(COL_W), .ADDR_W(ADDR_W),
    .CL(CL), .CWL(CWL), .T_RCD(T_RCD), .T_WR(T_WR), .T_RFC(T_RFC), .WC_W(WC_W)
  ) u_ctrl (
    .clk, .rst_n, .init_done, .init_req, .ref_req, .ref_ack,
    .cmd_empty, .cmd_head, .addr_head, .wr_words, .cmd_pop, .w_done,
    .look_rank, .look_bank, .look_open, .look_row, .look_can_act, .look_can_pre,
    .any_open, .all_ready, .ev_act, .ev_pre, .ev_autopre, .ev_pre_all,
    .ev_rank, .ev_bank, .ev_row,
    .req, .wr_start, .rd_start, .start_bc4, .state_o(ctrl_state)
  );

  ddr3_addr_gen #(.CS_W(CS_W), .BA_W(BA_W), .ROW_W(ROW_W), .COL_W(COL_W)) u_addr (
    .clk, .rst_n, .req, .cs_n, .ras_n, .cas_n, .we_n, .ba, .sa
  );

  ddr3_data_path #(.DQ_W(DQ_W), .CL(CL), .CWL(CWL)) u_data (
    .clk, .clk_90, .rst_n, .wr_start, .rd_start, .start_bc4,
    .wf_data, .wf_mask, .wf_pop, .rf_push, .rf_data,
    .dq_o, .dq_oe, .dq_i, .dqs_o, .dqs_oe, .dm_o(dm)
  );

  // Read strobes are not used: reads are sampled with clk_90 (see
  // ddr3_data_path); dqs_i is kept on the port for the pad interface.
  logic unused_dqs;
  assign unused_dqs = ^{dqs_i, ref_urgent};
endmodule
