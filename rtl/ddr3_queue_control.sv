// ddr3_queue_control: queue control, the host side of the DDR3 controller.
//
// Holds the four FIFOs between the host and the memory side, each eight
// entries deep:
//   address FIFO     the request address (rank, row, bank, burst column)
//   command FIFO     the 2-bit command (01 normal read, 10 write, 11 fast
//                    read, 00 fast write) and the burst-chop flag
//   write data FIFO  2n-bit data words with their byte masks
//   read data FIFO   2n-bit words read from the memory
// Host protocol, all on the rising edge of clk:
//   - A request is taken in a cycle with r_req or w_req high and busy low;
//     raddr, b_size (8 = burst of 8, 4 = burst chop 4) and fast are sampled
//     with it. r_req and w_req must not be high together.
//   - After a write request, d_req is high for one cycle per data word
//     (4 words, or 2 for burst chop); the host shows the next word on
//     datain/dm_in in each such cycle. busy stays high meanwhile.
//   - busy is high when a FIFO cannot take a whole request.
//   - Read data leaves the read data FIFO one word per cycle, marked by
//     r_valid; w_valid pulses when a write burst has been completed.
// The FIFOs, their depth, the 2-bit command width and the codes 01, 10, 11
// follow the description; the handshake around busy, d_req, r_valid and
// w_valid (signal names from the block diagram) is this design's own.
module ddr3_queue_control
  import ddr3_pkg::*;
#(
  parameter int DQ_W   = 32,
  parameter int ADDR_W = 27,
  parameter int DEPTH  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
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
  // command state machine
  output logic                  cmd_empty,
  output cmd_entry_t            cmd_head,
  output logic [ADDR_W-1:0]     addr_head,
  output logic [$clog2(DEPTH+1)-1:0] wr_words,
  input  logic                  cmd_pop,
  input  logic                  w_done,
  // data path
  output logic [2*DQ_W-1:0]     wf_data,
  output logic [2*DQ_W/8-1:0]   wf_mask,
  input  logic                  wf_pop,
  input  logic                  rf_push,
  input  logic [2*DQ_W-1:0]     rf_data
);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int MW = 2 * DQ_W / 8;

  logic       cmd_full, addr_full, addr_empty, wf_full, wf_empty, rf_full, rf_empty;
  logic [CW-1:0] cmd_count, addr_count, rf_count;
  logic       take_r, take_w, bc4;
  logic [2:0] words_left;
  cmd_entry_t new_cmd;

  assign bc4    = (b_size == 4'd4);
  assign take_w = w_req && !busy;
  assign take_r = r_req && !w_req && !busy;

  always_comb begin
    new_cmd.bc4 = bc4;
    if (take_w) new_cmd.op = fast ? OP_FAST_WRITE : OP_WRITE;
    else        new_cmd.op = fast ? OP_FAST_READ  : OP_READ;
  end

  // Room for a whole burst of write data (4 words) is required to take any
  // request, so requests stay in order without looking ahead.
  assign busy  = d_req || cmd_full || addr_full || (wr_words > CW'(DEPTH - 4));
  assign d_req = (words_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      words_left <= '0;
    else if (take_w) words_left <= bc4 ? 3'd2 : 3'd4;
    else if (d_req)  words_left <= words_left - 1'b1;
  end

  ddr3_sync_fifo #(.WIDTH($bits(cmd_entry_t)), .DEPTH(DEPTH)) u_command_fifo (
    .clk, .rst_n, .push(take_w || take_r), .wdata(new_cmd), .pop(cmd_pop),
    .rdata(cmd_head), .full(cmd_full), .empty(cmd_empty), .count(cmd_count)
  );

  ddr3_sync_fifo #(.WIDTH(ADDR_W), .DEPTH(DEPTH)) u_address_fifo (
    .clk, .rst_n, .push(take_w || take_r), .wdata(raddr), .pop(cmd_pop),
    .rdata(addr_head), .full(addr_full), .empty(addr_empty), .count(addr_count)
  );

  ddr3_sync_fifo #(.WIDTH(2 * DQ_W + MW), .DEPTH(DEPTH)) u_write_data_fifo (
    .clk, .rst_n, .push(d_req), .wdata({dm_in, datain}), .pop(wf_pop),
    .rdata({wf_mask, wf_data}), .full(wf_full), .empty(wf_empty), .count(wr_words)
  );

  ddr3_sync_fifo #(.WIDTH(2 * DQ_W), .DEPTH(DEPTH)) u_read_data_fifo (
    .clk, .rst_n, .push(rf_push), .wdata(rf_data), .pop(!rf_empty),
    .rdata(dataout), .full(rf_full), .empty(rf_empty), .count(rf_count)
  );

  assign r_valid = !rf_empty;
  assign w_valid = w_done;

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n) !(r_req && w_req));
  a_cmd_addr_together: assert property (@(posedge clk) disable iff (!rst_n) cmd_empty == addr_empty);
  a_rf_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) rf_push |-> !rf_full);
endmodule
