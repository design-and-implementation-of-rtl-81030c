// ddr3_data_path: DDR data control of the controller.
//
// Moves data between the controller's 2n-bit words and the n-bit DDR3 data
// bus, which carries one beat on each edge of the memory clock. One word is
// one clock cycle of the bus: its low half is the first beat (clock high),
// its high half the second (clock low). A burst of 8 is four words, a burst
// chop of 4 two.
//
// Write: a WRITE sent in cycle t reaches the memory at the end of cycle t+1,
// so its data is due CWL cycles later, in cycles t+2+CWL onward. From
// wr_start the block counts CWL+1 cycles, then pops one word per cycle from
// the write data FIFO into the DQ/DM output registers. DQ changes on the
// controller clock edges; DQS is the 90-degree clock gated by the burst, so
// each DQS edge sits in the middle of its data beat (centre-aligned, as DDR3
// writes require). DQS is driven low for one cycle before the burst
// (preamble). The output-enables go to the pad buffers outside.
// Read: a READ sent in cycle t brings data edge-aligned with the memory clock
// in cycles t+2+CL onward. Each beat is sampled in the middle of its eye by
// the rising (first beat) and falling (second beat) edge of clk_90, the pair
// is moved into the clk domain at the next clk edge and pushed into the read
// data FIFO one cycle later.
// The data path's place between the FIFOs and the DDR3 pins follows the block
// diagram (clk and clk_90 both reach it); the beat order, the alignment and
// the use of clk_90 for both directions are this design's own choices.
module ddr3_data_path #(
  parameter int DQ_W = 32,
  parameter int CL   = 6,
  parameter int CWL  = 5
) (
  input  logic                  clk,
  input  logic                  clk_90,
  input  logic                  rst_n,
  // from the command state machine
  input  logic                  wr_start,
  input  logic                  rd_start,
  input  logic                  start_bc4,
  // write data FIFO: {mask, data}, first-word-fall-through
  input  logic [2*DQ_W-1:0]     wf_data,
  input  logic [2*DQ_W/8-1:0]   wf_mask,
  output logic                  wf_pop,
  // read data FIFO
  output logic                  rf_push,
  output logic [2*DQ_W-1:0]     rf_data,
  // DDR3 data pins, split for the pad buffers
  output logic [DQ_W-1:0]       dq_o,
  output logic                  dq_oe,
  input  logic [DQ_W-1:0]       dq_i,
  output logic [DQ_W/8-1:0]     dqs_o,
  output logic                  dqs_oe,
  output logic [DQ_W/8-1:0]     dm_o
);
  localparam int PIPE = ((CL > CWL) ? CL : CWL) + 6;
  localparam int NBL  = DQ_W / 8;

  // Shift registers: bit i is set in cycle t+1+i after a start in cycle t.
  logic [PIPE-1:0] wr_pipe, rd_pipe;
  logic            wr_bc4, rd_bc4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pipe <= '0;
      rd_pipe <= '0;
      wr_bc4  <= 1'b0;
      rd_bc4  <= 1'b0;
    end else begin
      wr_pipe <= {wr_pipe[PIPE-2:0], wr_start};
      rd_pipe <= {rd_pipe[PIPE-2:0], rd_start};
      if (wr_start) wr_bc4 <= start_bc4;
      if (rd_start) rd_bc4 <= start_bc4;
    end
  end

  // ---------------- write ----------------
  logic wr_send, wr_pre;   // this cycle loads a word / the preamble
  assign wr_send = wr_pipe[CWL] || wr_pipe[CWL+1] ||
                   (!wr_bc4 && (wr_pipe[CWL+2] || wr_pipe[CWL+3]));
  assign wr_pre  = wr_pipe[CWL-1];
  assign wf_pop  = wr_send;

  logic [DQ_W-1:0] dq_rise, dq_fall;
  logic [NBL-1:0]  dm_rise, dm_fall;
  logic            wr_en, wr_pre_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_rise  <= '0;
      dq_fall  <= '0;
      dm_rise  <= '0;
      dm_fall  <= '0;
      wr_en    <= 1'b0;
      wr_pre_q <= 1'b0;
    end else begin
      wr_en    <= wr_send;
      wr_pre_q <= wr_pre;
      if (wr_send) begin
        dq_rise <= wf_data[DQ_W-1:0];
        dq_fall <= wf_data[2*DQ_W-1:DQ_W];
        dm_rise <= wf_mask[NBL-1:0];
        dm_fall <= wf_mask[2*NBL-1:NBL];
      end
    end
  end

  // Double-data-rate output: the clock level picks the beat.
  assign dq_o   = clk ? dq_rise : dq_fall;
  assign dm_o   = clk ? dm_rise : dm_fall;
  assign dq_oe  = wr_en;
  assign dqs_o  = {NBL{wr_en & clk_90}};
  assign dqs_oe = wr_en | wr_pre_q;

  // ---------------- read ----------------
  logic [DQ_W-1:0]   cap_rise, cap_fall;
  logic              rd_data_cycle;
  logic [2*DQ_W-1:0] rd_word;
  logic              rd_word_v;

  assign rd_data_cycle = rd_pipe[CL+1] || rd_pipe[CL+2] ||
                         (!rd_bc4 && (rd_pipe[CL+3] || rd_pipe[CL+4]));

  always_ff @(posedge clk_90) cap_rise <= dq_i;
  always_ff @(negedge clk_90) cap_fall <= dq_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_word   <= '0;
      rd_word_v <= 1'b0;
    end else begin
      rd_word_v <= rd_data_cycle;
      rd_word   <= {cap_fall, cap_rise};
    end
  end

  assign rf_push = rd_word_v;
  assign rf_data = rd_word;

  initial begin
    assert (CWL >= 1) else $error("CWL must be at least 1");
  end
endmodule
