// ddr3_refresh_ctrl: refresh counter of the DDR3 controller.
//
// DRAM cells leak, so every row must be refreshed; DDR3 does this with one
// AUTO REFRESH command on average every tREFI. This block counts clock cycles
// once initialization is done and, each time T_REFI cycles have passed, adds
// one to the number of refreshes owed. `ref_req` is high while any refresh is
// owed; the command state machine answers with a one-cycle `ref_ack` when it
// has issued the REFRESH command, which removes one from the count. Up to
// MAX_OWED refreshes may be owed (JEDEC allows eight to be postponed);
// `ref_urgent` rises when that many are owed. The interval keeps running
// while refreshes wait, so the average rate stays one per tREFI.
// The refresh timer and its request ("Rfs cyc") follow the described state
// diagram; the owed counter and its limit are this design's own choice.
module ddr3_refresh_ctrl #(
  parameter int T_REFI   = 3120,   // 7.8 us at a 400 MHz memory clock
  parameter int MAX_OWED = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,      // high once initialization is done
  input  logic ref_ack,
  output logic ref_req,
  output logic ref_urgent
);
  localparam int CW = $clog2(T_REFI + 1);
  localparam int OW = $clog2(MAX_OWED + 1);

  logic [CW-1:0] timer;
  logic [OW-1:0] owed;
  logic          tick;

  assign tick = enable && (timer == CW'(T_REFI - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
    end else if (!enable || tick) begin
      timer <= '0;
    end else begin
      timer <= timer + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owed <= '0;
    end else begin
      case ({tick && owed != OW'(MAX_OWED), ref_ack && owed != '0})
        2'b10:   owed <= owed + 1'b1;
        2'b01:   owed <= owed - 1'b1;
        default: owed <= owed;
      endcase
    end
  end

  assign ref_req    = (owed != '0);
  assign ref_urgent = (owed == OW'(MAX_OWED));

  a_ack_only_when_req: assert property (@(posedge clk) disable iff (!rst_n) ref_ack |-> ref_req);
endmodule
