// ddr3_clock_module: clock module of the DDR3 controller.
//
// From one input clock `clk_in` at twice the memory clock rate it makes:
//   clk        controller clock = memory clock, clk_in divided by two
//   clk_90     clk delayed by a quarter period (90 degrees), for the data path
//   ext_clk, ext_clk_n   the differential memory clock CK/CK#
//   rst_n      reset, asserted at once with reset_n and released
//              synchronously to clk after two clk edges
// clk toggles on each rising edge of clk_in; clk_90 copies clk on each falling
// edge of clk_in, half an input period, that is a quarter of a clk period,
// later. So the phase relation holds whenever reset is released.
// The block and its outputs (clk, clk_90, ext_clk, ext_clk_n from clk_in)
// follow the block diagram; deriving them from a 2x clock (the clk2x of the
// simulation traces) rather than from a PLL is this design's own choice.
// The reset synchronizer's output drives asynchronous resets while its own
// flops take it as data; lint tools note this mixed use, which is intended.
module ddr3_clock_module (
  input  logic clk_in,
  input  logic reset_n,
  output logic clk,
  output logic clk_90,
  output logic ext_clk,
  output logic ext_clk_n,
  output logic rst_n
);
  always_ff @(posedge clk_in or negedge reset_n) begin
    if (!reset_n) clk <= 1'b0;
    else          clk <= ~clk;
  end

  always_ff @(negedge clk_in or negedge reset_n) begin
    if (!reset_n) clk_90 <= 1'b0;
    else          clk_90 <= clk;
  end

  assign ext_clk   = clk;
  assign ext_clk_n = ~clk;

  logic [1:0] rst_sync;
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) rst_sync <= 2'b00;
    else          rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];
endmodule
