// ddr3_delay_counter: the controller's clock counter.
//
// A loadable down-counter that times the waits between DDR3 commands
// (tRP, tRCD, tRFC, tMRD, ...) for the state machines. Loading `value` N
// makes `done` go high N clock cycles later (N = 0 or 1: on the next cycle);
// `done` stays high until the next load. A load takes priority over counting;
// in the cycle of a load `done` still shows the old count, so a user loads on
// entering a wait and looks at `done` from the next cycle on.
module ddr3_delay_counter #(
  parameter int WIDTH = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] value,
  output logic             done
);
  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (load)     cnt <= (value == '0) ? '0 : value - 1'b1;
    else if (cnt != 0) cnt <= cnt - 1'b1;
  end

  assign done = (cnt == '0);
endmodule
