// ddr3_addr_gen: address generation for the DDR3 command/address bus.
//
// Turns one command record from the state machines into the registered DDR3
// bus pins, so that every pin changes on the same controller clock edge:
//   cs_n      one chip select per rank, low for the addressed rank, all low
//             for commands sent to every rank (MRS, ZQCL, REFRESH, PRE ALL),
//             all high (deselect) when no command is valid
//   ras_n, cas_n, we_n   the command encoding of the DDR3 standard
//   ba        bank address BA[2:0] (bank n for BA = n)
//   sa        ACT: row; RD/WR: column on A9:A0, auto-precharge on A10,
//             A12 = 1 for a burst of 8 and 0 for burst chop 4;
//             PRE: A10 = all banks; ZQC: A10 = long calibration;
//             MRS: the mode register value, with the register number on ba.
// A command given in cycle t is on the pins during cycle t+1.
// The pins follow the block diagram (sa, ba, cs_n, ras_n, cas_n, we_n); the
// bank field is three bits wide as the bank-selection table requires.
module ddr3_addr_gen
  import ddr3_pkg::*;
#(
  parameter int CS_W  = 8,
  parameter int BA_W  = 3,
  parameter int ROW_W = 14,
  parameter int COL_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ddr_req_t         req,
  output logic [CS_W-1:0]  cs_n,
  output logic             ras_n,
  output logic             cas_n,
  output logic             we_n,
  output logic [BA_W-1:0]  ba,
  output logic [ROW_W-1:0] sa
);
  logic [CS_W-1:0]  cs_n_d;
  logic [ROW_W-1:0] sa_d;
  logic [2:0]       cmd_d;

  always_comb begin
    cs_n_d = '1;
    cmd_d  = DDR_NOP;
    sa_d   = '0;
    if (req.valid) begin
      cmd_d = req.cmd;
      if (req.all_ranks) cs_n_d = '0;
      else               cs_n_d[req.rank] = 1'b0;
      unique case (req.cmd)
        DDR_ACT, DDR_MRS: sa_d = ROW_W'(req.row);
        DDR_RD, DDR_WR: begin
          sa_d[COL_W-1:0] = COL_W'(req.col);
          sa_d[10]        = req.a10;
          sa_d[12]        = !req.bc4;
        end
        DDR_PRE, DDR_ZQC: sa_d[10] = req.a10;
        default: sa_d = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_n  <= '1;
      ras_n <= 1'b1;
      cas_n <= 1'b1;
      we_n  <= 1'b1;
      ba    <= '0;
      sa    <= '0;
    end else begin
      cs_n                <= cs_n_d;
      {ras_n, cas_n, we_n} <= cmd_d;
      ba                  <= req.valid ? BA_W'(req.bank) : '0;
      sa                  <= sa_d;
    end
  end
endmodule
