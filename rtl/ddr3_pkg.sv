// ddr3_pkg: types and helpers shared by the DDR3 SDRAM controller.
//
// It defines the request opcodes that travel through the command FIFO, the
// DDR3 bus commands (the {ras_n, cas_n, we_n} encodings of the JEDEC DDR3
// standard), the command record that the state machines hand to the address
// generator, and functions that build the mode register words from the timing
// parameters.
//
// The 2-bit opcodes 01 (normal read), 10 (write) and 11 (fast read) follow the
// described command FIFO. Code 00 is given here to the fast write, which is
// named but has no code of its own in the description. "Fast" means an
// open-page access: the row is left open so that a following access to the
// same row skips precharge and activate. "Normal" accesses close the row with
// auto-precharge. This reading of normal/fast is this design's own choice.
package ddr3_pkg;

  // Request opcode as stored in the command FIFO.
  typedef enum logic [1:0] {
    OP_FAST_WRITE = 2'b00,
    OP_READ       = 2'b01,
    OP_WRITE      = 2'b10,
    OP_FAST_READ  = 2'b11
  } op_e;

  // Command FIFO entry: opcode plus the burst-chop-4 flag taken from b_size.
  typedef struct packed {
    logic bc4;
    op_e  op;
  } cmd_entry_t;

  function automatic logic op_is_read(op_e op);
    return op == OP_READ || op == OP_FAST_READ;
  endfunction

  function automatic logic op_is_fast(op_e op);
    return op == OP_FAST_READ || op == OP_FAST_WRITE;
  endfunction

  // DDR3 bus command, value = {ras_n, cas_n, we_n} (cs_n decides DESELECT).
  typedef enum logic [2:0] {
    DDR_MRS = 3'b000,
    DDR_REF = 3'b001,
    DDR_PRE = 3'b010,
    DDR_ACT = 3'b011,
    DDR_WR  = 3'b100,
    DDR_RD  = 3'b101,
    DDR_ZQC = 3'b110,
    DDR_NOP = 3'b111
  } ddr_cmd_e;

  // One command for the address generator. For MRS, `row` carries the mode
  // register value and `bank` its register number. `all_ranks` drives every
  // chip select low; `a10` is auto-precharge (RD/WR), all banks (PRE) or
  // long calibration (ZQC); `bc4` selects burst chop 4 through A12.
  typedef struct packed {
    logic        valid;
    ddr_cmd_e    cmd;
    logic        all_ranks;
    logic [2:0]  rank;
    logic [2:0]  bank;
    logic [13:0] row;
    logic [9:0]  col;
    logic        a10;
    logic        bc4;
  } ddr_req_t;

  localparam ddr_req_t REQ_NOP = '{valid: 1'b0, cmd: DDR_NOP, all_ranks: 1'b0, rank: '0,
                                   bank: '0, row: '0, col: '0, a10: 1'b0, bc4: 1'b0};

  // MR0: burst length on the fly (A1:A0 = 01), CAS latency, DLL reset,
  // write recovery. Encodings per the JEDEC DDR3 standard.
  function automatic logic [13:0] mr0_value(int cl, int twr);
    logic [13:0] v;
    logic [3:0]  clc;
    logic [2:0]  wrc;
    v   = '0;
    clc = 4'((cl - 4) << 1);          // CL 5..11 -> 0010..1110
    wrc = (twr <= 8) ? 3'(twr - 4) : 3'(twr / 2);  // 5..8 -> 1..4, 10/12 -> 5/6
    v[1:0]  = 2'b01;
    v[2]    = clc[0];
    v[6:4]  = clc[3:1];
    v[8]    = 1'b1;
    v[11:9] = wrc;
    return v;
  endfunction

  // MR1: DLL enabled, output drive RZQ/6, RTT_NOM RZQ/4 (A2 = 1).
  function automatic logic [13:0] mr1_value();
    logic [13:0] v;
    v    = '0;
    v[2] = 1'b1;
    return v;
  endfunction

  // MR2: CAS write latency in A5:A3 (CWL 5..8 -> 0..3).
  function automatic logic [13:0] mr2_value(int cwl);
    logic [13:0] v;
    v      = '0;
    v[5:3] = 3'(cwl - 5);
    return v;
  endfunction

endpackage
