# DDR3 SDRAM controller

A DDR3 memory moves one data beat on each edge of its clock. Its rows must be
opened before use and closed before another row of the same bank can be used,
and every row must be refreshed about every 7.8 µs. A host just wants to say
"write these 64-bit words here" or "read that burst back". This controller
sits between the two. It queues host requests in small FIFOs, brings the
memory up after reset, keeps it refreshed, opens and closes rows bank by bank,
and turns 64-bit host words into 32-bit double-data-rate beats and back.

The RTL is plain synthesizable SystemVerilog (IEEE 1800-2017). The defaults are
a 32-bit DQ bus, 8 banks, 14 row and 10 column address bits, 8 chip selects
(ranks) and DDR3-800 timing (400 MHz memory clock, CL 6, CWL 5).

## Block structure

```
                 +--------------------- ddr3_controller ----------------------+
 host  ------->  | ddr3_queue_control   address / command / write / read FIFOs|
 (clk domain)    |        |  heads                         ^ read words       |
                 |        v                                |                  |
                 | ddr3_cmd_fsm  <-- ddr3_init_fsm         ddr3_data_path ----+--> DQ, DQS, DM
                 |  (control and  <-- ddr3_refresh_ctrl     (clk + clk_90)    |
                 |   timing)      <-> ddr3_bank_mgmt                          |
                 |        |  command record                                   |
                 |        v                                                   |
                 | ddr3_addr_gen  ------------------------------------------- +--> CS#, RAS#, CAS#, WE#, BA, A
                 | ddr3_clock_module: clk, clk_90, CK/CK#, reset sync   <-----+--- clk_in (2x)
                 +------------------------------------------------------------+
```

| File | Block |
|---|---|
| `rtl/ddr3_pkg.sv` | request opcodes, DDR3 command encodings, command record, mode-register helpers |
| `rtl/ddr3_controller.sv` | top level |
| `rtl/ddr3_queue_control.sv` | host handshake and the four FIFOs |
| `rtl/ddr3_sync_fifo.sv` | FIFO used for all four queues |
| `rtl/ddr3_init_fsm.sv` | power-up and mode-register sequence |
| `rtl/ddr3_cmd_fsm.sv` | command state machine (control and timing) |
| `rtl/ddr3_bank_mgmt.sv` | open row and timers per bank and rank |
| `rtl/ddr3_refresh_ctrl.sv` | refresh interval counter |
| `rtl/ddr3_delay_counter.sv` | wait timer ("clock counter") used by both state machines |
| `rtl/ddr3_addr_gen.sv` | registered command/address pins |
| `rtl/ddr3_data_path.sv` | DDR write and read data path |
| `rtl/ddr3_clock_module.sv` | clock division, 90° clock, reset synchronizer |

## Host interface

Everything on the host side is synchronous to `clk`, an output of the
controller. `clk` is `clk_in` divided by two, and it is also the memory clock.

- **Request.** In a cycle where `busy` is low, raise `r_req` or `w_req` (never
  both), with `raddr`, `b_size` and `fast`. The request is taken on that edge.
- **Address.** `raddr = {rank[2:0], row[13:0], bank[2:0], column[9:3]}`: every
  request is one aligned burst.
- **Burst size.** `b_size = 4` means burst chop 4 (4 beats, 2 host words).
  Any other value means a burst of 8 (8 beats, 4 host words).
- **Write data.** After a write request, `d_req` is high for one cycle per host
  word. In each such cycle, present the next 64-bit word on `datain` and its
  byte mask on `dm_in`. A mask bit of 1 keeps that byte in memory unchanged.
  The low 32 bits of a word are the first beat on the bus.
- **busy** is high while write words are being collected, or when a FIFO
  cannot take a whole request.
- **Read data.** Reads are returned in request order, one word per cycle, on
  `dataout` with `r_valid`. There is no back-pressure.
- **w_valid** pulses once for each write burst that the memory has received,
  including write recovery.
- **Fast and normal.** `fast = 0` is a normal access. The row is closed after
  it by auto-precharge (closed page). `fast = 1` leaves the row open (open
  page), so a following access to the same row goes straight to READ/WRITE.

Inside, each request becomes one command-FIFO entry: a 2-bit opcode plus the
burst-chop flag. The opcodes are `01` normal read, `10` normal write, `11` fast
read and `00` fast write. There is also one address-FIFO entry per request.
Each FIFO is 8 deep. The write data FIFO holds 8 words, two full bursts. A
request is refused until the write data FIFO has room for a whole burst, so
requests never wait on each other's data.

## Command state machine

`ddr3_cmd_fsm` serves requests one at a time, in order.

```
 INIT --init done--> IDLE --refresh owed--------------------> REFRESH --> IDLE
                      |--same row open-----------------------> WRITE / READ --> IDLE
                      '--row closed or other row open--> REACTIVE --> WRITE / READ
```

- **IDLE.** A refresh that is owed always comes first. Otherwise the state
  machine looks up the bank of the oldest request in bank management.
- **REACTIVE.** Runs when the bank is closed, or holds a different row. If
  another row is open, it sends PRECHARGE once tRAS has passed since that
  row's ACTIVATE. Then it sends ACTIVATE once the bank's tRP has passed, and
  waits tRCD.
- **WRITE.** Sends WRITE, with A10 = 1 for a normal access and A12 = 0 for
  burst chop. The data path sends the data CWL cycles later. The state machine
  then waits until the burst and write recovery (tWR) are over.
- **READ.** Sends READ and waits until the burst has been captured.
- **After a normal access**, bank management marks the bank closed. It also
  starts the bank's tRP timer from the later of "now" and the end of tRAS, as
  the device does for auto-precharge.
- **REFRESH.** Waits until all bank timers have expired. If any row is open, it
  sends PRECHARGE ALL (A10 = 1) to every rank. After tRP it sends REFRESH to
  every rank, acknowledges the refresh counter, and waits tRFC.

Bank management (`ddr3_bank_mgmt`) keeps, for each of the 64 banks (8 ranks × 8
banks):

- an open flag and the open row;
- `act_wait`, the number of cycles until an ACTIVATE is allowed (tRP);
- `pre_wait`, the number of cycles until a PRECHARGE is allowed (tRAS).

The refresh counter adds one owed refresh every `T_REFI` cycles, up to 8. So
the average rate holds even when a refresh has to wait for a request to finish.

The initialization sequence (`ddr3_init_fsm`) follows the JEDEC power-up order:

1. RESET# low for 200 µs.
2. CKE low for 500 µs.
3. tXPR of NOPs.
4. MRS to MR2, MR3, MR1 and MR0.
5. ZQCL, then tZQinit.

All of these go to every rank. MR0 selects burst length "on the fly" (BL8 or
BC4 chosen by A12), CL 6, tWR 6 and DLL reset. MR1 enables the DLL. MR2 sets
CWL 5.

## Timing of the data path

This is the subtle part. `ddr3_clock_module` divides `clk_in` (twice the
memory rate) by two, which gives `clk`. It makes `clk_90` by copying `clk` on
the falling edge of `clk_in`. That puts `clk_90` exactly a quarter period
behind `clk`, whatever moment reset is released. CK/CK# are `clk` and its
complement.

The pipeline, counted in `clk` cycles, where a command is given in cycle *t*:

| cycle | event |
|---|---|
| t | the state machine gives READ/WRITE; `wr_start`/`rd_start` pulse |
| t+1 | command on the pins (registered in `ddr3_addr_gen`) |
| end of t+1 | the memory registers it |
| t+1+CWL | write: DQS driven low (preamble); the first write word leaves the FIFO |
| t+2+CWL … | write: one word per cycle on DQ, as two beats |
| t+2+CL … | read: the memory drives beats edge-aligned with CK |
| t+3+CL … | read: one word per cycle pushed into the read FIFO |
| t+4+CL … | read: `r_valid`/`dataout` |

So `r_valid` comes CL+3 cycles after READ appears on the pins.

- **Write.** DQ is a clock-level multiplexer: the first beat while `clk` is
  high, the second while it is low. DQS is `clk_90` gated by the burst enable.
  So every DQS edge falls in the middle of its beat (centre-aligned), as DDR3
  writes require. DQS runs a quarter cycle after CK, inside the ±0.25 tCK that
  JEDEC allows for tDQSS.
- **Read.** Each beat is sampled in the middle of its eye by the rising
  (first beat) and falling (second beat) edge of `clk_90`. At the next `clk`
  edge the pair becomes one 64-bit word.

This read capture assumes a fixed, near-zero round-trip delay, as in
simulation. A board design needs DQS-based capture or read levelling instead.
That part is not included. `dqs_i` is brought in but unused.

DQ and DQS leave the controller as separate output, output-enable and input
signals. The bidirectional pad buffers are FPGA or process primitives and sit
outside this RTL.

## Parameters

`ddr3_controller` takes the geometry parameters `DQ_W`, `BA_W`, `ROW_W`,
`COL_W`, `CS_W` and `FIFO_DEPTH`. It also takes the DDR3 timings, in memory
clock cycles:

| Parameter | Default |
|---|---|
| `CL` | 6 |
| `CWL` | 5 |
| `T_RCD` | 6 |
| `T_RP` | 6 |
| `T_RAS` | 15 |
| `T_WR` | 6 |
| `T_RFC` | 64 |
| `T_REFI` | 3120 |
| `T_MRD` | 4 |
| `T_MOD` | 12 |
| `T_ZQINIT` | 512 |
| `T_XPR` | 68 |
| `T_RESET` | 80000 |
| `T_CKE` | 200000 |

- **Address widths.** The command record in `ddr3_pkg` has fixed fields: 3
  rank bits, 3 bank bits, 14 row bits and 10 column bits. `CS_W`, `BA_W`,
  `ROW_W` and `COL_W` may be made smaller but not larger.
- **Mode registers.** The MR0 helper encodes CL 5–11 and tWR 5–8, 10 and 12.
  MR2 encodes CWL 5–8.
- **Device size.** 14 row bits address DDR3 devices up to 2 Gbit (x16) or
  4 Gbit (x8). An 8 Gbit device would need 16 row bits and a wider command
  record.

## Departures from the original description and choices made here

The source description gives the block structure, the FIFO sizes, the command
codes 01/10/11, eight banks selected by a 3-bit BA, and a state diagram. The
following are this design's own:

- The address FIFO is 27 bits wide, not 13. Thirteen bits cannot hold a rank,
  a bank, a 14-bit row and a column.
- The write FIFO carries the byte masks next to the 64 data bits.
- The command FIFO carries a burst-chop bit next to the 2-bit opcode.
- Code 00 is used for the fast write, which is named but has no code.
- "Normal" and "fast" are read as closed-page and open-page accesses. A `fast`
  input selects between them.
- The bank address is 3 bits wide, for 8 banks.
- Busy, d_req, r_valid and w_valid get the protocol above.
- All DDR3 timing values, the initialization steps and the mode-register
  contents come from the DDR3 standard. The source gives none.
- Configuration is by parameters. There are no run-time configuration ports.
- The clock module divides a 2x input clock instead of using a PLL.
- The memory RESET# pin (`ddr_reset_n`) is driven by the controller.
- The clock gating mentioned for power saving is not implemented, because what
  is gated is not specified.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/ddr3_pkg.sv tb/tb_ddr3_controller.sv --top-module tb_ddr3_controller
./obj_dir/Vtb_ddr3_controller
```

Use the same command for any other testbench, changing the name.

| Testbench | What it checks |
|---|---|
| `tb_ddr3_controller` | End to end, with short power-up waits and `T_REFI` = 700. Several hundred random reads and writes across all 8 ranks go to DDR3 rank models that check the command timing. A scoreboard applies byte masks and compares every word read back. It also checks the read latency and rate, the mode registers and the refresh interval. It counts that each mechanism happened: activate, precharge of another open row, row hit, auto-precharge and open-page accesses, refresh with and without open rows, burst chop, masked bytes, busy. |
| `tb_ddr3_controller_full` | All defaults, including the real 200 µs and 500 µs power-up waits and two refresh intervals. About 5 s of simulation time. |
| `tb_ddr3_cmd_fsm` | Command sequences for each path of the state machine, with their minimum spacing. |
| `tb_ddr3_data_path` | DQS/DQ alignment and beat order for writes, and read capture timing, with the real clock module. |
| Other `tb_*` | One unit each: FIFO, queue control, bank management, refresh counter, initialization sequence, address generation, delay counter, clock module. |

`tb/ddr3_model.sv` is a behavioural model of one DDR3 rank. It is not
synthesizable and is used only by the testbenches. It stores data sparsely and
reports any command that breaks tRCD, tRP (including after auto-precharge),
tRAS, tRFC, CWL or the burst length, and any ACTIVATE, READ or WRITE sent
before all four mode registers are written and ZQ calibration is done.
