# IFRA recording hardware for a 4-way superscalar core

Electrical bugs in a processor show up only in silicon, under particular
voltages, temperatures and timings. They rarely reproduce, and a system
crash may come millions of cycles after the faulty gate flipped.
IFRA (instruction footprint recording and analysis) avoids the need to
reproduce the failure or simulate the system.

- **Instruction IDs.** Every instruction receives a short ID when it leaves
  fetch. The ID travels alongside it through the pipeline.
- **Footprints.** Each pipeline stage has one small circular buffer per way.
  Every instruction leaving the stage writes its ID and a few bits saying
  what it did there: its PC, decode bits, residues of register names,
  operands and results, or memory addresses.
- **Post-triggers.** Recording runs all the time. Early failure detectors
  stop it close to the moment things went wrong.
- **Scan-out.** After a stop, every buffer is shifted out through one long
  scan chain. Offline software matches the footprints against the program
  binary to find which block misbehaved, and when.

This repository holds that added hardware as synthesizable SystemVerilog,
sized for an Alpha 21264-like core:

- 4-way fetch, decode, dispatch and issue;
- 64 instructions in flight (64-entry reorder buffer);
- 2 ALUs, 2 multipliers, 2 branch units and 2 load/store units.

The core itself is not included. Its pipeline handshakes are the ports of
the top module, `ifra_top`.

## Block map

| module | count | role |
|---|---|---|
| `id_assign` | 1 | IDs for instructions leaving fetch |
| `id_stage_reg` | 2 | IDs held in the decode and dispatch pipeline registers |
| `id_queue` | 2 | IDs beside the issue queue and beside the reorder buffer |
| `id_fifo` | 8 | IDs of instructions inside each functional unit |
| `recorder` | 24 | footprint buffers, 1,024 entries each |
| `commit_recorder` | 1 | register with the ID of the youngest committed instruction |
| `post_trigger_gen` | 1 | soft triggers (pause) and hard triggers (stop and halt) |
| `residue_gen` | many | residue mod 2^K−1, used for the auxiliary fields |
| `ifra_pkg` | — | sizes, functional-unit numbering, trigger-cause struct |

## Instruction IDs and the flush jump

For a core with at most *n* instructions in flight, an ID is log2(4n) bits
wide. With n = 64 that is 8 bits, modulo 256.

`id_assign` hands out consecutive IDs to the instructions leaving fetch in a
cycle. The ways are numbered in program order, and a way without an
instruction is skipped. The unit keeps only the last ID it assigned.

After a flush caused by the instruction with ID Y, the first new instruction
gets Y + 2n + 1 (mod 4n), not the next ID in sequence. This jump is what
makes the footprints decodable:

- Within any 4n-ID window, two live instructions never share an ID.
- Instructions with the same ID never change their relative order in any
  buffer.
- A jump in an in-order stage's buffer, where consecutive IDs differ by more
  than 1, marks a flush. The ID that caused the flush is the younger ID
  minus (2n+1).

For example, with n = 8, if IDs 3, 4, 5 and 6 are in flight and ID 3
flushes, the next instruction is 20. The `id_assign` testbench reproduces
this case on a second, n = 8 instance.

The ID is treated like the instruction itself. It sits in a pipeline
register with the same stall and flush (`id_stage_reg`), or in a queue with
the same write and read control. Each queue is indexed by the core's own
entry numbers:

- **Issue-queue IDs.** `id_queue` is written at dispatch at `dis_iq_idx`.
  It is read combinationally at issue at `iss_iq_idx`, which also releases
  the entry.
- **Reorder-buffer IDs.** `id_queue` is written at dispatch at
  `dis_rob_idx`. It is read at commit at `cmt_rob_idx` and also at
  `flush_rob_idx`, to learn the ID Y that caused a flush. So it has five
  read ports.
- **Functional units.** Each unit has a FIFO of IDs (`id_fifo`, 8 deep).
  An ID is pushed at issue and popped at `fu_done`. The units are therefore
  assumed to finish in order, each within itself.

A flush clears every ID register, queue and FIFO. In the same cycle it
blocks fetch and the recording of the stages it squashes.

## Footprint recorder

This is the heart of the design and the hardest part to read. See
`rtl/recorder.sv`.

### Entry format and idle compaction

Each entry is `{idle, id_or_count, aux}`: 1 + 8 + AUX_W bits.

- **`idle = 0`**: an instruction left the stage in this way. The middle
  field is its ID, and `aux` is the stage-specific information.
- **`idle = 1`**: a run of empty cycles. The middle field counts them, and
  `aux` is 0.

Empty cycles are compacted so that a 1,024-entry buffer covers far more than
1,024 cycles. The idle state machine works like this:

1. On the first empty cycle, it writes an idle entry with count 1 at the
   write pointer and does **not** advance the pointer.
2. On each further empty cycle, it rewrites that same entry with count + 1.
3. When an instruction arrives, the instruction goes into the entry after
   the idle entry, and the pointer advances by two.
4. If the count reaches 255, the idle entry is closed and a new run starts.
5. If recording pauses during a run, the idle entry is closed.

The recorder figure's example is reproduced in `tb_recorder`. The inputs are
IDs 2, 5 and 12 with aux 0x22, 0x34 and 0x2C, then 24 empty cycles, then
ID 22 with aux 0x32. The buffer then holds:

```
entry 0: {0,  2, 22}
entry 1: {0,  5, 34}
entry 2: {0, 12, 2C}
entry 3: {1, 24, --}
entry 4: {0, 22, 32}
```

and `wr_ptr` is 5.

### Write pointer and full flag

`wr_ptr` is the next entry to be written. The `full` flag is set the first
time the pointer wraps from entry 1023 to entry 0. Together they tell the
analysis where the oldest entry is:

- **`full = 0`**: the oldest entry is 0 and the youngest is `wr_ptr − 1`.
- **`full = 1`**: the oldest entry is `wr_ptr` and the youngest is
  `wr_ptr − 1`.

Misspeculated instructions are never removed from a buffer. The flush jump
in the IDs is what identifies them later.

### Auxiliary information per stage

| stage | recorders | aux bits | contents |
|---|---|---|---|
| fetch | 4 | 32 | PC |
| decode | 4 | 4 | decode result bits (`dec_info`, defined by the core) |
| dispatch | 4 | 6 | 2-bit residues of destination, source 1 and source 2 physical register names |
| issue | 4 | 6 | 3-bit residues of operand A and operand B |
| ALU, MUL | 4 | 3 | 3-bit residue of the result |
| branch | 2 | 0 | ID only |
| load/store | 2 | 35 | 3-bit residue of the result, then the 32-bit address |

Residues are taken modulo 2^K − 1 (3 for K = 2, 7 for K = 3), and an
all-ones residue is written as 0. Offline, the residue of a consumer's
operand must equal the residue of its producer's result. A mismatch points
to the register file, the bypass network or the issue logic.

The 24 buffers hold 501,760 bits (about 61 KiB). That matches the roughly
60 KB of recording storage the scheme budgets for this core.

### Scan-out format

There is no separate read port for the buffers. While `scan_en` is high,
each recorder acts as a shift register of `AW + 1 + DEPTH·EW` bits
(AW = 10, so 11 header bits). One bit moves per clock, in this order:

1. `wr_ptr`, LSB first;
2. `full`;
3. entry 0, entry 1, … entry 1023. Each entry goes LSB first: aux, then the
   ID/count field, then the idle bit.

Internally, a shift register one entry wide steps through the array. Every
EW clocks it writes back the entry it has just filled from `scan_in` and
loads the next one. Bits arriving at `scan_in` therefore replace the buffer
contents in the same order.

A chain of recorders is a plain delay line, and a second full shift
reproduces the first dump exactly. Lowering `scan_en` ends the dump and
realigns the shift register to entry 0. Scanning is meant for after a hard
stop only; an assertion in the top checks this.

The top chains everything in this order:

```
scan_in → commit recorder (valid, 8-bit ID)
        → fetch 0..3 → decode 0..3 → dispatch 0..3 → issue 0..3
        → ALU0, ALU1, MUL0, MUL1, BR0, BR1, LSU0, LSU1 → scan_out
```

The first bits out of `scan_out` are the header of LSU1. The whole chain is
502,033 bits long.

## Commit recorder

The commit stage needs no history, only the ID of the youngest committed
instruction. That ID tells the analysis which footprints belong to
instructions still in flight at the stop. `commit_recorder` keeps a valid
bit and that ID. Each cycle, while recording is enabled, it takes the
highest-numbered committing way.

## Post-triggers

`post_trigger_gen` decides when recording stops.

| symptom | soft trigger (pause recording) | hard trigger (stop and halt) |
|---|---|---|
| array error | — | `array_err` (parity) |
| arithmetic error | — | `arith_err` (residue check) |
| exception | — | `exception` |
| deadlock | no retirement for `SHORT_GAP` cycles | no retirement for a further `LONG_GAP` cycles |
| segmentation fault | `tlb_miss` until `tlb_refill` | `os_segfault`, or a load/store address equal to 0 |

- **Soft triggers.** A soft trigger pauses all recorders while the core
  keeps running. Recording resumes when the symptom clears: an instruction
  retires, or the TLB refill arrives.
- **Hard triggers.** A hard trigger sets a sticky `stop`. It also drives
  `halt` to the core and records which cause fired in `trig_cause`.
- **Latency.** Recording stops one cycle after the condition is seen.
- **Gap lengths.** `SHORT_GAP` is "two memory loads". `LONG_GAP` is "two
  seconds". Both are parameters in cycles, with defaults of 400 and
  2·10^9, which assume a 1 GHz clock and 200-cycle loads.

## Top-level protocol (`ifra_top`)

All inputs are sampled on the rising edge of `clk`. `rst_n` is an active-low
asynchronous reset.

- **Fetch.** `fe_valid[w]` and `fe_pc[w]` mark an instruction leaving fetch
  in way w. Fetch must be idle while `dec_stall` is high.
- **Decode.** `dec_stall` holds the decode stage. `dec_info[w]` holds the
  4 decode bits of the instruction that leaves.
- **Dispatch.**
  - `dis_stall` holds the dispatch stage.
  - The instruction that leaves goes to issue-queue entry `dis_iq_idx[w]`
    and ROB entry `dis_rob_idx[w]`.
  - `dis_rd`, `dis_rs1` and `dis_rs2` are its 7-bit physical register names.
- **Issue.** `iss_valid[w]` issues issue-queue entry `iss_iq_idx[w]` to
  unit `iss_fu[w]`, with operand values `iss_opa[w]` and `iss_opb[w]`. Unit
  numbering is `ifra_pkg::fu_e`: ALU0, ALU1, MUL0, MUL1, BR0, BR1, LSU0,
  LSU1. At most one issue per unit per cycle.
- **Execute.** `fu_done[f]` delivers unit f's oldest instruction with
  `fu_result[f]`. A load/store unit also gives `lsu_addr`.
- **Commit.** `cmt_valid[w]` commits ROB entry `cmt_rob_idx[w]`, with way 0
  the oldest.
- **Flush.** `flush` squashes everything younger than ROB entry
  `flush_rob_idx`, which must be the oldest instruction in flight.
- **Errors.** `array_err`, `arith_err`, `exception`, `os_segfault`,
  `tlb_miss` and `tlb_refill` are the failure indications.
- **Status outputs.**
  - `recording`, `soft_pause`, `halt` and `trig_cause` give the trigger
    state.
  - `cmt_id_valid` and `cmt_youngest_id` show the commit recorder's
    contents.
- **Scan.** `scan_en`, `scan_in` and `scan_out` form the scan chain. They
  are meant to be driven from a boundary-scan port.

Assertions in the top check four rules:

- one issue per unit;
- no fetch during a decode stall;
- no unit FIFO overflow;
- no scanning before a hard stop.

## Where this design departs or adds detail

- **Clocking.** One clock drives everything. The scheme allows each stage,
  and each execution cluster, its own clock domain with voltage and
  frequency scaling.
- **Scan port.** The boundary-scan (JTAG) port itself is not included. The
  chain ends at `scan_in` and `scan_out`.
- **Commit footprint.** The commit footprint holds no exception bits, only
  the youngest ID (the scheme budgets about 0 bits there).
- **ID plumbing.**
  - The ROB ID queue is written at dispatch.
  - The execute stage carries IDs in per-unit in-order FIFOs.
  - These are the simplest structures that keep each ID under the same
    control as its instruction. The exact placement in a real core would
    follow that core.
- **ID assignment timing.**
  - The reference structure registers the flush-causing ID on its way
    through the +2n+1 adder, and keeps one counter per way.
  - Here the jump is applied at the flush clock edge itself, and each way's
    ID is computed as last ID + (number of valid ways before it).
  - Fetch is blocked during the flush cycle, so the IDs are the same. Extra
    pipeline registers can be added if the flush path needs them for timing.
- **Residues and decode bits.** The residue modulus (2^K − 1) is a choice
  made here. So is the meaning of the 4 decode bits, which is whatever the
  core presents on `dec_info`.
- **Idle count.** Idle counts saturate at 255 and then start a new idle
  entry.
- **TLB tracking.** One outstanding TLB miss is tracked.
- **Cycle counts.** The deadlock gap cycle counts assume 1 GHz (see
  Post-triggers above).

Not included at all:

- the superscalar core;
- the parity and residue error detectors and the OS segfault signal (they
  arrive as inputs);
- the JTAG TAP;
- the offline analysis software: footprint linking, flush identification,
  and the consistency checks.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **`tb_ifra_top`** runs the full-size design with default parameters. A
  behavioural 4-way core model drives it with random traffic that includes
  every mechanism: decode and dispatch stalls, out-of-order issue and
  completion, branch flushes, buffer wrap-around, idle runs, a TLB-miss
  pause, a retirement-gap pause and finally a hard trigger. The model
  computes the expected contents of all 24 buffers and the commit register
  independently. After the halt the testbench shifts out the whole
  502,033-bit chain and compares it bit for bit. It also counts how often
  each mechanism occurred and fails if one never did. It takes about a
  second of simulation.
- **`tb_recorder`** covers two chained small recorders with random
  episodes (idle runs, saturation, pauses and wrap), a double shift with
  loopback, and the worked example above.
- **`tb_id_assign`** checks against a reference model, including the n = 8
  flush example.
- **Unit tests.** `tb_post_trigger_gen` checks exact trigger cycle counts,
  and `tb_residue_gen` checks the residues against `%` arithmetic.

To simulate with plain Verilator (5.x), for example the top:

```
verilator --binary --timing --assert rtl/ifra_pkg.sv rtl/*.sv \
    tb/tb_ifra_top.sv --top-module tb_ifra_top -Mdir obj_top
./obj_top/Vtb_ifra_top
```

Replace the testbench file and top name to run any other test. The package
must come first on the command line. For a quick look at the scan format,
`tb_recorder` is the smallest complete example.

Parameters worth changing are in `ifra_pkg`:

- `N_INFLIGHT` (sets the ID width);
- `REC_DEPTH`;
- the per-stage aux widths.

The gap lengths are on `ifra_top`.
