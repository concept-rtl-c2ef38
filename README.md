# CONCEPT: a column-oriented memory controller for RRAM with in-memory logic

DRAM controllers are built around the row. An access opens a row, copies the whole
row into a wide row buffer, and later column commands are served from that buffer.
Resistive RAM (RRAM) does not work that way:

* A read uses read drivers and sense amplifiers, a write uses write drivers with a
  different bias. The memory has to know *what* the access is before it biases
  anything.
* Many bitlines share one sense amplifier. A read therefore brings only a narrow slice
  of the row out, never the whole row.
* Reads do not destroy the data and retention is long. Restore and refresh are not
  needed.
* The crossbar can compute. With MAGIC (memristor-aided logic), a voltage pattern on
  three rows of one bank writes NOR(rowA, rowB) into rowC. Two rows give NOT(rowA).
  Every column of the row takes part, so one operation is a row-wide SIMD operation.

This RTL implements a controller built for those properties. Its memory protocol,
called **R-DDR** below, is column oriented: every access starts with a command that
names the operation (READ, WRITE, L1 = MAGIC NOR, L2 = MAGIC NOT). The row and column
addresses then follow on the address bus. The controller keeps a closed-page policy.
It does, however, track the narrow slice that the last read left in each bank's row
buffer, and reads that hit that slice are served faster. The instruction set has two
extra PIM instructions. Their extra row addresses are stored in the unused data field
of the transaction-queue entry, so the queue hardly grows.

## Instruction set and the transaction-queue entry

| opcode | instruction              | meaning                                  |
|--------|--------------------------|------------------------------------------|
| `00`   | READ addr                | 64-byte read                             |
| `01`   | WRITE addr, data         | 64-byte write                            |
| `10`   | MAGIC NOR addr1, addr2, addr3 | row(addr3) = ~(row(addr1) \| row(addr2)) |
| `11`   | MAGIC NOT addr1, addr2   | row(addr2) = ~row(addr1)                 |

A physical address (32 bits, one 4 GB rank) splits as row `[31:17]`, bank `[16:13]`,
column `[12:3]` and byte `[2:0]`. Rows are high, banks in the middle and columns low. A
64-byte access covers eight column addresses of the 64-bit rank, so `[5:3]` are zero
for aligned requests.

One queue entry is 544 bits (`concept_pkg::tq_entry_t`):

```
 543  542:541  540:537  536:522  521:512  511:497  496:482  481:0
  V     Op      Bank     Row1     Col      Row2     Row3    (rest of data)
                                         \_________ 512-bit data _________/
```

READ and WRITE use Bank, Row1 and Col, and WRITE also uses the data field. A PIM
instruction carries no data, so the decoder writes the row of addr2 into bits 511:497
and, for NOR, the row of addr3 into bits 496:482. MAGIC only works inside one bank, so
a single bank field is enough. A PIM instruction whose operands lie in different banks
cannot run in memory. The controller refuses it: `req_reject` pulses and nothing is
queued.

## The R-DDR protocol on the bus

The clock is the DDR4-2400 clock (0.833 ns). The array latencies are in cycles:
tDEC 1, tCHARGE 1, tREAD 11, tSET 27, tRESET 27, tMAGIC_NOR 35, tMAGIC_NOT 35, tPRE 1,
CL 17, tBURST 4. The rank limits are tRRD 4, tFAW 16 and tWTR 0.

The command goes out in cycle *t* with the bank and the first address. Each further
address follows one cycle later. Latencies count from the **last** address cycle *a*.

| operation   | address bus            | data bus               | bank free again at              |
|-------------|------------------------|------------------------|---------------------------------|
| READ (miss) | RA at t, CA at t+1     | read t+31 … t+34       | a + tDEC+tCHARGE+tREAD+tPRE = t+15 |
| READ (hit)  | RA at t, CA at t+1     | read t+18 … t+21       | t+2                             |
| WRITE       | RA at t, CA at t+1     | write t … t+3          | a + tDEC+2·tCHARGE+tSET+tRESET+tPRE = t+59 |
| MAGIC NOR   | Row1, Row2, Row3 at t … t+2 | —                 | a + tDEC+tCHARGE+tMAGIC_NOR+tPRE = t+40 |
| MAGIC NOT   | Row1, Row2 at t, t+1   | —                      | a + tDEC+tCHARGE+tMAGIC_NOT+tPRE = t+39 |

A read that misses the row buffer delivers data after tDEC + tCHARGE + tREAD + CL = 30
cycles. A write pays two tCHARGE because SET and RESET use different voltages and
polarities. The array is precharged after every write and MAGIC operation, even when
the next request goes to the same row.

Seen from the request port, the latencies are: a lone read miss is answered 36 cycles
after the request is accepted, and a lone row-buffer hit after 23 cycles.

Operations that drive the array count as activations: read misses, writes, NOR and
NOT. Two activations are at least tRRD apart, and no more than four fall in any tFAW
window. With the default values (tFAW = 4·tRRD) the tFAW limit never binds before tRRD
does. It binds only when tRRD is made smaller. A read hit drives no array and is not
an activation.

## The back end, cycle by cycle

All of this happens in one cycle, and the command appears on the bus in that same
cycle:

1. **Row-buffer lookup** (`concept_row_buffer`). Every queue entry is compared with
   its bank's buffered row and 32-column segment. A read loads the buffer. A write or
   MAGIC operation to that bank invalidates it.
2. **Constraints**
   * `concept_timing` provides:
     * a busy countdown per bank;
     * the tRRD counter;
     * a 16-cycle activation history for tFAW;
     * the write-to-read counter.
   * `concept_dbus` provides a reservation map of the next 36 data-bus cycles. Reads
     of different latency can be in flight at once, for example a hit issued after a
     miss to another bank. So a read may only issue if its 4-cycle burst window is
     still free, and a write only if the next 4 cycles are free.
3. **Selection** (`concept_scheduler`). The queue is kept oldest first. An entry may
   issue when all of these hold:
   * it is the oldest entry of its bank, so each bank runs in program order and reads
     see earlier writes and MAGIC results;
   * its bank is free;
   * the activation and turnaround limits allow it;
   * its data-bus window is free;
   * the sequencer is idle.

   The oldest such entry wins. Requests to other banks can therefore overtake a
   blocked one.
4. **Issue** (`concept_sequencer` with `concept_addr_mux`). The sequencer drives the
   command and the first address at once. It holds the entry for the remaining address
   cycles, or for four cycles on a write so that all four data beats go out. The
   entry leaves the queue (`concept_tq`) at the clock edge, and younger entries move
   down one slot.

Read data is not requested back from the memory. It arrives at the cycle the protocol
fixes. When issuing a read, `concept_dbus` places the read's tag (row, bank, column)
into a delay line at the burst's start cycle. When the tag reaches the head, the unit
collects four 128-bit beats. One cycle after the last beat it returns them as a
64-byte response with the request's address. Writes and MAGIC operations give no
response. A later read of the same bank sees their result, because the bank runs in
order.

## Files

```
rtl/concept_pkg.sv            widths, opcodes, entry struct, R-DDR timing constants
rtl/concept_top.sv            the controller
  concept_instr_decoder.sv    address split, PIM row packing, same-bank check
  concept_tq.sv               16-entry age-ordered queue, out-of-order removal
  concept_row_buffer.sv       narrow row-buffer state per bank, 16 lookup ports
  concept_timing.sv           bank timers, tRRD, tFAW, tWTR
  concept_dbus.sv             data-bus reservation map, read-burst collection
  concept_scheduler.sv        oldest-ready-first, in order per bank
  concept_sequencer.sv        R-DDR command/address/write-data sequencing
    concept_addr_mux.sv       RA/CA/Row2/Row3 selection onto the address bus
tb/rram_chip_model.sv         behavioural RRAM rank (not synthesizable)
tb/tb_*.sv                    testbenches
```

### Top-level ports (`concept_top`)

| port | dir | width | |
|---|---|---|---|
| `req_valid` / `req_ready` | in / out | 1 | request handshake; a request is taken when both are high |
| `req_op` | in | 2 | opcode (`concept_pkg::op_e`) |
| `req_addr1..3`, `req_wdata` | in | 32, 512 | operands |
| `req_reject` | out | 1 | PIM request refused (operands in two banks) |
| `rsp_valid`, `rsp_addr`, `rsp_data` | out | 1, 32, 512 | read response, registered |
| `mem_cmd_valid`, `mem_cmd_op`, `mem_cmd_bank` | out | 1, 2, 4 | R-DDR command cycle |
| `mem_addr_valid`, `mem_addr` | out | 1, 15 | address bus (RA, CA or row) |
| `mem_wd_valid`, `mem_wd` | out | 1, 128 | write-data beats |
| `mem_rd` | in | 128 | read-data beats, sampled at the scheduled cycles |

The reset is synchronous and active low, and it empties every structure. Parameters
are `DEPTH` (queue entries, 16) and `SEG_COL_BITS` (row-buffer segment = 2^5 column
addresses). The timing values are parameters of `concept_timing` and `concept_dbus`,
and their defaults come from `concept_pkg`.

## What follows the source design and what is this implementation's own

Taken from the design:

* the four-instruction ISA and its opcodes;
* the entry layout, including Row2/Row3 in the data field;
* the column-oriented command sequences;
* every latency sum and timing value above;
* the closed-page policy with a narrow row buffer for reads;
* no refresh;
* the 16-bank, 15-bit row, 10-bit column organisation;
* the 64-byte transfer in four cycles.

Chosen here, because the source design leaves them open:

* **Queue depth** 16, and the collapsing, oldest-first organisation of the queue.
* **Scheduling policy.** The source names a scheduler but gives no policy. This design
  uses oldest-ready-first with per-bank program order.
* **Row-buffer width and hit cost.** A segment is 32 column addresses (256 bytes). A
  hit costs CL only and is not an activation.
* **Bank occupancy after a read miss.** The bank is busy for tDEC + tCHARGE + tREAD +
  tPRE. The CL transfer to the pins overlaps the next access.
* **Reading of the timing diagrams.** The command marker drawn at the end of a write
  or MAGIC interval is read as the earliest next command to that bank.
* **Activation limits.** Every array-driving command counts as an activation for tRRD
  and tFAW. R-DDR has no separate activate command.
* **tFAW value.** The source both calls tFAW relaxed for RRAM and lists tFAW = 16 with
  tRRD = 4. The listed values are used.
* **tWTR** is counted from the last write beat.
* **Bus signals.**
  * The data bus is modelled as 128-bit single-rate beats rather than 64-bit
    double-rate.
  * The read and write data buses are separate ports.
  * The bank is sent with the command.
  * The column is zero-extended on the 15-bit address bus.
* **Response format.** Responses carry the request's address as their tag.
* **PIM operand roles.** For NOR, addr1 and addr2 are the inputs and addr3 the output.
  For NOT, addr1 is the input and addr2 the output.
* **Mismatched PIM operands.** A PIM instruction with operands in two banks is refused.

Outside the RTL:

* The RRAM array itself: drivers, multiplexed sense amplifiers, SET/RESET, MAGIC
  execution, and biasing every line to ground when idle. These are analog. The
  testbenches use `tb/rram_chip_model.sv` instead.
* The processor that sends requests and counts bits.
* Energy is not modelled.

## Verification

Every block has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_concept_instr_decoder` | random instructions against an independent field-by-field decode, same-bank flag |
| `tb_concept_addr_mux` | address order per opcode, `last` flag |
| `tb_concept_tq` | random enqueue and out-of-order removal against a reference list; fills to depth |
| `tb_concept_row_buffer` | hits and invalidation against a per-bank reference |
| `tb_concept_timing` | bank-free times 15/2/59/40/39, tRRD, tFAW (a second instance with tRRD = 1 makes tFAW bind), tWTR |
| `tb_concept_dbus` | reservation windows, burst collection, response exactly one cycle after the last beat |
| `tb_concept_scheduler` | grant and eligibility against a reference selection |
| `tb_concept_sequencer` | cycle-exact command, address and write-beat sequences, busy time |
| `tb_concept_top` | end to end at default parameters with the RRAM model (details below) |
| `tb_concept_bitmap` | bitmap-index queries run with MAGIC instructions (details below) |

**`tb_concept_top`** runs the controller at its default parameters against the RRAM
model. It does the following:

* It checks the read-miss latency (36 cycles) and the hit latency (23 cycles).
* It runs NOR and NOT on full 8 KB rows and reads the results back.
* It checks that a PIM instruction with operands in two banks is refused.
* It drives 1500 random mixed requests over all 16 banks.

Every read response is compared with a reference memory. The model flags any protocol
violation: a busy bank, tRRD, tFAW, or overlapping bursts. The test also requires that
each of these happened at least once:

* a row-buffer hit;
* a busy-bank stall;
* an activation-limit stall;
* a data-bus stall;
* a full queue;
* out-of-order issue;
* a refused instruction;
* every opcode.

**`tb_concept_bitmap`** runs bitmap-index queries. The database holds one bitmap per
day (who logged in) and a gender bitmap. The queries are:

* users active in every one of the last *w* weeks;
* male users active in each of those weeks.

They need 6w ORs, 2w−1 ANDs and w+1 bit counts. The ORs and ANDs run in memory as
OR = NOT(NOR) and AND = NOR(NOT, NOT), and the counts are done on data read back. The
run covers 131,072 users (two 8 KB row chunks, one per bank) for w = 2, 3 and 4. The
test checks the answers against counts computed directly from the bitmaps, and checks
that the controller sent 12w + 3(2w−1) MAGIC operations per chunk. With 8 or 16 million
users each bitmap is 128 or 256 rows. That is well within the 16 × 32768 rows of the
rank, and it changes only the number of chunks.

Run any testbench with plain Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/concept_pkg.sv tb/tb_concept_top.sv \
  --top-module tb_concept_top -o sim
./obj_dir/sim
```

Swap in another `tb_*.sv` and `--top-module` to run a different testbench. Each runs in
well under a minute. `-Wno-fatal` is needed only because the testbenches build 65,536-bit
row values, which Verilator warns about.

Assertions inside the RTL catch a scheduler that breaks a bank, activation, turnaround
or data-bus constraint, and a dequeue of an empty slot.

### Trust and limits

* The controller has been checked against a behavioural memory model written from the
  same protocol description. A real RRAM device with different hit or read-miss
  occupancy would need `OFF_HIT`, the `concept_timing` parameters and the model changed
  together.
* The tFAW path is exercised only at a reduced tRRD, since it cannot bind at the
  default values.
* Nothing here reproduces the performance or energy figures of trace-driven system
  studies (SPEC CPU2006 mixes). Only the PIM query workload is run.
