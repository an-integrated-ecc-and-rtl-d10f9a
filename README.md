# On-line ECC with self-repair for embedded SRAM

An embedded SRAM usually has two separate defences. Spare rows and columns,
used by the production tester to replace cells that are already bad.
And an error-correcting code (ECC) that hides bit flips in the field. The two
do not cooperate:

- Spares the tester did not need stay unused for the life of the chip.
- A cell that wears out in the field becomes a permanent error. The ECC then
  spends its single-bit correction on that cell for every read. A later soft
  error in the same word cannot be corrected.

This design joins the two. Each read passes through a Hamming
single-error-correcting (SEC) decoder. When the decoder sees an error, an ECC
controller briefly stops user traffic. It then works out whether the error is
**soft** (a bit flip that goes away when the word is rewritten) or **hard**
(a bad cell). A hard fault is repaired on the spot with an unused spare row or
spare column, and the ECC is free again for soft errors. Moving hard faults
from the ECC to the redundancy is what makes the memory more reliable.

The default configuration is a 32K x 64 memory. Each word holds 64 data bits
plus 7 check bits, 71 bits in all. There are 8 spare rows and 4 spare
columns.

## Structure

```
 user write data ─► ECCE ─┐
                          ├─MUX─► memory core ─► ECCD ─► user read data
 BIST ───────────┐        │      (MEM, RMEM, RC)   │
                 ├─ OR ───┘                        │
 ECC controller ─┘◄─── decoder result, RM info ────┘
       │
       └─ Hold ─► MUX select (with MBS), and ORed onto the BIST fail pin
```

| Block | File | Role |
|---|---|---|
| ECCE | `rtl/hamming_enc.sv` | Hamming SEC encoder |
| ECCD | `rtl/hamming_dec.sv` | Syndrome, single-bit correction, "uncorrectable" flag |
| MEM | `rtl/sram_main.sv` | Main array, 2^15 x 71 bits |
| RMEM | `rtl/sram_redundant.sv` | Spare rows (8 x 8 words) and spare bit columns (4 x 4096 bits) |
| RC | `rtl/reconfig_circuit.sv` | Repair registers: used flag, fault flag FF and replaced address per spare; address comparison |
| Memory core | `rtl/memory_core.sv` | MEM + RMEM + RC: remaps accesses and merges spare data into the word |
| BIST | `rtl/mbist.sv` | March C- self-test for production, reports failing address and syndrome |
| ECC controller | `rtl/ecc_controller.sv` | Error identification and hard-repair state machine, Hold |
| MUX / OR gates | `rtl/wrapper_path_mux.sv` | Selects the normal path or the test path; ORs the controller onto the test path |
| Top | `rtl/mem_test_wrapper.sv` | Connects all of the above |
| Shared | `rtl/ecc_pkg.sv` | Default sizes, code helper functions, RC command and FSM state enums |

### Why OR gates instead of another multiplexer

The memory sees only two paths:

- the normal (user) path;
- the test path.

The test path is selected when `MBS` (Memory BISR Select, test mode) or
`Hold` is high. The BIST and the ECC controller both drive the test path
through plain OR gates. They are never active at the same time, and each
drives all-zero outputs when idle. The user path therefore crosses only one
multiplexer level. `Hold` leaves the chip on the same pin as the BIST fail
output (`bist_fail_hold`), which is safe because the BIST runs only in test
mode.

## Memory organisation and redundancy

The word address is split into `{row, col}`. `COL_W = 3`, so each physical
row holds 8 words and the main array has 4096 rows.

- **Spare row.** Holds 8 words. When the RC has a spare row enabled for a row
  address, every access to that row goes to the spare row. This is the RM
  ("redundant match") hit.
- **Spare column.** A single bit column, one bit tall per main row. The RC
  stores a (word-column, bit-index) pair for it. For every word in that word
  column, bit `bit` is written to the spare column and read back from it. The
  ECC syndrome names the failing bit, so a column repair fixes exactly the
  failing cell's bit line.
- A spare row takes priority over spare columns. Spare columns cover only the
  main array.

A read takes one cycle. The main word, the spare-row word and the spare-column
bits are fetched in parallel. In the next cycle they are merged, and the
information on which spares were used (`rd_row_hit`, `rd_row_idx`,
`rd_col_hit`) comes back with the data. The controller uses this information
to tell whether the failing bit sits in MEM or in RMEM.

## Hamming code

The code is single-error correcting. Check bit `p` sits at codeword position
`2^p`, and information bits fill the other positions in order. Bit `j` of the
codeword vector is position `j+1`. The number of check bits is the smallest
`p` with `2^p >= k + p + 1`: 6 for 32 data bits, 7 for 64 and 8 for 128.

The syndrome gives the position of a single flipped bit, and the decoder
inverts that bit. A syndrome larger than the codeword length is reported as
uncorrectable (`rd_ue`). Other double errors are miscorrected, as with any
plain SEC code. The decoder outputs the whole corrected codeword. The
controller writes that codeword back and copies it, so it needs no second
encoder.

## The ECC controller

The state names follow the controller's state diagram. `PEND` is an addition
for postponed repair.

```
FFR ──error seen & FR──► WFW ─► RFW ─► COMP ──clean──► FFR          (soft error)
                          ▲              │
                          └─still bad, fewer than ITER_T rounds
                                         │ still bad after ITER_T rounds (hard fault)
                                         ▼
                        (PEND) ─► RME ⇄ WRE ─► [SRF] ─► SRA ─► FFR
FFR ──no redundancy left──► FFWR
```

| State | Action |
|---|---|
| FFR | Fault free; watch the decoder on user reads |
| WFW | Write the corrected codeword back to the faulty address |
| RFW | Read the faulty address again |
| COMP | Look at the decoder result of that read |
| RME / WRE | Read one word of the element being replaced, then write it, corrected, into the new spare. A row takes 8 words; a column takes 4096 rows, one bit each |
| SRF | The faulty bit was inside a spare: set that spare's fault flag FF |
| SRA | Enter the new spare's address in the RC |
| FFWR | Fault free without redundancy: errors are only corrected by the ECC |

**Hold timing.** Hold rises in the same cycle as the erroneous read result, so
the user request of that cycle is already refused. Each identification round
takes 3 cycles. The Hold lengths at defaults (`ITER_T = 4`) are:

| Event | Hold (cycles) |
|---|---|
| Soft error | 4 (1 + WFW + RFW + COMP) |
| Hard fault, spare-row repair | 1 + 3·4 + 2·8 + 1 = 30 |
| Same, fault inside a spare (SRF step added) | 31 |
| Hard fault, spare-column repair | 1 + 3·4 + 2·4096 + 1 = 8206 |

**Choosing the spare:**

- A fault inside a spare row is replaced by another spare row.
- A fault in a bit served by a spare column is replaced by another spare
  column for the same (column, bit).
- A fault in the main array takes a spare row if one is left, otherwise a
  spare column.
- If no spare of the needed kind is left, the controller stops in FFWR.

**Postponed repair.** With `repair_defer` high, the controller drops Hold
after identifying a hard fault and waits in `PEND`. User traffic continues,
and the ECC keeps correcting the faulty word. The repair starts in the first
cycle `mem_idle` is high, and Hold is raised in that same cycle.

The copy into a new spare reads the memory again rather than reusing stored
data, so writes made during `PEND` are carried over.

## Interface and timing (top: `mem_test_wrapper`)

- **User requests.** `req`, `we`, `addr`, `wdata`: one request per cycle. A
  request is taken only while `mbs = 0` and `bist_fail_hold = 0`. A refused
  request must be repeated.
- **Read results.** `rdata` (corrected) appears one cycle after the request,
  with `rvalid`. `rd_err` flags a word that was corrected; `rd_ue` flags an
  uncorrectable word.
- **Test mode.** With `mbs = 1`, a pulse on `bist_start` runs March C- over
  every word as raw 71-bit codewords. The run takes `10·2^ADDR_W + 1` cycles
  from the cycle `bist_start` is sampled; after that, `bist_done` is high.
  Each failing read produces a one-cycle pulse on `bist_fail_hold` together
  with `bist_fail_addr` and `bist_fail_syn`. The syndrome has one bit per
  failing cell: read data XOR expected data.
- **RC programming.** The tester writes repairs into the RC with `rc_op`
  (`RC_SET_ROW`, `RC_SET_COL`, `RC_MARK_ROW`, `RC_MARK_COL`) plus the
  index/row/col/bit fields, one command per cycle. The BIST reaches the array
  through the RC, so a rerun checks the repaired memory. Redundancy analysis
  (deciding which spares to use at production) belongs to the tester and is
  not part of this RTL.
- **Monitoring.** `ecc_state`, `rc_fr` (FR: unused redundancy left),
  `rc_row_used`/`rc_row_ff`, `rc_col_used`/`rc_col_ff` and one-cycle event
  pulses: `ev_detect`, `ev_soft`, `ev_hard`, `ev_repaired`, `ev_spare_fault`.
- **Reset.** `rst_n` is asynchronous and active low. It clears the RC, so
  production repairs must be reloaded after power-up. The arrays are not
  reset.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `DATA_W` | 64 | 32K x 64 example memory |
| `ADDR_W` | 15 | 32K words |
| `N_ROW`, `N_COL` | 8, 4 | spare rows / columns of the example memory |
| `COL_W` | 3 | design choice: 8 words per physical row |
| `ITER_T` | 4 | design choice: identification rounds before "hard" |

Check-bit count and the derived widths (codeword 71, RC bit index 7) follow
from `DATA_W`. The other evaluated memory sizes are reached with parameters:

| Size | Parameters |
|---|---|
| 32K x 32 | `DATA_W=32` |
| 32K x 128 | `DATA_W=128` |
| 16K x 64 | `ADDR_W=14` |
| 8K x 128 | `DATA_W=128`, `ADDR_W=13` |

All use 8 spare rows and 4 spare columns.

## Where this RTL departs from, or adds to, the original scheme

Taken from the scheme:

- the two-phase flow and its state sequence;
- write-back / re-read identification;
- copying to the spare followed by SRF / SRA;
- FR and FFWR;
- Hold and its shared pin;
- the OR-gate test path;
- SEC Hamming code with log2(k)+1 check bits;
- 8 spare rows and 4 spare columns.

Design choices where the scheme gives no detail:

- **Identification length.** The scheme repeats write-back and re-read for
  "slightly longer than the scrubbing interval". Here this is a fixed
  `ITER_T` rounds, back to back, with no timer.
- **BIST algorithm.** Only a BIST from earlier work is named. March C- here.
- **RC.** Taken from earlier work. Here a simple register file with parallel
  comparators.
- **Spare organisation.** Spare row width, bit-column spares and their
  priority: see above.
- **Spare choice.** Production redundancy analysis is left to the tester. The
  on-line choice of spare is the simple rule above.
- **Postponed repair.** Deferral to idle time is mentioned as a
  software-controlled option. Here it is the `repair_defer` / `mem_idle`
  handshake and the `PEND` state.
- **User handshake.** Hold rises combinationally, the user must repeat a
  refused request, and `rd_err` / `rd_ue` are extra flags.
- **Uncorrectable errors** start no action. The scheme assumes single-bit
  errors.

Not built:

- the tester;
- the production redundancy-analysis algorithm;
- the reliability / MTTF evaluation flow, which is software;
- a variant that merges the BIST and ECC controller address counters, which
  is mentioned only as a possible area saving.

The memories are written as arrays. A real implementation would map them to
SRAM macros.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_hamming_enc`, `tb_hamming_dec` | Against a separate reference code; every single-bit error at 64 bits; double errors detected |
| `tb_sram_main`, `tb_sram_redundant` | Read-back and latency; masked spare-column writes |
| `tb_reconfig_circuit` | Comparison, fault flags and free-spare choice against a model |
| `tb_memory_core` | Stuck cells hidden by a spare row and by a spare column; a flagged spare row falls back to MEM |
| `tb_mbist` | Exact run length; a stuck-at-1 cell gives exactly its three r0 failures |
| `tb_ecc_controller` | Exact Hold lengths for a soft error, row repair, repair of a faulty spare row (SRF), postponed column repair and FFWR |
| `tb_mem_test_wrapper` | End to end at 256 words; counts every mechanism and fails if any never occurred |
| `tb_full_size` | The top at its default size |
| `tb_table1_configs` | The top at 32K x 32, 32K x 64, 32K x 128, 16K x 64 and 8K x 128 (helper `table1_case`), each through BIST, production repair, a soft error, an on-line row repair and full read-back |

The mechanisms counted by `tb_mem_test_wrapper` are:

- BIST fail report;
- production repair and retest;
- on-the-fly correction;
- soft error;
- hard fault with row repair;
- postponed column repair;
- repair of a faulty spare column;
- refused request;
- FFWR;
- uncorrectable word.

`tb_full_size` runs the top at its defaults. It does two BIST runs of 32K
words around a production column repair, writes and reads all 32K words, then
performs a soft-error scrub and an on-line row repair, with exact Hold
lengths.

Hard faults are modelled in the testbenches by forcing a cell of the array on
every falling clock edge through a hierarchical reference. The RTL has no
fault-injection logic.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_full_size \
    rtl/ecc_pkg.sv tb/tb_full_size.sv
./obj_dir/Vtb_full_size
```

All of this is simulation only. The RTL has not been mapped to a cell library
or timed. The longest combinational path is decoder → Hold → path
multiplexer → memory enable. Hold rises in the same cycle as an erroneous
read so that the user request of that cycle is refused. This path is the
first to check in timing. If it is too slow, Hold can be registered, at the
cost of letting one more user request through.
