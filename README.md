# PUMPS: selection/histogram module and resource crossbar

PUMPS is a multiprocessor for pattern analysis and image databases.
Task processing units (TPUs) share three things:

- a pool of special processors and VLSI units (PPVUs), such as FFT engines, array processors and histogram analysers;
- a shared memory and a shared cache;
- a backend database machine.

The backend machine is a set of disk *data modules*. Each data module filters its records next to the disk, so that only the wanted data crosses the network.

This RTL covers the two parts of that system that are defined down to logic:

1. **The selection processing module** of a data module (`selection_module`). It reads the bit-serial record stream coming off a disk and does two jobs:
   - *selection*: it passes on only the records for which a programmable Boolean function of up to 8 field comparisons is true, optionally projected onto some fields;
   - *histogramming*: with the same hardware, it counts the pixels of an image into 8 intervals.
2. **The Special Resource Arbitration Network** (`sran`). This crossbar connects any TPU to any PPVU, and PPVUs to each other, and settles conflicts by priority.

The rest of the system has no logic described for it: the TPUs and their caches and memories, the shared memory, the processor–memory network, the backend network, the front-end processor, the disks, and the join and communication modules of a data module. `pumps_top` places the two built blocks side by side and brings all their connections to those parts out as ports.

## How selection works

A record is a fixed-length string of `rec_len` bits. It arrives one bit per clock on `in_valid`/`in_bit`, and records follow one another with no separator.

```
serial data ──┬───────────────────────────────────────► record_gate ──► out
              │                                            ▲  ▲ keep (projection)
              ├─► assoc_logic 0 ◄─ key_register 0          │  │
              ├─► assoc_logic 1 ◄─ key_register 1   X_i    │ Z│
              │      ...                      ─────► x_hold ─► spal_tree
              └─► assoc_logic 7 ◄─ key_register 7          │
                     ▲ en/first                            └► mm_resolver ─► hist_counters
              timing_control (bit position in the record)
```

**Key registers and associative logic.** Each of the 8 units holds a 16-bit key and a 16-bit mask in a *circulating* register. While the unit's field passes on the bus, the register rotates by one place per bit. Its top bit is therefore always the key bit that lines up with the data bit on the bus. After 16 bits the register is back where it started, ready for the next record. The field is compared most significant bit first.

The associative logic (`assoc_logic`) updates three state flip-flops per bit, with `m` the mask bit (1 = compare), `d` the data bit and `k` the key bit:

| flip-flop | meaning | next value |
|---|---|---|
| `e` | every compared bit so far is equal | `e & beq` |
| `p` | exactly one compared bit differs so far | `(p & beq) \| (e & ~beq)` |
| `l` | the field is already known to be below the key | `l \| (e & m & ~d & k)` |

Here `beq = ~m | (d == k)`. After the field's last bit, the unit's match bit X_i is one of four values, chosen by its comparison code:

| code | match bit X_i | test |
|---|---|---|
| `CMP_EQ` | `e` | field equals key |
| `CMP_LT` | `l` | field less than key |
| `CMP_GT` | `~e & ~l` | field greater than key |
| `CMP_PROX` | `e \| p` | proximity: at most one compared bit differs |

Masked-off bits take no part in any of these tests.

**Long keys by cascading.** A unit whose `cascade` bit is set does not start its field from the reset state. It starts from the final state of the unit before it. If the sub-fields D1, D2, … lie one after another in the record, the last unit of the chain gives the comparison of the whole concatenation, for example (D1>B1) ∨ (D1=B1 ∧ D2>B2) ∨ …. So 8 registers can compare one key of up to 128 bits.

**Timing and control** (`timing_control`) counts the bit position within the record. From it, it drives:

- the `en`/`first` strobes of each enabled unit, whose field is `start[i] .. start[i]+15`;
- the record start and end marks;
- `eor`, one cycle after the last bit, when all units hold their results.

**Decision, overlapped with matching.** At `eor` the eight X bits are copied into `x_hold`. The units are then free to match the next record. Meanwhile a tree of *software programmable logic arrays* (SPALs) computes Z = f(X1..X8) from `x_hold`:

- Each SPAL holds f as a sum of products: up to 8 terms. A term is written as two masks, `pos` (literal X_j) and `neg` (literal ~X_j).
- Terms are appended one at a time, and a SPAL is erased with a clear.
- One SPAL takes 4 inputs. So X1–X4 feed leaf SPAL 0, X5–X8 feed leaf SPAL 1, and their outputs Z0 and Z1 feed the root SPAL 2, whose output is Z.
- `spal_tree` builds as many levels as its parameters need. Each level splits its inputs into groups of `SPAL_IN`, and its outputs feed the next level, until one SPAL is left. SPALs are numbered level by level from the inputs up, so the root always has the highest number. For example, 16 keys with 4-input SPALs give leaves 0–3 and root 4.

**The gate** (`record_gate`) can only decide about a record after the record has ended. So it delays the whole stream by exactly one record, using a 1024-bit circular buffer. Because the delay is exactly one record, the bit leaving the buffer has the same position in its record as the bit entering. The position-based signals of the incoming stream (record marks, projection mark) therefore apply to the outgoing bit unchanged. The bits of a record are passed while that record's Z is 1.

**Projection.** A unit with its `project` bit set marks its field window as one of the projected fields. If any unit is marked, only the bits inside marked windows are passed. If none is marked, whole records are passed. `out_first`/`out_last` mark the first and last bit position of every accepted record, even when those bits are projected away.

### Timing

- One data bit per clock. There is no back-pressure; gaps in `in_valid` are allowed anywhere.
- `x_hold`, `z` and `any_match`/`first_idx` change one clock after `rec_done` (`eor`).
- In a stream without gaps, a passed bit appears on `out_valid` exactly `rec_len + 2` clocks after it entered.
- The last record of a stream stays in the buffer until another record follows. Send one padding record to flush it.
- Writing the record length starts a new stream, and the buffered record is dropped.
- Configuration is only written while no records flow.

## Histogramming

Set mode `MODE_HIST` and a record length of 16 (one pixel per record). Load the 8 thresholds **in descending order**, unit 0 holding the largest, each with `CMP_GT` and a full mask.

- Every unit whose threshold is below the pixel responds.
- The multiple match resolution circuit (`mm_resolver`) picks the first responder, the one with the lowest index. That is the largest threshold below the pixel, so it names the pixel's interval.
- That interval's counter goes up by one and shows the new value three clocks after the pixel's last bit. The counters are 32 bits wide and saturate.
- A pixel at or below every threshold is not counted.

Counters are read combinationally through `cnt_idx`/`cnt_data` and cleared by a write to `A_CLR_CNT`. In this mode the gate passes nothing.

## Configuration bus

Writes only: `cfg_we`, `cfg_addr[11:0]`, `cfg_wdata[31:0]`. The map is in `sel_pkg`.

| address | contents |
|---|---|
| `0x000` | record length in bits (also restarts the stream) |
| `0x001` | bit 0: mode (`0` selection, `1` histogram) |
| `0x002` | any write clears the counters |
| `0x003` | unit enable, one bit per unit; a disabled unit gives X = 0 |
| `0x100+i` | key of unit i (bits 15:0) |
| `0x200+i` | mask of unit i, 1 = bit compared |
| `0x300+i` | control of unit i: `[31:16]` field start, `[3]` project, `[2]` cascade, `[1:0]` comparison (`0` EQ, `1` LT, `2` GT, `3` PROX) |
| `0x400+s` | append a term to SPAL s (by default 0, 1 = leaves, 2 = root): `[3:0]` pos, `[19:16]` neg |
| `0x480+s` | erase SPAL s (Z = 0 until terms are added) |

Every field must lie inside the record: `start + 16 <= rec_len`. Otherwise the key register does not make a whole turn per record and loses alignment.

## SRAN crossbar

The crossbar has 4 TPUs and 4 PPVUs. There are 8 request sources: TPUs 0–3, then PPVUs 0–3 acting as requesters for PPVU-to-PPVU paths.

- A source holds `req` with `dst` naming the PPVU it wants.
- A free PPVU goes to the requesting source with the lowest number, so TPUs come before PPVUs.
- The winner keeps the PPVU for as long as it holds the same request. When `req` drops or `dst` changes, its grant falls at once and the PPVU is free for others from the next clock.
- A PPVU never connects to itself.
- `grant` rises one clock after the request.
- While a source is granted, its `wdata` reaches the PPVU (`ppvu_in_valid`/`ppvu_in_data`), and the PPVU's `ppvu_out_data` comes back on its `rdata`.
- `ppvu_conflict` flags a PPVU for which some source is waiting.

## Where this RTL follows the source and where it chooses

These parts follow the published architecture:

- the block structure of the selection module: circulating key registers, associative logic with equality, less/greater-than and proximity, timing and control, multiple match resolution, counters, SPAL, SPAL tree and gate;
- its histogram use;
- splitting long keys across registers;
- overlapping the evaluation of f with the matching of the next record;
- the SRAN's role: any TPU to any PPVU, PPVU-to-PPVU paths, priority on conflicts.

The source gives no sizes, encodings or protocols, so every one of the following is a choice of this implementation:

- the sizes: 8 keys of 16 bits, 4-input SPALs with 8 terms, 32-bit counters, 1024-bit records, 4 TPUs and 4 PPVUs, 16-bit crossbar data;
- bit-serial, MSB-first data;
- a mask register per key, circulating with it, and its polarity (the original cell has one mask line per bit position, shared by all keys);
- the state equations and the meaning of "proximity" (at most one differing bit);
- cascading through the previous unit's state;
- the field windows (start offset, fixed 16-bit width);
- the one-record delay buffer in the gate and its flush rule;
- projection by marking unit fields (the source names projection as a function of this module but not how it is done);
- descending threshold order for histograms;
- "first responder" meaning the lowest index;
- the configuration bus;
- the SRAN's fixed priority and hold-while-requested rule.

Not built: the rest of PUMPS, as listed at the top; the hierarchical controllers of the backend network.

## Files

| file | contents |
|---|---|
| `rtl/sel_pkg.sv` | comparison codes, mode, state and control-word types, register map |
| `rtl/key_register.sv` | circulating key and mask register |
| `rtl/assoc_logic.sv` | bit-serial comparison of one field |
| `rtl/timing_control.sv` | bit position, field windows, record marks, projection mark |
| `rtl/mm_resolver.sv` | first-responder selection |
| `rtl/hist_counters.sv` | histogram counters |
| `rtl/spal.sv`, `rtl/spal_tree.sv` | programmable sum-of-products logic and the tree of them |
| `rtl/record_gate.sv` | one-record delay buffer and output gate |
| `rtl/selection_module.sv` | the selection processing module |
| `rtl/sran.sv` | resource crossbar |
| `rtl/pumps_top.sv` | top level: both blocks, ports prefixed `sel_` and `sran_` |

Each file opens with a description of its interface and timing.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one compares the module against a model written independently in the testbench (integer comparisons, direct evaluation of the DNF, software histograms, a reference owner table for the crossbar), and each has a watchdog.

- `tb_selection_module` runs 12 random configurations of record length, fields, keys, masks, comparisons, cascades, projections and SPAL functions, with and without gaps. It checks every output bit, the record marks, `x_hold`, `z` and the `rec_len + 2` latency. It also runs a 300-pixel histogram.
- `tb_spal_tree` programs random functions into five tree shapes, from a single SPAL up to four levels of 2-input SPALs, and compares Z with a level-by-level evaluation.
- `tb_pumps_top` runs the top level at its default parameters and takes well under a second:
  - a relational query on 128-bit tuples, `(id > ID_MIN ∧ dept = DEPT ∧ ¬(age < AGE_MIN)) ∨ code ≈ CODE`. It uses a cascaded 32-bit key, a masked 8-bit equality, a threshold and a proximity search, with terms in both leaf SPALs and the root. The query runs once passing whole tuples and once projecting them onto `id` and `code`;
  - a 32×32 image histogram, followed by a second pass over the same image in selection mode that keeps the pixels above a threshold chosen from the counters;
  - crossbar conflicts, hand-over after release, a PPVU-to-PPVU path and a refused self-request.

  It counts each of these mechanisms and fails if one never happened.

To run one with plain Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sel_pkg.sv tb/tb_pumps_top.sv --top-module tb_pumps_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
