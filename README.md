# Superset X-canceling output compactor

A MISR (multiple-input signature register) is the most compact way to squeeze
the scan-out stream of a chip under test, but a single unknown value (an X
from an uninitialised flop, bus contention, a floating net) corrupts every
signature bit it reaches. Instead of masking X's before the MISR, this
compactor lets them in and removes them afterwards. Because the MISR is
linear, each signature bit is an XOR of captured scan cells. Some XOR
combinations of signature bits contain every X an even number of times, so
the X's drop out. Those X-free combinations are sent to the tester and
compared with their fault-free values.

Choosing those combinations takes *control bits*: for each of the Q output
bits, one bit per MISR bit saying whether that bit joins the XOR. With
Q = 7 and a 128-bit MISR that is 896 bits per signature. The key idea here
is that the scan cells that capture X's are strongly correlated from one test
vector to the next. Off-line software therefore merges the X locations of
many responses and finds one *superset* solution that cancels all of them.
The same 896 control bits then serve many signatures, so the tester stores
and sends far fewer bits.

The hardware described here stores and applies those reused control sets. The
off-line solver is software; a model of it is built into the end-to-end
testbench.

## How the X's cancel

Take one signature. Give every scan cell a symbol and simulate the MISR
symbolically. Each of the W signature bits is then an XOR of cell symbols.
Keep only the X symbols, and signature bit i becomes a row of a W x n
matrix over GF(2), where n is the number of X's. Gauss-Jordan elimination
of `[matrix | identity]` leaves at least W - n all-zero rows. The identity
part of such a row lists MISR bits whose XOR is free of X's. Q of these rows
form the control set. Each X-free bit that is checked halves the chance that
an error goes unseen, so Q = 7 gives 1 - 2^-7 = 99.2 % error coverage. It
also limits one signature to W - Q = 121 X's.

A superset solution is found the same way from the *union* of the X
locations of several responses. It cancels every response whose X's lie
inside that union. The cost is that cells which are X in one merged response
but hold good values in another are also cancelled for that other response.
The off-line merge must therefore refuse any merge that would hide a cell
needed to detect a targeted fault. The hardware does not need to know any of
this: it only applies the control set it is told to use.

## Partitions

One signature per vector needs a MISR larger than the X count of the worst
vector, which can run to thousands of bits. Instead, the controller cuts
each vector's scan slices into partitions, with one signature per partition.
The same cut is used for every vector, so partition p of one vector lines up
with partition p of every other. That lets responses be merged per partition.
The number of partitions (1 to 64) and the length of each one (in scan
slices) are programmable, so the cut can be chosen after the responses are
known. Programming a single partition gives one signature per vector.

When the X count varies a lot between vectors, the vectors can be split
into groups, each with its own partitioning. Between groups, reprogram the
partitions and reload the control sets. `tb_xc_workload` does this between
its four cases.

## Where the control bits come from

All three schemes share the MISR and the X-canceling network. The `CFG_MODE`
register selects which one supplies the control set of each signature. The
mode in force when a partition's last slice enters decides it.

| mode | storage | the tester sends per signature | fits |
|---|---|---|---|
| `SRC_REG` | one 896-bit register | nothing, or a new set when the next run of vectors needs one | designs that order vectors so that those sharing a set run back to back |
| `SRC_RAM` | RAM of all merged sets (1024 x 896 bits) plus a partition base table | a group index | chips with a large RAM available |
| `SRC_INCR` | one set per partition (64 x 896 bits) | the numbers of the partitions whose set changes, then a one-bit *ready* | chips with only a small scratch pad |

* **Register.** The register keeps driving the network until the tester
  reloads it. Driving the network straight from tester channels with
  vector repeat amounts to reloading it before every signature.
* **Indexed RAM.** The groups of each partition are loaded into consecutive
  words at session start. `CFG_PART_BASE[p]` holds the address of group 0
  of partition p. Per signature the tester writes the group index with
  `gidx_we`, and the RAM reads word `base[p] + gidx`. The index may be
  written at any time during the partition, up to and including the clock of
  its last slice; a write on that last clock is used directly.
* **Incremental update.** Vectors are ordered so that consecutive ones share
  most partitions' sets. Before a vector, the tester loads only the entries
  that change (`ld_addr` = partition number), then pulses `vec_ready`. In
  this mode no slice is compacted until `vec_ready` arrives, and the
  permission lasts for exactly one vector. Slices offered before it are
  dropped, counted in `ignored_slices`, and `waiting` is high meanwhile.

## Structure

```
 tester ──ld_start/ld_addr/tch_*──► xc_ctrl_deser ──word──┬─► xc_ctrl_reg ───────┐
                                                          ├─► xc_group_ram ──────┤ ctrl
 tester ──gidx───────────────────────────────────────────►│   (base[p]+gidx)     ├──► xc_cancel_net ──► xc_bits
                                                          └─► xc_part_ram ───────┘        ▲
 CUT ──slice──► xc_misr ───────────────────── sig ─────────────────────────────────────────┘
                  ▲ en/restart
 tester ──cfg/vec_ready──► xc_part_ctrl (partition counter, ready gate)
```

| file | what it is |
|---|---|
| `rtl/xc_pkg.sv` | default sizes, MISR polynomial, mode and configuration enums |
| `rtl/xc_misr.sv` | W-bit internal-XOR MISR, N chain inputs, restart per signature |
| `rtl/xc_cancel_net.sv` | Q AND-XOR trees over the signature |
| `rtl/xc_ctrl_deser.sv` | assembles a control set from CH tester channels |
| `rtl/xc_ctrl_reg.sv` | control register of the register scheme |
| `rtl/xc_group_ram.sv` | control-set RAM and index-to-pointer conversion |
| `rtl/xc_part_ram.sv` | per-partition scratch-pad RAM |
| `rtl/xc_part_ctrl.sv` | partition counter and ready gate |
| `rtl/xc_top.sv` | the compactor |

## Interface and timing (`xc_top`)

All inputs are sampled on the rising edge of `clk`. `rst_n` is an
asynchronous active-low reset. The RAM arrays are not reset; everything else
is.

* **Configuration.** Each clock with `cfg_we` high writes one register, chosen
  by `cfg_sel`:
  * `CFG_MODE`: the control source, in `cfg_data[1:0]`;
  * `CFG_NUM_PARTS`: partitions per vector;
  * `CFG_PART_LEN`: slices in partition `cfg_idx`;
  * `CFG_PART_BASE`: the RAM address of group 0 of partition `cfg_idx`.

  Change the partitioning only between vectors.
* **Control-set load.** Pulse `ld_start` for one clock with the destination
  on `ld_addr`:
  * ignored in `SRC_REG`;
  * the RAM word in `SRC_RAM`;
  * the partition in `SRC_INCR`.

  Then send 112 beats of 8 bits with `tch_valid` high; idle clocks between
  beats are allowed. Beat b carries control bits `8b+7 .. 8b`. Bit `128k+i`
  of the set selects MISR bit i for output k. The set is written on the
  clock after the last beat. It goes to whichever store `CFG_MODE` selects
  at that moment. Assertions check that beats only come during a load.
* **Compaction.** Each clock with `slice_valid` high (and `waiting` low)
  compacts one slice, bit i coming from scan chain i. Signatures follow each
  other without idle cycles.
* **Output.** Call the cycle that carries a partition's last slice cycle t.
  In cycle t+2, `xc_valid` is high for one clock with:
  * `xc_bits`, the Q X-canceled bits;
  * `xc_part`, the partition number;
  * `xc_vec_end`, high for the vector's last partition.

  Throughput is one signature per partition, and a partition may be a
  single slice long.

## Parameters

| parameter | default | origin |
|---|---|---|
| `W` MISR size | 128 | smallest of the MISR sizes 128/256/512 evaluated for partitioned responses |
| `Q` X-canceled bits per signature | 7 | 99.2 % error coverage |
| `N` scan chains | 32 | choice of this design |
| `CH` tester channels for control bits | 8 | choice |
| `PARTS` max partitions per vector | 64 | choice |
| `DEPTH` control-set RAM words | 1024 | choice, sized for the hundreds to about a thousand merged sets that a 128-bit MISR produces on large industrial designs |
| `LW` partition length bits | 16 | choice |
| `POLY` | x^128 + x^7 + x^2 + x + 1 | choice (irreducible); set it to match another `W` |

Scan chain i feeds MISR bits `b = i*W/N`, `(b+5+2i) mod W` and
`(b+61+3i) mod W`. To change `W`, pass a matching `POLY`, and check that the
three taps of each chain stay distinct.

## Choices made in this design

These go beyond what the method fixes:

* Three control sources in one block, chosen at run time. A chip would
  normally keep one and drop the other stores.
* The serial load framing, the configuration port and the status counters.
* The pointer formed as base plus index.
* The rule that the ready bit gates compaction for one vector, and what
  happens to slices that arrive too early.
* The two-stage output pipeline.
* A signature never spans two vectors. Each vector, or each partition of a
  vector, ends its own signature.
* The MISR polynomial and the three taps per chain.

## Limits

* **Hidden cells.** A superset solution cancels some cells that hold good
  values, namely every cell that is X in another response of the same
  group. The merge software must refuse merges that hide a cell needed for
  fault detection. The hardware cannot check this.
* **Choice of combinations.** Gauss-Jordan elimination yields a basis of
  X-free combinations, and that basis is far from random: it follows the
  order of the rows and leans toward MISR bits that no X reaches. Use Q *random mixtures* of the basis as the control rows. Only then
  is a known cell seen with probability 1 - 2^-Q. Taking the first Q basis
  rows as they are left up to six of ten injected single-cell errors
  undetected in simulation.
* **Chain taps.** Each chain feeds three MISR bits, with offsets that differ
  from chain to chain (see `xc_misr.sv`). With one tap per chain, cells
  (slice s, chain c) and (s + W/N, c + 1) alias exactly. If one of them is X,
  the other is cancelled with it.
* **X budget.** Each signature may hold at most W - Q X's. The hardware does
  not check this; the off-line software must.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* **Unit testbenches.** These compare the RTL against models written
  independently in the testbench: a bit-by-bit LFSR recurrence, parity
  counts, shadow copies of the RAMs, and slice counters.
* **`tb_xc_top`.** This runs the whole compactor at its default sizes.
  1. It creates 16 vectors of 64 slices x 32 chains with correlated X's.
  2. It clusters them greedily per partition and solves each cluster by
     Gauss-Jordan elimination, building each cluster's symbolic MISR
     matrix from impulse responses.
  3. It drives the three schemes in turn.

  The X cells get fresh random values in the stream sent to the design.
  Every output must equal the value predicted with all X's at zero, and must
  arrive exactly in cycle t+2. The test also counts the following events and
  fails if any never happens:
  * register reuse;
  * RAM fetches;
  * same-clock index writes;
  * incremental updates and reuse;
  * ready waits;
  * mode switches;
  * one-signature and multi-signature vectors;
  * error detections.

  The test also fails if more than one signature misses an injected error
  in a cell that no merged response has as X.

* **`tb_xc_workload`.** This runs the indexed-RAM scheme with X statistics
  modelled on industrial designs. 4.8 % of the cells are X-prone and
  capture 90 % of the X's. Two X densities are run, 2.47 % and 0.50 %, each
  with 2 and with 8 partitions, over 64 vectors of 128 slices x 32 chains.
  Every output is checked as in `tb_xc_top`. The test then prints the tester
  data needed by each scheme:
  * conventional X-canceling: one custom control set each time the MISR
    has taken W - Q X's;
  * superset X-canceling: the merged control sets plus one group index per
    signature.

  With seed 1 the improvement factors were 2.19 and 7.00 at 2.47 %, and
  2.11 and 1.38 at 0.50 %, for 2 and 8 partitions. These figures come from a
  synthetic X model and a short test set; the gain grows with the number
  of vectors that share each set. The test fails if superset canceling ever
  needs more tester bits than the conventional scheme.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_xc_top \
  -y rtl -y tb +libext+.sv rtl/xc_pkg.sv tb/tb_xc_top.sv
./obj_dir/Vtb_xc_top
```

Building `tb_xc_top` takes under a minute; the simulation itself takes well
under a second. `tb_xc_workload` runs for about half a minute after it is
built.
