# Hardware malware detection from cache hit rates

A small IoT processor cannot afford anti-malware software, but its own
caches reveal a lot about what it is running. This design is a malware
detection mechanism (MDM) that sits next to a RISC-V core. It watches
each retired instruction's program counter and L1 instruction-cache and
data-cache access/hit signals. From them it builds six running cache hit
rates, classifies every instruction as benign or malicious with an on-chip
random forest, and flags the program as malware when too many instructions
in an interval look malicious.

Two ideas keep the circuit small and its power low:

* **No divider.** A hit rate is `hits / accesses`. Here it is read from a
  precomputed hit-rate table (HRTable), addressed by 8-bit versions of the two
  counters. The counters are normalised so that the table needs only half
  its entries.
* **Access control.** Once a program has run for a while, the normalised
  counters rarely change. The table is read only when its address changes.
  The forest is only started when the feature vector changes. Otherwise the
  previous answer is reused. In the end-to-end test this skips 93 % of table
  lookups and about three quarters of forest evaluations.

The RTL is SystemVerilog-2017 in `rtl/`, with self-checking testbenches in
`tb/`.

## Datapath

```
 pc, ic_acc/hit, dc_acc/hit
          |
  access_hit_counter      6 x ahc_channel: 32-bit access/hit counters
  (1 cycle)               -> 8-bit entry point (a_shr, h_shr) + access flag
          |
  hrtable x 6             16-bit hit rate, read only when the flag is set
  (1 cycle)
          |  six features
  rf_classifier           10 pipelined trees (rf_tree), majority vote,
  (DEPTH+1 = 11 cycles)   result reuse for an unchanged feature vector
          |  per-instruction verdict
  pmi_judge               malicious count per WINDOW instructions,
                          > 30 % -> sticky malware flag
```

The design takes one instruction per cycle. A verdict leaves `DEPTH+3`
cycles (13 by default) after its instruction entered.

### The six features

Each instruction is counted into six channels, in the order of
`mdm_pkg::feat_e`:

| index | feature | counted when |
|---|---|---|
| 0 | total I-cache hit rate | every I-cache access |
| 1 | total D-cache hit rate | every D-cache access |
| 2 | kernel I-cache hit rate | I-cache access, PC in kernel area |
| 3 | kernel D-cache hit rate | D-cache access by an instruction in kernel area |
| 4 | user I-cache hit rate | I-cache access, PC in user area |
| 5 | user D-cache hit rate | D-cache access by an instruction in user area |

Splitting the rates by CPU mode gives the classifier more detail at little
cost. A program moves back and forth between user code and kernel code,
and the two show different cache behaviour. The mode is decided from the
PC. `pc >= KERNEL_BASE` counts as kernel, and `KERNEL_BASE` defaults to the
start of the kernel half of the RV64 Sv39 Linux address space. The program
counter is *not* a feature: it changes on every instruction, so leaving it
out makes result reuse possible.

## From counters to a table address (`ahc_channel`)

This is the least obvious part. Each channel keeps 32-bit access and hit
counts since the last `clear`. The table address is taken from the leading
bits of both counts. Both are shifted right by the same amount `s`, chosen
so that the access count keeps exactly 8 significant bits:

```
s     = max(0, msb_index(a_cnt) - 7)
a_shr = a_cnt >> s        // 128..255 once a_cnt >= 128
h_shr = h_cnt >> s        // <= a_shr, since hits <= accesses
```

`h_shr / a_shr` approximates `h_cnt / a_cnt` to about 1/128. The counts only
grow, so the low bits that are dropped matter less and less. For example,
`a_cnt = 1,425,404` and `h_cnt = 942,079` give `s = 13`, `a_shr = 173` and
`h_shr = 114`. One more hit makes `h_shr` 115. The access count must reach
1,425,408 before `a_shr` becomes 174.

A simpler scheme halves both counters whenever the access count overflows
8 bits. That scheme accumulates rounding error, and this one does not.

The channel registers `upd` (the access flag) in the cycle after
`(a_shr, h_shr)` changed. This is exactly the cycle in which the table must
be read again. A `clear` zeroes the channel and raises `upd`, so the table
output is refreshed too. The counters saturate at 2^32-1. A hit strobe
without an access strobe is ignored.

## The hit-rate table (`hrtable`)

The table holds `floor(h * 2^16 / a)` as a 16-bit fraction, so `0x8000`
means 50 %. Two kinds of entry read as 0:

* A rate of 100 % (`h == a`) would need a 17th bit. It is stored as 0, and
  caches practically never sit at exactly 100 %.
* Impossible entries (`h > a`) are also 0.

Normalisation puts a 1 in bit 7 of `a_shr` as soon as 128 accesses have
been counted. So only the right half of the table (`a_shr` = 128..255) is
kept: 128 x 256 x 16 bit = 512 Kbit, which is 15 36-Kbit block RAMs instead of
30. During the first 127 accesses after a `clear`, the address falls in the
removed left half and the rate reads as 0.

The table is a synchronous ROM with one cycle of latency. Its read enable
is the channel's access flag. With the enable low, the output register
keeps the previous rate, which is still correct because the address has
not changed. The contents are filled at start-up by a loop over the formula
above, so there is no data file. A synthesis tool that evaluates `initial`
loops, as FPGA tools do, turns this into an initialised block RAM. The top
level has one table per feature: six in all, 90 block RAMs on a device with
140.

## Random forest (`rf_tree`, `rf_classifier`)

The forest has `NT = 10` trees of depth `DEPTH = 10` on 16-bit features. A
trained model is data, not logic, so the trees are loaded at run time
through a configuration port, one node per cycle.

**Node layout** (`mdm_pkg::node_t`, 21 bits): `{leaf, cls, feat[2:0], thr[15:0]}`.
An inner node goes to its left child when `feature[feat] <= thr` and to its
right child otherwise. A leaf gives the class (1 = malicious). Each tree is
stored as a complete binary tree with one memory per level. Level `k` holds
`2^k` nodes, and node `i` of level `k` has children `2i` (left) and `2i+1`
(right) on level `k+1`. Every node on level `DEPTH` is treated as a leaf. To
load a node, set `cfg_tree`, `cfg_level`, `cfg_idx` = `i` and `cfg_node`,
and pulse `cfg_we`. Any tree of depth 10 or less fits. Unused slots below a
leaf are never read.

**Pipeline.** Stage `k` of every tree evaluates level `k`, so the forest
accepts a new instruction every cycle. The trees share one feature pipeline
held in `rf_classifier`. Results leave in order `DEPTH+1` cycles after
entry. An instruction is malicious when more than half of the trees say
so. A 5–5 tie counts as benign.

**Reuse.** `rf_classifier` compares each feature vector with the previous
instruction's vector. Only a changed vector starts the trees (`in_eval`).
An unchanged one travels down a 1-bit side pipeline and takes the result of
the last evaluated instruction (`out_eval = 0`). Stages that carry no
evaluation do not read their node memories or shift their features.

## Verdict (`pmi_judge`)

The predicted-malicious-instruction (PMI) count is kept over consecutive
intervals of `WINDOW` instructions (10,000 by default). At the end of each
interval, `mal * 100 > THRESH_PCT * WINDOW` is tested without a divider.
`win_done` pulses with the count (`win_mal`) and the result (`win_over`).
The first interval over 30 % sets `malware`, which stays set until `clear`.

## Top level `mdm_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `clear` | in | 1 | synchronous restart of all statistics (program start) |
| `info_valid` | in | 1 | an instruction is reported this cycle |
| `pc` | in | `PC_W` | its program counter |
| `ic_acc`, `ic_hit`, `dc_acc`, `dc_hit` | in | 1 | its L1 cache access / hit strobes |
| `cfg_we`, `cfg_tree`, `cfg_level`, `cfg_idx`, `cfg_node` | in | | forest node write |
| `feats`, `feats_valid` | out | 6x16, 1 | features as presented to the forest |
| `instr_valid`, `instr_mal` | out | 1 | per-instruction verdict, `DEPTH+3` cycles after entry |
| `instr_eval` | out | 1 | that verdict came from a fresh forest evaluation |
| `win_done`, `win_mal`, `win_over` | out | 1, `WCNT_W`, 1 | interval result |
| `malware` | out | 1 | sticky program verdict |
| `hrt_read` | out | 6 | tables read this cycle (activity) |
| `clf_eval` | out | 1 | forest started this cycle (activity) |

| parameter | default | meaning |
|---|---|---|
| `PC_W` | 64 | program-counter width |
| `KERNEL_BASE` | `64'hFFFF_FFC0_0000_0000` | lowest kernel-area PC |
| `NT` | 10 | trees |
| `DEPTH` | 10 | tree depth |
| `WINDOW` | 10000 | instructions per PMI interval |
| `THRESH_PCT` | 30 | malware threshold in percent |

Suggested operation:

1. Reset.
2. Load all `NT * (2^(DEPTH+1) - 1)` nodes.
3. Pulse `clear` when the monitored program starts.
4. Stream instructions.

Loading nodes while instructions stream would mix two models.

## Where the design makes its own choices

These points are not fixed by the detection scheme itself. Change them to
fit the host system.

* **Processor interface.** One instruction per cycle, with separate
  access and hit strobes per cache, is assumed. A multi-cycle core just
  leaves `info_valid` low in between.
* **Kernel/user decision** by a PC boundary (`KERNEL_BASE`). A core that
  exports its privilege level could use that signal instead.
* **Hit-rate encoding** as a binary fraction of 2^16. Left-half and
  impossible entries read as 0.
* **Counter saturation** at 2^32-1, and `clear` as the program-start event.
* **Loadable forest** (node memories) instead of a forest compiled into
  comparators. This makes one bitstream usable with any trained model, at
  the cost of 430 Kbit of node storage. The majority rule and the
  tie-breaking are also this design's choice.
* **Interval length** `WINDOW` = 10,000 instructions.
* **One table per feature.** Sharing tables between features, for example
  over dual-port RAM, would trade area for arbitration.

Not included: the processor and its caches, which supply the input signals,
and the trace-collection and training flow that produces a forest.
Baseline variants are not built either: the full 256x256 table, the
halve-on-overflow counters, a divider-based hit rate, and classifiers that
use the PC as a feature.

## Verification

Each testbench checks its block against an independent model and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_ahc_channel` | the 1,425,404 / 942,079 example, flag only on an entry-point change, 300k random events against a halving reference |
| `tb_access_hit_counter` | six channels, user/kernel split, split sums equal totals |
| `tb_hrtable` | every right-half entry against floating-point division, left half = 0, 100 % = 0, hold when not enabled, 1-cycle latency |
| `tb_rf_tree` | random depth-10 tree, one input per cycle with gaps, exact `DEPTH+1` latency, ties on thresholds |
| `tb_rf_classifier` | 10 trees, repeated vectors, evaluation vs reuse, vote, clear |
| `tb_pmi_judge` | 30 % boundary (6/20 not over, 7/20 over), sticky flag, clear |
| `tb_mdm_top` | whole design at default parameters: a benign and a malware-like program, every feature vector, verdict, latency and interval checked; counts each mechanism |
| `tb_mdm_activity` | 500,000-instruction run at default parameters; reports how many table reads and forest evaluations access control saves |

Every testbench has a cycle watchdog. A failing or missing check
increments `failures`.

Run one with Verilator 5:

```
verilator --binary --timing --top-module tb_mdm_top -y rtl -y tb +libext+.sv \
          -Irtl rtl/mdm_pkg.sv tb/tb_mdm_top.sv
./obj_dir/Vtb_mdm_top
```

`tb_mdm_top` loads 20,470 nodes and classifies 40,000 instructions in well
under a second of simulation time. Its end-to-end run shows:

* the benign program stays at 0–4 % malicious;
* the malware-like program reaches 100 %;
* 93 % of table lookups are skipped;
* 10,127 forest evaluations serve 40,000 instructions.

`tb_mdm_activity` runs 500,000 instructions, half benign-like and half
malware-like, in about a second. Over that run:

* 99.1 % of table lookups are skipped;
* 96 % of verdicts reuse an earlier forest result;
* the malware flag is set only in the second half.

All RTL passes `verilator --lint-only -Wall` and elaborates in Yosys
(slang front end). The remaining lint warnings are informational: the same
reset is used by assertions, two debug counter outputs are left
unconnected, and the upper quotient bits in the table-fill loop go unused.
