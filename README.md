# Built-in self-diagnosis with a low-power test pattern generator

Logic BIST normally ends in a single signature: it says whether a chip is
good, but not which part of the circuit failed. Narrowing the failure down
usually takes repeated test sessions. This design keeps the standard STUMPS
self-test structure, where a pseudo-random generator feeds parallel scan
chains and a MISR compacts what comes out. It adds two things:

1. **Diagnosis in one session.** The patterns are grouped into blocks. The
   MISR signature of each block is checked on chip against a stored
   fault-free value. Each mismatching signature is logged with its block
   number in a small fail memory. After the session the log is read out and
   diagnosed off chip.
2. **Lower test power.** The pattern generator is a *low-power TPG*
   (LP-TPG). Between two consecutive LFSR states it inserts three
   intermediate patterns, which cuts the bit transitions at the circuit
   inputs roughly in half.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The circuit
under test is not part of it: the top module brings the scan cell contents
out and takes the captured responses back in.

## Data path

```
            +---------+  8 outputs   +-------------+  scan outs  +------------+   +------+
  start --> | lp_tpg  | -----------> | scan_chains | ----------> | space_     |-->| misr |
            | (FSM +  |  one per     | 8 x 8 cells |             | compactor  |   | n=8  |
            | LP-LFSR)|  chain       +-------------+             +------------+   +------+
            +---------+                 |       ^                                    |
                                cut_stimulus  cut_response                 signature |
                                        v       |                                    v
                                 (circuit under test,      response_memory --> compare --> fail_memory
                                  outside bisd_top)        h x n expected       (bisd_      g x (log h + n)
                                                                                 controller)
```

`bisd_controller` sequences everything. `bisd_top` wires the blocks
together.

## The low-power pattern generator (`lp_tpg`, `lp_lfsr`, `lp_tpg_fsm`, `r_injection`)

This is the least obvious part of the design.

**Split LFSR.** `lp_lfsr` is an external-XOR (Fibonacci) LFSR of `WIDTH`
stages, `q[0]` to `q[WIDTH-1]`. Output O1 is `q[0]`. The lower half (the
"first half", A) and the upper half (the "second half", B) have separate
shift enables:

- `en1=1` shifts A. `q[0]` takes the feedback parity of the whole present
  state.
- A storage flip-flop `st` catches the old `q[WIDTH/2-1]`. That is the bit
  that would otherwise have moved into B.
- `en2=1` later shifts B, with `st` entering `q[WIDTH/2]`.

An `en1` step followed by an `en2` step moves the LFSR exactly one ordinary
state forward. The sequence of full states, T(i), is therefore the plain
LFSR sequence, and it keeps its period (255 for the default 8-bit
polynomial).

**R-injection.** Each stage has an injection cell, built from one AND gate,
one OR gate and a 2:1 multiplexer. The cell takes the stage's bit in T(i)
and in T(i+1):

- If the two bits are equal, the cell passes that bit.
- If they differ, the cell outputs a random bit R. The multiplexer is
  steered by R, so R=1 picks the OR output and R=0 the AND output.

An LFSR shifts, so the two bits of a stage are already present in adjacent
flip-flops. There is no need for a look-ahead copy of the register:

| half | when it is injected | T(i) bit | T(i+1) bit |
|---|---|---|---|
| B (upper) | after A has shifted | `q[k]` | `q[k-1]`, or `st` for the lowest stage of B |
| A (lower) | after both have shifted | `q[k+1]`, or `st` for the highest stage of A | `q[k]` |

R is the feedback parity of the present LFSR state. This is a choice of
this implementation: any pseudo-random bit would do.

**Four steps per LFSR state.** `lp_tpg_fsm` applies one step per clock while
`test_en=1`. `sel1`/`sel2` = 1 sends the exact half to the outputs; 0 sends
its injected bits.

| step | en1 en2 | sel1 sel2 | pattern on the outputs (A = lower, B = upper half) |
|---|---|---|---|
| 1 | 10 | 11 | T(i) = [A(i) \| B(i)]; A shifts at the end of the clock |
| 2 | 00 | 10 | T(k1) = [A(i+1) \| inj(B(i), B(i+1))] |
| 3 | 01 | 11 | T(k2) = [A(i+1) \| B(i)]; B shifts at the end of the clock |
| 4 | 00 | 01 | T(k3) = [inj(A(i), A(i+1)) \| B(i+1)] |

Step 4 is followed by step 1 again, with T(i+1). A pattern is the
combinational output during the clock in which its step's enables and
selects are applied. With `test_en=0` the FSM waits in step 1 with both
enables low, and the output holds the exact LFSR state. `init` restarts the
generator at `SEED` and step 1.

Over 4000 clocks the 8-bit generator averages **2.0 output transitions per
clock (peak 6)**, against **4.0 (peak 8)** for the same LFSR producing one
state per clock. `tb_lp_tpg` measures this.

## A test session (`bisd_controller`)

A session applies `n*h` patterns: h blocks of n patterns each. `n` is the
MISR width, `MISR_WIDTH`, and `h` is `NUM_BLOCKS`. The chains are m cells
long (`CHAIN_LEN`).

| state | clocks | what happens |
|---|---|---|
| `S_SHIFT` | m per pattern | The chains load the next pattern from the LP-TPG and unload the previous response through the compactor into the MISR. The MISR is clocked only when there is a response to unload. |
| `S_CHECK` | 1 per block | Runs after the n-th response of a block has entered the MISR. The signature is compared with response-memory word `block`. On a mismatch, `{block, signature}` is written to the fail memory. The MISR is cleared. |
| `S_CAPTURE` | 1 per pattern | The scan cells capture the circuit response. |

After the last pattern, one more shift unloads its response and the last
block is checked. The controller then sits in `S_DONE` until the next
`start`.

- `busy` is high for `n*h*(m+1) + m + h` clocks.
- `done` rises `n*h*(m+1) + m + h + 1` clocks after the edge that samples
  `start`. At the defaults that is 4681 clocks.

The LP-TPG runs on every clock of the session, but only the patterns
presented during shift clocks enter the chains.

The MISR is clocked exactly m times per pattern and starts each block from
zero. The block signature is therefore a linear superposition:

    S_B = sum over i = 1..n of H^(n-i) * s_i,   H = L^m

Here L is the MISR feedback matrix and s_i is the signature that pattern i
alone would leave in a cleared MISR. The off-chip diagnosis depends on this
linearity. For each candidate fault f, it precomputes the error
contribution of every pattern in the block. It then asks which subset of
those patterns, XORed together, explains the observed `S_B xor S_B^f`. That
is a small GF(2) linear system. It is solvable when f, active under some
condition on some of the patterns, could be the single cause. Faults are
then ranked by how many failing blocks they explain, with ties broken using
the blocks that passed. The space compactor is plain XOR, so it keeps the
signature linear. The diagnosis software itself is not part of this RTL.

## Fail memory (`fail_memory`) and response memory (`response_memory`)

- **Response memory.** Holds h words of n bits: the fault-free signature of
  each block. They are computed beforehand by fault-free simulation of the
  circuit with this generator and schedule, and written through
  `rm_we`/`rm_waddr`/`rm_wdata` before `start`. Reads are asynchronous.
- **Fail memory.** Up to g entries (`FAIL_DEPTH`), each
  `{block index (log2 h bits), signature (n bits)}`.
  - Entries are stored in order of occurrence.
  - Once it holds g entries, `fm_full` is set and further mismatches are
    dropped. The memory keeps the first g failing blocks, which is what the
    tie-break in the diagnosis expects: it uses the blocks that passed
    before the memory filled.
  - A dropped mismatch sets the sticky `fm_overflow` flag.
  - `start` clears it.
  - After `done`, the entries are read out through
    `fm_raddr -> fm_rindex/fm_rsig`, and `fm_count` gives the number of
    valid entries.

## Parameters of `bisd_top`

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | LP-TPG width. It is also the number of scan chains, one chain per generator output. |
| `CHAIN_LEN` | 8 | m, the scan cells per chain. 64 cells hold the largest of the target benchmark circuits, c880 with 60 inputs. |
| `MISR_WIDTH` | 8 | n. It is both the signature width and the number of patterns per block, and must not exceed `WIDTH`. |
| `NUM_BLOCKS` | 64 | h, the blocks per session (512 patterns). |
| `FAIL_DEPTH` | 16 | g, the fail memory entries. |
| `TPG_TAPS`, `MISR_TAPS` | `8'hB8` | Feedback taps: bit k set means stage k+1 feeds back. The default is x^8+x^6+x^5+x^4+1. Each must be primitive for its width. |
| `TPG_SEED` | `8'h01` | LP-TPG start state. Must be nonzero. |

When `WIDTH` is larger than `MISR_WIDTH`, `space_compactor` folds chain i
onto MISR input `i mod MISR_WIDTH`. At the defaults the two are equal, so
each MISR input sees one chain.

`cut_stimulus`/`cut_response` bit `c*CHAIN_LEN + j` is cell j of chain c.
Cell 0 is next to the scan input.

## What follows the source architecture and what is this design's own

**Taken from the architecture:**

- the STUMPS structure;
- the block order: generator, chains, compactor, MISR, comparison with a
  response memory of h x n bits, fail memory of g entries of n + log h bits;
- the MISR reset after every block;
- blocks of n patterns;
- the 8-bit LP-TPG: split LFSR, storage flip-flop, AND/OR/MUX injection
  cells, the four-step enable/select table, one pattern per clock.

**Own choices:**

- the polynomials and the seed;
- the source of the random bit R;
- the exact output timing of the LP-TPG steps;
- the number and length of the scan chains;
- h = 64 and g = 16;
- the controller's state sequence and timing;
- how the response memory is loaded;
- the fail memory's overflow flag and readout port;
- the XOR compactor structure;
- asynchronous active-low reset plus synchronous `init`/`clear` for
  restarting a session.

**Not included:**

- the circuit under test;
- the off-chip diagnosis procedure;
- any weighting of the pseudo-random patterns.

## Verification

Every block has a self-checking testbench in `tb/`. They compare against
reference models in `tb/bisd_ref_pkg.sv`, which are written from behaviour
rather than from the RTL's structure. For example, the LP-TPG model works on
whole LFSR states, not on adjacent-stage taps.

| testbench | checks |
|---|---|
| `tb_r_injection` | all 8 input combinations |
| `tb_lp_tpg_fsm` | step table, idle while `test_en=0`, restart |
| `tb_lp_lfsr` | every pattern of 300 LFSR states; state after each step group; period 255 |
| `tb_lp_tpg` | pattern stream; T(i) subsequence; restart; hold; transitions below a plain LFSR |
| `tb_scan_chains` | random shift/capture/hold against a model |
| `tb_space_compactor` | 16→8 and 13→4 parities |
| `tb_misr` | block signatures against the superposition formula above; clear |
| `tb_response_memory`, `tb_fail_memory` | contents; full, overflow, count, clear |
| `tb_bisd_controller` | clock counts per session, shift/capture/MISR clocks, one check per block, fail writes exactly on mismatch |
| `tb_bisd_top` | whole design at default sizes, three sessions (see below) |
| `tb_bisd_top_compact` | the same end-to-end test with 8 chains folded onto a 4-bit MISR, h=16, g=4 |
| `tb_bisd_diagnosis` | the off-chip diagnosis run on the downloaded fail memory (see below) |

The end-to-end tests close the loop with a small stand-in circuit
(`cut_model` in `tb/bisd_ref_pkg.sv`), which has injectable faults. The
benchmark netlists are not included. They compute the expected signatures
with a reference session model, load them, and run three sessions:

- fault free: nothing is logged;
- a rarely excited stuck-at-0: 5 of 64 blocks fail;
- a conditional stuck-at-1: 48 of 64 blocks fail, so the memory fills and
  overflows.

Each downloaded fail-memory entry is compared with the reference. The tests
also count that every generator step, a changed injected bit, capture,
checks, logging, full and overflow all occur. The full-size run takes well
under a second.

`tb_bisd_diagnosis` runs that off-chip step on the downloaded log. It
works at the default sizes with 26 candidate faults: every internal node of
the stand-in circuit, stuck-at-0 and stuck-at-1. For each candidate it
builds the per-pattern contributions `H^(n-i) e_i` and tests, for each
logged block, whether some subset of them XORs to the observed signature
difference. It then ranks the candidates by evidence, breaking ties with the
blocks that passed.

- A stuck-at-1 that is active only when cell 10 = 1: it explains all 16
  logged blocks and ranks alone at the top.
- A rarely excited stuck-at-0: it explains all 5 logged blocks and ranks
  alone at the top.

To simulate, for example the top:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_bisd_top rtl/bisd_pkg.sv tb/bisd_ref_pkg.sv tb/tb_bisd_top.sv
    ./obj_dir/Vtb_bisd_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Target circuits

The scheme is meant for ISCAS-85 combinational benchmarks:

| circuit | inputs | outputs |
|---|---|---|
| c432 | 36 | 7 |
| c499 | 41 | 32 |
| c880 | 60 | 26 |

With full scan, each needs at most 60 scan cells, and the default
configuration provides 64. Their netlists, and the weighted switching
activity measured on them, are outside this RTL. Only the generator-level
transition count above is reproduced.
