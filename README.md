# Soft-decision Viterbi decoder for the (64,40,8) Reed-Muller subcode

This design decodes 64-symbol blocks of a (64,40,8) subcode of the third-order
Reed-Muller code. It is a maximum-likelihood decoder: it finds the codeword
whose bits best match 3-bit soft samples from a 2-PSK demodulator. The target
is 600 Mbit/s of information, which is 960 Msymbol/s at rate 40/64. The logic
runs at 60 MHz.

Two ideas make that rate reachable:

* **Parallel isomorphic subtrellises.** The 8-section trellis of the code
  splits into 32 subtrellises. These meet only at the origin and at the end,
  and all have the same shape. Each one can be decoded by its own identical
  chip. The best of the 32 results is the decoded codeword.
* **Decoding from both ends.** Within a subtrellis, the left half (sections
  1-4) is extended from the start of the block and the right half (sections
  8-5) from its end. The two halves take turns on a shared datapath, in the
  order 1, 8, 2, 7, 3, 6, 4, 5. Both halves end on the same 8 center states.
  The best center state gives the best path.

## Subtrellis shape

| boundary after section | 1  | 2  | 3  | 4 (center) | 5  | 6  | 7  | 8 |
|------------------------|----|----|----|------------|----|----|----|---|
| states                 | 64 | 64 | 64 | 8          | 64 | 64 | 64 | 1 |
| radix                  | 8  | 8  | 8  | 64         | 8  | 8  | 8  | 64|

A state of a 64-state column is written `{g,h}`: `g` is one of 8 groups and
`h` is the state inside that group.

* **Section 1:** each state `{g,h}` is reached from the origin by 8 parallel
  branches.
* **Sections 2 and 3:** state `{g,h}` is reached from the 8 states `{g,i}` of
  its own group.
* **Section 4:** each center state `c` is reached from all 64 states.
* **Sections 5-8:** the mirror image of sections 1-4.

In every section the hardware uses 64 8-way add-compare-select (ACS) units.
Unit `u` with inputs `i = 0..7` does the following:

| sections   | unit `u`        | input `i`                     |
|------------|-----------------|-------------------------------|
| 1, 8       | `{g,h}`         | parallel branch `i`           |
| 2, 3, 6, 7 | `{g,h}`         | source state `{g,i}`          |
| 4, 5       | `{c,g}`         | source `{g,i}`, into center `c` |

In sections 4 and 5, 8 comparators then pick the best group `g` for each
center state. Together, the ACS units and the comparators make the radix-64
selection.

## Chip pipeline (`rm_subtrellis_chip`)

A block enters as 8 sections of 8 symbols, one section per clock, in the
order 1,8,2,7,3,6,4,5. `in_first` marks section 1.

| clock (section 1 enters at 0) | what happens                                         |
|-------------------------------|------------------------------------------------------|
| 0..7                          | sections enter; `rm_chip_ctrl` tags each with its number |
| 3                             | `rm_bmu`: metrics of all 256 8-bit labels for section 1 (3 stages) |
| 6..13                         | `rm_acsu`: results of sections 1,8,2,7,3,6,4,5 (3 stages: add, compare-select, comparators/output) |
| 14                            | `rm_decoder` copies all decisions to its resolve bank |
| 15, 16, 17                    | add the two halves and pick the center; trace back; build the codeword |
| 17                            | result valid for one clock                           |

The ACSU has a feedback loop that is worth understanding before changing
anything. An ACS result is registered in stage 2. Two clocks later it is read
back by stage 1, for the next section of the same half. The other half uses
the clock in between. So one set of path-metric registers serves both halves,
and the 3-stage pipeline never stalls. The catch: the 8 sections of a block
must come on 8 consecutive clocks. An assertion in `rm_acsu` checks this, and
`rm_chip_ctrl` raises `seq_err` if the rule is broken. Gaps between blocks
are fine. Blocks may follow each other back to back, at one block per 8
clocks.

The decoder double-buffers the decisions. While one block is being resolved,
the next block's sections are collected.

### Metrics

* **Symbols** are offset binary: 0 means a confident 0, 7 a confident 1.
* **Bit score:** a label bit of 1 scores `q`, a 0 scores `7-q`. Larger is
  better.
* **Ranges:** a branch metric is 0..56. A half path is at most 224 and a full
  path at most 448. The 9-bit path metrics therefore need no normalisation,
  since every block starts again from zero.
* **Ties** go to the lower index everywhere.

### How the BMU table is indexed

The BMU does not simply return the metric of label `L`. Table entry `L` holds
the metric of the code bits `rotl(L xor coset_base(sub), sec-1)`. To do this,
the BMU rotates the symbols by `sec-1` and complements them where the coset
word has a 1. This has two effects:

* The ACSU picks every branch metric by a fixed label (`base_label(u,i)`), so
  its branch-metric selection is plain wiring.
* All 32 chips are identical and differ only in the strapped subtrellis
  index `in_sub`.

## System (`rm_decoder_system`)

```
in_sym (16 symbols/clk) -> rm_block_distributor -> N_DEC x rm_viterbi_decoder -> rm_output_merge -> out
                                                     (K_SUB x rm_subtrellis_chip
                                                      + rm_subtrellis_select)
```

* **Input.** `rm_block_distributor` takes two sections (16 symbols) per
  clock in natural order, so a block takes 4 beats. It hands whole blocks to
  the decoders in turn, using a ping-pong buffer per decoder. Each decoder
  gets its block in the decoding order, one section per clock.
* **Rate.** At full input rate `in_ready` stays high and each decoder is busy
  all the time.
* **Selection.** Each `rm_viterbi_decoder` drives all K_SUB chips with the
  same stream and keeps the result with the largest metric.
* **Output.** `rm_output_merge` returns the results in input order.
* **Result.** Each result has the 64-bit codeword (section `j`, symbol `k` at
  bit `8(j-1)+k`), its metric, the winning subtrellis, the path
  (`rm_pkg::path_t`, 33 bits) and the block tag.
* **Latency.** From section 1 entering a decoder to its result: 18 clocks.

Defaults: `N_DEC = 2`, `K_SUB = 32`. That gives 2 x 480 Msymbol/s =
960 Msymbol/s at 60 MHz, which is 600 Mbit/s of information.

## What is taken as given, and what is this design's own

**Follows the published architecture:**

* the subtrellis shape and the 32-way split
* the decoding order and the combination at the 8 center states
* the BMU → ACSU → decoder chip plan with 3-stage BMU and ACSU
* 8-way ACS units plus comparators for the radix-64 section
* 60 MHz input of 8 3-bit symbols per clock
* two interleaved decoders
* off-chip selection of the best subtrellis result

**This design's own choices:**

* **Branch labels.** They are not published, so `rm_pkg::branch_label` and
  `rm_pkg::coset_word` are an invented labelling. It is built from the linear
  and quadratic rows of RM(2,3), so that branches entering the same state
  carry distinct labels. It gives a valid trellis with the right shape. It is
  *not* the (64,40,8) code. To decode the real code, replace these two
  functions (and `base_label`/`coset_base`, their unrotated forms). The
  hardware structure does not change as long as labels are rotated per
  section, or the BMU rotation is removed.
* **Path count.** The shape as drawn has 2^33 paths per subtrellis, so
  2^38 over all 32 subtrellises, two bits short of 2^40. Any parallel
  branches hidden in the published figure are not modelled.
* **Information bits.** The 40 information bits are not extracted, because
  the encoder mapping is unknown. The output is the codeword and the path.
* **Clocking.** Clock-phase generation is not modelled. The RTL uses a
  single clock edge and a synchronous active-low reset.
* **Pipeline details.** The internal split of the BMU stages, the decoder's
  3-stage resolve pipeline, the handshakes, the block tags, and the
  ping-pong/reordering buffers in the distributor.
* **Front end.** The receiver front end (LNA, demodulator, sampler, ADC) is
  outside this RTL.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M`, and the run passes when `M` is 0. The
shared reference model, `tb/rm_ref_pkg.sv`, walks the trellis with plain
loops. Example:

```
verilator --binary --timing --assert -Wno-fatal rtl/rm_pkg.sv tb/rm_ref_pkg.sv rtl/rm_*.sv \
          tb/tb_rm_subtrellis_chip.sv --top-module tb_rm_subtrellis_chip
./obj_dir/Vtb_rm_subtrellis_chip
```

| testbench                   | what it checks                                                     |
|-----------------------------|--------------------------------------------------------------------|
| `tb_rm_acs8`, `tb_rm_cmp8`  | selection results, tie rule, payload                               |
| `tb_rm_bmu`                 | all 256 metrics against symbol-by-symbol sums; 3-clock latency     |
| `tb_rm_chip_ctrl`           | section tags; detection of each sequence error                     |
| `tb_rm_acsu`                | every path metric and decision of every section; 3-clock latency   |
| `tb_rm_decoder`             | best metric, path ↔ codeword consistency, clean blocks exact, 4-clock latency |
| `tb_rm_subtrellis_chip`     | whole chip: 48 blocks, back to back and with gaps; 17-clock latency; 8-clock spacing |
| `tb_rm_subtrellis_select`, `tb_rm_output_merge`, `tb_rm_block_distributor` | the system glue |
| `tb_rm_viterbi_decoder`     | one decoder, K_SUB = 4; best over all subtrellises; 18-clock latency |
| `tb_rm_decoder_system`      | whole system, N_DEC = 2, K_SUB = 2; in-order output; both decoders used; full-rate and idle input; more than one subtrellis winning |

The two largest testbenches run at reduced sizes because the build slows down
with many chips. With K_SUB = 32, one decoder took about 14 minutes to build
and then passed its test. The full 64-chip system has not been simulated.
Its largest simulated size is N_DEC = 2 with K_SUB = 2.
