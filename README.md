# Carry-free best-match detection for block-matching motion estimation

A block-matching motion estimator scores each candidate block by a distance
D (sum of absolute or squared pixel differences) and keeps the motion vector
of the smallest D. The usual hardware accumulates D in carry-save form, which
is fast, but then needs a carry-propagate adder to turn the pair into a
binary number, and a carry-propagate subtracter to compare it with the best
distance so far. This RTL removes both. The best distance is kept in
carry-save form as well, and "is the new distance larger?" is answered by two
rows of full adders and a carry-out tree. The comparison takes no clock cycle
of its own. It can therefore be made on every pixel, and a candidate can be
dropped the moment its partial distance passes the best one (partial-distance
search).

The architecture follows the one published as *Low power distance
measurement unit for real-time hardware motion estimators*. Widths, the
candidate framing, the controller and the threshold datapath details are
this implementation's own. They are listed under "Departures and choices"
below.

## Datapath

```
 pix_cur, pix_ref,   +----------+   +--------+   +--------------+ S^t,C^t +------------+
 first/last, mv ---->|  input   |-->| metric |-->| accumulation |-------->| best-match |--GE--+
                     | register |   |  f()   |   | CSA + AccReg |         | detection  |      |
                     +----------+   +--------+   +--------------+         +------------+      |
                          ^ in_en                    ^ acc_en, acc_first     ^ update, clear  |
                          +--------------------- me_controller <----------------------------+
                                                    | best_mv, done, skip
```

| module | role |
|---|---|
| `motion_estimator` | top level; wires the blocks below |
| `input_register` | stage register for the pixel pair, framing bits and candidate vector |
| `metric_unit` | f = \|z − ẑ\| (SAD) or (z − ẑ)² (MSE), selected at run time |
| `accumulation_unit` | 3:2 carry-save adder plus the AccReg_S/AccReg_C registers |
| `best_match_detection_unit` | complemented best-distance registers, two CSA rows, carry-out detector |
| `carry_out_detector` | carry-generate tree: carry out of a + b without the sum |
| `csa_row` | a row of independent full adders (helper) |
| `me_controller` | decision rule, register enables, early abort, best vector |
| `me_pkg` | default sizes, `metric_e`, `mode_e`, `mv_t` |

There is one register stage. The pixel pair presented in cycle n sits in the
input register in cycle n+1. In that cycle the metric, the accumulation and
the comparison are all combinational, and the controller acts on the edge
that ends it. The comparison sees the adder's output S^t, C^t, which is the
running distance including the current pixel. It does not see the
accumulator registers.

## Comparing two carry-save distances

A distance is the pair {S, C} with D = S + 2C. Both vectors are ACC_W bits
wide. The best distance D' = S' + 2C' is stored inverted: the registers hold
~S' and ~C'. With W = ACC_W + 1:

```
  ~S' as a W-bit number      = 2^W - 1 - S'          = {1, ~S'}
  ~(2C') as a W-bit number   = 2^W - 1 - 2C'         = {~C', 1}

  X = S + 2C + {1,~S'} + {~C',1} + 1  =  2^(W+1) - 1 + (D - D')
  D > D'   <=>   X >= 2^(W+1) = 2^(ACC_W+2)
```

Five operands are summed without any carry chain:

* **Row 1** (ACC_W+1 columns) adds S, C shifted left by one, and {1, ~S'}.
  C has no bit in column 0 and S has none in column ACC_W. The "+1" goes
  into the free column-0 slot. The constant top bit of {1, ~S'} goes into
  column ACC_W, where it meets C's top bit in what is effectively a half
  adder.
* **Row 2** (ACC_W+2 columns) adds row 1's sum, row 1's shifted carry, and
  {~C', 1}.
* **Carry-out detector**: row 2 leaves a pair (s2, c2). X ≥ 2^(ACC_W+2)
  exactly when s2 + 2·c2 carries out of ACC_W+2 bits. Only this carry is
  computed. Bitwise generate/propagate signals are merged in a radix-2 tree,
  (G,P) = (Gh | Ph·Gl, Ph·Pl), over ⌈log2(ACC_W+2)⌉ levels. The sum bits are
  never formed.

GE is therefore "strictly greater". When GE is low on a candidate's last
pixel, the candidate becomes the best, so ties go to the newer candidate. The
bookkeeping is exact for any two pairs of ACC_W-bit vectors, so the
comparison depends on the value and not on how it is split between S and C.
The testbench checks this with equal values split differently.

Clearing both registers to zero means S' = C' = all ones. That is the
largest representable distance, so the first candidate of a macroblock
always wins.

### Threshold mode

`mode = MODE_THRESHOLD` compares the running distance with a fixed T. `thr`
is written inverted into the S register, and only that register, row 1 and
the detector are active. Both row-1 constants become 0, so row 1 forms
X1 = D + 2^ACC_W − 1 − T, and D > T ⇔ X1 ≥ 2^ACC_W. Row 2's operand is gated
to zero. The detector then gets row 1's lower ACC_W columns, offset so that
their carry into column ACC_W becomes the detector's carry out. The two top
columns of X1 are ORed in beside it. A candidate whose distance does not
exceed T is reported as accepted. The threshold survives `mb_start`.

## Early abort (partial-distance search)

Distances only grow pixel by pixel. Once GE rises before a candidate's last
pixel, that candidate cannot win. With `early_term_en` set, the controller
then does three things:

* it reports the candidate as decided (`done` with `done_aborted`) and pulses
  `skip`;
* it stops enabling the accumulator and input registers, so the metric and
  adder inputs stop toggling, until a pixel with `pix_first` arrives;
* it ignores any further pixels of that candidate. The source may keep
  sending them, or it may jump to the next candidate when it sees `skip`.

This needs the comparison to be ready in the same cycle as the partial sum,
which is what the carry-free detector gives. On a synthetic four-step-search
run (below) 76% of the candidates were aborted, and 47% of the candidate
pixel cycles were never spent.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `mb_start` | in | 1 | new macroblock: best distance ← largest, `best_valid` ← 0 (best-match mode) |
| `metric_sel` | in | 1 | `METRIC_SAD` / `METRIC_MSE` |
| `mode` | in | 1 | `MODE_BEST` / `MODE_THRESHOLD` |
| `early_term_en` | in | 1 | allow early abort |
| `thr_load`, `thr` | in | 1, ACC_W | store threshold T |
| `pix_valid`, `pix_first`, `pix_last` | in | 1 | pixel strobe and candidate framing |
| `pix_cur`, `pix_ref` | in | PIX_W | current-block pixel z, candidate pixel ẑ |
| `cand_mv` | in | `mv_t` | candidate vector, sent with every pixel |
| `done`, `done_accepted`, `done_aborted`, `done_mv` | out | | one-cycle decision report |
| `skip` | out | 1 | one-cycle pulse on an early abort |
| `best_mv`, `best_valid` | out | | best vector of the current macroblock |

* One pixel pair per clock. Gaps (`pix_valid` low) are allowed anywhere.
* A candidate is decided on the second rising edge after its last pixel, or
  after the pixel that pushed it over the reference, is presented. `done` is
  high in the cycle after that edge, and `best_mv` changes on the same edge.
* `skip` refers to the pixel presented two cycles earlier.
* Raise `mb_start` for one cycle when no candidate's last pixel is in the
  input register. An assertion in `me_controller` checks this. Change `mode`
  only together with `mb_start` or `thr_load`.
* Candidates may be any number of pixels long. The block size is set by the
  framing, not by a parameter.

## Parameters and sizes

| parameter | default | note |
|---|---|---|
| `PIX_W` | 8 | pixel width |
| `ACC_W` | 24 | width of S and C. Must exceed log2 of the largest distance: 16×16 MSE of 8-bit pixels is at most 16,646,400 < 2^24 |
| `MV_W_DEF` (package) | 8 | bits per vector component, fixed in `mv_t` |

If a distance reaches 2^ACC_W, bits are lost and comparisons become wrong.
Size ACC_W for the worst case of the chosen metric and block.

## Departures and choices

* **Widths.** The published architecture is parameterised and gives no pixel,
  block or accumulator width. The defaults above are chosen here.
* **Comparator bookkeeping.** The published equations leave the vector widths
  loose. Here the operands are one bit wider than the registers, and the
  complemented C register's top bit is also fed to row 2. This makes the
  test exact for all ACC_W-bit pairs.
* **Threshold path.** The reduced datapath and the '1'/'0' constants follow
  the published structure. How T is loaded (`thr_load`) and how the
  detector's operands are arranged in this mode are this implementation's
  own.
* **Controller.** The published architecture gives only the controller's
  role (GE in, update, register enables and motion vectors out). Its two
  states, the first/last framing, `mb_start`, the `done`/`skip` reporting and
  the choice to accept a candidate at or below T are this implementation's
  own.
* **Power saving.** The datapath is disabled through register enables, not
  clock gating.
* **Metric unit.** A plain magnitude and multiplier. MSE is the sum of
  squares, without the division by the pixel count, which does not change
  which vector wins.
* **Not included.** The search algorithm, the frame memories and address
  generation. The pixel source drives them, and the datapath works the same
  for any search order. The conventional detector (carry-look-ahead adder and
  subtracter) that this design replaces is not included either.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_carry_out_detector` | 26-bit random and boundary operands; 5-bit exhaustive (padded tree) |
| `tb_metric_unit` | every 8-bit pixel pair, both metrics |
| `tb_input_register` | enable and valid behaviour against a model |
| `tb_accumulation_unit` | S + 2C equals the running sum every cycle, across restarts and enable gaps |
| `tb_best_match_detection_unit` | GE against integer comparison, with equal / ±1 values in different carry-save splits, clears, and threshold mode |
| `tb_me_controller` | every output against a model of the decision, abort and drop rules |
| `tb_motion_estimator` | end to end at default sizes: ±4 full searches plus a tie over 7 macroblocks; SAD and MSE, best and threshold modes, abort on and off, sources that do and do not jump on `skip`, input gaps; decision, decision cycle and final vector all checked; each mechanism must occur |
| `tb_me_4ss_workload` | four-step search over 16 macroblocks of a moving synthetic pattern, centred step by step on the hardware's `best_mv`; checked against a software search |

The four-step-search run finds the true motion in all 16 macroblocks. With
early abort it needs 3,184 cycles per macroblock. Scaled to CIF
(396 macroblocks) at 30 frames/s, that is about 38 MHz. Without early abort
the worst case is 27 × 256 cycles per macroblock, about 82 MHz. Both are
below 150 MHz, the clock budget given for real-time CIF coding with this
search in the publication above.

Running a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/me_pkg.sv \
          tb/tb_motion_estimator.sv --top-module tb_motion_estimator
./obj_dir/Vtb_motion_estimator
```

Every testbench runs in well under a second.
