# Convolutional Tsetlin Machine accelerator (4x4 images, on-chip training)

This is synthesizable SystemVerilog for a small accelerator that both **classifies
and learns** 2-D Boolean patterns with a *Convolutional Tsetlin Machine* (CTM). It
works on single-channel 4x4 Boolean images, slides a 2x2 window over them, and
decides between two classes. Its reference task is the *2-D noisy XOR* problem. In
that task a 2x2 pattern sits in columns 1..2 of the two upper rows. Diagonals mean
class 1, and horizontal or vertical lines mean class 0. All other pixels are
random, and 40 % of the training labels are flipped.

Learning is done entirely in logic. The datapath has no multipliers and no
floating point. The model is held in 1280 small saturating counters (10 240 flip-flops), and training
is driven by 80 LFSRs.

| figure | value |
|---|---|
| inference | 9 clocks per image, streaming (4.4 M images/s at 40 MHz) |
| training | 55 clocks per sample (0.73 M samples/s at 40 MHz) |
| model | 2 classes x 40 clauses x 16 literals, 8-bit Tsetlin automata |
| hyperparameters | T = 40, s = 3.9 (fixed in hardware) |
| random numbers | 80 LFSRs; length selectable at run time: 6, 7, 8, 9, 10, 12, 14, 16, 18 or 24 bits |

## 1. What the machine computes

**Patches and literals.** The 2x2 window visits B = 9 positions (x, y in 0..2).
Each position gives a *patch* of 8 Boolean features:

* the 4 window pixels;
* 2 bits that encode x;
* 2 bits that encode y.

Position 0 is coded `10`, position 1 is `01` and position 2 is `00`. The 8
features and their negations form the 16 *literals* `[f0, ~f0, f1, ~f1, ...]`.

**Clauses.** Each class has its own Tsetlin machine (TM0, TM1) with m = 40
clauses. A clause is the AND of the literals that its team of 16 automata
*includes*. An automaton is an 8-bit two's-complement counter, and it includes
its literal when its state is >= 0. Within one image, a clause is true if it
matched on **at least one** of the 9 patches. That OR over the patches is what
makes the machine convolutional.

**Class sum and decision.** Odd clauses vote +1 and even clauses vote -1:
`v = sum(c_odd) - sum(c_even)`, a value in -20..20. The predicted class is the
argmax of v(0) and v(1). On a tie, class 0 wins.

**Learning.** For each training sample:

* the TM of the label's class is trained as the *Target Class* with y = 1;
* the other TM is trained as the *Negative Target Class* with y = 0;
* in each TM, clause j is updated with probability `(T - clamp(v))/2T` (target)
  or `(T + clamp(v))/2T` (negative).

The feedback that an updated clause gets depends on its polarity f = j odd.

* **Type I** goes to clauses with f == TC, where TC = 1 for the target and 0 for
  the negative class. Let c be the clause output, l the literal value, a the
  automaton's action, g = [rnd < (s-1)/s] and h = [rnd < 1/s]. Then:
  * **Ia:** `+1` if `c & g & l`; `-1` if `c & h & ~a & ~l`.
  * **Ib:** `-1` if `~c & h`.
* **Type II** goes to the other clauses: `+1` if `c & ~a & ~l`. This pushes in
  literals that would have made a false match false.

In a CTM, the literals that a clause learns from come from **one patch, chosen at
random among the patches on which the clause was true**. If there is no such
patch, c = 0 and only Type Ib applies.

While learning, a clause with nothing included outputs 1. During inference it
outputs 0. All automata start in state -1, so every clause starts empty.

## 2. Block structure

```
            host (configuration, start, dataset writes, results)
              |
   +----------v-----------+      +------------------+
   | main_fsm             |----->| sample_ram x2    |  training set 2500, test set 8192
   +----------------------+      +--------+---------+
      | load / phase / clause #           | {label, image}
      v                                   v
   +-------------------------------------------+
   | patch_gen   (row registers, fixed window) |--- feat[7:0], first/last, label
   +-------------------------------------------+
      |                           |
  +---v-------------+      +------v----------+
  | tm_class  TM0   |      | tm_class  TM1   |  40 x ta_team, clause logic,
  |  clause OR reg  |      |  clause OR reg  |  adder_tree (6 stages)
  +---+----------+--+      +--+-----------+--+
      | sums     ^ feedback   |           ^
      v          |            v           |
  class_decision |        +---------------+---------+
      |          +--------| train_module  TC=1      |  40 x reservoir, Algorithm 4
  evaluate                | train_module  TC=0      |
  (error count)           +-----------^-------------+
                                      | 2 x 40 random fractions
                               lfsr_bank (80 x lfsr)
```

| file | role |
|---|---|
| `rtl/ctm_pkg.sv` | sizes, hyperparameters, types, literal and position-code helpers |
| `rtl/ctm_top.sv` | the whole accelerator; plain-signal host ports |
| `rtl/main_fsm.sv` | session sequencing, the 9- and 55-clock sample slots |
| `rtl/sample_ram.sv` | dataset memory, 17-bit words `{label, image}` |
| `rtl/patch_gen.sv` | window sliding by register shifts, position codes |
| `rtl/tm_class.sv` | one class TM: TA teams, clauses, OR register, class sum |
| `rtl/ta_team.sv` | 16 saturating 8-bit Tsetlin automata |
| `rtl/adder_tree.sv` | pipelined adder tree (generic, 6 stages for 40 inputs) |
| `rtl/class_decision.sv` | argmax |
| `rtl/evaluate.sv` | error and sample counters |
| `rtl/train_module.sv` | one training module: reservoir samplers and feedback logic |
| `rtl/reservoir.sv` | reservoir sampler of one clause |
| `rtl/lfsr_bank.sv`, `rtl/lfsr.sv` | LFSR bank with run-time length, one LFSR |

## 3. Window sliding without moving the window

`patch_gen` loads the whole image in one clock into four 4-bit row registers.
The 2x2 window is wired permanently to columns 0..1 of rows 0 and 1. The data
moves past the window instead of the window moving over the data:

* Between the three patches of a row pair, rows 0 and 1 rotate one place towards
  the window.
* After the third patch, row 1 is rotated back by two places and moved up into
  row 0. Rows 2 and 3 move up by one.

The patch counter (px, py) supplies the position codes. One patch comes out per
clock. A new image can be loaded in the cycle of the last patch, so images
follow each other without a gap. This is why inference takes exactly 9 clocks
per image.

## 4. Timing

### Inference (streaming)

```
cycle         0 .. 8        9           10 .. 15
patch_gen     patches 0..8  (next image's patches start here)
clause reg    OR-accumulate holds final OR
adder tree                  stage 1 ... stage 6 -> sum valid in cycle 15
evaluate                                         counts at the end of cycle 15
```

The clause output register is *loaded*, not ORed, at patch 0. This lets it
restart for the next image while the adder tree reads the previous result. Each
image's result appears 15 clocks after its first patch, and a new result follows
every 9 clocks.

### Training (55-clock slot per sample)

| phase | activity |
|---|---|
| 0..8 | patches; clause evaluation (empty clause = 1); reservoir sampling in all 80 clauses |
| 9..14 | the adder tree computes v for both TMs |
| 15..54 | clause j = phase - 15 is updated in both TMs at once; all 16 automata of the clause in one clock |
| 54 | the next sample is loaded into `patch_gen` |

The automata of clause 39 are written at the end of phase 54. Patch 0 of the next
sample is evaluated in the following clock, with the updated model. Both TMs use
the same patch stream, so the target and negative training run in parallel.

## 5. Reservoir sampling of a patch per clause

Each clause of each training module has a `reservoir` with two registers: a
count N (0..9) and an 8-bit patch register. Both restart at patch 0. On every
patch where the clause is true, N increments and the patch replaces the stored
one with probability 1/N (Vitter's algorithm R with a reservoir of one). At the
end, each matching patch has been kept with probability 1/N_final.

The draw `r = floor(rnd * N) + 1 <= 1` uses the 24-bit random fraction `rnd` of
the clause's own LFSR. It is evaluated as `rnd < ceil(2^24 / N)` from a 9-entry
threshold table. After the patches, `c_j = (N != 0)` is the clause output used
for feedback.

## 6. Random numbers

`lfsr_bank` holds 80 Fibonacci LFSRs. That number is `max(2m, 2(1 + 2*NF)) = 80`.

* LFSRs 0..39 belong to the target module and 40..79 to the negative module.
* During the patch phase, LFSR j serves the reservoir of clause j.
* During the update phase, LFSR 0 gives the update decision u for the current
  clause, and LFSR k+1 gives the random number of literal k (used for both g_k
  and h_k).

All LFSRs share one run-time length. The state is a 24-bit register, of which
the low LEN bits are used. The output is the state **left-aligned** in 24 bits,
i.e. a fraction with LEN significant bits. The probability comparisons are
therefore the same for every length:

* `rnd*80 < (40 -/+ v) * 2^24` for u;
* `rnd*39 < 29 * 2^24` for g;
* `rnd*39 < 10 * 2^24` for h.

All of these are multiplications by constants, i.e. shifts and adds.

Seeds come from a fixed hash of the LFSR index. They are loaded one clock after
reset and on `lfsr_seed_load`. With 6-bit LFSRs there are only 63 distinct
states, so some seeds repeat.

The bank advances only in the clocks that use a random number, or while the
host holds `lfsr_run`. Those are the 9 patch clocks and the 40 clause-update
clocks of each training sample, so there are 49 steps per sample. The host
should run the LFSRs for a random number of clocks before training, so that
every session does not start from the same state.

Why not step every clock? The training slot is 55 clocks. Both 55 and 2^L-1
are divisible by 5 for L = 8, 12, 16 and 24. If the bank stepped in all 55
clocks, each clause would draw its random numbers from only (2^L-1)/5 start
points, repeating every 51 samples at 8 bits. Short LFSRs then learned much
worse (section 8). With 49 steps, the repeat period is 2^L-1 samples when 7
does not divide 2^L-1, and (2^L-1)/7 when it does (L = 6, 9, 12, 18, 24).
Published accuracy figures for this architecture dip at those same lengths,
which suggests the same stepping.

## 7. Using the top level

All host signals are plain ports of `ctm_top`. A session runs as follows:

1. Write the datasets: `ram_we`, `ram_sel` (0 = training RAM, 1 = test RAM),
   `ram_waddr`, `ram_wdata = {label, image}`. Image bit `y*4 + x` is pixel (x, y),
   where row 0 is the top row.
2. Pulse `ta_init`, so that all automata are at -1.
3. Select `lfsr_len`, pulse `lfsr_seed_load`, then hold `lfsr_run` for some clocks.
4. Set `mode_train`, `dataset_sel`, `num_samples` and `num_epochs`, and pulse
   `start`. `busy` stays high until `done` pulses.
5. After an inference session, `err_count` and `eval_count` hold the result.
   Every prediction also appears on `pred_valid`/`pred_class`.

A single sample can be trained or classified with `num_samples = 1`. The
configuration inputs must stay stable while `busy` is high.

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_lfsr_bank` | period 2^L-1 for L = 6..16, a bit-exact 16-bit sequence, distinct seeds, hold |
| `tb_patch_gen` | every feature of 1800 patches against a direct reference, back-to-back loads, gaps |
| `tb_ta_team` | 20 000 random clocks against a counter model, both saturation ends |
| `tb_adder_tree` | sums, valid and tag exactly 6 clocks later |
| `tb_tm_class` | every clause on every patch, the OR register, the empty-clause rule, the sum 7 clocks after the last patch |
| `tb_reservoir` | counts, kept patch valid, uniform 1/4 selection over 8000 images |
| `tb_train_module` | u, g, h and the Ia/Ib/II feedback of both modules against a model of the update rules |
| `tb_class_decision` | all sum pairs in -20..20 |
| `tb_evaluate`, `tb_sample_ram` | against reference models |
| `tb_main_fsm` | load spacing 9/55, addresses, epoch wrap, clause-update phases, done timing |
| `tb_ctm_top` | end to end at full size (see below) |
| `tb_lfsr_lengths` | training with 8, 10, 16 and 24-bit LFSRs, 20 epochs each (see below) |

`tb_ctm_top` uses the default parameters. It generates a noisy-XOR dataset with
2500 training and 8192 test samples, balanced classes and 40 % flipped training
labels. It then checks:

* the error count of the untrained model;
* the 9-clock spacing of results;
* the 55-clock training slot, over 40 epochs with 16-bit LFSRs;
* every test prediction against an independent software evaluation of the
  learned clauses.

It also requires test accuracy >= 95 %. One run gave 96.5 % after 40 epochs.
The intended configuration trains for 250 epochs and is expected to reach about
99.9 %; that run was not simulated. The testbench also counts each mechanism and
fails if any of them never occurred: Ia/Ib/II feedback, skipped updates,
reservoir replacement, LFSR warm-up and predictions of both classes.

`tb_lfsr_lengths` trains the same task from scratch once for each of four LFSR
lengths, for 20 epochs each, and reports the test accuracy. It requires at least
90 % for 10, 16 and 24 bits. One run gave:

| LFSR length | 8 | 10 | 16 | 24 |
|---|---|---|---|---|
| test accuracy after 20 epochs, stepping only when used | 79.3 % | 97.4 % | 97.5 % | 98.6 % |
| same, if the bank stepped every clock | 58.3 % | 58.3 % | 93.4 % | 99.7 % |

8-bit LFSRs still learn more slowly. Runs of 250 epochs, in which 8-bit LFSRs
are expected to reach about 99.7 % on average, were not simulated, and neither
were the 100 runs per length needed for averages. `N_EPOCHS` can be raised to
250; one epoch takes about 0.75 s of simulation, so that is roughly 3 minutes
per length.

To simulate, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ctm_top \
    rtl/ctm_pkg.sv rtl/lfsr.sv rtl/lfsr_bank.sv rtl/patch_gen.sv rtl/ta_team.sv \
    rtl/adder_tree.sv rtl/tm_class.sv rtl/reservoir.sv rtl/train_module.sv \
    rtl/class_decision.sv rtl/evaluate.sv rtl/sample_ram.sv rtl/main_fsm.sv \
    rtl/ctm_top.sv tb/tb_ctm_top.sv
./obj_dir/Vtb_ctm_top
```

This takes about 1.5 minutes to build and 30 s to run. For a block testbench,
replace the top and the testbench file. Keep `ctm_pkg.sv` first.

## 9. Design choices beyond the published description

These points are not fixed by the published architecture and were chosen here:

* **Host interface:** plain configuration and status ports with a start/busy/done
  handshake, instead of a processor bus. The dataset RAMs get a host write port
  instead of being initialised from the FPGA bitstream.
* **Feature order** inside the 8-bit patch vector, and the literal order (x, ~x
  interleaved).
* **Empty clauses** output 0 during inference. **Ties** in the class decision go
  to class 0.
* **Automata saturate** at -128 and +127.
* **Random numbers:**
  * the 24-bit left-aligned fraction format;
  * the standard maximal-length tap sets;
  * the seed hash;
  * which LFSR serves which decision;
  * one LFSR step per clock, and only in clocks that use a random number
    (section 6). Consecutive values of one LFSR are therefore correlated, and
    LFSRs whose start points are close give related numbers. A separate
    polynomial per LFSR would remove the second effect.
* **Update rules:** two lines of the published update algorithm carry a stray
  `= 0` on the Type II and Type Ia exclude conditions. The design follows the
  feedback tables, which are unambiguous.
* **LFSR lengths:** a 9-bit option is included, because the measured results
  list one.
* **Throughput options** that were discussed but not chosen are not built: several
  convolution windows, or updating two clauses per clock.

## 10. Changing the design

Sizes live in `ctm_pkg`, derived from the image and window geometry: B, NF,
literals, adder stages and the 55-clock slot. `adder_tree`, `reservoir`,
`class_decision` and the per-module clause count are generic. Some parts are
written for 4x4/2x2 and need rework for other geometries:

* `patch_gen` uses 2-bit position counters and a fixed rotate-back of two places;
* `pos_code` in `ctm_pkg` implements the 3-position code table;
* `train_module` needs M >= 17, because the literal random numbers reuse LFSRs
  1..16.

Only two classes are wired in `ctm_top` (target = label, negative = the other
class). More classes need a random choice of the negative class.
