# Self-test for balanced pipelines with a displacement-compensating pattern generator

Classic BILBO self-test puts a test-pattern register in front of every
combinational block and a signature register behind it. In a pipelined data
path that means converting almost every register, which costs area and adds
delay to every stage. The idea used here is different. If every path from a
given input register to a given output crosses the same number of pipeline
registers (the structure is *balanced*), the whole pipeline can be tested as
one *kernel*. Only its primary-input registers generate patterns and only its
primary-output registers compress responses. The internal pipeline registers
stay ordinary registers.

Testing through a pipeline has one catch. Input register R1 may reach the
output through two register stages while R3 reaches it directly. The output
logic then sees R1's value from two clocks ago next to R3's current value. A
plain LFSR spread over R1..R3 therefore does not give the output logic every
combination. The pattern generator in this design fixes that by placing the
registers at the right *displacement* along a single shift string. That part
is the core of the design and gets most of the room below.

## Contents

| File | Module | Role |
|---|---|---|
| `rtl/bibs_pkg.sv` | package | modes, sequential-length tables, polynomial table, the generator layout procedure |
| `rtl/bibs_tpg.sv` | `bibs_tpg` | generic generator: any kernel up to 8 registers, 8 cones, 256 flip-flops, LFSR degree 2..64 |
| `rtl/tpg_reconfig.sv` | `tpg_reconfig` | two-configuration generator for a two-cone kernel (one cone per session) |
| `rtl/bilbo_reg.sv` | `bilbo_reg` | BILBO register used as a signature register (MISR) |
| `rtl/bist_ctrl.sv` | `bist_ctrl` | session sequencer: seed, run NPAT patterns, hold the signature |
| `rtl/dp_c5a2m.sv` etc. | `dp_c5a2m`, `dp_c3a2m`, `dp_c4a4m` | three pipelined 8-bit filter data paths (kernel logic only) |
| `rtl/bist_c5a2m.sv` etc. | `bist_c5a2m`, `bist_c3a2m`, `bist_c4a4m` | each data path with its generator, signature register(s) and controller |
| `rtl/bibs_top.sv` | `bibs_top` | the three self-testable data paths and two example generators side by side |

The three data paths are:

| Circuit | Function (8 bits, mod 256) | Depth | Generator | BILBO registers | Default patterns |
|---|---|---|---|---|---|
| c5a2m | o = (a+b)(c+d) + (e+f)(g+h) | 2 | 64 flip-flops, 64-stage LFSR | 9 | 7300 |
| c3a2m | o = ((a+b)c + d)e + f | 4 | 48 flip-flops, 48-stage LFSR | 7 | 9240 |
| c4a4m | o = a(f+g) + e(b+c), p = d(b+c) + h(f+g) | 2 | 64 flip-flops over 56 labels, 48-stage LFSR | 10 | 19120 |

The default pattern counts are the counts reported for 100% stuck-at fault
coverage of these circuits.

## The pattern generator

### Why displacement works

Take a type-1 LFSR, with external XOR feedback into stage 1 and the other
stages shifting 1 → 2 → 3 …. Stage *k* at time *t* holds what stage *k−1* held
at time *t−1*. So a register placed *d* stages further along the string shows
the same bit stream *d* clocks later. Suppose register R_j is *s* pipeline
stages further from the output than R_i. Moving R_j *s* stages *ahead* of
where it would otherwise sit cancels that delay. At the output, the
combination of all registers is then one contiguous window of the LFSR
sequence, taken at one instant. A window of at most *M* stages of a
maximal-length degree-*M* LFSR runs through all non-zero values in 2^M − 1
clocks. The kernel therefore gets every functional input combination except
all-zero. This design calls that *functionally exhaustive*.

### Labels

Every flip-flop in the string gets a label `L_k`:

* `L_1 .. L_M` are the LFSR stages. `L_1` takes the XOR feedback.
* A flip-flop labelled `L_k` (k > 1) is fed by the flip-flop labelled
  `L_(k−1)`.
* Two flip-flops may share a label. Both are then fed from the same source
  and always hold the same bit. This lets two registers overlap when one must
  sit *earlier* than its neighbour.
* Labels above `M` are plain shift stages. They extend the string without
  enlarging the LFSR.
* Flip-flops that belong to no register fill gaps. They separate two
  registers that must be further apart.

### The layout procedure (`bibs_pkg::tpg_plan_all`)

The procedure runs at elaboration as a constant function. Its inputs are the
register widths and, for each output cone *x* and register *i*, the
sequential length `s[x][i]`: the number of registers between R_i and cone
*x*'s output, or `NO_DEP` (−1) if the cone does not use R_i. It proceeds in
four steps:

1. R_1's cells get labels 1..w_1.
2. For each later register R_i, and each earlier register R_j that shares a
   cone with it, the required offset is the largest `s[x][j] − s[x][i]` over
   the shared cones. That offset is added to R_j's last label and compared
   with R_(i−1)'s last label. The largest such difference, δ, decides where
   R_i goes:
   * δ > 0: insert δ separating flip-flops before R_i.
   * δ < 0: R_i's first |δ| cells share labels with the end of R_(i−1).
   * If R_i shares no cone with any earlier register, δ = 0.
3. The LFSR degree M is the largest *logical span* of any cone. This is the
   distance in labels from the cone's first register to the end of its last
   register, corrected by the difference in their sequential lengths.
4. If M is larger than the largest label used, shift stages are appended up
   to label M. The string length therefore is the largest label, or M if
   that is larger.

A register may have to move further back than the register before it is
wide. Its first labels then fall below 1, and the LFSR would start before
R_1. The procedure then renumbers all labels so that the smallest is 1. For
example, take two 4-bit registers where R2 is five stages further from the
output. R2 gets L1..L4, R1 gets L2..L5, and three labels are shared. A
kernel the procedure cannot lay out (no cone, M outside 2..64, or more than
256 flip-flops) sets an error flag, and elaboration stops with an error.

`bibs_tpg` builds one flip-flop per string position:

* A flip-flop labelled 1 takes the feedback.
* Every other flip-flop takes the output of the last flip-flop carrying the
  previous label.

The feedback taps are `L_M ⊕ L_(M−e)` for every `x^e` term of the
polynomial. With this convention, x^12+x^7+x^4+x^3+1 taps L5, L8, L9 and L12.

### Worked layouts (checked by `tb/tb_bibs_tpg.sv`; the c4a4m row by `tb/tb_bist_c4a4m.sv`)

| Kernel (register widths; sequential lengths per cone) | Flip-flops | LFSR M |
|---|---|---|
| 3×4 bits; lengths 2,1,0 | 14 (one separator before R2 and one before R3) | 12 |
| 3×4 bits; lengths 1,2,0 | 14 (R2 overlaps R1 by one label) | 12 |
| 2×4 bits; lengths 0,5 | 11 (R2 ahead of R1, three shared labels) | 8 |
| 2×4 bits, 2 cones: (2,0) and (1,0) | 10 | 9 |
| 2×4 bits, 2 cones: (2,0) and (0,1) | 11 | 11 |
| 3×4 bits, 3 cones: (2,0,·), (0,·,1), (·,1,0) | 16 | 16 |
| the same kernel, registers taken in another order: (2,·,0), (0,1,·), (·,0,1) | 12, with two shared labels | 8 |
| c4a4m: cones (a,b,c,e,f,g) and (b,c,d,f,g,h), all length 2 | 64 over 56 labels (d and e share) | 48 |

For kernels with several cones, each cone only needs exhaustive patterns on
its *own* inputs. M can then be smaller than the total input width. In the
c4a4m example, 64 input bits are tested by a degree-48 LFSR. This is the
*functionally pseudo-exhaustive* case.

### Parameters of `bibs_tpg`

* `NREG`: the number of registers.
* `REG_W`: the register widths. Register 1 sits at the LSB end of `d_in`/`q`,
  and each register's first cell is the MSB of its field.
* `NCONE`: the number of cones.
* `SEQ`: the sequential-length table. Build it with the package's
  `tab1/tab2/tab3` and `row2/row3/row8` helpers.
* `POLY`: the polynomial. `0` picks the built-in primitive polynomial of
  degree M.

The built-in table covers degrees 2–64. All of its polynomials were checked
to be primitive.

### The two-configuration generator (`tpg_reconfig`)

A two-cone kernel may need one large LFSR (11 stages) to cover both cones at
once. Testing each cone separately with an 8-stage LFSR takes about 2×2^8
clocks instead of 2^11. `tpg_reconfig` has two control multiplexers, selected
by `cone_sel`. They re-route the feed of R2 (two stages behind R1, or sharing
R1's last label) and the last two feedback taps. Each setting gives one cone
all 255 non-zero patterns.

## Modes and the self-test session

The generator and the signature registers share one 2-bit mode
(`bibs_pkg::bilbo_mode_e`):

| Mode | Code | Generator | Signature register |
|---|---|---|---|
| scan | 00 | one serial chain | serial chain |
| reset | 01 | load the seed (L1 = 1, rest 0) | clear to 0 |
| test | 10 | produce one pattern per clock | MISR: `{fb, q[W-1:1]} ^ d` |
| normal | 11 | register cells load `d_in`, extra flip-flops hold | load `d` |

`bist_ctrl` runs a session as follows:

1. Hold `bist_start` high.
2. Seed phase: one clock, in which the generator is seeded and the signature
   register is cleared.
3. Run phase: NPAT + FLUSH clocks in test mode. The signature register stays
   cleared for the first FLUSH = pipeline-depth clocks, until real patterns
   reach the output.
4. `bist_done` rises. The outputs (`o`, and `p` for c4a4m) hold the signature.
5. Drop `bist_start` to return to normal operation.

A session takes 1 + NPAT + depth clocks. With NPAT = 2^M − 1, this is the
exhaustive test time 2^M − 1 + depth, plus one seed clock.

Outside a session, `scan_en` turns the generator and the signature
register(s) into one chain: `scan_in → generator → signature register(s) →
scan_out`.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. With Verilator 5:

```
verilator --binary --assert --top-module tb_bibs_top -Irtl -Itb \
    rtl/bibs_pkg.sv tb/tb_model_pkg.sv rtl/*.sv tb/tb_bibs_top.sv -o tb
./obj_dir/tb
```

`tb_bibs_top` runs the whole design at its default sizes, which takes well
under a second. It covers:

* normal operation of all three data paths;
* all three full-length sessions (7300, 9240 and 19120 patterns), with each
  signature compared to an independent bit-level model in
  `tb/tb_model_pkg.sv`;
* the return to normal operation after the sessions;
* scan of every chain;
* the example generator over its full 4095-pattern cycle;
* the two-configuration generator in both settings.

The other testbenches cover one module each:

| Testbench | What it checks |
|---|---|
| `tb_bibs_tpg` | seven kernel layouts: labels, M, period, patterns per cone |
| `tb_tpg_reconfig` | the two-configuration generator |
| `tb_bilbo_reg` | the BILBO register |
| `tb_bist_ctrl` | the session sequencer |
| `tb_dp_*` | the data paths against arithmetic models |
| `tb_bist_*` | each self-testable data path |

## Departures and choices

* **Random vs LFSR patterns.** The published coverage numbers for the three
  circuits were obtained with random patterns. The LFSR patterns used here
  are different, so the default counts (7300 / 9240 / 19120) are taken over
  as-is, and the fault coverage they give has not been measured.
* **c4a4m layout.** The layout procedure lets registers d and e share labels,
  because they feed different cones. The result is a 48-stage LFSR plus 8
  shift stages for h.
* **Arithmetic.** Adder carries and the upper half of each product are
  dropped, so all data stays 8 bits wide.
* **Pipeline structure.** The placement of the pipeline registers in each
  data path was read from drawings:
  * c5a2m and c4a4m: adders, then multipliers.
  * c3a2m: one stage per operation, with delay registers on c, d, e and f.
* **Own choices.** The following are this design's own and not from the
  source:
  * the mode encoding;
  * the seed;
  * the asynchronous resets;
  * the hold behaviour of the extra flip-flops;
  * the session controller (it is only named there);
  * the scan order;
  * the level-sensitive start.
* **Polynomials.** Degrees 8, 9, 11, 12 and 16 match the drawn examples. The
  other degrees come from a standard table of maximal-length LFSRs.

## Limits

* The layout procedure supports up to 8 registers, 8 cones, 256
  flip-flops and LFSR degrees 2..64.
* The all-zero pattern is never applied. A complete (de Bruijn) LFSR would
  add it, but one is not provided.
* The example kernels' combinational blocks are not specified, so only their
  generators are built. The same holds for a concurrent BILBO for
  self-loops, the test scheduler, and the CAD flow.
* Fully exhaustive tests of the three data paths (2^64 − 1 or 2^48 − 1
  patterns) are supported structurally. They are not practical to run.
* The signature registers are 8 bits wide, so aliasing is about 1 in 256.
