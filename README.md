# A clockless NULL Convention Logic divider (8-bit ÷ 4-bit)

This is an unsigned iterative divider with no clock. It divides an 8-bit
dividend Z by a 4-bit divisor D and returns an 8-bit quotient Q and a 4-bit
remainder R. It is written in NULL Convention Logic (NCL), a delay-insensitive
style. Every bit travels on two wires, and every register waits until the
stage after it asks for the next word. The result is correct whatever the
delays of the gates and wires are, as long as each fork of a wire reaches its
ends at the same time (isochronic forks).

The divider runs restoring division one quotient bit at a time. The partial
remainder circulates round a small ring of registers, once per quotient bit.
Two single-rail ring "sequencers" do the control. They decide when new
operands come in and when the result goes out, and they do it without a
counter or a clock.

The RTL is synthesizable SystemVerilog built from threshold gates. Its
structure follows a published NCL divider design, reconstructed from its
description (see "Where this RTL departs from the original").

## NCL in five rules

* **Dual-rail data.** `ncl_pkg::dr_t` is `{rail1, rail0}`. `{0,0}` is NULL,
  `{0,1}` is DATA0 and `{1,0}` is DATA1. `{1,1}` never occurs.
* **Wavefronts.** A word of DATA is always followed by a word of NULL. The
  logic changes from NULL to DATA only after *all* its inputs are DATA. It
  changes back to NULL only after all its inputs are NULL (input-completeness).
* **Threshold gates with hysteresis.** A THmn gate (`ncl_th`) sets its output
  once m of its n inputs are high. It clears the output only when *all* inputs
  are low, and holds it in between. Weighted variants are written as, for
  example, TH34w2 (threshold 3, first input counts twice). Gates marked "n" or
  "N" reset to 0, and gates marked "D" reset to 1.
* **Register handshake.** Each register has a request input Ki and an
  acknowledge output Ko. 1 means *request for DATA* (rfd) and 0 means
  *request for NULL* (rfn). A register passes DATA when Ki = rfd and NULL when
  Ki = rfn. Its Ko is the inverted "my output is DATA" signal, combined over
  all bits by a C-element (`ncl_completion`).
* **Rings need three registers.** A DATA wavefront and its NULL wavefront can
  only circulate in a ring of at least three registers. Here a ring of three
  registers carries the partial remainder.

## The algorithm

N = 8 (dividend and quotient width) and M = 4 (divisor and remainder width).
The partial remainder PR is N+M = 12 bits wide and starts as `{4'b0, Z}`.
Each of the N iterations does the following:

1. It forms the trial difference of the top M+1 bits minus D:
   `PR[10:7] + ~D + 1`. The divisor is stored inverted, and the carry-in of
   the first adder column is fixed at 1.
2. It computes the quotient bit `q = PR[11] | carry_out`. This is 1 exactly
   when `PR[11:7] >= D`.
3. It sets `PR = {q ? diff : PR[10:7], PR[6:0], q}`. That is, it keeps or
   replaces the top four bits, shifts the rest left, and puts q into the
   vacated bit 0.

After 8 iterations `PR = {R, Q}`. A zero divisor is not rejected: it gives
Q = 8'hFF and R = Z[3:0], as restoring division does.

## Datapath: two feedback loops

```
            z, ~d (from source)                       to sink
                 |                                      ^   ^
                 v                                      | q | r
   +--> STAGE 1: input multiplexer registers      Select registers (S = OS.S1)
   |      PR[11:8]  mux0_comp_reg  (feedback | 0)        ^
   |      PR[7:0]   mux_comp0_reg  (feedback | Z)        |
   |      divisor   mux_comp0_reg  (feedback | ~D) ---------------------+
   |             |  selects: input sequencer S0/S1       |              |
   |             v                                       |              v
   |      trial_sub (4-bit ripple-carry + OR -> q)       |   DV STAGE 2: ncl_reg
   |             v                                       |              |
   |    STAGE 2: mux_reg (new PR[11:8], selected by q) --+              v
   |             ncl_reg (PR[6:0], q)                       DV STAGE 3: ncl_reg,
   |             v                                          reset DATA0, back to
   |   [optional extra ncl_reg, reset NULL, FOURTH_REG=1]   the divisor register
   |             v
   +---- STAGE 3: ncl_reg, reset to DATA0 (the "output registers")
```

The partial remainder PR goes round a ring of three (or four) registers. The
divisor does not change, so it goes round its own three-register loop. That
loop is shorter and faster, so it never gets the fourth register.

Handshakes (Ko flows against the data):

| register              | its Ki is                                                           |
|-----------------------|---------------------------------------------------------------------|
| PR stage 1            | Ko of PR stage 2                                                    |
| divisor stage 1       | C-element( Ko of PR stage 2 , Ko of divisor stage 2 )               |
| PR stage 2            | `ki2` = C-element( Ko of next ring register , Select Ko AND OS.S0 ) |
| divisor stage 2       | Ko of divisor stage 3                                               |
| (extra PR register)   | Ko of PR stage 3                                                    |
| PR stage 3            | Ko of PR stage 1                                                    |
| divisor stage 3       | Ko of divisor stage 1                                               |
| Select registers      | `ki_out` from the result sink                                       |
| input sequencer       | C-element of the Ko of all stage-1 registers                        |
| output sequencer      | `ki2`                                                               |

**Why stage 3 resets to DATA0.** The stage-1 multiplexers are input-complete
with respect to their feedback input. They will not pass anything, not even
the new operands, until the fed-back word is DATA. Resetting stage 3 to DATA0
supplies that first "previous result". As the first dividend is loaded, this
dummy word is consumed. Stage 3 then drains to NULL, and the ring starts.

**The three multiplexer registers** all embed the register in the multiplexer
gates, so each bit is a handful of threshold gates:

* `mux_reg` has four TH33 gates: D0 passes when the dual-rail select is DATA0,
  D1 when it is DATA1. It does not wait for the input it does not select. That
  is safe here because the adder in front of it has already consumed both
  candidates.
* `mux_comp0_reg` has four TH44 gates, each also fed by an OR of the D0 rails.
  S0 selects D0 (feedback) and S1 selects D1 (new operand). Either way it waits
  for D0 to be DATA. This is how the last iteration's word is absorbed while
  the next operands are loaded. The OR output goes into the D0 gates too, so
  that the OR is always observable.
* `mux0_comp_reg` passes D0 when S0 is asserted, or the constant DATA0 when S1
  is asserted, always after D0 is DATA. It has two TH33 gates and one TH54w22
  gate (S1 and Ki with weight 2, the two D0 rails with weight 1). It loads the
  four leading zeros of PR.

## Control: the two sequencers

Both sequencers are the same 16-stage ring (`seq_ring`, 2 × ITER stages).
Each stage is a 3-input C-element of three signals:

* the previous stage;
* the inverted next stage;
* the sequencer's Ki.

Reset loads `0,1,0,1,…,0,1,0,0`, which is seven tokens plus a run of three
NULL stages.

* While Ki = 1, only rising transitions are possible. The DATA wavefront in
  front of the long NULL run moves two stages forward.
* While Ki = 0, only falling transitions are possible, and a NULL wavefront
  moves two stages.

The long run therefore steps back by one stage per Ki transition. The ring
state repeats every 16 transitions: one division of 8 iterations, each with a
DATA phase and a NULL phase. The outputs are ORs of ring stages:

| cycle (Ki transition)  | init | 1 | 2 | 3 | 4 | … | 13 | 14 | 15 | 16 |
|------------------------|------|---|---|---|---|---|----|----|----|----|
| Ki                     |  –   | 1 | 0 | 1 | 0 | … |  1 |  0 |  1 |  0 |
| input seq. S1 (load)   |  0   | 1 | 0 | 0 | 0 | … |  0 |  0 |  0 |  0 |
| input seq. S0 (feedback)| 0   | 0 | 0 | 1 | 0 | … |  1 |  0 |  1 |  0 |
| output seq. S0 (mask)  |  1   | 0 | 1 | 0 | 1 | … |  0 |  1 |  1 |  1 |
| output seq. S1 (write) |  0   | 0 | 0 | 0 | 0 | … |  0 |  0 |  1 |  0 |

Input sequencer: S1 is stage 14, and S0 is the OR of stages 0, 2, …, 12.
Output sequencer: S1 is stage 0, and S0 is stage 0 OR the inverted odd stages.

**The input sequencer** is stepped by the joint Ko of the stage-1 registers.
On the first DATA phase of a division it selects the external operands. On the next seven DATA phases it
selects the fed-back partial remainder. On every NULL phase both selects are
low, and this low select is what lets NULL through the multiplexers.

**The output sequencer is the subtle part.** Stage 2's word goes both to
stage 3 and to the Select registers. Stage 2 must therefore be acknowledged by
both. The Select registers take a word only once per division (a Select
register passes DATA only while its S input is high, and NULL only after S is
low). During iterations 1-7 they would never answer, and the ring would stall.
So their Ko is ANDed with output-sequencer S0, and that AND goes into the
C-element with the ring's own acknowledge:

* **Iterations 1-7.** The Select registers sit at NULL with Ko = 1. The AND is
  just S0, which the ring toggles in step with `ki2` itself. This fakes a
  Select register that accepts every wavefront at once, so only the feedback
  ring paces the divider.
* **Iteration 8, DATA (cycle 15).** S1 = 1 lets the final `{R, Q}` into the
  Select registers, and S0 stays 1. The AND now falls only when the Select
  registers really hold the result. Stage 2 cannot release the word before it
  has been captured.
* **Iteration 8, NULL (cycle 16).** S1 drops and S0 stays 1. The AND rises
  only after the sink has taken the result and the Select registers are back
  at NULL. This paces the first iteration of the next division.

Meanwhile the iteration-8 word also reaches stage 1 through stage 3. There the
input sequencer is back at "load", so the word is absorbed and the next
operands go in. Loading and writing the result overlap.

## Interface of the top, `ncl_divider`

| port      | dir | type          | meaning |
|-----------|-----|---------------|---------|
| `rst`     | in  | logic         | reset, held high at start-up; it puts gates at NULL or DATA0 |
| `z`       | in  | `dr_t [N-1:0]`| dividend, DATA then NULL |
| `d`       | in  | `dr_t [M-1:0]`| divisor, DATA then NULL |
| `ko_in`   | out | logic         | operand acknowledge: 0 once the operands are taken, 1 once they may be replaced |
| `q`, `r`  | out | `dr_t`        | quotient and remainder, one DATA wavefront per division |
| `ki_out`  | in  | logic         | sink request: 1 = ready for DATA, 0 = result taken, send NULL |

**Operand source protocol.**

1. Wait for `ko_in = 1`.
2. Drive `z` and `d` with DATA.
3. Wait for `ko_in = 0`.
4. Drive NULL.

The operands may be presented while a division is still running; they wait
until the ring is ready to load them.

**Result sink protocol.**

1. With `ki_out = 1`, wait until every bit of `q` and `r` is DATA.
2. Read the result.
3. Set `ki_out = 0`.
4. Wait for all NULL.
5. Set `ki_out = 1`.

| parameter    | default | meaning |
|--------------|---------|---------|
| `N`          | 8       | dividend / quotient width; also the number of iterations (sequencer length 2N) |
| `M`          | 4       | divisor / remainder width |
| `FOURTH_REG` | 0       | 1 adds a NULL-reset register to the ring (a higher-throughput variant) |

## How the gates are modelled, and what that means for simulation

`ncl_th` is written as `assign z = rst ? RST_VAL : (set | (z & ~all_inputs_low))`,
with no delay. Lint and synthesis therefore report many combinational loops.
Each gate's hysteresis is one loop, and each Ki/Ko handshake closes another.
They are the circuit's state, not mistakes. Mapping this to real NCL gates
would replace each `ncl_th` with the library's THmn cell.

In simulation every gate has zero delay. Any delay assignment is legal for a
delay-insensitive circuit, so the results are meaningful. But a whole
division, all eight iterations, happens within one simulation time step. Only
the environment's own delays advance time. Two consequences:

* The simulation checks function and handshake order, not speed. It says
  nothing about cycle time.
* Stimulus should change the inputs after a real delay (`#1` or more), not
  `#0`. Waits on outputs should re-test their condition on every change, as in
  `while (!cond) @(q, r);`, rather than `wait(f(q))` on a function call.

The gate is written as a continuous assignment, not `always_latch`. With
`always_latch`, Verilator sometimes skipped re-evaluating a gate whose inputs
changed twice within one time step.

## Where this RTL departs from the original, and how far to trust it

**Taken directly from the original design:**

* the restoring algorithm and bit ranges;
* the three-register ring with the output registers reset to DATA0;
* the two 16-stage sequencers and their output sequences (reproduced exactly,
  and checked);
* the gate-level slices of the three multiplexer registers and the Select
  register;
* the AND-gate masking of the Select registers;
* the separate divisor loop, and the optional fourth register in the
  partial-remainder loop only.

**This design's own choices:**

* **Structure.** The top-level wiring (which register feeds the Select
  registers, and where the AND and C-element sit) is inferred from the
  behaviour the sequencers must produce. It was not copied from a block
  diagram.
* **Sequencer taps.** The inner wiring of each ring stage and the exact OR
  taps were chosen so that the rings reproduce the published output
  sequences.
* **Joining the two loops.** The divisor circulates in its own
  three-register loop, and the fourth register goes into the
  partial-remainder loop only, as in the original. How the two loops'
  handshakes are joined is not given there. In this design the divisor input
  register waits for both of its consumers: the partial-remainder stage 2
  (through the subtractor) and the divisor stage 2. The input sequencer
  waits for all input multiplexer registers.
* **Operand acknowledge.** The original does not describe the operand-side
  handshake. `ko_in` is built from an added `ld` output of `mux_comp0_reg`.
* **Adder cells.** The subtractor uses the conventional NCL full adder (TH23
  carry, TH34w2 sum). The first column, the quotient OR and the XNOR are built
  from TH22 minterm gates.
* **TH54w22 weights.** The weights of the threshold-5 gate in `mux0_comp_reg`
  are this design's.
* **Completion components.** Each is a single wide C-element, not a tree.

**Not reproduced:**

* the original's transistor-level 0.5 µm static CMOS cells;
* its timing results. They reported a mean cycle time of about 76 ns for the
  three-register ring and 64 ns with the fourth register, for about 4,700 to
  4,850 transistors. This model has no delays and no transistor count.

**Verified:** every operand pair with a non-zero divisor (3840 pairs), plus
zero-divisor cases, at the default size for both ring lengths. The tests use a
randomly delayed source and sink, check exactly 8 iterations per division, and
check that outputs never show `{1,1}`. Every block also has its own
self-checking testbench.

**Not verified:**

* behaviour under arbitrary gate delays. The zero-delay simulator fixes one
  ordering of events;
* sizes other than 8 ÷ 4, although the sequencers and registers are written
  for any N and M.

## Files

| file | contents |
|------|----------|
| `rtl/ncl_pkg.sv` | `dr_t` dual-rail type and helpers |
| `rtl/ncl_th.sv` | THmn threshold gate, weighted, optional reset |
| `rtl/ncl_completion.sv` | N-input C-element completion |
| `rtl/ncl_reg.sv` | standard NCL register (reset NULL or DATA0) |
| `rtl/mux_reg.sv`, `rtl/mux_comp0_reg.sv`, `rtl/mux0_comp_reg.sv` | the three multiplexer registers |
| `rtl/select_reg.sv` | Select register (quotient and remainder outputs) |
| `rtl/ncl_dr_fn2.sv`, `rtl/ncl_full_adder.sv`, `rtl/trial_sub.sv` | trial subtraction and quotient bit |
| `rtl/seq_ring.sv`, `rtl/input_sequencer.sv`, `rtl/output_sequencer.sv` | the sequencers |
| `rtl/ncl_divider.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per block; `tb_ncl_divider` (default size) and `tb_ncl_divider_4reg` (fourth register) run all operand pairs end to end |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5:

```
verilator --binary --timing -Irtl rtl/ncl_pkg.sv tb/tb_ncl_divider.sv \
          --top-module tb_ncl_divider -Mdir obj_div
./obj_div/Vtb_ncl_divider
```

Replace the testbench name to run a block's test, for example
`tb_output_sequencer` or `tb_trial_sub`. `-Irtl` lets Verilator find the
modules by file name. The full divider test takes well under a second.
Expect lint warnings about circular logic, for the reasons given above.
