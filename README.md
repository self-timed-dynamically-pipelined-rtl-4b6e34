# Self-timed, dynamically pipelined DLMS equalizer

A delayed-LMS (DLMS) adaptive FIR filter, built as a self-timed pipeline.
Its pipeline depth, the delay D of the coefficient update, can be changed
while samples are flowing.

The filter computes

    y(n) = sum_k w_k(n-1) u(n-k)          k = 0..8
    e(n) = d(n) - y(n)
    w_k(n) = w_k(n-1) + mu e(n-D) u(n-D-k)

A synchronous DLMS filter fixes D at design time, because D is the number of
pipeline registers in the coefficient loop. Its throughput is then set by the
loop latency divided by D. A larger D gives a faster filter that converges and
tracks worse.

In a self-timed pipeline the delay is the number of **tokens** (data items)
circulating in the loop, not the number of stages. The stages the loop passes
through do not fix it. This design adds and removes tokens at run time. An
equalizer can therefore run with the smallest D that keeps up with the current
sample rate. It can also give up speed for accuracy during training, or the
reverse.

The RTL is a *cycle-level model* of the self-timed circuit. Each clock edge is
one stage evaluation or one precharge. The handshakes, token counts and data
flow are the same as in the self-timed circuit. Only the continuous-time
behaviour is quantised to clock cycles.

## The self-timed stage (`zdo_stage`)

Every pipeline stage has two flags:

- **ACK**: the stage holds a valid result.
- **EN**: 1 means evaluate, 0 means precharge.

| EN | ACK | state | meaning |
|----|-----|-------|---------|
| 1  | 1   | data  | the stage holds a result |
| 0  | x   | spacer | the stage is precharging; ACK falls in the next cycle |
| 1  | 0   | bubble | the stage is empty and ready |

The rules, all registered:

- `EN <= !succ_done`, where `succ_done = EN & ACK` of the next stage. A stage
  precharges as soon as its successor has taken the data.
- An enabled, empty stage whose predecessor is valid evaluates: ACK rises and
  the data are captured. It does not evaluate in a cycle in which its successor
  is still done, because that token is about to be removed by a precharge.
- `done = EN & ACK` goes back to the predecessor.

A token moves forward one stage per cycle through empty stages. There is no
latch or handshake overhead on the forward path: this is the
"zero-delay-overhead" property. Behind each token one stage precharges, so
a stage pair (data followed by spacer) is one token. A two-stage element that
starts as (spacer, data) therefore behaves like a register with an initial
value. This is `tr_buffer` with `HOLD_TOKEN=1`.

### Joins and forks

- **`st_join`** evaluates only when *all* its inputs are valid. Its done flag
  goes back to every predecessor. The error adder (`err_stage`), the
  coefficient adder (`coef_adder`) and the first stage of each multiplier
  (`bw_mult`, `csa_array`) are joins.
- **`st_fork`** sends one datum to several consumers. It must not precharge
  until *every* consumer has taken the datum. The consumers can take it at
  different times, or while still holding a previous token.
  - `csc` (a strobe circuit) latches the rising edge of each consumer's done
    flag. It raises a strobe when all of them have been seen. The strobe acts
    as the fork's `succ_done`.
  - A consumer that has already taken the datum sees its valid flag withdrawn,
    so it cannot take the same datum twice.

## Changing the depth: `pdm`, `pdm_host`, `depth_ctrl`

A **pipeline depth modifier** (`pdm`) is a loop stage B placed between a
stage A and a stage C. Its EN comes from a C-element instead of from the
successor:

    set   EN_B  when  ACK_A & !REM & (!ACK_C | !REQ_ADD)   (A valid, C empty)
    reset EN_B  when  (!ACK_A | REM) & ACK_C & REQ_ADD     (A empty, C holds it)
    otherwise   hold
    REM        = ACK_A & !REQ_REMOVE & !EN_B
    done to A  = (EN_B & ACK_B) | REM

The modifier has three modes:

- **Normal** (`REQ_ADD = REQ_REMOVE = 1`): B is an ordinary stage with one
  extra cycle of delay.
- **Add** (`REQ_ADD = 0`): EN_B cannot reset, so B keeps its datum after C has
  taken it. Once C has passed the datum on and emptied, C takes the same datum
  again. The loop now holds one token more; the new token is a copy.
- **Remove** (`REQ_REMOVE = 0`): the next token that reaches A raises REM,
  which precharges A without B ever evaluating. That token disappears.

In this model B's valid flag is gated by EN_B. Without that gate, a
fast-emptying C could take B's datum a second time.

**The host handshake** is implemented by `pdm_host`:

- To add a token, drop `REQ_ADD` right after a 1->0 edge of `ACK_ADD`, then
  raise it right after the next 1->0 edge.
- To remove a token, do the same with `REQ_REMOVE` and `ACK_REMOVE`.
- `ACK_ADD` is C's completion flag and `ACK_REMOVE` is A's, so each request
  covers exactly one token. A request completes only while tokens flow.

**The delayed update needs two modifiers.** The error arriving at tap k must
meet the input sample it was computed from. Every token added to the
coefficient loops must therefore also be added to the delay line that feeds
the update multipliers.

- One `pdm` sits after the step-size multiplier, on the part of the loop that
  all nine taps share.
- One sits inside `sr_chain`, the buffer chain that delays u(n) for the
  updates.

`depth_ctrl` runs one `pdm_host` per modifier. It steps `depth` by ±1 each
time both modifiers have finished, until `depth == target_depth` (clamped to
`MAX_DEPTH` = 7). Choosing the target is left to the user. Sensible policies
depend on the sample rate, training versus tracking, and the error magnitude.

Throughput against depth (measured, clock cycles per sample, 9 taps, 6-stage
multipliers and adder array):

| D | 0  | 2    | 4   | 6   |
|---|----|------|-----|-----|
| cycles/sample | 35 | 12.3 | 8.9 | 8.9 |

With 8-stage multipliers and adder array (`MULT_ST = CSA_ST = 8`), the
measured rate is:

| D | 4    | 5    | 6    | 7    |
|---|------|------|------|------|
| cycles/sample | 8.67 | 7.89 | 7.89 | 7.89 |

While the loops are *token limited*, each added token raises the throughput.
That holds up to D = 4 with 6 stages and up to D = 5 with 8 stages. Beyond that
the forward path sets the rate, and more tokens bring no gain. The forward
path is limited by the handshake cycle of its slowest stages, about 8 clock
cycles in this model. These are the forks and joins, whose cycle includes
waiting for every branch. Longer arithmetic pipelines push the limit to a larger depth.
The original circuit stays token limited over the whole range from 4 to 7.
In this cycle-level model the rate is already flat from D = 5.

## Datapath (`dlms_top`, `dlms_tap`)

```
 u_valid/u_data ─> st_fifo_in ─> fork ─┬─> tap0 upper line ─TR─> tap1 ... ─> tap8
                                       └─> sr_chain (8 elements + pdm) ─> tap0 lower line ─TR─> ...
 each tap k:  TR(w_k) ─> fork ─┬─> bw_mult 6x10 (u(n-k)·w_k) ─> p_k
                 ^             └─> coef_adder <── bw_mult 6x16 (u_lower · mu e)
                 └──────────────────┘
 p_0..p_8 ─> csa_array (9 x 16 bit, 6 stages) ─> fork ─┬─> st_fifo_out ─> y_valid/y_data
                                                       └─> err_stage (d from st_fifo_in) ─> e
 e ─> bw_mult 10x9 (e·mu) ─> pdm (loop) ─> fork to the 9 taps (mu e)
```

Word lengths:

| signal | bits | format | notes |
|--------|------|--------|-------|
| u | 6 | Q0.5 | |
| w | 10 | Q1.8 | saturated |
| e | 10 | | bits [15:6] of the 16-bit d - y |
| mu | 9 | Q0.8, signed | keep it non-negative |
| tap products, sum, y, d | 16 | Q2.13 | sum wraps |
| mu·e | 16 | | bits [18:3] of the 19-bit product |
| update | 16 | | bits [21:6] of u·(mu e) |

The update is added to w after an arithmetic shift right by 3, with
saturation. The binary points and the bit slices are this design's choices.
Only the word lengths come from the original design.

**Multipliers** (`bw_mult`):

- Baugh-Wooley two's-complement multiplier: a carry-save array of
  partial-product rows, then a ripple carry adder.
- The array is cut into `NST` self-timed stages. The rows are spread evenly
  over the first `NST-1` stages, and the last stage is the ripple adder.

**Adder array** (`csa_array`): built the same way, for nine 16-bit operands.

`NST` defaults to 6; the original used 6 to 8 stages.

After reset:

- every coefficient holds `W_INIT` (default 0);
- the loops hold one token per coefficient register, so the filter starts as
  plain LMS (D = 0);
- raise `target_depth` to pipeline deeper.

While the depth changes, the tokens that are added are copies and the tokens
that are removed are dropped. This briefly disturbs the adaptation.

## Clocked interface

| port | direction | meaning |
|------|-----------|---------|
| `u_valid`, `u_data[5:0]`, `u_ready`, `u_overflow` | in/out | input samples |
| `d_valid`, `d_data[15:0]`, `d_ready`, `d_overflow` | in/out | desired (training) samples |
| `y_valid`, `y_data[15:0]`, `y_ready`, `y_stall` | out/in | filter output |
| `mu[8:0]` | in | step size, hold steady while data flow |
| `target_depth[3:0]`, `depth[3:0]`, `depth_busy` | in/out | depth control |
| `coef[9][9:0]` | out | current coefficients |

On the input side:

- **Write u and d in the same cycle, and only when both `u_ready` and
  `d_ready` are high.** The two FIFOs are separate, so writing one without the
  other misaligns the streams.
- A write into a full FIFO is lost and sets the sticky overflow flag. A sample
  source such as a read head cannot wait.

On the output side:

- A full output FIFO stalls the core, shown by `y_stall`.
- The core then stops taking input, and the input FIFOs fill.
- FIFO depth is 16 (`FIFO_DEPTH`).

Reset is synchronous and active low (`rst_n`).

## Departures from the original circuit

These are the points where the RTL is a model rather than the circuit.

- **Circuit level.** The stages model dual-rail dynamic logic with completion
  detectors, and here they are clocked registers. One clock edge stands for
  one stage evaluation. Absolute speed (about 1.1 Gsample/s reported for
  depth 7 in 0.18 µm) cannot be reproduced; only cycle counts are meaningful.
  Partial completion detection is not modelled.
- **Forks.** The original puts a buffer on each fork output, all released
  together. Here the fork stage holds its datum and masks each consumer's
  valid flag once that consumer has taken it.
- **Depth modifier.** The equations for EN_B and the removal request are taken
  from the description in words. B's output valid flag is gated by EN_B.
- **Not built:** the read-channel front end, the channel model, the Viterbi
  detector, and the bit-error-rate study. Nor does the design implement a
  policy that chooses the depth or the step size.
- **Sizes that are this design's own:** FIFO depth 16, buffer chain of 8
  elements with the modifier after the 4th, `MAX_DEPTH` = 7, and the
  coefficient reset value 0.

## Files

`rtl/`:

- `dlms_pkg.sv`: word lengths, shifts, saturation.
- `zdo_stage`, `st_join`, `st_fork`, `csc`, `c_element`, `tr_buffer`: the
  pipeline primitives.
- `pdm`, `pdm_host`, `depth_ctrl`, `sr_chain`: depth control.
- `bw_mult`, `csa_array`, `err_stage`, `coef_adder`: arithmetic.
- `dlms_tap`, `dlms_top`: the filter.
- `st_fifo_in`, `st_fifo_out`: the clocked interface.
- `st_tb_chan.svh`: self-timed source/sink macros shared by the testbenches.

`tb/` holds the self-checking testbenches. `csc` is tested in `tb_st_fork`,
`tr_buffer` in `tb_zdo_stage`, `pdm_host` in `tb_pdm`, and `dlms_tap` and `depth_ctrl` in
`tb_dlms_top`. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb_dlms_top` runs the full-size design
against a bit-exact reference model of the DLMS recursion:

- **D = 0:** 120 training samples, every output compared.
- **D = 4, reached by token addition:** 260 samples, every output compared,
  and the error must fall.
- **Throughput:** measured at D = 0, 2, 4 and 6.
- **Mixed run:**
  - depth changes 6 -> 3 -> 5 while data flow;
  - an output stall;
  - an input overflow.

It counts each mechanism (add, remove, stall, full FIFO, overflow) and fails
if one never happens.

`tb_dlms_depths` runs the top with 8-stage multipliers and adder array at
D = 4, 5, 6 and 7. Every output is compared bit for bit, and the rate is
measured.

Running a testbench with Verilator:

    verilator --binary --timing -Irtl -y rtl rtl/dlms_pkg.sv tb/tb_dlms_top.sv \
        --top-module tb_dlms_top -o sim && ./obj_dir/sim

The other testbenches run the same way. `tb_dlms_top` takes a couple of
seconds.
