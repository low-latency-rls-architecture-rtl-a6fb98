# A time-shared adaptive FIR filter with variable gain

This is synthesizable SystemVerilog for an adaptive FIR filter built around a
single multiplier. A parallel N-tap filter needs N multipliers. Here the taps
are processed one per clock instead: the input vector and the weight vector sit
in two small memories, and one multiplier with an accumulator (the "running
summer") walks through them. The error between the filter output and the
desired response is scaled by a gain, then used to correct every weight. The
correction reuses the same memory read of x(i) and w(i), and the new weight is
written back in the same cycle. The gain is not fixed. It follows a running
average of the squared error, so the filter adapts fast while the error is large
and settles with a small gain once it has converged. The one division in that
path goes through a small reciprocal ROM, indexed after range normalisation.

The structure follows the block diagram in the article *Low-Latency RLS
Architecture for FPGA Implementation with High Throughput Adaptive
Applications*. Its blocks are: two input buffering RAMs, a MUX, a data memory, a
tap-weight memory, one multiplier, a running summer, the error subtractor, a
variable gain, a weight-update multiplier, and error-square averaging logic. The
top-level name `rls_ri` and its 8-bit input and 16-bit output buses also come
from the article. The article gives the blocks and the order of operations. It
does not give word lengths beyond those bus widths, the tap count, a schedule,
the gain law or the buffer control. Those are this design's own choices, listed
under "Where this design decides" below.

## Block map

```
 x_in,d_in ──► input_buffer ──pair──► cur ──x──► data_memory ──x(i)──┬──────────────┐
   in_valid    (2 × sample_ram,                  (delay line)         │              │
               ping-pong + MUX)                                       ▼              ▼
                                    tap_weight_memory ──w(i)──► tap_multiplier   weight_update ──w_new──┐
                                         ▲                          │            (ge·x(i)+w(i))        │
                                         └──────────── write-back ──┼───────────────────────────────────┘
                                                                    ▼                   ▲ ge = mu·e
                                                             running_summer             │
                                                                    │ acc               │
                                              d or x ──► error_sub ─┴─► y, e ──► err_power_avg ──P──► variable_gain ──mu
                                                                                                       (rinv_rom)
                                 rls_ctrl sequences all of it
```

| File | Block |
|---|---|
| `rtl/rls_pkg.sv` | widths, fixed-point types, `pair_t`, saturation helper |
| `rtl/sample_ram.sv` | one input RAM bank (simple dual port, registered read) |
| `rtl/input_buffer.sv` | two banks as a ping-pong pair, the read-out MUX, overflow |
| `rtl/data_memory.sv` | x(n) … x(n−N+1), shift register with one read port |
| `rtl/tap_weight_memory.sv` | w(0) … w(N−1), read port, write-back port, parallel view |
| `rtl/tap_multiplier.sv` | the one FIR multiplier, registered |
| `rtl/running_summer.sv` | accumulator with guard bits |
| `rtl/error_sub.sv` | y = scaled sum, e = d − y, both saturated |
| `rtl/err_power_avg.sv` | e², exponential average → residual power P, MSE output |
| `rtl/rinv_rom.sv` | reciprocal: leading-one detect + 256-entry ROM |
| `rtl/variable_gain.sv` | mu from P |
| `rtl/weight_update.sv` | ge = mu·e, then w(i) += round(ge·x(i)) |
| `rtl/rls_ctrl.sv` | the per-sample state machine |
| `rtl/rls_ri.sv` | top level |

## One sample, cycle by cycle

Understanding the design mostly means understanding the controller (`rls_ctrl`).
It handles one sample pair at a time. With N taps and adaptation on, the
sequence is as follows. Cycle numbers count from the cycle in which the pair is
popped.

| cycle | state | what happens |
|---|---|---|
| 0 | IDLE | a full input bank exists: `pop` reads one pair from the RAM |
| 1 | WAIT | the pair arrives (`pair_valid`). It is latched in `cur`. `adapt_en` and `predict` are sampled |
| 2 | LOAD | normal mode: x shifts into the data memory. Prediction mode: nothing |
| 3 … N+2 | MAC | address i = 0 … N−1 reads x(i) and w(i) into the multiplier |
| N+3 | DRAIN | the last product enters the running summer, one cycle behind the multiplier |
| N+4 | ERR | y and e = d − y are registered |
| N+5 | POW | P ← P + (e² − P)/16 |
| N+6 | GAIN | mu ← f(P), using the P just updated |
| N+7 | GE | ge ← mu·e |
| N+8 … 2N+7 | UPD | address i again. w(i) ← w(i) + round(ge·x(i)) is written back in the same cycle |
| 2N+8 | DONE | prediction mode: x shifts in now. `out_valid` follows one cycle later |

So a sample takes **2N+9 cycles**: 25 at the default N = 8. With `adapt_en = 0`
it takes **N+9** cycles, because the UPD loop is skipped. Pairs from a full bank
are handled back to back, so 2N+9 cycles per pair is also the highest input rate
that can be sustained. The cost is latency for throughput. The filter uses one
multiplier for the taps and one for the corrections, instead of 2N.

Two details of the schedule matter:

* **The gain applied to a sample already includes that sample's error.** POW
  comes before GAIN, and GAIN before GE.
* **The update uses the same input vector as the filter pass.** The delay line
  does not move between MAC and UPD, so this is the textbook update
  w(n+1) = w(n) + mu(n)·e(n)·x(n).

## Number formats

| signal | format | bits |
|---|---|---|
| x, d (inputs) | Q1.7 signed | 8 |
| weights, y, e | Q2.14 signed | 16 |
| tap product x·w | Q3.21 signed | 24 |
| running sum | Q.21 signed, log2(N)+1 guard bits | 28 at N = 8 |
| error power P | Q4.14 unsigned | 18 |
| `mse_out` | P in Q4.12 | 16 |
| gain mu | Q0.16 unsigned | 16 |
| ge = mu·e | Q2.22 signed | 24 |

y is the sum shifted down by 7 and truncated. Both y and e saturate at the
16-bit limits. The weight correction ge·x(i) is **rounded**, not truncated, to
Q2.14. Near convergence most corrections are smaller than one weight LSB.
Truncation would round every one of them towards minus infinity: in simulation
all weights then drifted negative and the filter never converged. The
extra fraction bits of ge exist for the same reason.

## Variable gain and the reciprocal ROM

The gain is

    mu = MU_MIN + (MU_MAX − MU_MIN) · P / (P + P0)

with MU_MIN = 2⁻⁶, MU_MAX = 2⁻² and P0 = 1/16 by default. A large residual power
drives mu towards MU_MAX, for fast tracking. A small one lets it fall towards
MU_MIN, for a low misadjustment. mu resets to MU_MAX. The article says only that
the amount of forgetting is an inverse function of the residual power, and that
a reciprocal is computed in a ROM after reducing its input precision. This
formula is one concrete reading of that.

The division P/(P+P0) uses `rinv_rom`. Its steps are:

1. A leading-one detector finds k with 2^k ≤ v < 2^(k+1), where v = P + P0.
2. The 8 bits below the leading one form an index f, so v ≈ 2^k(1 + f/256).
3. The ROM returns R[f] = round(2^24 / (256 + f)), a 17-bit value.
4. 1/v ≈ R[f]·2^−(16+k), so P/v ≈ (P·R[f]) >> (k+1) in Q0.15.

The table is filled at elaboration by a constant function, so no data file is
needed. Its relative error stays below 0.4 %. Because of that rounding, mu is
not strictly monotonic in P: it can dip by a few LSBs where the index steps.

## Input buffering

`input_buffer` holds two `sample_ram` banks of BUF_DEPTH pairs each (16 by
default):

* Incoming pairs fill bank A. When bank A is full it becomes readable, and
  writing moves on to bank B.
* The controller reads only from a full bank. When the last pair of a bank has
  been popped, that bank is freed and `bank_swap` pulses.
* If a pair arrives while the bank it would go to is still full, the pair is
  dropped and `overflow` pulses. There is no back-pressure.

As a result, processing starts only after BUF_DEPTH pairs have arrived. Input can
come in bursts of up to 2·BUF_DEPTH pairs at one per clock, as long as the
average rate stays below one pair per 2N+9 cycles.

## Modes

* `predict = 0`: the desired response is `d_in`, paired with `x_in`. This is
  system identification or equalisation.
* `predict = 1`: the desired response is the new sample `x_in` itself. The
  filter sees only the N previous samples, and x shifts in after the update.
  This is one-step linear prediction, the "subtracted from the next data sample"
  configuration of the block diagram.
* `adapt_en = 0`: the weights are frozen, and the filter still produces y, e and
  P.

Both mode inputs are sampled once per sample, when the pair is captured.

## Interface of `rls_ri`

| port | dir | width | meaning |
|---|---|---|---|
| `clock`, `reset` | in | 1 | reset is synchronous, active high. It clears weights (the starting weights are zero), the delay line, P and the buffers |
| `in_valid`, `x_in`, `d_in` | in | 1, 8, 8 | one sample pair per cycle at most |
| `adapt_en`, `predict` | in | 1 | modes, see above |
| `overflow`, `bank_swap` | out | 1 | pulses, see input buffering |
| `busy` | out | 1 | a sample is in progress |
| `out_valid` | out | 1 | pulse. `y_out`, `err_out`, `mse_out` and `mu_out` are new |
| `y_out`, `err_out` | out | 16 | Q2.14 |
| `mse_out` | out | 16 | averaged e², Q4.12 |
| `mu_out` | out | 16 | gain used for this sample, Q0.16 |
| `weights_out[N_TAPS]` | out | 16 each | current weights, live |

Parameters are `N_TAPS` (8), `BUF_DEPTH` (16) and `AVG_SHIFT` (4, the averaging
time constant of about 16 samples). The gain constants are parameters of
`variable_gain`.

## Where this design decides and the article does not

* **Algorithm.** The article's title and introduction speak of QR-decomposition
  RLS with Givens rotations and CORDIC arrays. The datapath it actually draws and
  describes is different: error × variable gain × data vector, added to the
  weights. That is a gradient (LMS-type) update with a data-dependent step. This
  RTL implements that datapath. It contains no Givens rotation array and no
  inverse-correlation matrix.
* **Chosen here, not in the article:** the tap count (8), all fraction
  positions, the buffer depth, whole-bank ping-pong and the drop-on-overflow
  rule, the schedule and its cycle counts, the averaging rule, the gain formula
  and its constants, the size of the reciprocal table, rounding and saturation,
  zero starting weights, and the two mode inputs.
* **The reciprocal ROM** is taken from the article's statement about its RINV
  function. Here it serves the only division in this datapath, the normalisation
  of the gain.
* **Not covered:** the article reports an FPGA mapping of its own design at
  about 45 MHz, with its slice and LUT counts. Nothing here reproduces or
  targets those figures.

## How far it is tested

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module against values computed separately in the testbench,
and prints `TB_RESULT checks=… failures=…`.

`tb_rls_ri` runs the complete design at its default parameters. It contains an
integer reference model of the arithmetic and checks y, e, mse, mu and all
weights bit for bit, on every sample. It goes through these phases:

1. System identification of a fixed 8-tap FIR (640 samples). The mean |e| falls
   by about 10×, to the level of the injected ±1 LSB noise, and every weight
   ends within 160 LSB (about 0.01) of its target.
2. Adaptation off (16 samples): the weights must not move.
3. Prediction mode (32 samples).
4. Three banks sent back to back: exactly one bank is dropped, and
   `overflow` pulses 16 times.

`tb_rls_equalizer` uses the filter as a channel equaliser, also at the default
size. Random ±0.375 symbols are sent through the channel
0.75 + 0.25z⁻¹ − 0.125z⁻², with noise added. After 800 symbols the sign of y
recovers every one of the last 200 symbols. The gain rises to about 0.15 while
the error is large, then falls back towards MU_MIN.

`tb_rls_ri` also checks the 2N+9 / N+9 output spacing, and counts bank swaps and gain
changes. `tb_rls_ctrl` checks the cycle of every control strobe for all four
mode combinations. Timing closure, FPGA resources and behaviour with real
channel data have not been checked.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rls_pkg.sv \
          tb/tb_rls_ri.sv --top-module tb_rls_ri
./obj_dir/Vtb_rls_ri
```

Replace `tb_rls_ri` with any other testbench name to run that one instead. The
full-size run takes well under a second. To change the filter length, set
`N_TAPS` on `rls_ri`. The reference model in `tb_rls_ri` is written for 8 taps
(`localparam N` and the target filter `h`), and its gain function hard-codes the
default `variable_gain` constants.
