# Differential recursive soft sequential estimation (DRSSE) of m-sequences

Before a direct-sequence spread-spectrum receiver can despread, it has to find
the code phase of the transmitter's spreading sequence. A serial search over
all phases of an m-sequence of period 2^S − 1 can take time on the order of
the period. Sequential estimation needs far less. The receiver estimates S
consecutive chips from the received signal and loads them into its own copy
of the sequence generator. From then on the copy produces every following
chip. The hard part is getting all S chips right at a chip SNR near 0 dB,
without a carrier-phase reference.

This RTL implements a receiver that does this with two ideas:

* **Differential pre-processing.** The product of two adjacent chip samples,
  `U_i = Re(Z_i · conj(Z_{i-1}))`, removes the unknown carrier phase. Its sign
  is `b_i = c_i · c_{i-1}`. Because of the shift-and-add property of
  m-sequences, `b` is the same m-sequence as `c`, only shifted. It obeys the
  same recursion `b_i = Π b_{i-s_m}` over the generator taps. The receiver
  therefore acquires `b` with an ordinary generator for the same polynomial.
* **Recursive soft decoding.** Each chip's log-likelihood ratio (LLR) is
  improved by the parity relation with earlier chips, which works like a turbo
  decoder's extrinsic information. The S most recent soft outputs are kept in
  a *soft-chip-register*. Its reliabilities grow as chips come in. When all S
  are reliable enough, their signs are loaded into the generator.

The default build is the 13-stage generator `g(D) = 1 + D + D^3 + D^4 + D^13`,
whose m-sequence has period 8191 chips.

## Block diagram

```
 Z_i (I,Q) ─► diff_processor ──U_i──► soft_channel_info ──L_c·U_i+L(b_i)──► siso_decoder ──L(y_i)──┐
   lc, L(b) ───────────────────────────────▲                                    ▲ extrinsic          │
                                            │                                    │ (taps g_k)         ▼
                                            │                           soft_chip_register (S SCDUs)
                                            │                                    │
                                            │                    load_controller (sign slicers,
                                            │                    loading command) │ S hard chips
                                            │                                    ▼
            U_i (delayed) ─► despread_lpf ◄──── replica b_i ─── mseq_generator
                                 │ filtered correlation
                                 ▼
                           tracking_loop ──► reloading command (clears the SCDUs, back to search)
```

| Module | Role |
|---|---|
| `drsse_pkg` | default generator (S = 13, tap mask `13'h100D`), default word widths, chip coding |
| `diff_processor` | chip delay and `U_i = I_i·I_{i-1} + Q_i·Q_{i-1}` |
| `soft_channel_info` | intrinsic LLR `L_c·U_i + L(b_i)`, saturated |
| `siso_decoder` | soft output `L(y_i)` = intrinsic + extrinsic (min-sum over the taps) |
| `soft_chip_register` | the S soft-chip-delay-units (SCDUs) |
| `load_controller` | hard decisions, loading command, search/loaded state |
| `mseq_generator` | loadable S-stage generator giving the local replica |
| `despread_lpf` | `U_i` times the replica chip, first-order low-pass filter |
| `tracking_loop` | lock test on the filtered correlation, reloading command |
| `drsse_acq` | top level: everything above, wired as in the diagram |

## The soft recursion

This is the core of the design and the least obvious part.

For chip `i` the decoder computes

```
L(y_i) = L_c·U_i + L(b_i) + [ Π_{g_k=1} sign L(y_{i-k}) ] · min_{g_k=1} |L(y_{i-k})|
```

* `L_c·U_i` is the channel's evidence for `b_i`. With perfect channel
  knowledge `L_c = 2α_i²·Ec/(Ω·N0)`, which weights chips by their fading
  amplitude (maximal-ratio weighting). Without it `L_c = 2·Ec/N0`, the same
  for every chip (equal-gain weighting). The receiver takes `lc` with every
  sample, so both modes use the same hardware. How `L_c` is estimated is left
  outside the design.
* `L(b_i)` is an a-priori LLR, normally 0. It enters on the `apriori` port.
* The last term is the extrinsic information. The recursion says
  `b_i = Π b_{i-k}` over the taps, so the sign predicted for `b_i` is the
  product of the tap signs. The prediction is trusted only as much as the
  least reliable tap, so its magnitude is the smallest tap magnitude. This is
  the usual min-sum approximation of a parity check.

The taps are read from the soft-chip-register. There `scdu[k-1]` holds
`L(y_{i-k})`, exactly the chip that generator tap `g_k` reads. The newest
output enters `scdu[0]` and `scdu[S-1]` drops out. At reset and on every
restart all units hold 0. The extrinsic term is then 0 until S chips have
passed through, which is the required starting condition.

Once the register holds the right chips with large magnitudes, each new
output repeats the predicted sign and its magnitude grows by the intrinsic
value. One noisy chip can no longer flip it. The magnitudes keep growing
without bound, so the sum is clipped to ±(2^15 − 1). The clipping is
symmetric, so a magnitude always fits in 15 bits and negating never
overflows. Clipping keeps the signs, and the signs are all the generator
needs.

**Error floor.** The recursion can also settle on a wrong code phase. Every
nonzero window of S chips is a valid state of the m-sequence, so a register
that has locked onto the wrong state predicts a self-consistent sequence. Two
things were checked here: this RTL, and a floating-point model of the same
equations without clipping. Both show that at 1–2 dB with S = 13 this
happens in a few percent to about a third of attempts, and more chips do not
help much (see *Measured behaviour*). Published results for the method report
about 1e-4 at these points. With S = 5 at 0 dB the design and the model both
reach well below 1%. The tracking loop exists to catch such wrong loads.

## Loading, verifying and reloading

`load_controller` decides when to trust the register:

* The hard decision of each unit is its sign: `>= 0` gives +1, otherwise −1.
* The loading command is given, for one cycle, when both of these hold:
  * the smallest of the S magnitudes (`min_mag`) has reached `load_thresh`;
  * at least `min_chips` decoder updates have been made since the last
    restart.

  It comes at most once per search.
* With `load_thresh = 0` and `min_chips = L` the receiver loads after exactly
  L chips. The performance testbench uses this setting.

The generator then runs freely, one step per chip. `despread_lpf` multiplies
each `U_i` by the replica chip and smooths the product with
`y ← y + (x − y)/2^LPF_SHIFT`. The time constant is 32 chips by default. In
step, `y` settles near the mean of |U|, about A² for a signal amplitude A.
Out of step it averages to about zero.

`tracking_loop` waits `SETTLE` chips after a load (default 128) and then
compares `y` with `lock_thresh`:

* At or above it, `locked` is raised.
* Below it, at that point or at any later chip, the loop gives a one-cycle
  reloading command. That happens after a wrong load or after a loss of lock,
  for example when the transmitter's code phase jumps.

The reloading command clears the soft-chip-register, restarts the chip count
and returns the controller to searching. Reloading the old contents would
bring back a wrong state that the recursion may be stuck on.

## Datapath timing

One complex sample per cycle at most. Gaps in `z_valid` are allowed.

| Cycle | Event |
|---|---|
| t | `Z_i` accepted (`z_valid`); `lc` and `apriori` for chip i are sampled with it |
| t+1 | `U_i` registered inside `diff_processor` |
| t+2 | `soft_valid`: `soft_out = L(y_i)` is on the output and the SCDUs shift at the clock edge; if loaded, `rep_valid` and `rep_chip = b_i` are output in the same cycle |

* The first sample after reset or `clear` only fills the chip delay and
  produces no output.
* The loading command is computed from the registered SCDUs and can come in
  any cycle.
* If it comes in the same cycle as a new chip, the generator loads and steps
  at once. Its output is then the chip after the loaded ones, which lines up
  with the `U_i` being decoded.
* The replica is that of the differential sequence `b`. It is a fixed shift
  of `c` that depends on the polynomial. The receiver does not convert it
  back to `c`.

## Number formats

All of these are choices of this implementation:

| Signal | Format |
|---|---|
| `z_i`, `z_q` | 8-bit two's complement |
| `U_i` | 17-bit signed, exact |
| `lc` | 8-bit unsigned; the intrinsic LLR is `(U·lc) >>> 8` |
| LLRs | 16-bit, clipped to ±32767 |
| filter output, `lock_thresh` | 18-bit signed |

The extrinsic term, and with it the hard decisions, do not depend on the LLR
scale. `lc` therefore only needs to keep the ratio between chips right (for
maximal-ratio weighting) and put `load_thresh` on a sensible scale. The
testbenches use a signal amplitude of A = 40 quantiser steps. They set
`lc = 2·a²·(Ec/N0)·64·256/A²`, so a noiseless chip contributes `64·L_c`. With
that scaling, `load_thresh = 800` corresponds to an LLR of about 12.5 and
`lock_thresh = 800` to about A²/2.

## Parameters and run-time settings

| Parameter of `drsse_acq` | Default | Meaning |
|---|---|---|
| `S` | 13 | generator stages |
| `TAPS` | `13'h100D` | bit k−1 = coefficient g_k of D^k (default 1 + D + D^3 + D^4 + D^13) |
| `W_Z` | 8 | I/Q sample width |
| `W_LC`, `LC_SHIFT` | 8, 8 | `lc` width and its fractional shift |
| `W_LLR` | 16 | LLR width |
| `LPF_SHIFT` | 5 | low-pass filter constant (2^5 chips) |
| `SETTLE` | 128 | chips between a load and the first lock decision |
| `W_COUNT` | 16 | chip counter width (`min_chips` up to 65535) |

The run-time inputs are `load_thresh`, `min_chips` and `lock_thresh`.
`clear` restarts everything except the configuration. The 5-stage generator
`g(D) = 1 + D^2 + D^5` is `S = 5, TAPS = 5'b10010`.

## Measured behaviour

`tb_drsse_workloads` measures the erroneous loading probability `Pe`: the
probability that at least one of the S loaded chips is wrong. Each trial
uses a random code phase, a random carrier phase and a carrier drift of
0.05 rad per chip, with L chips processed before the load. The Rayleigh
fading is a first-order Gauss–Markov process with correlation 0.995 per chip.
One run gave:

| Case | Pe |
|---|---|
| S = 5, AWGN 0 dB, L = 5 (no recursion to speak of) | 0.54 |
| S = 5, AWGN 0 dB, L = 200 | 0.005 |
| S = 13, AWGN 1.7 dB, L = 520 | 0.05 |
| S = 13, AWGN 1 dB, L = 2600 | 0.30 |
| S = 13, AWGN 2 dB, L = 260 | 0.06 |
| S = 13, AWGN 4 dB, L = 520 | 0 of 300 |
| S = 13, Rayleigh 2 dB, maximal-ratio `lc`, L = 6500 | 0 of 60 |
| S = 13, Rayleigh 2 dB, fixed `lc`, L = 6500 | 0.10 |

* The gain from the recursion is large.
* Maximal-ratio weighting beats equal-gain weighting under fading, as
  expected.
* For S = 13 at 1–2 dB the error floor described above limits `Pe`. The same
  limit appears in the floating-point model, so it is a property of the
  recursion as written, not of the fixed-point formats.

## What is not built

* **Fine code-phase tracking.** The tracking loop here is only a lock
  detector that issues the reloading command. Any sub-chip timing correction
  would need more than one sample per chip and a discriminator and loop
  filter that are not specified. It is not modelled.
* **Estimation of `L_c`** (fading amplitude and noise level) is outside the
  design. `lc` is an input.
* **Conversion of the acquired `b` phase to the `c` phase** is not done.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/drsse_pkg.sv tb/tb_drsse_acq.sv --top-module tb_drsse_acq -Mdir obj
./obj/Vtb_drsse_acq
```

Replace `tb_drsse_acq` with any other testbench name.

* `tb_drsse_acq` runs the full-size receiver end to end:
  * acquisition and lock at 2 dB AWGN, with chip-by-chip replica checks;
  * a code-phase jump that must be detected and reacquired;
  * careless loads at −6 dB that must be caught and reloaded;
  * lock under Rayleigh fading with maximal-ratio weighting.

  It also checks that loads, reloads (after a wrong load and after a loss of
  lock), locks and LLR saturation all occurred.
* `tb_drsse_workloads` produces the table above. It takes a few seconds.
* The block testbenches `tb_<module>` compare each module with an
  independent reference model.
