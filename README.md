# Model-based ML equalizer with on-chip training

This is synthesizable SystemVerilog for an adaptive equalizer for coherent
dual-polarization optical receivers. It is not a generic neural network. The
equalizer is built from the physics of the fiber: it runs the split-step
solution of the inverse Manakov equation. Its layers alternate between a
**fixed non-linear Kerr step**, which rotates each sample by a phase that grows
with the signal power, and a **trainable linear step**, a 2x2 MIMO-FIR that
undoes polarization mixing and dispersion-like memory. There are three such
sections. A trainable **matched filter** follows them and reduces two samples
per symbol to one.

The equalizer trains itself in hardware, so it can follow a channel that
changes over time. Each output symbol is compared with a reference, and the
error is propagated back through every layer by a second datapath, the
**backward path**. The weights are updated after every mini-batch of symbols.
The reference is either a known pilot symbol or, in **decision-directed (DD)
mode**, the equalizer's own hard decision.

Everything is fixed point. Every wordlength reduction uses unbiased
round-half-to-even. This matters more than it seems: the weights integrate
tiny errors for ever, so a rounding rule with a small bias (round-half-up in
the loss, for example) pushes the weights off and hurts convergence and
long-term stability.

## Signal flow

```
            forward path (fp_path), P samples per clock
din[P] -> Kerr1 -> |h1| -> FIR1 -> Kerr2 -> |h2| -> FIR2 -> Kerr3 -> |h3| -> FIR3 -> |hm| -> MF -> |sym|
                                                                                              |
                              pilot --0-.                                                     v
                                         mux --(-)--> (+) <--------------------------- sym[0]
                decision(sym) ------1-'  ^ dd_sel       |
                                                        v  err (rounded half to even)
      backward path (bp_path)                                          
      MF BP -> |s1| -> FIR3 BP -> Kerr3 BP -> |s2| -> FIR2 BP -> Kerr2 BP -> |s3| -> FIR1 BP
        |                 |                               |                          |
        v                 v                               v                          v
    h (MF taps)          w3                               w2                         w1   (grad_update, per layer)
```

`|x|` marks a register. The delay lines `h1`, `h2`, `h3` and `hm` are the
filters' tap lines, and they are also the only pipeline registers of the
forward path.

### Forward path

* **Kerr step** (`kerr_fp`): `phi = KERR_G * (|X|^2 + |Y|^2)`, then
  `X' = X e^{-j phi}` and `Y' = Y e^{-j phi}`. The phase is quantized to 10 bits
  with an LSB of 2^-10 rad, which covers 0 to 1 rad. cos and sin come from a
  1024-entry table (`trig_lut`) that is filled at elaboration time from a
  Taylor series in integer arithmetic. The step has no trainable parameters.
* **Linear step** (`mimo_fir`): `y_p = sum_q sum_j w[p][q][j] x_q[n-j]`, for
  p, q in {X, Y}. The coefficients are real and act on I and Q separately. So
  this is a real 2x2 MIMO filter applied twice, not a complex filter.
* **Matched filter** (`matched_filter`): one real M-tap filter per
  polarization. It is evaluated only at every second sample position, which
  is the 2:1 downsampling. It keeps 4 more fraction bits than the samples, so
  the loss stage performs the final wordlength reduction.
* **Lanes**: the path is unrolled over `P` parallel lanes (default 2). Each
  clock takes P samples and gives P/2 symbols. `din[0]` is the newest sample
  and `sym[0]` the newest symbol. Every delay line shifts by P per valid clock.
  Lane `l` of a filter reads positions `l .. l+T-1`. To reach a line rate
  higher than the clock, raise P; the backward path still trains on one
  symbol per clock (the newest).

### Loss and decision-directed mode

`eq_loss` computes `err = sym - ref` per symbol lane. `ref` is `pilot` when
`dd_sel = 0` and the QPSK hard decision of `sym` when `dd_sel = 1`. The error
goes from 16 to 12 fraction bits with round-half-to-even. The newest symbol is
trained on when `train_en` is high and either `dd_sel` is high or `pilot_valid`
says that `pilot[0]` is a real pilot. The `train` output shows which symbols
were used.

## How the backward path finds its data

This is the least obvious part of the design.

Backpropagation needs, for each trained symbol, the exact samples that every
layer saw when it produced that symbol. Samples from several clocks ago are
still in the delay lines, and because all lines shift together by P, their
positions are fixed relative to each other:

* Sample `i` of line `hm` (the FIR3 output) was computed from positions
  `i+P .. i+P+T-1` of `h3`.
* Sample `i` of `h3` was computed from positions `i+P .. i+P+T-1` of `h2`
  (after Kerr2).
* The same holds for `h2` and `h1`, so the offsets are P, 2P and 3P.

Each line is kept just deep enough for every sample that fed the newest
symbol:

| line | depth         |
|------|---------------|
| `hm` | `M+P-2`       |
| `h3` | `M+T+P-1`     |
| `h2` | `M+2T+2P-2`   |
| `h1` | `M+3T+3P-3`   |

Together with the Kerr phases of sections 2 and 3, the lines are copied into
snapshot registers whenever symbols are produced. The backward path starts
from such a snapshot.

Backpropagation then runs layer by layer:

1. **MF BP** (`mf_bp`): the gradient of the MF taps is `Re(conj(e) x)`. The
   error at the MF input is `h * e`, a window of M samples.
2. **FIR BP** (`fir_bp`): the weight gradient is the correlation
   `sum_i Re(conj(delta_i[p]) x[i+j][q])`. The input error is the transposed
   filter, `sum_p sum_j w[p][q][j] delta[k-j][p]`. Each FIR stage makes the
   error window T-1 samples longer: M, then M+T-1, then M+2T-2.
3. **Kerr BP** (`kerr_bp`): the error is rotated back by `e^{+j phi}`, using
   the phase stored for that sample. There are two versions:
   * The first-order Taylor version, `(1 + j phi)`, is the default and uses
     one multiplier per component.
   * The table version (`KERR_BP_LUT = 1`) computes the rotation exactly. It
     uses more multipliers and has a longer combinational path.

   Both treat `phi` as a constant with respect to the sample. The term from
   the power dependence of `phi` is dropped.

There is one register between layer groups (`s1`, `s2`, `s3`). So a symbol's
error reaches the MF weights at once, and FIR3, FIR2 and FIR1 one, two and
three clocks later. `grad_update` adds the contributions of B symbols, then
applies `w <- w - round(sum * 2^-MU_SHIFT)`. With the defaults this is
`mu = 2^-6` per symbol and a batch of 16. The whole feedback loop is therefore
the forward latency, plus up to four clocks, plus up to one batch. That delay
limits how fast the equalizer can track a changing channel.

On reset, the FIRs start as identity filters (1.0 on the centre tap from a
polarization to itself) and the MF starts as a single centre tap.

## Number formats

| signal              | width | fraction bits | note                                   |
|---------------------|-------|---------------|----------------------------------------|
| samples, errors     | 16    | 12            | `samp_t`, `dp_t` = 2 pol x {re, im}    |
| coefficients        | 18    | 15            | fits an 18-bit DSP multiplier input    |
| MF output (symbols) | 20    | 16            | `dsym_t`                               |
| gradients           | 44    | 24            | accumulated in 52 bits                 |
| Kerr phase          | 10    | 10 (rad)      | saturates just below 1 rad             |

All of these live in `rtl/ml_eq_pkg.sv`. Results that overflow saturate.

## Parameters of `ml_equalizer`

| parameter     | default | meaning                                             |
|---------------|---------|-----------------------------------------------------|
| `T`           | 7       | taps per MIMO-FIR                                   |
| `M`           | 9       | matched-filter taps                                 |
| `P`           | 2       | parallel sample lanes (even); P/2 symbols per clock |
| `B`           | 16      | mini-batch size in trained symbols                  |
| `MU_SHIFT`    | 6       | step size 2^-MU_SHIFT per symbol                    |
| `KERR_G`      | 410     | Kerr coefficient per section, Q.12 (0.1 rad at unit power) |
| `A`           | 2048    | QPSK decision level, Q.12 (0.5)                     |
| `KERR_BP_LUT` | 0       | 0: Taylor Kerr BP, 1: table Kerr BP                 |

`KERR_G` depends on the link: the fiber's non-linear coefficient, the launch
power and how the receiver scales the signal. Set it for the link at hand.

## Interface and timing (`ml_equalizer`)

* **Inputs**: `clk`, `rst_n` (asynchronous, active low), `in_valid`, and
  `din[P]`, which is P dual-polarization samples at two samples per symbol.
* **Symbol outputs**: one clock after each valid input clock, `sym_valid` is
  high with `sym[P/2]`, `dec[P/2]` (decisions) and `err[P/2]` (errors).
* **Latency**: a sample reaches the symbol register five valid clocks after
  it enters. The filters' own group delays come on top of this (with the
  initial centre-tap weights, 3 x 3 + 4 samples).
* **Pilots**: `pilot[P/2]` must be presented in the same clock as the symbol
  it belongs to.
* **Training controls**: `pilot_valid`, `dd_sel` and `train_en`.
* **Status outputs**:
  * `train` is high when the current newest symbol feeds the backward path.
  * `upd[3:0]` pulses when the weights of {FIR1, FIR2, FIR3, MF} change.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_ml_equalizer`      | End to end at the default parameters. Random DP-QPSK goes through a small channel model (`tb_qpsk_channel`: Kerr phase, polarization rotation by 0.35 rad, 15 % inter-symbol interference, noise). The equalizer finds its symbol delay, trains on 6000 pilots, then runs 3000 symbols in DD mode. Requires: MSE below half the untrained value (in practice 0.146 -> 0.0016), no wrong decisions in either mode, exactly one update per B trained symbols in every layer, one symbol per clock, and at least one occurrence of pilot training, DD training, untrained symbols, every layer's update and a non-zero Kerr phase. |
| `tb_kerr_bp_compare`   | Taylor and table Kerr BP side by side on the same signal, with a stronger Kerr phase. Both must converge and keep tracking in DD mode; the two final MSEs are printed. |
| `tb_fp_path`           | Forward path at P = 4 against a lane-by-lane reference model, including every snapshot register and random gaps in `in_valid`. |
| `tb_bp_path`           | Backward path at P = 4, B = 1, against a chain-rule reference. Compares every weight after each symbol and the arrival time of each layer's update. |
| `tb_mimo_fir`, `tb_matched_filter`, `tb_kerr_fp`, `tb_fir_bp`, `tb_mf_bp`, `tb_kerr_bp`, `tb_grad_update`, `tb_eq_loss`, `tb_qpsk_decision` | Each datapath block against independent arithmetic. Rounding is computed through real numbers, and exact half-LSB ties are forced in the loss test. |

To run a testbench with Verilator, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/ml_eq_pkg.sv tb/tb_ml_equalizer.sv --top-module tb_ml_equalizer
./obj_dir/Vtb_ml_equalizer
```

The unit testbenches also need the reference package. For example:

```
verilator --binary --timing -y rtl -y tb rtl/ml_eq_pkg.sv tb/tb_ref_pkg.sv tb/tb_bp_path.sv --top-module tb_bp_path
```

The end-to-end run takes well under a second of simulation time. The
multi-hour runs needed to see slow drift from rounding bias are not practical
in simulation. Those need the design on an FPGA, driven by a hardware channel
emulator.

## What this design does not reproduce

* **Hardware reuse in the backward path.** The original shares multipliers in
  the MF and linear backward stages across the spare clocks of a mini-batch.
  Here the backward path is fully parallel, so it is much larger than it
  needs to be.
* **Sizes and formats.** The tap counts, lane count, batch size, step size,
  wordlengths, initial weights and section order (Kerr, then FIR) are this
  design's own choices.
* **The Kerr BP extra pipeline stage.** The table version of the Kerr
  backward step lengthens the critical path. The remedy is an extra pipeline
  register at the cost of loop latency. This is not added here: the table
  version is a parameter only.
* **The Kerr BP derivative term.** The Kerr backward step ignores the
  derivative of the phase with respect to the power.
* **The evaluation environment.** The transmitter, fiber channel emulator,
  noise source, demodulator and BER counter are not part of this RTL. The
  testbench channel is a simple stand-in, not a fiber model.
