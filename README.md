# Reconfigurable RRC pulse-shaping interpolation filter with VHBCSE multipliers

A digital up-converter that serves several radio standards needs a transmit
pulse-shaping filter that can change its roll-off and its interpolation
factor. This design is a root-raised-cosine (RRC) FIR interpolation filter
that takes one 16-bit sample every L clocks, with L = 4, 6 or 8, and produces
one 16-bit filtered sample every clock. Two roll-off factors are available
for each L: 0.22 (UMTS / WCDMA) and 0.35 (DVB), giving six filters in all.

Two ideas keep the hardware small:

* **Coefficient selection by coding passes.** The six coefficient sets are
  constants. A first pass picks the roll-off (FLT_SEL) for all three
  interpolation factors at once. Bits on which the two roll-off sets agree are
  wired straight through, and only the differing bits need a multiplexer
  ("vertical" common-subexpression sharing). A second pass then picks the
  interpolation factor (INTP_SEL).
* **VHBCSE multipliers.** Each coefficient multiplier is a shift-and-add tree
  built from 2-bit patterns of the coefficient. Adders are shared when two
  4-bit or 8-bit pieces of the coefficient are equal ("horizontal" common
  subexpressions). The sum of a lower piece is then a shifted copy of the sum
  of an equal upper piece.

The final accumulation uses carry-skip adders.

## Filter structure and timing

The filter is the polyphase form of a 7·L-tap prototype (28, 42 or 56 taps).
For input samples x[m] and output phase p = 0 … L−1:

    rrcout[m·L + p] = Σ_{k=0..6} h[k·L + p] · x[m − k]

```
 rrcin ─► data_gen ─ x[0..6] ─► cg ─ prod[7][8] ─► cs ─ peout[7] ─► fa ─► rrcout
            ▲  (7-sample line)   ▲ (FCP, SCP,       ▲ (phase mux,   (carry-skip
            │                    │  56 multipliers) │  register)     sum, register)
 rate_gen ──┴─ ce4/ce6/ce8       flt_sel, intp_sel  └─ cnt4/cnt6/cnt8
```

| Block | Module | What it does |
|---|---|---|
| Rate generator | `rate_gen` | Three free-running phase counters (0..3, 0..5, 0..7). Each gives a sample enable once per cycle of its counter: CLK/4, CLK/6, CLK/8. |
| Data generator (DG) | `data_gen` | Shifts RRCIN into a 7-sample delay line on the enable of the selected rate. Keeps a valid bit per tap (SFTOUT). |
| Coefficient generator (CG) | `cg` | FCP and SCP coefficient selection, then sign conversion and one VHBCSE multiplier per tap and phase slot (7 × 8). |
| Coefficient selector (CS) | `cs` | For every tap, picks the product of the current phase (4:1, 6:1 or 8:1 by counter, then 3:1 by INTP_SEL), gated by SFTOUT. Registers it as PEOUT. |
| Final accumulation (FA) | `fa` | Adds the seven PEOUT values with carry-skip adders, clips to 16 bits and registers RRCOUT. |

Everything runs on the one output-rate clock `clk`. The three slower input
clocks of the original architecture become clock enables here.

**Top-level ports (`rrc_interp_top`).**

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock = output sample rate |
| `rst` | in | 1 | synchronous, active high. Clears the counters, the delay line and the registers. |
| `flt_sel` | in | 1 | 0: roll-off 0.22, 1: roll-off 0.35 |
| `intp_sel` | in | 2 | 00: L=4, 01: L=6, 10 or 11: L=8 |
| `rrcin` | in | 16 | input sample, two's complement |
| `rrcin_take` | out | 1 | high in the cycle whose rising edge samples `rrcin` |
| `rrcout` | out | 16 | output sample, two's complement, one per clock |

**Timing.**

* Counters start at 0 after reset. For factor L, `rrcin` is sampled every L
  clocks, at the edge that closes a cycle in which `rrcin_take` is high.
* Count that edge as edge 0. Output phase p of the new sample appears on
  `rrcout` after edge p + 3:
  * one clock in which the phase counter is at p;
  * one clock for the PEOUT register;
  * one clock for the RRCOUT register.
* A source can simply present a new sample after each `rrcin_take`.

**Changing the configuration.** `flt_sel` and `intp_sel` take effect at once.
The samples already in the delay line are filtered with the new coefficients
until they have shifted out. After an `intp_sel` change, the output phase
follows the free-running counter of the new factor. The phase is consistent
again from the first sample taken at the new rate.

## Number formats

* **Samples.** RRCIN, the products, PEOUT and RRCOUT are 16-bit two's
  complement.
* **Coefficients.** Each coefficient is a 17-bit word H[16:0]:
  * H[16] is the sign;
  * H[15:0] holds the magnitude, a fraction with 16 fraction bits;
  * for a negative coefficient the magnitude is stored inverted (ones'
    complement).

  The sign conversion block (`sign_conv`) inverts H[15:0] when H[16] is set,
  which returns the exact magnitude Hm.
* **Multiplication.** The VHBCSE multiplier is unsigned. `cg` takes the
  magnitude of each tap's sample once, with an exact two's complement negation
  (a value of up to 2^15). It forms `cf ≈ |x| · Hm / 2^16`, then applies the
  sign `sign(x) XOR H[16]` by negation.
* **Output range.** The coefficient sets are scaled so that no polyphase
  branch has a gain above 0.99 (sum of |h|). RRCOUT therefore cannot overflow
  for any input. The clipping in `fa` only protects other coefficient sets.

## The VHBCSE multiplier (`vhbcse_mult`)

This is the part with the most structure. It multiplies a magnitude
Xin ≤ 2^15 by a 16-bit coefficient magnitude Hm in four layers.

**Layer 1: partial products (`ppg`, `mux_l1`).** Hm is cut into eight 2-bit
groups. Group j is Hm[15−2j : 14−2j], with j = 0 the most significant. Three
of the four patterns need no adder:

| group bits | partial product PPG_j |
|---|---|
| 00 | 0 |
| 01 | Xin >> (2j+1) |
| 10 | Xin >> 2j |
| 11 | P(8−j) = (Xin + Xin/2) >> 2j |

A single adder forms P8 = Xin + Xin/2 (17 bits). P7 … P1 are P8 shifted
right by 2, 4, … 14 bits, which is wiring only. Each PPG_j is therefore
floor(v·Xin / 2^(2j+1)), where v is the group's value. The widths are 17, 15,
13, 11, 9, 7, 5 and 3 bits.

**Control logic (`cl_gen`).** Six comparators (XNOR per bit, then AND)
compare the nibbles of Hm, and a seventh signal compares its two bytes:

| signal | condition |
|---|---|
| C1 | Hm[15:12] = Hm[11:8] |
| C2 | Hm[15:12] = Hm[7:4] |
| C3 | Hm[11:8] = Hm[7:4] |
| C4 | Hm[15:12] = Hm[3:0] |
| C5 | Hm[11:8] = Hm[3:0] |
| C6 | Hm[7:4] = Hm[3:0] |
| C7 = C2 ∧ C5 | Hm[15:8] = Hm[7:0] |

**Layer 2: controlled addition (`add_l2`).** Four adders form one sum per
nibble: A1 = PPG0 + PPG1, A2 = PPG2 + PPG3, A3 = PPG4 + PPG5,
A4 = PPG6 + PPG7. When a lower nibble equals a higher one, its sum is the
higher sum shifted right by 4 bits per nibble of distance. The muxes take
that shifted copy instead:

    AS1 = A1                                             16 bits
    AS2 = C1 ? A1>>4  : A2                               12 bits
    AS3 = C2 ? A1>>8  : (C3 ? A2>>4 : A3)                 8 bits
    AS4 = C4 ? A1>>12 : (C5 ? A2>>8 : (C6 ? A3>>4 : A4))  4 bits

**Layer 3 (`add_l3`).** AS5 = AS1 + AS2 is the sum for the upper byte. The
lower byte gives AS6 = AS3 + AS4, or AS5 >> 8 when C7 says the two bytes are
equal.

**Layer 4.** cf = (AS5 + AS6) >> 1.

**Accuracy.** The multiplier is not bit-exact with respect to the true
product, for two reasons:

* every partial product is truncated;
* a substituted, shifted sum truncates once more.

All these errors round down, so for every input
`floor(Xin·Hm/2^16) − 4 ≤ cf ≤ floor(Xin·Hm/2^16)`. The largest error seen in
20,000 random tests was 3 LSB. Over the seven taps, the filter output stays
within 28 LSB of the exact filter. The largest deviation seen in the
end-to-end test was 12 LSB.

**Why the muxes.** In an ASIC or FPGA all four layer-2 adders still exist. The
muxes do not reduce the adder count. What they do is make a substituted adder
irrelevant: its result is ignored, so its inputs could be held to save
switching power, and the substituted path is shallower. The shipped
coefficient sets use each of C1 … C7 at least once (C7 on two coefficients).

## Coefficient selection (`fcp`, `scp`) and the coefficient tables

* **First pass (`fcp`).** Produces the selected roll-off set for each of
  L = 4, 6 and 8 in parallel: `c4[28]`, `c6[42]`, `c8[56]`. Each word is
  written as `(a & ~(a^b)) | ((a^b) & (sel ? b : a))`, so only the bits that
  differ between the two roll-off sets depend on FLT_SEL.
* **Second pass (`scp`).** Chooses one of the three sets by INTP_SEL and lays
  it out in polyphase order, `h[k][p] = C_L[k·L + p]`. Slots with p ≥ L are
  zero.
* **Tables.** They are constants in `rrc_pkg`: `H4_22`, `H4_35`, `H6_22`,
  `H6_35`, `H8_22`, `H8_35`. They come from the RRC impulse response, with t
  in symbol periods and β the roll-off:

      h(t) = [sin(πt(1−β)) + 4βt·cos(πt(1+β))] / [πt(1 − (4βt)²)]
      h(0) = 1 − β + 4β/π
      h(±1/(4β)) = β/√2 · [(1 + 2/π)·sin(π/(4β)) + (1 − 2/π)·cos(π/(4β))]

  Each set is sampled at t = (i − (N−1)/2)/L for i = 0 … N−1, with N = 7L.
  It is then scaled so that the largest per-phase sum of |h| is 0.99, and
  rounded to 16 fraction bits. Negative values are stored in ones' complement
  form.
* **Changing the tables.** New filters only need new tables in `rrc_pkg`
  with the same lengths and format. Changing the number of taps per phase
  (`TAPS`) needs tables of length TAPS·L.

## Selection and accumulation (`cs`, `fa`, `csk_adder`)

For each tap, `cs` ANDs all eight products with the tap's SFTOUT valid bit.
The gated products feed three muxes side by side:

* a 4:1 mux on phases 0..3, steered by the 0..3 counter;
* a 6:1 mux on phases 0..5, steered by the 0..5 counter;
* an 8:1 mux on phases 0..7, steered by the 0..7 counter.

A 3:1 mux on INTP_SEL picks one result, which is registered as PEOUT.

`fa` sign-extends the seven PEOUT values to 19 bits and adds them in a chain
of `csk_adder` instances. Each `csk_adder` ripples inside 4-bit blocks and
skips a block's ripple path when every bit of the block propagates. The sum
is clipped to 16 bits and registered as RRCOUT.

## Where this design makes its own choices

The architecture it implements fixes the block structure, the 16-bit data
and 17-bit signed coefficients, the VHBCSE multiplier down to its widths and
controls, the two coding passes, and the selector built from per-rate
counters and muxes. The following are choices made here:

* **Filter size and coefficients.** 7 taps per phase, taken from the seven
  input samples the data generator holds. Roll-off values 0.22 and 0.35. The
  coefficient values and their scaling.
* **Encodings and reset.** The encodings of FLT_SEL and INTP_SEL, the
  synchronous active-high reset and the `rrcin_take` pacing output.
* **One clock domain.** Clock enables replace the CLK/4, CLK/6 and CLK/8
  clocks.
* **Phase selection after the multipliers.** The phase is chosen after
  multiplication, as the selector's structure implies. This design therefore
  has 56 multipliers, one per tap and phase slot. Their inputs change only
  once per input sample, so each coefficient is multiplied once per input
  sample. Choosing the coefficient before the multiplier would need only 7
  multipliers, but they would switch on every clock.
* **Signs.** Coefficients are stored in ones' complement form. The input
  magnitude is taken by exact negation, and the product sign is restored by
  negation.
* **Layer-2 wiring.** Which shifted sum enters each layer-2 mux was chosen so
  that every mux replaces a nibble sum by the sum of the nearest equal higher
  nibble, with the highest taking priority. C7 is C2 AND C5.
* **Final shift.** Layer 4 shifts the final sum right by one, which makes Hm
  a pure fraction.
* **Accumulation.** The adder chain in the accumulator, the carry-skip block
  size of 4, and clipping of the output.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed time.

| Testbench | Checks |
|---|---|
| `tb_sign_conv`, `tb_ppg`, `tb_cl_gen`, `tb_mux_l1`, `tb_add_l2`, `tb_add_l3` | The multiplier's parts against formulas computed in integer arithmetic. Random inputs are biased toward equal nibbles so that every control fires. |
| `tb_vhbcse_mult` | 20,000 products against the exact product, within the 0 … 4 LSB truncation bound. Counts the use of each of C1 … C7. |
| `tb_fcp`, `tb_scp` | Set selection and polyphase layout. Symmetry of every coefficient set. |
| `tb_cg` | All 56 signed products for all six filters, against the exact product truncated toward zero. Includes −32768 and +32767 inputs. |
| `tb_rate_gen`, `tb_data_gen`, `tb_cs` | Counter sequences and enable rates. Delay-line contents and sample spacing. Phase selection with one-clock latency. |
| `tb_csk_adder`, `tb_fa` | Sums against integer addition, including whole-block propagate runs. Clipping in both directions. |
| `tb_rrc_interp_top` | The whole filter at its default size. See below. |

`tb_rrc_interp_top` streams samples through all six filters with an
independent reference model:

* It starts with an impulse.
* It switches FLT_SEL and INTP_SEL while data flows.
* It checks every output against the exact filter at the 2-clock alignment
  given above, within 29 LSB.
* It checks that samples are taken every L clocks.
* It counts each filter run, each kind of switch, the filling of the delay
  line after reset and the use of each controlled addition.

All testbenches pass with Verilator 5.

Only simulation was run. No timing, area or power figure of the original
FPGA implementation has been reproduced.

To simulate one testbench with plain Verilator, from the folder that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/rrc_pkg.sv \
        tb/tb_rrc_interp_top.sv --top-module tb_rrc_interp_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. `-y rtl` lets Verilator find
each module in `rtl/<module>.sv`.
