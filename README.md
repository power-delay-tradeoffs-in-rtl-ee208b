# Low-switching RNS arithmetic: isomorph multipliers and a carry-save RNS FIR filter

In a residue number system (RNS) a number X is carried as its remainders
modulo a set of co-prime moduli, here {11, 13, 29}. Addition and
multiplication then split into three independent 4- to 5-bit channels with
no carries between them, and the product 11·13·29 = 4147 gives a dynamic
range just over 12 bits. Short channels mean short critical paths, and the
slack in the channels that are not critical can be spent on reducing power.

This RTL implements three circuits built on that idea:

* **`rns_fir`** – a 16-tap programmable FIR filter in RNS, transposed form,
  with carry-save accumulation and a multiplier per tap that needs only one
  small adder and one table. This is the main design.
* **`iso_mult`** – that multiplier on its own (residues in, residue out),
  for modulus 11 in the top level.
* **`lp_modadd`** – a modulo-m adder that predicts which of its two internal
  adders will produce the answer and freezes the other one behind
  transparent latches, so it does not toggle.

`rns_top` places the three side by side; they share no signals.

## Multiplying by adding indices

Every modulus here is prime, so it has a primitive root q (q = 2 for 11, 13
and 29): the powers q^0 … q^(m-2) mod m visit every non-zero residue once.
Write a = q^x and b = q^y; then a·b mod m = q^((x+y) mod (m-1)). A modular
multiplication becomes: look up the two indices x, y (the *DIT* table), add
them modulo m_I = m-1, and look up the power (the *IIT* table). Zero has no
index and is handled by a zero detector that forces the product to 0.

Adding modulo m_I normally costs a modular adder: x+y and x+y-m_I computed
side by side and a multiplexer. `iso_mult` removes both the second adder and
the multiplexer:

1. The DIT table for operand b (called DIT\*) stores `e = y - m_I` instead
   of y. e is a (K+1)-bit two's complement number, always negative,
   K = ⌈log2 m_I⌉.
2. One (K+1)-bit adder forms `w = x + e = x + y - m_I`, which lies in
   [-m_I, m_I-2].
3. If w ≥ 0, then x+y ≥ m_I, and w is already the reduced index: the
   product is IIT[w] = q^w.
   If w < 0, then x+y < m_I and the wanted index is w + m_I. The low K bits
   of w equal t = w + 2^K, so a second table IIT\*[t] = q^(t - 2^K + m_I)
   gives the product directly.
4. IIT and IIT\* are one table of 2^(K+1) entries addressed by
   `{sign(w), w[K-1:0]}` – twice the entries of a plain IIT, but no
   multiplexer after the adder.

The critical path is DIT → one adder → table.

**Zero codes.** Neither operand can carry a flag through the adder, so zero
is coded inside the index fields: an x equal to all ones (never a valid
index, since m-1 < 2^K for these moduli) and an e with its sign bit clear
(every valid e is negative). The two "det. 0" blocks are simply decoders of
these codes. A modulus with m-1 a power of two (5, 17, 257) has no spare x
code and is rejected at elaboration.

All tables are computed while elaborating, from the modulus alone
(`rns_pkg::prim_root`, `dlog`, `powmod`), and synthesize as combinational
logic: IIT entry i = {s, t} holds q^t mod m for s = 0, t ≤ m_I-2, and
q^(t - 2^K + m_I) mod m for s = 1, t ≥ 2^K - m_I; unused entries are 0.

`iso_mult_core` is the part after the DIT tables (inputs x and e);
`iso_mult` adds the DIT and DIT\* tables in front of it.

## The filter

```
x_in ─► bin2rns_dit (×3) ─► input reg ─► 16 × [iso_mult_core + 3:2 CSA] ─► tap regs ─► CPA + mod m ─► y_res
                                              ▲ coefficient e_k registers
```

**No DIT tables in the taps.** Every tap multiplies the same sample, so
the sample's index is looked up once, in the binary-to-RNS converter
(`bin2rns_dit`: x mod m, then the index). The coefficients are loaded
directly as indices; each tap register stores e_k = y_k - m_I, worked out
when the coefficient is written. A tap multiplier is therefore just the
adder and the IIT/IIT\* table.

**Carry-save delay line.** In transposed form, tap k computes
R_k ← h_k·x + R_(k+1). Here R_k is kept as a pair of sum and carry vectors
and the addition is a single 3:2 carry-save adder, so a tap's path is
multiplier + one full-adder level. The partial sums are not reduced mod m in
the taps: they are ordinary binary numbers, AW = ⌈log2(16·(m-1)+1)⌉ bits wide
(8 or 9 bits), which cannot overflow. The output stage adds the two vectors
of tap 0 and reduces the result modulo m once per sample.

Each modulus is a separate `fir_channel`; the three run in lock step.

### Interface and timing (`rns_fir`)

| signal | width | |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset (clears the delay line, all coefficients become 0) |
| `coef_we`, `coef_tap` | 1, 4 | write the coefficient of one tap |
| `coef_zero[3]` | 1 each | per modulus: the coefficient is 0 mod m |
| `coef_idx[3]` | 5 each | per modulus: index y with 2^y ≡ h (mod m) |
| `x_valid`, `x_in` | 1, 12 | an unsigned input sample |
| `y_valid`, `y_res[3]` | 1, 5 each | the output residues mod 11, 13, 29 |

One sample per clock at most. `y_valid` follows `x_valid` by exactly three
cycles, and `y_res[i] = (Σ_k h_k·x(t-k)) mod MODULI[i]`, where t counts
valid samples only: cycles without `x_valid` leave the delay line alone.
The value is exact modulo 4147; converting back to binary (for example with
the Chinese remainder theorem) is left to the user. Coefficients can be
rewritten at any time, but samples already in the delay line keep the
products of the old coefficients; feeding 16 zero samples first empties it.

To load a coefficient h: for each modulus m, r = h mod m; if r = 0 set
`coef_zero`, otherwise set `coef_idx` to the y in [0, m-2] with 2^y mod m = r.

## The latch-gated modular adder (`lp_modadd`)

A modular adder computes a+b (right path) and a+b-m (left path: carry-save
adder with the constant -m, then an (n+1)-bit adder whose MSB is the sign)
and lets the sign choose. Usually only one of the two results is needed.
A prediction function looking at the top two bits of each operand decides:

| case | condition (from the top bits) | latches open |
|---|---|---|
| RIGHT | largest possible a+b < m | right only |
| LEFT | smallest possible a+b ≥ m | left only |
| BOTH | undecided | both; the sign selects |

Each path takes its operands through a pair of transparent latches that are
open only while the path is enabled, so a disabled path holds its old inputs
and does not switch. The select is forced by RIGHT/LEFT and comes from the
left path's sign in the BOTH case.

For m = 11 this rule is F_R = ā3·b̄3·(ā2 + b̄2) (a ≤ 7 and b ≤ 3, or the
other way round) and F_L = a3·b2 + a2·b3 + a3·b3 (a ≥ 8 and b ≥ 4, or the
other way round). Of the 121 operand pairs, 48 use only the right adder,
33 only the left path and 40 both.

The latches are intentional and are the only latches in the design. The
adder is combinational from a, b to s; the prediction adds its own delay and
a latch delay in front of the modular addition. This technique saves little
power for an adder this small (published figures for m = 11: about 5 % less
power for 15 % more delay), because the latches cost almost what they save.

## Departures and choices

Where the published description leaves details open, this implementation
makes the following choices:

* Input samples are 12-bit unsigned; coefficient and sample signedness are
  not defined, results are exact modulo 4147. No RNS-to-binary converter.
* The carry-save filter keeps binary (unreduced) partial sums and reduces
  modulo m once at the output. The published filter uses carry-save adders
  and registers per tap; how it reduces is not described.
* Pipeline of three registers (input, taps, output) and the load port.
* Zero codes for indices; one merged IIT/IIT\* table; the smallest primitive
  root as q.
* The adder's prediction is a generic top-two-bit range test that equals the
  published m = 11 functions; other moduli get the same kind of rule.
* The simplified adders for m = 2^n and m = 2^n-1, the plain modular adder
  and the earlier versions of the isomorph multiplier (with a modular adder,
  or with a carry-save adder and the constant -m_I) are not included: they
  are the reference points the three circuits improve upon.
* All binary adders (the two paths of the modular adder, the index adder of
  the multiplier, the output adder of each filter channel) are single-level
  carry-lookahead adders (`cla_add`).
* Nothing here checks delay or power; the RTL reproduces the structure and
  the function, not the published timing and power figures.

## Files

| file | |
|---|---|
| `rtl/rns_pkg.sv` | moduli and elaboration-time table functions |
| `rtl/cla_add.sv` | carry-lookahead adder used for every binary adder |
| `rtl/iso_mult_core.sv` | adder + IIT/IIT\* multiplier on indices |
| `rtl/iso_mult.sv` | DIT, DIT\* + core |
| `rtl/bin2rns_dit.sv` | binary → residue index converter |
| `rtl/fir_channel.sv` | one modulus channel of the filter |
| `rtl/rns_fir.sv` | the 16-tap filter |
| `rtl/lp_modadd.sv` | latch-gated modular adder |
| `rtl/rns_top.sv` | the three circuits side by side |
| `tb/tb_*.sv` | self-checking testbenches; `tb_rns_ref_pkg.sv` holds reference arithmetic |

## Verification

Each testbench computes its expected values independently (brute-force
discrete logarithms, integer convolution, Chinese-remainder reconstruction)
and prints `TB_RESULT checks=N failures=M`.

* `tb_iso_mult`, `tb_iso_mult_core`, `tb_bin2rns_dit`: exhaustive over all
  operands for moduli 11, 13 and 29 (the converter over all 4096 inputs).
* `tb_cla_add`: the carry-lookahead adder at 5 bits (exhaustive) and 9 bits.
* `tb_lp_modadd`: exhaustive and random operand orders for m = 11, 13, 29;
  checks the m = 11 enables against F_R/F_L and the 48/33/40 split, and that
  a closed path is never the one selected.
* `tb_fir_channel`, `tb_rns_fir`: random coefficients and samples with idle
  cycles, an impulse response, coefficient reload, 3-cycle latency.
* `tb_rns_top`: the whole design at default size; it also counts that every
  mechanism occurred (idle cycles, zero samples and coefficients, both table
  halves, reload, the three adder cases with both selections in the BOTH
  case, multiplier zero bypass).

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rns_pkg.sv tb/tb_rns_ref_pkg.sv tb/tb_rns_top.sv --top-module tb_rns_top
./obj_dir/Vtb_rns_top
```

Every testbench finishes in well under a second.
