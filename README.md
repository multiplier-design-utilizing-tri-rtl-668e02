# Ternary residue-logarithmic multiplier

An approximate multiplier for unsigned **ternary** (base-3) operands. The
multiplication becomes an addition of base-3 logarithms. The integer part of
each logarithm (the *characteristic*) is carried in a small residue number
system with moduli {8, 9}. The result is turned back into a ternary number by
an antilogarithm shifter. There is no partial-product array. The cost is
accuracy: the product is typically within a few percent of the exact value
(mean relative error about 4 % over random operands).

The design targets tri-valued logic, where every wire carries "0", "1" or "2".
In this RTL a trit travels on two binary wires (`00`, `01`, `10`; `11` never
occurs). The ternary gates the circuit is drawn with (inverter, min/max
AND/OR, 3-input multiplexer) are functions in `tvl_pkg`. The structure of the
datapath is kept: which multiplexer rows, detectors and correction tables
exist and how they connect. The electrical side of ternary CMOS (three supply
levels, transistor-level gates) has no RTL form and is not modelled.

The main configuration is `NT = 6` trits per operand, sized to stand in for
an 8-bit binary multiplier (255 = 100110₃). It gives an 11-trit product.
`NT = 11` (16-bit class) and `NT = 21` (32-bit class) are the same RTL with
one parameter changed. All three are simulated.

Everything is combinational. There is no clock, no reset and no handshake:
`z` follows `x` and `y` after the logic settles.

## Dataflow

```
 x ─► tlog_conv ─► c_x ─► fwd_conv ─► (c_x mod 8, c_x mod 9) ─┐
                 └► m_x (corrected mantissa, NT trits) ───────┤
 y ─► tlog_conv ─► c_y ─► fwd_conv ─► (c_y mod 8, c_y mod 9) ─┤
                 └► m_y ──────────────────────────────────────┤
                                                              ▼
                                rlns_adder: mn = frac(m_x + m_y), carry
                                            t1 = (c_x + c_y + carry) mod 8
                                            t2 = (c_x + c_y + carry) mod 9
                                                              │
                                crt_rev:    T from (t1, t2)   │
                                                              ▼
                                tantilog_conv: alec(mn) placed in the top NT
                                trits of a (2NT-1)-trit shifter, shifted down
                                by T' = STI(T + V) = (2NT-2) - T  ─► z
```

A zero operand forces `z = 0`, because the logarithm of zero does not exist.

## Logarithm of a ternary number

Write `x = 3^c · (d + f)`, where `d ∈ {1, 2}` is the leading non-zero trit at
position `c` and `f` is the fraction formed by the trits below it.

* **`ltd`**, the leading trit detector, keeps only the leading non-zero trit.
  A chain of ternary multiplexers carries a "nothing non-zero above" signal
  downwards, and each output is the ternary AND of its input and that signal.
  Up to 6 trits the chain is flat. Wider detectors are built from 6- and
  5-trit blocks (11 = 6+5, 21 = 6+5+5+5). A small detector over the blocks'
  non-zero flags chooses the leading block, and a row of multiplexers
  ("block M") zeroes the outputs of every other block.
* **`cvi`**, the characteristic value identifier, is a ROM. The active
  detector line `j` drives the ternary code of `j`, which is `c`. It has
  `clog3(NT)` trits: 2 for NT = 6 and 3 for NT = 11 and 21.
* **`tlog_shifter`** (rotating, NT trits) rotates `x` right by `c`. This
  moves the leading trit to position 0 and lifts the `c` trits below it to
  the top, left-aligned and zero-padded. Position 0 is dropped. The upper
  NT-1 trits are the raw mantissa `m_-1 … m_-(NT-1)`. Stage `i` of the
  shifter is one row of ternary multiplexers that shifts by 0, 3^i or
  2·3^i positions according to trit `i` of the control.
* **`lec`**, the logarithmic error correction, is needed because simply
  dropping the leading trit is a poor log3 in base 3. For example,
  log3(2) = 0.63, but `d` can be 1 or 2. The correction looks at
  M3 M2 M1 = the leading trit and the next two trits. "inv" below means
  *selected inversion*: a "2" becomes "0", while "0" and "1" stay.

  | condition | M3 M2 M1 | corrected mantissa (NT trits, weight 3⁻¹ first) | covers log3 of |
  |---|---|---|---|
  | 1 | 2xx or 12x | M3, m_-1 … m_-(NT-1) | 1.2… to 2.9… |
  | 2 | 111, 112 | M3, inv(m_-1 …); for 111 the second trit becomes 0 | 1.1… |
  | 3 | 110 | inv(m_-1 …), 0 | 1.10… |
  | 4 | 10x | m_-1 …, 0 | 1.0… |

  Worked example: 192 = 021010₃ has c = 4 and M3 M2 M1 = 210, so
  condition 1 applies. The mantissa is 0.210100₃ and log3 192 ≈ 4.7901
  (exact value 4.7855).

The resulting logarithm codes increase monotonically with the operand. That
is why an addition of two codes can be mapped back by a second piecewise
table (below).

## Residue path of the characteristic

The characteristics never exceed 2NT-2, so an RNS with M = 72 holds their
sum with room to spare. The moduli are {3² − 1, 3²} = {8, 9}.

* `fwd_conv` gives c mod 8 and c mod 9, each as 2 trits. Mod 9 keeps the low
  two trits. For mod 8, the higher trits fold back because 9 ≡ 1 (mod 8).
* `rlns_adder` uses one NT-trit ripple ternary adder for the two mantissas.
  Its carry enters both 2-trit residue adders, and each 3-trit sum is reduced
  by its modulus.
* `crt_rev` computes `T = <<t1·1>₈·9 + <t2·8>₉·8>₇₂`. The constants are the
  CRT weights M1 = 9 and M2 = 8 and the inverses N1 = 9⁻¹ mod 8 = 1 and
  N2 = 8⁻¹ mod 9 = 8. T has 4 trits.

Functionally T is just `c_x + c_y + carry`. The residue channels are the
design's way of computing it.

## Antilogarithm and the shift-control trick

* **`alec`**, the antilogarithmic correction, turns the added mantissa `mn`
  into NT trits of 3^mn, written `I.III…` with one integer trit. It undoes
  the logarithmic table:

  | m_-1 | m_-2 | m_-3 | output |
  |---|---|---|---|
  | 2 | – | – | mn unchanged (2.xxx) |
  | 0 | – | – | 1, then mn moved down one trit (1.0xx) |
  | 1 | 2 | – | mn unchanged (1.2xx) |
  | 1 | 1 | – | 1 1 2, then m_-4 … |
  | 1 | 0 | ≠0 | 1 1 1, then m_-4 … |
  | 1 | 0 | 0 | 1 1 0, then m_-4 … |

* **`tantilog_conv`** puts those NT trits at the top of a (2NT-1)-trit
  zero-filling shifter, so the integer trit sits at position 2NT-2. It then
  shifts them down by `2NT-2 − T`, which leaves the integer trit at position
  T. Trits that fall below position 0 are dropped, so the result is
  truncated.
* **`ctrl_adjust`** produces that shift amount without a subtractor. It
  adds a constant V and inverts every trit (standard ternary inverter,
  `d → 2−d`) over K trits: `STI(T + V) = 3^K − 1 − V − T`. Choosing
  `V = 3^K − 1 − (2NT−2)` gives `(2NT−2) − T`. For the three sizes this is
  V = 121₃ (NT = 6, K = 3), 020₃ (NT = 11, K = 3) and 1111₃ (NT = 21, K = 4).
  `tvl_pkg::adjust_v` computes V from NT.

**Range.** The product's characteristic must be at most 2NT-2. For NT = 6
that is products up to 3^11 − 1, and the design is meant for 8-bit operands
(255 · 255 = 65025, characteristic 10). Larger 6-trit operands, up to 728,
can push T to 11. T + V then wraps and the output is wrong. The hardware
has no flag for this. In simulation, an assertion in the top prints a
warning.

## Parameters and sizes

| module | parameter | default | meaning |
|---|---|---|---|
| `rlns_tvl_mult` and most blocks | `NT` | 6 | operand trits (also 11, 21) |
| derived | `CT = clog3(NT)` | 2 | characteristic trits |
| derived | `K = clog3(2NT−1)` | 3 | antilog shifter control trits |
| `tvl_pkg` | moduli, M, CRT constants | 8, 9, 72 | fixed |

Ports of the top: `x[NT-1:0]`, `y[NT-1:0]`, `z[2NT-2:0]`, all `trit_t`
vectors, index 0 least significant.

NT must be at least 4. The correction tables read the three leading trits.

## Accuracy

The testbenches compare `z` bit-exactly with an independent integer model of
the same algorithm. They also measure the error against the true product:

| NT | operands | mean relative error |
|---|---|---|
| 6 | 500 random 8-bit pairs | 4.06 % |
| 11 | 500 random 16-bit pairs (spread over magnitudes) | 3.57 % |
| 21 | 500 random 32-bit pairs (spread over magnitudes) | 4.12 % |

Single products can be off by up to about 21 %.

## Where this RTL makes its own choices

* **Trit encoding** is two binary wires per trit (see above).
* **Zero operands** return `z = 0`. The detector's `zero` output exists for
  this.
* **LEC for NT > 6.** The selected inversion applies to every mantissa trit.
  Conditions 3 and 4 fill the freed least significant trit with 0.
* **ALEC rows for m_-1 = 1** are an interpretation of "reverse the 112 / 111
  / 110 corrections". The rows for m_-1 = 2 and m_-1 = 0 follow directly.
* **Added-mantissa width** is NT trits. This is the width of the corrected
  mantissas and the width the antilog correction reads.
* **One shared mantissa adder** feeds both residue channels. Writing the two
  channel sums separately gives the same result.
* **Forward converter, modulo reduction and CRT** are written as small
  arithmetic expressions on 2–4 trits, not as ternary gate netlists. Only
  their function is specified.
* **Grouping of wide detectors.** The 6-trit block sits at the least
  significant end.
* **Shift direction of the logarithm shifter.** The shifter is read as a
  rotation that leaves the leading trit in the least significant position.
* **No overflow flag in hardware.** A simulation assertion reports the case
  instead (see Range).

## Files

* `rtl/tvl_pkg.sv`: trit type, ternary gates, moduli and sizing functions.
* `rtl/rlns_tvl_mult.sv`: the top.
* Logarithm: `rtl/tlog_conv.sv` (wraps `ltd`, `cvi`, `tlog_shifter` and
  `lec`).
* Residue path: `rtl/fwd_conv.sv`, `rtl/rlns_adder.sv` and `rtl/crt_rev.sv`,
  with helpers `rtl/tadd.sv` (ripple ternary adder) and `rtl/tmod.sv`
  (residue).
* Antilogarithm: `rtl/tantilog_conv.sv` (wraps `ctrl_adjust`, `alec` and
  `tlog_shifter`).
* `tb/tb_<block>.sv`: one self-checking testbench per block. `tb/tb_ref_pkg.sv`
  holds the integer reference model and the trit helpers.
  `tb/tb_rlns_tvl_mult.sv` runs the default-size top over all 65 536 8-bit
  operand pairs, and `tb/tb_rlns_tvl_mult_sizes.sv` runs NT = 11 and 21.

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
A watchdog ends a run that hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/tvl_pkg.sv tb/tb_ref_pkg.sv tb/tb_rlns_tvl_mult.sv \
  --top-module tb_rlns_tvl_mult
./obj_dir/Vtb_rlns_tvl_mult
```

Replace the testbench name to run another. To change the operand width,
override `NT` on `rlns_tvl_mult`. Every other size follows from it. Lint a
module with `verilator --lint-only -Wall -y rtl rtl/tvl_pkg.sv rtl/<module>.sv`.
