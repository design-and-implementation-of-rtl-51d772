# FIR filters with multi-bit flip-flop delay lines

A direct-form FIR filter spends most of its clock power in the registers of
its tapped delay line, because every register has its own clock pin and its
own pair of clock inverters. A *multi-bit flip-flop* (MBFF) merges several
flip-flops under one clock driver. The filters here use that idea in a
particular way. The delay line is not a chain of single registers. Each
delay stage is one MBFF whose words are all loaded with the same sample, and
each word drives its own multiplier. A filter with n coefficients therefore
needs only a few register stages, and its output settles after fewer clock
edges than a chain of n-1 registers would need.

There are three filters: 5, 7 and 9 taps. Each uses unsigned 4-bit samples,
unsigned 4-bit coefficients and an 8-bit output. Each is built from array
multipliers and a chain of carry-lookahead adders.

## What the filters compute

Read this section before using the filters as drop-in FIR filters.

Two or three coefficients share each register stage, so several taps see the
*same* delayed sample:

| filter      | register stages                       | output                                                                  | final value on edge |
|-------------|---------------------------------------|-------------------------------------------------------------------------|---------------------|
| `fir5_mbff` | 2-bit MBFF → 1 register               | (H1+H2)·x(k) + (H3+H4)·x(k-1) + H5·x(k-2)                               | 2 |
| `fir7_mbff` | 2-bit MBFF → 2-bit MBFF → 1 register  | (H1+H2)·x(k) + (H3+H4)·x(k-1) + (H5+H6)·x(k-2) + H7·x(k-3)              | 3 |
| `fir9_mbff` | 3-bit MBFF → 3-bit MBFF               | (H1+H2+H3)·x(k) + (H4+H5+H6)·x(k-1) + (H7+H8+H9)·x(k-2)                 | 2 |

This is **not** the textbook n-tap response y(k) = H1·x(k) + H2·x(k-1) + … +
Hn·x(k-n+1). Each filter behaves as a shorter FIR filter whose coefficients
are sums of pairs or triples of the H inputs. The structure was built as
specified, and its reference simulation depends on it. With xin = 8 and
H1..H5 = 7, 2, 1, 10, 3, the 5-tap filter reads 72 before the first clock
edge, 160 after it and 184 from the second edge on. A five-register chain
would step through 72, 80, 160 and 184 and settle only on the fourth edge.
If you need the true n-tap response, feed each multiplier from its own stage
(see "Changing the design").

"Final value on edge N" means this: when a constant input is applied and
held, the output stops changing after the N-th rising clock edge. That is the
register depth of the filter.

## Structure

```
 fir5_mbff                                     fir9_mbff
 xin ──┬──────────────── H1                    xin ─┬────────────────────── H1,H2,H3
       ├──────────────── H2                         │  ┌ 3-bit MBFF ┐
       │  ┌ 2-bit MBFF ┐                            ├─►│ word0 ─────┼─┬──── H4 ──► word0 ─ H7
       ├─►│ word0 ─────┼─ H3                        ├─►│ word1 ─────┼─┼──── H5 ──► word1 ─ H8
       └─►│ word1 ─────┼─┬ H4                       └─►│ word2 ─────┼─┴──── H6 ──► word2 ─ H9
          └────────────┘ └► dfff ─ H5                  └────────────┘   (second 3-bit MBFF)

 products: fastmul (4x4 -> 8), one per tap
 sum:      ((((p1 + p2) + p3) + p4) + ...) with one lookahead adder per '+'
```

`fir7_mbff` is `fir5_mbff` with a second 2-bit MBFF placed after the first.
It copies the first MBFF word for word. Its word 1 drives H5 and the single
register in front of H7, and its word 0 drives H6.

The files, from the bottom up:

| file                | what it is |
|---------------------|------------|
| `rtl/fir_pkg.sv`    | package with the default widths: `DATA_W` = 4, `COEF_W` = 4, `OUT_W` = 8 |
| `rtl/dfff.sv`       | one-sample delay register (the "1-bit" flip-flop), W bits, synchronous reset |
| `rtl/dmbff.sv`      | multi-bit flip-flop: `NBITS` words of W bits under one clock and reset |
| `rtl/fastmul.sv`    | unsigned array multiplier, AW × BW → AW+BW |
| `rtl/lookahead.sv`  | N-bit carry-lookahead adder with carry in and out |
| `rtl/fir_sop.sv`    | one multiplier per tap plus the adder chain (sum of products) |
| `rtl/fir5_mbff.sv`, `rtl/fir7_mbff.sv`, `rtl/fir9_mbff.sv` | the three filters |
| `rtl/fir_mbff_top.sv` | the three filters side by side. They share clk and rst; each has its own `xin*`, `h*tap` and `dataout*` |

## Multi-bit flip-flop

The power saving of an MBFF comes from the standard cell. Two master-slave
flip-flops share one pair of clock inverters and one clock pin instead of
having two. RTL cannot express that cell. `dmbff` expresses the *grouping*
instead: one `always_ff` loads all `NBITS` words on the same edge under one
reset, so a synthesis or placement flow can map the group onto a multi-bit
cell. Each "bit" of the MBFF holds a whole 4-bit sample, so a "2-bit MBFF"
is 8 flip-flops in two 4-bit words.

In these filters all words of one MBFF always hold the same value. A
synthesis tool that merges equivalent registers will fold each MBFF into a
single 4-bit register unless you tell it to keep duplicates. Yosys does this
and reports 28 flip-flops for the three filters, not the 56 that are
written. If you need the drawn flip-flop count (12, 20 and 24 for 5, 7 and 9
taps), add keep attributes or turn off register merging.

## Arithmetic

- **Multiplier** (`fastmul`): AND gates form the partial products. Each
  further row of full adders adds one partial-product row in carry-save
  form, so no carry ripples inside a row. Each row retires one low product
  bit, and a final ripple-carry row produces the upper half. The 4 × 4
  instance has 12 full adders in three carry-save rows plus a 4-bit final
  row.
- **Adder** (`lookahead`): generate g = a·b and propagate p = a⊕b per bit.
  Every carry is a flat sum of products:
  c(i) = g(i-1) + p(i-1)g(i-2) + … + p(i-1)…p(0)·cin.
  This is a single lookahead level across the whole word, with no block
  hierarchy.
- **Output width**: products are 8 bits and the adder chain is 8 bits wide.
  Carry-outs are dropped, so the output is the true sum **modulo 256**.
  For 4-bit inputs the true sum can reach 5·225 = 1125 (5 taps),
  1575 (7 taps) or 2025 (9 taps). Keep coefficients small enough, or widen
  `OUT_W`. The products are zero-extended to `OUT_W` bits.

## Timing and reset

- All registers load on the rising edge of `clk`.
- `rst` is synchronous and active high. It clears every delay register on
  the next rising edge. Coefficients are inputs and are not affected.
- `dataout` is combinational from `xin`, `h` and the registers. There is no
  output register, so a change of `xin` shows up in the same cycle through
  the H1/H2(/H3) products. The critical path is multiplier → n-1 adders in
  series. Register the output yourself if the filter must drive a
  registered interface.
- Coefficients may change at any time. The output follows them in the same
  cycle.

## How far it can be trusted

- The structure of each filter is taken from block diagrams. The 5-tap
  filter is also checked against a reference simulation (72 / 160 / 184,
  above). The 7- and 9-tap filters have no reference waveform. Their
  register depth matches the stated latencies (edge 3 and edge 2) and their
  flip-flop counts.
- The diagram of the 9-tap filter does not clearly show which first-stage
  word feeds which multiplier. This changes nothing, because all words of a
  stage hold the same sample.
- The widths of the 7- and 9-tap filters are not specified. They reuse the
  5-tap widths.
- Choices made here: signedness (unsigned), reset (synchronous, active high)
  and carry handling (dropped). The internal arrangement of the multiplier
  and the adder is also a choice. Only the type was given: array multiplier,
  carry-lookahead adder.
- Not included: the comparison version with one register per tap; the
  transistor-level master-slave flip-flop and its shared clock inverters;
  any timing, area or power figures.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/fir_mbff_top_tb.sv \
          --top-module fir_mbff_top_tb -Mdir obj_top
./obj_top/Vfir_mbff_top_tb
```

Swap in any other testbench name (`fir5_mbff_tb`, `dmbff_tb`,
`lookahead_tb`, …). Verilator finds the other modules in `rtl/` by file name.

- `fir_mbff_top_tb` runs all three filters at the default widths. It replays
  the 72 / 160 / 184 reference on the 5-tap filter. It runs step responses
  that must settle exactly on edges 2, 3 and 2, then 1000 cycles of
  independent random data with coefficient changes and mid-stream resets.
  It counts resets, on-time settling, coefficient changes and 8-bit
  wrap-around, and fails if any of them never happened.
- `fir5_mbff_tb`, `fir7_mbff_tb` and `fir9_mbff_tb` each test one filter
  against a model that holds its own sample history.
- `fastmul_tb` tests all 256 products of the 4 × 4 multiplier and a random
  6 × 5 instance. `lookahead_tb` tests every 8-bit case with both carry-in
  values and a random 13-bit instance.
- `dfff_tb` and `dmbff_tb` check capture on the edge, hold between edges and
  reset. `dmbff_tb` also checks that no word lags or swaps with another.

## Changing the design

- Widths: pass `DATA_W`, `COEF_W` and `OUT_W` to a filter or to the top. The
  multiplier and the adders follow. For a result that cannot wrap, use
  `OUT_W` ≥ `DATA_W + COEF_W + ceil(log2(taps))`.
- True n-tap response: in `fir5_mbff`, feed `tap[i]` with x(k-i) from a
  4-stage chain instead of the MBFF copies. `fir_sop` does not change.
- Wider MBFFs: `dmbff` takes any `NBITS`. `fir9_mbff` is the 3-word case.
