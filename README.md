# Carry select adders with a binary to excess-1 converter

A carry select adder (CSLA) splits a wide addition into groups. Every group
computes its result twice, once for a carry in of 0 and once for a carry in of 1,
before the real carry is known. When the carry arrives it only has to drive a
multiplexer, so it crosses a group in one mux delay instead of a ripple of full
adders. The classic CSLA pays for that speed with two ripple carry adders (RCAs)
per group.

The adder here keeps the carry-in-0 ripple adder and drops the carry-in-1 one.
A result for carry in 1 is simply the carry-in-0 result plus one. A
**binary to excess-1 converter (BEC)** forms that +1 with an inverter, XOR gates
and an AND chain, and uses no adder cells at all. Less logic means less area and
power. The price is a slightly longer path inside each group, because the BEC
sits behind the ripple adder.

Next to it is a second, independent adder: the **reduced-logic CSLA**. It
shares one half-adder stage and duplicates only the carry chain.

Everything is combinational. There is no clock, no register and no reset.

## The BEC carry select adder (`csla_bec`)

Defaults: `WIDTH = 32` operand bits, in `GROUP = 4`-bit groups (8 groups).

```
        a[3:0] b[3:0]        a[7:4] b[7:4]                 a[31:28] b[31:28]
            |                    |                              |
 cin ->  [ RCA ]            [ RCA, ci=0 ]--{c0,s0}--+      [ RCA, ci=0 ]--+
            |                    |                 |            |        |
            |                 [ BEC 5b ]           |         [ BEC 5b ]  |
            |                    | {c0,s0}+1       |            |        |
            |                 [ mux: 1 | 0 ]<------+         [ mux ]<----+
            |                    |                              |
  sum[3:0], grp_carry[0] --sel-> sum[7:4], grp_carry[1] --> ... sum[31:28], cout
```

- **Group 0** sees the adder's real carry in. It is a plain 4-bit ripple adder.
- **Groups 1 to 7** each have three parts:
  - A 4-bit RCA with its carry in tied to 0. It produces a 5-bit word `{c0, s0}`.
  - A 5-bit BEC. It turns that word into `{c0, s0} + 1`, the result for carry in 1.
  - A 5-bit 2:1 multiplexer (`carry_select_mux`), selected by the carry out of
    the group below.
- The top bit of each selected word is that group's carry out. It is brought out
  on `grp_carry[g]`, and `grp_carry[7]` is `cout`.
- The BEC is one bit wider than the group because it must also increment the
  group's carry. The 5-bit word never equals `11111`, since two 4-bit numbers
  sum to at most 30. So the BEC's wrap-around never shows up at the output.

**Critical path:** one 4-bit ripple (group 0), then one multiplexer per later
group. Each later group's RCA, BEC and mux inputs settle in parallel, while the
carry is still travelling up from below.

**Choices made here.** The source fixes the BEC replacing the carry-in-1 adder,
the BEC fed by the carry-in-0 result, the n+1-bit BEC width and the 32-bit
width. It does not fix the group sizes. Uniform 4-bit groups were chosen to
match the 4-bit converter. A square-root arrangement (2, 2, 3, 4, 5, ... bit
groups) would shorten the critical path further. To get one, change the group
loop in `rtl/csla_bec.sv`; the `rca`, `bec` and `carry_select_mux` cells already
take any width. `WIDTH` must be a multiple of `GROUP`; an elaboration-time
assertion checks this.

## The binary to excess-1 converter (`bec`)

```
x[0] = ~b[0]
x[i] =  b[i] ^ (b[i-1] & ... & b[0])      i >= 1
```

For 4 bits this is the textbook circuit:

- `X0 = ~B0`
- `X1 = B1 ^ B0`
- `X2 = B2 ^ (B1 & B0)`
- `X3 = B3 ^ (B2 & B1 & B0)`

The AND terms are built as a running prefix chain, so a `WIDTH`-bit converter
has `WIDTH-1` AND gates, `WIDTH-1` XOR gates and one inverter. For 5 bits that
is 8 gates. The second 4-bit ripple adder that it replaces takes about 20
gates, at five gates per full adder.

## The reduced-logic carry select adder (`rl_csla`)

Default `WIDTH = 32`. It is built as one ungrouped unit from four parts:

| unit | module | function |
|------|--------|----------|
| HSG, half sum generation | `hsg` | `hs = a ^ b`, `hc = a & b` |
| CG0 / CG1, carry generation | `carry_gen` (`CIN` = 0 / 1) | `c[i] = hc[i] \| (hs[i] & c[i-1])`, `c[-1] = CIN` |
| CS, carry selection | `carry_sel` | `c = cin ? c1 : c0` |
| FSG, full sum generation | `fsg` | `sum = hs ^ {c[WIDTH-2:0], cin}`, `cout = c[WIDTH-1]` |

- The fixed carry in of CG0 and CG1 is a parameter. In CG0, bit 0 folds to
  `hc[0]`. In CG1, it folds to `hs[0] | hc[0]`.
- Both carry words are ready before `cin` matters. After that, `cin` drives only
  one multiplexer level and the final XOR.
- The source names the four units and how they connect, but prints no gate
  equations. The equations above are the standard generate/propagate forms.
- The "control signal" of the CS unit is taken to be the adder's carry in.

## Top level (`csla_top`)

`csla_top` holds both adders side by side. They share nothing. Its ports:

| port | width | direction | meaning |
|------|-------|-----------|---------|
| `bec_a`, `bec_b`, `bec_cin` | WIDTH, WIDTH, 1 | in | operands of the BEC adder |
| `bec_sum`, `bec_cout` | WIDTH, 1 | out | `bec_a + bec_b + bec_cin` |
| `bec_grp_carry` | WIDTH/GROUP | out | carry out of each BEC-adder group |
| `rl_a`, `rl_b`, `rl_cin` | WIDTH, WIDTH, 1 | in | operands of the reduced-logic adder |
| `rl_sum`, `rl_cout` | WIDTH, 1 | out | `rl_a + rl_b + rl_cin` |

Parameters: `WIDTH` (default 32) and `GROUP` (default 4). The defaults live in
`rtl/csla_pkg.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/csla_pkg.sv` | default widths |
| `rtl/full_adder.sv`, `rtl/rca.sv` | full adder cell and N-bit ripple carry adder |
| `rtl/bec.sv` | binary to excess-1 converter |
| `rtl/carry_select_mux.sv` | group result multiplexer |
| `rtl/csla_bec.sv` | the BEC carry select adder |
| `rtl/hsg.sv`, `rtl/carry_gen.sv`, `rtl/carry_sel.sv`, `rtl/fsg.sv` | units of the reduced-logic adder |
| `rtl/rl_csla.sv` | the reduced-logic carry select adder |
| `rtl/csla_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench works out the expected values itself, with integer arithmetic,
and compares the outputs against them. Each one ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog that fails the run if it
hangs.

To run one with Verilator (here the end-to-end test of the top level):

```
verilator --binary --timing --assert -Irtl rtl/csla_pkg.sv tb/tb_csla_top.sv \
          --top-module tb_csla_top -Mdir obj_tb_csla_top
./obj_tb_csla_top/Vtb_csla_top
```

What the testbenches cover:

- **Exhaustive:** the full adder, the 4-bit and 5-bit BECs, the 4-bit RCA, and a
  5-bit reduced-logic adder.
- **Directed and random vectors:** the 32-bit adders, a 12-bit/3-bit-group BEC
  adder, and an 8-bit RCA. The directed cases include a carry that ripples from
  `cin` through every group to `cout`.
- **`tb_csla_top`** runs the top at its default parameters for about 20,000
  vector pairs. It counts each mechanism and fails if any never happened:
  - a group selecting its excess-1 result;
  - a group selecting its ripple result;
  - a full-length carry ripple;
  - a carry out from each adder;
  - the CS unit choosing the CG1 word and the CG0 word where the two differ.

## How far this follows the source

Taken from the source:

- the ripple adder structure;
- the 4-bit BEC equations;
- the BEC replacing the carry-in-1 ripple adder, with an n+1-bit BEC fed by the
  carry-in-0 result;
- the 32-bit adder width;
- the HSG / CG0 / CG1 / CS / FSG decomposition and its connections.

Choices made in this design:

- uniform 4-bit groups;
- a plain ripple adder in group 0;
- the `grp_carry` observation port;
- the gate-level equations of the reduced-logic units;
- that unit's 32-bit default width and its single ungrouped structure.

Not included: the carry skip adder and the conventional dual-RCA CSLA. The
source uses them only as comparison baselines.

The source's power, area and gate-count figures are not reproduced. They
depend on a technology mapping it does not specify.
