# 8-bit Vedic multiplier with selectable adder architecture

An unsigned 8x8 multiplier built by the *Urdhva Tiryakbhyam* ("vertically and
crosswise") method of Vedic arithmetic. A conventional array multiplier adds
its partial products one row at a time. This design instead splits each
operand into halves, forms every cross product of the halves at once, and
adds the cross products in a shallow tree of adders. The split is applied
recursively, so the design is a hierarchy 8x8 -> 4x4 -> 2x2.

The published design this RTL follows is built three times, once with each
of three adder architectures: ripple carry (RCA), carry lookahead (CLA) and
carry skip (CSKA). The three variants compute the same product. They differ
only in delay, area and power. Here the adder architecture is one parameter,
`ADDER`, of type `vedic_pkg::adder_kind_e`. It applies to every adder in the
multiplier, including those inside the 4x4 blocks.

Everything is combinational. There is no clock, no reset and no register. A
product is valid one settling time after the operands change.

## The idea in one level

Write an N-bit operand as two N/2-bit halves, `a = {aH, aL}` and `b = {bH, bL}`.
Then

    a*b = aH*bH * 2^N  +  (aH*bL + aL*bH) * 2^(N/2)  +  aL*bL

The four half-width products are independent and are formed in parallel by
four smaller Vedic multipliers. The design's real content is how those four
products are aligned and added, with as few and as narrow adders as possible.
The two levels do this differently, as the next sections show.

## 2x2 cell (`vedic_mul2`)

This is the method applied directly to columns:

| product bit | column content                     |
|-------------|------------------------------------|
| p0          | a0·b0 (vertical)                   |
| p1          | a1·b0 + a0·b1 (crosswise), sum bit |
| p2, p3      | a1·b1 + carry from column 1        |

The cell is four AND gates and two half adders (`half_adder`).

## 4x4 level (`vedic_mul4`)

There are four 2x2 cells:
`q0 = A1A0·B1B0`, `q1 = A3A2·B1B0`, `q2 = A1A0·B3B2` and `q3 = A3A2·B3B2`.
Three adders combine them:

```
s[1:0] = q0[1:0]                                  (no adder)
adder 1, 4 bit : {c1, t}      = q1 + q2
adder 2, 4 bit : {c2, s[5:2]} = t + {q3[1:0], q0[3:2]}
adder 3, 2 bit : s[7:6]       = q3[3:2] + {0, c1} + c2   (c2 enters as carry in)
```

Adders 1 and 2 have their carry in tied to 0. The carry out of adder 3 is
always 0 for a 4x4 product and is left unconnected. The two carries c1 and c2
are the non-obvious part: both have weight 2^6, so both must reach the top two
bits. Adder 3 takes one as an operand bit and the other as its carry in.

## 8x8 level (`vedic_mul8`)

There are four 4x4 blocks: `q0 = aL·bL`, `q1 = aH·bL`, `q2 = aL·bH` and
`q3 = aH·bH`. Here the combination is arranged differently from the 4x4
level, as two adders side by side followed by a final adder:

```
Q[3:0]  = q0[3:0]                                   (no adder)
right adder, 8 bit  : r = q1 + {4'b0, q0[7:4]}       (r <= 225 + 14 = 239)
left adder, 12 bit  : l = {q3, 4'b0} + {4'b0, q2}
final adder, 12 bit : Q[15:4] = l + {3'b0, r_carry, r}
```

This is correct because `Q >> 4 = q3·16 + q2 + q1 + q0[7:4]`. The right
adder's carry out is wired in as bit 8 of the final adder's operand, but it
can never be 1. The carries out of the left and final adders are likewise
always 0 and are left open. Every carry in is tied to 0.

## Adder architectures

All three adders have the same interface: `sum = x + y + cin (mod 2^W)`, plus
`cout`. `vedic_adder` picks one of them by `KIND`.

* **Ripple carry** (`ripple_carry_adder`): W full adders (`full_adder`) in a
  chain. Each carry out is the next stage's carry in.
* **Carry lookahead** (`carry_lookahead_adder`): each bit has generate
  `g = x&y` and propagate `p = x^y`. The bits are taken in groups of `GROUP`
  (default 4). Inside a group, every carry is one AND-OR level of that group's
  `g`, `p` and carry in, so all carries of a group settle together. The carry
  then passes from group to group. There is no second lookahead level.
* **Carry skip** (`carry_skip_adder`): the bits are in groups of `GROUP`
  (default 4), and each group is a ripple carry adder. An AND over a group's
  propagate bits detects that an incoming carry would pass straight through
  the group. In that case the group's carry in is forwarded directly as its
  carry out, bypassing the ripple.

A last group narrower than `GROUP` is allowed, so any width works. The
multipliers use widths 2, 4, 8 and 12. `GROUP` comes from
`vedic_pkg::ADDER_GROUP`.

## Top level (`vedic8_top`)

The top holds the three variants side by side on the same operands:

| port     | dir | width | meaning                       |
|----------|-----|-------|-------------------------------|
| `a`      | in  | 8     | multiplicand, unsigned        |
| `b`      | in  | 8     | multiplier, unsigned          |
| `p_rca`  | out | 16    | product, ripple carry adders  |
| `p_cla`  | out | 16    | product, lookahead adders     |
| `p_cska` | out | 16    | product, carry skip adders    |

Outside a comparison setup you would normally instantiate one `vedic_mul8`
and choose `ADDER`. The default is `ADD_RCA`. In the published comparison the
ripple carry variant had the lowest power and area at 8 bits in
transmission-gate logic.

## How far this follows the original design, and where it departs

Taken from the original design description:
* the 8x8 <- 4x4 <- 2x2 hierarchy;
* the operand halves fed to each block;
* the three-adder combination at both levels, with its inputs and zero
  carry inputs;
* the three adder architectures;
* the use of one adder type throughout a multiplier.

Choices made here where the original is silent:
* **Bit alignments and widths.** The exact bit alignment and width of every
  adder were worked out from the arithmetic. The 8x8 block diagram writes the
  shifts as `{q3,00}` and `{00,q0[7:4]}`; these are read as 4-bit (nibble)
  shifts.
* **Group size and inter-group carries.** The lookahead and skip group size
  is 4. Carries ripple between groups.
* **Signedness.** Operands are unsigned. Signed operation is not described.
* **Timing.** The design is purely combinational.

Not reproducible in RTL:
* The original evaluates every variant in static CMOS and in
  transmission-gate logic, on 16 nm predictive-model transistors. That is a
  transistor-level choice with the same logic function. Its power, area and
  delay figures (roughly 0.5–8 mW and 40–540 ps for the 8-bit versions)
  belong to those circuits and not to this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench                  | what it covers |
|----------------------------|----------------|
| `tb_full_adder`            | all 8 inputs |
| `tb_ripple_carry_adder`, `tb_carry_lookahead_adder`, `tb_carry_skip_adder` | widths 2, 4, 8, 9 and 12 at once; low 8 bits and carry in swept exhaustively (2^17 vectors), upper bits random; counts full-propagate (skip) cases |
| `tb_vedic_mul2`            | all 16 operand pairs |
| `tb_vedic_mul4`            | all 256 pairs, for each of the three adder types; counts carries out of adders 1 and 2 |
| `tb_vedic_mul8`            | all 65536 pairs (ripple carry); checks the right adder never carries out; counts carries into the final adder's upper part |
| `tb_vedic8_top`            | all 65536 pairs on all three variants, against `a*b` and against each other; counts each carry mechanism (4x4 adder carries, group-boundary carries in the final adder, all-propagate groups that a skip adder bypasses) and fails if one never happens |

`tb_vedic8_top` runs the top at its default configuration and finishes in
well under a second.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_vedic8_top \
    rtl/vedic_pkg.sv rtl/*.sv tb/tb_vedic8_top.sv
./obj_dir/Vtb_vedic8_top
```

Replace the top-module name and the testbench file to run any other
testbench. List the package first. For lint, use
`verilator --lint-only -Wall rtl/vedic_pkg.sv rtl/*.sv --top-module vedic8_top`.

## Changing it

* **Another adder.** Add a value to `adder_kind_e` and a branch in
  `vedic_adder`.
* **Group size.** Change `ADDER_GROUP`, or set `GROUP` on an adder
  instance.
* **A 16x16 multiplier.** Repeat the 8x8 pattern with four `vedic_mul8`
  blocks: a 16-bit right adder and 24-bit left and final adders, with 8-bit
  shifts in place of 4-bit ones.
