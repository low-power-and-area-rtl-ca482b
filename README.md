# Multiply-accumulate unit with a borrow-save accumulator

This is a pipelined multiply-accumulate (MAC) unit, the operation at the core of
machine-learning accelerators: `sum += a * b`, one operand pair per clock. What
makes it different is where the carries go. A conventional MAC feeds the
product and the running sum through a carry-propagate adder inside the
accumulation loop, so the longest carry chain sets the clock period and
switches on every cycle. Here the running sum is kept in **borrow-save**
(signed-digit) form. Adding to it takes two full-adder delays, whatever the
width. The adder is cut into 4-bit segments, and the few carries that cross a
segment boundary wait one cycle in flip-flops. This is **feedforward-cutset-free
(FCF) pipelining**: only the carry flip-flops are kept, and the operand-skew
flip-flops of a classic pipelined adder are left out. A binary result is formed
only once, outside the loop, by a carry look-ahead (CLA) adder.

The design follows the article *Low Power and Area Efficient Borrow Save Adder
for MAC Unit in VLSI Application*. That article gives the 4-bit carry
look-ahead adder, the 4-bit borrow-save adder with its cell-level values, the
operand sizes (16 and 32 bits) and the idea of FCF pipelining in the
accumulator. Everything else (the exact pipeline, the signed number format, how
the result is converted, reset and clear) is this implementation's own. It is
marked as such below and in each file's header.

## Borrow-save numbers

A borrow-save number of width N holds one digit per bit position. Each digit is
in {-1, 0, +1} and is stored as two bits, a positive bit and a negative bit:

    X = Xp - Xn        (Xp, Xn ordinary N-bit unsigned vectors)

The same value has many encodings. That freedom is what lets two such numbers
be added with no carry chain: every position absorbs its incoming carry
without ever passing one further than the next position.

Converting *into* this form is free. For a two's-complement product P of width
2N:

    P = -P[2N-1]·2^(2N-1) + Σ P[i]·2^i

so the positive bits are P with the sign bit cleared, and the negative bits are
all zero except the sign bit (`mac_multiplier`). Converting *out* of it costs
one ordinary subtraction, `Xp - Xn`, and that is the only carry-propagate
operation in the design.

## The borrow-save adder (`bsa`)

Two rows of full adders, N cells each:

| row | cell i inputs | gives |
|---|---|---|
| top (Fa1..Fa4 for N = 4) | `~yn[i]`, `yp[i]`, `~xn[i]` | sum `t[i]`, carry `u[i]` |
| bottom (Fa5..Fa8) | `t[i]`, `xp[i]`, `u[i-1]` (bit 0: `~cin_n`) | sum `w[i]`, carry `q[i]` |

Outputs: `sn[i] = ~w[i]`, `sp[i+1] = q[i]`, `sp[0] = cin_p`, `cpout = q[N-1]`,
`cnout = ~u[N-1]`.

Why it works: with two inverted inputs the top cell computes
`yp - yn - xn = t - 2·(~u)`. That is a positive digit here and a negative digit
one place up. The bottom cell takes a negative input in inverted form and
computes `t + xp - (~u_prev) = 2·q - (~w)`. That is a negative digit here and a
positive one one place up. Summing over all positions gives

    sp - sn + 2^N·(cpout - cnout) = X + Y + cin_p - cin_n

exactly. The two carry inputs and two carry outputs have matching weights, so
N-bit blocks chain into wider ones: `cpout` goes to the next `cin_p`, and
`cnout` to the next `cin_n`.

Worked example, checked bit for bit by the testbench: Xp = 0111, Xn = 0000,
Yp = 0001, Yn = 0000, carries in 0 give Sp = 1110, Sn = 0110 and both carries
out 0. That is 14 - 6 = 8 = 7 + 1.

## The FCF pipelined accumulator (`mfcf_pa`)

The 64-bit accumulator (`acc_p`, `acc_n`) is split into sixteen 4-bit `bsa`
segments. On a valid cycle, segment k adds its slice of the incoming product to
its slice of the accumulator. Its two carry outputs go into flip-flops
(`cp_q[k+1]`, `cn_q[k+1]`), not straight into segment k+1. Segment k+1 adds
them through its carry inputs on the *next* valid cycle.

So at any moment part of the sum is still waiting in the carry flip-flops. The
invariant the design keeps after every clock edge is

    accumulated value = acc_p - acc_n + car_p - car_n     (mod 2^64)

where `car_p`/`car_n` put the waiting carries at bit positions 4, 8, ..., 60.
No flush cycle is needed, because the converter reads all four vectors. The
operand is never delayed per segment: every segment sees the same operand in
the same cycle, which is the "cutset-free" part. The cost is 30 carry
flip-flops next to the 128 accumulator bits.

A borrow-save segment has no long carry path of its own. The carry flip-flops
therefore do not shorten the critical path much. What they do is confine each
cycle's switching to within a segment. To change the spacing, set `SEG` to
another divisor of the accumulator width. At least two segments are required.

Carries out of the top segment are dropped, so the sum wraps modulo 2^64. There
are no guard bits and no saturation.

## Getting a binary result (`bsd_resolve`, `cla_adder`)

`bsd_resolve` first folds the waiting carries into the sum with one full-width
`bsa`, two full-adder delays. It then subtracts with a 64-bit CLA:
`sp + ~sn + 1`.

The CLA is built from the classic 4-bit block (`cla_adder4`): four full adders
report propagate `P = a^b` and generate `G = a&b` to a 4-bit look-ahead
generator (`cla_gen4`). The generator returns C1..C3 and also gives C4, the
group propagate `PG` and the group generate `GG`. `cla_adder` feeds the PG/GG
pairs of its sixteen blocks into a three-level tree of the same generators
(`cla_lookahead`). That tree gives every block its carry in without rippling,
and covers widths up to 256 bits.

## Pipeline and interface (`mac_bsa`, the top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `a`, `b` valid this cycle |
| `in_clear` | in | 1 | this product starts a new sum (only with `in_valid`; an assertion checks it) |
| `a`, `b` | in | N | signed two's-complement operands |
| `result` | out | 2N | accumulated sum, two's complement |
| `result_valid` | out | 1 | `result` now includes the pair accepted 3 edges earlier |

Stages: (1) product register, already in borrow-save form; (2) accumulator
with segment carry flip-flops; (3) converter and result register. The unit
accepts an operand pair every cycle. With `in_valid` low nothing changes, and
`result` holds its last value. Parameters: `N` (default 32, from `mac_pkg`)
and `SEG` (default 4).

Hierarchy:

    mac_bsa
    ├── mac_multiplier          signed multiply, borrow-save recoding, register
    ├── mfcf_pa                 16 x bsa(4) + carry flip-flops
    │   └── bsa → full_adder
    └── bsd_resolve
        ├── bsa(64)             fold waiting carries
        └── cla_adder(64)       16 x cla_adder4 + cla_lookahead
            ├── cla_adder4 → full_adder, cla_gen4
            └── cla_lookahead → cla_gen4

## What follows the article and what does not

Taken from the article:
- the 4-bit CLA structure and its port names (P, G, C0..C4, PG, GG);
- the borrow-save adder's two rows of full adders, which inputs and outputs are
  inverted, and the worked example above;
- 4-bit segments, FCF pipelining in the accumulator, 32-bit operands with a
  64-bit product (16-bit operands as the other evaluated size);
- the sample product 2 × 6 = 12 that the end-to-end test starts with.

This implementation's own choices:
- The multiplier is a plain signed `*` left to synthesis. Its internal
  structure is not specified.
- Operands are signed. The result is exactly 2N bits and wraps.
- The second carry input `cin_p` drives `sp[0]`. This is how the 4-bit adder
  chains. The article's figure only shows an unnamed line into that output.
- The way the redundant sum is turned into binary (fold, then CLA subtraction),
  and the wider CLA built from PG/GG.
- The three-stage pipeline, `in_clear`, the valid signals and the reset.

Not reproduced: the power, area and delay figures the article reports for an
FPGA implementation. Nothing here was measured against them.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example,
the end-to-end test at the default size:

    verilator --binary --timing --assert --top-module tb_mac_bsa \
        rtl/mac_pkg.sv $(ls rtl/*.sv | grep -v mac_pkg) tb/tb_mac_bsa.sv
    ./obj_dir/Vtb_mac_bsa

The package file must come first. Replace `tb_mac_bsa` with any testbench
name below.

| testbench | what it proves |
|---|---|
| `tb_full_adder`, `tb_cla_gen4`, `tb_cla_adder4` | exhaustive against arithmetic |
| `tb_cla_adder` | 64-, 24- and 128-bit instances, carry-chain corners and random operands |
| `tb_bsa` | the worked example bit for bit, four example input sets, all 2^18 4-bit cases, random 32-bit cases |
| `tb_mac_multiplier` | signed products and corner values, valid/clear timing, hold |
| `tb_mfcf_pa` | the invariant above after every edge; carries sit only at segment boundaries; carries are actually pending |
| `tb_bsd_resolve` | random and corner state vectors |
| `tb_mac_bsa` | 4000 cycles at default size: 2 × 6 = 12 first, then random signed pairs, idle cycles, clears, wrap-around; result and its 3-cycle latency checked every cycle |
| `tb_mac_bsa_16` | the same with 16-bit operands |

The two end-to-end tests count the events that exercise each mechanism:
clears, negative products, idle cycles, cycles with pending segment carries,
and overflow of the signed range. If any of them never occurs, the test fails.
