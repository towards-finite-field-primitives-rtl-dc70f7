# Finite-field arithmetic for a switch data plane

Coding, cryptography and error correction all need arithmetic in binary
finite fields GF(2^N). A programmable switch could apply them to packets at
line rate only if a multiply, a divide or an inverse finishes in one pass
through a fixed-length pipeline, with no loops and no recirculation. This RTL
puts the two usual ways of doing that next to each other, as fully pipelined
hardware that accepts one packet header per clock:

* **Table (memory-intensive) approach.** Precompute log, antilog and inverse
  tables of the field once. A product then costs three table reads and one
  integer addition. It is fast and small for GF(2^8), but each table has 2^N
  entries, so it stops scaling at around 16 bits.
* **Iterative (computation-intensive) approach.** Multiply, divide and invert
  with bit-serial algorithms whose iterations are unrolled into pipeline
  stages: N stages for a product, 2N-1 for a quotient, and 2N for an inverse.
  The logic grows linearly with N, so the same modules build GF(2^56) or
  GF(2^128) by changing a parameter.

The default field is GF(2^8) with the AES polynomial
P(x) = x^8 + x^4 + x^3 + x + 1 (`0x11B`) and generator x + 1 (`0x03`). Every
module takes `N`, `POLY` (N+1 bits, bit N set) and, where tables are involved,
`GEN` as parameters.

## Field elements in a few lines

An element of GF(2^N) is an N-bit word, read as a polynomial over GF(2).
Addition is XOR. Multiplication is carry-less multiplication followed by
reduction modulo P. Every non-zero element has an inverse, and the non-zero
elements are exactly the powers GEN^0 .. GEN^(2^N-2) of a generator. That
last fact is what makes the table approach work:

    a * b = antilog[(log a + log b) mod (2^N - 1)]

Zero has no logarithm and no inverse. In this design **a product with a 0
operand is 0, x / 0 = 0, and 0^-1 = 0** in every engine, so any two
engines always agree.

## The single-operation unit (`ff_calc_unit`)

A packet carries a 32-bit header `{op, a, b, result}`, with 8 bits per field
at N = 8. The unit reads op, a and b, and fills in result. The op code picks
both the operation and the approach (`gf_pkg::ff_op_e`):

| op   | operation | engine                                   | engine latency |
|------|-----------|------------------------------------------|----------------|
| 0x00 | a * b     | tables (`tbl_muldiv_unit`)               | 4              |
| 0x01 | a / b     | tables: a * inv[b]                       | 4              |
| 0x03 | b^-1      | tables: inv[b]                           | 4              |
| 0x04 | a * b     | Russian Peasant (`rpa_mul_pipe`)         | N              |
| 0x05 | a / b     | EBd binary division (`ebd_div_pipe`)     | 2N-1           |
| 0x06 | a / b     | inversion, then RPA on (a, b^-1)         | 3N             |
| 0x07 | b^-1      | binary extended Euclid (`inv_pipe`)      | 2N             |
| other| none      | result = 0                               | none           |

For the table ops, bit 0 selects the inverse-table lookup. Bit 2 selects the
iterative approach. The remaining code points are this design's own.

All engines run in parallel. A header's valid bit is steered only to the
engine its op names. Each engine output is delayed to the longest path, which
is the 3N-cycle divide-by-inversion. The header fields travel in a matching
delay line, and an output register follows. As a result, **every header
leaves exactly 3N + 1 = 25 cycles after it entered**, in arrival order, with
op, a and b unchanged. The input never has to stall, whatever the op mix.
Assertions check that at most one engine delivers per cycle, and that a
delivery always meets a header in the delay line.

## Table approach (`gf_table_rom`, `tbl_muldiv_unit`)

`gf_table_rom` is a 2^N-entry ROM with a registered read. A constant function
computes its contents during elaboration. It walks x = GEN^i for
i = 0 .. 2^N-2 and writes one of:

* log: `log[GEN^i] = i`, and `log[0] = 0` (never used)
* antilog: `antilog[i] = GEN^i`, and `antilog[2^N-1] = 1`
* inverse: `inv[GEN^i] = GEN^-i`, tracked by a second walker y that multiplies
  by GEN^-1 = GEN^(2^N-2). `inv[0] = 0`.

No data files are involved. For the default field the tables are the standard
AES log/antilog/inverse tables: for example log[0x03] = 1,
antilog[0x19] = 0x02, and inv[0x53] = 0xCA.

A switch table can match only one key per lookup. The unit therefore spreads
the lookups over four stages:

1. read log[a] and inv[b]
2. read log[b'], where b' = inv[b] for a divide and b for a multiply
3. add the two logs as integers, subtract 2^N-1 once if the sum reaches it,
   and read the antilog
4. register the result: the antilog output, inv[b] for the invert op, or 0
   for a zero operand

## Russian Peasant multiplication (`rpa_step`, `rpa_mul_pipe`)

This is shift-and-add with reduction folded in. Each of the N iterations does
three things:

1. If b is odd, XOR a into the running product.
2. Double a. If a's top bit was set, XOR in the low N bits of P.
3. Halve b.

`rpa_step` is one iteration as combinational logic. `rpa_mul_pipe` chains N
of them with a register after each, so latency is N and one product enters
every cycle.

## EBd division (`ebd_step`, `ebd_div_pipe`)

EBd is the hardest part of the design. It computes the quotient Q = A / B
directly, without forming B^-1 first. It keeps the following state:

* a, b: start as A, B
* s, v: start as P, 0
* delta: a signed counter, starting at -1

The loop keeps two invariants, a = b * Q and v = s * Q (mod P), and steers
(b, s) toward (0, 1). Once s = 1, v is the quotient. One iteration:

    if b is odd:
        if delta < 0:  (b, s) <- (b ^ s, b);  (a, v) <- (a ^ v, a);  delta <- -delta
        else:          b <- b ^ s;            a <- a ^ v
    b <- b >> 1;  delta <- delta - 1;  a <- (a / x) mod P

Adding s to b and v to a together preserves both invariants. Once b is even,
halving it (b >> 1) and dividing a by x modulo P together preserve the first
one. Division by x mod P is a right shift: when a is odd, first add P (which
is 0 mod P) to make it even. In hardware, `a >> 1` is XORed with P[N:1]
when a[0] = 1. The paired assignments use the old values on both sides.
delta tracks the difference in degree between b and s, so after 2N-1
iterations s has reached 1 for any B != 0. For B = 0, v never changes and
the result is 0.

Widths: b and s need N+1 bits, because s starts as P. a and v need N bits.
delta stays in [-2N, N] and is held in `$clog2(2N+1)+1` signed bits.

## Inversion (`inv_step`, `inv_pipe`)

This is the binary extended Euclidean algorithm on (X, P). It has 2N
iterations, starting from x = X, s = P, u = 1, v = 0, delta = 0:

    if x[N] == 0:  x <- x << 1;  u <- u << 1;  delta <- delta + 1
    else:
        if s[N] == 1:  s <- s ^ x;  v <- v ^ u
        s <- s << 1
        if delta == 0:  (x, s) <- (s, x);  (u, v) <- (v << 1, u);  delta <- 1
        else:           u <- u >> 1;  delta <- delta - 1

The statements run in order within an iteration. The swap therefore takes
the s and v just updated above it. That ordering matters: swapping the old
values gives wrong inverses. After 2N iterations, u holds X^-1 in its low N
bits. x, s, u and v are N+1 bits wide. A zero flag travels with the operand
and forces 0^-1 = 0.

Division "by inversion and RPA" (op 0x06) feeds b through `inv_pipe`. It then
sends (a, b^-1) through a second `rpa_mul_pipe`, with a carried along in the
inverter's tag.

## Several multiplications per header

Some uses of the field need many products per packet, for example coding
coefficients times data bytes. The top also holds two wide units with their
own header ports:

* `multi_mul_tbl`: K_TBL = 15 independent table multipliers, each with its
  own three ROMs (log a, log b, then antilog). Latency is 3 cycles.
* `multi_mul_rpa`: K_RPA = 9 RPA multipliers in lockstep. Each of the N
  stages holds K `rpa_step`s. Latency is N cycles.

15 and 9 are the largest counts reported for switch targets with the two
approaches: 15 with tables on a production switch, and 9 with the parallel
RPA arrangement on a research switch architecture. A production switch
reached 8 with RPA.

## Top level (`ff_switch_top`)

The top instantiates `ff_calc_unit`, `multi_mul_tbl` and `multi_mul_rpa` side
by side. Each has its own valid/data ports, and they share only `clk` and the
active-low asynchronous `rst_n`. Only valid bits are reset. Data registers
are not reset, because a result is qualified by its valid bit. Packet parsing
and deparsing, which would fill and drain these headers in a switch, are not
part of this RTL.

| unit          | ports    | per cycle                 | latency (N = 8) |
|---------------|----------|---------------------------|-----------------|
| ff_calc_unit  | `calc_*` | 1 header, any op          | 25              |
| multi_mul_tbl | `mtbl_*` | 15 products               | 3               |
| multi_mul_rpa | `mrpa_*` | 9 products                | 8               |

At the defaults the top is about 1,800 cells and 3,200 flip-flop bits. It
also holds about 100 kbit of ROM, mostly 49 tables of 256 x 8 bit.

## Departures and choices

* The op code points other than "bit 0 selects the inverse lookup", the
  fixed 3N + 1 latency, and the zero conventions are this design's own.
* A published worked example of EBd division gives 223 / 7 = 119 in
  GF(2^8)/0x11B. Running the algorithm gives 41, and 41 * 7 = 223 in that
  field, so this design produces 41. The matching inversion example,
  223^-1 = 107, is reproduced exactly.
* The data-plane machinery around the arithmetic is not modelled: the
  parser/deparser, match-action stages, and a map-reduce style
  reconfigurable switch fabric. The iterative engines are ordinary pipelines
  here. They are not mapped onto such a fabric.
* Field sizes reported for real switches, such as GF(2^3) EBd or GF(2^4)
  inversion, were limits of those targets. This RTL defaults to GF(2^8) for
  every engine. The small fields are tested as parameter settings.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against independent reference functions in `tb/gf_ref_pkg.sv`
(carry-less multiply with long-division reduction, and inverse by search).
Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench              | what it covers                                                          |
|------------------------|-------------------------------------------------------------------------|
| tb_gf_table_rom        | all entries of all three tables, printed reference values, GF(2^4)       |
| tb_tbl_muldiv_unit     | every (a, b) pair for multiply, divide and invert; latency 4             |
| tb_rpa_mul_pipe        | every pair in GF(2^8), GF(2^3) too; latency N                            |
| tb_ebd_div_pipe        | every pair in GF(2^8) and GF(2^3); latency 2N-1                          |
| tb_inv_pipe            | every element in GF(2^8) and GF(2^4); latency 2N; 223^-1 = 107           |
| tb_ff_calc_unit        | 8192 random headers, including undefined ops and idle gaps; latency 25   |
| tb_multi_mul_tbl/_rpa  | random full-width headers, zero operands                                 |
| tb_ff_switch_top       | end-to-end at default parameters; counts each mechanism (every op, zero operands, divide by zero, log-sum wrap-around, RPA reduction, EBd and inversion branch types, back-to-back headers, gaps) and fails if one never occurs |
| tb_workload_wide_rpa   | RPA multiplier at N = 32, 56 and 128 (the last with the GCM polynomial)  |

Simulate any of them with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_ff_switch_top.sv --top-module tb_ff_switch_top
    ./obj_dir/Vtb_ff_switch_top

Each testbench finishes in seconds. Some testbenches leave width warnings
that do not affect the results, and `-Wno-fatal` lets those builds continue.

**Largest sizes simulated.** The iterative engines were simulated up to
GF(2^128). The table engines were simulated at GF(2^8) and GF(2^4).
`tbl_muldiv_unit` is written for any N. However, Verilator computes the
tables as constants during elaboration, and for a 2^16-entry table (and
already for a 2^12-entry one) that needed more than 16 GB. So GF(2^16) tables
are unverified in simulation. A synthesis flow that evaluates constant
functions more frugally, or a memory initialised from a file, would be the
route to that size.

## Changing the field

Set `N`, `POLY` and `GEN` on `ff_switch_top`, or on any unit. POLY must be
irreducible of degree N for the iterative engines. For the table engines,
GEN must also generate the whole multiplicative group. The op field stays 8
bits wide at any N.
