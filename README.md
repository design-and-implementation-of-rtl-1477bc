# Majority-gate n-bit adder for quantum-dot cellular automata

In quantum-dot cellular automata (QCA) the native logic element is not a
NAND gate but the three-input **majority gate**, M(a, b, c) = ab + bc + ca,
plus an inverter. AND and OR are majority gates with one input tied to 0 or 1,
and XOR is expensive. An adder for QCA is therefore judged by how few majority
gates it needs, and by how many of them lie on the carry path.

This RTL describes such an adder: a 16-bit ripple adder (any even width
through the parameter `N`) built only from majority gates and inverters. Its
carry moves **two bit positions per majority gate**, and every sum bit is
made from two majority gates and one inverter, with no XOR at all. Beside it
is a five-input majority gate, the other building block proposed for the same
technology. Both are written as ordinary combinational logic, so they can be
simulated and synthesised for any target; the QCA cell layout and clock zones
are not modelled.

## Majority logic in one page

| form                 | meaning                        |
|----------------------|--------------------------------|
| M(a, b, 0)           | a AND b (generate g)           |
| M(a, b, 1)           | a OR b (propagate p)           |
| M(a, b, c)           | carry out of a full adder      |
| M(p, g, z)           | equals M(a, b, z), for any z   |

Two identities carry the whole design:

1. **Carry in one gate.** c_{i+1} = g_i + p_i c_i = M(a_i, b_i, c_i).
2. **Distributivity of the majority function.**
   M(x, y, M(u, v, w)) = M(M(x, y, u), M(x, y, v), w).

## The carry chain: two bits per gate (`bm_2bit`)

Write the carry two positions ahead:

    c_{i+2} = M(a_{i+1}, b_{i+1}, c_{i+1})
            = M(a_{i+1}, b_{i+1}, M(p_i, g_i, c_i))
            = M( M(a_{i+1}, b_{i+1}, p_i),  M(a_{i+1}, b_{i+1}, g_i),  c_i )

The two inner gates depend only on the operands, so they are ready long
before the carry arrives. When c_i arrives, one more gate gives c_{i+2}. The
chain therefore has N/2 majority gates in series instead of N.

One `bm_2bit` module holds six gates:

    p   = M(a_i, b_i, 1)          g   = M(a_i, b_i, 0)
    t_p = M(a_{i+1}, b_{i+1}, p)  t_g = M(a_{i+1}, b_{i+1}, g)
    c_{i+2} = M(t_p, t_g, c_i)    c_{i+1} = M(p, g, c_i)

c_{i+1} is off the critical path. It is needed only by the sum block.

The least significant pair is simpler. It needs no p_0, and its two plain
majority gates give c_1 = M(a_0, b_0, cin) and c_2 = M(a_1, b_1, c_1). The
16-bit adder is thus two gates (`u1`, `u2`), seven `bm_2bit` modules and one
sum block.

## The sum block (`basic_sum`, `sum_bit`)

Once every carry is known, each sum bit is computed on its own, in parallel:

    s_i = M( M(x_i, y_i, NOT c_{i+1}),  NOT c_{i+1},  c_i )

Here (x_i, y_i) is (a_i, b_i), or at even positions from 2 upwards the
(p_i, g_i) pair that the carry module already made. The two pairs give the
same result, by the last row of the table above. The formula is the parity of
a_i, b_i, c_i:

- If c_{i+1} = 0, at most one of the three inputs is 1. The sum is then 1
  exactly when one input is 1. The inner gate gives a_i OR b_i, and the outer
  gate ORs in c_i.
- If c_{i+1} = 1, at least two inputs are 1. The sum is 1 only when all three
  are. The inner gate gives a_i AND b_i, and the outer gate ANDs in c_i.

The sum block adds two gate delays after the last carry.

## Gate count and depth (N = 16)

| part                   | majority gates | inverters |
|------------------------|----------------|-----------|
| LSB pair (`u1`, `u2`)  | 2              | 0         |
| 7 × `bm_2bit`          | 42             | 0         |
| 16 × `sum_bit`         | 32             | 16        |
| total                  | 76             | 16        |

The longest path is cin → c_2 (2 gates), then one gate per pair up to c_16
(7 gates), then 2 gates in the most significant sum cell. In general that is
N/2 + 3 majority gates plus one inverter.

## Five-input majority gate (`maj5`)

f = 1 when three or more of the inputs A..E are 1. That is the OR of the ten
three-input products ABC + ABD + … + CDE. In QCA it is a two-layer cross:
three inputs reach the centre cell in its own layer, and two more from the
layers above and below. No netlist of the adder uses it, so it stands beside
the adder in the top level with its own ports. `in[0]` is A and `in[4]` is E.

## Modules and ports

| module          | role                                              |
|-----------------|---------------------------------------------------|
| `qca_adder_top` | top: the adder and `maj5` side by side            |
| `b_adder_qca`   | N-bit adder (`a`, `b`, `cin` → `sum`, `cout`)     |
| `bm_2bit`       | two-bit carry module                              |
| `basic_sum`     | N sum cells                                       |
| `sum_bit`       | one sum cell: inverter and two majority gates     |
| `mg`            | three-input majority gate                         |
| `maj5`          | five-input majority gate                          |

Top-level ports:

- `a[N-1:0]`, `b[N-1:0]`, `cin` → `sum[N-1:0]`, `cout`.
- `m5_in[4:0]` → `m5_out`.

Everything is combinational. There is no clock and no reset. `N` defaults to
16. It must be even and at least 2; any other value stops elaboration with an
error. For 32- or 128-bit adders, set `N`.

## Where this RTL departs from the published design, and how far to trust it

- **Carry in.** The QCA layout assumes a carry in of 0. It then uses
  M(a_0, b_0, 0) = g_0 as c_1. Here the constant 0 is the `cin` port. The gate
  count is the same, `cin` is honoured, and with `cin = 0` the circuit is the
  published one. The published 16-bit netlist also has a `cin` port.
- **No QCA timing.** A QCA layout is a pipeline of clock zones, each with four
  phases (switch, hold, release, relax). No zone assignment was given for the
  n-bit adder. This RTL is the combinational logic function only, which is
  also how the adder was mapped to an FPGA netlist.
- **Sum at bit 0.** One drawing labels the least significant sum cell with
  g_0 where the cell needs b_0. With g_0 the cell would not compute
  a_0 XOR b_0, so b_0 is used.
- **Published simulation.** Of the two printed 16-bit test vectors, one
  (FF00h + FC00h = 1_FB00h) matches this RTL bit for bit. The other is printed
  with a sum whose bit 0 is 1, although FFFFh + C007h gives 1_C006h. This RTL
  follows the arithmetic.
- **Port names** of `bm_2bit`, `sum_bit`, `basic_sum` and `maj5` are this
  design's own. The module names `b_adder_qca`, `mg`, `bm_2bit` and
  `basic_sum` and the top-level port names follow the published netlist.
- **Not modelled.** The physical side is not modelled: the four-dot cell,
  wire crossings, cell areas and the clocking. Also absent is a reversible
  one-bit adder that is mentioned but never specified.

Every block is checked against arithmetic worked out independently:

- `mg` and `maj5` are checked exhaustively.
- `bm_2bit` and `sum_bit` are checked exhaustively.
- `b_adder_qca` is checked exhaustively at N = 2, 4 and 6. At N = 16 it gets
  the published vectors, corner cases and 5000 random additions.
- The top-level test runs 20 000 random additions at the default size. It
  counts how often four events occur: a carry generated at bit 0 and rippled
  through all 16 positions, a carry in that changes the result, a carry out,
  and a carry killed inside the chain. The test fails if any of them never
  happens.

## Simulating

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_qca_adder_top.sv \
        --top-module tb_qca_adder_top -Mdir obj_top
    ./obj_top/Vtb_qca_adder_top

The other testbenches are `tb_b_adder_qca`, `tb_bm_2bit`, `tb_basic_sum`,
`tb_sum_bit`, `tb_mg` and `tb_maj5`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/<module>.sv`.
