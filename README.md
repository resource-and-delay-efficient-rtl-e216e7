# Semi-systolic Montgomery multiplier for GF(2^m)

This is a pipelined hardware multiplier for the binary field GF(2^m) in polynomial basis. It
targets the odd field sizes used in elliptic-curve cryptography, with m = 571 (the largest NIST
binary field) as the default. It computes the Montgomery product

    T = A * B * R^-1 mod G,      R = x^((m-1)/2)

for two field elements A and B and any degree-m polynomial G with g_m = g_0 = 1. G is an input
given with each operation, not a constant. The main idea is to split R^-1 around the middle of B.
The upper half of B multiplies A by x^0 .. x^((m-1)/2), and the lower half multiplies A by
x^-1 .. x^-((m-1)/2). Each half then needs only (m+1)/2 steps instead of m. Both halves run
through the same array of identical cells, one clock apart, and a row of adders combines them.
The critical path is one AND2 gate followed by one XOR2 gate. The latency is (m+7)/2 clocks.

## Using the Montgomery product

The multiplier works on Montgomery residues. To get a plain product of field elements α and β:

1. Map each into the Montgomery domain: A = α·x^((m-1)/2) mod G, and the same for B. This is
   done outside the multiplier, for example as a multiplication by R^2.
2. Compute T = mont(A, B) = αβ·R mod G. Chains of multiplications, as in exponentiation or
   inversion, stay in this domain.
3. Map back with one more pass through the multiplier: mont(T, 1) = αβ mod G.

Both testbenches of the top level run this round trip and compare the result with a direct
product.

## The two half-products

Write h = (m-1)/2. With b_k the bits of B:

    C = sum_{i=0..h} b_(h+i) * A*x^i   mod G      (upper half of B, A multiplied by x)
    D = sum_{i=1..h} b_(h-i) * A*x^-i  mod G      (lower half of B, A multiplied by x^-1)
    T = C + D

Each half has h+1 iterations. C uses A*x mod G, which shifts A one place towards the MSB. The
bit a_(m-1) that falls out is folded back in: it is ANDed with g_1..g_(m-1) and it becomes the
new a_0. D uses A*x^-1 mod G, which shifts towards the LSB and folds back a_0. x^-1 exists
because g_0 = 1.

Reverse the bit order of A and G, and a shift towards the LSB becomes a shift towards the MSB.
So the cell array built for C computes D too. For D it takes A and G bit-reversed, gets 0 as
the b bit of its first row (the term b_h is already in C), and produces D in reversed bit order.

## Structure

    a_i, b_i, g_i --> cd_slot_gen --> mmm_array --> x_row --> t_o
                      operand reg,    (m+1)/2 rows   m X-cells,
                      C slot then     of m M-cells   C + D
                      D slot

| Module | Contents |
|---|---|
| `gf2m_pkg` | `slot_e`: which half (C or D) a slot carries |
| `cd_slot_gen` | Operand register and valid/ready handshake. Presents the C slot, then the D slot in the next clock. |
| `mmm_array` | (m+1)/2 rows of M-cells, with b skew registers on the left edge and one a_0 feedback register per row |
| `m_cell` | The basic cell: two AND2, two XOR2 and three output registers. Parameter `W` sets how many cells sit side by side. |
| `x_row`, `x_cell` | The output adders. Cell j adds its own column, delayed one clock, to the undelayed mirrored column m-1-j. |
| `mmm_multiplier` | Top level. Also holds the valid pipeline for `out_valid`. |

### M-cell

Column k holds coefficient k. Row r is iteration r+1. Every cell in a row sees two broadcast
signals: the row's top coefficient `a_msb` and the row's multiplier bit `b`. Each cell computes

    a_out = a_in ^ (a_msb & g_in)     next operand bit (shifted one column left by the wiring)
    c_out = c_in ^ (b & a_in)         accumulated partial product
    g_out = g_in

All three outputs are registered. The polynomial moves down the array with its operand, so G can
differ from one operation to the next. Column k's `a_out` feeds column k+1 of the next row. The
next row's a_0 is the registered `a_msb`. The last column's `a_out` would be a_m and is left
unconnected.

### Slot orders

The C and D slots feed the array as follows:

| | column k: a | column k: g | row 0: b | row r > 0: b |
|---|---|---|---|---|
| C slot | a_k | g_(k+1) | b_h | b_(h+r) |
| D slot | a_(m-1-k) | g_(m-1-k) | 0 | b_(h-r) |

Row r must see its b bit r clocks after the slot entered row 0, so `b_rows[r]` passes through r
registers on the array's left edge.

### Output adders

The bottom of column k carries c_k in the C slot and d_(m-1-k) in the following D slot. X-cell k
registers its own column, which then holds c_k. In the D cycle it XORs that register with the
live output of column m-1-k, which is d_k. The sum goes into the output register. The middle
column pairs with itself.

## Timing and handshake

- Operands are taken in a cycle where `in_valid` and `in_ready` are both high. `g_i` is
  g_m..g_0, and an assertion checks that g_m = g_0 = 1.
- The result appears on `t_o` with `out_valid` exactly (m+7)/2 clocks later: 289 clocks for
  m = 571, 10 for m = 13. The count is 1 (operand register) + (m+1)/2 (array rows) + 1 (D after
  C) + 1 (X-cell output register).
- Each multiplication uses the array for two consecutive slots. So `in_ready` is low for one
  clock after each acceptance, and the multiplier takes one new operation every two clocks.
  Results come out at the same rate, with nothing held back.
- Only the control path is reset (`rst_n`, synchronous, active low). The datapath registers have
  no reset and start at arbitrary values. Their contents are never flagged valid.
- Feeding a result back as an operand costs the full latency.

## Where this departs from the published architecture

- **Throughput.** The source architecture claims one multiplication per clock. It also runs the C
  and D halves through one array, one clock apart. Both cannot hold at once. This RTL follows the
  shared array and accepts one operation every two clocks. For one result per clock, instantiate
  two multipliers and issue to them alternately.
- **X-cell registers.** The source describes the X-cell once with one register and once with two.
  This RTL uses two: the delay register and an output register. With them the latency is exactly
  (m+7)/2.
- **Registers instead of latches.** The source calls its pipeline elements 1-bit latches. Here
  they are edge-triggered flip-flops.
- **Width-parameterised cell.** `m_cell` has a width parameter, and the array places one
  m-bit-wide instance per row instead of m one-bit instances. The logic is the same. At m = 571,
  per-bit instances make elaboration impractically slow (163,306 instances).
- **Additions.** The operand register, the valid/ready handshake, `out_valid`, the reset and the
  assertions are additions of this design.

## Size at m = 571

- Array: (m+1)/2 = 286 rows of 571 cells, i.e. 163,306 M-cells.
- Array registers: about 490,000 (three per cell), plus the skew registers. The skew registers
  total 0+1+...+285 = 40,755 bits.
- Output adders: 571 X-cells with 1,142 registers.
- Operand register: 1,713 bits.

Area grows as m², latency as m/2.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=F` and stops with a
watchdog if it hangs. The reference model in `tb/gf2m_ref_pkg.sv` is plain bit-serial arithmetic:

- a shift-and-add product mod G;
- followed by (m-1)/2 divisions by x.

It shares nothing with the half-product split.

| Testbench | What it covers |
|---|---|
| `tb_m_cell` | All 32 input combinations of one cell |
| `tb_x_cell` | The delay and sum of one X-cell |
| `tb_x_row` | Crossover pairing, m = 7 |
| `tb_mmm_array` | The array alone at m = 11. C and D slots every clock, compared with half-products computed term by term. |
| `tb_cd_slot_gen` | Slot contents and in_ready, m = 7 |
| `tb_mmm_multiplier` | End to end at m = 13, described below |
| `tb_mmm_multiplier_full` | The default m = 571 with G = x^571 + x^10 + x^5 + x^2 + 1. Four back-to-back operations plus a round trip, with the latency checked. |

`tb_mmm_multiplier` runs 300 random operations in a random stream. G is random and changes
between operations. The stream includes back-to-back issue, in_ready stalls and idle gaps. The
test also makes 20 Montgomery round trips with the irreducible x^13 + x^4 + x^3 + x + 1. It checks
every value and every latency. It counts each of these mechanisms and fails if any of them never
occurs.

Example, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
      tb/gf2m_ref_pkg.sv rtl/gf2m_pkg.sv rtl/m_cell.sv rtl/x_cell.sv rtl/x_row.sv \
      rtl/mmm_array.sv rtl/cd_slot_gen.sv rtl/mmm_multiplier.sv tb/tb_mmm_multiplier.sv \
      --top-module tb_mmm_multiplier -o sim
    ./obj_dir/sim

At m = 571, the Verilator build of `tb_mmm_multiplier_full` takes a few minutes. The simulation
itself takes well under a second. To try another field, change `M` (it must be odd and at least
3). The reference package handles m up to 1000.
