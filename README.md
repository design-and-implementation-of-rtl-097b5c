# 32-bit Vedic multiply-accumulate unit

A multiply-accumulate (MAC) unit computes `acc <- acc + a*b` once per clock.
It is the core operation of FIR and IIR filters, convolutions and FFTs. The
multiplier sets the speed of a MAC. This design builds its multiplier on
the *Urdhva Tiryakbhyam* ("vertically and crosswise") method of Vedic
mental arithmetic. That method splits a large multiplication into smaller
ones that can all run in parallel. Their shifted results are then added by a
Wallace-style carry-save tree instead of a chain of ordinary adders.

```
 a[31:0] --+                     Q[63:0]   +-------------+
           +--> vedic_mul (N=32) --------> | accumulator | --> acc[63:0]
 b[31:0] --+   (combinational)             | acc <= acc+Q|
                                 clock --> |             |
                                 reset --> +-------------+
```

All arithmetic is unsigned. The multiplier has no clock. The only state is
the 64-bit accumulator register.

## The vertical-and-crosswise rule

For two 2-digit numbers `AB x CD`, the rule makes three column products:

| step | digits used             | result column   |
|------|-------------------------|-----------------|
| 1    | B x D (vertical, right) | lowest          |
| 2    | A x D + B x C (crosswise) | middle, carry on |
| 3    | A x C (vertical, left) plus the carry | highest |

For example, 31 x 44: step 1 gives 1x4 = 4. Step 2 gives 3x4 + 1x4 = 16:
write 6 and carry 1. Step 3 gives 3x4 + 1 = 13. The result is 1364.

In binary, with `a = {A,B}` and `b = {C,D}`, every digit product is an AND
gate and each addition is a half adder. `vedic_mul_2x2` is exactly that:
four ANDs and two half adders.

## How an N-bit multiplier is built from N/2-bit ones

Split each operand into halves of `H = N/2` bits. Four half-size multipliers
work in parallel:

```
P0 = a_lo * b_lo    P1 = a_lo * b_hi    P2 = a_hi * b_lo    P3 = a_hi * b_hi
```

The product is `P0 + (P1 + P2) * 2^H + P3 * 2^N`. Two facts follow:

* The low `H` bits of the product are simply `P0[H-1:0]`. They need no
  adder.
* The upper `3H` bits, `Q[2N-1:H]`, are the sum of four terms. All four are
  aligned to weight `2^H`: `P1`, `P0[N-1:H]`, `P2` and `{P3, H zeros}`.
  The sum of these four fits in `3H` bits.

A conventional Vedic multiplier adds these four terms with three
carry-propagate adders in two stages: (`P1 + P0_hi`), (`P2 + P3<<H`), and
then the sum of those two results. Here the three adders are replaced by one
**carry-save tree** (`csa_tree`):

1. One row of full adders reduces `P1`, `P0_hi` and `P2` to a sum word and a
   carry word. The carry word is shifted left by one place.
2. A second row of full adders reduces that pair plus `{P3, 0}` to a new sum
   word and carry word.
3. One carry-propagate adder adds the final pair.

A carry therefore ripples across the word once per level instead of twice.
This is where the speed-up over the conventional Vedic multiplier comes from.

The same construction repeats down to 2x2 leaves. For N = 32 the multiplier
contains:

| level | digit width | products | carry-save trees (width) |
|-------|-------------|----------|--------------------------|
| 1     | 2           | 256      | none (2x2 leaves)        |
| 2     | 4           | 64       | 64 (6 bits)              |
| 3     | 8           | 16       | 16 (12 bits)             |
| 4     | 16          | 4        | 4 (24 bits)              |
| 5     | 32          | 1        | 1 (48 bits)              |

`vedic_mul` writes this recursion out as an explicit loop over levels, so the
module does not instantiate itself. Level `k` holds the product of every
pair of `2^k`-bit digits. The product of a-digit `i` and b-digit `j` is in
`g_lvl[k].p[i*NB + j]`, where `NB = N / 2^k`. Each such product is built from
four products on level `k-1`. The last level holds the single product
`q`.

## Accumulator and timing

`accumulator` is a 64-bit register with an adder in front of it. On each
rising clock edge it loads `acc + Q`, or zero while `reset` is high.

* **Throughput:** one multiply-accumulate per clock.
* **Latency:** the `a` and `b` present at a rising edge are included in
  `acc` right after that edge. Between edges, `acc` does not change.
* **Critical path:** from `a`/`b` through the multiplier and then the 64-bit
  accumulator adder into the register. There is no pipeline register.
* **Overflow:** the sum wraps modulo 2^64. There is no overflow flag and no
  saturation.
* **Reset:** synchronous and active high. Operands presented while `reset`
  is high are ignored.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/mac_pkg.sv` | `mac_pkg` | shared sizes: `MAC_N = 32`, `MAC_ACC_W = 64` |
| `rtl/mac_unit.sv` | `mac_unit` | top: multiplier feeding the accumulator; parameter `N` (default 32) |
| `rtl/vedic_mul.sv` | `vedic_mul` | N x N unsigned Vedic multiplier; `N` a power of two, at least 2 (default 32) |
| `rtl/vedic_mul_2x2.sv` | `vedic_mul_2x2` | 2x2 leaf multiplier |
| `rtl/csa_tree.sv` | `csa_tree` | four-operand carry-save adder tree; parameter `W` (default 48) |
| `rtl/accumulator.sv` | `accumulator` | clocked W-bit accumulator with reset (default 64) |

Top-level ports of `mac_unit`: `clock`, `reset`, `a[N-1:0]`, `b[N-1:0]`
and `acc[2N-1:0]`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if
it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_vedic_mul_2x2` | all 16 operand pairs |
| `tb_csa_tree` | corner cases (zeros, all ones, equal single bits) and 20,000 random operand sets, against the plain sum |
| `tb_vedic_mul` | 4-bit and 8-bit multipliers exhaustively; 16-bit with 20,000 random pairs; the default 32-bit with corners and 50,000 random pairs |
| `tb_accumulator` | running sum after every edge, reset at the start and mid-stream, wrap-around |
| `tb_mac_unit` | end to end at the default 32/64-bit sizes (see below) |

`tb_mac_unit` covers the following:

* the 31 x 44 example;
* a 16-term dot product starting from a cleared accumulator;
* operand corners;
* 6,000 random cycles with a reset in the middle.

After every edge it checks `acc` against its own model. It also checks that
`acc` holds its value between edges. It counts how often reset,
accumulation and wrap-around happened, and fails if any of them never
happened. All testbenches pass.

To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/mac_pkg.sv tb/tb_mac_unit.sv \
          --top-module tb_mac_unit -o sim
./obj_dir/sim
```

## Where this RTL makes its own choices

The following come from the design itself:

* the block structure and the 32-bit operand / 64-bit accumulator sizes;
* the 2x2 vertical-and-crosswise leaf;
* the four-way split with its bit slices;
* the use of a carry-save tree in place of the conventional adders.

The following choices are this implementation's own:

* **Reset** is synchronous and active high. The design only says that
  clock and reset exist.
* **No enable input:** the unit accumulates on every edge.
* **Wrap-around** on overflow.
* **Unsigned operands.** Signed multiplication is not described.
* **Shape of the carry-save tree:** two 3:2 rows, with the operands in the
  order `P1, P0_hi, P2`, then `P3<<H`. The final carry-propagate adder is
  written as a behavioural `+` and left to synthesis. The design describes
  the tree only as "similar to a Wallace tree".
* **The inputs to the first conventional adder.** In the usual drawing of
  the N x N structure they are labelled as slices that would drop product
  bits. The RTL adds all of `P1` to the upper half of `P0`, which is what
  the arithmetic requires.

Not reproduced: the FPGA results that motivate the design. These are path
delays of 4- to 32-bit multipliers and about 6.1 ns for the 32-bit MAC on
Spartan-3E. They are timing properties of a particular device and tool
flow, and simulation cannot check them.
