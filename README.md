# Vector ALU built from bit-skewed single-bit adders

Signal processing for radio, television and data links needs billions of
additions and multiplications per second. This vector arithmetic logic unit
gets that rate from very small adders clocked very fast. Every adder is a
single-bit (or, optionally, single base-4 digit) cell with registers on both
sides, so the clock period is roughly one full-adder delay. A whole word is
handled by a chain of such cells in which each word is *skewed*: bit k of a
word reaches cell k k clocks after bit 0 reaches cell 0. The first result
takes one clock per bit. After that a new result leaves the chain every clock,
so a vector of 16 words streams through at one word per clock.

The unit holds two vector register banks, X and Y, of 16 words of 16 bits.
Two independent engines work on them at the same time:

* an **adder unit**: element-wise `Z(i) = X(i) + Y(i)` or `X(i) - Y(i)`, and
  *integration* `ACC = ACC + X(0) + ... + X(15)`;
* a **multiplier-accumulator (MAC)**: element-wise 32-bit products
  `A(i) = X(i) * Y(i)`, or a dot product `A(0) = A(0) + sum X(i) * Y(i)`,
  signed or unsigned.

The adders are radix 2 by default. A build option (`RADIX4 = 1`) replaces
them with base-4 digit adders and a radix-4 multiplier.

## The staggered adder (`staggered_adder`)

This is the core of the design, and everything else is built around it.

```
 word t enters ─┬─ bit0 ──►[FA0]──s──► deskew 15 ──┐
                │            │c (reg)              │
                ├─ skew 1 ─►[FA1]──s──► deskew 14 ──┤
                │            │c (reg)              ├──► sum of word t
                ⋮            ⋮                      │    (16 clocks later)
                └─ skew 15 ►[FA15]─s────────────────┘
```

* Cell k adds bit k of one word. Its carry is registered and goes to cell
  k+1. One clock later, cell k+1 is working on bit k+1 of the same word.
* To make that true, operand bit k passes through an input shift register k
  clocks deep ("skew"). Sum bit k passes through an output shift register
  15-k clocks deep ("deskew"), so all bits of a result leave together.
* Latency is `W/DIGIT` clocks, and throughput is one word per clock. Sixteen
  back-to-back 16-bit additions finish 16 + 15 clocks after the first one
  enters (radix 4: 8 + 15).
* **Integration.** Cell k keeps the last sum digit it made in its own
  register. The next word's digit k reaches cell k exactly one clock later.
  So adding the running sum only needs a multiplexer on the cell's second
  input, choosing its own sum register (`fb = 1`). That register is the
  one-stage shift register that closes the accumulation loop. No wide
  feedback path exists anywhere. A run begins with one word whose `y` carries
  the starting value (`fb = 0`), followed by words with `fb = 1`.
  A chain of independent bit-serial adders working side by side could not do
  this, because the running sum would have to cross between adders.
* Subtraction: invert `y` and set `cin = 1`.
* Per-word `valid` flags travel with the data. Sum registers change only for
  valid words, so an idle clock inside an integration run keeps the running
  sum.

The cell is `full_adder` for `DIGIT = 1`. For `DIGIT = 2` it is
`radix4_digit_adder`, which adds two base-4 digits and a carry. The largest
case is 3 + 3 + 1, which gives carry 1 and digit 3.

## The pipelined array multiplier (`array_multiplier`)

A 16 x 16 array of full adders, with a register rank after every row:

* Row r adds the partial product `a AND b[r]` to the carry-save pair from row
  r-1. Cell j of row r takes the sum from cell j+1 and the carry from cell j
  of the row above. No carry ripples along a row, so each row costs one
  full-adder delay.
* The sum of cell 0 of row r is final product bit r. It goes into a shift
  register that travels down with the operation, and the operands travel the
  same way. A new multiplication can enter every clock.
* After row 15, the upper 16 bits are still a carry-save pair. A 16-bit
  `staggered_adder` merges them. Latency is 2W = 32 clocks.
* **Signed mode** uses the Baugh-Wooley form. Partial-product bits that pair
  one sign bit with one non-sign bit are inverted. 2^W enters as the merge's
  carry-in, and 2^(2W-1) is added by inverting the top product bit. Fixed
  point is the same integer product, and the caller places the binary point.

## The radix-4 multiplier (`radix4_multiplier`)

The multiplier operand is read as 8 base-4 digits. A table of multiples
{0, a, 2a, 3a} gives one partial product per digit, and partial product j is
shifted left by 2j bits. In binary a base-4 digit is just a bit pair, so no
separate conversion to base 4 is needed. A registered tree then adds the
terms in pairs. Signed operands add one more term, the two's-complement
correction `-2^W (a_sign * b + b_sign * a)`. Latency is 1 + ceil(log2 9) = 5
clocks. Unlike the radix-2 array, this tree uses word-wide adders.

## Multiplier-accumulator (`mac_unit`)

At `start` the MAC copies X and Y into its own input latches, so the host can
load the next operands while it works. It feeds one pair per clock into the
multiplier. Each product then goes through a 32-bit `staggered_adder`:

* `MAC_VMUL`: `y = 0`. Product i is written to accumulator i.
* `MAC_VMAC`: the first product adds accumulator 0 (or 0 with `acc_clear`),
  and the rest integrate with `fb = 1`. The final sum lands in accumulator 0.

In radix 2, a product reaches its accumulator 32 + 32 = 64 clocks after its
operands enter. A whole 16-element operation takes 80 clocks from start to
done. In radix 4 these figures are 21 and 37.

## Adder unit (`vector_adder_unit`)

At `start` the adder unit multiplexes X(i) and Y(i) into the staggered adder
for i = 0..15, one word per clock. It writes the results in order into its
result bank Z, or into `ACC` for integration. Unlike the MAC it reads X and Y
while it feeds them, so the host must not rewrite them during the 16 clocks
after `start`. Start to done takes 16 + 16 = 32 clocks in radix 2 and 8 + 16
in radix 4.

## Top level (`valu`) and how to program it

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | single clock (the fast "serial" clock), asynchronous active-low reset |
| `x_we`, `y_we`, `xy_waddr`, `xy_wdata` | write one word of X or Y |
| `add_start`, `add_op`, `add_acc_clear` → `add_busy`, `add_done`, `z_words[16]`, `add_acc` | adder unit |
| `mac_start`, `mac_op`, `mac_sgn`, `mac_acc_clear` → `mac_busy`, `mac_done`, `mac_acc[16]` | MAC unit |

Hold `start` for one clock. A start while the unit is busy is ignored.
`done` pulses for one clock once the results are in the banks. Operation
codes are in `valu_pkg` (`add_op_e`, `mac_op_e`).

| Parameter | Default | |
|---|---|---|
| `N` | 16 | words per bank |
| `W` | 16 | bits per word; products and MAC accumulators are 2W |
| `RADIX4` | 0 | 1 = radix-4 digit adders and radix-4 multiplier |

**Matrix multiplication.** For C = A·B (16 x 16), load row i of A into X and
column j of B into Y, then issue `MAC_VMAC` with `acc_clear`. That gives
C(i,j) in `mac_acc[0]`. The next row and column can be loaded while the dot
product runs. The full 256-element product takes 20 801 clocks in the
testbench, so finishing it in about a millisecond needs a clock of about
21 MHz. Vectors longer than 16 are handled in pieces: issue several
`MAC_VMAC` operations without `acc_clear`.

**Gauss-Jordan inversion.** This maps onto `MAC_VMUL` for scaling a row and
`ADD_VSUB` for subtracting a multiple of the pivot row. The reciprocal of the
pivot has no hardware and must come from the host. So must the rescaling of
32-bit products back to 16-bit fixed point, and the splitting of the 32-column
augmented rows into two bank loads. The testbench `tb_valu_gauss_jordan` does
exactly this in fixed point with 13 fraction bits. It inverts a random
16 x 16 matrix, and the 31 x 31 correlation matrix of a length-31
m-sequence. For the second it also solves w = R⁻¹p: each 31-element dot
product runs as two `MAC_VMAC` operations, the second continuing the first.
Every operation is checked bit for bit against integer arithmetic. A·inv(A)
stays within 0.007 of the identity, and w within 0.011 of the exact solution.

## How far to trust it, and where it departs from its description

* Every block has a self-checking testbench. These cover exhaustive cells;
  random and corner-case products in both signed modes; and exact cycle counts
  for the adder, multipliers and both units. A second copy of the end-to-end
  test runs the radix-4 build. The end-to-end test at full size checks a
  complete signed 16 x 16 matrix product against integer arithmetic.
* **Multiply latency.** The description of this architecture gives two
  counts that disagree: 45 clocks for the multiply-accumulate, and 65 clocks
  for the whole operation. This RTL needs 32 clocks per product and 64 until
  it reaches the accumulator. No structure that yields 45 was given.
* **Adder count.** One account uses 16 x 16 adders for 16 simultaneous
  multiplications, another 16 x 9 adders for 8 multipliers. This RTL follows
  the first: one 16 x 16 array, pipelined so that 16 operations are inside
  the array at once.
* These parts are this design's own choices:
  * the skew and deskew shift registers around each staggered adder (a
    design could instead multiplex bits straight out of the register banks);
  * the valid flags;
  * the start/busy/done interface;
  * the shared X/Y write port;
  * subtraction in the adder unit;
  * dot products landing in accumulator 0;
  * Baugh-Wooley signed multiplication and the radix-4 sign correction;
  * the registered adder tree of the radix-4 multiplier;
  * reset, and modulo-2^W (adder) and modulo-2^(2W) (MAC) wrap-around on
    overflow.
* Not built:
  * a generator for the fast serial clock (the whole design runs on the one
    clock it is given);
  * hardwired microcode that would run a whole matrix multiplication or
    inversion as one instruction;
  * a reciprocal or divider.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/valu_pkg.sv \
          tb/tb_valu.sv --top-module tb_valu
obj_dir/Vtb_valu
```

Use any other `tb/tb_<block>.sv` and its module name the same way.
`tb_valu_radix4` runs the radix-4 build end to end, and
`tb_valu_gauss_jordan` inverts a matrix with the host's help.

## Files

| File | Contents |
|---|---|
| `rtl/valu_pkg.sv` | operation enums, latency functions |
| `rtl/full_adder.sv` | single-bit adder cell |
| `rtl/radix4_digit_adder.sv` | base-4 digit adder cell |
| `rtl/staggered_adder.sv` | bit-skewed adder chain with integration |
| `rtl/vector_regbank.sv` | N x W register bank |
| `rtl/vector_adder_unit.sv` | adder unit with Z bank and accumulator |
| `rtl/array_multiplier.sv` | pipelined carry-save array multiplier |
| `rtl/radix4_multiplier.sv` | table-lookup radix-4 multiplier |
| `rtl/mac_unit.sv` | multiplier-accumulator with input latches |
| `rtl/valu.sv` | top level |
| `tb/tb_*.sv` | one testbench per module, plus `tb_valu_radix4` and `tb_valu_gauss_jordan` |
