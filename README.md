# Systolic multipliers and exponentiators for GF(2^m)

This RTL multiplies two elements of the binary field GF(2^m), in the standard
(polynomial) basis, on a one-dimensional systolic array. There are two
variants. Both scan the multiplier A from its most significant bit and never
broadcast a signal across the array:

* **Architecture-I** has one cell per bit position. Each cell is split into
  two short pipeline layers, so the clock period is one AND plus one XOR.
  One product advances only every second clock. The free clocks carry a
  second, independent product, so the array finishes one product every m
  clocks when it has independent work.
* **Architecture-II** pairs the cells of Architecture-I into m/2 merged
  cells and removes the register between neighbouring pairs. A product now
  advances every clock, including when each product depends on the one
  before. The clock period grows to one AND plus two XORs, and the cell
  count is halved.

Each array is wrapped in a GF(2^m) exponentiator, X^E mod F. Both
exponentiators sit side by side in the top module `gf_systolic_top`. The
default size is m = 155 (GF(2^155)).

The architectures are those published by W.-C. Tsai and S.-J. Wang, "Two
systolic architectures for multiplication in GF(2^m)", IEE Proc.-Comput.
Digit. Tech. 147(6), 2000. The cell equations, the cell partitioning and
pairing, and the one-clock and two-clock schedules follow that work. The
token format, the way operands are loaded, the serial-output details, the
exponentiator controllers and all interfaces are this implementation's own.
Each is marked below.

## The arithmetic

Let F(x) = x^m + f_{m-1}x^{m-1} + ... + f_0, and let R^i be the partial
product after i multiplier bits. Then

    R^0 = 0
    R^i = R^{i-1}·x + a_{m-i}·B   (mod F),   i = 1 .. m,     P = R^m

Reducing R·x only needs the bit that leaves the top, r_{m-1}. At the bit
level this gives

    r_j^i = r_{m-1}^{i-1}·f_j  ⊕  r_{j-1}^{i-1}  ⊕  a_{m-i}·b_j      (r_{-1} = 0)

Every bit of iteration i needs r_{m-1}^{i-1}, so the array works from the MSB
down. Iteration i starts in the MSB cell and sweeps down one cell per clock.

The split used by both architectures is:

    p_j^i = r_{m-1}^{i-1}·f_j ⊕ a_{m-i}·b_j      (upper layer, "p")
    r_j^i = r_{j-1}^{i-1} ⊕ p_j^i                 (lower layer, "r")

The upper layer needs nothing from the current iteration except r_{m-1}, and
f_j, b_j and a_{m-i} are known beforehand.

## How iterations travel: tokens and the one-clock gap

Each iteration enters the MSB cell as a **token** (`gf_pkg::gf_tok_t`) with
these fields:

* `valid`
* `first` (i = 1)
* `last` (i = m)
* `slot`
* `a` (the multiplier bit a_{m-i})
* `rmsb` (r_{m-1}^{i-1})

The MSB cell fills in `rmsb`. The token then moves one cell toward bit 0 on
every clock. Partial-sum bits move the other way: r_j passes from cell j up
to cell j+1.

This crossing flow explains the whole schedule. Cell j computes r_j^i from
r_{j-1}^{i-1}, which cell j-1 produced for the *previous* token. The previous
token reached cell j-1 one clock after it reached cell j. So a new iteration
can enter only every second clock:

```
clock:        t     t+1    t+2    t+3    t+4   ...
MSB cell      p^i   r^i    p^i+1  r^i+1  p^i+2          (one product)
cell m-2            p^i    r^i    p^i+1  r^i+1
cell m-3                   p^i    r^i    p^i+1
```

Architecture-I fills the idle clocks with a second product. Its tokens carry
`slot = 1` and use the second multiplicand. Architecture-II removes the gap
instead, as described below.

`first` stands in for R^0 = 0. A cell that sees a first-iteration token
ignores r_{j-1} (and the MSB cell sends rmsb = 0). So registers never need
clearing between products, and a new product can follow the last iteration of
the previous one at once. Reset (asynchronous, active low) clears all
registers only at start-up.

## Architecture-I (`gf_arch1_cell`, `gf_arch1_array`)

Cell j has three stages.

1. **p layer.** In the clock where its token is in `tok_q`, the cell computes
   p from the token's `a` and `rmsb`, f_j and b_j of the token's slot. The MSB
   cell takes `rmsb` from its own r register, because r_{m-1}^{i-1} was
   written there exactly one clock earlier.
2. **r layer.** One clock later, r = p ⊕ r_{j-1}, with r_{j-1} forced to 0 on
   the first iteration.
3. **Output chain.** One clock after the last iteration's r is registered,
   the cell loads that bit into a one-bit chain. In every other clock the
   chain passes the bit from cell j-1 upward. Taking the bit from the
   register keeps the chain's multiplexer out of the r-layer path. Bit j
   reaches the top 2(m-1-j) clocks after the MSB. The product therefore
   leaves MSB first, one bit every second clock, and the two slots' bits
   interleave without collisions.

**Multiplicand loading** (own choice). Cell j copies b_j into a per-slot
register at the clock edge where the first token of a product enters it.
The p layer then reads only registers. The caller must hold
`b0_i`/`b1_i` only for the m clocks of that sweep. The next product of the
same slot may start 2m clocks after the previous one with a different B.

**Interface and timing** of `gf_arch1_array #(M)`:

| Clock (a_0 sampled at e) | Event |
|---|---|
| e0, e0+2, ..., e0+2(M-1) | one product's a_{M-1} ... a_0 on `in_a`, `in_slot` fixed, `in_first` on the first, `in_last` on the last |
| e0 ... e0+M-1 | `b<slot>_i` must be stable |
| e + 2M + 2 − 2j | product bit j on `out_bit` (`out_valid`, `out_slot`; `out_last` on bit 0) |

MSB out: e+4. LSB out: e+2M+2. Throughput:

* two independent products per 2M clocks;
* a dependent product can start 2M+2 clocks after the previous one started,
  if A is streamed back MSB first.

An assertion checks that iterations in consecutive clocks belong to different
slots.

## Architecture-II (`gf_arch2_cell`, `gf_arch2_array`)

Merged cell k holds a high bit j and a low bit j-1. In one clock it finishes
iteration i-1 for both bits and prepares iteration i:

    r_j     = r_{j-1}(own register, last clock) ⊕ p_j
    r_{j-1} = r_{j-2}(cell k-1, this clock)     ⊕ p_{j-1}
    p_j, p_{j-1} of the next token, from r_{m-1} of this clock

The key step is the second line. r_{j-2} is the high bit that the cell below
computes *in the same clock* for the previous token (one token behind, one
cell lower). It reaches this cell through a wire, not a register. Inside the
pair, r_{j-1} waits one clock in a register, as in Architecture-I. Across
pairs, the delay is zero. Together the two give one iteration per clock with
no gap.

The combinational path crosses only one pair boundary, so the longest path
stays short:

* In ordinary cells: r_{j-2} (one XOR) then r_{j-1} (one XOR).
* In the MSB cell: r_{m-1} (one XOR) feeds that cell's p layer (AND + XOR)
  in the same clock.

Both counts leave out the first-iteration zero gates (see Hardware cost).

**Odd m** (own choice). For odd m, the pairs are aligned to the top:
(m-1, m-2), ..., (2, 1). The low half of cell 0 is an unused position with
b = f = 0, which always holds 0. This keeps r_{m-1} in the high half of the
top cell, which is what gives the XOR–AND–XOR longest path. If the pairs were
(2k+1, 2k) from the bottom, the unused position would land in the top cell and
add an XOR to the path.

**Serial output.** Each cell has a two-bit chain stage (two 2:1 multiplexers)
that loads {r_j, r_{j-1}} on the last iteration. Pairs reach the top every
second clock. A single-register serialiser (own choice) emits them as one bit
per clock, MSB first, and drops the unused position.

**Interface and timing** of `gf_arch2_array #(M)`:

| Clock (a_0 sampled at e) | Event |
|---|---|
| e0 ... e0+M-1 | a_{M-1} ... a_0 on `in_a`, one per clock, `in_first`/`in_last` on the ends |
| e0 ... e0+⌈M/2⌉-1 | `b_i` must be stable (copied as the first token enters each cell) |
| e + M + 3 − j | product bit j on `out_bit` (`out_last` on bit 0) |

Independent products can follow each other directly, one every M clocks. A
product whose multiplier is the previous result can start in the clock that
result's MSB appears, which gives M+3 clocks per dependent product. The
result bits can be wired straight back into `in_a`.

## Exponentiators (`gf_arch1_exp`, `gf_arch2_exp`)

The published work gives only what these units do: a controller around each
array that arranges its inputs and collects its serial results. The methods
below are this implementation's choices, picked so that each array does what
it is best at. Both exponentiators use the same interface:

* Pulse `start` with `base_i` (X) and `exp_i` (E, `EW` bits, default m).
* Hold `f_i` until `done`.
* `done` pulses for one clock. `result_o` holds X^E until the next start.

**Architecture-I, right-to-left binary.** The method is S = X, P = 1, and for
each exponent bit from the LSB:

* P = P·S if e_k = 1;
* S = S·S (skipped for the last bit).

The two products of a bit are independent. They enter the array interleaved:
S·S in slot 0 and P·S in slot 1, both with multiplicand S. One exponent bit
takes 4m+3 clocks, or 4m+4 when e_k = 1.

**Architecture-II, left-to-right binary.** The method is R = 1, and for each
exponent bit from the MSB:

* R = R·R;
* R = R·X if e_k = 1.

The multiplication depends on the square. Its multiplier bits are taken
straight from the array's serial output as the square leaves, so the square
is never stored. A squaring cannot start early the same way, because it
needs its whole operand as multiplicand. A clear exponent bit takes 2m+3
clocks and a set one takes 3m+6. An assertion checks that the fed-back
stream has no holes.

At m = 155, a random 155-bit exponent takes:

* about 96,200 clocks on the Architecture-I unit;
* about 61,000 clocks on the Architecture-II unit (half the bits set).

The published throughput figures (4 and 2.8 Mbit/s at 1.6 and 2.3 ns) imply
about m² = 24,025 clocks per exponentiation. These controllers do not reach
that, because consecutive exponent bits are not overlapped.

## Hardware cost

The published per-cell budgets are:

* Architecture-I: 2 AND, 2 XOR, 1 MUX, 8 latches.
* Architecture-II: 4 AND, 4 XOR, 2 MUX, 9 latches.

This RTL matches the gates: the AND/XOR count of the p and r layers and the
output multiplexers. It has more registers per cell:

* a 6-bit token;
* copies of the control flags for the r layer;
* multiplicand registers;
* a wider output-chain stage with valid/slot/tail flags.

The reason is that token transport and operand loading are spelled out here
and were not in the published cell. Architecture-I additionally needs per-slot
multiplicand storage for interleaving.

The first-iteration flag costs one gate more in some paths than the published
figures assume: an AND that zeroes r_{j-1} in front of the r-layer XOR, and an
AND that zeroes r_{m-1} in the MSB cell. In Architecture-II, the path across a
pair boundary is therefore AND, XOR, AND, XOR rather than two XORs. The
alternative is to clear the partial-sum registers between products, which
would cost a clock per product.

## Files

| File | Contents |
|---|---|
| `rtl/gf_pkg.sv` | token and output-chain structs |
| `rtl/gf_arch1_cell.sv`, `rtl/gf_arch1_array.sv` | Architecture-I cell and M-cell array |
| `rtl/gf_arch2_cell.sv`, `rtl/gf_arch2_array.sv` | Architecture-II merged cell and ⌈M/2⌉-cell array with serialiser |
| `rtl/gf_arch1_exp.sv`, `rtl/gf_arch2_exp.sv` | exponentiators |
| `rtl/gf_systolic_top.sv` | both exponentiators, ports `x1_*` and `x2_*` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. For
example, the end-to-end test at the default size is:

```
verilator --binary --timing --assert -Irtl \
  rtl/gf_pkg.sv rtl/gf_arch1_cell.sv rtl/gf_arch2_cell.sv \
  rtl/gf_arch1_array.sv rtl/gf_arch2_array.sv \
  rtl/gf_arch1_exp.sv rtl/gf_arch2_exp.sv rtl/gf_systolic_top.sv \
  tb/tb_gf_systolic_top.sv --top-module tb_gf_systolic_top -o sim
./obj_dir/sim
```

For another testbench, swap in the needed files and change `--top-module`.
All tests use m = 155 and F(x) = x^155 + x^62 + 1. To test another size,
change the testbench's `M` localparam. Any F works: the arithmetic does not
need F to be irreducible. The references inside the testbenches use a
different method from the hardware: a carry-less product followed by
polynomial reduction, and square-and-multiply on top of that.

What the tests establish:

* **Cells.** Random tokens and operands, checked every clock against a
  cycle model of the cell equations. Both the ordinary and the MSB variant
  are tested.
* **Arrays.**
  * Architecture-I: interleaved back-to-back products in both slots,
    isolated products, and a chain of dependent products, each started
    (in the other slot) in the clock the previous MSB appears.
  * Architecture-II: back-to-back independent products, plus a chain of
    dependent products started the clock the previous MSB appears.
  * Every result bit is checked in the exact clock given by the latency
    formula above.
  * Both arrays also pass at small odd and even sizes.
* **Exponentiators.** Exponents 0, 1, all-ones and random. The result is
  checked, and so is the exact clock count from start to done.
* **Top.** Both exponentiators run at once at the default size. The test
  counts, and requires, four mechanisms: interleaved issue,
  squaring-only steps, fed-back (chained) products and stand-alone squarings.

Not verified: timing (clock period) and area after synthesis; the published
delay and gate figures come from a 0.35 µm library and circuit simulation.
