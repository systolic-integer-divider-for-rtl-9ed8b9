# Systolic integer modulo-divider for the Sunar-Koç ONB type II permutation

The Sunar-Koç multiplier for GF(2^m) works on elements held in a type II
optimal normal basis M = {β, β², β⁴, …, β^(2^(m-1))}. Before it can multiply,
it must move every coefficient to the shifted canonical basis
N = {β₁, β₂, …, β_m}. Coefficient i moves to position

    k = 2^(i-1) mod p,  p = 2m + 1
    j = k        if k ≤ m
    j = p − k    otherwise

So the basis change is, at its core, a sequence of integer remainders.
This RTL computes them with a systolic integer divider: a regular array
of small cells, one row per iteration of a binary division. A row that
has nothing to subtract only shifts. Around that divider sits the
permutation unit, which turns an m-bit element into its permuted form.
The same divider, in a word-based variant that does several rows per
clock, is also offered as a general-purpose quotient/remainder unit.

Everything is SystemVerilog-2017. The testbenches check themselves and
run under plain Verilator.

## The division recurrence

The divider computes `Q = A div B` and `R = A mod B`:

- A is a dividend of DW bits.
- B is a divisor of BW bits.
- Both widths count a sign bit, and both operands must be non-negative.

There are `ROWS = DW − BW + 1` iterations. Each one produces one quotient
digit q ∈ {−1, 0, +1}:

    P  = 2·R + a        (a = next dividend bit, MSB first)
    q  = 0   if the sign bit of P and the two bits below it are equal
    q  = +1  if P ≥ 0 otherwise;   q = −1 if P < 0 otherwise
    R' = P − q·B

R starts as the top BW−1 bits of A. The other ROWS bits enter one per
row. After the last row, a post-processing step ("Phase 2") turns the
signed digits into a binary quotient. If R is negative, it also adds B
back once and decrements Q.

**The divisor must be normalised.** Its leading one must sit right below
its sign bit: `B[BW-1:BW-2] = 2'b01`. This is what makes the shift-only
digit safe. With `2^(BW-2) ≤ B`, a P whose top three bits agree satisfies
`|P| < 2^(BW-2) ≤ B`, so leaving it alone keeps the invariant
`−B ≤ R < B`. A ±1 digit pulls any other P back into that range. The
remainder therefore always fits in BW bits. The top bit of P is used
only to pick the digit, and its carry is dropped. For the same reason
only a negative final remainder ever needs correcting.

Two consequences follow:

- **Fixed divisor, as in the permutation.** Size BW to the bit length of
  the divisor plus one (p = 11 → BW = 5). The divisor is then normalised
  automatically.
- **Quotient width.** The quotient has ROWS bits. A non-negative
  DW-bit A divided by a normalised B always fits.

Rows whose digit is 0 do no arithmetic. Every divider reports how many
rows only shifted (`nop_count`) and whether Phase 2 had to correct
(`corr`).

## Cells and rows

One row holds BW cells, laid out like a column-by-column subtraction:

- **Red cell (`div_cell_red`), sign column.** It reads the three leading
  bits of P and decodes the digit into `{op, sub}`. `op = 0` means shift
  only; `sub` chooses subtract (+1) or add (−1). It also forms the sum
  bit of the sign column. The digit depends only on bits that arrive at
  the row, so it is ready before the carry chain settles.
- **Blue cells (`div_cell_blue`), the other columns.** Each one
  "multiplies" its divisor bit by the digit and adds the product to its
  remainder bit with a full adder. The product is masked by `op` and
  inverted by `sub`. For a subtraction, the row feeds a carry of 1 into
  column 0.
- **Row (`div_row`).** One red cell and BW−1 blue cells with a
  ripple-carry chain. It is combinational.

Carries flow right to left within a row. The remainder flows from row to
row.

## Mapping the rows onto hardware

The full dependence graph has ROWS × BW cells. Two mappings are built.

**Bit-wise array (`div_bitwise`), the main design.**

- Every cell of a row fires in the same time step (schedule s = [1 0]).
- The graph is projected along the row index (d = [1 0]ᵀ).
- The result is a linear array of BW processing elements that executes
  one row per clock.
- Flip-flops hold the divisor and the partial remainder.
- A shift register holds the dividend bits that have not entered yet.
- Its default is a 15-bit dividend and a 4-bit divisor: 12 rows, 4 PEs.

**Word-based array (`div_word`).**

- W rows are chained combinationally and run in one clock (schedule
  t = ⌊i/W⌋), so a division takes ⌈ROWS/W⌉ steps instead of ROWS.
- If ROWS is not a multiple of W, the dividend gets leading zero bits
  until it is. This adds rows without changing any result.
- Its default is 15/4 with W = 3.

Both mappings share the handshake and the Phase 2 block (`div_post`).

| | start → done latency |
|---|---|
| `div_bitwise` | ROWS + 1 clocks |
| `div_word` | ⌈ROWS/W⌉ + 1 clocks |

**Handshake:**

1. While `ready` is high, a one-cycle `start` loads A and B. This edge is
   the start edge.
2. `done` pulses once when the result is ready.
3. `q`, `r`, `nop_count` and `corr` then hold until the next start.

Reset is synchronous and active low. An assertion checks the operand
rules when a division starts.

## The permutation unit

`sk_permutation` has degree parameter M (default 5, p = 11). It takes one
index at a time:

- `perm_lsr`, a left shift register, supplies 2^(i−1). It is loaded with
  1 and shifted once per index.
- A `div_bitwise` divides that power by p. Its divider widths are derived
  from M: the dividend has M+1 bits and the divisor has bits(p)+1 bits.
- `perm_fold` maps the remainder R to the new position. It works out
  m − R in two's complement; a carry out means R ≤ m, so R is kept.
  Otherwise a second subtractor gives p − R.
- The coefficient is moved to its new position.

With `inverse = 1`, the same index pairs are used the other way round.
This takes an element from basis N back to basis M, which the multiplier
needs for its product.

Timing:

- Each index takes ROWS + 3 clocks: issue the division, the divider's
  ROWS + 1, and one to take the remainder.
- A whole element takes M·(ROWS + 3) clocks: 25 for m = 5.
- `idx_valid` pulses once per index with (`idx_i`, `idx_j`, `idx_kept`).

For GF(2^5), the exponents 1, 2, 4, 8, 16 land on positions 1, 2, 4, 3, 5.

## Top level

`sk_divider_top` holds two independent units, each with its own ports:

- **`perm_*`:** the permutation unit (M = 5).
- **`div_*`:** a general-purpose `div_word` with a 32-bit dividend, an
  18-bit divisor and W = 3: 15 rows in 5 steps, 6 clocks per division.
  This size fits the example 338579150 / 127773 = 2649, remainder 108473.

The ONB multiplier that would consume the permuted operands is not part
of this design.

## Where this design departs from its source, and what it adds

- **Digit selection reads three bits, not two.** The source describes
  the decision as an XOR of two leading bits. For a non-redundant
  remainder that is not enough: a two-bit rule fails on real operands.
  The red cell uses the sign bit and the two bits below it (two XORs).
  In the four-PE array, the third bit is the previous output of PE_1,
  the bit two columns below the sign. That matches the extra line from
  PE_1 to the red PE in the source's array drawing.
- **Normalised divisor.** The source implies a normalised divisor but
  never states it as a rule. Here it is a stated requirement, checked by
  an assertion.
- **Phase 2 keeps only the negative-remainder branch.** The
  "subtract B when R ≥ B" branch of the source's post-processing can
  never be taken with this recurrence, so it is not built.
- **Range check written as m − R.** The source's block diagram labels
  the range check "R − m, carry = 1 → keep R". That would keep residues
  above m. The check here follows the permutation's definition instead:
  keep R when 1 ≤ R ≤ m.
- **Placement of the flip-flops.** The source draws them inside the
  processing elements. Here they are in the two divider modules, so the
  same cells serve both arrays.
- **Choices of this design.** Where the source is silent, this design
  chose the handshake, the reset, the digit encoding, the padding side
  of the word-based array, the sequential index loop of the permutation
  unit and the observation outputs (`nop_count`, `corr`, `idx_*`).
- **Not built.** The source suggests a broadcast bus with wide memories
  to feed the array boundary. It gives no parameters, so it is not
  built; the dividers load all operands in parallel.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_div_cell_red`, `tb_div_cell_blue` | All input combinations, against arithmetic. |
| `tb_div_row` | All remainders and normalised divisors at BW = 5. It also checks the range invariant. |
| `tb_div_post` | Random digit splits, against the true quotient and remainder. |
| `tb_div_bitwise` | 15/4 and 32/18 arrays against `/` and `%`, the latency, and the count of shift-only rows against a software model. Includes the 338579150 / 127773 example. |
| `tb_div_word` | Three sizes, one padded (13 rows → 15), with results and latency. |
| `tb_perm_lsr`, `tb_perm_fold` | Shift register and fold, including the m = 11 fold. |
| `tb_sk_permutation` | m = 3, 5, 11: every element (or random ones) to basis N and back, the index map, the latency. |
| `tb_sk_divider_top` | End to end at m = 11 with a padded 17/5/3 word divider, both units running at once. It counts each mechanism (shift-only rows, corrections, kept and folded residues, inverse conversion, padding) and fails if one never occurs. |
| `tb_sk_divider_full` | The top at its default parameters: all 32 elements of GF(2^5) both ways, and the worked division example plus random divisions. |

To run one with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/div_pkg.sv tb/tb_sk_divider_full.sv --top-module tb_sk_divider_full
    ./obj_dir/Vtb_sk_divider_full

Every testbench finishes in well under a second.

## Changing sizes

- **Divider widths:** `div_bitwise #(.DW, .BW)` and
  `div_word #(.DW, .BW, .W)`. BW must be at least 3.
- **Field degree:** `sk_permutation #(.M)`. Every internal width follows
  from M.
- **Top level:** `sk_divider_top` passes M, DIV_DW, DIV_BW and DIV_W down
  to its two units.
