# Parallel multipliers for modular arithmetic

This RTL computes a whole modular product in one combinational pass, with no
iteration. It covers three kinds of field that public-key and
elliptic-curve hardware uses:

* **GF(p), general odd modulus M.** Four variants of a parallel Montgomery
  multiplier (PMM). The bit-product array and the modular reduction are
  folded into a single adder tree. Each halving stage of that tree also
  divides by two modulo M.
* **GF(p^m) over a special optimal extension field.** The prime is
  p = 2^n − c and the field polynomial is f(z) = z^m − 2. There are two units:
  * a merged-arithmetic multiply-accumulate unit;
  * a digit-serial multiplier built on the same merged arithmetic.
* **GF(2^m).** A multiply-accumulate unit that runs either one m-bit
  operation or two independent m/2-bit operations per clock.

All the units sit side by side in `modmul_top`, sharing only clock and reset.

## The Montgomery-reducing adder tree (`mont_tree`)

This tree is the heart of the GF(p) multipliers.

A normal Wallace tree compresses H rows down to two rows (sum and carry).
Every 3:2 stage keeps the full weight of its inputs, so the rows grow wider as
the tree goes down. `mont_tree` keeps the row width fixed by dividing by two at
every stage, modulo M.

**Halving stages (more than four rows).** The rows are taken in groups of three.

1. A full-adder bank turns the three rows into a sum row and a carry row.
2. The carry row is shifted left one place, so its bit 0 is zero. Bit 0 of
   the pair is therefore just bit 0 of the sum row.
3. A second, back-to-back full-adder bank adds M to the pair whenever that
   bit is one. M is odd, so bit 0 is now zero.
4. Bit 0 is dropped. The group's value, plus either 0 or M, has been divided
   by two exactly.

Rows left over after grouping are handled as follows:

* A pair goes through half adders in the first bank.
* A single row goes through half adders with M in the second bank, giving two
  rows.

Each group of three rows becomes two rows of the same width W. The height
follows h → 2·⌊h/3⌋ + (2 if h mod 3 ≠ 0).

**Final stages.** The 4→3 and 3→2 stages are ordinary carry-save stages with no
modulus. The outputs are therefore W+2 bits wide.

**The exponent J.** If the tree has J halving stages, the sum plus carry T it
returns satisfies:

    T · 2^J = Σ rows + E · M      for some integer E ≥ 0
    T ≡ Σ rows · 2^−J  (mod M)

J depends only on the number of rows. `pmm_pkg::tree_halvings(H)` computes it
at elaboration time, and the testbenches recompute it independently. J plays
the part of the Montgomery exponent: a PMM returns A·B·2^−J mod M. A host
that wants plain A·B mod M multiplies once more by 2^(2J) mod M, in the usual
Montgomery way.

| N = 32      | rows into the final tree | tree stages | J  | table entries | result bits |
|-------------|--------------------------|-------------|----|---------------|-------------|
| Impl. I     | 528                      | 15          | 13 | 31            | 34          |
| Impl. II    | 767                      | 16          | 14 | 16            | 34          |
| Impl. III   | 70 (after two 32/31-row trees, J=6 each) | 8 + 10 | 6 + 8 = 14 | 34 | 36 |
| Impl. IV    | 104 (after the same two trees)           | 8 + 11 | 6 + 9 = 15 | 17 | 36 |

## The four GF(p) variants (`pmm_impl1` … `pmm_impl4`)

All four variants start from the N×N bit-product array of A and B, split at
column N.

* **Lower half.** The N rows of the lower half are already below 2^N.
* **Upper half.** A product bit in column N+d is worth 2^(N+d). It is replaced
  by the precomputed residue 2^(N+d) mod M (an N-bit number) whenever the bit
  is one.

The residues live in a table (`pmm_lut`). All entries are visible at once, and
the host writes the table one entry per clock. The variants differ in how
they reach the table and in how tall the summation array becomes.

* **Implementation I.** Every upper-half product bit selects its own residue
  row. That gives N(N+1)/2 rows, reduced by one tree.
  * Table entry d = 2^(N+d) mod M, for d = 0 … N−2.
* **Implementation II.** Upper columns are taken in pairs (even column N+d,
  odd column N+d+1).
  * A bit y of the odd column and a bit x of the even column are recoded as
    three bits of the even column: x|y, y and x&y. Together they count
    x + 2y, the reverse of a full adder.
  * Only even columns remain, so the table is halved.
  * The array grows by about half, to about 3N(N+1)/4 rows.
  * Table entry t = 2^(N+2t) mod M.
* **Implementation III.** The array is not flattened first.
  * The lower half (N rows) and the upper half (N−1 rows, shifted down by N)
    each go through their own `mont_tree`, side by side. Those trees have
    J_R and J_L halving stages.
  * The upper tree's two outputs are worth 2^(N+J_L−J_R) relative to the
    lower ones. Each of their bits p selects the residue 2^(N+J_L−J_R+p) mod M.
  * Those rows and the two lower outputs form a second array of 2(N+2)+2 rows.
    A third tree (J_F) reduces that array.
  * The result is A·B·2^−(J_R+J_F). It needs a short table and few rows, at
    the cost of three trees in series.
* **Implementation IV.** This is Implementation III with the recoding of
  Implementation II applied to the bits of the upper tree's outputs.
  * Table entry t = 2^(N+J_L−J_R+2t) mod M, with ⌈(N+2)/2⌉ entries.
  * The second array has 6·⌈(N+2)/2⌉+2 rows.

Each variant ends in one carry-propagate adder and an output register. The
result is valid one clock after `in_valid_i`, and a new operation can start
every clock.

The result is congruent modulo M, but it is **not fully reduced**:

* Implementations I and II return a value below 2^(N+2).
* Implementations III and IV return a value below 2^(N+4).

A final conditional subtraction is left to the user.

### Departures on the GF(p) side

* **Wider rows and results in III and IV.** The outputs of the first trees
  are carried at their real width, N+2 bits. The tables are therefore N+2 and
  ⌈(N+2)/2⌉ entries long rather than N and N/2, and the results are two bits
  wider than in I and II.
* **Exact exponent, computed at elaboration.** J is computed from the
  array's row count at elaboration time, never hard-coded. The same holds for
  the table offsets of III and IV.
* **One fixed tree.** The tree always uses the grouping rule described above.
  No alternative adder arrangement is offered for it.
* **Host-computed table.** The residues are computed by the host and written
  through the table port; reset clears the table.

## GF(p^m) merged arithmetic (`gfpm_merged_mac`, `gfpm_digit_mac`)

Elements are polynomials of degree < m with coefficients below
p = 2^n − c. Because f(z) = z^m − 2, a product term a_i·b_j with i + j ≥ m
wraps round into column i + j − m with weight 2, which is a one-bit shift.

**Merged MAC.** For each coefficient t, `gfpm_merged_mac` sums the following
in one compression, without reducing any product on its own:

* every product that lands in column t;
* the doubled wrapped products;
* the accumulator coefficient acc_t.

The column sum fits in 2n + ⌈log2 2m⌉ + 1 bits. Two subfield reduction rounds
follow. Each round replaces the bits at and above 2^n by their value times c
(since 2^n ≡ c mod p). One adder per coefficient then finishes the work.

**Carry-delayed reduction (`CDA` = 1, the default).** A column is held as
two rows, S and C, and only the part at and above 2^n has to be multiplied
by c.

1. A row of half adders on that upper part produces a carry-delayed pair:
   T_i = S_i ⊕ C_i and D_(i+1) = S_i ∧ C_i.
2. A half adder never sets both of its outputs, so for each i at most one of
   T_i and D_(i+1) is one.
3. The two reduction rows T_i·c·2^i and D_(i+1)·c·2^(i+1) can therefore be
   merged with a plain OR into one row.

This halves the height of each reduction array. Both rounds use this form.
With `CDA` = 0, each round adds (upper part)·c to the lower part in the
ordinary way. The two settings give bit-identical results.

* **Result:** r ≡ a·b + acc mod (f, p), each coefficient below 2^(n+2) and
  congruent, not fully reduced.
* **Validity rule for the field:** 2·log2(c) + log2(m) + 1 ≤ n.
* **Timing:** the latency is one clock.

**Digit-serial multiplier.** `gfpm_digit_mac` takes b(z) in parallel and
takes a(z) D coefficients per clock, most significant digit first. Each clock
computes acc ← acc·z^D + digit·b mod (f, p) as a single merged sum per
coefficient, reduced in the same two rounds. One multiplication takes
⌈m/D⌉ steps.

Its handshake works as follows:

* `start_i` loads the operands.
* `busy_o` stays high during the steps.
* `done_o` pulses ⌈m/D⌉+1 clocks after the start.
* `r_o` holds the product until the next start.

**Departures.** Both units describe the column compression as word-level
sums, so the adder tree is left to synthesis. In the MAC, the two rows that
enter the carry-delayed stage are formed by splitting each column's products
between them (even and odd index of a). They stand in for the sum and carry
outputs of a compression tree. The carry-delayed stage is also used in the
second reduction round. The digit-serial unit uses the plain reduction. The handshake, the digit order and the
accumulator input are this design's own choices.

## GF(2^m) scalar/vector MAC (`gf2m_vmac`)

The unit computes r = c + a·b mod (z^m + f(z)). f(z) is an input, with
degree ≤ K and constant term 1 implied.

A single m×m AND array feeds column-wise XOR trees. In vector mode
(`vec_i` = 1), the cross products between the low and high halves are
masked, so the same array computes two independent m/2-bit products:

* the low lane sits in columns 0 … m−2;
* the high lane sits in columns m … 2m−2.

Each lane has its own reduction polynomial (`f_lo_i`, `f_hi_i`).

Reduction uses z^(m+i) ≡ z^i·f(z) and takes two rounds, which is enough
because 4K < m. The tool checks this at elaboration. The scalar reduction and
the half-width reduction are separate arrays selected by the mode.

The result is registered and valid one clock later, and the mode can change
on any clock.

## The top (`modmul_top`)

The top carries:

* the four PMM variants on shared operands `pmm_a_i`, `pmm_b_i` and
  `pmm_m_i`, with one output per variant;
* one table write port, where `lut_sel_i` chooses the variant's table;
* the GF(p^m) MAC, the digit-serial GF(p^m) multiplier and the GF(2^m) MAC,
  each with its own ports.

| parameter     | default | meaning |
|---------------|---------|---------|
| `PMM_N`       | 32      | operand width of the GF(p) multipliers |
| `GFP_N`, `GFP_C`, `GFP_M` | 13, 1, 13 | GF((2^13 − 1)^13) |
| `GFD_D`       | 4       | digit size of the digit-serial multiplier |
| `GF2_M`, `GF2_K` | 256, 11 | GF(2^256), deg f ≤ 11 (vector mode: 2 × GF(2^128)) |

### Sizes

* **Elliptic-curve sizes.** GF(p) multipliers for elliptic curves need N of
  160 to 256 bits. N is a parameter, and `tb_pmm_wide` runs
  Implementations III and IV at N = 160. The flat variants I and II grow
  with N² rows (12 880 rows at N = 160), so they are only simulated at
  N = 32.
* **Other fields.** `tb_gfpm_merged_mac` also runs the fields GF((2^18 − 11)^13)
  and GF((2^57 − 13)^3).
* **Digit sizes.** `tb_gfpm_digit_mac` runs D = 1, 2 and 4.

## Testbenches and simulation

Every testbench in `tb/` checks against its own reference model. The models
are:

* big-integer modular arithmetic;
* tree heights recomputed from scratch;
* 2^k mod M by repeated doubling;
* a bit-serial GF(2^m) multiplier;
* schoolbook GF(p^m).

None of these share code with the RTL.

Each testbench also:

* checks the one-clock (or ⌈m/D⌉+1-clock) latency;
* has a watchdog;
* ends with a `TB_RESULT checks=… failures=…` line.

`tb_modmul_top` is the end-to-end test. It runs at the top's default
parameters and performs:

* table loads for every variant;
* GF(p) operations with several moduli;
* GF(p^m) MACs;
* digit-serial multiplications;
* scalar and vector GF(2^m) operations, including mode switches.

It counts each of these and fails if any never occurs.

Example, with plain verilator (the package goes first):

    verilator --binary --timing --assert -Wno-fatal rtl/pmm_pkg.sv tb/tb_modmul_top.sv \
        -y rtl -y tb --top-module tb_modmul_top -o sim
    ./obj_dir/sim

Replace `tb_modmul_top` with any other `tb_*` module to run that testbench.
The largest simulations are:

* `tb_modmul_top` at full default size, which compiles in about a minute;
* `tb_pmm_wide` at N = 160, which takes several minutes to compile.

## Not included

The following are not included:

* a final reduction of the results below the modulus;
* the serial and serial-parallel multipliers and the earlier parallel
  Montgomery designs that this design is compared against;
* selecting GF(2^i) for arbitrary i below m in one unit (only m and m/2 are
  built).
