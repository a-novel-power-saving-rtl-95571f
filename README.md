# Fast sign detection for the RNS moduli set {2^(n+1)-1, 2^n-1, 2^n}

In a residue number system (RNS) an integer X is held only as its remainders
with respect to a few pairwise coprime moduli. Addition, subtraction and
multiplication then run digit by digit with no carries between the digits.
The sign of a number is not visible in the digits, though. For signed use the
range [0, M) is split: X in [0, M/2) is non-negative, X in [M/2, M) stands for
X - M. Finding out which half X lies in usually takes a full conversion back
to binary.

This RTL implements a sign detector for the three-moduli set

    m1 = 2^(n+1) - 1,   m2 = 2^n - 1,   m3 = 2^n,    M = m1 * m2 * m3

that needs no conversion. It uses one carry-save adder, one comparator and one
carry network, so the sign costs about as much as a single n-bit addition. The
circuit is purely combinational.

## The idea: the sign is one bit of a modulo-2^n sum

Write X in mixed radix with the top digit

    alpha2 = floor(X / (m1 * m2)),       0 <= alpha2 < 2^n.

Because M/2 = 2^(n-1) * m1 * m2 exactly, X >= M/2 holds exactly when
alpha2 >= 2^(n-1). In other words, **the sign is the most significant bit of
alpha2**. For this moduli set the modular inverses are small (-4 for m1, 1
for m2 and m3), and alpha2 collapses to

    alpha2 = | -2*x1 + x2 + x3 + floor((x2 - x1) / (2^n - 1)) |  mod 2^n

with x1 = X mod m1 (n+1 bits), x2 = X mod m2 and x3 = X mod m3 (n bits each).
Only additions modulo 2^n are left, plus one floor term.

### Turning the formula into an adder input

Split x1 into its top bit x1[n] and its low n bits x1' = x1[n-1:0].

* **The floor term.** x1 = x1[n]*(2^n - 1) + x1[n] + x1'. So the floor term
  is -x1[n] + floor((x2 - x1' - x1[n]) / (2^n - 1)). For valid residues the
  numerator lies in (-(2^n-1), 2^n-1), so the floor is 0 or -1. Write it as
  W - 1 with

      W = 1  when  x2 >= x1' + x1[n]
          i.e. (x2 > x1') OR (x2 == x1' AND x1[n] == 0).

* **The -2*x1 term.** Modulo 2^n, 2*x1 only keeps 2*x1'. Together with the
  -x1[n] from the floor term it becomes -(2*x1' + x1[n]) = -x1''. Here

      x1'' = {x1[n-2:0], x1[n]}

  is the low n-1 bits of x1 shifted up one place, with x1[n] moved into bit 0.

* **The -1.** -x1'' - 1 is the n-bit ones complement ~x1''.

So

    alpha2 = ( ~x1'' + x2 + x3 + W ) mod 2^n,      sign = alpha2[n-1].

Three n-bit operands plus a carry-in: that is a carry-save adder, then one
carry computation into the top bit. The low n-1 bits of alpha2 are never
formed.

## Datapath

```
 x1[n-2:0],x1[n] ─► x1'' ─► NOT ─┐
 x2 ─────────────────────────────┼─► csa_mod2n ── S (n), C (n-1) ─► carry_gen_unit
 x3 ─────────────────────────────┘                                   │ P(n-1), G[n-2:0], P[n-2:0]
                                                                     ▼
 x2, x1' ─► comparator_unit ─ gt, eq ─► W = gt | (eq & ~x1[n]) ─► post_proc_unit ─► sign
```

| block | module | what it does |
|---|---|---|
| carry-save adder | `csa_mod2n` | Full-adder row on ~x1'', x2, x3. Gives sum S (n bits) and carry C (n-1 bits, weight 2^(i+1)). The carry out of the top bit is dropped (mod 2^n). |
| comparator | `comparator_unit` | The carry network of x2 + ~x1'. Group generate means x2 > x1'; group propagate means x2 == x1'. |
| W gates | in `rns_sign_detector` | W = gt OR (eq AND NOT x1[n]). |
| carry generation | `carry_gen_unit` | For 2C + S: the bit propagate P(n-1) of the top position, and the group generate/propagate G[n-2:0], P[n-2:0] of the n-1 positions below it. |
| post-processing | `post_proc_unit` | carry = G[n-2:0] OR (P[n-2:0] AND W); sign = P(n-1) XOR carry. |
| top | `rns_sign_detector` | Wires the above together. |

### The carry networks

Both the comparator and the carry generation unit use one shared tree,
`gp_tree`, built from three cells defined in `rns_sd_pkg`:

* **bit cell**: G = a AND b, P = a XOR b;
* **black cell**: G(i:j) = G(i:k) OR (P(i:k) AND G(k-1:j)), P(i:j) = P(i:k) AND P(k-1:j);
* **white cell**: a wire.

Only the final group pair is needed, not every prefix. So the tree is a pure
reduction: ceil(log2 W) levels of black cells, with W - 1 black cells in
total. For n = 16 the comparator reduces 16 positions in 4 levels. The carry
generation unit reduces 15 positions in 4 levels. On each level, adjacent
nodes are merged in pairs starting from the least significant end. An odd
node left over at the top of a level passes through a white cell.

In the carry generation unit, position 0 of 2C + S has no carry operand. Its
bit cell therefore sees (0, S[0]).

## Interface and timing

```systemverilog
rns_sign_detector #(.N(16)) u (
  .x1  (x1),    // [N:0]   residue mod 2^(N+1)-1
  .x2  (x2),    // [N-1:0] residue mod 2^N-1
  .x3  (x3),    // [N-1:0] residue mod 2^N
  .sign(sign)   // 1: X >= M/2 (negative), 0: X < M/2
);
```

* `N` is n. The default is 16 (moduli 131071, 65535, 65536). Any N >= 2
  works. The tests cover 2 to 8, 16 and 32.
* There is no clock, reset or register. `sign` is valid one propagation delay
  after the inputs settle. The critical path is the CSA (one full adder),
  then a log2(N)-deep tree, then two gates. The comparator tree runs in
  parallel with the CSA. Register the inputs or the output outside if a
  pipeline stage is needed.
* Inputs must be canonical residues: x1 < 2^(N+1)-1 and x2 < 2^N-1. The
  all-ones codes of x1 and x2 (the redundant zeros of the 2^k-1 moduli) give
  an unspecified sign.

At N = 16 the top synthesises, flattened, to about 180 gate-level cells.

## What follows the source design and what was chosen here

These parts follow the source design:

* the moduli set and the sign rule (MSB of alpha2);
* the x1'' operand, fed to the CSA inverted;
* the CSA widths n and n-1;
* the comparator as the carry network of x2 + ~x1', with its
  generate → greater and propagate → equal outputs;
* W built from greater, equal and x1[n];
* the cell set of the trees;
* the carry generation unit feeding three signals to a post-processing step
  that uses W as carry-in;
* n = 16 as the main size, with 8 and 32 as other sizes.

These parts are this implementation's own choices:

* The exact tree shape: pairwise merging, level by level. Any reduction tree
  gives the same G and P.
* The full-adder row inside the CSA.
* The gate equations of the post-processing step. They are the standard
  carry-in equation of a prefix adder.
* A purely combinational unit with no pipeline registers.
* No handling of non-canonical residue codes.

The closed form of alpha2 has the divisor 2^n - 1 in its floor term. That is
what the derivation gives, and it was confirmed against X >= M/2 for every X
with n = 2 to 8.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | device | what is checked |
|---|---|---|
| `tb_csa_mod2n` | CSA, N = 16 | (2C + S) mod 2^N = (a+b+c) mod 2^N, and every carry bit against a bit count. |
| `tb_comparator_unit` | comparator, N = 16 | gt/eq against `>`/`==`. Uses random, equal, off-by-one and one-bit-apart pairs. |
| `tb_carry_gen_unit` | carry generation, N = 16 | G, P and P(N-1) against integer addition. Half the vectors are forced to propagate all the way. |
| `tb_post_proc_unit` | post-processing | All 16 input combinations. |
| `tb_rns_sign_detector` | top, default N = 16 | 510,004 values of X: random over [0, M), plus every X within 70,000 of 0, of M/2 and of M. Residues come from `%`, the expected sign from X >= M/2. It counts how often W = 0 and W = 1 occur, x2 == x1' with x1[n] = 0 and = 1, a sign bit flipped by W, and both signs. It fails if any of these never happens. |
| `tb_rns_sign_detector_widths` | top, N = 2..8 and 32 | Every X in [0, M) for N = 2 to 8 (33.4 million at N = 8). 260,000 vectors at N = 32, with 128-bit reference arithmetic. Runs in about a minute. |

Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rns_sd_pkg.sv tb/tb_rns_sign_detector.sv --top-module tb_rns_sign_detector
./obj_dir/Vtb_rns_sign_detector
```

Replace the testbench file and top-module name to run any other testbench.
Lint a module with
`verilator --lint-only -Wall -Irtl rtl/rns_sd_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/rns_sd_pkg.sv`: the (G, P) pair type and the bit-cell and black-cell functions.
* `rtl/gp_tree.sv`: the group generate/propagate reduction tree.
* `rtl/csa_mod2n.sv`, `rtl/comparator_unit.sv`, `rtl/carry_gen_unit.sv`,
  `rtl/post_proc_unit.sv`: the four units.
* `rtl/rns_sign_detector.sv`: the top.
* `tb/`: the testbenches above, and `sd_width_check.sv`, the per-size checker
  used by the multi-width testbench.

## Changing it

* **Another n**: set `N`. Nothing else depends on it.
* **Other moduli sets that contain 2^n**: the same principle applies. The
  sign is the MSB of the last mixed-radix digit, computed modulo 2^n. The
  constants of the sum depend on the moduli, though, so the operand shuffling
  in `rns_sign_detector` (x1'', the ones complement, W) would have to be
  derived again. The units themselves are generic.
* **Pipelining**: a register between the CSA/comparator stage and the
  carry/post-processing stage splits the path roughly in half.
