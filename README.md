# A rational arithmetic unit built on the Euclidian algorithm

This is synthesizable SystemVerilog for an arithmetic unit whose numbers are
fractions p/q. It does addition, subtraction, multiplication and division,
and it rounds results into a compact "floating-slash" word. All of these use
one algorithm. The algorithm is the extended Euclidian algorithm, run on the
accumulator p/q. The operator and the operand r/s only change how its
registers start.

The Euclidian algorithm finds the partial quotients of the continued fraction
of p/q. In the same steps it builds up the convergents p_i/q_i. This design
changes the start of the convergent recurrence from the identity to a matrix
{a c; b d}. The same steps then produce

    u_i / v_i = (a*q_i + b*p_i) / (c*q_i + d*p_i)

which is the bilinear function (a + b x)/(c + d x) evaluated at each
convergent x = p_i/q_i. The choice of matrix picks the operation. With r/s
as the operand:

| operation | seed {a c; b d} | final u/v                 |
|-----------|-----------------|---------------------------|
| add       | {r s; s 0}      | (p*s + r*q) / (q*s)       |
| subtract  | {-r s; s 0}     | (p*s - r*q) / (q*s)       |
| multiply  | {0 s; r 0}      | (r*p) / (s*q)             |
| divide    | {0 r; s 0}      | (s*p) / (r*q)             |
| store     | {0 1; 1 0}      | p_i / q_i (the convergents) |

If the run finishes, the last pair is the exact result. It is not
necessarily reduced, and both parts may be negated. If the run stops at the
last pair that still fits a size limit, the result is an approximation built
from a convergent of p/q. For a store, that stop is the rounding: the unit
keeps the last convergent that fits the packed word. This is "mediant
rounding", and the convergent it keeps is a best rational approximation.

## Files

| file | contents |
|------|----------|
| `rtl/rau_pkg.sv` | operation codes, bound selector, event strobe struct, default field size |
| `rtl/rau_top.sv` | the unit: accumulator, command sequencing, response packing |
| `rtl/bne_unit.sv` | the Euclidian engine (registers P, Q, A, B, C, D, K and its control) |
| `rtl/rau_seed.sv` | seed matrix for each operation and the two shortcuts |
| `rtl/cs_addsub.sv` | carry-save adder/subtracter, the A and C update path |
| `rtl/cs_lead_classify.sv` | range test from the three leading bits of a carry-save number |
| `rtl/cs_to_twos.sv` | carry-look-ahead (prefix) conversion from carry-save to two's complement |
| `rtl/fs_unpack.sv`, `rtl/fs_pack.sv` | floating-slash decoder, and the fit test with encoder |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ref_pkg.sv` is the wide-integer reference model |

## The packed floating-slash word

With the default n = 25, the word has 32 bits. From the top bit down:

    [31] s   [30:26] k   [25:0] field (positions n..0)

- `s` is the sign of the rational.
- `k` is the slash position, from 0 to n+1.

When k = i:

- The numerator p takes positions n..i. Its least significant bit is at
  position i.
- The denominator q takes positions i-1..0 with its bits reversed. Its least
  significant bit is at position i-1, just right of the slash.
- q has one more bit, its leading 1. That bit is not stored: it belongs at
  an imaginary position -1. So q lies in [2^k, 2^(k+1)) and can never be 0.
- k = 0 gives a signed integer of n+1 bits.
- k = n+1 leaves no room for p, which is then 1.

A pair fits the word when bitlen(|p|) + bitlen(|q|) <= n+2. The pair
|p| = 1 with bitlen(|q|) = n+2 also fits. Zero is stored as p = 0, q = 1,
k = 0. A k code above n+1 is illegal: `fs_unpack` flags it and decodes it
as n+1.

## The Euclidian engine (`bne_unit`)

This block is the hardest part of the design. Six registers are laid out as

    P  A  C
    Q  B  D

Each of the pairs P/Q, A/B and C/D feeds its own add/subtract unit. The
result goes back to the upper register. The engine does not divide. Each
quotient is built up in binary, one step per clock, by normalizing shifts
and nonrestoring add/subtracts. This is the method of SRT division. A
register is *normalized* when its two leading bits differ, so its magnitude
is at least half the register range.

1. **PRE**: shift P and Q left together until one of them is normalized.
2. **NORMQ**: shift Q left until it is normalized. Shift B and D left with it,
   and move the one-hot register K left. K records how far B and D are
   scaled up against A and C.
3. **INNER**: if P is normalized, do one step:
   - If P and Q have the same sign: P -= Q, A += B, C += D.
   - Otherwise: P += Q, A -= B, C -= D.

   If P is not normalized and K > 1, shift P left and shift B, D and K right.
   If P is not normalized and K = 1, this quotient is complete: |P| < |Q|.
4. **SWAP**: exchange P with Q, A with B and C with D. B and D now hold the
   next pair (u_i, v_i).
5. **OUTER**: stop if Q = 0. Otherwise go to step 2 for the next quotient.

After a subtract step P is never normalized, so there can be at most one
add/subtract between two shifts. The quotients make a *signed* continued
fraction. Every quotient has magnitude at least 1, and a quotient of ±1 is
followed by one of the same sign. Because of this, the pairs met at the
SWAP points are not always the canonical convergents of p/q. A pair that
is not canonical sits, in the sequence, between two consecutive canonical
convergents.

**Stopping.** At each SWAP the new pair is converted to two's complement
and tested against a bound, selected by `bound`:

- `BND_REG`, used for add/sub/mul/div: the pair must fit N-bit signed
  registers.
- `BND_FS`, used for store: the pair must also fit the packed word.

If the pair fails the test, the run ends, `early` is set, and the previous
pair is the result. If the very first pair fails, the result is the seed's
(b, d). For a store this is p/0, which the top reports as overflow.

**Carry-save A and C.** A and C are each held as two words, a carry word and
a place word, whose sum is the value. `cs_addsub` updates them without
carry propagation. Each bit has two full adders, and the B operand is
inverted by XOR gates for a subtract. Two carries enter at the right end:
both 0 for an add, both 1 for a subtract. The carries leaving the left end
are dropped. B and D are loaded only at a SWAP, from the carry-look-ahead
converter `cs_to_twos`. Their carry words are therefore always zero, and
their right shifts stay exact. If two carry-save words are right-shifted
separately, the sum can be off by half the word range when the pair
wrapped around. That is why B and D are kept in plain form.

**Overflow guard.** Before each shift or add/subtract of A..D,
`cs_lead_classify` adds the three leading bits of both words of each
operand. The 3-bit sum places the value in one of eight ranges:

| case | 3-bit sum | value range |
|------|-----------|-------------|
| 0 | 000 | [0, 1/2) |
| 1 | 001 | [1/4, 3/4) |
| 2 | 010 | [1/2, 1) |
| 3 | 011 | [3/4, 1) or [-1, -3/4) |
| 4 | 100 | [-1, -1/2) |
| 5 | 101 | [-3/4, -1/4) |
| 6 | 110 | [-1/2, 0) |
| 7 | 111 | [-1/4, 1/4) |

The ranges are in units of the sign position. Only cases 0, 6 and 7 ("narrow")
guarantee that a doubling or a sum of two operands cannot overflow. If any
operand is outside them, the run stops as on a bound failure and `guard`
is set. At the default W = 2N+2 this never happens for N-bit operands.
|B| < 2^(N-1), shifted by at most N-2 places, plus what A has accumulated,
stays below 2^(W-2).

**Timing.** The engine does one shift or one add/subtract per clock. Each
quotient adds 2 clocks (leaving NORMQ, and the SWAP) and one clock at OUTER.
Each run adds the PRE shifts and 2 clocks to start and finish. A quotient of
magnitude about 2^j takes j Q shifts, j P shifts, and at most one
add/subtract per P shift, plus one more. `start` is sampled
while `busy` is low. `done` pulses for one clock, and `u_out`/`v_out` hold
until the next start.

## The unit (`rau_top`)

The accumulator p/q is a pair of N-bit two's complement registers, with
N = 2n+4 = 54. That is room for the numerator and denominator of a sum,
difference, product or quotient of two packed values, plus sign and margin.

Commands use a valid/ready handshake. `cmd_op` selects the operation and
`cmd_word` carries the packed operand. Each accepted command gives one
`rsp_valid` pulse:

| op | effect |
|----|--------|
| `OP_LOAD`  | accumulator := operand. Responds the next clock. `rsp_ovf` marks an illegal k. |
| `OP_ADD`, `OP_SUB`, `OP_MUL`, `OP_DIV` | accumulator := accumulator op operand, through the engine with `BND_REG`. `rsp_inexact` is set if a pair outgrew 54 bits and an earlier pair was kept. |
| `OP_STORE` | `rsp_word` := accumulator rounded to the packed word, through the engine with `BND_FS`. The accumulator is unchanged. `rsp_inexact` marks a rounded value. |

`rsp_ovf` marks a result with a zero denominator. That comes from division
by zero, or from a value too large to hold. The accumulator then keeps its
old contents. Reset sets the accumulator to 0/1. The `events` output gives
one-clock strobes of the internal mechanisms, for monitoring.

**Shortcuts.** `rau_seed` starts two special cases in a different but
equivalent arrangement, which finishes in a single add/subtract step:

- When d = 0 and |q| = |b|, p and b trade places. For example: adding
  numbers with equal denominators, or adding two integers.
- Otherwise, when a = d = 0 and |p| = |c|, q and c trade places.

The final ratio u/v is unchanged, though a common factor may remain. The
shortcuts are used only for arithmetic, never for a store, because they
change the sequence of intermediate pairs that rounding depends on. They
are enabled by the `SHORTCUTS` parameter of `rau_seed`.

Results of arithmetic are not reduced to lowest terms. They need not be:
the next operation depends only on the convergents of p/q. A store of a
complete run gives the fraction in lowest terms, and the end-to-end test
checks this.

## Where this RTL departs from the underlying design

- **P and Q are two's complement, not carry-save.** The intended fast
  version keeps P and Q in carry-save form too. It decides normalization and
  sign from a 3-bit leading sum, as in the table above, and forces a shift
  after an add/subtract alternation to avoid an endless loop. That control is
  only outlined, and left open around overflow and the end of a quotient. P
  and Q here use an ordinary 54-bit adder and exact normalization.
- **A..D are integer-aligned and 2N+2 bits wide.** The intended design keeps
  them N bits wide and left-aligned. Shift registers I and J would track
  where the unit position sits, and a register S would estimate the result's
  bit count for rounding. Here the exact bit count comes from the converted
  pair instead.
- **No canonical-convergent recovery.** When rounding stops early, the result
  is the last pair of the signed expansion that fits. Sometimes the
  canonical convergent would be a different, neighbouring fraction. A
  procedure to recover it is not given, so none is built.
- **Not built:** several accumulators, and splitting a wide accumulator into
  several packed words for multiple precision.
- **This design's own choices:** the field size n = 25, the command set, the
  handshake, the flags, reset values, and the guard width.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. `tb/tb_ref_pkg.sv` holds the reference model, written in 256-bit
integer arithmetic:

- the packed-format encode, decode and fit rules;
- the seeded Euclidian algorithm, with quotients found by scaling with
  powers of two, and the same stopping rules.

The testbenches check the following:

- `tb_cs_addsub`: the carry-save add/subtract against integer arithmetic
  modulo 2^W, on random values and corner cases.
- `tb_cs_lead_classify`: all 65536 pairs of 8-bit words against the range
  table.
- `tb_cs_to_twos`: a 7-bit instance exhaustively and a 110-bit instance at
  random.
- `tb_fs_unpack`, `tb_fs_pack`: random words and pairs, including every
  boundary bit length.
- `tb_rau_seed`: every operator's seed makes (a*q+b*p)/(c*q+d*p) equal to
  the operation. The shortcuts fire exactly when their conditions hold.
- `tb_bne_unit`: over 1000 runs at full size, and 300 more on a second
  engine whose A..D are only N+4 bits wide. On that engine the guard must
  stop runs, and each guarded result must be a pair the complete reference
  run accepts. Complete runs give the exact
  bilinear value. Every run, including early stops and mediant rounding of
  wide accumulators, matches the reference pair for pair. Each run's clock
  count lies within its step count plus the fixed overhead.
- `tb_rau_top`: the whole unit at its default size. It runs about 1000
  commands in random chains (load, add/sub/mul/div, store), plus directed
  cases: 355/113, an integer add, division by zero, a value too large to
  store, and repeated products that overflow the accumulator. It counts
  every mechanism (both shortcuts, Q shifts, P shifts, add/subtracts, pairs
  accepted, rounded stores, exact stores, overflows) and fails if one never
  happened.

Running a testbench with Verilator, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rau_pkg.sv tb/tb_ref_pkg.sv rtl/rau_top.sv tb/tb_rau_top.sv \
        --top-module tb_rau_top
    ./obj_dir/Vtb_rau_top

The other modules are found through `-Irtl`, or you can list them
explicitly. Each testbench finishes in well under a second.

## Changing the size

`FS_N` (n) sets the packed format: the word is 1 + ceil(log2(n+2)) + n+1
bits wide, and the accumulator is 2n+4 bits. `bne_unit`'s `W` sets the
width of A..D. Keep W at least 2N+2 if arithmetic on N-bit accumulators
must never be cut short by the guard.
