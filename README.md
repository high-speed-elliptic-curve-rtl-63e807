# Prime-field elliptic curve cryptography core (NIST P-256)

This is a SystemVerilog implementation of public-key elliptic curve
cryptography over a prime field GF(p), defaulting to the NIST P-256 curve
y² = x³ − 3x + b. The arithmetic is built to be small:
- a bit-serial (radix-2) modular multiplier;
- a two-adder modular adder/subtractor;
- a binary-Euclid inverter.

Speed comes from running several multipliers at once. The point multiplier
drives two multipliers and two squarers in parallel from a small register
array, under a microprogrammed controller.

On top of that sit three levels of function:
- public-key generation, Q = kP with affine input and output;
- point-based message encryption and decryption (EC ElGamal);
- a separate block-level point multiplier. It computes either kP or the
  double product kP + lR from a point-doubling unit and a point-addition
  unit.

Beside the prime-field core stands a binary-field accelerator. It computes
kP over GF(2^233) with one bit-serial polynomial multiplier and an XOR
adder.

The prime-field part is parameterised by the field width `N`, which defaults to 256;
the binary-field accelerator by `M`, which defaults to 233.
The whole design has been simulated at its defaults (N = 256, M = 233)
against independent reference models.

## Block hierarchy

```
ecc_main                      encryption / decryption top
├── ecc_keygen  (u_mult)      scalar multiplication, affine in/out
│   ├── ecpm                  Montgomery-ladder point multiplier
│   │   ├── ecpm_ctrl         microprogrammed control unit
│   │   ├── ecpm_regfile      X1 Z1 X2 Z2 T1..T8, swap by addressing
│   │   ├── mod_mul ×4        M1, M2 and squarers S1, S2
│   │   └── mod_addsub
│   └── proj2aff              (X:Y:Z) → (X/Z, Y/Z)
│       ├── mod_inv
│       └── mod_mul ×2
├── point_add   (u_padd)      affine add / double / infinity
│   ├── mod_addsub, mod_mul, mod_inv
├── ecc_dpm     (u_dpm)       kP or kP + lR, projective
│   ├── proj_point_unit (u_pd, ADD=0)   point-doubling unit
│   │   ├── mod_addsub, mod_mul
│   ├── proj_point_unit (u_pa, ADD=1)   point-addition unit
│   │   ├── mod_addsub, mod_mul
│   └── proj2aff  (u_cv)      final conversion to affine
└── ecc_accel_gf2m (u_gf)     binary-field kP, GF(2^M)
    └── gf2m_mul              bit-serial polynomial multiplier
```

`ecc_pkg` holds the P-256 constants, the register names used by the
microprogram, and the micro-op format.

All sequential blocks share the same conventions:
- `clk` is the clock and `rst_n` an asynchronous active-low reset.
- A block accepts a one-cycle `start` pulse while idle.
- `busy` is high while it works.
- It answers with a one-cycle `done` pulse, after which the results stay
  valid until the next `start`.
- Blocks with latched inputs (`point_add`, `proj_point_unit`, `proj2aff`, `ecc_dpm`,
  `gf2m_mul`, `ecc_main`) need them valid only on the `start` cycle.
- `ecpm`, `ecc_keygen` and `ecc_accel_gf2m` read `k`, the point, `b` and
  `p` (or `poly`) while they run, so hold those inputs until `done`.

## Field arithmetic

**`mod_mul`: interleaved radix-2 multiplier.** It computes F = D·E mod p
with one multiplier bit per clock, scanning E from its most significant bit.

Each cycle does three things:
1. It doubles the accumulator.
2. It adds D if the current bit of E is 1.
3. It reduces the sum. The sum 2F + D is always below 3p, so the result is
   one of F, F − p or F − 2p. Both subtractions are computed in parallel,
   and the first non-negative candidate is kept.

The scan register is N + 1 bits wide and is loaded with E followed by a
marker 1. The loop ends when the marker reaches the top, so the loop length
does not depend on leading zeros in E.

A product takes exactly N + 1 cycles from the start edge to `done`: N
iterations and one cycle to move the result into the output register. That
is 257 cycles at N = 256. Squaring is the same unit with both operands
equal.

**`mod_addsub`: adder/subtractor.** It is combinational, built from two
N-bit adders and a 2:1 mux.
- To add, it computes S1 = a + b and S2 = S1 − p. It picks S2 if either
  adder carried out, and S1 otherwise.
- To subtract, it computes S1 = a − b and S2 = S1 + p. It picks S2 when
  a − b borrowed.
- The control input `sel` also drives the carry-ins and chooses p or ¬p
  for the second adder.

**`mod_inv`: inverter.** This is the binary extended Euclidean algorithm,
with one halving or one subtraction per clock.

Its latency depends on the operand. The worst case seen at N = 256 was 553
cycles, and the bound is about 4N. An input of 0 returns 0.

## The point multiplier (`ecpm`, `ecpm_ctrl`, `ecpm_regfile`)

This is the most involved part of the design.

**Algorithm.** The scalar k is processed MSB-first with the Montgomery
ladder, on projective X/Z coordinates only.
- Two points are kept, (X1:Z1) and (X2:Z2). They start at ∞ = (1:0) and at
  P = (x:1). Loading Z = 1 is the affine-to-projective conversion.
- The ladder invariant is that the two points always differ by P.
- For each bit, one point is doubled and the two points are added.
- Which point is doubled depends on the bit. `ecpm_regfile` handles this in
  its address decoding: the microprogram names registers XD/ZD (the point
  being doubled) and XO/ZO (the other point), and the current scalar bit
  decides whether those names map to X1/Z1 or to X2/Z2. No data is ever
  moved for the swap.
- Every bit runs the identical micro-op sequence and costs the same time.

With a = −3, one ladder step is:

```
X(D+O) = (Xd·Xo + 3·Zd·Zo)² − 4b·Zd·Zo·(Xd·Zo + Xo·Zd)
Z(D+O) = x · (Xd·Zo − Xo·Zd)²
X(2D)  = (Xd² + 3·Zd²)² − 8b·Xd·Zd³
Z(2D)  = 4·Zd·(Xd³ − 3·Xd·Zd² + b·Zd³)
```

**y recovery.** After the last bit, (X1:Z1) = kP and (X2:Z2) = (k+1)P. A
second microprogram section recovers the full projective result from
these two points and P = (x, y):

```
X = 2y·Z1·Z2·X1
Y = 2b·Z1²·Z2 + Z2·(x·X1 − 3·Z1)·(X1 + x·Z1) − X2·(X1 − x·Z1)²
Z = 2y·Z1²·Z2
```

The result (X:Y:Z) is left in registers T1, T6 and T3.

**Datapath.** The datapath has these parts:
- **Four arithmetic units.** There are two general multipliers (M1, M2) and
  two squarers (S1, S2). A squarer is a `mod_mul` fed the same operand on
  both inputs.
- **Operand registers.** Each unit has its own operand registers.
- **Operand multiplexers.** These pick any register of the array, or one of
  the curve inputs `xp`, `yp`, `b`, or the constant 1.
- **One adder/subtractor.**
- **A result multiplexer.** It writes one value per cycle into the array.
- **A register array of 12 N-bit registers:** X1, Z1, X2 and Z2, plus the
  temporaries T1..T8.

**Microprogram.** `ecpm_ctrl` steps through a micro-op table (`function
prog`). Each entry is one of these operations:

| op | effect | cycles |
|---|---|---|
| `LD` | copy two operands into one unit's operand registers | 1 |
| `GO` | start all four units, wait for them | N+3 |
| `WR` | write one unit's result to a register | 1 |
| `ADD`/`SUB` | modular add/subtract two operands into a register | 1 |
| `STEP` | next scalar bit, or go on to the y recovery | 1 |
| `END` | signal `done` | 1 |

A ladder step uses 6 rounds of the four units, with 17 loads, 17 writes
and 19 additions. That comes to 6N + 72 cycles per bit. The y recovery adds
6N + 55 cycles.

For one point multiplication at N = 256:

    N·(6N + 72) + 6N + 55 = 413,239 cycles

This count is exact and independent of the key. The ladder performs the
same operations for every bit value, which also keeps the timing free of
key-dependent variation.

The micro-op table is the place to change the schedule. Register names are
in `ecc_pkg::opnd_e`. The testbench `tb_ecpm_ctrl` counts the micro-ops of
each kind, so it must be updated together with the table.

## Conversions and key generation

**`proj2aff`** converts a projective point to affine. It performs one
inversion of Z, then multiplies X and Y by Z⁻¹ on two multipliers in
parallel.

**`ecc_keygen`** chains three stages:
1. affine-to-projective conversion (the Z = 1 load);
2. `ecpm`;
3. `proj2aff`.

With k a private key and P the base point, it produces the public key Q =
kP in affine form. A run takes about 414,000 cycles at N = 256, and
requires 1 ≤ k < group order.

## Point addition (`point_add`)

`point_add` adds two points in affine coordinates using one adder, one
multiplier and one inverter. There are three cases:
- **P1 ≠ ±P2:** it adds the points, with λ = (y2 − y1)/(x2 − x1).
- **P1 = P2:** it doubles the point, with λ = (3x1² − 3)/(2y1). The `dbl`
  output reports this case.
- **P1 = −P2:** the result is the point at infinity, reported on `inf`.

Both inputs must be finite points on the curve.

## Encryption top (`ecc_main`)

The top sequences a point multiplier (`ecc_keygen`) and a point adder
(`point_add`). An internal `enable` signal selects which of the two runs:
0 runs the multiplier, 1 runs the adder. Messages are curve points
(`msg_x`, `msg_y`). The base point G and the curve constants p and b are
parameters that default to P-256.

| `enc_dec` | inputs | outputs | work |
|---|---|---|---|
| 0 (encrypt) | `random_k` = k, `apx/apy` = receiver public key A, message M | `kpax/kpay` = kG, `px/py` = M + kA | 2 multiplications + 1 addition, ≈ 829,000 cycles |
| 1 (decrypt) | `random_k` = private key d, `apx/apy` = C1 = kG, message = C2 | `px/py` = C2 − d·C1 | 1 multiplication + 1 addition, ≈ 415,000 cycles |

`p_inf` flags a result at infinity.

Beside the encryption path, the top also brings out the ports of the
block-level point multiplier, `dpm_*`. Its only connections to the
encryption path are the clock, reset, prime and b. The binary-field
accelerator is brought out the same way on the `gf_*` ports, sharing only
clock and reset.

## Block-level point multiplier (`ecc_dpm`, `proj_point_unit`)

`ecc_dpm` works entirely in standard projective coordinates. A point
(X : Y : Z) stands for the affine point (X/Z, Y/Z), and the point at
infinity is (0 : 1 : 0). It has two modes, selected by `dpm`:
- **`dpm = 1`:** it computes kP + lR with Shamir's simultaneous method. It
  first computes P + R once, on the addition unit. Then, for each bit from
  the MSB down, it doubles the accumulator on the doubling unit, and adds
  P, R or P + R on the addition unit, chosen by the bit pair (kᵢ, lᵢ).
  Nothing is added for the pair (0, 0).
- **`dpm = 0`:** it ignores l and computes kP by double-and-add.

P and R enter as (x : y : 1), and the accumulator starts at infinity. At
the end, `proj2aff` converts the result with one inversion. A Z of 0 at
that point sets `q_inf`.

**The two units.** Both are instances of `proj_point_unit`, whose
parameter `ADD` selects addition (1) or doubling (0). Each unit has:
- a 15-entry register bank holding the inputs, b, five temporaries and the
  result;
- an operand multiplexer on that bank;
- one modular adder/subtractor;
- one modular multiplier, whose results are written back into the bank.

A program counter steps through a fixed list of operations, one at a
time. The lists implement the complete addition and doubling formulas for
a = −3 (Renes, Costello and Batina, 2016). Because the formulas are
complete, equal points, opposite points and infinity all go through the
same program, with no branches and no inversion.

| unit | multiplications | add/sub | cycles at N = 256 |
|---|---|---|---|
| addition | 14 | 29 | 14(N+3)+30 = 3656 |
| doubling | 13 | 21 | 13(N+3)+22 = 3389 |

The latency of `ecc_dpm` depends on the scalars. Measured at N = 256, kP
took about 1.33 M cycles and kP + lR about 1.55–1.58 M cycles. The
Montgomery-ladder multiplier above is about three times faster, because it
keeps four multipliers busy where each unit here has one.

## Binary-field accelerator (`ecc_accel_gf2m`, `gf2m_mul`)

This block computes Q = kP on a binary curve y² + xy = x³ + ax² + b over
GF(2^M), polynomial basis. The default is M = 233, the field of the NIST
curves B-233 and K-233. The reduction polynomial is an input, `poly`,
holding f(x) without its x^M term; for f = x^233 + x^74 + 1, bits 74 and
0 are set.

**Multiplier.** `gf2m_mul` takes one bit of b per clock, MSB first. Each
step shifts the accumulator left, XORs in `poly` if a bit fell out of the
top, and XORs in a if the current bit of b is 1. There are no carries. A
product takes M + 1 cycles (234 at M = 233). Addition in this field is a
plain XOR, done in one cycle by the accelerator itself.

**Registers.** X1, Z1, X2 and Z2 hold the two ladder points, RC holds an
inverse, and T1..T3 are temporaries. Operand multiplexers also reach the
inputs x, y and b.

**Ladder.** This is the x-only Montgomery ladder of López and Dahab.
(X1 : Z1) starts at infinity (1 : 0) and (X2 : Z2) at P = (x : 1). For each
bit of k from the MSB, one point is doubled and the sum is written to the
other:

```
sum:    Z = (Xd·Zo + Xo·Zd)²,   X = x·Z + (Xd·Zo)·(Xo·Zd)
double: X = Xd⁴ + b·Zd⁴,        Z = Xd²·Zd²
```

As in the prime-field multiplier, the scalar bit only remaps which
physical registers the names "doubled" and "other" point to. Each bit costs
11 products and 3 XORs, so 11(M + 3) + 4 cycles. The curve constant a does
not enter, so it is not an input.

**Conversion to affine.** After the ladder:
1. RC = (x·Z1·Z2)⁻¹, by Fermat's theorem: a^(2^M − 2) takes M − 1 squarings
   and M − 2 multiplications on the same multiplier.
2. qx = X1·x·Z2·RC.
3. qy = (qx + x)·[(X1 + x·Z1)(X2 + x·Z2) + (x² + y)·Z1·Z2]·RC + y.

The total is M(11(M+3) + 4) + (2M + 9)(M + 3) + 8 cycles from the start
edge: 717,908 at M = 233. `q_inf` flags kP = ∞. P must have x ≠ 0, and
(k + 1)P must be finite.

## Where this design departs from its source description

**Cycle counts.** The source describes the multiplier as taking n + 1
clocks for n-bit operands, and that is what is built: 257 cycles at 256
bits. Its result tables list far fewer cycles: 153 or 121 for the 256-bit
product, 158,203 for a point multiplication, and 52 for a modular addition.

| operation | source tables | this RTL |
|---|---|---|
| 256-bit product | 153 or 121 | 257 |
| point multiplication | 158,203 | 413,239 |
| modular addition | 52 | combinational |

Those figures cannot be reached by a one-bit-per-clock multiplier, so
expect the cycle counts above rather than the tabulated ones.

**Register array.** The drawing of the point multiplier shows four
temporaries. This design uses eight, so that all four arithmetic units can
work in every round.

**Control.** The source names control signals C1..C11 without defining
them. Here the multiplexer selects and write enables are decoded from a
micro-op instead.

**Ladder formulas.** The formulas, the y recovery and the schedule are
this design's own. The source states only that the Montgomery ladder is
used with parallel multipliers and squarers.

**Inverter.** The inversion algorithm is not specified in the source. The
binary extended Euclidean algorithm is this design's choice.

**Encryption scheme.** The encryption scheme is not specified in the
source. EC ElGamal on message points is assumed, with kG as the first
ciphertext point. Encoding bytes of a message into curve points is not
built: messages enter and leave as points.

**Double point multiplier.** The source says only that the double point
multiplier uses "precomputed values". This design reads that as Shamir's
method with the single precomputed point P + R. The point formulas inside
its units are also this design's choice. The final conversion to affine
needs an inverter, which the source's drawing of this block does not
show.

**Binary-field accelerator.** The source describes this block by its
parts and its function only. The choices made here are:
- the López–Dahab formulas;
- three temporaries T1..T3 beside the four ladder registers and RC;
- Fermat inversion on the shared multiplier;
- the y recovery;
- M = 233, taken from the 233-bit point buses in the source's
  simulation figures.

The source also shows messages entering as byte streams. Encoding bytes
into points is not built for either field.

**Curve constant a.** The curve constant a is fixed at −3, the value used
by all NIST prime curves. p and b are inputs.

**Field sizes.** The multiplier is evaluated at 192, 256, 384, 409, 521
and 571 bits. `mod_mul` runs at all of these when `N` is overridden. At
the default N = 256, only moduli up to 256 bits fit.

## Simulating

Every testbench in `tb/` is self-checking. Each one:
- ends with a line `TB_RESULT checks=<n> failures=<m>`;
- has a watchdog;
- runs in a two-state simulator.

Reference values come from `tb/ecc_ref_pkg.sv` and `tb/gf2m_ref_pkg.sv`.
They compute with plain wide-integer `*` and `%` (or shift-and-XOR) and
Fermat inversion, independent of the RTL algorithms.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/gf2m_ref_pkg.sv tb/tb_ecc_main.sv \
    --top-module tb_ecc_main -Mdir obj_tb_ecc_main
./obj_tb_ecc_main/Vtb_ecc_main
```

| testbench | what it covers | size |
|---|---|---|
| `tb_mod_addsub` | random and edge-case add/sub | 256 |
| `tb_mod_mul` | products, squares, N+1 latency | 256 |
| `tb_mod_mul_fields` | multiplier at 192/256/384/409/521/571 bits (P-192, P-256, P-384, P-521; primes 2^409−103 and 2^571−369 where no NIST prime exists) | all six |
| `tb_mod_inv` | inverses of random and edge-case values | 256 |
| `tb_ecpm_regfile` | init, writes, swap decoding | 16 |
| `tb_ecpm_ctrl` | micro-op counts and swap sequence with a stub datapath | 8 |
| `tb_ecpm` | kP against the reference, exact cycle count | 256 |
| `tb_proj2aff` | conversion of random projective points | 256 |
| `tb_ecc_keygen` | public keys from random private keys | 256 |
| `tb_point_add` | addition, doubling, inverse points | 256 |
| `tb_proj_point_unit` | projective add/double: distinct, equal, opposite, infinity; exact cycle counts | 256 |
| `tb_ecc_dpm` | kP and kP + lR, including R = P, R = −P and a result at infinity | 256 |
| `tb_gf2m_mul` | random and edge-case GF(2^233) products, M+1 latency | 233 |
| `tb_ecc_accel_gf2m` | kP on random binary curves, infinity result, exact cycle count | 233 |
| `tb_ecc_main` | encryption, decryption, doubling and infinity cases, the `dpm_*` and `gf_*` ports | 256/233, defaults |

`tb_ecc_main` runs the top with all parameters at their defaults. It counts
each mechanism it exercises:
- encryption and decryption;
- both ladder swap values;
- the doubling path in the adder;
- the infinity result;
- both modes of the double point multiplier;
- a binary-field point multiplication.

Any mechanism that never occurs counts as a failure. The testbench takes
about 15 s to run.

Notes on the tools:
- Verilator reports some unused-signal warnings. They cover `busy` outputs
  left open by parents, and the top carry bits of the multiplier's
  subtraction candidates.
- Verilator also reports a SYNCASYNCNET warning, because `rst_n` is used
  both as an asynchronous reset and in the `disable iff` of an assertion.
