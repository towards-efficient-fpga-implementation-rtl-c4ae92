# Montgomery-ladder elliptic curve processor over GF(2^m)

This is a small crypto-processor for elliptic curve point multiplication,
Q = kP, on binary curves y² + xy = x³ + ax² + b over GF(2^m). It is meant for
FPGA use in IoT and embedded devices. The default field is GF(2^163), with the
NIST pentanomial F(x) = x¹⁶³ + x⁷ + x⁶ + x³ + 1. The same RTL also runs over
GF(2^409) (F(x) = x⁴⁰⁹ + x⁸⁷ + 1) when its parameters are changed.

The design rests on four ideas:

* **Montgomery ladder in López-Dahab x-only coordinates.** Each key bit costs
  one point addition plus one point doubling. Only X and Z are kept for the two
  ladder points. No inversion is needed until the very end.
* **Three field multipliers working in two stages.** A ladder step has six
  multiplications. They run as 3 + 3 on three multipliers. The second stage
  takes its operands straight from the first stage's multiplier outputs.
* **Forward paths instead of temporaries.** Short-lived products never go
  through the register file. So the ladder state fits in **four** registers
  (X1, Z1, X2, Z2), and the second stage starts in the same cycle the first one
  finishes.
* **One inversion, done with Itoh-Tsujii.** At the end, the projective result is
  turned into affine (xk, yk). This needs a single inversion, of x·Z1·Z2. It
  uses a Karatsuba-Ofman multiplier and a 4-way squarer chain, and it overlaps
  the multiplications that do not depend on it.

With the defaults, a full 163-bit key takes **728 clock cycles**. That is 4
cycles per key bit, plus 80 cycles of set-up, conversion and memory access.

## Structure

```
                 host port (k, x, y in / xk, yk out)
                          |
                    +-----------+
                    | eccp_bram |  8 x m-bit words, dual port
                    +-----------+
                          | port B
   start, curve_b   +-----------+   LOAD / STEP(k_i)    +---------------+
  ----------------->| eccp_ctrl |---------------------->| eccp_padd_dbl |
   busy, done, err  |           |<--- ready / done -----|  regfile (4)  |
  <-----------------|           |                       |  3 x gf_mul_ds|
                    |           |---- start ----------->|  4 x gf_sqr   |
                    |           |<--- xk, yk, inf ---+  |  2 x gf_add   |
                    +-----------+                    |  +---------------+
                                                     |     | X1 Z1 X2 Z2
                                              +--------------+
                                              | eccp_convert | gf_mul_ds + gf_inv_ita
                                              +--------------+   (gf_mul_ko, gf_sqr_n)
```

| module | role |
|---|---|
| `eccp_top` | the processor: wires RAM, control, point unit and conversion |
| `eccp_ctrl` | reads k, x, y; finds the leading one of k; issues LOAD then one STEP per key bit; starts the conversion; writes xk, yk back |
| `eccp_padd_dbl` | one ladder step (x-only addition + doubling) on three multipliers, with forward paths |
| `eccp_regfile` | the point unit's register file; read ports are address-selected multiplexers |
| `eccp_convert` | projective to affine: 10 products on one multiplier, plus one inversion |
| `eccp_bram` | dual-port block RAM: host port A, control-unit port B |
| `gf_mul_ds` | digit-serial multiplier; with digit size DS = m it is bit-parallel (one cycle) |
| `gf_mul_ko`, `kmul_poly` | combinational Karatsuba-Ofman multiplier (a recursive tree of half-size products) |
| `gf_inv_ita` | Itoh-Tsujii inverter |
| `gf_sqr`, `gf_sqr_n` | squarer, and a chain of N squarers |
| `gf_reduce`, `gf_add` | reduction modulo F(x), and field addition (XOR) |
| `gf_pkg`, `eccp_pkg` | field constants (F(x) low parts, B-163's b); command enum, register and RAM addresses |

## The ladder step (eccp_padd_dbl)

The ladder state is (X1:Z1) = kP and (X2:Z2) = (k+1)P, with x-only coordinates.
For each key bit k_i, one pair gets the sum and the other pair is doubled:

* k_i = 1: (X1,Z1) ← Add, and (X2,Z2) ← Double.
* k_i = 0: (X2,Z2) ← Add, and (X1,Z1) ← Double.

In the formulas below, a marks the pair that gets the sum and d the pair that is
doubled. x is the base point's affine x.

```
Add:    Za' = (X1·Z2 + X2·Z1)²        Xa' = x·Za' + (X1·Z2)(X2·Z1)
Double: Zd' = Xd²·Zd²                 Xd' = Xd⁴ + b·Zd⁴
```

The two address multiplexers (`a_sel`, `b_sel`) pick which register pair plays
a and which plays d. The cross products X1·Z2 and X2·Z1 can be formed as
Xa·Zd and Xd·Za whatever k_i is. Both uses of them are symmetric, so swapping
them changes nothing.

| | multiplier 1 | multiplier 2 | multiplier 3 | written at the end of the stage |
|---|---|---|---|---|
| stage 1 (operands from registers) | Xa·Zd | Xd·Za | Xd²·Zd² | Za ← (M1+M2)², Zd ← M3 |
| stage 2 (operands forwarded) | x·(M1+M2)² | M1·M2 | b·Zd⁴ (old Zd) | Xa ← M1+M2, Xd ← Xd⁴ + M3 |

The second stage is started in the cycle that the first stage's results appear:

* `d_sel` switches the multiplier operands to the forward paths.
* `e_sel` feeds the adder output into the squarer to form Za.

Overwriting Zd at the end of stage 1 is safe. Stage 2 reads b·Zd⁴ through the
squarers in that same cycle, before the write takes effect. So the two cross
products are never stored at all, and no temporary registers are needed.

Timing: with ND = ⌈m/DS⌉ cycles per product, a STEP takes 2·ND + 1 cycles. That
is 3 cycles with the bit-parallel default. LOAD takes one cycle. It sets
(X1,Z1) = (x,1) and (X2,Z2) = (x⁴+b, x²), which are P and 2P.

The curve coefficient a does not appear anywhere. The x-only formulas need only
b, which comes in as the `curve_b` input.

## Recovering the affine point (eccp_convert, gf_inv_ita)

```
xk = X1/Z1 = X1·(x·Z2) / (x·Z1·Z2)
yk = (x + xk)·[(X1 + x·Z1)(X2 + x·Z2) + (x² + y)·Z1·Z2] / (x·Z1·Z2) + y
```

The sequence has ten multiplications on one `gf_mul_ds`:

1. Z1·Z2
2. x·Z1
3. x·Z2
4. x·Z1·Z2. The inverter starts here.
5. (X1 + xZ1)(X2 + xZ2)
6. (x² + y)·Z1Z2
7. X1·xZ2
8. xk. This waits for the inverse.
9. (x + xk)·[…]
10. yk

The Itoh-Tsujii inverter computes a⁻¹ = (a^(2^(m−1)−1))², where
β_k = a^(2^k−1). It follows the binary addition chain of m − 1:

* β₂ₖ = β_k^(2^k)·β_k (k squarings and one multiply)
* β_(k+1) = β_k²·a (one squaring and one multiply)

For m = 163 (m − 1 = 10100010b) this is 9 multiplications. For m = 409 the
binary chain of 408 = 110011000b would need 11. Instead, the parameter
`ADD_K` = 24 runs the binary chain only up to 384 = 408 − 24 and keeps β₂₄ on
the way. One closing step, β₄₀₈ = β₃₈₄^(2^24)·β₂₄, then finishes the job. The
chain is 1, 2, 3, 6, 12, 24, …, 384, 408: 10 multiplications.

The multiplications use the combinational Karatsuba-Ofman multiplier, one
cycle each. The k-fold squarings use `gf_sqr_n`, up to SQN = 4 squarings per
cycle. The inversion takes 54 cycles for m = 163 and 115 for m = 409. The
whole conversion takes 70 cycles with the defaults.

`inf` / `err` is raised when Z1 = 0, which means kP is the point at infinity.

## Interface and use

Block RAM words (`eccp_pkg`): 0 = k, 1 = x, 2 = y, 3 = xk, 4 = yk. Each word is
m bits.

1. Write k, x and y through the host port (`host_we`, `host_addr`,
   `host_wdata`). Reads return data one cycle after the address.
2. Drive `curve_b` and pulse `start` for one cycle.
3. `busy` stays high until `done` pulses.
4. If `err` is 0, read xk and yk from words 3 and 4.

`err` = 1 means k = 0 or kP = ∞. The result words are then not written.

A key does not need its top bit set. The control unit finds the leading one
and starts the ladder there. So the run time is 80 + 4t cycles for a key whose
leading one is bit t. Note that this makes the time depend on the key length.

All registers reset asynchronously on `rst_n` low. The block RAM is not reset;
its initial contents are zero.

Parameters of `eccp_top`:

| parameter | default | meaning |
|---|---|---|
| `M` | 163 | field degree m |
| `FLOW` | `gf_pkg::f_low(M)` | F(x) − x^m. Known for m = 163, 409 and 17. |
| `DS` | `M` | multiplier digit size. DS = M is bit-parallel. |
| `MUL_KO` | 0 | 1 (with DS = M): the point unit and the conversion unit use Karatsuba-Ofman multipliers instead of the bit-parallel array. Same timing. |
| `SQN` | 4 | squarings per cycle in the inverter |
| `KO_BASE` | 22 | width at which the Karatsuba-Ofman recursion stops |

For GF(2^409), set `M = 409` and a smaller DS, such as 52 or 26.

## Performance

| configuration | cycles for a full-length key | published run time × clock |
|---|---|---|
| m = 163, DS = 163 (default) | 728 | 1.9 µs × 369.5 MHz ≈ 702 |
| m = 163, MUL_KO = 1 | 728 | 3.583 µs × 151.9 MHz ≈ 544 |
| m = 409, DS = 52 | 7534 | 29 µs × 253.77 MHz ≈ 7359 |
| m = 409, DS = 26 | 14118 | 59 µs × 317.14 MHz ≈ 18711 |

The cycle formula is 10 + C + (2·ND + 2)·t, where C = 1 + 7(ND+1) + 1 + T_inv
is the conversion time. Clock rates, slice counts and power depend on the FPGA
and are not modelled here.

## How the design departs from the architecture it implements

* The Karatsuba-Ofman variant of the ladder (`MUL_KO = 1`) computes each
  product in one cycle, exactly like the bit-parallel default, so both take
  728 cycles. The published figures imply fewer cycles for the
  Karatsuba-Ofman variant than for the bit-parallel one. How that variant
  is scheduled is not described, so this design does not try to match it.
* The digit-serial multiplier processes one digit combinationally per cycle. It
  has no internal pipeline.
* The conversion has its own multiplier and does not reuse the point unit's
  three.
* The sequential, single-multiplier form of the ladder is not included. Neither
  is the double-and-add method with López-Dahab point addition and doubling.
* The register file has 4 registers; the architecture allows 4 to 6. It has 4
  read and 4 write ports. The operand multiplexer wiring (`a_sel`, `b_sel`,
  `d_sel`, `e_sel`) follows the description of the stages above.
* Not handled: k such that (k+1)P = ∞ (for example k = n − 1). The conversion
  then divides by zero and returns a wrong point.
* The design is not hardened against side channels. The run time depends on
  the position of the key's leading one.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and stops itself through a watchdog. Reference
values come from `tb_gf_ref_pkg`. That package is a separate implementation:
shift-and-add multiplication with interleaved reduction, and inversion by
exponentiation.

| testbench | what it checks |
|---|---|
| `tb_gf_add`, `tb_gf_reduce`, `tb_gf_sqr`, `tb_gf_sqr_n`, `tb_gf_mul_ko` | random operands against the reference; m = 163, and m = 409 where relevant |
| `tb_gf_mul_ds` | DS = 163, 82, 42 and the Karatsuba-Ofman form: values, and latency ⌈163/DS⌉ |
| `tb_gf_inv_ita` | a·a⁻¹ = 1, 0⁻¹ = 0, and the cycle count from the addition chain, for m = 163 (SQN 4 and 1) and m = 409 (ADD_K = 24 and the plain binary chain) |
| `tb_eccp_regfile`, `tb_eccp_bram` | random traffic against a model, including write collisions |
| `tb_eccp_padd_dbl` | 40 random ladder steps against the x-only formulas; 3- and 5-cycle steps; x(2G) and x(3G) on B-163 |
| `tb_eccp_convert` | affine recovery of G, 2G and 0x1234567·G from randomly scaled projective inputs; the 70-cycle run; the Z1 = 0 flag |
| `tb_eccp_ctrl` | command stream, key-bit order, RAM write-back and error exits, using models of the point and conversion units |
| `tb_eccp_top` | default parameters, NIST B-163; see below |
| `tb_eccp_top_409` | m = 409 with DS = 52 and DS = 26; see below |
| `tb_eccp_top_ko` | MUL_KO = 1 on B-163: the same seven scalars and cycle counts, and err for k = n |

`tb_eccp_top` runs end to end at the default parameters on NIST B-163. It
checks:

* seven scalars, including full-length and short keys, against precomputed
  multiples of the generator;
* that each result lies on the curve;
* the cycle count 80 + 4t;
* err for k = 0 and for k = n, the group order;
* that every mechanism occurred at least once: LOAD, steps with k_i = 0 and
  k_i = 1, forwarded stage-2 starts, inversions, leading-zero skip, and both
  error exits.

`tb_eccp_top_409` uses a random curve with b chosen at random. Its base point
was found by solving the curve equation for y. It checks 3P and kP for a full
409-bit k.

To run one testbench with Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_eccp_top \
  -y rtl -y tb +libext+.sv rtl/gf_pkg.sv rtl/eccp_pkg.sv tb/tb_gf_ref_pkg.sv \
  tb/tb_eccp_top.sv -o sim && ./obj_dir/sim
```

Swap the top module name and its file to run any other testbench. Each
simulation finishes in seconds. Building the GF(2^409) testbench takes about
half a minute.
