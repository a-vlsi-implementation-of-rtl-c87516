# Dual-field elliptic-curve point processor (GF(p) and GF(2^m), 8-bit)

This is a small elliptic-curve cryptography (ECC) processor that runs the
curve group operations over either kind of finite field with one datapath:

* a prime field GF(p), curve `y^2 = x^3 + a x + b (mod p)`
* a binary field GF(2^m), curve `y^2 + x y = x^3 + a x^2 + b`

It performs point addition, point doubling and scalar multiplication
`k*P = P + P + ... + P`. The design avoids field inversion, the most
expensive field operation. It keeps points in projective coordinates
(X, Y, Z), and each addition takes one projective operand and one affine
operand (x, y), which is called mixed-coordinate addition. The field size is
a parameter, `M`, whose default of 8 bits is the configuration the design
was made for. The prime p, the binary field polynomial and the curve
coefficients are run-time inputs, so any curve of that size can be used.

The design is a teaching-scale processor: 8-bit fields give no security. Its
value lies in showing the structure and in being fully checked against the
textbook group law.

## Coordinates: what the numbers in the result memory mean

This is the part that needs the most care when you use the processor.
Results are **projective**, and the two fields use different projective
forms:

| field   | stored point | affine point                     | point at infinity |
|---------|--------------|----------------------------------|-------------------|
| GF(2^m) | (X, Y, Z)    | x = X / Z,   y = Y / Z^2 (Lopez-Dahab) | Z = 0 |
| GF(p)   | (X, Y, Z)    | x = X / Z^2, y = Y / Z^3 (Jacobian)    | Z = 0 |

The processor never converts a result back to affine form, because that
needs an inversion. The host does it. To feed an affine point in as the
projective operand Q, write `(x, y, 1)`, or any `(x*Z, y*Z^2, Z)`
(binary) or `(x*Z^2, y*Z^3, Z)` (prime) with Z not 0.

The second operand of an addition, P, is always affine. The addition
datapaths do not handle two cases:

* Q at infinity
* Q equal to P, where doubling is needed instead

In both cases they return Z = 0. The case Q = -P is handled correctly and
gives the point at infinity. The doubling datapaths handle every input.

## Point operations

Each operation is one combinational datapath (`rtl/bf_point_add.sv`,
`bf_point_dbl.sv`, `pf_point_add.sv`, `pf_point_dbl.sv`). Intermediate
names follow the comments in each file.

**GF(2^m) mixed addition** (Q projective, P = (px, py) affine):
```
A = Y + py*Z^2      B = X + px*Z        C = B*Z          Z3 = C^2
D = px*Z3           E = A + B^2 + a*C   X3 = A^2 + C*E   I = D + X3
J = A*C + Z3        F = I*J             K = Z3^2         Y3 = F + (px + py)*K
```
The last term is computed as two products, `px*K + py*K`. The datapath uses
10 multiplications and 5 squarings.

**GF(2^m) doubling:**
```
Z4 = Z^2 * X^2
X4 = X^4 + b*Z^4
Y4 = (Y^2 + a*Z4 + b*Z^4)*X4 + Z4*b*Z^4
```

**GF(p) mixed addition:**
```
B = px*Z^2   C = X - B   E = py*Z^3   F = Y - E   G = X + B   H = Y + E
Z3 = Z*C     X3 = F^2 - G*C^2         I = G*C^2 - 2*X3
Y3 = (I*F - H*C^3) / 2
```
The division by 2 is a modular halving: an odd value has p added before the
shift. For this reason p must be odd.

**GF(p) doubling:**
```
A = 3X^2 + a*Z^4   B = 4X*Y^2   C = 8Y^4
X4 = A^2 - 2B      Z4 = 2Y*Z    Y4 = A*(B - X4) - C
```
The constant multiples 2, 3, 4 and 8 are chains of modular additions.

## Field arithmetic

| operation        | GF(2^m)                                            | GF(p)                                          |
|------------------|----------------------------------------------------|------------------------------------------------|
| add / subtract   | XOR (`gf2m_add`)                                   | carry-propagate add or subtract, then one conditional correction by p (`gfp_addsub`) |
| multiply         | hybrid Karatsuba carry-less product, then reduction (`gf2m_mult`) | Vedic multiplier, then restoring reduction mod p (`gfp_mult`) |
| square           | bit spreading (coefficient i moves to 2i), then reduction (`gf2m_sqr`) | the multiplier |

More detail on each unit:

* **Karatsuba multiplier** (`karatsuba_mult`). It splits each operand into
  halves and forms three half-size products (low, high, and the product of
  the XORed halves) instead of four. The half-size products are schoolbook
  AND/XOR arrays (`clmul_school`).
* **Binary-field reduction** (`gf2m_reduce`). It clears the coefficients of
  degree M and above from the top down, using `x^M = poly(x)`. The input
  `poly` holds the low M bits of the field polynomial, for example `8'h1B`
  for `x^8 + x^4 + x^3 + x + 1`. Any irreducible polynomial of degree M
  works.
* **Vedic multiplier** (`vedic_mult`). It uses the "vertically and
  crosswise" column scheme. Each product bit is the low bit of the sum of
  all crosswise partial products in its column plus the carry from the
  column before.
* **Operand rule.** GF(p) operands must already be reduced, that is, below p.

## Processor organisation

```
 host write bus ──> input buffer ──> main control (control register)
                         │                  │ field P/B, operation
                         v                  v
                    P/B data selector ──> arithmetic unit (4 point datapaths)
                         ^                  │
                         │ ACC              v
                 scalar unit <──────> register file (RES, ACC)
                                            │
                                            v
                                    result memory ──> output buffer ──> host read bus
```

* **Input buffer** (`ecc_in_buffer`). Holds the operand words. Writes are
  ignored while an operation is running.
* **Main control** (`ecc_main_ctrl`). Holds the 3-bit control register.
  Writing it starts an operation.
* **P/B data selector** (`ecc_data_select`). Routes the operands to the
  prime side or the binary side of the arithmetic unit and holds the other
  side at zero. It takes Q from the input buffer for a single operation and
  from the accumulator during a scalar multiplication.
* **Register file** (`ecc_regfile`). Has two point registers: RES holds the
  result of a single operation, and ACC holds the running point of a scalar
  multiplication.
* **Result memory** (`ecc_result_mem`). Gives each operation its own
  three-word slot, so results of different operations stay side by side.
  Word 15 holds the code of the last operation that finished.

### Host protocol

To run an operation:

1. Write the operands: drive `wr_en` and `wr_addr`/`wr_data` for one clock
   per word.
2. Write the operation code to address 15.
3. Wait for the one-cycle `done` pulse. `busy` is high from the cycle after
   the control write until done.
4. Read the result: drive `rd_en` and `rd_addr` for one clock. The word
   appears on `rd_data` with `rd_valid` high in the next cycle.

| write address | word        | | code | operation                  | result slot (X, Y, Z) |
|---------------|-------------|-|------|----------------------------|-----------------------|
| 0, 1          | P: px, py   | | 1    | GF(2^m) Q + P              | 0, 1, 2               |
| 2, 3, 4       | Q: X, Y, Z  | | 2    | GF(2^m) 2Q                 | 3, 4, 5               |
| 5, 6          | a, b        | | 3    | GF(p) Q + P                | 6, 7, 8               |
| 7             | p, or the low M bits of the binary field polynomial | | 7 | GF(p) 2Q | 9, 10, 11 |
| 8             | scalar k    | | 4    | GF(2^m) k*P                | 12, 13, 14            |
| 15            | control     | | 5    | GF(p) k*P                  | 12, 13, 14            |

Codes 0 and 6 are ignored. The constants are in `rtl/ecc_pkg.sv`.

Timing, counted from the clock edge that takes the control write:

* **Point operation:** `done` comes 3 cycles later. The arithmetic-unit
  result is captured in the first cycle and copied to memory in the second.
* **Scalar multiplication:** `done` comes 2M + 5 cycles later, which is 21
  cycles at M = 8.

Every point datapath is purely combinational, so the clock period must
cover one full point operation. The design has no internal pipelining.

## Scalar multiplication

The scalar unit (`ecc_scalar_ladder`) walks over the M bits of k from the
most significant bit down. Every bit takes the same two cycles:

1. **Double:** ACC <- 2*ACC.
2. **Add:** the mixed addition ACC + P is always computed. It is written
   back only when the bit of k is 1.

The schedule is therefore independent of the bit values, as in a Montgomery
ladder. ACC starts at the point at infinity (Z = 0). Doubling leaves it
there, and the first addition loads `(px, py, 1)` directly instead of using
the addition datapath.

The unit does **not** catch the case where ACC equals P just before an
addition, which happens for some k. In that case the result is wrong.
Callers must avoid such scalars or check the result.

## Where this design departs from its source description

* **Scalar multiplication.** The architecture this RTL implements names a
  Montgomery-ladder unit. It defines only the mixed addition, though, which
  a two-register Montgomery ladder cannot use. The unit here keeps the
  ladder's fixed two-step schedule but accumulates into a single register,
  so it is a double-and-add-always method.
* **Prime-field addition, last step.** The addition sequence this design
  follows has `H*C^2` in its final step. That does not give a point on the
  curve in Jacobian coordinates. The RTL uses `H*C^3`, the standard form,
  and the testbench confirms it against the group law.
* **Adders.** The source describes redundant signed digit (RSD), carry-free
  modular adders as the intended direction. Its implemented design uses
  ordinary carry-propagate adders, and so does this RTL. No RSD adder is
  included.
* **Reduced results.** Every result is fully reduced into the field. The
  reference prototype displayed unreduced values wider than 8 bits, and
  this RTL does not reproduce them.
* **Own choices.** The following are choices of this implementation:
  * the host bus
  * the address map and result slots
  * codes 4 and 5 for scalar multiplication
  * the register-file size
  * reset behaviour: asynchronous, active low, clears all state
  * the reduction methods

  The codes 1, 2, 3 and 7 for the four point operations come from the
  reference prototype.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog. The reference model
(`tb/ecc_ref_pkg.sv`) is independent of the RTL. It contains:

* shift-and-add GF(2^8) multiplication
* inverses by exhaustive search
* the affine group law with all special cases
* random curves, with points found by solving the curve equation

Each testbench checks the following:

* **Field units.** Tested against integer or bitwise arithmetic. The Vedic
  multiplier is tested exhaustively.
* **Point datapaths.** Random curves over several primes and field
  polynomials, random points and random projective Z. Each result is
  converted back to affine, compared with the group law and checked to lie
  on the curve.
* **Scalar unit and processor** (`tb_ecc_dual_field_processor`). k*P is
  compared with an affine double-and-add reference, and the cycle counts
  above are checked. The processor test runs at the default parameters.
  It also checks that each of these happens at least once:
  * every operation code
  * a write ignored while busy
  * both ignored codes
  * Q = -P giving infinity
  * the infinity load in the scalar unit
  * zero bits of k

The reference model is written for 8-bit fields, so the testbenches cover
only M = 8. The RTL is parameterised in M but has not been simulated at
other sizes.

## Simulating

With Verilator 5, for example the full processor test:

```
verilator --binary --timing --assert -Wno-lint -Wno-style \
  --top-module tb_ecc_dual_field_processor \
  rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv rtl/*.sv tb/tb_ecc_dual_field_processor.sv
obj_dir/Vtb_ecc_dual_field_processor
```

Any other testbench runs the same way: replace the top module and the last
file with `tb/tb_<module>.sv`. The packages must come first on the command
line. All testbenches finish in well under a second.

## Changing it

* **Field size.** Set `M` on `ecc_dual_field_processor`. The scalar has M
  bits, and the host bus stays one field word wide.
* **Curves.** Run-time inputs only; no rebuild is needed.
* **Other coordinate formulas.** Each point datapath is a flat list of
  field-unit instances in formula order. Replace the list and keep the
  ports.
* **Constants.** The operation codes and the address map are in
  `rtl/ecc_pkg.sv`.
