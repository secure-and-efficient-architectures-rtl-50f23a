# Split-exponent single exponentiation in GF(2^m) with a hybrid-double multiplier

This RTL computes `C = A^P` for a field element `A` of GF(2^m) and an m-bit
integer exponent `P`, with elements in a Gaussian normal basis (GNB). The
default size is m = 571 with a type-10 GNB and a 13-bit digit.

The main idea is to turn one exponentiation into a double exponentiation.
Split `P` into a low half `K` and a high half `Q`, each `H = ceil(m/2)` bits.
Set `B = A^(2^H)`. Then

    A^P = A^K * B^Q.

In a normal basis `B` costs nothing: it is `A` cyclically rotated by `H`
places. The two halves are then scanned together. Each step consumes bit
positions `i` and `i+1` of both halves and performs one double
multiplication, `C_j = C_{j-1} * R_i * R_{i+1}`. Each `R` is 1, A, B or AB,
squared `i` or `i+1` times.

A hybrid-double multiplier computes `X*Y*F` in about the time of a single
digit-serial multiplication. The whole exponentiation therefore costs
`ceil((m-1)/4)` multiplication times, against about `m/2` for binary
square-and-multiply.

A double multiplication is performed in every iteration, whatever the
exponent bits are. That includes `C*1*1` when all four bits are zero. So the
sequence of operations and the run time never depend on `P`.

## Files

| file | content |
|---|---|
| `rtl/gnb_pkg.sv` | operand-select encoding and controller state types |
| `rtl/gnb_rot.svh` | squaring and square-root rotations (included in modules) |
| `rtl/gnb_rtab.svh` | elaboration-time generation of the GNB multiplication table |
| `rtl/gnb_piso.sv` | digit-serial parallel-in, serial-out multiplier core (LSD out) |
| `rtl/gnb_sipo.sv` | digit-serial serial-in, parallel-out multiplier core (LSD in) |
| `rtl/gnb_hdm.sv` | hybrid-double multiplier: registers, digit register, sequencing |
| `rtl/gnb_operand_sel.sv` | A/B/AB registers, the three 4-to-1 operand multiplexers, fixed squarers |
| `rtl/gnb_single_exp.sv` | top: exponent split, AB precomputation, iteration control |
| `tb/gnb_ref_pkg.sv` | independent software model of GNB arithmetic |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a full-size run |

## Number representation

An element is an m-bit vector. Bit `i` is the coefficient of `beta^(2^i)`,
where `beta` generates the normal basis.

- **Addition** is XOR.
- **One** is the all-ones vector.
- **Squaring** is a cyclic rotation: bit `i` of `A^2` is bit `i-1` of `A`.
  In the code, `gnb_sqr(v, s)` is `v^(2^s)` and `gnb_sqrt(v, s)` is
  `v^(2^-s)`.

A type-T GNB exists when `p = mT + 1` is prime and a gcd condition on the
order of 2 modulo `p` holds. For m = 571 the smallest even type is T = 10
(p = 5711). The tests use m = 17 with T = 6 (p = 103). `T` must be even,
because the reduced product formula below relies on it.

## Multiplication

Let `u` have multiplicative order `T` modulo `p`. Every nonzero residue is
uniquely `2^i * u^j`, with `i < m` and `j < T`. Write `F(2^i u^j) = i`, and
define the table entry `R(i,j) = F(1 - 2^i u^j mod p)`. Coordinate 0 of
`A*B` is then

    c0 = a0*b1 + sum_{i=1..m-1} a_i * ( sum_{j<T} b_{R(i,j)} )

Coordinate `l` is the same network applied to both operands rotated by `l`
places. `gnb_rtab.svh` builds the table at elaboration from `M` and `T`, one
row of `T` entries per generate block. To find `F(v)` it counts
multiplications by `2^T` until it reaches `v^T`: `2^T` has order `m`, and
`u^T = 1`. No large arrays are involved, because array-heavy constant
functions are very slow or run out of memory in Verilator at m = 571.

### Hybrid-double multiplier (`gnb_hdm`)

Two digit-serial multipliers run interleaved, with digit size `D` and
`Q = ceil(m/D)` digits:

1. **PISO core (`gnb_piso`).** Each clock it produces `D` coordinates of
   `C = X*Y`, lowest digit first. It is `D` copies of the coordinate-0
   network on fixed rewirings of `X` and `Y`. After each digit, `X` and `Y`
   are rotated by `D` (`X <- X^(2^-D)`). On the last digit, coordinates
   beyond `m-1` are masked off. For m = 571 and D = 13 the last digit holds
   12 coordinates.
2. **Digit register.** It holds the digit for one clock.
3. **SIPO core (`gnb_sipo`).** It folds the digit into the accumulator with
   a Horner step:

       Z <- ( Z + sum_t c_{nD+t} * (beta^(2^t) * F') ) ^ (2^-w)

   Here `F' = F^(2^-nD)` is the F register, also rotated by `D` per digit.
   Each `beta^(2^t) * F'` is a fixed linear map of `F'` that uses the same
   table. The rotation `w` is `D`, except on the last digit, where it is
   `m - (Q-1)D`. That choice makes `Z` come out as exactly `C*F`, with no
   final correction.

The PISO core works in clocks 0 to Q-1 and the SIPO core in clocks 1 to Q,
so a double product takes `Q+1` clocks.

The first SIPO step ignores the old `Z` instead of clearing it. As a result,
`Z` still holds the previous product during clock 0 of the next operation.

Handshake:

- `start` is accepted while `ready` is high: when idle, and also in the
  operation's `last` clock.
- `z_next` is the value `Z` takes at the end of the current clock.
- `done` pulses one clock after `last`, when `z` holds `X*Y*F`.

Accepting `start` in the `last` clock lets the exponentiator chain
operations with no gap: it starts the next operation in the last clock of
the previous one, with `X` taken from `z_next`. An assertion flags a `start`
while `ready` is low.

## Exponentiation schedule (`gnb_single_exp`)

`K = P[H-1:0]`. `Q = P[m-1:H]`, zero-extended to the same width. One more
zero bit is added when `H-1` is odd, so that the last pair is complete. That
happens for m = 571, where H = 286.

| phase | clocks | what happens |
|---|---|---|
| IDLE | 1 | `start` latches `A` and `P`. `gnb_operand_sel` loads `A` and `B = A^(2^H)`. |
| LOAD | 1 | starts `A*B*1` on the multiplier |
| PRE | Q+1 | computes the product, which is latched as `AB` |
| FIRST | — | starts iteration 1. `X = C0`, picked from {1, A, B, AB} by `(q0,k0)`. `Y = R_1`, `F = R_2`. |
| ITER | N·(Q+1) | iteration `j` consumes bits `2j-1` and `2j`. Each next iteration starts in the last clock of the previous one, with `X = z_next`. |

Start to `done` takes `3 + (N+1)(Q+1)` clocks, where `N = ceil((H-1)/2)`.
This is the same as `ceil((m-1)/4)` for odd m. The iterations alone take
`N(Q+1)` clocks.

| m | D | Q+1 | N | iteration clocks | start to done |
|---|---|---|---|---|---|
| 571 | 13 (default) | 45 | 143 | 6435 | 6483 |
| 571 | 22 | 27 | 143 | 3861 | 3891 |
| 571 | 26 | 23 | 143 | 3289 | 3315 |
| 17 | 4 (tests) | 6 | 4 | 24 | 33 |

### Operand multiplexers and squarers (`gnb_operand_sel`)

Each multiplexer select is `{q, k}`, one bit from each half of the exponent:

| select | operand |
|---|---|
| 0 | 1 = all ones |
| 1 | A |
| 2 | B |
| 3 | AB |

A literal "square `i` times" in front of the multiplier would be a barrel
rotator. Instead, the `A`, `B` and `AB` registers are squared twice per
iteration, so in iteration `j` they hold the value to the power
`2^(2j-2)`. The three operands are then:

- `C0`: the selected register as it is (iteration 1 only).
- `R_i`: the selected register squared once.
- `R_{i+1}`: the selected register squared twice.

All three are fixed rewirings. Rotation does not change the Hamming weight
of an operand, so the multiplexer inputs look the same to a power analysis
as unrotated ones would.

### Worked example (m = 17)

For `A^104853`: H = 9, `K = 405`, `Q = 204` and `B = A^(2^9)`. C0 = A,
because `k0 = 1` and `q0 = 0`. The four iterations give `A^5 B^4`,
`A^21 B^12`, `A^21 B^76` and `A^405 B^204 = A^104853`. The top-level
testbench checks each of these partial results.

## Side-channel behaviour

- **Fixed operation sequence.** Every iteration performs exactly one double
  multiplication, and the latency is a constant `3 + (N+1)(Q+1)` clocks.
  There is no data-dependent branch.
- **What could still leak.** Only the values on the multiplexer inputs.
  `1` has Hamming weight m, while `A`, `B` and `AB` typically have about
  m/2.
- **Countermeasures not built.** There is no input randomisation and no
  fault detection. An attacker who can choose `A` may make AB stand out.

## Parameters

All modules take `M` (field degree, default 571) and `D` (digit size,
default 13). All but `gnb_operand_sel` also take `T` (GNB type, default 10).

- **`M` and `T`** must describe an existing GNB of even type, so that
  `p = M*T+1` is prime and the gcd condition holds. This is not checked in
  RTL; a wrong pair gives wrong products.
- **`D`** can be anything from 1 to `M`. Hardware grows about linearly in
  `D` and clocks per product fall as `ceil(M/D)+1`. 13, 22 and 26 are the
  sizes this architecture was evaluated at for m = 571.

## Simulating

Each testbench is a self-contained top and ends with
`TB_RESULT checks=N failures=F`. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_gnb_single_exp \
      -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gnb_pkg.sv tb/gnb_ref_pkg.sv \
      tb/tb_gnb_single_exp.sv
    obj_dir/Vtb_gnb_single_exp

| testbench | size | what it checks |
|---|---|---|
| `tb_gnb_piso` | m=17, T=6, D=4 | digit coordinates at random rotations and masks |
| `tb_gnb_sipo` | m=17, T=6, D=4 | Horner step, normal and last digit, with and without clear |
| `tb_gnb_hdm` | m=17, T=6, D=4 | `X*Y*F`, latency Q+1, back-to-back chaining through `z_next` |
| `tb_gnb_operand_sel` | m=17 | every select value over five iterations of rotation |
| `tb_gnb_single_exp` | m=17, T=6, D=4 | worked example and its partial results, corner and random exponents, constant latency, coverage of the mechanisms |
| `tb_gnb_single_exp_full` | defaults (571, 10, 13) | one random exponentiation against the model, `A^(2^571-1) = 1`, 6483 clocks each |

For `tb_gnb_single_exp`, the mechanisms it requires to occur are every
multiplexer input, the dummy multiplication, both settings of the
C0/previous-result multiplexer, and the AB precomputation.

The reference model in `tb/gnb_ref_pkg.sv` multiplies with the direct
Gauss-period sum over all `p-2` index pairs. It shares no table or structure
with the RTL.

At m = 571, elaborating the two cores takes about 20 s each in Verilator,
because the multiplication table is generated by constant functions. The
full-size testbench also spends several seconds in the software reference.

## Departures and own choices

- **AB precomputation.** `AB` is computed with the same multiplier before
  the iterations, which costs `Q+1` extra clocks. The iteration-clock counts
  in the table above leave this out.
- **Operand chaining.** The next iteration's `X` is taken from the input of
  `Z` (`z_next`) rather than from `Z` itself. This saves one clock per
  iteration.
- **Rotating operand registers.** The registers rotate instead of staying
  constant. This turns the successive squarers into fixed wiring.
- **Internals of the two cores.** The internal structure of the PISO and
  SIPO cores is the simplest one with the right digit-serial behaviour.
  Their gate counts have not been compared with the published complexity
  bound of `2dm` AND gates and about `2d(m-1)(T-1)` XOR gates.
- **Interface and reset.** The handshake, state machine and asynchronous
  active-low reset are this design's own choices.
- **Type T.** T = 10 for m = 571 is the standard GNB for that field. T = 6
  for m = 17 is the smallest even type that exists there.
