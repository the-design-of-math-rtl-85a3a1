# GF(2^8) math core for AES on a CPLD fabric

AES does its byte arithmetic in the finite field GF(2^8), with the field polynomial
F(x) = x^8 + x^4 + x^3 + x + 1. The two hard operations are the field multiplication
(MixColumns, and the inner step of everything else) and the multiplicative inverse (the core of
the S-box). The usual FPGA answer is a look-up table per operation. This core computes them
instead. It uses one fast bit-parallel multiplier, the *reordering multiplier*. The inverse is
built from that multiplier and small power modules (A^2, A^4).

The multiplier's long XOR sums suit a slightly modified programmable logic element. The element
is a 4-input LUT followed by a cascade gate. Next to the usual AND/OR cascade gate it has an XOR
gate, so a sum of many terms chains through consecutive elements.

The core has two channels side by side:

* **multiply**: `mul_c = mul_a * mul_b mod F`, one product per clock, latency 1.
* **invert**: `inv_y = inv_a^254`, which is `inv_a^-1`, or 0 for 0. One result per clock.
  The latency is 4 clocks in the pipelined form and 1 clock in the parallel form.

## Module map

| module | role |
|---|---|
| `aes_math_core` | top: the two channels, valid bits, output registers |
| `gf_inv` | inverse a^254: three levels of power module + multiplier, optionally pipelined |
| `gf_mul_reorder` | the reordering multiplier; `LE_MAP` selects gates or the logic-element mapping |
| `gf_mul_c3_le` | critical product bit c3 on exactly three logic elements |
| `le_xor_chain` | helper: N-input XOR sum on ceil(N/4) cascaded logic elements |
| `cpld_le` | modified logic element: LUT4, AND/OR/XOR cascade gate, optional register |
| `gf_sq`, `gf_pow4` | A^2 and A^4 as fixed XOR networks |
| `gf8_pkg` | `gf8_t`, cascade-gate enum `casc_op_e`, mapping enum `le_map_e` |

Bit *i* of every byte is the coefficient of alpha^i (polynomial basis, bit 0 = constant term).

## The reordering multiplier

Multiplying two 8-bit polynomials gives 64 partial products a_i b_j. They fall into 15
coefficients p_0 .. p_14. The low eight coefficients stay where they are. The high seven
(x^8 .. x^14) must be folded back with x^8 = x^4 + x^3 + x + 1. A textbook design reduces each
high power separately, which gives deep and uneven XOR trees. This multiplier instead splits the
partial products into two groups:

* the **regular group** `lo[k] = sum_{i<=k} a_(k-i) b_i`, the coefficient of x^k for k = 0..7;
* the **reordering group** `hi[k] = sum_{i<=k} a_(7-i) b_(7-k+i)`, the coefficient of x^(14-k).

It then forms a shared **reduction vector** once:

```
d0 = hi0          d4 = hi4 ^ d0
d1 = hi1          d5 = hi5 ^ d0 ^ d1
d2 = hi2          d6 = hi6 ^ d2 ^ d3
d3 = hi3
```

Every product bit is a short XOR of one high term, one low term and two to four d's:

```
c0 = hi6 ^ lo0 ^ d1 ^ d2              c4 = hi2 ^ lo4 ^ d1 ^ d5 ^ d6
c1 = hi5 ^ lo1 ^ d0 ^ d3 ^ d6         c5 = hi1 ^ lo5 ^ d2 ^ d4 ^ d5
c2 = hi4 ^ lo2 ^ d0 ^ d5              c6 = hi0 ^ lo6 ^ d1 ^ d3 ^ d4
c3 = hi3 ^ lo3 ^ d1 ^ d3 ^ d4 ^ d6    c7 =       lo7 ^ d0 ^ d2 ^ d3
```

Because the d's are shared, the XOR gates that the reduction needs are moved ("repositioned")
into the d stage. What is left per output bit is balanced. c3 has the most inputs and sets the
critical path.

**Where this departs from the published equations.** The published equation set for this
multiplier, as used here, does not give the correct product for three bits:

* c1 lists d1 where d3 is needed.
* c4 lists d3 where d1 is needed.
* c3 lists the product a0 b3 (already part of lo3) where d1 + d3 is needed.

The equations above are the smallest changes that match A*B mod F. All 65,536 operand pairs
were checked. The c3 form has 12 inputs, which is exactly three 4-input elements, the count
claimed for c3.

## The modified logic element and the CPLD mapping

`cpld_le` models one element of a LUT-based CPLD:

```
din[3:0] --> LUT4 (LUT_MASK) --> cascade gate (AND | OR | XOR, CASC_OP) --> casc_out --> next element
                                        ^                                   |
                                     casc_in                          [register if REGISTERED] --> q
```

In a stock element the cascade gate is AND or OR. The added XOR gate lets a parity LUT
(`16'h6996`) pass its partial sum straight into the next element's cascade. An n-input XOR
therefore costs ceil(n/4) elements and no general routing. The register after the cascade gate
is what lets one structure be configured as combinational or pipelined.

`gf_mul_reorder` offers three mappings with the same function (`LE_MAP`):

* `MAP_GATES`: plain XOR logic, for any other target.
* `MAP_C3_LE`: only c3 on elements, as `gf_mul_c3_le`. A product-term AND array feeds three
  elements: {a7b4, a6b5, a5b6, a4b7}, then {a3b0, a2b1, a1b2, a0b3}, then {d1, d3, d4, d6}.
* `MAP_ALL_LE` (default): every d and c sum on elements. c3 is built as above and the other
  sums through `le_xor_chain`, four inputs per element.

The `MAP_ALL_LE` mapping takes 34 elements: 10 for d1..d6 and 3 for each product bit. That is
more than one LAB of 10 elements. The stated under-one-LAB figure needs a tighter packing than
this straightforward four-per-element split. The LE count and clock rate in a real device
depend on the vendor's fitter, which is outside this RTL.

## Power modules

Squaring is linear over GF(2), so A^2 and A^4 are fixed XOR networks: at most 4 inputs per bit
for A^2 and 6 for A^4. They are written as flat coefficient tables (`gf_sq`, `gf_pow4`).
Chaining them gives any A^(2^i). At four inputs per
element, A^2 needs 8 elements (one per bit). A^4 needs 11, because three of its bits have 5 or 6
inputs. Both are written as gates here and left to the fitter.

## The inverse

a^-1 = a^254 in GF(2^8), and 254 = 2 + 4 + ... + 128. Multiplying seven squares together needs
six multipliers in a long chain. `gf_inv` uses an addition chain instead. It has three uniform
levels, each a power step followed by one multiplier:

```
level 1:  a2   = a^2              a3  = a2 * a
level 2:  a12  = (a3)^4           a15 = a12 * a3      a14 = a12 * a2
level 3:  a240 = ((a15)^4)^4      y   = a240 * a14          (a^254)
```

That is four multipliers, one squarer and three A^4 modules. `PIPELINED = 1` (default) puts a
register after every level. The clock period is then one power step plus one multiplier, with
latency 3 clocks and one operand per clock. `PIPELINED = 0` is the parallel form: one
combinational path, with `valid_o = valid_i`. a = 0 gives 0, as the AES S-box needs.

## Interface and timing of `aes_math_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, clears the valid bits only |
| `mul_valid_i`, `mul_a`, `mul_b` | in | 1, 8, 8 | multiply request |
| `mul_valid_o`, `mul_c` | out | 1, 8 | product, 1 clock after the request |
| `inv_valid_i`, `inv_a` | in | 1, 8 | inverse request |
| `inv_valid_o`, `inv_y` | out | 1, 8 | inverse, 4 clocks after (pipelined) or 1 clock (parallel) |

There is no back-pressure: a request may be presented every clock and results come out in
order. Data registers load only with valid data. The channels, valid bits, reset and output
registers are choices of this implementation. The arithmetic itself is specified by the
equations above.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`. The reference arithmetic in `tb/gf_ref_pkg.sv` is written
independently of the design: shift-and-add multiplication, repeated multiplication for powers,
and exhaustive search for the inverse.

* `tb_gf_sq`, `tb_gf_pow4`: all 256 operands, plus a check that each map is a permutation.
* `tb_gf_mul_reorder`: all 65,536 pairs in all three `LE_MAP` forms, plus two AES reference
  products.
* `tb_gf_mul_c3_le`: all 65,536 pairs for bit c3.
* `tb_cpld_le`: all LUT/cascade input combinations for AND, OR and XOR, and the register's
  one-clock delay and reset.
* `tb_gf_inv`: both forms. All 256 operands back to back, then random traffic with bubbles.
  Checks the value, a * a^-1 = 1, exact 3-clock latency and in-order retirement.
* `tb_aes_math_core`: the default (pipelined) top end to end. Both channels are loaded at
  once: all 256 inverse operands, then 2000 random cycles with gaps. Every result is checked
  with its latency. It counts and requires back-to-back requests, idle cycles, the inverse of
  zero, both channels busy in one clock, and several inverses in flight.
  `tb_aes_math_core_parallel` does the same with `PIPELINED = 0`.

Each testbench has been shown to catch a deliberately broken copy of its module.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/gf8_pkg.sv tb/gf_ref_pkg.sv tb/tb_aes_math_core.sv --top-module tb_aes_math_core -o sim
./obj_dir/sim
```

Replace `tb_aes_math_core` with any other testbench name. Each one runs in well under a second.
Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/gf8_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are expected:

* `clk` and `rst_n` are unused in unregistered logic elements.
* Three bits of the shared d vector are unused in `gf_mul_c3_le`.
* The gate-form sums are unused in `MAP_ALL_LE`.

## What is not here

* The vendor device itself (LAB and MegaLAB routing, embedded memory blocks) is not modelled.
  Only the logic element is.
* The PCI prototype board and its host software are not modelled.
* The stock element's carry chain is left out of `cpld_le`, since nothing here uses it.
* The field polynomial is fixed to the AES one. The equations are specific to it.
