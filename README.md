# Bit-parallel systolic multiplier over GF(2^m)

This design multiplies two elements of the binary field GF(2^m) in polynomial basis and works
for any field polynomial:

    C = (P + A * B) mod T(x),      T(x) = x^m + t_{m-1} x^{m-1} + ... + t_1 x + t_0

T is an input, not a constant, so one instance works for trinomials, pentanomials and generic
irreducible polynomials of degree m. P is an optional addend; tie it to zero for a plain product.
The array takes a new (A, B, T, P) set on every clock. Each result appears m clocks after its
operands. The critical path is one 2-input XOR plus one 2:1 multiplexer.

The default size is m = 163, the NIST binary field used for elliptic-curve cryptography, with
f(x) = x^163 + x^7 + x^6 + x^3 + 1 as the example polynomial. The design also runs at m = 8, the
AES field with T = x^8 + x^4 + x^3 + x + 1.

## The algorithm: interleaved multiply and reduce

Write B = sum b_j x^j. Then A*B = sum_j b_j (A x^j). Reducing each term as it is formed gives the
recurrence

    A_0 = A,  P_0 = P
    P_{j+1} = b_j ? P_j ^ A_j : P_j          (addition node X(j) and decision node Y(j))
    A_{j+1} = A_j * x mod T(x)               (reduction node Z(j))
    C = P_m

Multiplying by x is a one-bit left shift. If the bit shifted out, a_{m-1,j}, is 1, that x^m term
becomes t_{m-1}x^{m-1} + ... + t_0, because x^m is congruent to that sum modulo T(x) over GF(2).
So the reduction step is:

    A_{j+1} = {A_j[m-2:0], 0} ^ (a_{m-1,j} ? T_low : 0)

Both steps have the same shape, "keep p, or replace it with p ^ q, depending on sel". A single
cell therefore covers both.

## The U cell (`gf_u_cell`)

    r = sel ? (p ^ q) : p

The cell is one XOR and one 2:1 mux. It is used in two ways:

| use | p | q | sel |
|---|---|---|---|
| product row, bit i of PE[j] | P_j[i] | A_j[i] | b_j |
| reduction row, bit i of PE[j] | A_j[i-1] (0 for i = 0) | t_i | A_j[m-1] |

## Processing elements and the pipeline

One iteration j of the recurrence is one processing element (PE):

* `gf_pe_regular` is PE[0] .. PE[m-2]. It has m product-row cells and m reduction-row cells. Its
  outputs A_{j+1} and P_{j+1} are registered.
* `gf_pe_last` is PE[m-1]. It has only the m product-row cells, because A is not needed after the
  last iteration. Its output C is registered.

There is one register stage per PE. As a result:

* Every path between registers is one U cell deep: one XOR and one mux.
* An operand set reaches PE[j] j clocks after it enters.
* C comes out m clocks after the operands enter.

`gf2m_systolic_mul` chains the PEs:

```
  a,p ──► PE[0] ──► PE[1] ──► ... ──► PE[m-2] ──► PE[m-1] ──► c
  t   ──► [reg] ──► [reg] ──► ... ──►   (T for PE[1]..PE[m-2])
  b[j] ──► j-stage delay ──► PE[j]        (one delay line per bit)
  in_valid ─► [reg] ─► ... ─► out_valid   (m stages)
```

### Operand alignment (this design's own addition)

The array accepts a different A, B and T on every clock. Different operand sets are therefore in
flight in different PEs at the same moment. PE[j] must see the b_j and T of the operand set it is
working on, not those at the inputs. So B and T are delayed in registers to keep pace with A
and P:

* Bit b_j passes through its own j-stage shift register, so it reaches PE[j] together with its
  operand set.
* T moves one stage per clock and is dropped after PE[m-2].

This costs registers. For m = 163 it needs:

| registers | bits |
|---|---|
| A and P between PEs, plus C | 2m^2 - m = 52,975 |
| T alignment | (m-2)m = 26,243 |
| B alignment | m(m-1)/2 = 13,203 |
| valid chain | 163 |

In all that is 92,584 flip-flops at m = 163.

The cost estimate this design follows counts only m^2 one-bit latches for the whole array. No
placement of m^2 bits gives both a one-cell critical path and a new, independent (A, B, T) on
every clock. The RTL keeps the timing: full registers at every PE boundary. If T is fixed for a
whole application, the T chain can be removed and T wired to every PE directly. That change is
not made here.

### Valid and reset (also this design's own)

`in_valid` travels through an m-stage shift register and comes out as `out_valid`. That chain is
the only register with a reset (`rst_n`, asynchronous, active low). The datapath registers are not
reset. Whatever they hold before the first valid set reaches them is flagged by `out_valid = 0`.

## Interface of `gf2m_systolic_mul`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst_n | in | 1 | asynchronous active-low reset of the valid chain |
| in_valid | in | 1 | a, b, t, p hold an operand set this clock |
| a, b | in | M | operands; bit i is the coefficient of x^i |
| t | in | M | T(x) without its x^m term, e.g. 8'h1B for x^8+x^4+x^3+x+1 |
| p | in | M | addend P_0, normally 0 |
| out_valid | out | 1 | c holds a result |
| c | out | M | (p + a*b) mod T |

Parameter: `M` (int unsigned, default 163, at least 2).

**Timing.** An operand set sampled at rising edge k is on `c`, with `out_valid` high, right after
edge k + M - 1. That is M clocks from the cycle in which it was presented. Sets presented on
consecutive clocks come out on consecutive clocks. There is no back-pressure: the array cannot
stall, so the consumer must take every result.

`gf2m_pkg` holds the default degree and the two example polynomials:

* `T_NIST_B163` = 163'hC9
* `T_AES` = 8'h1B

## Where this differs from the published description, and why

* **Reduction select bit.** The reduction row is selected by the top bit of A_j, a_{m-1,j}, as
  the algebra above requires. One description of the cell array labels this select as a_{m-2,j}.
  That reading does not reproduce the published AES example {83}·{57} = {C1} (mod {1B}). The
  a_{m-1,j} reading reproduces it, along with the other six published results.
* **Registers.** Edge-triggered flip-flops replace the latches in the original cost estimate.
  There are more of them than that estimate counts; see "Operand alignment".
* **Added signals.** The alignment registers for B and T, the valid chain and the reset are
  additions. The P_0 input is described as an input of the first PE. Its use as a general addend
  is a consequence of the recurrence, not a stated feature.

## Verification

The testbenches are self-checking. Their reference model (`tb/gf_ref_pkg.sv`) uses a different
method from the hardware: it forms the full carry-less product of degree up to 2m-2, then reduces
it by long division from the top degree down.

| testbench | what it checks |
|---|---|
| `gf_u_cell_tb` | all 8 input combinations against a written-out truth table |
| `gf_pe_regular_tb` | 400 random steps at m = 8 and m = 163; A_{j+1} = A_j·x mod T and P_{j+1}; both reduction cases and both b values occur |
| `gf_pe_last_tb` | 400 random steps at m = 8 and m = 163 |
| `gf2m_systolic_mul_tb` | m = 8. First a stream of seven published operand sets, back to back, with T changing every clock. Their results are c1, 41, f6, 1b, 99, 3a, f9 for (a, b, t) = (83,57,1b), (27,49,43), (24,33,1b), (79,ab,69), (b1,8f,4d), (fc,31,95), (cd,35,98). Then 3000 random clocks with idle cycles, random T and random P. Every result and its latency (exactly M clocks) is checked. The test counts that reduction, back-to-back output, idle cycles, T changes and non-zero P each occurred. |
| `gf2m_systolic_mul_small_tb` | m = 2, 3 and 4, exhaustively. Every (A, B, T) combination is streamed back to back with P = 0. These sizes test the ends of the chain, where there are no T alignment registers (m = 2) or only one (m = 3). The helper `gf2m_mul_exhaustive` drives one instance. |
| `gf2m_systolic_mul_full_tb` | the default m = 163 with no parameter override. Two hand-worked products: x^162·x = x^7+x^6+x^3+1, and 1·1 + x. Then 600 random clocks with the NIST polynomial and some random T, with the same checks and counts. |

Each testbench ends with `TB_RESULT checks=N failures=F`. It has a watchdog that fails the run if
it hangs.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf2m_pkg.sv tb/gf_ref_pkg.sv tb/gf2m_systolic_mul_tb.sv \
    --top-module gf2m_systolic_mul_tb -Mdir obj && obj/Vgf2m_systolic_mul_tb
```

Replace the testbench name to run another testbench. The m = 163 build takes about two minutes
to compile. It then simulates in under a second.

## Not covered

* Nothing checks that T is irreducible. For a reducible T the array still returns
  (P + A·B) mod T, which is not a field product.
* Only m = 2, 3, 4, 8 and 163 were simulated. The other NIST degrees (233, 283, 409, 571) need only
  `M` set; they were not run.
* Area, power and timing figures for ASIC or FPGA are not reproduced; they depend on the
  technology library.
