# Cellular AB² multiplier and pipelined exponentiator for GF(2^m) with an all-one polynomial

This RTL computes `c = a·b²` and `βᴺ` in the binary field GF(2^m). The field is
defined by the all-one polynomial (AOP) `p(x) = 1 + x + x² + … + x^m`. That polynomial is
irreducible for some m. In each such case m+1 is prime, and x^(m+1) = 1 in the field.

The main idea is to compute in the slightly larger ring GF(2)[x]/(x^(m+1)+1), not
modulo p(x). In that ring, multiplying by a power of x is just a cyclic rotation of the
m+1 coefficients. So the product needs no reduction logic and no precomputed constants.
The result is brought back into the field only once, at the end, with one row of XORs.

The multiplier is a square array of identical two-gate cells. The exponentiator is a chain
of these multipliers, one per exponent bit. The default configuration is GF(2^4),
`p(x) = 1+x+x²+x³+x⁴`. Any m for which the AOP is irreducible works, for example
2, 4, 10, 12, 18, 28, 36 or 52.

## Arithmetic used by the hardware

**Extended representation.** A field element `a = a₀ + a₁x + … + a_{m-1}x^{m-1}` is held as
m+1 coefficients `A = (A₀ … A_m)`, with `A_m = 0` on entry. Every operation works modulo
x^(m+1)+1, and this ring maps onto the field:

* `A·x^k` is A rotated right by k places, and `A·x^(-k)` is A rotated left by k places.
* Squaring is a fixed permutation, since x^k maps to x^(2k mod (m+1)). So `C_i = A_{i/2}` for
  even i and `C_i = A_{(i+m+1)/2}` for odd i. For m = 4 the result is (A₀, A₃, A₁, A₄, A₂).
* Reduction to the field: since x^m ≡ 1 + x + … + x^{m-1} mod p(x), the top coefficient
  folds into every lower one: `c_i = C_i ⊕ C_m`.

**AB² as a circular convolution.** Write B² = Σ B_k x^{2k}. Then `A·B²` splits into m+1
"inner products" `S^(i)`, i = 0 … m. Each one pairs, position by position, A rotated left by
2i with B² rotated right by i:

    S^(i) = Σ_j  A_<j+2i> · B_<j-i> · x^(3j)          (<k> = k mod (m+1))
    C     = S^(0) + S^(1) + … + S^(m)

In every inner product, the term at position j carries the weight x^(3j). Since 3 is a unit
mod m+1, position j always lands on the same coefficient, C_<3j>. That makes the
accumulation regular: each column of an array adds up one output coefficient.

## The cellular multiplication unit (`mult_unit`)

This is the part that takes the most care to follow. The array has m+1 rows of m+1
inner-product cells (`ip_cell`), plus one bottom row of m+1 summation cells (`sum_cell`).

* A and B enter at the top of the array, one coefficient per column.
* Between rows, B moves one column to the right, and A moves two columns to the left. Both
  wrap around. So row i, column j, sees `A_<j+2i>` and `B_<j-i>`.
* Each cell ANDs its A and B bits. This gives the partial product of row i. The cell's XOR
  adds the partial product from the row above into the running column sum. The first row's
  sum and partial-product inputs are 0.
* The summation row adds the last row's partial products. Column j then holds
  `Σ_i A_<j+2i>·B_<j-i> = C_<3j>`.
* The output wiring puts the columns back into natural coefficient order.

For m = 4, the columns deliver C₀, C₃, C₁, C₄, C₂:

| column j | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| coefficient | C₀ | C₃ | C₁ | C₄ | C₂ |
| row 0 product | A₀B₀ | A₁B₁ | A₂B₂ | A₃B₃ | A₄B₄ |
| row 1 product | A₂B₄ | A₃B₀ | A₄B₁ | A₀B₂ | A₁B₃ |

The unit is purely combinational. Its cost is (m+1)² two-input ANDs and (m+1)² + (m+1)
two-input XORs. In the first row, the XORs add constant zeros, and synthesis removes them.
The longest path is one AND plus m+1 XORs.

`mult_unit` is a correct ring multiplier for any M. It is a field multiplier only when the
AOP of degree M is irreducible.

## The AB² multiplier (`ab2_multiplier`)

`ab2_multiplier` extends the inputs a and b with a zero top bit and runs `mult_unit`. Then
`modp_unit` (m summation cells) forms `c_i = C_i ⊕ C_m`. Ports are in canonical-basis
bit order: `c[i]` is the coefficient of x^i.

The path is combinational. Its delay is one AND plus m+2 XORs, so m+3 gate delays.

## Exponentiation pipeline (`exp_pipeline`)

The exponent is `N = n₀ + 2n₁ + … + 2^{m-1}n_{m-1}`. βᴺ is computed from the top bit down:

    F = (n_{m-1} ? β : 1)
    for i = m-2 downto 0:   F = E·F²,  with E = (n_i ? β : 1)
    result = F mod p(x)

Each step is exactly one AB² product, with F on the squared input. The pipeline is built as
follows:

* `elem_mux` forms the initial F from n_{m-1}.
* m-1 `exp_stage` instances follow. Each holds an `elem_mux` for E, a `mult_unit`, and a
  register of m+1 flip-flops for F. A second register carries β alongside F, so each stage
  selects from the β of its own operation.
* F stays in extended form from stage to stage. A single `modp_unit` follows the last
  register.
* Stage k (k = 0 … m-2) uses bit n_{m-2-k}. That stage is reached k cycles after the
  operation enters. So the bit passes through a k-cycle `bit_delay` shift register. For
  GF(2^4), n₁ is delayed 1 cycle and n₀ 2 cycles.

**Timing.** One operation can enter per clock. Its result appears on `result`, with
`out_valid` set, exactly **M-1 clock cycles** after the edge that took it in (3 cycles for
GF(2^4)). `result` is a combinational function of the last pipeline register.

Each clock period must cover one AND, m+1 XORs and a 2:1 multiplexer. The first stage also
includes the initial multiplexer.

**Reset and flow control.** `rst_n` is synchronous and active low. It clears the valid bits
and the exponent-bit delay lines, so operations in flight are dropped. The data registers
are not reset; they are meaningful only while their valid bit is 1. There is no
back-pressure: results must be taken when `out_valid` is high.

## Top level (`aop_exp_top`)

The top places three units side by side. They share only the parameter `M`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (rising edge); synchronous active-low reset of the exponentiator |
| `mul_a`, `mul_b` | in | M | operands of the combinational AB² multiplier |
| `mul_c` | out | M | `mul_a · mul_b²` |
| `exp_in_valid` | in | 1 | start an exponentiation this cycle |
| `exp_beta`, `exp_n` | in | M | base β and exponent N |
| `exp_out_valid` | out | 1 | `exp_result` is valid, M-1 cycles after `exp_in_valid` |
| `exp_result` | out | M | βᴺ |
| `sq_a` | in | M+1 | extended element for the parallel squarer |
| `sq_c` | out | M+1 | `sq_a²` mod x^(M+1)+1; pure wiring, no gates |

All field values are bit vectors in which bit i is the coefficient of x^i.

## Files

| file | content |
|---|---|
| `rtl/aop_pkg.sv` | default M and the index functions used by the array wiring (`mod_m1`, `col_coeff`) |
| `rtl/ip_cell.sv` | inner-product cell: one AND, one XOR, A and B passed on |
| `rtl/sum_cell.sv` | summation cell: one XOR |
| `rtl/mult_unit.sv` | (m+1)×(m+1) cellular array plus summation row, C = A·B² mod x^(m+1)+1 |
| `rtl/modp_unit.sv` | reduction modulo the AOP |
| `rtl/ab2_multiplier.sv` | combinational c = a·b² in GF(2^m) |
| `rtl/aop_square.sv` | parallel squarer (coefficient permutation) |
| `rtl/elem_mux.sv` | E = n_i ? β : 1 |
| `rtl/bit_delay.sv` | DEPTH-cycle delay line for one exponent bit |
| `rtl/exp_stage.sv` | one registered stage F ← E·F² |
| `rtl/exp_pipeline.sv` | m-1 stages, delay lines and final reduction |
| `rtl/aop_exp_top.sv` | top level |
| `tb/gf_ref_pkg.sv` | reference arithmetic for the testbenches (schoolbook products, repeated multiplication) |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench checks its module against `gf_ref_pkg`. That package uses plain schoolbook
polynomial products, reduction by long division, and βᴺ by N repeated multiplications. It
shares nothing with the cellular method. Each testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a cycle or time watchdog.

* GF(2^4) is tested exhaustively:
  * `mult_unit`: all 1024 pairs of 5-bit extended operands, including nonzero top bits.
    The running column sum leaving every row is checked as well.
  * `ab2_multiplier`: all 256 pairs.
  * `aop_square` and `modp_unit`: all 32 inputs.
  * `exp_pipeline`: all 256 (β, N) pairs.
* GF(2^10), GF(2^12) and GF(2^28) get random tests. They show that the generic wiring
  holds beyond m = 4. For GF(2^28) the exponentiation reference is least-significant-bit-first
  binary exponentiation, because N repeated multiplications would take too long.
* The pipeline tests check that every result arrives exactly M-1 cycles after it was issued
  (3 cycles for m = 4, 9 for m = 10, 27 for m = 28). They also check that no result arrives unrequested.
* `aop_exp_top_tb` runs the top at its default parameters. It also counts these mechanisms
  and fails if any never happens:
  * each exponent bit taken both as 1 and as 0;
  * back-to-back issue;
  * idle cycles;
  * a full pipeline;
  * a reset that flushes operations in flight.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb --top-module aop_exp_top_tb \
        rtl/aop_pkg.sv tb/gf_ref_pkg.sv tb/aop_exp_top_tb.sv
    ./obj_dir/Vaop_exp_top_tb

Use any other `*_tb` the same way. Verilator finds the remaining modules in `rtl/` through
`-Irtl`, from their file names. To lint the design: `verilator --lint-only -Wall -Irtl
rtl/aop_pkg.sv rtl/aop_exp_top.sv`.

To change the field size, set `M` on `aop_exp_top`. The testbench reference functions
handle m ≤ 31. `gf_pow` multiplies N times, so use it only for small m; `gf_pow_r2l`
serves larger fields.

## Interpretations and departures from the published architecture

* **The multiplier is combinational.** The source gives its speed only in gate delays and
  names no clock for it. Its cells' "temporary storage" of partial products is implemented
  as wires.
* **Where the pipeline registers sit.** The exponentiator is a clocked pipeline. There is a
  register of m+1 flip-flops after every stage, which gives a latency of m-1 cycles. The
  delay elements on the exponent bits are described as propagation-time delays; here they
  are shift registers, one cycle per stage.
* **Valid signals and reset.** `in_valid`/`out_valid`, the reset behaviour and the β register
  in each stage are this design's own additions. In the published drawing, a stage's
  multiplexer is fed from the previous multiplier's A output. That output would carry E (β or
  1), not β. Carrying β explicitly keeps every multiplexer choosing between β and 1, as the
  algorithm requires.
* **Exponent bit labels.** For GF(2^4), the exponent bits of the two first multiplexers are
  taken as n₃ and n₂, as the algorithm states. The published drawing labels them n₄ and n₃,
  which does not fit a 4-bit exponent.
* **Reduction in the exponentiator.** Intermediate results stay in extended form, and the
  reduction modulo p(x) happens once, after the last stage, as in the algorithm. This works
  because the ring maps onto the field.
* **Cell counts and output order.** This design has m+1 summation cells in the array and m
  in the reduction unit, 2m+1 in total, as in the published array drawing. Inside the array,
  the columns follow the order C₀, C₃, C₁, C₄, C₂; every port of this design is in natural
  coefficient order, so the output permutation is only wiring.
* **Array inputs not brought out.** The array's top-row sum and partial-product inputs are
  tied to zero. They are not ports, so the array cannot compute AB² + C.
* **M is checked at elaboration.** `ab2_multiplier` and `exp_pipeline` refuse, with an
  elaboration error, an M for which the AOP is not irreducible. That is the case unless m+1
  is prime and 2 has order m modulo m+1. This check is an addition of this design.
