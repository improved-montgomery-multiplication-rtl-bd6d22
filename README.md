# Rescheduled Montgomery Multiplier (RMM)

This RTL computes a Montgomery modular product,

    P = A * B * R^-1 mod M,   R = 2^n,

for n-bit operands, typically n = 256, as used in elliptic-curve and RSA
arithmetic. It splits each operand into k digits of d bits and does all of its
multiplying on m small d x d multipliers that run in parallel.

Serial Montgomery multipliers reduce as they go: they fold a reduction step into
every digit or bit of the multiplication. This design does not. It first
finishes the whole product, then performs one reduction on it. That makes the
work a fixed list of independent digit products. A static schedule packs that
list onto the m multipliers, so that few multiplier slots go unused. The
default build is RMM(4,4): k = 4 digits of d = 64 bits (n = 256) and m = 4
multipliers. It returns a result 13 clock cycles after `start`.

## The arithmetic

The low and high n bits of a 2n-bit value X are written X0 and X1. M' is the
constant -M^-1 mod R. The multiplier computes four things:

| step | value | digit products |
|------|-------|----------------|
| T | A * B (2n bits) | k^2 |
| Q | T0 * M' mod R (n bits) | (k^2 + k)/2: only pairs with i + j < k reach the low n bits |
| U | Q * M (2n bits) | k^2 |
| P | T1 + U1 + (T0 != 0), then minus M if P >= M | none |

The last row needs explaining. By construction T + U is a multiple of R. So
the low halves T0 + U0 add up to either 0 or exactly R. They give 0 only when
T0 = 0. The carry from the low half into the high half is therefore just the
test "T0 is not zero". The low halves never have to be added. If A, B < M < R,
then P < 2M, and one conditional subtraction is enough.

Because Q is needed only mod R, its product skips the upper triangle of digit
pairs. That saves k(k-1)/2 multiplications.

## The schedule

`rmm_sched` holds the schedule as a table that is computed when the design is
elaborated. On each cycle it gives every multiplier lane a *slot*, which is
either idle or a product family (T, Q or U) plus a digit pair (i, j). The rules
are:

1. **Column order.** Within each family, products are issued by increasing
   column i + j, and by increasing i within a column. Products issued together
   therefore land in neighbouring columns, and the low digits of each sum are
   final early.
2. **Dependencies.** Q reads T0, and U reads Q. The Q products start on a new
   cycle after the last T product of columns 0..k-1. The U products start on a
   new cycle after the last Q product.
3. **Deferral of T1 work.** T products in columns k..2k-2 feed only T1, and
   nothing reads T1 until the final sum. They go into idle multiplier slots:
   - first the free slots of the last T0 cycle;
   - then the free slots of the last Q cycle;
   - then the free slots of the last U cycle.

   Any that are left over run right after the T0 products.

The schedule length is therefore at most ceil(k^2/m) + ceil((k^2+k)/2/m) +
ceil(k^2/m) cycles, and deferral often makes it shorter. For k = 2 the
generated tables are the published RMM(2,1) and RMM(2,2) schedules, slot for
slot:

    RMM(2,1): T00|T01|T10|T11|Q00|Q01|Q10|U00|U01|U10|U11|          11 cycles
    RMM(2,2): T00 T01|T10 T11|Q00 Q01|Q10 --|U00 U01|U10 U11|       6 cycles
    RMM(4,4): T00 T01 T10 T02|T11 T20 T03 T12|T21 T30 T13 T22|T31 T23 -- --|
              Q00 Q01 Q10 Q02|Q11 Q20 Q03 Q12|Q21 Q30 T32 T33|
              U00 U01 U10 U02|U11 U20 U03 U12|U21 U30 U13 U22|U31 U23 U32 U33|   11 cycles

(`Xij` means X-family product of digit i of the first operand and digit j of
the second; `--` is an idle lane.)

The rule for k > 2 is this implementation's reading of "defer the T1 products
opportunistically". Schedule lengths for the 256-bit builds:

| k, d | m | schedule cycles | without deferral |
|------|---|-----------------|------------------|
| 2, 128 | 1 / 2 | 11 / 6 | 11 / 6 |
| 3, 86 | 3 | 8 | 8 |
| 4, 64 | 2 / 3 / **4** / 5 | 21 / 14 / **11** / 9 | 21 / 16 / 11 / 10 |
| 5, 52 | 5 | 13 | 13 |
| 6, 43 | 9 | 11 | 11 |
| 7, 37 | 10 | 13 | 13 |
| 8, 32 | 13 | 13 | 13 |

For k = 3, 5, 6 and 7 the operands are slightly wider than 256 bits (k*d).

## Datapath and timing

```
           +-----------+  slots[m]   +-----------+  prod, offset  +-----------+
 start --> | rmm_sched | ----------> | rmm_lane  | -------------> | rmm_accum | T (2k digits)
           +-----------+             |  x m      |                | rmm_accum | Q (k digits)
                                     | (mux+mul) |                | rmm_accum | U (2k digits)
           operand regs A,B,M,M' --> +-----------+ <-- T0, Q -----+-----------+
                                                                        |
                                                     rmm_final: T1+U1+(T0!=0), -M
                                                                        |
                                                                     p register
```

- **`rmm_lane`** picks the operand digits for its slot: A[i] and B[j] for T,
  T0[i] and M'[j] for Q, or Q[i] and M[j] for U. It multiplies them in a
  combinational `rmm_digit_mul`. It also outputs the product's digit offset,
  i + j.
- **`rmm_accum`** (three instances) adds the products of its own family to its
  register in the same cycle, each shifted by its offset times d bits. The Q
  accumulator is k digits wide, so it wraps mod R on its own.
- **Cycle timing.** A product issued in cycle c is part of the sum from cycle
  c+1. This matches the published schedules, where T0 can be read one cycle
  after its last product.
- **`rmm_final`** forms P combinationally. The top registers P in the cycle
  after the schedule ends.

Interface of `rmm_top`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | latches `a`, `b`, `modulus`, `m_prime` and starts; ignored while `busy` |
| `a`, `b` | in | K*D | operands, each below M |
| `modulus` | in | K*D | M: odd and below 2^(K*D) |
| `m_prime` | in | K*D | -M^-1 mod 2^(K*D), computed by the caller |
| `busy` | out | 1 | high from the cycle after `start` until `done` |
| `done` | out | 1 | one-cycle pulse; `p` is valid from then until the next result |
| `p` | out | K*D | A*B*R^-1 mod M, fully reduced |

The latency from the `start` edge to `done` is the schedule length plus 2
cycles (13 for the default build). The inputs may change after the `start`
cycle. The multiplier does not check its preconditions: M must be odd, A, B < M,
and M' must be correct.

Parameters: `K` (digits, default 4), `D` (bits per digit, default 64), and
`NMUL` (multipliers, default 4). Digit indices are 8 bits, so K is at most 256.

## How far to trust it, and where it departs

Verified in simulation (Verilator):

- Random and corner-case products, including A = 0, A = B = 1 and
  A = B = M - 1, are checked against an independent condition: P < M and
  P*R = A*B (mod M). This was done at the default size and for ten builds,
  from (2,1) to (8,13).
- Exact latency in every build.
- The schedule contents, checked for completeness and ordering.
- Each sub-block on its own.

Choices made here that the published description does not fix:

- Deferral rule for k > 2: see above.
- The accumulators are plain full-width binary adders. Column-ordered issue
  keeps the products of one cycle close together, but the adder is not built to
  limit carry propagation.
- The correction subtracts when P >= M, not when P > M, so that P = M becomes 0.
- The digit multiplier is a single combinational `*` with no internal
  pipelining, and each product is accumulated in the same cycle. A
  timing-driven build would probably register the products. That adds one
  cycle of latency and requires the Q and U groups to wait one cycle longer.
- The handshake, the reset style, the operand latching and the 8-bit digit
  indices are all this design's own choices.
- The caller supplies M'. There is no block that computes it.

Not included: the serial digit-digit, bit-word and bit-digit Montgomery
multipliers that the RMM is usually compared against.

## Files and simulation

`rtl/`: `rmm_pkg` (slot type), `rmm_digit_mul`, `rmm_lane`, `rmm_accum`,
`rmm_final`, `rmm_sched`, `rmm_top`.

`tb/` holds these self-checking benches. Each prints
`TB_RESULT checks=N failures=F`.

| bench | what it tests |
|-------|---------------|
| `tb_rmm_top` | 24 products at the default size; also counts deferrals, idle slots, both values of the low-half carry, and both correction outcomes |
| `tb_rmm_builds` | the ten published builds listed above |
| `tb_rmm_sched` | the schedules, including the two published k = 2 tables |
| `tb_rmm_lane`, `tb_rmm_accum`, `tb_rmm_final`, `tb_rmm_digit_mul` | the sub-blocks |

The shared stimulus and checker modules are `rmm_driver` and
`rmm_sched_checker`.

Example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rmm_pkg.sv tb/tb_rmm_top.sv --top-module tb_rmm_top
    ./obj_dir/Vtb_rmm_top

To change the build, set `K`, `D` and `NMUL` on `rmm_top`. The schedule is
regenerated automatically. The expected latency in a testbench is the
schedule length, from the formula in `tb_rmm_builds`, plus 2.
