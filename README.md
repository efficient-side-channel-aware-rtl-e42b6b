# Side-channel aware elliptic curve point multiplier over GF(p)

This processor computes the scalar multiple Q = kP of a point P on an elliptic
curve over a prime field GF(M). The scalar k is the secret. The design guards
against timing and simple power analysis in one way: for a given configuration,
the sequence of operations and the number of clock cycles never depend on k or
on P.

A single datapath runs eight point multiplication configurations. They combine
two curve shapes, two coordinate systems and two scalar algorithms:

| cfg | name        | curve / coordinates        | scalar algorithm                         | cycles, n = 192 |
|-----|-------------|----------------------------|------------------------------------------|-----------------|
| 0   | `CFG_WA_AA`  | Weierstrass, affine        | add-always                               | 290 339 |
| 1   | `CFG_WJ_AA`  | Weierstrass, Jacobian      | add-always                               | 544 554 |
| 2   | `CFG_EA_AAU` | Edwards, affine            | add-always, unified doubling             | 572 387 |
| 3   | `CFG_EA_AAO` | Edwards, affine            | add-always, dedicated doubling           | 533 603 |
| 4   | `CFG_EA_NAF` | Edwards, affine            | secure NAF on unified operations         | 435 592 |
| 5   | `CFG_EP_AAU` | Edwards, projective        | add-always, unified doubling             | 503 272 |
| 6   | `CFG_EP_AAO` | Edwards, projective        | add-always, dedicated doubling           | 407 464 |
| 7   | `CFG_EP_NAF` | Edwards, projective        | secure NAF on unified operations         | 392 145 |

The cycle counts were measured in simulation at the default size, n = 192. They
count from `start` to `done` and do not include the serial transfer. The
published figures for the original design are 0.86 ms for Weierstrass affine
and 1.13 ms for Edwards projective with secure NAF, both at 333 MHz. That is
about 287k and 377k cycles. The Weierstrass configurations and all Edwards
projective configurations come within 5 % of the published figures. The
Edwards affine configurations are about 15 % slower; see "Departures" below.

The curves:

- **Weierstrass:** y² = x³ + ax + b. The constant b is never needed.
- **Edwards:** x² + y² = 1 + d·x²y².

## Block structure

```
 sin_data ──► io_shift_regs ──(Px, Py, M, a|d, R², k)──► pmul_ctl ──► unit select, P1/P2 map, fin_mode
     ▲           │ ▲                                      │  ▲            │
 sout_data ◄─────┘ └──────── result x, y ─────────────────┘  │ own µops   ▼
                                                          │  │   pad_ctl_wa / _wj / _ea / _ep
                                                          ▼  │            │ µops
                                                     µop multiplexer ◄────┘
                                                          │
                                                          ▼
                                        pad_datapath: 16 registers → operand mux → mau → write-back
                                         mau = mod_addsub (rba) + mont_mul (2 × rba) + mod_div
```

| module | role |
|--------|------|
| `ecc_processor` | Top level: wires the blocks together and holds the micro-op multiplexer. |
| `io_shift_regs` | Serial input and output. The input register also stores the operands during a run. |
| `pmul_ctl` | Point multiplication and IO control: load, Montgomery transforms, scalar loop, final inversion, output. |
| `pad_ctl_wa/wj/ea/ep` | One micro-program per point addition and per doubling, for each of the four curve/coordinate systems. |
| `pad_datapath` | The register file, the operand multiplexer and the single arithmetic unit. |
| `mau` | Modular add, subtract, halve, multiply and divide. |
| `mod_addsub`, `rba` | One-cycle modular add/subtract, built on a carry-free signed-digit adder. |
| `mont_mul` | Radix-4 Montgomery multiplier. |
| `mod_div` | Constant-time binary extended-GCD divider. |
| `ecc_pkg` | Operation codes, the register map, the micro-op format and the configuration codes. |

## Using the processor

1. **Send the operands.** Shift in 6n/8 bytes with `sin_valid`, each value most
   significant byte first, in this order:
   - Px and Py: the base point, in affine form
   - M: the prime, odd, below 2ⁿ
   - the curve constant: a for Weierstrass, d for Edwards
   - R² mod M, with R = 2ⁿ⁺²
   - k

   Valid words may have gaps between them. The processor does not compute
   R² mod M; the host supplies it once per prime.
2. **Start the run.** Pulse `start` for one cycle with `cfg` set. `busy` stays
   high while the multiplication runs.
3. **Read the result.** `done` pulses in the first cycle of the output. In that
   cycle and the 2n/8 − 1 cycles after it, `sout_valid` is high and `sout_data`
   carries x and then y, most significant byte first.
   - `inf` marks a Weierstrass result at the point at infinity. The output
     words are then meaningless.
   - `n_add`, `n_dbl`, `n_sub` and `n_expmul` count the point additions,
     doublings, subtractions and inversion multiplications of the last run.
     They are for observation only.

The operands must not change between `start` and `done`.

A prime shorter than n bits can be used at full size: zero-extend every
operand. The run then takes as long as an n-bit run. The full-size testbench
does this with a 160-bit prime.

## Everything is a micro-op

Every modular operation goes through one arithmetic unit (the mau, modular
arithmetic unit). A point addition is therefore just a fixed list of micro-ops.

Each micro-op (`uop_t`) has these fields:
- `op`: ADD, SUB, HALF, MUL or DIV
- `dst`: the destination register
- `a`, `b`: the two source addresses
- `fin`: marks the final copy of a result into the destination point

The register map (`ecc_pkg`):

| address | contents |
|---------|----------|
| R0X..R0Z, R1X..R1Z | the two working points |
| RCA | curve constant |
| RONE | Montgomery one, R mod M |
| RR2 | R² mod M |
| T0..T6 | temporaries |
| KZERO, KONE | constants 0 and 1, not stored |
| P1X..P1Z, P2X..P2Z | virtual points |

The virtual points are what make one set of programs serve every algorithm.
The control units are always written as P1 := P1 + P2 or P1 := 2·P1.
`pmul_ctl` decides on each operation whether P1 and P2 are R0 or R1, using
`p1_sel` and `p2_sel`. With `p2_neg` the datapath reads x of P2 as M − x.
On an Edwards curve, −(x, y) = (−x, y), so the same addition program then
subtracts.

A program builds its result in temporaries. Its last micro-ops copy the result
into P1, with `fin` set. Two things follow from this. P1 and P2 may be the same
register, which is how unified doubling reuses the addition. And the point at
infinity can be handled without a branch:

- The Weierstrass point at infinity has no affine coordinates, so `pmul_ctl`
  tracks it with one flag per point register.
- When an operand is at infinity, the program still runs in full. Only the
  final copies change, through `fin_mode`:
  - **KEEP:** leave P1 alone, because P2 was at infinity.
  - **COPY:** take P2, because P1 was at infinity.
- The Weierstrass addition programs leave x₂ − x₁ (affine) or
  H = X₂Z₁² − X₁Z₂² (Jacobian) in T5. `chk_zero` reports when it is zero. The
  controller then marks the sum as infinity. The input points here are never
  equal, so a zero means P1 = −P2.

The run time is therefore the same in all of these cases.

Each micro-op takes the mau latency plus one cycle of handshake.

| program | micro-ops | of which MUL | of which DIV |
|---------|-----------|--------------|--------------|
| Weierstrass affine, addition | 11 | 2 | 1 |
| Weierstrass affine, doubling | 14 | 3 | 1 |
| Weierstrass Jacobian, addition | 28 | 16 | 0 |
| Weierstrass Jacobian, doubling (any a) | 26 | 10 | 0 |
| Edwards affine, unified addition | 16 | 5 | 2 |
| Edwards affine, doubling | 12 | 3 | 2 |
| Edwards projective, unified addition | 22 | 12 | 0 |
| Edwards projective, doubling | 15 | 7 | 0 |

The programs are generated as case tables indexed by a program counter. Each
control unit's header gives the formulas in the order they are evaluated.

## The scalar algorithms

### Add-always

This is used by all eight configurations except the two NAF ones. It runs from
the least significant bit: for j = 0 … n−1, with b = 1 − k_j:

- R_b := 2·R_b
- R_b := R_b + R_{k_j}

R0 starts as the neutral element (the point at infinity, or (0, 1) on Edwards)
and R1 starts as P. Every bit costs exactly one doubling and one addition, and
both results are used. There are no dummy operations, so a fault injected
into any step changes the result. With "unified doubling" on an Edwards curve,
the doubling is the unified addition with P2 = P1. Then every operation is
literally the same program.

### Secure NAF (Edwards, unified operations only)

The scalar is recoded on the fly, least significant digit first, into
non-adjacent form (NAF). A carry bit and a look at k_{j+1} give each digit:

- A non-zero digit ±1 adds R1 to R0, or subtracts it (`p2_neg`).
- Every digit doubles R1.

Because the NAF has at most one non-zero digit in two, the number of additions
a depends on k. To hide a, the tail of the run does this:

1. R0 := R0 + R1.
2. Repeat ⌊r/2⌋ times, with r = n/2 + 1 − a: {R0 := R0 + R1; R1 := 2·R1}.
3. R0 := R0 − R1.
4. If r is odd, R1 := 2·R1.

Each step of the tail keeps R0 − R1 equal to kP, so none of them is a dummy.
The total is always 3n/2 + 4 unified operations. The recoding runs over n + 1
digits, since the NAF of an n-bit number can be one digit longer. That is also
why r carries the extra +1: it can never go negative.

### Final steps

- **Affine configurations:** each coordinate is multiplied by plain 1, which
  takes it out of Montgomery form.
- **Projective configurations:** Z⁻¹ is computed as Z^(M−2), Fermat's little
  theorem, by left-to-right square-and-multiply. Every bit of M − 2 costs a
  squaring and a multiplication, whatever the bit is. This depends only on the
  public modulus. Then:
  - Edwards: x = X·Z⁻¹
  - Jacobian: x = X·Z⁻², y = Y·Z⁻³

## Arithmetic

Values are kept as Montgomery residues v·R mod M, with R = 2ⁿ⁺². Start-up
converts them in:
- RONE := R² · 1 (a Montgomery product), which gives R mod M.
- P and the curve constant are multiplied by R².

| op | unit | result | cycles |
|----|------|--------|--------|
| ADD, SUB | `mod_addsub` | x ± y mod M | 1 |
| HALF | `mod_addsub` | x / 2 mod M | 1 |
| MUL | `mont_mul` | x·y·R⁻¹ mod M | n/2 + 2 |
| DIV | `mod_div`, then `mont_mul` by R² | (x/y)·R mod M | 2n + 4 + n/2 + 2 = 5n/2 + 6 |

These latencies are the ones the original design gives, and the testbenches
check them cycle by cycle.

**`rba`** adds two radix-2 signed-digit (SD2) numbers. Each digit is a bit pair
(h, l) with value h − l. Each digit position is a cell of two full adders, and
a carry moves at most one position. So the delay is two full adders for any
width. The carries out of the top cell form an extra digit, so the sum is
exact. `mod_addsub` feeds it x as the positive part and y either as the
positive part (add) or the negative part (subtract). The redundant sum is then
converted to binary and brought into [0, M) by adding or subtracting M.

**`mont_mul`** consumes the multiplier two bits at a time. It keeps its
partial result in SD2 form, so each iteration is two carry-free additions:
1. Booth recoding turns each pair into a digit a ∈ {−2, …, 2}. The first rba
   adds a·X.
2. The second rba adds q·M. The unit chooses q from the two low digits so
   that the sum becomes divisible by 4.
3. It drops the two low digits. Their value is then zero.

Each addition adds one digit and the shift removes two, so the partial result
stays n + 4 digits wide. n/2 + 1 iterations cover every digit, which is where
R = 2ⁿ⁺² comes from. The last iteration also converts the result to binary,
with one subtraction H − L, and corrects it into [0, M).

**`mod_div`** is a binary extended GCD that always runs 2n + 3 iterations.
It starts from A = Y, B = M, U = X, V = 0 and a length counter d = 0:

- If A is even: A := A/2, U := U/2 mod M, d := d − 1.
- If A is odd: first, when d < 0, swap (A, U) with (B, V) and negate d.
  Then A := (A + kB)/4 and U := (U + kV)/4 mod M, with k = +1 or −1 chosen so
  that A + kB is a multiple of 4. Then d := d − 1.

d tracks the difference in bit length between A and B, so no comparison of
the two is needed. B ends at +1 or −1, and V at ±X/Y; the last cycle fixes
the sign. Once A is 0, every remaining iteration changes nothing, so the run
time is constant.

## Departures from the original design

- **Binary operands between the units.** In the original, the multiplier,
  divider and adder keep operands in SD2 form in the range (−2M, 2M), and all
  three share three redundant adder stages.
  - Here the adder and the multiplier add with the redundant rba. The
    multiplier keeps its partial result redundant across iterations.
  - Every unit takes and returns binary values fully reduced to [0, M). The
    conversion and correction sit at the end of the add/subtract cycle and of
    the last multiplier iteration. These paths, and the whole divider, use
    carry-propagating adders, and they set the clock period of this RTL.
  - The latencies and the operation sequence are the same as in the original.
  - The three units are separate instances with no adder sharing.
- **Divider loop count.** The original stops the divider on a register
  holding the remaining length. Here a fixed counter of 2n + 3 iterations does
  this, which gives the same cycle count.
- **Infinity check.** The original compares only n/4 bits to detect a sum at
  infinity. Here the whole T5 register is compared with zero.
- **One arithmetic unit everywhere.** Every configuration uses the full mau,
  including the projective ones that never divide. The processor version of
  the original makes the same choice.
- **Register file.** It has 16 registers, with 7 temporaries. The micro-op
  schedules are this design's own, derived from the published operation
  orders. The op counts are close to, but not exactly, the published ones. The
  Edwards affine programs use two divisions per operation and run about 15 %
  longer than the published timings.
- **Secure NAF length.** It runs over n + 1 digits with 3n/2 + 4 operations,
  where the original's listing uses n digits and n/2 − a extra steps.
- **Montgomery form for Edwards projective.** Edwards projective points are
  also kept in Montgomery form. This changes nothing visible.
- **Added features.** The 8-bit serial word, the operand order, the `cfg`
  input, the counters, the HALF operation and the virtual-point / `fin_mode`
  mechanism are all additions of this design.
- **Not covered.** The standard-cell and current-mode-logic chip layouts of
  the original are physical realizations of the same logic. They are not part
  of this RTL.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=… failures=…`, and each has a watchdog. Reference values come
from `tb/ecc_ref_pkg.sv`, which implements plain modular and affine curve
arithmetic on 256-bit vectors.

| testbench | what it shows |
|-----------|---------------|
| `tb_rba` | Exact SD2 sums at 192 and 8 digits, over many digit statistics. |
| `tb_mod_addsub`, `tb_mont_mul`, `tb_mod_div`, `tb_mau` | Results at n = 192 with the P-192 prime and random odd moduli. Latency checked for every operation. |
| `tb_pad_datapath` | Random micro-ops with all address kinds and P1/P2 mappings. Negation and `fin_mode`. The whole register file is compared after each micro-op. |
| `tb_pad_ctl_*` | Point addition, doubling and (Edwards) subtraction against affine formulas, with random Z. Constant cycle count. |
| `tb_pmul_ctl` | All eight configurations without the serial port. Results, infinity, operation counts, constant run time per configuration. |
| `tb_ecc_processor` | End to end through the serial port at n = 32. Counts each mechanism (every configuration, subtraction, result at infinity, final exponentiation) and fails if one never occurs. |
| `tb_ecc_processor_full` | Default parameters (n = 192), all eight configurations, plus two runs with a 160-bit prime. About 15 s of simulation. |

To run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv rtl/*.sv tb/tb_ecc_processor.sv \
  --top-module tb_ecc_processor -o sim && ./obj_dir/sim
```

Verilator prints a harmless warning because `ecc_pkg.sv` appears twice in that
command; list the remaining `rtl/` files explicitly to avoid it.

The parameters:
- `N` is the field size, 192 by default. It must be even and a multiple of
  `IO_W`.
- `IO_W` is the serial word width, 8 by default.

The testbenches cover random points and scalars. No formal proof of constant
time is given: the constant run time is checked by simulation, by comparing
cycle counts across runs.
