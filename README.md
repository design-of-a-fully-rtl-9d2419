# Balanced elliptic-curve scalar multiplier with complete addition formulas

This is a small-area ASIC coprocessor that computes `m*P`. Here `P` is a point on a
short Weierstrass curve `y^2 = x^3 + b` (a = 0, e.g. secp256k1 or secp160k1)
and `m` is a K-bit scalar.

The design is built so that the work done does not depend on the key:

* **One formula for everything.** Every point operation uses the same complete
  projective addition formula (Renes–Costello–Batina, a = 0 variant). Doubling
  is just adding a point to itself, and the point at infinity `O = (0:1:0)` is
  an ordinary input. There are no special cases and no branches on data.
* **A Montgomery ladder over all K bits.** Each bit of the scalar costs exactly
  one addition and one doubling. There are no dummy operations.
* **Optional random order.** A random bit per scalar bit can decide whether the
  addition or the doubling runs first. This is a countermeasure against
  differential power analysis.
* **Fixed-time arithmetic.** All modular arithmetic runs on one Montgomery
  multiplier that has no final subtraction. It also does the modular additions
  and subtractions. Every operation therefore takes a fixed time.

A point multiplication always takes the same number of clock cycles: 2,310,913
cycles for K = 256 (23.1 ms at 100 MHz).

The architecture follows N. Pirotte's master's thesis "Design of a fully
balanced ASIC coprocessor implementing complete addition formulas on
Weierstrass elliptic curves". The departures from it are listed at the end.

## Block structure

```
point_mul                    Montgomery ladder, R0/R1 (+T0/T1) registers
 └─ point_adder              one complete point addition, 36 ALU steps
     ├─ pa_fsm               program counter + instruction register
     ├─ pa_regfile           11 registers, 3-bit LO/RO/write addresses
     └─ mmalu                full-word Montgomery ALU       (SCALABLE = 0)
        or mmalu_scalable    bit-serial Montgomery ALU      (SCALABLE = 1)
ecc_pkg                      opcodes, address enums, the point-addition program
```

Every module is in `rtl/<name>.sv`. Each file starts with a comment that
describes its interface and cycle timing.

## The Montgomery ALU (`mmalu`, `mmalu_scalable`)

### Operations and bounds

The ALU has two K+2-bit operands, `a` and `b`, and one K+2-bit result `s`.
The inputs `cmd` and `sub` select the operation:

| cmd sub | operation | input bound | output bound |
|---|---|---|---|
| 0 0 | `a*b*R^-1 mod p` (Montgomery product) | a, b < 4p | s < 2p |
| 0 1 | `a*R^-1 mod p` (scale, b treated as 1) | a < 4p | s <= p |
| 1 0 | `a + b` | a, b < 2p | s < 4p |
| 1 1 | `a - b + 2p` | a, b < 2p, a - b > -2p | s < 4p |

Here `R = 2^(K+4)`. Because `R > 16p`, a product of two values below 4p always
comes out below 2p. That is what makes the final conditional subtraction of
classic Montgomery multiplication unnecessary.

Results are never fully reduced inside a point addition. The sums, differences
and products carry these redundant bounds, and the program below is ordered so
that every operation stays within its input bound.

The three scale operations at the end map the result back out of the
Montgomery domain. Their outputs are at most p. An output can equal p, which
represents 0.

### Why the inputs need no conversion

The point coordinates are never converted into the Montgomery domain.

* Each monomial of the addition formulas has the same number of
  multiplications. Every coordinate of the result therefore carries the same
  spurious factor.
* In projective coordinates a common factor does not change the point.
* The constant `3b` must carry the factor R. For this reason parameter `B3` is
  `3b*R mod p`. For secp256k1 that is `21*2^260 mod p = 0x15000050250`.
* The final scaling by R^-1 leaves the result as a valid projective
  representation of m*P. Its coordinates are at most p.

### Full-word datapath (`mmalu`)

This is radix-2 Montgomery multiplication, one bit of `a` per clock:

```
q_i = s_0 xor (a_i and b_0)        // p odd, so -p^-1 mod 2 = 1
S   = (S + a_i*B + q_i*p) >> 1     // two (K+4)-bit ripple-carry adders
```

The loop runs K+4 iterations. Addition and subtraction reuse the same two
adders:

* the first adder computes `A + sub*2p`;
* the second adds `B xor sub` with a carry-in of `sub`.

This gives `A - B + 2p` in two's complement.

**Latency** from `en` to `done`:

* K+5 cycles for a product or scale;
* 2 cycles for an add or subtract.

### Bit-serial datapath (`mmalu_scalable`)

This is the multiple-word algorithm (MWR2MM) with a word size of one bit. It is
much smaller and much slower than the full-word datapath.

* **Inner loop.** The inner loop walks over the K+3 bits of S, B and p. It uses
  two one-bit full adders with a 2-bit carry register.
* **Register rotation.** The B and S registers rotate.
* **Shift cycle.** After each outer iteration, one extra cycle:
  * drops the zero LSB of S;
  * inserts the last carry at the top;
  * shifts A;
  * latches the next `q` in a flip-flop.
* **Subtraction.** A subtraction starts with S = 2p and a carry of 1.
* **Latency:**
  * `(K+4)^2 + 1` cycles for a product or scale;
  * `K+4` cycles for an add or subtract.

Both ALUs have the same ports. `point_adder` instantiates one or the other,
chosen by the `SCALABLE` parameter.

## The point adder (`point_adder`, `pa_fsm`, `pa_regfile`)

### The program

A point addition `(X3:Y3:Z3) = (X1:Y1:Z1) + (X2:Y2:Z2)` is a fixed program of
36 ALU instructions:

* 14 Montgomery products;
* 14 additions;
* 5 subtractions;
* 3 final scalings.

The program is the function `ecc_pkg::pa_program`. Each line has a comment with
its register transfer.

It evaluates the complete a = 0 formulas:

```
X3 = (X1Y2 + X2Y1)(Y1Y2 - 3b Z1Z2) - 3b(Y1Z2 + Y2Z1)(X1Z2 + X2Z1)
Y3 = (Y1Y2 + 3b Z1Z2)(Y1Y2 - 3b Z1Z2) + 9b X1X2 (X1Z2 + X2Z1)
Z3 = (Y1Z2 + Y2Z1)(Y1Y2 + 3b Z1Z2) + 3 X1X2 (X1Y2 + X2Y1)
```

The cross terms are formed Karatsuba-style. For example,
`X1Y2 + X2Y1 = (X1+Y1)(X2+Y2) - X1X2 - Y1Y2`. This is why only 14 products
are needed.

### Instruction format and register file

Each instruction is `{opcode[1:0], LO[2:0], RO[2:0], WA[2:0]}`:

* `opcode` is `{cmd, sub}`;
* `LO` and `RO` are the left and right operand addresses;
* `WA` is the write address.

The register file has eleven K+2-bit registers:

* the input points X1, Y1, Z1, X2, Y2, Z2;
* five temporaries, t0 to t4.

X1, Y1 and Z1 are reused as the output point.

Three-bit addresses reach only 8 of the registers per port. The addressable
sets were chosen so that every step of the program fits:

| address | LO | RO | WA |
|---|---|---|---|
| 0 | X1 | X1 | X1 |
| 1 | Y1 | Y1 | Y1 |
| 2 | Z1 | Y2 | Z1 |
| 3 | X2 | Z2 | Y2 |
| 4 | Y2 | t0 | t1 (*) |
| 5 | t0 | t1 | t2 |
| 6 | t2 | t4 | t3 |
| 7 | t3 | constant B3 | t4 |

(*) t0 cannot be written directly. Every write to t1 first moves the old t1
into t0, so t0/t1 act as a two-entry shift register. X2 and Z2 are never
written. These restrictions keep the write-enable logic and the input
multiplexers small.

`load` copies both input points and clears the temporaries.

### Sequencing

`pa_fsm` runs each instruction in three parts:

1. one issue cycle, which pulses the ALU's `en`;
2. the ALU run;
3. the write, in the cycle where the ALU signals `done`.

A full-word point addition therefore takes

    17*(K+6) + 19*3 + 1 cycles   (4,512 for K = 256; 2,880 for K = 160)

Here 17 is the number of products and scalings, and 19 the number of
additions and subtractions. This is the same for every input, including
doubling and O.

## The Montgomery ladder (`point_mul`)

The ladder starts from `R0 = O = (0:1:0)`, `R1 = P`. For every bit `m_i`, from
bit K-1 down to bit 0, it computes

    R_(1-m_i) <- R0 + R1,     R_(m_i) <- 2*R_(m_i)

### Why it starts from O

Starting from O, and not from P, means the scalar does not need a leading
one. The complete formulas accept O as an input, so no special case is needed.
The loop always runs K iterations, so a short scalar takes no less time.

### Random order

With `RANDOMIZE = 1`, bit `rnd[i]` chooses the order for bit i:

* 0: the addition first;
* 1: the doubling first.

Both results go to temporaries T0/T1. One copy cycle then moves them to R0/R1.

With `RANDOMIZE = 0`, the addition is always first and results are written
straight back to R0/R1.

### Handshake and result

Each point operation has:

* a launch cycle, which loads the two operands into the point adder;
* the point addition itself;
* a store cycle.

`start` latches `m`, `rnd` and `pt_in`. `done` pulses when `pt_out` holds
`R0 = m*P` in projective form. The affine result is `x = X/Z`, `y = Y/Z`. The
inversion is left to the host.

### Cycle counts

    RANDOMIZE = 1:  K*(2*(PA+1)+1) + 1        RANDOMIZE = 0:  K*2*(PA+1) + 1

where PA is the point-addition latency above. With the bit-serial ALU, PA is
`17*((K+4)^2+2) + 19*(K+5) + 1`.

| configuration | cycles | time |
|---|---|---|
| K=256 secp256k1, full-word, randomized (the defaults) | 2,310,913 | 23.11 ms at 100 MHz |
| K=160 secp160k1, full-word, randomized | 922,081 | 5.53 ms at 166.67 MHz |
| K=256, bit-serial ALU | 590,948,097 (formula; point additions simulated) | — |
| K=160, bit-serial ALU | 147,329,121 (simulated) | — |

The thesis reports 23.06 ms and 5.52 ms for the two full-word cases. The
random order costs only one copy cycle per bit: 256 cycles in total for K = 256.

For the bit-serial ALU the thesis gives 760.83 ms and 188.60 ms without a
clock frequency. Both of those times correspond to about 780 MHz with the cycle
counts above. Their ratio, 4.03, matches this design's ratio of 4.01.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| all | `K` | 256 | bits of the prime p |
| all | `P` | secp256k1 prime `2^256 - 2^32 - 977` | field prime. It is a synthesis-time constant, so the ALU adds multiples of it without a register. |
| pa_regfile and up | `B3` | `0x15000050250` | `3b * 2^(K+4) mod p` |
| point_adder, point_mul | `SCALABLE` | 0 | 1 selects the bit-serial ALU |
| point_mul | `RANDOMIZE` | 1 | random operation order with temporaries T0/T1 |

For secp160k1 set:

* `K = 160`;
* `P = 2^160 - 2^32 - 21389`;
* `B3 = 0x150006DA910`.

For another a = 0 curve, `B3 = 3*b*2^(K+4) mod p`.

The curve must have no point of order two. In other words, `x^3 + b` has no
root mod p. Otherwise the complete a = 0 formulas do not apply. All prime-order
curves of this form qualify.

All registers use an asynchronous active-low reset `rst_n`. `start`/`en` are
single-cycle pulses accepted only while the block is idle. Assertions check
this rule in the point adder and the ladder.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference model
is `tb/ecc_ref_pkg.sv`, plain modular arithmetic on 544-bit vectors. It shares
nothing with the RTL.

| testbench | what it checks |
|---|---|
| `tb_mmalu` | K=64. Random and extreme operands up to the bounds for all four operations: congruence mod p, output bounds, K+5 / 2-cycle latency. |
| `tb_mmalu_scalable` | The same at K=32, with the `(K+4)^2+1` / `K+4` latency. |
| `tb_pa_regfile` | Both read ports at all addresses against a model: load, the t1→t0 shift, write enable, the B3 constant. |
| `tb_pa_fsm` | The FSM driving a model ALU with random delays and exact arithmetic mod 65521. The program must compute the complete addition formula, with exactly 36 operations, 17 of them products or scalings. |
| `tb_point_adder` | Default size (secp256k1). O+G, G+O, G+G, G+(-G)=O, O+O, random points, chained additions. Exact latency. |
| `tb_point_mul` | End to end at K=32 on `y^2 = x^3 + 7` mod `2^32-153`, with three builds side by side (full-word randomized, full-word plain, bit-serial). Scalars 0, 1, 2, all-ones, top-bit-only and random. It counts each (m_i, r_i) branch, operations with O, temporary copies and results equal to O, and each must occur. Constant latency. |
| `tb_point_mul_full` | `point_mul` with default parameters. One 256-bit scalar multiplication of the secp256k1 generator against a known affine answer, exact cycle count. |
| `tb_point_mul_secp160k1` | The same for secp160k1 (K=160), with a full-word and a bit-serial build side by side. Both results and both exact cycle counts are checked. |
| `tb_point_adder_scalable` | Six full-size (K=256) point additions through the bit-serial ALU, each 1,154,194 cycles. |

### Running a testbench

To run a testbench with Verilator 5 (here the end-to-end test):

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_point_mul.sv --top-module tb_point_mul
./obj_dir/Vtb_point_mul
```

### Run times

With Verilator, the run times are:

* `tb_point_mul_full`: about 1.5 s of simulation (2.3 M cycles);
* `tb_point_mul`: about 12 s, most of it in the bit-serial build;
* `tb_point_mul_secp160k1`: about 80 s (147 M cycles of the bit-serial build).

A full 256-bit scalar multiplication with the bit-serial ALU (5.9e8 cycles)
would take about 5 minutes and is not part of the test set. Its point
additions are tested at full size, and the whole ladder is tested at K=32 and
K=160.

## Departures from the thesis and known limits

* **Register address map.** The thesis fixes 3-bit operand and write addresses
  and 11 registers, but does not publish which register sits at which address.
  The map above is this design's own. Operand order in commutative steps was
  chosen to fit it.
* **Handshakes and reset.** The en/done and start/busy/done handshakes, the
  launch/store/copy cycles of the ladder and the reset behaviour are this
  design's own.
* **Random bits.** The ladder's random bits come in on the `rnd` port. A
  random-number source is not part of this design.
* **No host interface.** The scalar and points are plain ports. There is no
  bus interface.
* **Subtraction bound.** Three subtractions of the program compute
  `t - (u + v) + 2p`, where `t` is a product and `u + v` is a sum of two
  products. These are the ones that form the Karatsuba cross terms. The
  subtrahend can exceed 2p, so in the worst case `u + v - t` can exceed 2p,
  and the result would wrap around. This requires both products to be near their upper bounds at
  the same time. It was never observed in any simulation, but it has not been
  proven impossible. The schedule keeps the thesis's operation count. Removing
  the risk would need either one more addition of 2p or a larger R.
* **Projective output.** The output is projective and not reduced below p.
  Conversion to affine coordinates is outside the coprocessor, as in the
  thesis.
