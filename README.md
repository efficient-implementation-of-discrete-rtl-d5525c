# 8-point DCT with adder-based distributed arithmetic

Every output of a discrete cosine transform is an inner product of the
input vector with a fixed row of cosines. Classic distributed arithmetic
(DA) evaluates such products by slicing the *variable input* into bits and
looking up precomputed partial sums in a ROM whose size doubles with every
extra input. This design slices the *fixed coefficients* into bits instead.
A coefficient bit slice then says which inputs must be added at that bit
weight. Only sums of inputs are needed, so a small tree of serial adders
replaces the ROM:

* a zero bit slice costs nothing (no adder, no wire);
* the same sum of inputs is built once and used by every output and every
  bit weight that needs it.

The RTL is an 8-point 1-D DCT built this way. It takes eight 8-bit signed
samples and produces eight exact, full-precision integer coefficients. It
accepts one transform every 6 clock cycles and returns it 8 cycles later.

## The arithmetic

For one output, `X = sum_i C_i * u_i` with four fixed coefficients `C_i`
and four variable inputs `u_i`. Write each coefficient as M bits,
`C_i = sum_j c_ij * w_j`. Then

    X = sum_j w_j * S_j,    S_j = sum_i c_ij * u_i

Each `S_j` is one of the 15 nonzero *subset sums* of the four inputs. Which
one is given by the 4-bit mask `{c_3j, c_2j, c_1j, c_0j}`, or it is 0 when
the mask is 0. The inputs arrive serially, two bits per cycle, least
significant digit first. So each subset sum is also produced two bits per
cycle, and the product is built digit by digit:

    X = sum_t 4^t * (W0_t + 2*W1_t)

`W0_t` is the M-bit word whose bit j is bit 0 of digit t of `S_j`. `W1_t`
is the same word built from bit 1. Read as an M-bit two's complement
number, `W0_t` already includes the coefficient weights. This is the
central point of the design: per cycle, the coefficient multiplication
costs no logic at all, only wiring from a term to a bit position.

**Signs.** The DCT kernel has negative entries. Coefficients are M-bit
two's complement, so bit M-1 has weight `-2^(M-1)`. Reading the
concatenated bits as a signed number accounts for this automatically. The
inputs are two's complement too, so the upper bit of the *last* digit has
negative weight. In that cycle the shift-adder subtracts `2*W1` instead of
adding it. It inverts the operand and injects the +1 through the free
carry-in bit of its carry-save adder.

**The transform.** `X(k) = sum_{n=0..7} C(k,n) x(n)` with
`C(k,n) = round(cos(pi*(2n+1)k/16) * 2^12)`, rounded half away from zero.
The usual `2/N` and `1/sqrt(2)` normalisation is left to the user, so
`X(k) / 4096` is the unnormalised DCT. Because `C(k,7-n) = (-1)^k C(k,n)`,
the even outputs need only `x(n)+x(7-n)` and the odd outputs only
`x(n)-x(7-n)`, for n = 0..3. This splits the transform into two
independent 4x4 matrix-vector products. The kernel magnitudes are 4096,
4017, 3784, 3406, 2896, 2276, 1567 and 799 (`cos(m*pi/16)` for m = 0..7).
They are computed at elaboration time by `dct_pkg::dct_coef`.

## Datapath

```
x(0..7) ─ butterfly ─┬─ sums  ─ da_unit #(ODD=0) ─ X(0),X(2),X(4),X(6)
                     └─ diffs ─ da_unit #(ODD=1) ─ X(1),X(3),X(5),X(7)

da_unit:  ps_converter ─ summation_network ─ term wiring ─ 4 x shift_adder
             (4 lanes)     (11 serial adders,   (fixed by the   (CSA + BLC,
                            30 output regs)      kernel bits)    16-bit word)
```

| module | role |
|---|---|
| `dct_pkg` | widths, types, the integer kernel function |
| `butterfly` | eight parallel adders/subtractors, 9-bit results |
| `ps_converter` | four shift registers; load sign-extends to 12 bits; 2 bits out per cycle |
| `serial_adder` | two full adders plus a carry flip-flop; the carry is forced to 0 on the first digit of a word |
| `full_adder` | one-bit full adder |
| `summation_network` | the subset sums of 4 serial inputs that the kernel selects (up to 15), registered |
| `carry_save_adder` | 16-bit 3:2 compressor; the carry word's bit 0 is a carry-in |
| `blc_adder` | Brent-Kung (binary look-ahead carry) parallel-prefix adder |
| `shift_adder` | per-output accumulator, shifts right two bits per cycle |
| `da_unit` | one 4x4 DA product with its own digit counter |
| `dct8` | top: butterfly and the two DA units |

### Summation network

The network forms each pair sum with one serial adder (6 adders). Each
three-input sum reuses a pair: `t7 = t3+x2`, `t11 = t3+x3`, `t13 = t5+x3`
and `t14 = t6+x3` (4 adders). The four-input sum adds two pairs:
`t15 = t3+t12` (1 adder). That makes 11 serial adders, i.e. 22 full adders
and 11 carry flip-flops. The 4 single inputs and the 11 sums are
registered: 15 terms x 2 bits = 30 register bits. These counts match the
original circuit. The adder tree is combinational within a cycle, with a
depth of two serial adders. The full network produces every subset sum, so
it serves any 4x4 coefficient matrix.

A term that no coefficient bit slice selects is not built. The parameter
`USED` (a 15-bit mask) lists the terms that are selected. An adder exists
only for a used term, or for a term that a used term is built from. Only
used terms get output registers, and every other output reads 0. `da_unit`
computes `USED` from its kernel half at elaboration time
(`dct_pkg::terms_used`):

* The odd half selects all 15 terms, so its network is the full one:
  11 adders and 30 register bits.
* The even half never selects `x2`, `x3`, `t13` or `t14` on their own. Its
  network has 9 adders and 22 register bits.

### Term wiring

For output row r (kernel row `k = 2r + ODD`) and coefficient bit j,
`da_unit` computes the mask `{C(k,3)[j], C(k,2)[j], C(k,1)[j], C(k,0)[j]}`
at elaboration time. It connects bit 0 and bit 1 of `term[mask]` to bit j
of the shift-adder operands `w0` and `w1`. No table is stored and there is
no multiplexer. Changing the kernel changes only this wiring.

### Shift-adder

The shift-adder keeps a 14-bit upper part `A` and a 10-bit register `L` of
bits already shifted out. Each cycle it compresses three operands into a
16-bit sum/carry pair: `A` (0 on the first digit), `W0`, and `±2*W1`. The
BLC adder resolves the pair. The two low bits of the result go into `L`
and the rest becomes the new `A`. On the last digit, `{sum, L}` is the
exact 26-bit result.

16 bits is the smallest word that cannot overflow with 14-bit coefficients:
`|A| <= 2^13` and `|W0 ± 2*W1| < 3*2^13`.

## Timing and interface (`dct8`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset |
| `in_valid`, `x` | 1, 8x8 | input vector x(0..7), signed, packed `[7:0][7:0]` |
| `in_ready` | 1 | the vector is taken in a cycle where `in_valid && in_ready` |
| `out_valid` | 1 | one-cycle pulse |
| `X` | 8x26 | signed X(0..7), held until the next result |

* A vector that is offered while `in_ready` is low must be held. The
  input is not registered, so `x` must stay stable in the cycle it is
  taken.
* `in_ready` is high when the unit is idle. It is also high in the cycle
  that sends the last digit of the current vector, so vectors can follow
  each other every 6 cycles.
* The pipeline has three steps: P/S load, network register, shift-adder
  result register. `out_valid` comes exactly 8 cycles after the vector
  was taken.
* The output has no back-pressure.

Assertions check that the two DA units, and the four shift-adders inside
each unit, stay in lock step.

## Choices made in this implementation

These points were not fixed by the original architecture and were chosen
here:

* **Widths.** The samples are 8-bit signed. Coefficients are 14-bit with
  12 fraction bits, chosen so the shift-adder word is exactly 16 bits.
  Results are kept at full precision (26 bits) with no rounding. To change
  widths, edit `DATA_W`, `COEF_W` and `COEF_FRAC` in `dct_pkg`. The serial
  word length (`DIGITS`) and the result width follow from them. Only the
  8-bit/14-bit configuration has been simulated.
* **Digit order.** The least significant digit comes first, so that serial
  carries run upward. Inputs and coefficients are two's complement, with
  the sign handling described above.
* **Butterfly.** The butterfly is a set of parallel adders placed before
  the P/S converters.
* **Control.** A digit counter in each DA unit does the sequencing. The
  design uses a valid/ready input handshake and an asynchronous reset.
* **Output latches.** The network's output latches are edge-triggered
  registers.
* **Not reproduced.** The ROM-based DA baseline and the gate and area
  figures of the original circuit are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_serial_adder` and `tb_summation_network` stream random and extreme
  words and compare every serial sum with integer sums.
  `tb_summation_network` also runs two pruned networks and checks that
  pruned outputs read 0.
* `tb_ps_converter` checks digit order, sign extension, loading during the
  last digit, and holding.
* `tb_butterfly`, `tb_carry_save_adder` and `tb_blc_adder` compare with
  integer arithmetic. `tb_blc_adder` covers widths 16, 13 and 5.
* `tb_shift_adder` compares with `sum 4^t (W0 ± 2 W1)`, with idle cycles
  inside words.
* `tb_da_unit` checks both kernel halves against a reference whose kernel
  is computed in real arithmetic inside the testbench. It also checks the
  8-cycle latency, back-to-back starts 6 cycles apart, and stalls.
* `tb_dct8` runs 2000 transforms at the default sizes. It compares each
  output with the direct 8-term sum (no butterfly). It also compares each
  output with the real-valued DCT within the coefficient rounding bound,
  and checks latency and throughput. It counts stalled cycles, back-to-back
  transforms, idle gaps and extreme vectors (all-minimum, all-maximum,
  alternating), and fails if any of these never occurs.

A testbench can be run with plain Verilator (5.x), for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_dct8 rtl/dct_pkg.sv tb/tb_dct8.sv
    ./obj_dir/Vtb_dct8

The testbenches use only `$urandom` for stimulus and two-state logic. After
synthesis, the whole `dct8` comes to roughly 960 word-level cells and 583
flip-flop bits.
