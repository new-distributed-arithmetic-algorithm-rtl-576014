# Adder-based distributed arithmetic 8x8 IDCT

This is a 2-D 8x8 inverse discrete cosine transform (IDCT) processor. It takes
one 12-bit coefficient and gives back one 9-bit pixel per clock cycle. It has
no multipliers and no coefficient ROMs. Each inner product with the fixed
cosine coefficients is computed with *adder-based distributed arithmetic*:

* Classic ROM-based DA splits the **variable** input into bits. It looks up
  precomputed partial sums in a ROM of 2^L words.
* Adder-based DA splits the **fixed** coefficients into bits. For every
  coefficient bit position j, the inputs whose coefficient has a 1 at j are
  added up. The result is a small set of fixed sums of inputs (for example
  `X1`, `X1+X3`, `X1+X3+X2`). A fixed network of serial adders forms them.
  Sums that appear at several bit positions, or in several outputs, are built
  only once. Shift-and-add then weights each sum by 2^j.

The architecture follows the IDCT chip of T.-S. Chang, C. Chen and C.-W. Jen,
"New distributed arithmetic algorithm and its application to IDCT" (IEE
Proc. Circuits, Devices and Systems, 1999). Section 7 lists where this RTL
departs from that chip or fills in what the article leaves open.

## 1. The arithmetic

An inner product `y = sum_i A_i * X_i` with fixed coefficients
`A_i = sum_j a_ij * 2^j` can be regrouped by coefficient bit:

    y = sum_j 2^j * S_j        where   S_j = sum_i a_ij * X_i

Each `S_j` is a sum of inputs, chosen by the bits of the coefficients. It
needs no multiplier. Take three inputs with coefficients 1011, 0101 and 0011:

| bit weight | inputs with a 1 | term         |
|-----------:|-----------------|--------------|
| 2^3        | X1              | X1           |
| 2^2        | X2              | X2           |
| 2^1        | X1, X3          | X1+X3        |
| 2^0        | X1, X2, X3      | (X1+X3)+X2   |

Only two adders are needed: `X1+X3`, and that sum plus `X2`. Zero bits cost
nothing, and a shared partial sum costs one adder. `tb_summation_network`
builds this example and checks that it uses exactly two serial adders.

The inputs arrive **bit-serially**, two bits per cycle and least significant
digit first. So each adder is a digit-serial adder: two full adders and one
carry flip-flop. The network produces every `S_j` two bits per cycle, and a
shift-adder per output rebuilds `y`:

    y = sum_t 4^t * sum_j 2^j * (S_j bit 2t + 2 * S_j bit 2t+1)

The inner sum over j is a plain 16-bit word for each of the two bits of the
digit. So the shift-adder takes **two 16-bit words per cycle**.

Signed values are two's complement throughout:

* Negative coefficients become serial subtractors in the network. The b input
  is inverted and the initial carry is 1.
* Each serial word is 16 bits: 12 input bits and 4 sign-extension bits. The
  top bit of the last digit is therefore a sign bit. The shift-adder subtracts
  it on the last cycle.
* Sums of up to four 14-bit inputs fit in 16 bits. So no extra cycles are
  needed to absorb carries.

## 2. The 1-D eight-point IDCT (`idct1d`)

### Split kernel

The 8x8 IDCT matrix has even/odd symmetry. This lets it be split into two
4x4 kernels:

    E_n = V_n + V_(7-n) = sum_m  k_e(n,m) * U_(2m)       (network 1, even)
    O_n = V_n - V_(7-n) = sum_m  k_o(n,m) * U_(2m+1)     (network 2, odd)

    V_n = (E_n + O_n) / 2,   V_(7-n) = (E_n - O_n) / 2,   n = 0..3

* `k_e(n,m) = sqrt2 * C(2m) * cos((2n+1) * 2m * pi/16)`
* `k_o(n,m) = sqrt2 * cos((2n+1)(2m+1) * pi/16)`
* `C(0) = 1/sqrt2` and `C(k) = 1` otherwise.

All coefficients are scaled by sqrt(2). This makes the U0 and U4 coefficients
exactly +-1, which leaves fewer nonzero bits. Each is stored as a sign plus a
16-bit magnitude in 1.15 format:

    c(k) = round(2^15 * sqrt2 * cos(k * pi/16))
         = 46341, 45451, 42813, 38531, 32768, 25746, 17734, 9041, 0   for k = 0..8

`idct_pkg` computes both kernels from this formula (`even_kernel()`,
`odd_kernel()`). A row pass followed by a column pass multiplies the result
by sqrt2 * sqrt2 = 2. One extra shift at the very end removes this.

### Data path

```
 in_data --> ps_converter --(U0,U2,U4,U6: 4 x 2 bits)--> summation_network (even)
 (1/cycle)   8 words -> 8 lanes   (U1,U3,U5,U7: 4 x 2 bits)--> summation_network (odd)
                                              |  two 16-bit words per output
                                              v
                              8 x shift_adder (carry-save + carry-propagate)
                                              |  E0..E3, O0..O3
                                              v
                        output_unit: 8 latches + one add/subtract
                                              |
                                  V0..V7, one per cycle --> out_data
```

* **`ps_converter`** collects U0..U7, one word per cycle. On the eighth word
  it copies the vector, sign-extended to 16 bits, into eight shift
  registers. It then shifts them out two bits per cycle for 8 cycles. The
  collector can take the next vector at once. So a new vector starts exactly
  when the previous one finishes, with no gap.
* **`summation_network`** is instantiated twice, once with the even kernel
  and once with the odd kernel. At elaboration, `build_net()` in `idct_pkg`
  lists every distinct signed input combination needed at any (output, bit)
  position. It gives each combination a parent, which is a smaller
  combination plus or minus one input. When possible, it reuses a
  combination that already exists. Each entry becomes one `serial_adder`,
  except a single positive input, which is a wire. The chain settles within
  the cycle. Only terms that some output uses are registered. Fixed wiring
  then spreads them over the `w0`/`w1` words of the four outputs. Word bits
  whose coefficient bit is 0 in all inputs are constant 0.
* **`shift_adder`** runs `acc <- (acc >>> 2) + (w0 + 2*w1) * 2^14` and clears
  at digit 0. After 8 digits this leaves the exact inner product, in units of
  2^-15, in a 34-bit accumulator. A carry-save stage reduces the three
  operands to two. A single carry-propagate adder follows it.
* **`output_unit`** latches E0..E3 and O0..O3 when the shift-adders finish. It
  then emits V0..V7 over the next 8 cycles through one adder/subtractor. The
  result is rounded to nearest (half up) and clipped. The `sat` output marks
  a clipped value.

### Timing

| event                                                 | cycle |
|-------------------------------------------------------|-------|
| U7 of a vector presented (`in_valid`)                 | 0     |
| digits 0..7 leave the P/S converter                   | 1..8  |
| network terms registered                              | 2..9  |
| shift-adder results ready (`done`)                    | 10    |
| V0 .. V7 on `out_valid/out_data`                      | 12..19 |

With back-to-back input the output stream has no gaps: one sample per cycle.

## 3. The 2-D processor (`idct2d`, top)

```
 in_coef --> idct1d (rows) --> transpose_buffer --> idct1d (columns) --> out_pix
 12 bit       14-bit words,      2 x 64 words        9 bit, clipped to -256..255
              3 fraction bits    ping-pong
```

* **Input.** Coefficients F(u,v) enter block after block, row-major (v
  fastest), one per `in_valid` cycle. There is no back-pressure. Gaps in
  `in_valid` are allowed anywhere.
* **Row unit.** It outputs `sqrt2 * G(u,y)`, rounded to 3 fraction bits and
  clipped to a 14-bit word (range +-1024). For any block computed from pixels
  in -256..255 the row results stay inside +-1024. `row_sat` flags a clipped
  row result.
* **Transpose buffer.** It writes a block row-major into one bank. In the
  cycle the last word is written, it starts reading that bank column by
  column, while the next block goes into the other bank.
* **Column unit.** Its rounding shift also removes the scale factor 2. It
  outputs f(x,y), rounded to nearest and clipped to -256..255. `col_sat`
  flags a clipped pixel.
* **Output order.** Pixels leave column by column (x fastest, i.e. transposed
  relative to the input).
* **Latency.** The first pixel of a block appears 40 cycles after the block's
  last coefficient: 19 in the row unit, 2 in the buffer and 19 in the column
  unit. Blocks sent back to back come out back to back. At 50 MHz this is
  50 Mpixel/s, the rate of the original chip.

Ports: `clk`, `rst_n` (synchronous, active low), `in_valid`, `in_coef[11:0]`,
`out_valid`, `out_pix[8:0]` (signed), `row_sat`, `col_sat`.

## 4. Accuracy

`tb_ieee1180` runs the IEEE Std 1180-1990 style test:

* 10,000 random blocks for each pixel range -256..255, -5..5 and -300..300,
  each also with the sign reversed.
* Each block goes through a double-precision forward DCT. The coefficients
  are rounded and clipped to 12 bits.
* The processor's output is compared with a double-precision IDCT.

The random numbers come from the simulator, not from the standard's own
generator. Measured worst cases over the six sets, against the standard's
limits:

| measure                      | limit   | this design |
|------------------------------|---------|-------------|
| pixel peak error             | 1       | 1           |
| peak mean square error       | 0.06    | 0.0162      |
| overall mean square error    | 0.02    | 0.0130      |
| peak mean error              | 0.015   | 0.0033      |
| overall mean error           | 0.0015  | 0.00019     |
| all-zero block in            | all-zero out | all-zero out |

The precision of the intermediate word matters. With only 2 fraction bits
between the passes, the overall mean square error is about 0.025, which
fails the limit.

## 5. Files

| file | contents |
|------|----------|
| `rtl/idct_pkg.sv` | widths, coefficient formula, kernels, term-list builder `build_net()` |
| `rtl/serial_adder.sv` | 2-bit digit-serial adder/subtractor |
| `rtl/summation_network.sv` | shared-term network for one 4x4 kernel |
| `rtl/ps_converter.sv` | input collector and parallel-to-serial shifter |
| `rtl/shift_adder.sv` | carry-save shift-accumulator |
| `rtl/output_unit.sv` | output latches, add/subtract, rounding, clipping |
| `rtl/idct1d.sv` | 1-D eight-point IDCT |
| `rtl/transpose_buffer.sv` | ping-pong transposition memory |
| `rtl/idct2d.sv` | 2-D processor (top) |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ieee1180.sv` | IEEE 1180 accuracy run of the top |

## 6. Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/idct_pkg.sv tb/tb_idct2d.sv --top-module tb_idct2d
./obj_dir/Vtb_idct2d
```

Replace `tb_idct2d` with any other testbench name. The package must be listed
first; `-y rtl` finds the modules.

* `tb_idct2d` runs the top at its default parameters in about 15 s. It covers
  pixel and row clipping, input gaps, both buffer banks, back-to-back blocks,
  the latency of 40 cycles and an unbroken output stream.
* `tb_ieee1180` takes about 25 s.
* The unit testbenches compare against models written independently inside
  each testbench. `tb_idct1d` is bit-exact against integer arithmetic with
  coefficients taken from `$cos`. It is also checked against a real-valued
  IDCT.

## 7. Design choices and departures from the original chip

* **Term search.** The original networks were found by exhaustive search.
  The article reports 22 full adders (11 serial adders), 11 carry flip-flops
  and 30 output latches for both networks together, but does not list the
  terms. Here a greedy search runs at elaboration. It reuses any term that
  differs by one input. Otherwise it creates the cheapest missing parent:
  a single positive input (a wire), else one that still holds a positive
  input, so no negation adder is needed. It needs 13 serial adders and
  12 latched terms for the even kernel, and 29 adders and 32 latched terms
  for the odd kernel. An exhaustive search over the same formulation gives
  12 and 29 adders, so the greedy result is at most one adder from the
  optimum. The much smaller original count presumably comes from a
  different coding of the coefficients or signs, which the article does not
  give. The
  functional behaviour is the same. To change the search, edit `build_net()`.
  The counts are available from `n_adders()`.
* **Negative coefficients** are handled by serial subtractors in the network.
  The article does not say how signs were handled.
* **Output latches** in the network and the output unit are edge-triggered
  registers here.
* **Shift-adder width.** The shift-adder keeps all 34 bits of the
  accumulator, so the inner products are exact before the final rounding.
* **BLC adder.** The block carry-lookahead adder of the original is written as
  `+`, so its structure is left to synthesis.
* **Chosen here, not taken from the original:**
  * the intermediate precision (14-bit words, 3 fraction bits);
  * rounding and clipping;
  * the transpose buffer organisation;
  * the transposed output order;
  * the valid-only handshake;
  * synchronous reset.

  The article does not describe these.
* **Other versions.** The bit-parallel form of the algorithm, ROM-based DA
  and the multi-kernel architecture with a shuffle network are discussed in
  the article but are not part of the chip. They are not built.

## 8. Changing it

* **`idct2d` parameters.** `IN_W` is the coefficient width (at most 14).
  `MID_W`/`MID_FRAC` set the intermediate word. `OUT_W` is the pixel width.
  The rounding shifts of the two 1-D units follow from `MID_FRAC`
  (`16 - MID_FRAC` and `17 + MID_FRAC`).
* **Widths fixed in `idct_pkg`.**
  * The serial word is 16 bits: `DIG` x `NDIG` = 2 bits x 8 cycles.
  * The coefficient magnitude is 16 bits (`CW`).
  * The accumulator is 34 bits (`ACC_W`).

  Inputs wider than 14 bits would need a longer serial word, and so more
  than 8 cycles per vector.
* **Coefficients.** Another coefficient set can be given to
  `summation_network` through its `KERNEL` parameter, a 4x4 array of signed
  17-bit values. The network and its wiring are rebuilt at elaboration.
