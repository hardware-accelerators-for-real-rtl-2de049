# Streaming accelerators for a Zynq-class SoC: FIR, half-float multiply and approximate image convolution

A processor in an FPGA SoC can hand regular, data-parallel loops to the
programmable logic. The price is moving the data there and back. This RTL
holds the logic-side accelerators of such a system. Every accelerator has the
same shape:

- a small **control bus** (AXI4-Lite) to start a run and learn that it ended;
- an **argument bus** (AXI4-Lite) for values that change rarely, such as
  coefficients, a constant, a kernel or an image size;
- an **input stream** and an **output stream** (AXI4-Stream), which a DMA
  engine feeds from processor memory and drains back into it;
- an **interrupt** raised when the last output word has left.

There are three kinds of accelerator:

- an FIR filter;
- a floating-point multiply-by-constant unit, in half and single precision;
- a 3x3 image convolution for edge detection.

The convolution comes in three arithmetic versions: exact, with an
approximate adder (GeAr) and with an approximate multiplier (UDM). The
question behind these versions is how much area and delay the hardware saves
when pixel values may be slightly wrong.

The processor, the DMA engines, the AXI interconnect, the cycle-counting
timer and the reset block are vendor parts. They are not part of this RTL.
The top module brings out the points where they attach.

## System top (`accel_top`)

`accel_top` places all six accelerators side by side. They share only the
clock and the reset. Their buses are arrays indexed by accelerator `i`:

| i | accelerator | module and parameters |
|---|---|---|
| 0 | FIR filter | `fir_ip`, 11 taps |
| 1 | half-precision multiply | `fp_mul_ip`, EXP_W=5, MAN_W=10 |
| 2 | single-precision multiply | `fp_mul_ip`, EXP_W=8, MAN_W=23 |
| 3 | convolution, exact | `conv_ip`, ARITH_EXACT |
| 4 | convolution, GeAr adder | `conv_ip`, ARITH_APPROX_ADD |
| 5 | convolution, UDM multiplier | `conv_ip`, ARITH_APPROX_MUL |

AXI4-Lite bus `2*i` is the control bus of accelerator `i`, and bus `2*i+1`
is its argument bus. `s_axis[i]` and `m_axis[i]` are its input and output
streams; `interrupt[i]` is its interrupt. The bundles are the structs
`axil_req_t`, `axil_rsp_t` and `axis_t` in `accel_pkg`. In a real system the
interconnect maps each AXI4-Lite bus to an address window. Each stream pair
goes to one DMA channel pair.

## The run protocol shared by all accelerators

All six cores run the same way. Only the argument registers differ.

1. Write the arguments on the argument bus.
2. Optionally enable the interrupt: write 1 to GIE and to IER.
3. Write 1 to CTRL bit 0 (start).
4. Stream one packet into the input stream, and take one packet from the
   output stream. The input packet must have TLAST on its last word (FIR and
   multiply); for the convolution the image size ends the packet.
5. The run ends when the output word carrying TLAST is taken. At that point:
   - CTRL.done and ISR are set;
   - if GIE and IER are set, `interrupt` rises.
6. Read CTRL to clear done. Write 1 to ISR to clear the interrupt.

Control register map (`hls_ctrl`, byte offsets):

| offset | name | bits |
|---|---|---|
| 0x00 | CTRL | 0 start (reads 1 while running); 1 done (clears on read); 2 idle |
| 0x04 | GIE | 0 global interrupt enable |
| 0x08 | IER | 0 done-interrupt enable |
| 0x0C | ISR | 0 done status, write 1 to clear |

Bus and stream rules:

- **AXI4-Lite.** All register banks share the slave engine `axil_slave`. It
  accepts a write when both the AW and the W channel are valid, and it keeps
  one transaction outstanding per direction. Responses are always OKAY.
  Unmapped registers read as 0.
- **AXI4-Stream.** A word moves when TVALID and TREADY are both high. TDATA is
  32 bits wide. The core holds TREADY low on its input while it is idle, so
  data that arrives early waits for the start.

Assertions in `axil_slave` check that a response is held until it is taken.

## FIR filter (`fir_ip`, `fir_filter`)

This is a direct-form filter: y[n] = sum over k of b_k * x[n-k], for
k = 0..NTAPS-1.

- The samples move through a chain of registers. Every tap is multiplied by
  its coefficient, and the products are added in one chain.
- Arithmetic is signed 32-bit. The sum wraps modulo 2^32, as C `int`
  arithmetic would.
- Coefficient b_k is argument register k, at byte offset 4*k.
- The delay line is cleared at every start, so each packet starts from rest.
- It takes one sample per clock. Each output leaves one clock after its input.

The tap count is a parameter. The default of 11 is this design's choice.

## Floating-point multiply by a constant (`fp_mul_ip`, `fp_mul`)

Each element of stream A is multiplied by the constant B in argument
register 0, and the product goes out on stream C. The operand sits in the
low 16 bits of the stream word (32 bits for single precision). The core takes
one element per clock, and the product is registered.

`fp_mul` is a complete IEEE-754 multiplier for any exponent/fraction split:

- **Operand unpacking.** Subnormal operands are normalised with a
  leading-zero count, so both significands have their leading 1 at a known
  place.
- **Exponent.** The exact product of the two significands is 2*(MAN_W+1)
  bits wide. Its leading 1 sits in one of two places. The result exponent
  is the sum of the operand exponents, minus the bias, plus that position.
- **Subnormal results.** If the exponent falls below the normal range, the
  product shifts right, and the bits shifted out collapse into a sticky bit.
  This gives gradual underflow.
- **Rounding.** Round to nearest, ties to even, is done by adding the
  rounding increment to the packed {exponent, fraction} field. A fraction
  that rounds up to 1.0 carries into the exponent. A largest-finite value
  that rounds up carries into infinity.
- **Special values.** Inf times 0 and any NaN operand give the quiet NaN
  (0x7E00 in half precision). Overflow gives a signed infinity.

Check values in binary16:

- 1.5 × 2.0 = 3.0: 0x3E00 × 0x4000 = 0x4200.
- The smallest subnormal times 0.5 rounds to +0 (a tie, rounded to even):
  0x0001 × 0x3800 = 0x0000.
- 65504 × 2 overflows to +inf: 0x7BFF × 0x4000 = 0x7C00.

## Image convolution (`conv_ip`, `conv_engine`)

This is the most involved core. It computes

    g(x, y) = clamp_0..255( sum over dx, dy in -1..1 of w(dx, dy) * f(x+dx, y+dy) )

for an 8-bit grey image f and a signed 16-bit 3x3 kernel w. There is no
kernel flip: weight w(dx, dy) lies at row dy+1, column dx+1 of the kernel.
A negative sum becomes 0, and a sum above 255 becomes 255. The edge-detection
kernels need negative weights, which is why the weights are 16-bit and
signed.

Argument registers, at byte offset 4*i:

| i | content |
|---|---|
| 0..8 | weight at kernel row r, column c, with i = 3r+c; signed, bits 15..0 |
| 9 | image width, 1..MAX_W |
| 10 | image height |

The image enters in raster order, one pixel per stream word in bits 7..0.
The result leaves in the same order and format, with as many pixels as came
in.

### Line buffer, memory window and computation kernel

The pixels pass through three stages:

    pixel in --> line buffer --> 3x3 memory window --> computation kernel --> pixel out

- **Line buffer** (`line_buffer`). It stores the two image rows above the
  current one, with MAX_W pixels each. It is a memory written as an array, so
  block RAM fits it. At the column being scanned, it returns the pixels one
  and two rows up. It then moves each pixel one row older and stores the new
  pixel in the newest row.
- **Memory window** (`mem_window`). This is nine registers. On every step,
  the window shifts one column left, and the new column enters on the right:
  the two pixels from the line buffer plus the new pixel. All nine pixels can
  be read at once.
- **Computation kernel** (`conv_kernel`). This is combinational. It forms the
  nine products, adds them in row-major order and clamps the sum.

One memory of the largest width serves every image size. The width register
only says where a row ends. The default MAX_W = 640 holds both 320×240 and
640×360 images.

### The scan and its extra row and column

The output pixel centred at (x, y) needs the pixel at (x+1, y+1). So the
window can only be complete one row and one column after the centre pixel
has arrived. The engine therefore scans (W+1)×(H+1) positions instead of W×H:

- At positions inside the image, it takes one input pixel.
- In the extra column x = W and the extra row y = H, it takes nothing. It
  shifts in zeros instead.
- From x ≥ 1 and y ≥ 1 on, each position gives the output pixel centred at
  (x-1, y-1).

Each output position therefore falls where its window has just become
complete, and the last pixels leave without waiting for data that never
comes.

**Borders.** The first and last rows and columns of the output are written
as 0, because their window would stick out of the image. The line buffer is
not reset between images. The border rule makes sure that stale rows are
never used.

**Timing.** The engine moves one scan position per clock, as long as:

- it has an input pixel, if the position needs one;
- its output register is free, if the position gives an output.

So a W×H image takes (W+1)(H+1) clocks, plus one for the output register,
plus any stalls. For 640×360 that is 231,402 clocks. Input TLAST is ignored;
output TLAST marks the last pixel.

## Approximate arithmetic in the convolution

The two approximate cores change only the computation kernel. Their results
can differ from the exact core's, and they are meant to.

### Under-designed multiplier (`udm_mul`, `udm_mul2`)

The building block is a 2×2-bit multiplier with a 3-bit output. Only 3×3
needs a fourth bit (9 = 1001b). The block gives 7 (111b) for that case and is
exact for the other 15 operand pairs. With p the output bits and a, b the
input bits:

    p0 = a0 & b0
    p1 = (a1 & b0) | (a0 & b1)
    p2 = a1 & b1

A wider multiplier splits both operands into 2-bit digits. It multiplies
every pair of digits with the small block, shifts each partial product to
its place (2*(i+j) bits for digits i and j), and adds the partial products
exactly. That is the same as building a 4×4 multiplier from four 2×2 blocks,
then an 8×8 from four 4×4 blocks, and so on.

The error is easy to predict. Each digit pair that is (3, 3) loses 2·4^(i+j).
For example:

- Exact: 15 × 15 = 225.
- Both operands have the digits (3, 3), so there are four (3, 3) pairs.
- UDM: 225 − 2·(1 + 4 + 4 + 16) = 175.

`conv_kernel` uses a 16×16 UDM. The pixel is zero-extended to 16 bits. For a
negative weight, it multiplies the magnitude and negates the product.

The usual edge-detection weights (0, ±1, ±2, ±4, 8) have no 2-bit digit
equal to 3. With such kernels, the UDM core gives exactly the same image as
the exact core. Its error appears only with weights such as 3, 7 or 11, and
then only for pixels that also have a digit of 3. The system test uses a
sharpening kernel with centre weight 7 for this reason.

### GeAr adder (`gear_add`)

GeAr(N, R, P) cuts an N-bit addition into sub-adders of L = R+P bits that
work in parallel, with no carry between them:

- Sub-adder 0 adds bits 0..L-1 and supplies result bits 0..L-1.
- Sub-adder k (k ≥ 1) adds bits k·R .. k·R+L-1. It keeps only its top R
  result bits. Its low P bits only predict the carry into those R bits.

With the default N=16, R=4, P=4 (L = 8), there are three 8-bit sub-adders:

| sub-adder | operand bits | result bits |
|---|---|---|
| 0 | 0..7 | 0..7 |
| 1 | 4..11 | 8..11 |
| 2 | 8..15 | 12..15 |

A carry that must travel through more than P bits of a window is lost.

- 0x0F00 + 0x0100 = 0x1000 comes out exact: sub-adder 2 sees 0x0F + 0x01.
- 0x0FF0 + 0x0010 gives 0x0000 instead of 0x1000. The carry starts at bit 4
  and passes bits 8..11. Sub-adder 2 starts at bit 8 and never sees it.
  Sub-adder 1 sees it, but drops it, because the carry leaves its window at
  the top.

In the kernel, the 16-bit running sum uses GeAr for each of the eight
additions. The errors are largest when a running sum crosses zero, because
the long run of 1 bits in a negative number must then flip.

### How wrong the approximate images are

The system test measures each approximate core against the exact one with
the metric 1 − mean(((exact − approx)/255)²) over the output image. On the
generated 320×240 test images:

- GeAr core, 8-neighbour edge kernel: 0.978;
- UDM core, sharpening kernel with centre weight 7: 0.998.

Most edge-detection outputs clamp to 0 in both cores, which hides many of
the errors in the raw sums.

## How far the RTL can be trusted

Every module has a self-checking testbench in `tb/`. The testbenches compare
the outputs with independent models in `tb/tb_ref_pkg.sv`:

- floating point through `real` arithmetic, with integer RNE rounding;
- UDM by the digit-pair error formula above;
- GeAr by explicit windows;
- convolution by direct summation over the image.

Notable tests:

- `tb_fp_mul`: 90,000 random and edge-case products.
- `tb_gear_add`, `tb_udm_mul`: exhaustive and random operand sweeps.
- `tb_conv_ip`: a 320×240 image with a clock-count check, and odd sizes with
  asymmetric kernels.
- `tb_accel_top`: runs all six cores at once, at default parameters, with
  random stalls on both stream sides. This includes a 640×360 image through
  the exact convolution, checked to take (641·361)+1 clocks. The test also
  counts that each mechanism happened at least once: input gaps,
  back-pressure, interrupts, clamping at 0 and at 255, zero borders,
  results of each approximate core that differ from exact ones, and
  subnormal and overflowing floating-point products.

## Where this design chose for itself

Each source file's opening comment lists its own choices. The larger ones:

- **Register maps and run protocol.** The CTRL/GIE/IER/ISR layout, one
  packet per start, and the run ending on the output TLAST.
- **Bus widths.** 32-bit stream words, 8-bit AXI4-Lite addresses, and
  32-bit integer FIR arithmetic with 11 taps.
- **Multiplier timing.** The floating-point unit is one-cycle, pipelined,
  with one element per clock.
- **Convolution arithmetic.** 16-bit products and sums, and the sum order.
- **Convolution image handling.** Zero borders and the padded scan.
- **Approximate multiplier wrapping.** The 16-bit UDM width and its
  sign-magnitude wrapper.

One result differs from what is sometimes reported for UDM convolution.
Images convolved with the identity kernel through a UDM multiplier have
been reported to lose precision near white. The logic here follows the
2×2 truth table strictly. Multiplying by 1 (or by any weight without a 2-bit
digit of 3) is then exact, so the identity kernel gives the exact image. A
loss like that one can only come from something outside the logic, such as
a missed timing path.

Not included:

- a floating-point version of the convolution, and one with an 8-bit
  unsigned kernel, which were studied as alternatives;
- any processor-side software;
- the vendor blocks named above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/accel_pkg.sv tb/tb_ref_pkg.sv tb/tb_accel_top.sv --top-module tb_accel_top
    ./obj_dir/Vtb_accel_top

Replace `tb_accel_top` with any other `tb/tb_*.sv` to test one block. Each
testbench prints `TB_RESULT checks=N failures=M`. The full-system run
simulates about 231,000 clocks and takes under a minute.

Parameters to change:

- `FIR_NTAPS` and `CONV_MAX_W` on `accel_top`;
- `NTAPS` on `fir_ip`;
- `EXP_W`/`MAN_W` on `fp_mul_ip`;
- `MAX_W` and `ARITH` on `conv_ip`;
- `N`/`R`/`P` on `gear_add` (R must divide N−L);
- `W` on `udm_mul` (even).

Shared constants (stream width, kernel size, register indices) are in
`rtl/accel_pkg.sv`.
