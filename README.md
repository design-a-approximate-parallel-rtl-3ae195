# RoBA: a rounding-based approximate multiplier

Multiplying by a power of two is just a shift. This multiplier rounds each operand to its nearest
power of two, Ar and Br, and uses the identity

    A*B = (Ar - A)*(Br - B) + Ar*B + Br*A - Ar*Br

The last three terms are all shifts. The first term is the only one that needs a real multiplier,
and it is small, because neither operand is far from its rounded value. Dropping it gives the
RoBA (rounding-based approximate) product:

    A*B  ~=  Ar*B + Br*A - Ar*Br

So one multiplication becomes three barrel shifts, one addition and one subtraction. No
partial-product array is needed. The intended users are error-tolerant DSP tasks such as image
smoothing and sharpening, where a small error in a product cannot be seen in the output.

The RTL here is a parameterised SystemVerilog model of the whole datapath in its three published
variants. The top level registers the products of all three side by side. The default size is
32-bit operands and 64-bit products.

## How big the error is

The approximate product is off from the exact one by exactly `(Ar - A)*(Br - B)`.

- The sign of that term tells which way the result errs:
  - One operand rounded up and the other rounded down: the term is negative, so the result is
    too large.
  - Both rounded the same way: the result is too small.
  - Either operand already a power of two: the result is exact.
- With the rounding rule below, an operand's distance to its rounded value is at most a third of
  the operand. So the relative error of the unsigned product is at most 1/9, about 11%. This
  bound is worked out here; it is not taken from a measurement.
- Example: 3 x 6. Here 3 rounds to 2 and 6 rounds to 8, so the result is
  2*6 + 8*3 - 2*8 = 20, against an exact 18.

## The rounding rule

For an operand x with its leading one at bit k (so 2^k <= x < 2^(k+1)), the candidates are 2^k
and 2^(k+1).

- x rounds up when bit k-1 is set, which means x >= 3*2^(k-1).
- Ties, x = 3*2^(k-1), therefore round up. A tie is equally close to both candidates, so this
  costs no accuracy, and it makes the logic smaller: the rounding of each output bit depends on
  two input bits only.
- The one exception is x = 3, which rounds down to 2.
- Zero rounds to zero. Every product term that uses it is then zero.

In gates (`roba_rounding`), a prefix OR from the top finds the leading one, `lead`. Output bit i is

    r[i] = (lead[i-1] & x[i-2])  (i >= 3)      -- round up from bit i-1
         | (lead[i]  & ~x[i-1])  (~x[i-1] term only for i >= 2)  -- stay at bit i

The output is one-hot, or zero for x = 0. For an N-bit unsigned operand it is N+1 bits wide,
because 11x..x rounds to 2^N. That top bit reduces to `r[N] = x[N-1] & x[N-2]`.

## Datapath

    a, b --> sign detector --> |a|, |b| --> rounding (x2) --> Ar, Br
             |                                                    |
             | sign                 shifter: |b| by Ar  -> Ar*B   |
             |                      shifter: |a| by Br  -> Br*A   |
             |                      shifter: Ar  by Br  -> Ar*Br  |
             |                                                    v
             |             Kogge-Stone adder: Ar*B + Br*A ; subtractor: - Ar*Br
             v                                                    |
          sign set  <------------------------ magnitude -----------
             |
             v
          product (2N bits)

| Module                | Role |
|-----------------------|------|
| `roba_sign_detector`  | Exact absolute values of both two's complement operands (~X+1), and the product sign (XOR of the sign bits). |
| `roba_rounding`       | Nearest power of two, one-hot (rule above). |
| `roba_barrel_shifter` | Multiplies a word by a one-hot power of two. A one-hot-to-binary encoder feeds a log2-stage shifter. The output is forced to zero when the power is zero. |
| `roba_ks_adder`       | 2N-bit Kogge-Stone parallel prefix adder with carry in. |
| `roba_subtractor`     | `a + ~b + 1` on a Kogge-Stone adder. |
| `roba_sign_set`       | Negates the magnitude for a negative product, exactly or approximately (see the variants). |
| `roba_mul`            | The combinational multiplier. Parameters: `N` and `VARIANT`. |
| `proposed_mul`        | Clocked top: all three variants on the same operands. |
| `roba_pkg`            | The variant enum and the default width. |

### Why 2N-bit modulo arithmetic is enough

All shifter outputs, the adder and the subtractor are 2N bits wide, and they drop any carry or
borrow.

- In U-RoBA, two operands of the form 11x..x both round to 2^N. Then Ar*Br = 2^(2N) wraps to
  zero, and Ar*B + Br*A overflows too.
- The final value Ar*B + Br*A - Ar*Br always lies between 0 and 2^(2N) - 1, so the wraps cancel.
  The product is still exact modulo 2^(2N), which means it is correct.
- For signed N-bit operands, magnitudes are at most 2^(N-1). Nothing wraps, and the product
  fits the signed 2N-bit range.

## The three variants

`VARIANT` (a `roba_pkg::roba_variant_e`) selects one of:

- **S-RoBA** (`ROBA_SIGNED`): two's complement operands. The product is formed on the
  magnitudes and then negated exactly when the signs differ. This is done because a negative
  number's nearest power of two is not a power of two in two's complement form.
- **AS-RoBA** (`ROBA_SIGNED_APPROX`): the same, but the final negation skips the +1 and outputs
  ~X. A negative product comes out one below the S-RoBA value. A zero product with operands of
  opposite signs comes out as -1. In exchange, the incrementer leaves the critical path. The
  absolute values at the input are still exact.
- **U-RoBA** (`ROBA_UNSIGNED`): unsigned operands. There is no sign detector and no sign set. The
  rounded values, and the inputs of the Ar*Br shifter, are N+1 bits wide.

For the signed variants the rounded value needs only N bits. The largest magnitude is 2^(N-1),
and it never has both of its top two bits set.

## Top level: `proposed_mul`

| Port   | Dir | Width | Meaning |
|--------|-----|-------|---------|
| `clk`  | in  | 1     | Products are registered on the rising edge. |
| `a`, `b` | in | N (32) | Operands. Two's complement for `c` and `c_as`, unsigned for `c_u`. |
| `c`    | out | 2N    | S-RoBA product. |
| `c_as` | out | 2N    | AS-RoBA product. |
| `c_u`  | out | 2N    | U-RoBA product. |

- **Timing:** a new operand pair can be applied every cycle. Its products appear after the next
  rising edge, so the latency is one cycle.
- **Reset:** there is none. The three output registers are reloaded on every edge.
- **Datapath depth:** everything before the register is combinational: the input negation, a
  prefix OR, a barrel shifter, two Kogge-Stone adders and the output negation.

## Where this RTL makes its own choices

These points are not fixed by the RoBA scheme:

- **The clocked wrapper.** The scheme describes the datapath as combinational, and its top level
  has a clock input. The single output register and the absence of reset were chosen here.
- **Which variant is on `c`.** `c` is S-RoBA. `c_as` and `c_u` were added so that all three
  variants can be reached from one top.
- **Block internals that the scheme only names.**
  - The leading-one detector in the rounding block.
  - The one-hot encoder and the zero gating in the shifter.
  - The subtractor built on the adder with a carry in.
  - Exact absolute values in the sign detector, for AS-RoBA too.
- **Subtractor inputs.** The subtractor's inputs come in only a few bit patterns, because Ar and
  Br are powers of two. This is not used to simplify it: a full 2N-bit subtractor is built.
- **Shift range.** In U-RoBA the shift amount can reach N, when an operand rounds to 2^N. The
  modulo argument above covers it.
- **The most negative operand.** -2^(N-1) is accepted. Its magnitude 2^(N-1) is handled like any
  other.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Expected values come from
`roba_ref_pkg`, which does not follow the RTL structure. It finds the nearest power of two by
comparing distances, and it evaluates the product with 132-bit integers.

| Testbench | Covers |
|-----------|--------|
| `roba_rounding_tb` | All 8-bit inputs at both output widths, plus 32-bit corner cases and random values. |
| `roba_sign_detector_tb` | All 8-bit operand pairs, plus random 32-bit pairs. |
| `roba_barrel_shifter_tb` | Every shift amount, including a zero power and the 2^32-by-2^32 wrap. |
| `roba_ks_adder_tb` | Random 64-bit operands and long carry chains, plus an exhaustive 5-bit instance. |
| `roba_subtractor_tb` | Random pairs in both orders, plus the extremes. |
| `roba_sign_set_tb` | Both negation forms. |
| `roba_mul_tb` | All 65536 8-bit pairs for every variant, 32-bit random and corner pairs, and hand-worked values. |
| `proposed_mul_tb` | End to end at the default 32-bit size, one pair per cycle, checking the one-cycle latency. |
| `roba_image_filter_tb` | 5x5 Gaussian smoothing and 2X - smoothing sharpening of a generated 32x32 8-bit image, every product through `proposed_mul`. |

`proposed_mul_tb` checks the products, and it also counts each mechanism. It fails if any
mechanism never occurs. The mechanisms are:

- rounding up, rounding down, a tie rounded up, and 3 rounded to 2;
- a zero operand, and the most negative operand;
- an unsigned operand rounded to 2^32;
- negative products through both negation forms;
- results above, below and equal to the exact product.

`roba_image_filter_tb` reports the PSNR of each filtered image against the same filter computed
with exact products. On its generated image this is about 43 dB for smoothing and about 42.8 dB
for sharpening, for both signed variants. The image and kernels are this testbench's own choice.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/roba_pkg.sv tb/roba_ref_pkg.sv tb/proposed_mul_tb.sv \
        --top-module proposed_mul_tb -Mdir obj
    ./obj/Vproposed_mul_tb

Use the same command for any other testbench, with its file and top module swapped in. The
simulator is two-state, and the testbenches rely on nothing being X.

## Changing it

- **Width:** set `N` on `proposed_mul` or `roba_mul`. Every internal width follows from it: the
  rounding, the shifters, and the 2N-bit adder and subtractor.
- **One variant only:** instantiate `roba_mul` with the `VARIANT` you want.
