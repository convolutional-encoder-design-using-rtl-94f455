# Block convolutional encoder on a 16-bit Vedic multiplier

A convolutional encoder forms each output stream by convolving the message
bits with a generator sequence. The usual circuit is a shift register with XOR
taps that produces one output symbol per input bit. This design takes a whole
block instead. It treats a 16-bit message and a generator as two binary
numbers, and their product as the encoded word. Each of the two output streams
is one 16 x 16 multiplication, giving a 32-bit word per stream. The
multiplication is fast because the multiplier uses the Urdhva Tiryakbhyam
("vertically and crosswise") method of Vedic arithmetic. It forms all partial
products in parallel and sums them by columns with carries.

The datapath is purely combinational. A message on `msg_bit` produces both
encoded words one multiplier delay later. There is no clock, no reset and no
state.

## Top level: `conv_encoder`

```
               +---------------------+
msg_bit[N-1:0] | vedic_mul_NxN (G1)  |--> encoded_bit_1[2N-1:0] = msg_bit * G1
        -----+-|                     |
             | +---------------------+
             | +---------------------+
             +-| vedic_mul_NxN (G2)  |--> encoded_bit_2[2N-1:0] = msg_bit * G2
               +---------------------+
```

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N`  | 16 | message width. Allowed values are 4, 8 and 16; any other value stops elaboration with `$error`. |
| `G1` | `16'h0006` | generator word of output 1 |
| `G2` | `16'h0008` | generator word of output 2 |

There are three configurations: 4-bit, 8-bit and 16-bit. They are described
as constraint length 4, 8 and 16, with code rates 2/4, 4/8 and 8/16. The
16-bit configuration is the main one. All three come from the same RTL:
`N` selects a `vedic_mul_4x4`, `vedic_mul_8x8` or `vedic_mul_16x16` for each
output. The rate and constraint-length figures are labels of these
configurations and set no separate parameter.

The defaults for `G1` and `G2` are this design's own choice. The generator
polynomials behind the reference design are not known. The one worked example
available is message `0x0030`, which encodes to `0x00000120` on output 1 and to
a word ending in `1000_0000` on output 2. The defaults reproduce it:
`0x0030 * 6 = 0x120` and `0x0030 * 8 = 0x180`. Override `G1` and `G2` for any
other code.

The default generators are constants, so synthesis folds them into the
multipliers. Output 2 (`x 8`) becomes a plain 3-bit shift of the message.
Output 1 (`x 6`) becomes one adder of two shifted copies. The full multiplier
hardware is only kept when the generators are inputs, or when a synthesis flow
keeps hierarchy.

### Integer product, not XOR convolution

The multiplier is an integer multiplier: where shifted copies of the message
overlap, it propagates carries. The textbook convolutional code instead adds
them modulo 2 (XOR, no carries). The two give the same word only when no two
shifted partial products have a 1 in the same bit position. With `G2 = 8`
there is a single partial product, so output 2 is always a true GF(2)
convolution. With `G1 = 6` two copies overlap. The reference example is itself
a case with a carry: `0x30 * 6 = 0x120` as integers, but `0xA0` as an XOR
convolution. This design follows the integer reading. `tb_conv_encoder`
counts both kinds of message, with and without a carry.

## The Vedic multiplier

### The Urdhva Tiryakbhyam rule

Write the two operands along two sides of a square. Every digit of one
operand is multiplied with every digit of the other, and all these products
exist at once. The products are then summed along the anti-diagonals (the
"crosswise" lines), starting at the least significant one. Each column sum is
added to the carry from the previous column. Its lowest digit is a result
digit and the rest carries into the next column. This is the same arithmetic
as long multiplication, but all partial products are produced in one step,
without a row-by-row loop.

### 2x2 cell: `vedic_mul_2x2`

In binary the digit products are AND gates:

| column | sum | result |
|--------|-----|--------|
| 0 | `a0 b0` (vertical) | `p0` |
| 1 | `a1 b0 + a0 b1` (crosswise), half adder | `p1`, carry `c1` |
| 2 | `a1 b1 + c1` (vertical plus carry), half adder | `p2`, carry out `p3` |

That is four AND gates and two half adders.

### Building larger multipliers by quarters

An `N x N` multiplier with `H = N/2` splits `a = {aH, aL}` and
`b = {bH, bL}`. Four `H x H` multipliers run in parallel:

```
ll = aL*bL   hl = aH*bL   lh = aL*bH   hh = aH*bH        (N bits each)
a*b = hh << N  +  (hl + lh) << H  +  ll
```

This is the vertical/crosswise rule applied to two "digits" of `H` bits each.
`vedic_mul_16x16` uses four `vedic_mul_8x8`. Each of those uses four
`vedic_mul_4x4`, and each of those uses four `vedic_mul_2x2` cells. The
reference design builds the 16x16 multiplier from four 8x8 modules and two
16-bit adder stages. Building the 8x8 and 4x4 modules the same way is this
design's choice.

### Merging the partial products: `vedic_merge`

The adder stages are the part of the multiplier that is hardest to get right.
`vedic_merge` adds the four partial products:

```
           bit 2N-1        3H        N         H          0
                 |  hh[N-1:H] | hh[H-1:0] | ll[N-1:H] | ll[H-1:0] |
stage 1:  X = hl + lh                      -> N bits + carry c1
stage 2:  M = X + {hh[H-1:0], ll[N-1:H]}   -> N bits + carry c2
top:      T = hh[N-1:H] + c1 + c2          -> H bits (H-bit adder, c2 as carry-in)
p = {T, M, ll[H-1:0]}
```

- The low quarter `ll[H-1:0]` passes straight through.
- Stage 1 adds the two crosswise products.
- Stage 2 adds that sum to the N bits in the middle of `{hh, ll}`.
- Both carries have weight `2^(N+H)`, so both go into the top quarter. Each
  stage can carry on its own, and both can carry at once.
- The top adder can never carry out (`c3`), because an `N x N` product always
  fits in `2N` bits. `c3` is left unread on purpose.

There are two N-bit stages, as in the reference design. The third, H-bit adder
acts as an incrementer. It is an addition of this design, needed to place the
carries correctly.

### Adder: `binary_adder`

A `W`-bit ripple-carry adder with `cin` and `cout`. It is one full adder per
bit, the simplest adder that does the job. The reference design does not
specify the adder type. The ripple chains set the critical path, and swapping
this module for a faster adder is the obvious place to cut delay.

## What follows the reference design, and what is this design's own

Taken from the reference design:
- two encoded outputs and the port names `msg_bit`, `encoded_bit_1` and
  `encoded_bit_2`, 16/32/32 bits wide
- the encoder as a multiplier per output
- the Urdhva Tiryakbhyam multiplication method
- the 16x16 multiplier as four 8x8 modules and two 16-bit adder stages
- the 4-, 8- and 16-bit family of configurations

This design's choices:
- the generator values (fitted to the one example, see above)
- integer rather than GF(2) products
- no clock or registers
- unsigned operands
- 8x8 and 4x4 built by the same quarter split, ending in the 2x2 cell
- how the adder stages are wired, and the extra top-quarter incrementer
- ripple-carry adders

Synthesis timing is not modelled. The reference design reports path delays
that grow with the multiplier size: about 7.0 ns at 4 bit, 22.8 ns at 8 bit and
31.5 ns at 16 bit on an FPGA. Those figures belong to that implementation and
are not checked here.

## Files

| File | Contents |
|------|----------|
| `rtl/conv_enc_pkg.sv` | default message width and generator words |
| `rtl/conv_encoder.sv` | top: two multipliers, one per output |
| `rtl/vedic_mul_16x16.sv`, `vedic_mul_8x8.sv`, `vedic_mul_4x4.sv` | quarter-split multipliers |
| `rtl/vedic_mul_2x2.sv` | Urdhva 2x2 leaf cell |
| `rtl/vedic_merge.sv` | adder stages that join four partial products |
| `rtl/binary_adder.sv` | ripple-carry adder |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Verification

Every testbench compares the hardware with products computed directly in the
testbench. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

| Testbench | What it covers |
|-----------|----------------|
| `tb_vedic_mul_2x2` | all 16 operand pairs |
| `tb_binary_adder` | widths 16 and 8; corner cases and 5000 random operand sets |
| `tb_vedic_merge` | widths 16 (random) and 4 (all 65536 inputs), with arbitrary partial products; counts cases where both stages carry |
| `tb_vedic_mul_4x4`, `tb_vedic_mul_8x8` | exhaustive; count the carries of each adder stage |
| `tb_vedic_mul_16x16` | corner cases and 40000 random pairs; counts the stage carries |
| `tb_conv_encoder` | end to end: see below |
| `tb_conv_encoder_full` | the default encoder with no parameter overridden: the reference example, then all 65536 messages |

`tb_conv_encoder` runs four encoders:
- the default encoder, with the reference example, single-bit messages and
  random messages
- a 16-bit encoder with dense generators (`0xB7A3`, `0xFFFF`), so that both
  adder stages carry
- the 8-bit configuration, exhaustively
- the 4-bit configuration, exhaustively

It fails unless each of these occurs at least once: a carry-free message, a
message with a carry, a stage-1 carry and a stage-2 carry.

Each testbench has also been run against a deliberately broken copy of its
module, and each reported failures.

## Simulating

Verilator 5 finds the submodules by file name:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/conv_enc_pkg.sv tb/tb_conv_encoder_full.sv --top-module tb_conv_encoder_full
./obj_dir/Vtb_conv_encoder_full
```

Use any other `tb/tb_*.sv` in the same way. Every run finishes in well under a
second.

## Changing it

- **Other generators:** set `G1`/`G2` on `conv_encoder`, or change the
  defaults in `conv_enc_pkg`.
- **Other sizes:** a 32x32 multiplier is one more file in the pattern of
  `vedic_mul_16x16.sv`: four `vedic_mul_16x16` and `vedic_merge #(.N(32))`.
  Then add an `N == 32` branch in `conv_encoder`.
- **A GF(2) code:** the XOR convolution of a shift-register encoder needs a
  carry-less multiplier. Replace the adders in `vedic_merge` and the half
  adders in `vedic_mul_2x2` with XOR, and drop the carries.
