# A 16-bit arithmetic element for a compressed-sign fractional format

Ordinary 16-bit fixed-point fractions (Q15) give 15 bits of precision to a
signal near full scale, but each halving of the amplitude costs a bit. A
signal at 2^-10 of full scale keeps only 5 bits, and the usable range ends
near 96 dB. This design uses a different 16-bit code, in which precision
falls off at **half** that rate. The cost is one bit at the very top of the
range. The result is 14 significant bits just below 1.0 and 10 bits at 2^-9.
The smallest code is 2^-29, about 181 dB of dynamic range with rounding.

The code is built so that hardware can handle it with ordinary two's
complement arithmetic. A 16-bit word is expanded into a 32-bit two's
complement fraction, and all arithmetic happens in 32 bits. A 15 × 15
multiplier is enough, because no operand carries more than 15 significant
bits. The result is then compressed back to 16 bits with rounding. This
repository holds that arithmetic element: decoders, multiplier,
ALU/accumulator and encoder. They are wired as the datapath of a 16-bit DSP,
which keeps its 16-bit buses and memories.

## The word: a halved sign run

```
 15   14                                  0
+---+--------------------------------------+
| S |  15-bit two's complement field       |
+---+--------------------------------------+
 shift flag
```

The expanded value is a 32-bit two's complement fraction with 1.0 = 2^31
(Q1.31). Any 32-bit value starts with a run of *n* equal bits: its leading
sign bits, zeros for positive values and ones for negative ones. The 16-bit
word stores that run at half length:

* The field starts with *k* = ceil(*n*/2) copies of the sign bit.
* The shift flag is 1 if *n* was even and 0 if it was odd.
* The next 15 − *k* bits of the 32-bit value follow the run in the field.
  These bits start with the bit that ends the run.

**Decoding** (`nf_decode`) doubles the field's leading run to 2*k*. If the
flag is 0 it removes one bit again, giving 2*k* − 1. It then appends the
remaining field bits and zero-fills the word on the right. Examples:

| word   | field run   | 32-bit value | meaning                    |
|--------|-------------|--------------|----------------------------|
| 0x4000 | one 1, S=0  | 0x8000_0000  | −1.0                       |
| 0x3FFF | one 0, S=0  | 0x7FFE_0000  | largest, 1 − 2^-14         |
| 0x7C00 | five 1s, S=0| 0xFF80_0000  | 9 leading ones             |
| 0xFC00 | five 1s, S=1| 0xFFC0_0000  | 10 leading ones            |
| 0x8001 | 14 zeros, S=1| 0x0000_0008 | smallest positive, 2^-28   |
| 0xFFFF | 15 ones, S=1| 0xFFFF_FFFC  | smallest negative, −2^-29  |
| 0x0000 | —           | 0            | zero                       |

A value with a run of *n* keeps 15 − ceil(*n*/2) significant bits. The first
binary ranges below 1.0 therefore hold 14, 14, 13, 13, 12, 12, 11, 11, 10 …
bits. That is two ranges per bit of precision, where Q15 has one. The
decoder testbench checks these counts for every one of the 65536 words.

**The field is the significand.** Decoding copies every bit below the run
unchanged, so the field, read as a 15-bit signed number, *is* the value's
significand. The expanded value is `field << (18 − k − S)`, a left shift of
2 to 17 places. The decoder brings out this pair (`mant`, `shamt`) beside the
32-bit value. That is how the multiplier gets away with 15 × 15 bits.

## Encoding and rounding

`nf_encode` reverses the mapping. It is the part of the design that needs
the most care, because rounding interacts with the run length:

1. Count the input's run *n* (1..32).
2. From *n*, the word keeps the top `floor(n/2) + 15` bits of the 32-bit
   value. Add half of the last kept bit's weight and clear everything below
   it. This rounds to nearest, with ties going up (toward +∞).
3. Count the run of the rounded value again, and pack it as described above.

The second count matters. Rounding can carry into the run, as when
0x3FFF_FFFF rounds to 0x4000_0000. The result is then a power of two with a
shorter run. It is still exact at the new run length, so packing it again
loses nothing (the `renorm` output flags this case). Rounding a negative
value toward zero can also lengthen its run. Rounding always uses the LSB of
the *input's* run, so the result stays on the input's grid. It is never
re-rounded at the finer grid of the new run.

Edge cases:

* A positive value that rounds up to +1.0 saturates to the largest word,
  0x3FFF, and sets `sat`.
* The smallest codes are +8 and −4 LSB of the 32-bit word. Anything smaller
  rounds against that grid, either to zero or to those codes.
* Zero is always encoded as 0x0000. The word 0x8000 also decodes to zero but
  is never produced.

Every word except 0x8000 survives a decode/encode round trip unchanged.
The encoder testbench checks this exhaustively.

## Multiplier

`nf_mul15` multiplies the two 15-bit significands into a 30-bit product. It
then shifts that product by `sa + sb − 31`: left by up to 3 places or right
by up to 27. This gives the Q1.31 product, identical to what a 32 × 32
fractional multiply would give when it keeps the top word. Right shifts
truncate toward −∞. The single overflowing case, −1.0 × −1.0, saturates to
0x7FFF_FFFF and raises `sat`.

## ALU and accumulator

`nf_alu32` is a plain 32-bit saturating add/subtract unit with an accumulator
register. Once the data is expanded, the format needs nothing special. The
operations (`nf_op_t` in `nf_pkg`) are:

| op  | effect                    | op  | effect                      |
|-----|---------------------------|-----|-----------------------------|
| NOP | hold                      | MPY | acc ← A·B                   |
| CLR | acc ← 0                   | MAC | acc ← sat(acc + A·B)        |
| LDA | acc ← A                   | MSU | acc ← sat(acc − A·B)        |
| ADD | acc ← sat(acc + A)        | SUB | acc ← sat(acc − A)          |

## The arithmetic element (`nf_arith_unit`, top)

```
 a_in[15:0] --> nf_decode --+-- q (32) ----------------------> nf_alu32 --> acc (32) --> nf_encode --> y[15:0]
                            +-- mant, shamt --+                   ^   (ovf)                   (y_sat, y_renorm)
 b_in[15:0] --> nf_decode --- mant, shamt --> nf_mul15 -- p (32) -+
                                                (mul_sat)
 op[2:0] -----------------------------------------------> nf_alu32
```

* Ports: `clk`; `rst_n` (asynchronous, active low, which clears the
  accumulator); `op`, `a_in`, `b_in`; `y` (the accumulator encoded to 16
  bits); `acc` (32 bits); and four flags.
* Flags: `ovf` (the last op saturated in the ALU); `mul_sat` (the last op
  used a saturated product); `y_sat` and `y_renorm` (how the current `acc`
  was encoded).
* Timing: one op per clock, with no pipeline. An op presented before a
  rising edge shows in `acc`, `y` and the flags after that edge. An N-tap
  FIR takes a CLR plus N MACs.
* Decode, multiply, add and encode form one combinational path. This is the
  simplest arrangement, not a timing-closed one. A real DSP would register
  the decoded operands and/or the product.

## Word width

Every module takes `NF_W`, the word width, which defaults to 16. The
expanded word and accumulator are `2*NF_W` bits, and the field and the
multiplier operands are `NF_W-1` bits. The rules stay the same at every
width:

* The expansion shift is `NF_W + 2 − k − S`.
* The last codes are still +8 and −4 LSB of the wide word.
* There are still two binary ranges per bit of precision.

The text above quotes the 16/32-bit numbers. `tb_nf_widths` checks 8- and
12-bit words.

## Files

| file | contents |
|------|----------|
| `rtl/nf_pkg.sv` | default widths, `nf_word_t` (`{shift, field}`), `nf_op_t` |
| `rtl/nf_lsc.sv` | leading-sign counter (helper) |
| `rtl/nf_decode.sv` | 16 → 32-bit expansion, plus significand and shift |
| `rtl/nf_encode.sv` | 32 → 16-bit compression with rounding |
| `rtl/nf_mul15.sv` | 15 × 15 multiplier and shift into Q1.31 |
| `rtl/nf_alu32.sv` | saturating 32-bit ALU and accumulator |
| `rtl/nf_arith_unit.sv` | the arithmetic element (top) |
| `tb/nf_ref_pkg.sv` | reference model written independently of the RTL (bit-by-bit decode, rounding by integer division, 64-bit multiply) |
| `tb/tb_*.sv` | self-checking testbenches, each printing `TB_RESULT checks=N failures=M` |

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb_nf_decode` | All 65536 words against the reference decoder, including `mant`/`shamt`. Checks the per-range precision 14,14,13,13,12,12,11,11,10 and directed words. |
| `tb_nf_encode` | Round trip of every word, plus about 200k random and edge values against nearest-value rounding, including both flags. |
| `tb_nf_mul15` | 200k random operand pairs, all pairs of extreme words, and −1.0 times every word, against a 64-bit multiply, including saturation. |
| `tb_nf_alu32` | 20k random ops biased to saturate both ways, checked every cycle against a 64-bit model. |
| `tb_nf_arith_unit` | End-to-end test of the top at its default configuration. Random op streams and directed corner cases, followed by a 16-tap FIR. Checks acc, y and all flags one cycle after every op, and the one-MAC-per-clock rate. Counts each mechanism: every op, ALU saturation in both directions, product saturation, encoder saturation, renormalisation and zero results. |
| `tb_nf_widths` | The format at other sizes. Decoder, encoder and multiplier built for 8-bit words (checked exhaustively, every word and every 16-bit input) and for 12-bit words (exhaustive on words, 100k random inputs), against a width-generic reference (`tb/nf_width_check.sv`). Then a short MAC run, up to saturation, on an 8-bit arithmetic element. |
| `tb_fir_notch` | A 127-tap Kaiser band-stop filter. The testbench rounds its coefficients to Q15 and, through `nf_encode`, to this format, then compares stopband depth. Measured: double precision −124 dB, Q15 −76 dB, this format −92 dB; the test requires 10 dB better than Q15. The filter is then run on the element with a passband tone and a stopband tone. Requires exact agreement with the model and at least 80 dB attenuation; 96 dB is measured. |

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/nf_pkg.sv tb/nf_ref_pkg.sv tb/tb_nf_arith_unit.sv \
    --top-module tb_nf_arith_unit
./obj_dir/Vtb_nf_arith_unit
```

Each testbench finishes in seconds.

## What is defined by the format and what is this design's choice

Defined by the format, and followed exactly:

* The 1-bit shift flag and the 15-bit compressed two's complement field.
* Halving the sign run, rounding up, with the flag recording the parity.
* The decode rule: double the run, drop one bit if the flag is 0,
  left-justify into 32 bits.
* A 32-bit two's complement arithmetic unit and a 15 × 15 multiplier whose
  product is shifted into 32 bits.

This design's own choices:

* The bit order: the flag is bit 15.
* Rounding: to nearest, ties up, on the input's grid.
* Saturation: in the encoder, the multiplier and the ALU.
* The zero code 0x0000.
* Truncation of products.
* The op set, single-cycle timing, reset, status flags, and two operand
  decoders with one result encoder.
* The word width as a parameter. The format is said to carry over to other
  sizes, but the hardware mapping is given only for 16 → 32 bits. The
  general constants are derived from that mapping.

Known departures and limits:

* The encoder always takes an input exactly twice the word width
  (32 bits for 16-bit words). A wider accumulator would first have to be
  clipped or rounded to 32 bits.
* The accumulator is 32 bits with saturation and no guard bits. Long sums
  clip instead of growing.
* The element has no register file, no memory interface and no
  instruction decoding. Operands and op codes are plain ports for the host
  processor to drive.
