# Light posit processing unit (light PPU)

Neural-network weights and many signal-processing data sets do not need the full
32 bits of IEEE binary32 (FP32). Stored as *posits* of 8 or 16 bits they take two
to four times less memory, with little loss of accuracy. Arithmetic on posits
needs a full posit unit, however. This design avoids that unit: the
data stays compressed in memory, and a small conversion unit expands it into a
format that the existing hardware already computes with, and compresses results
back. That format is FP32 for the FPU, or fixed point for the integer ALU.

The unit is a combinational bank of converters between FP32, two's complement
fixed point and three posit formats: posit⟨8,0⟩, posit⟨16,0⟩ and posit⟨16,1⟩. A
decoder maps a set of RISC-V custom-0 instructions onto it. One output
register turns it into a functional unit for a RISC-V execute stage. It sits
beside the ALU and the FPU and returns one result per cycle, one cycle after issue.

## Posits in one paragraph

A posit⟨N,ES⟩ is an N-bit two's complement word. A negative posit is the two's
complement of its magnitude. For a positive word, the bits after the sign are:

- the **regime**: a run of equal bits ended by one opposite bit. A run of *l*
  ones means k = l−1; a run of *l* zeros means k = −l.
- up to **ES exponent bits** e. If the regime leaves too little room, the bits
  that are cut off count as zeros.
- the **fraction** f, in whatever bits remain. It has an implicit leading one.

The value is 2^(k·2^ES + e) × 1.f. There are no subnormals. The word 0 is zero
and 100…0 is NaR ("not a real"), the single exception value. Long regimes leave
fewer fraction bits, so precision is highest near 1.0 and falls off gradually
toward the extremes. The ranges of the three formats are:

| format      | minpos | maxpos | most fraction bits |
|-------------|--------|--------|--------------------|
| posit⟨8,0⟩  | 2^−6   | 2^6    | 5                  |
| posit⟨16,0⟩ | 2^−14  | 2^14   | 13                 |
| posit⟨16,1⟩ | 2^−28  | 2^28   | 12                 |

Example: 0100001000000000 read as posit⟨16,2⟩ has sign 0, regime 10 (k = 0),
exponent 00 and fraction 01000000000, so its value is 1.25. Read as posit⟨16,0⟩,
the same word is 1.0625.

## Instructions

All instructions are R-type words with major opcode `0001011` (custom-0). The
`rs2` field is not a register. It gives the posit width: `00010` for 8 bits,
`00011` for 16 bits. `funct7` gives the direction: `1100000` converts out of a
posit, `1101000` converts into one. `funct3` picks the other format. Names follow
the RISC-V order `FCVT.<destination>.<source>`.

| instruction        | funct7  | rs2   | funct3 | converts                       |
|--------------------|---------|-------|--------|--------------------------------|
| FCVT.S.P8          | 1100000 | 00010 | 000    | posit⟨8,0⟩ → FP32              |
| FCVT.S.P16.0       | 1100000 | 00011 | 000    | posit⟨16,0⟩ → FP32             |
| FCVT.S.P16.1       | 1100000 | 00011 | 010    | posit⟨16,1⟩ → FP32             |
| FCVT.P8.S          | 1101000 | 00010 | 000    | FP32 → posit⟨8,0⟩              |
| FCVT.P16.0.S       | 1101000 | 00011 | 000    | FP32 → posit⟨16,0⟩             |
| FCVT.P16.1.S       | 1101000 | 00011 | 010    | FP32 → posit⟨16,1⟩             |
| FXCVT.H.P8         | 1100000 | 00010 | 001    | posit⟨8,0⟩ → Q8.8 (16 bit)     |
| FXCVT.W.P16.0      | 1100000 | 00011 | 001    | posit⟨16,0⟩ → Q16.16 (32 bit)  |
| FXCVT.L.P16.1      | 1100000 | 00011 | 011    | posit⟨16,1⟩ → Q32.32 (64 bit)  |
| FXCVT.P8.H         | 1101000 | 00010 | 001    | Q8.8 → posit⟨8,0⟩              |
| FXCVT.P16.0.W      | 1101000 | 00011 | 001    | Q16.16 → posit⟨16,0⟩           |
| FXCVT.P16.1.L      | 1101000 | 00011 | 011    | Q32.32 → posit⟨16,1⟩           |
| FCVT.P8.P16.0      | 1100000 | 00010 | 100    | posit⟨16,0⟩ → posit⟨8,0⟩       |
| FCVT.P16.0.P8      | 1100000 | 00011 | 100    | posit⟨8,0⟩ → posit⟨16,0⟩       |
| FCVT.P16.1.P16.0   | 1101000 | 00011 | 111    | posit⟨16,0⟩ → posit⟨16,1⟩      |
| FCVT.P16.1.P8      | 1101000 | 00010 | 101    | posit⟨8,0⟩ → posit⟨16,1⟩       |
| FCVT.P8.P16.1      | 1100000 | 00011 | 110    | posit⟨16,1⟩ → posit⟨8,0⟩       |
| FCVT.P16.0.P16.1   | 1101000 | 00011 | 101    | posit⟨16,1⟩ → posit⟨16,0⟩      |

The encodings are those of the original instruction-set extension. The
fixed-point formats (Qi.f: i integer bits, f fraction bits) are this design's
choice; the section on fixed point explains why.

## How a conversion works

Every converter is a decoder followed by an encoder, joined by one intermediate
form, `unum_t` in `posit_pkg`. It holds a sign, a signed binary scale, a 64-bit
fraction below an implicit one, and flags for zero and NaR/NaN. An FP32 or
fixed-point decoder feeds the posit encoder; the posit decoder feeds an FP32 or
fixed-point encoder; a posit-to-posit conversion chains the posit decoder and the
posit encoder.

### Into a posit (`posit_encode`, used by `fp32_to_posit`)

FP32 keeps the sign apart from the magnitude; a posit is two's complement. So the
encoder builds the **positive** posit first and applies the sign at the very end.

1. The scale splits into the regime value k = scale >>> ES (floor division) and
   the exponent bits e = scale mod 2^ES. For FP32 the scale is the biased
   exponent minus 127.
2. `posit_regime_encode` builds the sign-and-regime word without a loop. For
   k ≥ 0 it shifts the most negative N-bit integer (100…0) arithmetically right
   by k; this gives k+1 leading ones. It then shifts one place right to clear the
   sign bit, which leaves the terminating zero in place. For k < 0 it shifts
   0010…0 right by −k−1, which gives −k zeros and then a one. It also returns the
   regime length, terminating bit included.
3. A right shifter places {e, fraction} just below the regime. An OR merges the
   two, and the top N bits are kept. The bits that fall off are dropped, so the
   magnitude **rounds toward zero**.
4. A multiplexer substitutes special words. NaR replaces a NaN or infinity. Zero
   replaces a float zero or subnormal (posits have no subnormals). A regime out
   of range, |k| > N−2, gives maxpos (011…1) or minpos (00…01): the posit
   **saturates** and never overflows to NaR or underflows to zero.
5. A last multiplexer, driven by the sign, picks the word or its two's
   complement.

### Out of a posit (`posit_decode`, used by `posit_to_fp32`)

1. The word is made positive: it is two's-complemented when the sign bit is set.
2. `posit_regime_decode` measures the regime run with a find-first-set
   (`posit_ffs`). The run's polarity is the first body bit b. The module scans
   the body below it, complemented when b = 1, for the highest set bit; the
   search is 14 bits wide for a 16-bit posit. If that bit is at index i, the run
   length is l = N−2−i (14−i for 16 bits). If there is no such bit, the run fills
   the word and l = N−1.
3. A left shifter moves the body by l+1 places, which drops the run and its
   terminating bit. The exponent bits are then on top and the fraction follows;
   the shifted-in zeros supply any missing exponent bits.
4. The scale is k·2^ES + e. For FP32 the biased exponent is scale + 127 and the
   mantissa is the top 23 fraction bits. For the three formats every posit is
   exact in FP32: at most 13 fraction bits and scales within ±56.

## Fixed point

A posit⟨N,0⟩ with |x| ≤ 1 becomes a fixed-point number with N fraction bits when
shifted left by two places. The `FXCVT` instructions therefore use 8 fraction
bits for posit⟨8,0⟩ (Q8.8 in 16 bits) and 16 for posit⟨16,0⟩ (Q16.16 in 32 bits).
For posit⟨16,1⟩ they use Q32.32 in 64 bits, which spans the format's range,
2^−28 to 2^28. With these choices, posit → fixed is exact for every posit. NaR
becomes the most negative fixed-point word. Fixed → posit normalises the
magnitude with a find-first-set, then reuses the posit encoder, so it also rounds
toward zero and saturates. `posit_to_fixed` and `fixed_to_posit` take the width
and the binary point as parameters.

## The functional unit (`lppu_fu`)

| port               | dir | width      | meaning                                           |
|--------------------|-----|------------|---------------------------------------------------|
| `clk_i`, `rst_ni`  | in  | 1          | clock; asynchronous active-low reset              |
| `valid_i`          | in  | 1          | an instruction is offered this cycle              |
| `instr_i`          | in  | 32         | the instruction word                              |
| `rs1_i`            | in  | 64         | value of register rs1                             |
| `trans_id_i`       | in  | TRANS_ID_W | tag, returned with the result (default 3 bits)    |
| `is_ppu_o`         | out | 1          | combinational: `instr_i` belongs to this unit     |
| `result_valid_o`   | out | 1          | a result is present                               |
| `result_o`         | out | 64         | the result                                        |
| `rd_o`             | out | 5          | destination register                              |
| `trans_id_o`       | out | TRANS_ID_W | tag of the result                                 |

Timing: an instruction accepted at a rising edge (`valid_i && is_ppu_o`) has its
result, with `result_valid_o` high, from that edge until the next one. The unit
accepts one instruction per cycle and never stalls. It ignores words that are
not its own. An assertion checks that no result appears without an accepted
issue. The conversion logic is combinational: the published FPGA implementation
reports a worst path of about 6.3 ns, within the 8 ns cycle of its 125 MHz host
core.

Results fill a 64-bit register in one of two ways. Posit and fixed-point results
are sign-extended, since they are two's complement integers. FP32 results are
NaN-boxed (upper 32 bits set), as an RV64 register holding a single-precision
value requires.

The unit does not include the host processor. It would be fed by the core's
issue logic and write back through its commit path, in the same way as the FPU.

## Files

| file                                   | contents                                        |
|----------------------------------------|-------------------------------------------------|
| `rtl/posit_pkg.sv`                     | `unum_t`, operation enum, field and format constants |
| `rtl/lppu_fu.sv`                       | top: functional unit with output register       |
| `rtl/lppu_decoder.sv`                  | instruction decoder                             |
| `rtl/light_ppu.sv`                     | the 18 converters and the result multiplexer    |
| `rtl/fp32_to_posit.sv`, `rtl/posit_to_fp32.sv` | FP32 ⇄ posit⟨N,ES⟩                      |
| `rtl/posit_to_fixed.sv`, `rtl/fixed_to_posit.sv` | fixed ⇄ posit⟨N,ES⟩                   |
| `rtl/posit_to_posit.sv`                | posit⟨NI,ESI⟩ → posit⟨NO,ESO⟩                   |
| `rtl/posit_encode.sv`, `rtl/posit_decode.sv` | shared encoder and decoder datapaths      |
| `rtl/posit_regime_encode.sv`, `rtl/posit_regime_decode.sv`, `rtl/posit_ffs.sv` | regime logic |
| `tb/posit_ref_pkg.sv`                  | bit-serial reference model used by all testbenches |
| `tb/tb_*.sv`                           | one self-checking testbench per module, plus a workload test |

The converters take N and ES as parameters. The unit instantiates them for
(8,0), (16,0) and (16,1). Other sizes are written for, but only these three and
a posit⟨16,2⟩ decoder are tested.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
fixed number of cycles if it hangs. The reference model in `tb/posit_ref_pkg.sv`
reads posits one bit at a time into a `real`. To find the expected posit, it runs
a binary search over the posit codes for the largest value not above |x|. It
shares no code with the RTL. Coverage:

- `posit_to_fp32`, `posit_to_fixed`, `posit_to_posit`, `posit_regime_decode` and
  `posit_ffs` (15 bits) are checked exhaustively over all inputs.
- `fp32_to_posit` and `fixed_to_posit` are checked on every posit value as a
  round trip, and on 20 000 random operands across the whole range plus the
  special values.
- `lppu_decoder` is checked against the encoding table, with single-bit
  corruptions and 20 000 random words.
- `light_ppu` runs 2 000 operands per operation.
- `tb_lppu_fu` runs 40 000 cycles of a random instruction stream at the default
  parameters. It mixes idle cycles, back-to-back issue, foreign instructions,
  NaR operands, saturating conversions and a reset with a result in flight. It
  counts each of these and fails if one never happened.
- `tb_lppu_weight_compression` streams 2 048 Gaussian-like FP32 weights through
  compression and back for each format. It checks every word and checks one
  result per cycle. It reports the storage ratio (4× for posit⟨8,0⟩, 2× for the
  16-bit formats) and the error. With rounding toward zero, the relative RMS
  error is about 15 % for posit⟨8,0⟩, 6·10⁻⁴ for posit⟨16,0⟩ and 3·10⁻⁴ for
  posit⟨16,1⟩.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_lppu_fu rtl/posit_pkg.sv tb/posit_ref_pkg.sv tb/tb_lppu_fu.sv
./obj_dir/Vtb_lppu_fu
```

Replace `tb_lppu_fu` with the name of any other testbench. Each one finishes
within seconds.

## Where this design is its own

The converter structure, the regime arithmetic, the instruction encodings and
the formats follow the published light PPU. The following are choices made
here, where the published description says nothing or is ambiguous:

- **Rounding.** Conversions that lose bits round toward zero, because the
  published datapath has no rounding stage. Round-to-nearest would lower the
  posit⟨8,0⟩ error noticeably. It would need an extra increment after the merge
  step in `posit_encode.sv`.
- **Out of range.** Out-of-range magnitudes saturate to maxpos or minpos. Float
  zeros and subnormals give posit zero. Infinities and NaNs give NaR. NaR gives
  the FP32 quiet NaN 0x7FC00000, or the most negative word when converted to
  fixed point.
- **NaR word.** NaR is 100…0, following the posit definition. The published
  converter diagram labels its NaR constant 0xFFFF, which in two's complement is
  −minpos rather than NaR.
- **Fixed-point formats.** The binary-point positions (Q8.8, Q16.16, Q32.32) are
  not given anywhere; they are chosen so that the published "shift left by two"
  rule holds and every posit converts exactly.
- **Integration.** The issue/result handshake, the tag, the one-cycle output
  register and the way results fill the 64-bit register are this design's. The
  published unit is described only as combinational logic inside the host
  core's execute stage.
- **Extra converters.** The published block diagram shows only the six FP32
  converters. The fixed-point and posit-to-posit converters are added here
  because the instruction set includes them; they reuse the same encoder and
  decoder.
