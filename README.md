# Vedic DSP components: Brent-Kung adder, Urdhva multipliers, IEEE 754 multiplier and DMC protected store

This RTL builds the arithmetic and storage blocks meant to speed up a DSP
processor. Every adder is a **Brent-Kung parallel-prefix adder**. Every
multiplier is built from the **Urdhva-Tiryagbhyam** ("vertically and
crosswise") scheme, in which four half-width products are formed in parallel
and then summed. On these two parts sit an **IEEE 754 double precision
multiplier** and a **Decimal Matrix Code (DMC)** encoder/decoder. The DMC code
protects 32-bit words held in SRAM against multiple-cell upsets.

All arithmetic blocks are combinational. The only clocked logic is the DMC
codeword memory and its read-valid flag.

## Module map

```
vedic_dsp_top
├── bk_adder            32-bit Brent-Kung adder
├── vedic_mul_signed    64-bit signed fractional multiplier
│   ├── vedic_mul ×4    32×32 Urdhva multipliers (recursive, see below)
│   └── bk_adder ×3     crosswise sum, upper sum, two's complement
├── fp_multiplier       IEEE 754 double multiplier
│   ├── fp_exponent_unit  (bk_adder ×2)
│   ├── vedic_mul         64×64 significand multiplier
│   └── fp_normalizer
└── dmc_codec           DMC protected store
    ├── dmc_encoder     (bk_adder ×4, 4-bit)
    ├── dmc_sram        16 × 68-bit codeword RAM
    └── dmc_decoder     (dmc_encoder, bk_adder ×4 as 5-bit subtractors)
dmc_pkg                 codeword struct and sizes
```

The top places the four components side by side, and each has its own ports.
The processor that would connect them is not part of this RTL: its four-stage
pipeline, ALU, MAC, filter and FFT datapaths, and any Nikhilam-sutra
multiplier are only named in the source description.

## Brent-Kung adder (`bk_adder`)

The adder works in three steps, like any parallel-prefix adder:

1. **Pre-processing.** Each bit forms `P[i] = a[i] ^ b[i]` and `G[i] = a[i] & b[i]`.
   The carry in is folded into bit 0 as `G[0] | P[0] & cin`.
2. **Carry network.** A tree of prefix cells applies
   `(G,P)[i:j] = (G[i:k+1] | P[i:k+1] & G[k:j], P[i:k+1] & P[k:j])`.
3. **Post-processing.** Each sum bit is `S[i] = P[i] ^ C[i-1]`, and the carry
   out is the prefix generate of the top bit.

The Brent-Kung tree has two halves:

- An **up-sweep**, a binary reduction at distances 1, 2, 4, and so on. It
  leaves the full prefix at bit positions 2^k − 1.
- A **down-sweep**, which fills in the remaining positions from those bits.

For 4 bits the tree is the familiar one: G1:0, G3:2, then G3:0 and G2:0. The
design has 2·log2(W) − 1 levels and about 2W cells. Each level is its own
`generate` block, which keeps the netlist free of false combinational loops.
The loop also handles widths that are not a power of two. The other blocks
rely on this, using widths 4, 5, 13, 96 and 128.

A worked example is checked in the testbench: `0xABCD1234 + 0x1234ABCD` with
`cin = 0` gives `0xBE01BE01` with `cout = 0`.

## Urdhva-Tiryagbhyam multiplier (`vedic_mul`)

Split both operands into halves, a = {aH, aL} and b = {bH, bL}. The product is
then

```
p = aL·bL  +  (aH·bL + aL·bH) << N/2  +  aH·bH << N
     vertical     crosswise                vertical
```

The four products are formed at once. An N-bit Brent-Kung adder sums the two
crosswise products, and the carry of that sum is kept. An (N + N/2)-bit
Brent-Kung adder then adds this sum to `{aH·bH, upper half of aL·bL}`. The
lower half of `aL·bL` passes straight to the result.

Each half-size product is the same module again. The recursion stops at the
2 × 2 Urdhva cell, which is AND gates and two half adders. N must be a power
of two, and the default is 64. A 64 × 64 multiplier therefore holds 1024
2 × 2 cells and six levels of adders.

## Signed fractional multiplier (`vedic_mul_signed`)

This block is the 64-bit multiplier of the Urdhva block diagram. Its operands
are **sign-magnitude fractions**: bit 63 is the sign, and bits 62..0 are a
magnitude in Q0.63.

- Four 32 × 32 `vedic_mul` instances multiply the magnitudes, each
  zero-extended to 64 bits.
- Two Brent-Kung adders combine the four products into the 128-bit magnitude
  product P.
- `x[63] ^ y[63]` enables a two's complement of P, computed as
  `(P ^ {neg}) + neg` on a 128-bit Brent-Kung adder.
- Bit 127 only repeats the sign, so it is redundant. The 64-bit result is
  **bits 126..63**: a two's complement Q0.63 fraction.

The discarded low bits truncate the two's complement value, so the result
rounds toward minus infinity. For example, 0.5 × −0.5 gives
`0xE000_0000_0000_0000`, which is −0.25.

The operand format is an interpretation of the block diagram. The diagram
feeds the magnitudes, with a 0 on top, into the multipliers and negates the
product under the sign XOR.

## IEEE 754 multiplier (`fp_multiplier`)

The default format is 64-bit IEEE 754 double (EXP_W = 11, MAN_W = 52). Setting
`EXP_W = 8, MAN_W = 23` gives single precision, and the significand multiplier
then shrinks to 32 × 32. The datapath follows the classic steps:

| Unit | What it does |
|---|---|
| sign | `s = s1 ^ s2` |
| `fp_exponent_unit` | `e1 + e2 − bias` with two Brent-Kung adders. The second adds `~bias` with carry in 1. The result is an EXP_W+2 bit signed number, so out-of-range exponents stay visible. |
| `vedic_mul` | Multiplies `1.M1 × 1.M2`. The 53-bit significands are zero-extended to 64 bits. |
| `fp_normalizer` | Works on the product, which lies in [1, 4). If the product is ≥ 2 it shifts one place and increments the exponent. It then rounds to nearest, ties to even, using a guard bit and a sticky bit. A rounding carry increments the exponent again. Finally it checks the exponent range. |

These choices are not given by the source description and are this design's:

- **Overflow:** a biased exponent ≥ 2^EXP_W − 1 gives ±infinity and raises
  `overflow`.
- **Underflow:** a biased exponent ≤ 0 gives ±0 and raises `underflow`. The
  design produces **no subnormal results**.
- **Subnormal inputs:** an exponent field of 0 counts as zero.
- **Infinity and NaN:** infinity × finite non-zero gives ±infinity. NaN
  operands, and infinity × 0, give the quiet NaN `0x7FF8000000000000`. The
  flags stay low in these cases.
- **Rounding mode:** round to nearest, ties to even.

For normal results the output is bit-exact with IEEE 754 multiplication in
round-to-nearest-even. The testbench checks this in two ways:

- The double precision instance is compared with the simulator's own `real`
  multiplication.
- A single precision instance is compared with the exact double product,
  rounded to 24 bits.

## DMC protected store (`dmc_encoder`, `dmc_decoder`, `dmc_sram`, `dmc_codec`)

### The code

The 32-bit word is treated as eight 4-bit symbols in a 2 × 4 matrix:

```
row 0:  sym3 d[15:12] | sym2 d[11:8]  | sym1 d[7:4]   | sym0 d[3:0]
row 1:  sym7 d[31:28] | sym6 d[27:24] | sym5 d[23:20] | sym4 d[19:16]
```

The code has two kinds of check bits:

- **Horizontal check bits** are 5-bit *decimal* sums of symbols two apart in
  the same row. Each sum is made by a 4-bit Brent-Kung adder.
  ```
  h[4:0]   = sym0 + sym2      h[9:5]   = sym1 + sym3
  h[14:10] = sym4 + sym6      h[19:15] = sym5 + sym7
  ```
- **Vertical check bits** are column parities: `v[i] = d[i] ^ d[i+16]`.

A codeword (`dmc_pkg::dmc_codeword_t`) is `{h[19:0], v[15:0], u[31:0]}`,
68 bits in all.

### Decoding

1. The decoder re-encodes the received data u to get `h'` and `v'`.
2. **Syndromes.** The vertical syndrome is `s = v ^ v'`. The horizontal
   syndromes are `Δh[g] = h'[g] − h[g]`, one per symbol pair, each from a
   5-bit Brent-Kung subtractor.
3. **Locate.** Data bit i is wrong when its column syndrome `s[i mod 16]` is
   set *and* the horizontal syndrome of its symbol's pair is non-zero. The
   pair of symbol k is `g = 2·(k/4) + (k mod 2)`. The column syndrome says
   which column failed. The horizontal syndrome says which row, because the
   two rows of a column lie in different pairs.
4. **Correct.** The decoder inverts the located bits.

An upset in only the h bits, or only the v bits, makes only one kind of
syndrome non-zero, so the data is left alone. `err_detected` reports any
non-zero syndrome. `err_corrected` reports that at least one data bit was
inverted.

**What is corrected:** any pattern within one 4-bit symbol, and any pattern
within two adjacent symbols of the same row. These are tested at random.
**What is not:** flips that hit the same column in both rows, and flips in
both the h and v check bits at once. Both defeat the locator, and the
decoder can then miscorrect.

### Store and timing (`dmc_codec`)

- The codec contains an encoder, a 16-word single-port synchronous
  `dmc_sram`, and a decoder.
- **Write:** with `en = 1`, `din` is encoded and stored at `addr` on the
  clock edge.
- **Read:** with `en = 0`, the codeword is read, and one clock later `dout`
  carries the corrected word with `dout_valid` high for one cycle.
- **Reset:** `rst_n` is asynchronous and active low, and only clears
  `dout_valid`. The memory contents are not reset.
- **Fault injection:** the `upset` input (68 bits, in codeword layout) is
  XORed into the codeword as it is written. It models radiation upsets for
  testing; tie it to 0 in use.
- **Not from the source:** the depth, the read latency, the flags and the
  upset port are this design's choices.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| `bk_adder` | `W` | 32 | any width ≥ 2 |
| `vedic_mul` | `N` | 64 | power of two |
| `vedic_mul_signed` | `W` | 64 | even; uses four W/2 multipliers |
| `fp_multiplier`, `fp_normalizer`, `fp_exponent_unit` | `EXP_W`, `MAN_W` | 11, 52 | 8, 23 for single precision |
| `dmc_sram`, `dmc_codec` | `DEPTH` | 16 | chosen freely |
| `vedic_dsp_top` | `ADD_W`, `VM_W`, `FP_EXP_W`, `FP_MAN_W`, `DMC_DEPTH` | 32, 64, 11, 52, 16 | passed to the blocks |

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
references are computed independently, with integer `*` and `+`, `real`
multiplication, and an integer model of the DMC equations in
`tb/dmc_ref_pkg.sv`. With Verilator:

```sh
# one block, e.g. the FP multiplier
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dmc_pkg.sv tb/tb_fp_multiplier.sv --top-module tb_fp_multiplier
./obj_dir/Vtb_fp_multiplier

# the DMC testbenches need the package files first
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/dmc_pkg.sv tb/dmc_ref_pkg.sv tb/tb_dmc_codec.sv --top-module tb_dmc_codec
```

`tb_vedic_dsp_top` runs the whole design at its default parameters in under a
second. It does the following:

- runs a fixed-point multiply-accumulate, with Q0.63 products from the Vedic
  multiplier and a 32-bit accumulator on the Brent-Kung adder;
- computes double precision products;
- writes every result, with injected upsets, through the DMC store and reads
  it back.

It counts, and requires at least once: adder carry out, a negative signed
product, an FP normalisation shift, FP overflow and underflow, DMC writes and
reads, a data correction, and a check-bit-only detection.

## Limits and departures

- **Document data not reproduced:** reported FPGA figures (delays, LUT
  counts, the 212 MHz clock and 229.8 MB/s throughput) belong to a processor
  and device flow that this RTL does not reproduce, and none are checked here.
- **Operand formats:** the DMC example word in the tests is `0xABCD1234`. The
  signed multiplier's operand format (sign-magnitude Q0.63) is an
  interpretation.
- **Double precision default:** the description shows the 32-bit IEEE layout
  but evaluates a 64-bit multiplier, so double precision is the default.
- **Rounding and special values** of the FP multiplier are standard IEEE
  choices, apart from flushing subnormals to zero.
- **Lint warnings:** Verilator reports unused signals (carry outs that cannot
  be set, the final-stage group propagate of the adder, unused high product
  bits). They are left in place because the structure is regular.
- **Recursive multiplier in lint:** Verilator's lint also lists `a` and `b`
  of `vedic_mul` as unused and its partial products as undriven. These
  warnings concern the unelaborated copy it keeps of a module that
  instantiates itself, not the elaborated multiplier.
