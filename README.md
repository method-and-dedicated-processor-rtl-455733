# RNS image coder: 24-bit pixels split into five residues, one pixel per clock

A 24-bit pixel value `A` (0 … 16 777 215) is replaced by its five residues

    b_i = A mod p_i,   p = 7, 23, 29, 59, 61

The moduli are pairwise co-prime and their product is
`PHI = 7·23·29·59·61 = 16 803 731`. That is larger than `2^24`, so every pixel
has its own set of residues, and the Chinese remainder theorem recovers it
exactly. The residues are 3, 5, 5, 6 and 6 bits wide. Each of the five
"residue images" can travel over a different route of a wireless sensor network
and be recombined at the receiver. The routes can then carry smaller messages,
and a 24-bit word never has to cross one link whole.

This repository holds both ends of that chain:

| module | role |
|---|---|
| `rns_forward_converter` | the coding co-processor: pixel in, five residues out, one pixel per clock |
| `rns_reverse_converter` | CRT decoder: five residues in, pixel out, one set per clock |
| `rns_image_codec_top` | both of the above, with the route ends as ports |

The network between the two ends is not part of the RTL.

## Forward conversion by direct addition

A pixel is `A = Σ a_j·2^j` (j = 0 … 23). Its residue is therefore

    A mod p = ( Σ_j  a_j · (2^j mod p) ) mod p

Each weight `2^j mod p` is a constant. The converter is built on this identity
and contains no divider. The stages are:

1. **Input register RG** (`pixel_register`). It takes one 24-bit pixel and a
   valid flag on each clock edge.
2. **Incomplete encoders EC1–EC5** (`rns_encoder`, one per modulus). For bit j
   an encoder outputs the constant `2^j mod p` when `a_j = 1`, and 0 otherwise.
   Each output bit is therefore either constant 0 or `E0 & a_j`. `E0` is the
   encoder's enable, driven by RG's valid flag. No real encoding logic is
   needed, which is why the encoder is called "incomplete". The constants
   repeat with the order of 2 modulo p:

   | j | 23 | 22 | 21 | 20 | 19 | … | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
   |---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
   | mod 7  | 4 | 2 | 1 | 4 | 2 | … | 2 | 1 | 4 | 2 | 1 | 4 | 2 | 1 |
   | mod 23 | 2 | 1 | 12 | 6 | 3 | … | 13 | 18 | 9 | 16 | 8 | 4 | 2 | 1 |
   | mod 29 | 10 | 5 | 17 | 23 | 26 | … | 12 | 6 | 3 | 16 | 8 | 4 | 2 | 1 |
   | mod 59 | 47 | 53 | 56 | 28 | 14 | … | 10 | 5 | 32 | 16 | 8 | 4 | 2 | 1 |
   | mod 61 | 10 | 5 | 33 | 47 | 54 | … | 6 | 3 | 32 | 16 | 8 | 4 | 2 | 1 |

   The RTL does not store this table. It computes the values at elaboration with
   `rns_pkg::pow2_mod`. The testbench checks the encoders against the printed
   columns.
3. **Multi-digit modular adders AD** (`rns_adder_tree`, one per modulus). Each
   is a binary tree of two-input adders modulo p (`mod_adder`, an "SM p" node).
   A node computes `x + y` and subtracts p once if the sum reaches p. That is
   enough because both inputs are already below p. The 24 coefficients reduce
   in five levels, 24 → 12 → 6 → 3 → 2 → 1. At the level with 3 values the odd
   one passes straight to the next level. Each tree has 23 adders.
4. **Output register**. It holds the five residues, packed into one 25-bit word.

The encoders and adders sit in one combinational stage between RG and the
output register.

### Timing

- Throughput is one pixel per clock.
- A pixel presented with `in_valid` before clock edge *n* is in RG after edge
  *n*.
- Its residues are on `out_res`, with `out_valid` high, after edge *n+1*.
- In a cycle without a pixel, `out_valid` is low and `out_res` holds its last
  value.

At 16.7 ns per pixel, a 640 × 480 frame takes 307 200 cycles, about 5.13 ms.
The end-to-end testbench runs exactly that frame and checks the count.

### Residue word layout (`rns_pkg::res_offset`)

| bits | 2:0 | 7:3 | 12:8 | 18:13 | 24:19 |
|---|---|---|---|---|---|
| residue | b1 = A mod 7 | b2 = A mod 23 | b3 = A mod 29 | b4 = A mod 59 | b5 = A mod 61 |

Each field is one route.

## Reverse conversion (CRT)

    A = ( Σ_i b_i · B_i ) mod PHI,   B_i = (PHI / p_i) · d_i,   B_i ≡ 1 (mod p_i)

`d_i` is the one value in 1 … p_i−1 that makes `B_i ≡ 1 (mod p_i)`.
`rns_reverse_converter` does not multiply:

- For each modulus, an elaboration-time table holds `(b · B_i) mod PHI` for
  every `b < p_i`, 179 words of 25 bits in total (`rns_pkg::crt_table`).
- The five looked-up terms are added. Each is below PHI, so the sum is below
  5·PHI.
- The converter compares the sum with `k·PHI` for k = 4 … 1 and subtracts the
  largest multiple that fits.
- The result is registered.

The timing matches the coder: residues are registered on the first edge and the
pixel appears after the second, one set per clock.

A residue outside its range (`b_i ≥ p_i`, possible only on a corrupted route)
counts as 0. A residue set that does not come from a 24-bit pixel gives a CRT
value up to PHI−1 ≥ 2^24. The decoder returns the low 24 bits of that value.

## Top level

`rns_image_codec_top` (parameter `PIX_BITS = 24`) has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `pix_valid`, `pix` | in | 1, 24 | pixel to code |
| `tx_valid`, `tx_res` | out | 1, 25 | residues toward the five routes |
| `rx_valid`, `rx_res` | in | 1, 25 | residues arriving from the routes |
| `rec_valid`, `rec_pix` | out | 1, 24 | recovered pixel |

With `rx = tx` (loopback), every pixel returns four edges after it was
presented.

## What is specified and what is chosen here

These parts follow the coding method directly:

- the five moduli and PHI;
- forward conversion by direct addition of `2^j mod p`;
- the RG → encoder → modular-adder-tree structure;
- the encoder's gating of each coefficient by `E0` and `a_j`;
- a tree of two-input modular adders;
- one pixel per clock;
- the CRT recovery formula.

These are this design's own choices:

- **Valid flags and registers.** The valid handshake, the output registers (and
  with them the two-edge latency), and the synchronous active-low reset are
  added here.
- **Encoder enable.** `E0` is driven from RG's valid flag.
- **First tree level.** The original block diagram draws a one-input node per
  pixel bit above the first pairwise level. Here the encoder outputs enter the
  pairwise level directly.
- **Middle of the tree.** The diagram only sketches the middle levels. Passing
  the odd value straight through is this design's reading of that part.
- **Reverse converter hardware.** Only the formula is given. The
  table / add / compare-subtract structure and the treatment of out-of-range
  residues are this design's.
- **Residue packing.** The packing order of the residues in the 25-bit word is
  chosen here.
- **Timing.** The adder tree is combinational. No pipeline registers are placed
  inside it. Nothing here was timed against the 16.7 ns figure of the original
  CPLD implementation (an Altera MAX II EPM240).

The multipath routing network is outside this design and has no RTL.

## Files

- `rtl/rns_pkg.sv` holds the moduli, PHI, field widths and offsets,
  `pow2_mod`, `crt_basis` and `crt_table`.
- `rtl/mod_adder.sv`, `rtl/rns_encoder.sv`, `rtl/rns_adder_tree.sv` and
  `rtl/pixel_register.sv` are the building blocks.
- `rtl/rns_forward_converter.sv`, `rtl/rns_reverse_converter.sv` and
  `rtl/rns_image_codec_top.sv` are the converters and the top.
- `tb/tb_<module>.sv` is one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

What the testbenches check:

| testbench | what it checks | reference |
|---|---|---|
| `tb_mod_adder` | every operand pair for p = 7, 23, 61 | `%` |
| `tb_rns_encoder` | single-bit inputs, `E0 = 0`, random pixels | the table above |
| `tb_rns_adder_tree` | random and worst-case coefficients for all five moduli | — |
| `tb_pixel_register` | load, hold and reset | — |
| `tb_rns_forward_converter` | random streams with gaps and a 500-pixel burst; exact latency and back-to-back rate | — |
| `tb_rns_reverse_converter` | residue sets from pixels, arbitrary in-range sets and out-of-range residues | a CRT computed in the testbench |
| `tb_rns_image_codec_top` | a full 640 × 480 frame at default parameters through the looped-back chain | — |

`tb_rns_image_codec_top` checks every residue and every recovered pixel. It
also checks the frame cycle count (307 203) and the frame time (5.13 ms at
16.7 ns), and counts E0-off cycles, back-to-back conversions and the extreme
pixels 0 and 2^24−1. It runs in a few seconds.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/rns_pkg.sv tb/tb_rns_image_codec_top.sv --top-module tb_rns_image_codec_top
    ./obj_dir/Vtb_rns_image_codec_top

Replace the testbench name to run any other test. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/rns_pkg.sv rtl/<module>.sv`.

## Changing the design

The moduli live in `rns_pkg::MODULI`, and everything else derives from them:

- field widths (`$clog2(p)`) and offsets;
- encoder constants;
- CRT bases and tables;
- the sum width in the reverse converter.

To use other moduli, keep them pairwise co-prime with a product above
`2^PIX_BITS`, and update `PHI`. `TAB_DEPTH` must be at least the largest
modulus. The reduction in the reverse converter assumes `NMOD = 5`, because it
subtracts up to 4·PHI. `PIX_BITS` sets the number of encoder inputs and tree
leaves. The testbenches hard-code the 24-bit, five-modulus configuration.
