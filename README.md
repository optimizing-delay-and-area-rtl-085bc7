# Two-dimensional diagonal/parity/check code for 16-bit words

This RTL protects a 16-bit data word with 16 redundancy bits so that a receiver can
correct any single-bit data error and most double-bit data errors, using only XOR
trees, a small population-count comparison and one AND-OR term per data bit. Encoder
and decoder are purely combinational: there is no clock, no reset and no state, and
the delay is a handful of gate levels.

The scheme is sometimes described as a CRC-based corrector, but nothing in it divides
by a generator polynomial: it is a product-style block code built on a 4x4 matrix.

## The data matrix and the redundancy bits

The 16 data bits are arranged as four rows W, X, Y, Z of four columns 1..4:

```
         col1 col2 col3 col4
   W      W1   W2   W3   W4      data[15:12]
   X      X1   X2   X3   X4      data[11:8]
   Y      Y1   Y2   Y3   Y4      data[7:4]
   Z      Z1   Z2   Z3   Z4      data[3:0]     (W1 = data[15], Z4 = data[0])
```

Three families of redundancy bits are computed:

| bits | definition | covers |
|------|------------|--------|
| D1..D4 (diagonal) | D1 = W1^X2^Y1^Z2, D2 = W2^X1^Y2^Z1, D3 = W3^X4^Y3^Z4, D4 = W4^X3^Y4^Z3 | a zig-zag inside each two-column half |
| P1..P4 (parity) | Pc = Wc^Xc^Yc^Zc | one column each, even parity |
| C (check, 8 bits) | Cr13 = r1^r3, Cr24 = r2^r4 for r in W, X, Y, Z | odd or even columns of one row |

Every data bit lies in exactly one diagonal bit, one parity bit and one check bit.
Bit (row r, column c), counted from 0, sits in diagonal `2*(c/2) + (r+c)%2`, parity `c`
and check `C[r][c%2]` (`crc_pkg::diag_index`).

The 32-bit codeword is systematic:

| bits | content |
|------|---------|
| [15:0]  | data, unchanged |
| [19:16] | D1, D2, D3, D4 (D1 in bit 19) |
| [23:20] | P1, P2, P3, P4 (P1 in bit 23) |
| [31:24] | Cw13, Cw24, Cx13, Cx24, Cy13, Cy24, Cz13, Cz24 (Cw13 in bit 31) |

## Decoding: syndrome, region, correction

The decoder recomputes all 16 redundancy bits from the received data and XORs them
with the received ones. This gives the syndromes SD1..SD4, SP1..SP4 and SC. A single
data-bit error sets exactly one bit in each of the three groups.

**Region selection.** The matrix is split into a left half (columns 1-2, guarded by D1,
D2, P1, P2) and a right half (columns 3-4, guarded by D3, D4, P3, P4). The decoder
compares the two sums

```
left  = SD1 + SD2 + SP1 + SP2
right = SD3 + SD4 + SP3 + SP4
```

and chooses region 1 if `left > right` (errors in the left half), region 2 if
`left < right` (errors in the right half), and region 3 if they are equal (one error
in each half, or no data error).

**Locating the bits.** This part is the design's own rule; the selection criteria above
are all the scheme fixes. The rule rests on one property of the check bits: inside one
half, the two columns feed different check classes (column 1 feeds Cr13, column 2 feeds
Cr24). So when every error lies in one half, the check syndrome is a direct map of them.

* Region 1: flip bit (r, c) of columns 1-2 wherever `SC[r][c%2]` is set.
* Region 2: the same for columns 3-4.
* Region 3: there is at most one error per half. Its column is the set parity syndrome
  of that half, its row parity is the set diagonal syndrome, and its row is the set
  check syndrome. Flip bit (r, c) where `SP[c] & SD[diag(r,c)] & SC[r][c%2]`.

**What this corrects.** It corrects every correctable pattern, checked by exhaustive
search against a brute-force decoder:

* no error: the data passes unchanged;
* all 16 single data-bit errors;
* 96 of the 120 double data-bit errors.

The other 24 pairs cannot be corrected by any decoder of this code. A pair with both
bits in rows {W, Y} (or both in {X, Z}) and in columns {1, 3} (or both in {2, 4}) has
the same syndrome as the complementary pair of that 2x2 rectangle. One example: {W1, Y1}
and {W3, Y3}. The code's minimum distance is 4, since a data bit plus its three
redundancy bits is a codeword. So it can correct one error anywhere, but not two. For
these pairs `error_o` is still raised, but the data out is wrong, and nothing marks the
pair as uncorrectable.

**Redundancy-bit errors.** A single error in any redundancy bit never changes the data:
it either selects a region whose check syndrome is empty, or lands in region 3 without
the three-way match. `error_o` is raised.

## Modules

```
crc_ecc_top            both ends of the link; channel lies outside
├── crc_encoder        data -> codeword
│   └── crc_redundancy_gen
└── crc_decoder        codeword -> corrected data, region, error flag
    ├── crc_syndrome
    │   └── crc_redundancy_gen
    ├── crc_region_select
    └── crc_corrector
crc_pkg                matrix/codeword types, region enum, diag_index()
```

Ports of the top (all plain vectors):

| port | dir | width | meaning |
|------|-----|-------|---------|
| data_i   | in  | 16 | data to send |
| code_o   | out | 32 | encoded word for the channel |
| code_i   | in  | 32 | word received from the channel |
| data_o   | out | 16 | corrected data |
| region_o | out | 2  | 1, 2 or 3 as above |
| error_o  | out | 1  | any syndrome bit set |
| flip_o   | out | 16 | data bits the corrector flipped |

Connect `code_o` to `code_i` for a loop-back link, or put the encoder and decoder of
two tops at the two ends of a channel.

## Choices made in this design

The following are not fixed by the scheme and were chosen here:

* the data bit order (W1 = bit 15) and the codeword layout above;
* even parity; the scheme allows either;
* the bit-location rule inside each region;
* the status outputs `error_o`, `flip_o` and `region_o`;
* sharing one `crc_redundancy_gen` between the encoder and the syndrome generator.

One known deviation: a published FPGA implementation of this scheme reports a 40-bit encoder
output (bits up to 39). The bit definitions only account for 32, and the decoder of
that implementation reads 32, so this RTL uses 32 bits. Reported FPGA figures
(about 5.1 ns for the encoder and 5.8 ns for the decoder) are not reproduced here.

The range types use ascending indices (`[0:3]`) so that index 0 is W, column 1, D1
and P1, matching the names above. Verilator's `-Wall` reports these as ASCRANGE style
warnings.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and carries a watchdog. Every reference value comes
from `tb/crc_ref_pkg.sv`, which is independent of the RTL. It writes each redundancy bit
as a literal XOR of named matrix bits, and it finds the expected correction by searching
all 137 error patterns of weight 0, 1 or 2.

| testbench | what it covers |
|-----------|----------------|
| tb_crc_redundancy_gen | all 65536 data words |
| tb_crc_encoder | all 65536 data words |
| tb_crc_syndrome | clean words, single-error weights, random corruption |
| tb_crc_region_select | all 256 syndrome combinations, each region seen |
| tb_crc_corrector | all 137 patterns on 200 random words, corrections in each region |
| tb_crc_decoder | all 137 patterns and 16 redundancy errors on 200 random words |
| tb_crc_ecc_top | end to end, see below |

`tb_crc_ecc_top` runs the link through a channel model:

* every data word, sent clean and with each of the 32 single-bit codeword errors;
* 2048 random words, each with all 120 double data-bit errors.

It counts each mechanism and fails if one never happens: clean pass-through, single
correction, double correction in regions 1, 2 and 3, harmless redundancy errors, and
ambiguous doubles. It runs in about two seconds.

Example with plain Verilator (from the repository root):

```
verilator --binary --timing -Irtl -Itb rtl/crc_pkg.sv tb/crc_ref_pkg.sv \
    rtl/crc_redundancy_gen.sv rtl/crc_encoder.sv rtl/crc_syndrome.sv \
    rtl/crc_region_select.sv rtl/crc_corrector.sv rtl/crc_decoder.sv \
    rtl/crc_ecc_top.sv tb/tb_crc_ecc_top.sv --top-module tb_crc_ecc_top
./obj_dir/Vtb_crc_ecc_top
```

Replace the testbench and top-module names to run another one; the block testbenches
need only the package, the reference package and the modules below them.

## Changing the design

The matrix size is fixed at 4x4 by the diagonal pattern and the region split, so
`crc_pkg` holds the sizes as constants, not module parameters. To try a different
region rule, edit only `crc_corrector`: `tb_crc_corrector` and `tb_crc_decoder` check
against the brute-force decoder, not against the current rule.
