# Double-error and 4-bit-burst correcting codecs for 32-bit memory words

Memories in scaled technologies see multiple-bit upsets. A particle strike can flip two bits
of a word, or a short run of neighbouring cells. A plain SEC-DED code then detects the error
but cannot repair it. Classical double-error-correcting codes such as BCH have slow,
large parallel decoders. Orthogonal Latin Square (OLS) codes decode fast, but a 32-bit word
needs 21 to 23 check bits. This RTL implements two combinational codecs for 32-bit words:

* **DEC codec.** It corrects any one or two bit errors in a 51-bit code word: 32 data bits
  plus 19 check bits. The main idea is to reuse the one short double-error-correcting code
  that has a one-step majority-logic decoder, the (21,11) Difference Set (DS) code. That
  code protects the XOR of three data blocks. Cheap SEC-DED codes on two of the blocks then
  show which block the errors are in.
* **Burst codec.** It corrects any burst of up to 4 adjacent flipped bits in a 48-bit code
  word: 32 data bits plus 16 check bits. It does this by four-way interleaving of
  single-error-correcting Hamming codes.

Both codecs are purely combinational. They have no clock and no reset. An encoder's code
word goes into the memory array, which is not part of this design. The word read back goes
into the decoder, and corrected data come out in the same cycle.

## The DEC code word

| bits   | field | content |
|--------|-------|---------|
| 0..31  | `data` | d1..d32 (d1 is bit 0) |
| 32..36 | `pa`  | Hsiao SEC-DED check bits of block 1 |
| 37..41 | `pb`  | Hsiao SEC-DED check bits of block 2 |
| 42..50 | `pd`  | (20,11) DS check bits of X = block1 ^ block2 ^ block3 |

The word is cut into three blocks:

* block 1 = d1..d11 (bits 0..10);
* block 2 = d12..d22 (bits 11..21);
* block 3 = d23..d32 (bits 22..31), with a zero added on top to make 11 bits.

`ecc_pkg::dec_cw_t` is this layout as a packed struct.

### SEC-DED part (`secded_enc`, `secded_dec`)

This is a (16,11) Hsiao code. Its 11 data columns are the ten 5-bit vectors of weight 3,
in increasing order (7, 11, 13, 14, 19, 21, 22, 25, 26, 28), followed by 31. The check bits
have unit columns. The decoder computes the 5-bit syndrome and reads it as follows:

* zero syndrome: no error;
* odd weight: a single error, so `sec` is set. If the syndrome equals a data column, that
  bit is set in the correction vector `corr`.
* even weight, non-zero: two errors, so `ded` is set.

The decoder only produces the correction signal. It does not correct the data itself.

### DS part (`ds_enc`, `ds_dec`)

The set {0, 2, 7, 8, 11} is a perfect difference set modulo 21: every non-zero residue is a
difference of two of its members exactly once. Its 21 cyclic shifts are the "lines" of a
projective plane. Any two positions share exactly one line. Taking the lines as parity
checks gives a cyclic (21,11) code with generator polynomial

    g(x) = 1 + x^3 + x^4 + x^6 + x^8 + x^10

The encoder is systematic. The 11 data bits go to positions 10..20, and the remainder of
x^10·d(x) mod g(x) goes to positions 0..9. `ds_enc` unrolls this polynomial division into
XOR logic.

One check bit (position 0) is then dropped, giving a (20,11) code with 9 check bits,
`pd[0..8]` = positions 1..9. Each position lies on 5 lines, but the line through position 0
can no longer be evaluated. That leaves every data position with 4 check sums that meet
only in that position.

With at most two errors:

* a wrong bit fails at least 3 of its 4 check sums, because the other error can spoil at
  most one of them;
* a correct bit fails at most 2.

`ds_dec` therefore sets a bit of its correction signal when 3 or more of the bit's check
sums fail. This is one-step majority-logic decoding: one level of XOR trees and a vote per
bit. The shortened code still corrects two errors, but it no longer detects three.

The 21 line masks and the 11 vote masks are built at elaboration by constant functions in
`ecc_pkg`. The synthesized decoder is therefore only the XOR trees and the 4-input vote
logic.

### How the decoder combines them (`dec32_dec`)

This is the heart of the design. The decoder assumes at most two bit errors. It first runs
three decoders:

* SEC-DED on block 1;
* SEC-DED on block 2;
* DS on X' = block1' ^ block2' ^ block3', the XOR of the three received blocks, together
  with the received `pd`.

An error in any block shows up in X' at the same position. The DS decoder therefore
returns the XOR of the three blocks' data error patterns, as long as the errors in X' plus
the errors in `pd` number at most two. With two errors in total, they always do.

| situation | block 1 correction | block 2 correction | block 3 correction |
|---|---|---|---|
| `ded_a` = 1 (both errors in block 1 data/checks) | DS signal | none (SEC vector is 0) | none |
| `ded_b` = 1 | none | DS signal | none |
| neither DED | block-1 SEC signal | block-2 SEC signal | DS ^ SEC1 ^ SEC2 |

* **Block 1 or 2 with DED set.** That block holds both errors, so X' differs from X only by
  that block's errors, and the DS signal is exactly that block's error pattern.
* **Block 1 or 2 without DED.** The block holds at most one error, which its own SEC-DED
  code can fix.
* **Block 3.** It has no code of its own. Its error pattern is recovered by removing the
  share of blocks 1 and 2 from the DS signal. For example, one error in block 1 and one in
  block 3 give DS = e1 ^ e3 and SEC1 = e1, so block 3's correction is e3. An error in a DS
  check bit is absorbed by the DS decoder's second correction slot.

`err` is high when any of the three syndromes is non-zero. `ded_a` and `ded_b` also tell
the system that a double error was repaired.

With three or more errors nothing is detected reliably, and the decoder may miscorrect.

## The burst code (`burst_enc`, `burst_dec`, `sec_enc`, `sec_dec`)

Data bit j belongs to block j mod 4:

* block 0 holds d1, d5, d9, ...;
* block 1 holds d2, d6, ...;
* and so on.

Each 8-bit block gets 4 check bits from a shortened (12,8) Hamming code, with data columns
3, 5, 6, 7, 9, 10, 11, 12. In the 48-bit code word:

* data bit j stays at position j;
* check bit p of block b sits at position 32 + 4p + b.

So every position of block b is congruent to b mod 4. Any run of at most 4 adjacent bits
hits each block at most once, and each block's SEC decoder repairs its own bit. The four
`sec_dec` instances work in parallel. `err[b]` reports a non-zero syndrome in block b.

`burst_enc` and `burst_dec` take `DATA_W`, `WAYS` and `R` as parameters, with defaults 32,
4 and 4. `sec_enc` and `sec_dec` derive their Hamming columns for any `K` and `R` with
2^R >= K + R + 1.

Bursts longer than 4 bits, or two separate errors in one block, are not corrected.

## Modules

| module | role |
|---|---|
| `ecc_pkg` | widths, the DEC code-word struct, the Hsiao, DS and Hamming code-construction functions and tables |
| `secded_enc`, `secded_dec` | (16,11) Hsiao SEC-DED encoder and syndrome decoder |
| `ds_enc`, `ds_dec` | (20,11) DS encoder and majority-logic decoder |
| `dec32_enc`, `dec32_dec` | the 32-bit DEC codec |
| `sec_enc`, `sec_dec` | shortened Hamming SEC encoder and decoder |
| `burst_enc`, `burst_dec` | four-way interleaved burst codec |
| `dec_burst_top` | both codecs side by side |

Ports of `dec_burst_top`:

* DEC codec: `dec_data_in` → `dec_cw_out` (write path), and `dec_cw_in` → `dec_data_out`,
  `dec_ded_a`, `dec_ded_b`, `dec_err` (read path).
* Burst codec: `bst_data_in` → `bst_cw_out`, and `bst_cw_in` → `bst_data_out`, `bst_err[3:0]`.

## Where this departs from, or fills in, the original description

* The published scheme fixes these points, and the RTL follows them:
  * the 11/11/10 split;
  * SEC-DED on blocks 1 and 2 with 5 check bits each;
  * the DS-coded XOR with 9 check bits, obtained by dropping one check bit of the (21,11)
    code;
  * the DED-controlled choice between the SEC and DS signals for blocks 1 and 2;
  * four-way interleaving with four parallel SEC decoders.
* These are choices of this implementation:
  * the Hsiao matrix;
  * the difference set and the polynomial orientation;
  * which DS check bit is dropped (position 0);
  * the bit order of both code words;
  * the placement of the burst code's check bits.
* The block-3 correction rule is derived here. The original text spells out the rule only
  for blocks 1 and 2.
* Some passages describe the input as 16 bits wide. The scheme, its 11/11/10 split and its
  19 check bits only make sense for 32 bits, and 32 bits is what is built. A 16-bit value
  can be stored with the upper half zero.
* The burst scheme is named after interleaved SEC-DAEC (double-adjacent-error-correcting)
  codes, but its text protects each block with a plain SEC code. Plain SEC is what is
  built, and it is enough for 4-bit bursts with four-way interleaving.
* A second, minimum-redundancy 4-bit burst code is mentioned only in principle, with no
  matrix. It is not implemented.
* FPGA area, delay and power figures were reported for an Artix-7 device (24 LUTs and
  1.638 ns for the DEC codec, 12 LUTs and 6.99 ns for the burst codec). They were not
  reproduced. The 24-LUT figure is far below what a 51-bit double-error decoder needs, so
  those figures likely describe a smaller or partial circuit.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches use reference encoders
in `tb/ecc_ref_pkg.sv`. These are written from literal code tables, not from the RTL's
construction functions. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

* `secded_enc_tb`, `ds_enc_tb`, `sec_enc_tb`: all 2048 (or 256) inputs. `ds_enc_tb` also
  checks every code word against the 16 usable difference-set check sums.
* `secded_dec_tb`, `ds_dec_tb`, `dec32_dec_tb`: every error pattern of weight 0, 1 and 2
  over the whole code word, for several data words. For `dec32_dec_tb` that is 1327
  patterns per word.
* `sec_dec_tb`: every data word with every single error.
* `burst_dec_tb`: every burst of length 1 to 4 at every start position.
* `dec_burst_top_tb`: end-to-end write, corrupt and read through both codecs at full size.
  It counts each decoding path: SEC fix in blocks 1 and 2, a block-3 fix through the DS
  code, check-bit errors, DED in block 1 and block 2, errors split across blocks, double
  errors in block 3, and bursts of each length, including bursts across the data/check
  boundary. A quarter of the words written are 16-bit values with the upper half zero.
  A path that never occurs counts as a failure.

To simulate with Verilator 5, for example the top:

    verilator --binary --timing --assert -Irtl -Itb rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv \
        tb/dec_burst_top_tb.sv --top-module dec_burst_top_tb
    ./obj_dir/Vdec_burst_top_tb

Use the same command with another `*_tb` for a single module. Lint with
`verilator --lint-only -Wall -Irtl rtl/ecc_pkg.sv rtl/<module>.sv`.
