# Programmable (n, k, m) SEC-SoddEC-SBED-DED memory ECC codec

This design is an error-correcting encoder-decoder for memory pages. One
circuit serves memories with different page lengths and data-bus widths. A
page is k bytes of m bits each, and both k and m are set at run time:
k = 2..4096 bytes and m = 1..8 bits. The codec appends a few parity bytes
while the page is written. When the page is read back it works out, in a
single pass over the bytes, whether it is clean, correctable or only
detectably corrupted. Reads from its page buffer then return corrected data.

The code is a cross-parity (row and column) code arranged so that one byte
address can be located with only about 2·log2(k) row bits. Its error classes
give the code its name:

| class | meaning | action |
|---|---|---|
| SEC-SoddEC | a single bit, or any **odd** number of bits, wrong inside **one** byte | corrected |
| SBED | an **even** number of bits wrong inside one byte | detected |
| DED | errors in two or more bytes (any two-bit error, for example) | detected |

A second, interleaved code is built from the same parts: the multi-bit-layer
code. Each data-I/O line carries its own codeword, and its symbols are m_l
consecutive bits. A burst that hits up to m_l consecutive bytes therefore
touches only one symbol of each line, and it is corrected when it flips an
odd number of bits in each line.

The top level `ecc_codec_system` holds both codecs behind one set of pins and
selects between them with `ilv`.

## The byte code

### Parity

Number the data bytes j = 0..k-1 and the bits inside a byte i = 0..m-1. Let
X = ceil(log2 k) be the number of row-parity pairs.

- **Column parity**: one byte. `C_i` is the XOR of bit i over all k bytes.
- **Row parity**: X pairs, and each pair covers whole bytes.
  - For x = 1..X, `R'_x` is the XOR of every bit of every byte whose address
    bit x-1 is 0.
  - `R_x` is the same for bytes whose address bit x-1 is 1.
  - So pair x splits the page into two halves by one address bit.

The codeword is sent in this order:

```
k data bytes | C (1 byte) | row vector, ceil(2X/m) bytes
```

The row vector is `{..., R_2, R'_2, R_1, R'_1}`: `R'_x` sits at bit 2(x-1) and
`R_x` at bit 2(x-1)+1. It is sent least significant bits first, m bits per
byte. Unused bits of the last row byte are 0.

The code length is therefore:

```
n = k + 1 + ceil(2·ceil(log2 k) / m)
```

Some settings:

| k, m | X | n |
|---|---|---|
| 256, 8 | 8 | 259 |
| 4096, 8 | 12 | 4100 |
| 63, 8 | 6 | 66 (eight codewords fill a 528-byte NAND page) |
| 100, 3 | 7 | 106 |

### Decoding

The decoder recomputes the same parity from the received data bytes and XORs
it with the received parity. This gives two syndromes:
- an m-bit column syndrome `s_col`, which is the error pattern inside the
  faulty byte;
- a 2X-bit row syndrome `s_row`.

A single faulty byte with an odd number of flipped bits upsets exactly one
bit of every row pair. The odd (`R_x`) bits of `s_row` then spell out the
faulty byte's address. The decision is:

| condition | verdict |
|---|---|
| total syndrome weight 0 or 1 | **no error**: a lone flipped bit can only be in a parity byte, and the data is good |
| `s_col` has odd weight and every used row pair has exactly one bit set | **SEC / SoddEC**: address = odd row bits, error pattern = `s_col` |
| `s_col` non-zero and even, all row syndromes 0 | **SBED** |
| anything else | **DED** |

`one_err` is the SEC/SoddEC verdict. `two_err` is SBED or DED.

When the verdict is correctable, the buffered page is read through a
corrector. It inverts the `err_bit` pattern whenever the address read equals
`err_addr`.

### Programming

| pin | meaning |
|---|---|
| `mi` (3 bits) | m - 1. Lanes above m are held at 0 and ignored. |
| `ki` (13 bits) | k in bytes. Values 2..4096 are used (1000h = 4096). Other values leave the codec idle: no output, no END. |

## Operation and timing

Everything is synchronous to `clk`, with one byte per cycle.

1. **Start a page.** Hold `clrb` low for at least one rising edge. This
   clears all parity, syndrome and verdict registers and the counter. It also
   latches nothing else: `mi` and `ki` must be held stable for the whole page.
2. **Write (encode).** Set `en_enc` = 1 and `en_dec` = 0.
   - Data byte t is applied to `din` in cycle t.
   - `enc_dout` shows codeword byte t in the same cycle, through combinational
     multiplexers: the data bytes pass straight through.
   - `ctl_o` is high while parity bytes are on `enc_dout`.
   - `page_end` (END) rises after n cycles and stays high until the next
     `clrb`.
   - Dropping the enables stalls the page.
3. **Read (decode).** Set `en_enc` = 1 and `en_dec` = 1, and feed the n
   received bytes.
   - The data bytes are written into the internal 4096 x 8 page buffer.
   - The verdict (`dec_valid`, `no_err`, `one_err`, `two_err`, `sbed`, `ded`,
     `err_addr`, `err_bit`) is registered at the edge that ends cycle n. It is
     valid from cycle n+1 until the next `clrb`.
4. **Random access.** After the verdict, put a byte address on `read_addr`.
   The corrected byte appears on `dec_dout` one cycle later, because the
   buffer read is registered.

The shared counter and parity generators run when either enable is high. The
syndrome checkers, buffer and verdict run only with `en_dec`.

## Block structure of the byte codec

```
fec_codec
├── fec_encoder
│   ├── code_length_comparator   ki -> X, ki valid
│   ├── code_length_counter      phase (DATA, COLP, ROWP, END), byte address, row-bit offset
│   ├── col_parity_gen           m flip-flops: C_i ^= din_i
│   ├── row_parity_gen           2X flip-flops: byte parity into R'_x or R_x by address bit x-1
│   └── enc_output_mux           data / column byte / row-vector slice onto enc_dout
└── fec_decoder
    ├── syndrome_generator
    │   ├── col_parity_checker   stored C byte XOR regenerated C
    │   └── row_parity_checker   stores incoming row bits at the offset, XORs with regenerated R
    ├── error_type_detector      combinational classifier (table above)
    ├── ram_buffer               4096 x 8, write port + registered read port
    └── data_corrector           inverts err_bit when the registered read address = err_addr
```

Details of the main blocks:
- **Counter.** It tracks a row-bit offset that grows by m per row byte. This
  selects which m bits of the row vector leave, with no divider. The last row
  byte is the one where offset + m >= 2X.
- **Row generator.** Each pair is fed the parity of the whole masked byte
  (XOR of its m bits), steered by one address bit.
- **Storage.** The logic uses about 124 flip-flops plus the buffer. The
  flip-flop count does not grow with k beyond the address and row widths.

## The multi-bit-layer interleaved code (`mbl_codec`, `ilv` = 1)

Here the page is viewed one data-I/O line (bit lane) at a time.
- Lane i sees the k bits `din[i]` of the k bytes.
- These bits are grouped into k_l symbols of m_l consecutive bits: symbol
  s = floor(j / m_l), position h = j mod m_l.
- Each lane is an independent copy of the byte code over its symbols:
  - m_l column bits, `C_h` = XOR of the lane's bits at position h.
  - X = ceil(log2 k_l) row pairs, chosen by the symbol-address bits.
- That is R = m_l + 2X parity bits per lane.
- They are sent as R extra bytes. Parity byte t carries bit t of every lane's
  parity column, in the order `C_0..C_{m_l-1}, R'_1, R_1, R'_2, R_2, ...`.
- A page is k = k_l·m_l data bytes followed by R parity bytes. There is no
  padding.

Examples:
- The (n_l, k_l, m_l, m) = (7, 4, 2, 4) code: 8 data bytes + 6 parity bytes
  on a 4-bit bus.
- The (66, 63, 8, 8) code for a 528-byte NAND page: 504 data bytes + 20
  parity bytes = 524 bytes.

Settings:
- `mli` = m_l - 1.
- `ki` = k_l symbols.
- `ls` = log2 of the interleave depth l (below); 0 for a single code.
- `mi` as before.
- The data, k_l·m_l·l bytes, may not exceed 4096 bytes; larger settings leave
  the codec idle.

Decoding applies the byte code's classifier to each lane separately.
- A lane whose symbol has an odd number of flipped bits is corrected:
  `err_sym[0][i]` gives the symbol and `err_pat[0][i]` the bits inside it. A
  read of byte a = `err_sym`·m_l + h then has lane i inverted where
  `err_pat[h]` is 1.
- An even number of flipped bits in one symbol, or errors in two symbols,
  makes the lane uncorrectable. `lane_sec` and `lane_unc` report each lane.
- `one_err` means at least one lane was corrected and none failed.
- `two_err` means at least one lane failed.

What this corrects, for m_l = m = 8:
- any single-byte error;
- any burst inside one aligned 8-byte symbol group that leaves an odd number
  of flipped bits in each lane.

Two random bit errors in the same lane are always detected.

Timing is the same as for the byte code, with n = k + R.

### Interleaving over l pages (`ls`)

With `ls` = 1 or 2, l = 2 or 4 independent copies of this code (codes
f = 0..l-1) are interleaved byte by byte.

- The stream holds k·l data bytes, where k = k_l·m_l.
- Data byte j belongs to code f = j mod l.
- Inside that code, the byte sits at position h = (j / l) mod m_l of
  symbol s = j / (m_l·l).
- A symbol of one code is therefore every l-th byte of an m_l·l-byte
  "symbol group". A burst anywhere inside one group touches one symbol of
  every code in every lane.
- After all the data come l parity groups of R bytes each, code 0 first.
  n = (k + R)·l.

The intended use is a data area that runs across l consecutive NAND pages.
For example, four (66, 63, 8, 8) codes cover four 528-byte pages:
- 2016 data bytes fill pages 1-3 and the first 432 bytes of page 4;
- 80 parity bytes follow;
- 16 bytes of page 4 remain unused.

Per lane this corrects an odd number of flipped bits in one 32-byte symbol
group, and it detects any two random bit errors within one code.

Verdicts are reported per code and lane:
- `code_sec[f][i]`, `code_unc[f][i]`, `err_sym[f][i]` and `err_pat[f][i]`;
- `lane_sec` and `lane_unc` OR these over the codes.

A read of byte a uses code a mod l. Its offset from the error symbol's
first byte (s·m_l·l + f), divided by l, selects the bit of `err_pat`.

l is limited to 1, 2 and 4 so that j mod l and j / l are bit selections.
`ls` = 3 leaves the codec idle.

Structure:

```
mbl_codec
├── mbl_counter            byte address, code f (wraps at l-1), h (wraps at m_l-1), symbol,
│                          parity group pf and byte index t, END
├── mbl_bit_layer x4x8     per code and lane: C_h and row pairs; emits parity bit t; captures syndromes
├── error_type_detector x4x8
└── ram_buffer             + per-lane correction on the registered read
```

## Top level `ecc_codec_system`

The top has one set of pins. Common pins:
- `clk`, `clrb`, `ilv`, `en_enc`, `en_dec`, `mi`, `mli`, `ls`, `ki`, `din`,
  `read_addr`;
- `enc_dout`, `dec_dout`, `ctl_o`, `page_end`, `dec_valid`, `no_err`,
  `one_err`, `two_err`.

Code-specific outputs:
- `sbed`, `ded`, `err_addr` and `err_bit` belong to the byte code;
- `lane_sec`, `lane_unc`, `code_sec`, `code_unc`, `err_sym` and `err_pat`
  belong to the interleaved code.

`ilv` enables only the selected codec and muxes the common outputs from it.
Change `ilv` only at a `clrb`. Each codec has its own 4096-byte buffer.

The only parameter is `DEPTH`, the buffer depth, with default 4096.

## Where this RTL departs from the document or fills gaps

**Reset.**
- The document's flip-flops have an asynchronous clear.
- Here `clrb` clears on the clock edge. It must be low across a rising edge
  to start a page.

**Pin widths and buffer.**
- `read_addr` is 12 bits. The pin list gives 10 bits, which cannot address
  4096 bytes, while the block diagram uses 12.
- The page buffer is inside the decoder, as in the block diagram. The pin
  list instead suggests external buffer pins.

**Encoding details.**
- The bit order of the row vector inside the row bytes (R'_x even, R_x odd,
  least significant first) follows the pairing of the syndrome equations. It
  reproduces the document's example waveform for k = 256, m = 8: column byte
  3C, then row bytes 1A, 2B.
- `enc_dout` is combinational from `din` during the data phase.

**Decoding details.**
- The verdict is registered one cycle after the last byte.
- Buffer reads take one cycle.

**Added outputs.** `dec_valid`, `ctl_o`, `sbed`, `ded` and the per-lane
outputs of the interleaved code are added outputs.

**Interleaved code.**
- Its decoder, its run-time settings and its correction logic are this
  design's own. The document gives only its parity equations and what it can
  correct.
- The order of the parity bits follows the document's (7, 4, 2, 4) example.
- For the l-page interleave, the document's four-page drawing numbers the
  four bytes of a group as consecutive bytes of one page. One sentence of its
  text could instead be read as taking them from four different pages. The
  drawing and the parity equations are followed.
- The order of the l parity groups and the limit l ∈ {1, 2, 4} are this
  design's choices. The drawing reserves 96 parity bytes where 80 are
  needed.

**Not built:**
- interleave depths other than 1, 2 and 4;
- data buses wider than 8 bits and pages longer than 4096 bytes (the
  document mentions growing to 16 bits and 65536 bytes);
- the memory chips and the host controller around the codec;
- the statistics software itself. A testbench measures the same kind of
  statistics on the RTL with 2000 patterns per case instead of 10^6.

**Not measured:** no gate count or clock rate has been measured against the
document's figures (about 1500 gates without the buffer, above 400 MHz).

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

The reference model is `tb/ecc_ref_pkg.sv`. It is written directly from the
parity definitions as loops over the bit array, and shares nothing with the
RTL's register structure. The interleaved code is modelled by running the
byte-code reference on each lane.

- `tb_ecc_codec_system` is the end-to-end test at default size. It runs both
  codes on the same pins:
  - byte code with (k, m) = (256, 8), (4, 4), (2, 1), (16, 8), (17, 8),
    (63, 8), (100, 3), (33, 5), (64, 8), (128, 8), (4096, 8), (1000, 7);
  - interleaved code with (7, 4, 2, 4), (66, 63, 8, 8), four (66, 63, 8, 8)
    codes over four pages, k_l = 100 with m_l = 5, k_l = 512 with m_l = 8,
    and 2-bit buses;
  - error kinds: no error, a parity-byte error, single bits, odd and even
    multi-bit errors in a byte, two-byte errors, whole-byte and in-symbol
    bursts (also across interleaved codes), and double errors in one lane.
  - It checks every codeword byte, n, the verdict cycle, the verdict, and
    every byte read back.
  - It counts each mechanism (correction, odd-bit correction, SBED, DED,
    parity-area errors, burst correction, multi-page burst correction, idle
    settings, mode switch) and
    fails if any did not occur.
- `tb_fec_codec` and `tb_mbl_codec` test each codec alone.
- The block testbenches test each block against its own small model.
- `tb_random_errors` measures error statistics on the byte codec (below).

### Error statistics

`tb_random_errors` flips p = 1..8 random bits anywhere in a codeword, 2000
times for each p, on three codes: (N, K, M) = (78, 64, 8), (144, 128, 8) and
(76, 64, 4). Each verdict and every byte read back is checked against the
reference model, and the testbench prints the share of patterns corrected,
detected, and mis-corrected or missed. It fails unless every 1-bit error is
corrected and every 2-bit error is detected.

Measured results:
- 1 bit: 100% corrected on all three codes.
- 2 bits: 100% detected on all three codes.
- 3 bits on (78, 64, 8): about 42% detected and 57% mis-corrected.
- Even p from 4 up: 99.5-100% detected. Odd p: 28-68% detected.

The document's software simulation reports 81.34% detection of 2-bit errors
on (78, 64, 8), with 17.53% mis-corrected. This RTL applies the decoding
rules of the document's Step 6: a single correctable error needs an odd-weight
column syndrome and exactly one bit in every row pair. Two flipped bits always
give an even column syndrome, or two bits in some row pair, so they are never
taken for a single error. The lower 2-bit figure is therefore not
reproduced. The 3-bit and larger figures are close to the document's.

A second pass on (78, 64, 8) flips bursts of 2 to 7 bits that are adjacent
in transfer order: byte by byte, bit 0 first, through the data, the column
byte and then the row vector. Even-length bursts are always detected and
never corrected. Bursts of 3, 5 and 7 bits are corrected in about 63%, 42%
and 21% of cases, mainly those that fall inside one byte, and detected in
15-18%. Odd bursts therefore leave fewer errors behind than even ones, as
in the published burst experiment. Its decoded error rates per channel bit
error probability are not computed here.

To simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv \
    rtl/*.sv tb/tb_ecc_codec_system.sv --top-module tb_ecc_codec_system
./obj_dir/Vtb_ecc_codec_system
```

Replace the testbench name to run any other. Each runs in a second or two
second.
