# Merged Hamming + checksum error detection and correction for a 32-bit word

A single Hamming code over a 32-bit word can repair only one flipped bit in
the whole word. A plain checksum notices many errors but can repair none, so
every error costs a retransmission. This link combines the two:

* The 32-bit word is cut into **four bytes, and each byte gets its own
  Hamming(12,8) code.** One bit per byte can be repaired, which is four bits
  per word instead of one: 4/32 = 12.5 % of the data bits instead of
  1/32 = 3.125 %.
* A **12-bit checksum of the four bytes** travels with them, protected by
  its own Hamming(17,12) code. After correction the receiver checks the bytes
  against the checksum. If they disagree, because some byte had more errors
  than its code can repair, the 13-bit `RETRANS` output goes nonzero and the
  sender is asked to resend.

Single-bit errors are therefore repaired without a resend. Heavier damage is
caught by the checksum and turned into a resend request.

Everything is combinational. There is no clock, no reset and no handshake:
outputs follow inputs after the adder and XOR-tree delays.

## Data flow

```
            datain1..4 (4 x 8 bits)
                 |            \
   4 x hamming_enc(8->12)    checksum_tx (12-bit two's complement of byte sum)
                 |                 |
                 |           hamming_enc(12->17)
        dout1..4 (4 x 12)     dout5 (17)                      edac_tx
  ================ channel: each bit XOR err1..err5 ================
        datain1..4 (4 x 12)   datain5 (17)                    edac_rx
                 |                 |
   4 x hamming_dec(12->8)    hamming_dec(17->12)
                 |                 |
        dout1..4 (4 x 8) ---> checksum_rx ---> retrans (13)
```

Extra pins `zero10` (10 bits) and `zero11` (11 bits) enter both ends. They
must be held at zero. In this RTL they are the start values of the byte adder
and of the checksum subtraction. An assertion reports any other value in
simulation.

## Codeword layout (the part to get right when interfacing)

Positions are numbered 1..N. Parity bit `H(i)` sits at position `2^(i-1)`,
and the data bits `D1, D2, ...` fill the other positions in order.

**Position 1 is the most significant bit of the codeword, and D1 is the most
significant bit of the data.** For a byte:

```
codeword bit: 11  10   9   8   7   6   5   4   3   2   1   0
position:      1   2   3   4   5   6   7   8   9  10  11  12
content:      H1  H2  D1  H3  D2  D3  D4  H4  D5  D6  D7  D8     (D1 = data bit 7)
```

* `H1 = D1^D2^D4^D5^D7`
* `H2 = D1^D3^D4^D6^D7`
* `H3 = D2^D3^D4^D8`
* `H4 = D5^D6^D7^D8`

Every parity bit gives even parity over the positions whose index has its
bit set. The 17-bit checksum word uses the same rule with five parity bits at
positions 1, 2, 4, 8 and 16; position 16 covers only position 17.

In general the number of parity bits `r` is the smallest one with
`2^r >= m + r + 1`, where `m` is the number of data bits. `edac_pkg::parity_count`
computes it, so the encoder and decoder also work for other widths.

Reference vectors:

| data | codeword |
|---|---|
| byte `8'hFF` | `12'hEEF` |
| byte `8'h1A` | `12'h92A` |
| checksum `12'hC04` (bytes FF FF FF FF) | `17'h05208` |

## Checksum and RETRANS

* **Transmitter:** `checksum = (0 - (b1+b2+b3+b4)) mod 4096`, the two's
  complement of the byte sum in 12 bits. Four `FF` bytes (sum 1020) give
  `C04`.
* **Receiver:** `RETRANS = ((0 - checksum) mod 4096) - (d1+d2+d3+d4)`,
  computed in 13 bits.
  * `checksum` is the corrected checksum and `d1..d4` are the corrected bytes.
  * The first term is the byte sum the sender saw. The result is zero exactly
    when the received sum matches it.
  * A nonzero value is the 13-bit two's-complement difference.

## Decoder policy for syndromes that name no data bit

The decoder computes the syndrome, which is the XOR of the indices of all
positions holding a 1:

* **Zero:** the data passes through.
* **A data position:** that bit is inverted.
* **A parity position** (1, 2, 4, 8, ...) **or an index past the end of the
  codeword:** the decoder outputs **all zeros**.

The last rule is the parameter `ZERO_ON_NON_DATA_SYNDROME = 1`, the default.
It reproduces the original design's published burst-error result:

| received | `12'hAB1` | `12'hEE7` | `12'hCDE` | `12'hAFD` |
|---|---|---|---|---|
| decoded | `00` | `FF` | `6E` | `00` |

With the checksum word `05208` this gives `RETRANS = 13'h028F`. A textbook
decoder would instead deliver `D1` and `FD`, because those syndromes (4 and
1) name parity bits.

The consequence: an error on one parity bit of a byte destroys that byte,
and the link asks for a resend. A textbook decoder would simply ignore that
error. Set the parameter to 0 (in `hamming_dec`) for textbook behaviour. The
checksum still catches anything the Hamming stage gets wrong, except a
corruption that leaves the byte sum unchanged.

What the link guarantees:

* Up to one flipped bit in each byte codeword, plus one in the checksum
  codeword, is repaired, and `RETRANS` stays 0. This holds except that, with
  the default policy, a flip on a byte's parity bit zeroes that byte and so
  raises `RETRANS` (unless the byte was already zero).
* Two flips in a byte codeword always give a nonzero syndrome (the code's
  minimum distance is 3); three or more may not. Such a byte is miscorrected
  or zeroed, and then caught by the checksum unless the sum happens to
  match.
* A corrupted checksum codeword with more than one error can also raise
  `RETRANS`.

## Modules

| file | what it is |
|---|---|
| `rtl/edac_pkg.sv` | widths (4 bytes, 8/12/17-bit words, 10/11-bit seeds, 13-bit RETRANS) and helper functions for parity count, data positions and parity masks |
| `rtl/hamming_enc.sv` | encoder, `DATA_W` = 8 (default) or 12 |
| `rtl/hamming_dec.sv` | decoder with syndrome, correction and status outputs; `DATA_W`, `ZERO_ON_NON_DATA_SYNDROME` |
| `rtl/checksum_tx.sv` | byte sum and 12-bit checksum |
| `rtl/checksum_rx.sv` | RETRANS computation |
| `rtl/edac_tx.sv` | transmitter: pins `datain1..4`, `zero10`, `zero11` in; `dout1..4` (12 bits), `dout5` (17 bits) out |
| `rtl/edac_rx.sv` | receiver: pins `datain1..4` (12 bits), `datain5` (17 bits), `zero10`, `zero11` in; `dout1..4` (8 bits), `retrans` (13 bits) out |
| `rtl/merge_edac_top.sv` | transmitter and receiver joined by an XOR channel (`err1..err5` inputs); the sent words are also brought out as `tx_dout1..5` |

The decoder's status outputs (`syndrome_o`, `corrected_o`, `nonzero_o`) are
not pins of the receiver. Bring them out of `edac_rx` if a system needs
per-byte error statistics.

## Where this RTL departs from, or fills in, the original design

* **Checksum rule.** The original text describes the checksum as
  "maximum minus value", a one's complement. The published transmitter output
  for four `FF` bytes (`17'h05208`) only decodes to a two's complement
  (`C04`, not `C03`), so the two's complement is used.
* **RETRANS formula.** The original gives RETRANS's width (13 bits) and
  example values but not its formula. The subtraction above is the simplest
  rule that gives both published values (0 and `028F`).
* **The `1A` example.** For four `1A` bytes the original shows an earlier,
  12-bit version of the transmitter output (`B38`) that fits no checksum rule
  consistent with the `FF` case. This RTL sends checksum `F98`, Hamming-coded
  as `17'h1FF30`; the byte codewords `92A` do match.
* **Zero seed pins.** Their purpose is not explained beyond "initial value,
  always zero"; using them as adder seeds is this design's choice.
* **No clock.** The pin lists have no clock, and the I/O counts of the
  original FPGA build equal the data pins exactly, so the circuit is
  combinational. Register the outputs externally if timing requires it.
* **Retransmission.** The resend loop itself, which repeats the word when
  `RETRANS != 0`, is not hardware described here. `retrans` is an output for
  the surrounding protocol to act on.
* **Channel model.** The `err` inputs of the top are this design's way of
  injecting transmission errors.

## Simulation

Each testbench is self-checking, ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. They share a reference
model, `tb/edac_ref_pkg.sv`. It writes the encoders out as explicit parity
equations and decodes by nearest-codeword search over all data words rather
than by syndrome, so it is independent of the RTL's structure.

| testbench | covers |
|---|---|
| `hamming_enc_tb` | all 256 bytes and all 4096 checksum values, plus the reference vectors |
| `hamming_dec_tb` | every byte with no error, with each single-bit error and with random double errors; checks status flags, the published received words, and the textbook mode |
| `checksum_tx_tb`, `checksum_rx_tb` | checksum arithmetic, the `028F` case, and that a corrupted byte is always flagged |
| `edac_tx_tb`, `edac_rx_tb` | each side alone; `edac_rx_tb` replays every row group of the published results table (clean word, 1..4 corrected bytes, burst) |
| `edac_accuracy_tb` | noisy line: every one of the 65 line bits flips independently at 0.1 %, 1 % or 3 %, 4000 words each. It reports words delivered, flagged for resend, and delivered wrong without a flag. With the default seed the silent failures are 0, 0 and 1 word of 4000; the test requires at least 98 % delivered or flagged, and every pattern with at most one data-position flip per codeword delivered |
| `merge_edac_top_tb` | 3000 random words end to end; error classes: clean, 1..4 single-bit byte errors, checksum-word error, parity-bit error, burst. Counts each class and fails if one never occurs. Runs at the design's only size in well under a second. |

Run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/edac_pkg.sv tb/edac_ref_pkg.sv tb/merge_edac_top_tb.sv \
    --top-module merge_edac_top_tb -o sim
./obj_dir/sim
```

To lint one module, pass the package followed by the module:
`verilator --lint-only -Wall -Irtl rtl/edac_pkg.sv rtl/edac_rx.sv`. The
only warnings are unused package constants.
