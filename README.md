# Position-XOR Hamming (17,12) encoder and single-error corrector

This is a small forward-error-correction codec. A sender protects a 12-bit word
with 5 check bits so that the receiver can find and repair one flipped bit
without asking for the word again. The check bits are not built from parity
equations written out by hand. They come from one rule: **XOR together the
position numbers of all the bits that are 1.** The receiver applies the same rule
to what it got. A result of 0 means the stream is consistent. Any other result
is read as a number, and that number is the position of the wrong bit.

The RTL is plain combinational SystemVerilog, with no clock and no state. Its
widths are parameters, with defaults of 12 data bits and 5 check bits.

## The stream layout

The 17-bit stream has positions 1 to 17. Stream bit `i` (0-based) is position `i+1`.

```
position : 17  16  15  14  13  12  11  10   9   8   7   6 | 5   4   3   2   1
content  : D12 D11 D10 D9  D8  D7  D6  D5  D4  D3  D2  D1 | H5  H4  H3  H2  H1
vector   : enc_out[16] .......................... enc_out[5] | enc_out[4] ... [0]
```

The data bits occupy the top positions and the check bits ("Hamming bits")
H1..H5 occupy positions 1..5. So `enc_out = {data, H}`. This is not the textbook
Hamming layout, in which check bits sit at the power-of-two positions 1, 2, 4,
8 and 16. That difference explains all of the code's odd corners, described
below.

The number of check bits `n` for an `m`-bit word is the smallest `n` with
`2^n >= m + n + 1`. With that many bits, every position of the stream, plus the
value 0 for "no error", has its own code. For m = 12 this gives n = 5:
2^4 = 16 < 17, and 2^5 = 32 >= 18. The package function
`hamming_pkg::min_ham_bits(m)` computes the same count.

## Encoding (`hamming_enc`)

`H = XOR of the position numbers p (6..17) of every data bit that is 1.`

Example: the word `1001_1001_1001` has ones at positions 6, 9, 10, 13, 14 and 17:

```
 6 = 00110
 9 = 01001  -> 01111
10 = 01010  -> 00101
13 = 01101  -> 01000
14 = 01110  -> 00110
17 = 10001  -> 10111   = H5..H1
```

The stream sent is `1001_1001_1001_10111`. In hardware this is a fixed XOR tree
of 5 outputs. Output bit j takes every data bit whose position has bit j set.

## Checking and correcting (`hamming_dec`)

The receiver computes

`err_pos = H_received XOR (XOR of the positions of every received data bit that is 1)`

and inverts the stream bit at position `err_pos`. When `err_pos` is 0, nothing
is inverted. Continuing the example, suppose position 6 arrives as 0. The check
then gives `10111 ^ 9 ^ 10 ^ 13 ^ 14 ^ 17 = 00110 = 6`. Bit 6 is complemented
and the original stream comes back.

### What it corrects, and what it does not

This is the part to understand before using the code. A flipped bit changes the
check by a fixed amount:

| flipped bit          | change to err_pos  | what the decoder does                          |
|----------------------|--------------------|------------------------------------------------|
| data bit at p = 6..17| p                  | inverts position p: **corrected**              |
| H1                   | 1                  | inverts position 1 = H1: corrected             |
| H2                   | 2                  | inverts position 2 = H2: corrected             |
| H3                   | 4                  | inverts position 4 = H4: H3 and H4 now wrong, data intact |
| H4                   | 8                  | inverts position 8 = D3: **data corrupted**    |
| H5                   | 16                 | inverts position 16 = D11: **data corrupted**  |

A flipped data bit is therefore always repaired. A flipped check bit is
reported through `err_flag`, but for H3, H4 and H5 it points at the wrong
position. The code can correct one error, and only when that error is in the
data part of the stream. The RTL keeps this behaviour as the design defines it
and does not mask it.

With two flipped bits, the two changes XOR together. Sometimes the result is a
valid position, and then a good bit is inverted. Sometimes it lies beyond 17; then
the decoder inverts nothing, which is this implementation's choice. D3 together
with H4, or D11 together with H5, cancel to 0 and go unnoticed. The code gives no
double-error detection.

## Modules

| file | role |
|------|------|
| `rtl/hamming_pkg.sv`   | default sizes, `min_ham_bits()` and `ham_bits_ok()` |
| `rtl/hamming_enc.sv`   | encoder: `encoder_in[DATA_BITS]` -> `encoder_out[DATA_BITS+HAM_BITS]` |
| `rtl/hamming_dec.sv`   | checker/corrector: `decoder_in` -> `decoder_out`, `err_pos[HAM_BITS]`, `err_flag` |
| `rtl/hamming_codec.sv` | top: one encoder (`encoding`) and one decoder (`decoding`) |

The top holds both ends of a link: the sending end and the receiving end. The
channel between them is not part of the design. `enc_out` leaves the top and
`dec_in` enters it, so a system or a testbench can connect them directly or
corrupt bits on the way. The top also provides `dec_data`, the 12 data bits of the
corrected stream, together with `err_pos` and `err_flag`.

**Parameters:** each module has `DATA_BITS` (default 12) and `HAM_BITS`
(default 5). An elaboration-time `$error` rejects any pair that breaks
`2^n >= m + n + 1`. The code is meant for words of 4 to 20 bits, which need 3, 4
or 5 check bits (n = 3 for m = 4; n = 4 for m = 5..11; n = 5 for m = 12..20). All
of these sizes are tested.

**Timing:** every path is combinational. The outputs settle one propagation
delay after the inputs change. No path has a clock, reset or handshake.
Synthesized, the codec is an XOR tree of about 12 inputs per side, plus a
5-to-17 decoder that drives the correcting inverters. Register it on either
side as the surrounding design needs.

## Departures and choices

- Both the encoder and the decoder are purely combinational. The reference
  simulation drives them from a clocked testbench, but the codec itself has
  no clock.
- For correction, the design complements the bit that `err_pos` points at.
- `err_pos` and `err_flag` are outputs. In the reference decoder, the check
  result is an internal signal and only the corrected stream is an output.
- The decoder leaves the stream unchanged when `err_pos` is larger than the
  stream length.
- The 4..20-bit range applies to the word length. It is documented, and the
  sweep testbench covers it, but the RTL does not enforce it. Only the
  check-bit rule is enforced.

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and has a watchdog.

- `tb/hamming_enc_tb.sv`: the worked example, the walking-one words of the
  reference waveforms, and all 4096 words. The reference computes each check
  bit as the parity of the data bits whose position has that bit set.
- `tb/hamming_dec_tb.sv`: the worked examples, the single-one streams from the
  reference waveforms (including the H3/H4/H5 cases in the table), and every
  word with no error and with each of the 17 single-bit errors (73,735 checks).
- `tb/hamming_codec_tb.sv`: an end-to-end test at the default size. It uses a
  clock that paces one vector per cycle, a walking one, the loopback of every
  word with every single-bit error, and 2000 random double errors. It counts
  each case: clean stream, data bit corrected, H1/H2 corrected, H3..H5 moved,
  and double error in range or out of range. It fails if any case never
  occurs.
- `tb/hamming_width_sweep_tb.sv`: builds the codec for every word length from 4
  to 20 bits and checks the check-bit count, encoding, and the correction of
  every single data-bit error on random words.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/hamming_pkg.sv rtl/hamming_enc.sv rtl/hamming_dec.sv rtl/hamming_codec.sv \
  tb/hamming_codec_tb.sv --top-module hamming_codec_tb
./obj_dir/Vhamming_codec_tb
```

Swap in another testbench file and `--top-module` name to run the others. Each
run takes well under a second.
