# LDPC-protected grey-scale image link

This RTL sends a 16 x 16 grey-scale image across a noisy channel. Each 8-bit
pixel is its own message of a small rate-1/2 low-density parity-check (LDPC)
code, so each pixel becomes a 16-bit codeword. The transmitter encodes with
the "efficient encoding" method for parity-check matrices in approximate
lower-triangular form. The receiver corrects errors with a hard-decision
bit-flipping decoder and rebuilds the image. Every single-bit error in a
codeword is corrected. A word that the decoder cannot make consistent is
flagged and counted.

It follows a published HLS design (C code synthesized with Vivado HLS). That
design gives the structure of the code, the encoder equations and matrix, the
decoding algorithm and a set of example codewords. The complete parity-check
matrix, the cycle-level behaviour and all interfaces are choices made here
(see "Departures and assumptions").

## The code

A codeword is `c = [s p1 p2]`:

- `s` is the pixel, 8 bits, most significant bit first;
- `p1` is 4 bits;
- `p2` is 4 bits.

Bit positions run 0..15 from the left. The SystemVerilog types use ascending
ranges (`logic [0:15]`), so `c[0]` is the pixel MSB and `%b` prints a codeword
in the same order as the tables below.

The 8 x 16 parity-check matrix `H` has approximate lower-triangular form with
gap g = 4:

```
        cols 0..7   8..11   12..15
  H = [    A          B        T   ]   checks 0..3    T = identity
      [    C          D        E   ]   checks 4..7
```

Over GF(2) all minus signs disappear. With `T = I` the encoding steps become:

```
p1 = phi^-1 (E A + C) s        phi = E B + D
p2 = A s + B p1
```

`phi^-1 (E A + C)` is a fixed 4 x 8 matrix, `P1_MATRIX` in `ldpc_pkg`:

```
11111011
00111010
01000001
10100001
```

`H` itself, one row per check node, is in `ldpc_pkg` (`H`, and flattened as
`H_FLAT`):

```
0001110101011000    0010111010111101
0101100010000100    1000011001010111
1110111100100010    0111001011000101
1001000011100001    0011000110101110
```

The published design does not print the full matrix. This one was chosen to
satisfy everything it does give:

- the P1 matrix above;
- `T = I`;
- column 5 equal to `10101100`, so a bit-5 error gives that syndrome, as in
  the published decoding example;
- all of these reference codewords:

| pixel | s         | p1   | p2   |
|------:|-----------|------|------|
| 0     | 0000 0000 | 0000 | 0000 |
| 1     | 0000 0001 | 1011 | 0100 |
| 2     | 0000 0010 | 1100 | 1110 |
| 50    | 0011 0010 | 1101 | 1001 |
| 175   | 1010 1111 | 1111 | 1010 |
| 255   | 1111 1111 | 1001 | 1011 |

Many matrices fit these constraints. This one was also picked so that bit
flipping corrects every single-bit error. With a different `H` the code keeps
the same P1 bits, but the P2 bits of other pixels and the decoder's behaviour
may change.

The code is linear. A testbench can therefore build any codeword by XOR-ing
together the parity bytes of the single message bits. For pixel value `1<<b`,
b = 0..7, those bytes are `B4 CE 0A C2 C1 D6 A0 9E` (hex). The testbenches
use this as their independent reference.

## Bit-flipping decoder (`bf_decoder`)

Each clock cycle runs one full iteration, with every loop unrolled into
parallel logic:

1. Compute the syndrome `S = r H^T` (`ldpc_syndrome`: eight 16-input XORs).
   If `S = 0`, stop: `r` is a codeword.
2. For each of the 16 variable nodes, count the failed checks it belongs to:
   `count[j] = sum_i H[i][j] & S[i]`.
3. Find the largest count.
4. Flip every bit whose count equals that maximum. Go back to step 1 on the
   next cycle.

The syndrome of the flipped word is checked before a result is released.
After `MAX_ITER` flips (default 8) the decoder gives up. It releases the word
as it stands, with `out_ok_o = 0`.

Example: pixel 175 received with bit 5 wrong, `1010 1011 1111 1010`. The
syndrome is `10101100`. Bit 5 is in four failed checks; every other bit is in
at most three. One flip gives `1010 1111 1111 1010`, and the next syndrome is
zero.

What it corrects, with the matrix above:

- Single-bit errors: all 16 positions are corrected. Fifteen need one flip.
  An error in bit 11 needs two.
- Double-bit errors, for any codeword (all 120 error pairs):
  - 88 reach the iteration limit and are flagged;
  - 31 converge to a different, valid codeword, so the pixel is wrong and no
    flag is raised;
  - 1 is corrected.

  This is expected of a 16-bit code with 8 parity bits.

The matrix is a parameter (`NB` columns, `MC` rows, `HM` flattened with row 0
in the top bits, `KB` leading message bits). The same decoder therefore also
runs other small codes. The decoder testbench uses this for the classic 4 x 6
illustration: received `001000` gives syndrome `1001`, and bit 2 fails two
checks and is flipped.

Handshake and timing:

- Both sides are valid/ready.
- A word is accepted when the decoder is idle, or in the cycle its
  predecessor's result is taken.
- `out_valid_o` rises `i + 1` cycles after the accepting clock edge, where `i`
  is the number of flip iterations.
- The decoder holds one word at a time. When results are taken at once, a
  word occupies it for `i + 2` cycles: 2 cycles for a clean word, 3 for a
  typical single error.

## Image path

`ldpc_image_top` holds two independent halves on one clock and one
active-low asynchronous reset.

**Transmitter (`encoder_core`).** The image is written into an `image_ram`
(256 x 8, address = row * 16 + column) through `tx_pix_*`. A `tx_start_i`
pulse then reads the pixels in address order and encodes each one in
`ldpc_encoder`, which is combinational with a registered output. The
codewords leave on `tx_cw_valid_o / tx_cw_ready_i / tx_cw_data_o`, with the
pixel index on `tx_cw_index_o`.

- The first codeword is valid two cycles after start.
- After that, one codeword leaves per cycle. A frame takes 258 cycles when
  never stalled.
- When the stream is stalled, the RAM re-reads the held address, so no pixel
  is lost.
- `tx_done_o` rises when the last codeword has been taken.

**Channel.** The channel is not part of the RTL. Whatever lies between
`tx_cw_*` and `rx_cw_*` is the channel: a loop-back, a modulator, or a
testbench that flips bits.

**Receiver (`decoder_core`).** Received words enter on
`rx_cw_valid_i / rx_cw_ready_o / rx_cw_data_i`, in pixel order.

- `rx_cw_ready_o` is low while the decoder is busy; this back-pressures the
  channel and the transmitter.
- Each decoded pixel is written to a second `image_ram` at the next address.
- After 256 pixels, `rx_done_o` rises. The recovered image is then read
  through `rx_pix_addr_i / rx_pix_data_o`, with one cycle of latency.
- Counters report, per frame:
  - `rx_words_o`: words decoded;
  - `rx_corrected_o`: words that needed a flip and ended with a zero syndrome;
  - `rx_failed_o`: words that hit the iteration limit.
- `rx_start_i` clears the counters for a new frame.

The receiver accepts at most one word every 2 cycles (every `i + 2` cycles).
A full-speed transmitter is therefore throttled by the receiver's ready
signal.

## Throughput

The source design computes decoder throughput as
`R * Fmax / (iterations * theta)`, with code rate R = 1/2 and `theta` = cycles
per iteration. Here `theta = 1`.

Counting whole words instead: with one flip per word, each 16-bit word takes
3 cycles and carries 8 pixel bits. That is about 267 Mbit/s of pixel data per
100 MHz of clock. Clean words take 2 cycles, giving 400 Mbit/s per 100 MHz.

No FPGA implementation of this RTL has been run. Its Fmax is not known, so
these figures cannot be set against the published HLS results.

## Departures and assumptions

- **Parity-check matrix**: chosen here, as described above. Only the P1
  matrix, `T = I`, the dimensions and the example values come from the
  source.
- **Iteration limit**: `MAX_ITER = 8` is this design's choice. The source
  repeats until every check passes.
- **Which bits flip**: every bit with the maximal count, the textbook
  bit-flipping rule. The source's step-by-step description flips the single
  bit with the most failed checks; the two agree whenever the maximum is
  unique.
- **Hardware style**: the source is C synthesized by HLS, with loop unrolling
  as its main optimization. This RTL is hand-written with all loops
  parallel, which matches the unrolled configuration. It has no non-unrolled
  variant.
- **Image file handling**: reading an image file into the integer matrix and
  converting the result back is host software, and not included. Pixels go
  in and out through plain memory ports.
- **Interfaces, frame control, counters and reset**: all of these are this
  design's own.

## Files

- `rtl/ldpc_pkg.sv`: code sizes, types, `H`, `H_FLAT`, `P1_MATRIX`
- `rtl/ldpc_encoder.sv`: pixel to codeword, one per cycle
- `rtl/ldpc_syndrome.sv`: `r H^T`, combinational, matrix as a parameter
- `rtl/bf_decoder.sv`: iterative bit-flipping decoder
- `rtl/image_ram.sv`: image matrix, one write and one synchronous read port
- `rtl/encoder_core.sv`, `rtl/decoder_core.sv`: the transmit and receive
  halves
- `rtl/ldpc_image_top.sv`: both halves, with the channel brought out as ports
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb_ldpc_image_top` runs a whole image end to end at the default size:
  - the testbench acts as the channel;
  - it uses clean words, single errors, bit-11 errors and unrecoverable
    double errors;
  - it also inserts random idle cycles.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It has a
watchdog that fails the run if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/tb_ldpc_image_top.sv --top-module tb_ldpc_image_top -o sim
./obj_dir/sim
```

`-Wno-fatal` is needed because Verilator warns about the ascending bit ranges,
which are used on purpose. Replace the testbench name to run another one. Every file holds one module or
package, named after the file, so `-y rtl -y tb` finds the rest. The package
must be listed first.

To change the code, edit `H` and `P1_MATRIX` in `ldpc_pkg` together. Then
update the reference parity bytes in the testbenches, which are kept
separately on purpose. The image size is the `PIXELS` parameter; the address
width follows from it.
