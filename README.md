# LCC-driven LSB steganography core for BMP images

This core hides an encrypted message in a 24-bit colour (or 8-bit greyscale)
BMP cover image by overwriting the least significant bits of its pixels. The
bits are not laid down in raster order. The image is cut into 8x8 blocks. One
linear congruential generator (LCC 1) picks the order in which blocks are
used. A second one (LCC 2) picks the order of the 64 pixels inside each block.
Only someone who knows the two seeds and generator constants can read the
pixels back in the right order. Each pixel carries k_R, k_G and k_B message
bits in its red, green and blue channel (0 to 3 bits each, for example 3/3/2 =
one message byte per pixel). A greyscale pixel carries k_R bits.

The cover BMP file and the message sit in an external 256K x 16 asynchronous
SRAM. The core reads the BMP header, then rewrites the pixel data in place,
so that after `done` the SRAM holds the stego BMP file.

The architecture follows a published FPGA design for this scheme, built
around four parts: an FSM processing unit, an SRAM controller, the LCC
generator and a data embedding unit, plus on-chip block RAM. The published
description gives the LCG recurrence, the generator's datapath, the embedding
unit's AND/OR structure and mask, the SRAM bus widths, the on-chip RAM's
ports, the BMP cover format and the names of the FSM states. This RTL chooses
the rest: the state sequence, the handshakes, the memory layout, the bit order
and all timing.
Those choices are listed under "Departures and open points" below.

## The generators and how to choose their constants

`lcg_prng` computes `X(n+1) = (A*X(n) + C) mod M` on an 8-bit state. It uses
one multiplier, one adder and one modulo unit. A 2:1 multiplexer chooses
between the seed (`load`) and that result (`step`) for the state register.
A, C and M are inputs, so one design serves both uses:

| generator | modulus M | term used as |
|-----------|-----------|--------------|
| LCC 1 (`u_lcc1`) | number of 8x8 blocks, at most 256 (M = 256 for a 128x128 image) | block number, raster order, `blk / (cols/8)` = block row |
| LCC 2 (`u_lcc2`) | 64 | pixel inside the block, `p[5:3]` = row, `p[2:0]` = column |

The first term used is the seed itself. At the start of a run LCC 2 runs for
64 terms. The result, the random key sequence, is stored in a 64 x 6 on-chip
key RAM. Every block uses its pixels in this stored order. For a full-period
generator this is the same order a free-running generator would give.

**The core only works correctly if both sequences have full period.** A
repeated block number would embed twice into the same block and overwrite
earlier bits. The core does not check this. By the Hull-Dobell theorem, a
sequence mod M has full period when all three of these hold:

- C and M are coprime.
- A-1 is divisible by every prime factor of M.
- A-1 is divisible by 4 if M is.

For M = 64 or M = 256 this means C odd and A = 1 (mod 4), for example A = 5
or 13. For 15 blocks (a 24x40 image), A must be 1 (mod 15), for example 16,
and C must be coprime to 15. The seed must be below M. LCC 2 uses only the
low 6 bits of `seed2`, `a2` and `c2`, which gives the same sequence mod 64.

At `start` the FSM copies the seeds, the generator constants and k into its
own registers. The inputs may change while a run is in progress. `bit_count`
reports how many message bits have been embedded.

## Where the bits go

- **Pixel word:** 24 bits as `{B[23:16], G[15:8], R[7:0]}`. With this order
  the keep-mask for k = 3/3/2 is `0xFCF8F8` (16578808), the constant the
  embedding unit is built around.
- **Message bits:** two message bytes per SRAM word, low byte first. Bits go
  LSB first. A pixel takes the next k_R bits into red bits 0.., then k_G bits
  into green, then k_B bits into blue.
- **Embedding:** `lsb_embed` computes `stego = (A & mask) | B`. Register A
  holds the cover pixel. Register B holds the secret bits moved to their
  positions. The mask clears the k lowest bits of each channel.
- **End of the message:** if fewer bits are left than a pixel takes, the
  missing bits are zeros (counted in `pad_count`). Pixels after that are
  copied unchanged (`copy_count`). The run stops after the current block.
- **Overflow:** if the message is longer than blocks x 64 x (k_R+k_G+k_B) bits
  (greyscale: blocks x 64 x k_R), the run stops after the last block.
  `overflow` goes high and the rest of the message is dropped.

To read a message back, run both generators with the same constants. Then
read the k LSBs of each channel in the same order, for `msg_len*8` bits. The
end-to-end testbench does exactly this.

## SRAM layout (16-bit words)

The BMP file is stored from word 0, two bytes per word: file byte 2w is the
low byte of word w, byte 2w+1 the high byte. The message is placed above it.

| address | content |
|---------|---------|
| 0x00000 ... | BMP file (up to 384 KB, must end below 0x30000) |
| 0x30000 | message length in bytes |
| 0x30001 ... | message, 2 bytes per word, low byte first (up to 65535 bytes) |

From the header the core reads the words holding `bfType` (must be "BM"),
`bfSize`, `bfOffBits`, `biWidth`, `biHeight` and `biBitCount` (must be 24 or
8). Only the low 16 bits of the 32-bit fields are used. A file that fails
either check ends the run at once with `bad_file` high and nothing written.
`file_size`, `rows` and `cols` report what was read.

Colour pixels are 3 bytes, B, G, R, and each row is padded to a multiple of 4
bytes, as in any BMP. Pixel (r,c), with r counted in file order (bottom row
first), starts at byte `bfOffBits + r * stride + 3c`, with
`stride = (3*cols + 3) & ~3`.
Half the pixels start on an odd byte and straddle two SRAM words. A pixel is
always read as two words, and written back as one full word plus one
byte-mode write of the low or high byte, so the neighbouring pixel's bytes are
never disturbed. Row padding bytes are never touched.

A greyscale pixel is one byte, at `bfOffBits + r * stride + c` with
`stride = (cols + 3) & ~3`. The palette between the header and the pixels is
left alone. Inside the core the byte takes the place of the red channel, so
the embedding unit and the bit order are the same as for colour and k_G and
k_B are ignored. Each pixel is one SRAM read and one byte-mode write.

The constants are in `rtl/stego_pkg.sv`. Rows and columns beyond a multiple of
8 are not touched. If the image has more than 256 blocks, only the first 256
in raster order are used.

## Control flow (`stego_fsm`)

The state names come from the published state diagram. The order of the
states and the conditions between them are this design's own.

1. `SIGNATURE`, `FILE_SIZE`, `DATA_OFFSET`, `COLUMN_SIZE`, `ROW_SIZE`,
   `PIXEL_BITS`: read the BMP header fields, checking the signature and the
   pixel depth (24 bits: colour, 8 bits: greyscale). `MSG_SIZE`: read the
   message length.
2. `PAD_TEST`: compute the padded row stride. `HIDE_PROCESS`: compute the
   block count. Load both generator seeds.
   `KEY_GEN`: write 64 terms of LCC 2 into the key RAM (64 clocks).
3. `NEXT_ROUND`: stop if the message is used up or every block is used.
   Otherwise take the block number from LCC 1 and step it.
4. `SECOND_ROW`: compute the byte offset of the block's first pixel.
5. `READ_W0`, `READ_W1`: copy the 64 pixels of the block into the cover-block
   RAM (2 SRAM reads each, the words holding its 3 bytes; greyscale: 1 read).
6. 64 times, in key-RAM order:
   - `PIXEL_START`: if the 32-bit bit buffer holds fewer bits than the pixel
     needs, go to `SECRET_DATA`, which reads one message word. This is a
     stall. Otherwise read the pixel from the cover-block RAM.
   - `PIXEL_BG`: load the pixel and the bits into the embedding unit, with
     the padding test.
   - `PROCESS`: write the stego pixel to the stego-block RAM at the same
     index. Read the next key from the key RAM.
7. `WRITE`, `WRITE_RD`, `WRITE_0`, `WRITE_1`: copy the stego block back over
   the cover block: one word write and one byte-mode write per pixel
   (greyscale: the byte-mode write only).
8. `STEG_END`: set `done`. Go back to `IDLE`.

## Timing

The SRAM controller takes 2 clocks from command to `read_ack` and 3 to
`write_ack`. All of its pins are registered. It is meant for 50-200 MHz with a
10 ns SRAM. Seen from the FSM, a read costs 3 clocks and a write 4. The cycle
counts are:

- **One block:** 2 + 64 x 6 (load) + 64 x 3 (embed) + 64 x 10 (store) = 1218
  clocks, plus 4 clocks per message word fetched. A greyscale block takes
  2 + 64 x 3 + 64 x 3 + 64 x 6 = 770.
- **One run:** from the clock that samples `start` to `done`, 90 + 1218 (or
  770) x blocks + 4 x words fetched. The 90 covers the seven header reads, the
  key sequence and the end of the run. A file with a wrong signature is
  rejected after 5 clocks, one with a wrong pixel depth after 20.
- **128x128 image at k = 3/3/2, 12000-byte message:** 188 blocks and 6000
  words give 253,074 clocks, 1.27 ms at 200 MHz.

The published design reports 0.8 us for the embedding of one 8x8 block. Here
the embedding phase alone is 192 clocks plus 128 for its 32 message words (k =
3/3/2): 1.6 us at 200 MHz. Moving the block through the 16-bit SRAM takes most
of the time (1024 of the 1218 clocks). This core does not reach that figure.

## Modules

| file | role |
|------|------|
| `rtl/stego_pkg.sv` | widths, BMP header and SRAM layout, `kcfg_t` (k per channel), `sram_req_t`, `keep_mask()` |
| `rtl/stego_top.sv` | top: wires everything below. Clock and SRAM pins are ports |
| `rtl/stego_fsm.sv` | FSM processing unit: sequencing, address generation, message bit buffer, counters |
| `rtl/sram_ctrl.sv` | asynchronous-SRAM controller: word and byte writes, split data bus (`dq_o`/`dq_oe`/`dq_i`) |
| `rtl/lcg_prng.sv` | linear congruential generator, run-time A, C, M |
| `rtl/dp_ram.sv` | simple dual-port RAM, registered read. Default 32 x 8; used as 64 x 6 (key sequence) and twice as 64 x 24 (cover block, stego block) |
| `rtl/lsb_embed.sv` | embedding unit: registers A and B, then AND/OR |

Not included:

- The clock PLL: the core takes `clk` as an input.
- The SRAM chip: `tb/sram_model.sv` is a behavioural model for simulation.
- The tri-state pad of the SRAM data bus: connect `sram_dq_o` and
  `sram_dq_oe` to an I/O buffer and feed the pad back into `sram_dq_i`.

## Departures and open points

- **Two generators, not three.** The published algorithm also uses one random
  sequence to scramble the message before embedding, but its hardware has two
  generators. This core expects the message already encrypted and scrambled.
- **Message not stored on chip.** The message streams from SRAM through a
  32-bit bit buffer. It is not copied into on-chip RAM first.
- **24-bit and 8-bit BMPs only.** Other depths (1, 4, 16, 32 bits) are
  rejected with `bad_file`. Compressed files and top-down files (negative
  height) are not handled: the core does not check `biCompression`, and only
  the low 16 bits of the height are used.
- **Greyscale k.** The published text speaks of 1 or 2 bits per greyscale
  pixel; k_R = 3 is accepted too.
- **No LFSR or XOR feedback.** The published text also mentions an LFSR with
  XOR feedback in the generator. Its RTL view and its equation show only the
  linear congruential datapath, which is what is built.
- **Message placement.** The published description does not say where the
  message is kept; here it is at word 0x30000, above the cover file. The core
  does not check that the file ends below it.
- **Generator constants are not checked** for full period (see above).
- **Open choices:** the bit order, padding, overflow handling and all
  latencies are this design's.
- **Reset:** every register has an asynchronous active-low reset, except the
  block RAMs.

## Verification

Each testbench checks its block against values it computes itself and ends
with `TB_RESULT checks=N failures=M`.

- `tb/lcg_prng_tb.sv`: the recurrence for random A, C and M, with M = 256 and
  M = 0. Also load priority, hold, and the full period of the constants used
  below.
- `tb/lsb_embed_tb.sv`: compared with a bit-by-bit model for all k, and the
  `0xFCF8F8` case.
- `tb/dp_ram_tb.sv`: random reads and writes in the same clock, old-data
  collisions, and `q` held while `rden` is low.
- `tb/sram_ctrl_tb.sv`: word, low-byte and high-byte writes and reads against
  the SRAM model. Also the latencies, ignored commands while busy, and OE and
  WE never low together.
- `tb/stego_fsm_tb.sv`: the FSM with the real datapath blocks around it, on
  small images, including rejected files. Also counts its SRAM commands.
- `tb/stego_top_tb.sv`: end to end at the top's default parameters. Each run
  writes a BMP file with random pixel, palette and padding bytes:

  | image | message | k | mechanism it exercises |
  |-------|---------|---|------------------------|
  | 32x32 | 100 bytes | 3/3/2 | message ends inside a block |
  | 24x42 (15 blocks) | 31 bytes | 2/2/2 | last pixel padded, row padding, unused columns |
  | 16x16 | 100 bytes | 1/1/1 | overflow |
  | 128x128 | 12000 bytes | 3/3/2 | full-size run |
  | 24x42 greyscale | 40 bytes | 3 (k_R) | greyscale, padding, row padding |
  | 16x16 greyscale | 100 bytes | 2 (k_R) | greyscale overflow |
  | wrong signature, 32 bits per pixel | - | - | rejected files |

  It compares every word of the file (header and padding included) with a
  reference embedding, extracts the message again and checks the cycle count
  formula. It also checks that each mechanism occurred: message-fetch stalls,
  padding, pixel copies, overflow, byte writes, padded rows, greyscale covers,
  rejected files, all three k settings and a block count that is not a power
  of two.
- `tb/stego_quality_tb.sv`: the image-quality workload. See the next section.

## Image quality

`tb/stego_quality_tb.sv` fills the whole capacity of a 128x128 cover with a
random message, for each of three k settings (random pixels in a 24-bit BMP).
It measures the mean square error and PSNR = 10 log10(255^2 / MSE) per
channel. With random cover LSBs and random message bits, a channel that
carries k bits should have MSE = (4^k - 1) / 6. The test requires each channel
within 5 % of that and above 30 dB.

| k (R/G/B) | MSE R / G / B | PSNR R / G / B (dB) |
|-----------|---------------|---------------------|
| 3/3/2 | 10.60 / 10.36 / 2.49 | 37.9 / 38.0 / 44.2 |
| 2/2/2 | 2.51 / 2.50 / 2.54 | 44.1 / 44.2 / 44.1 |
| 1/1/1 | 0.50 / 0.51 / 0.50 | 51.2 / 51.1 / 51.1 |

How these compare with the published 128x128 results:

- **2/2/2, and blue at 3/3/2:** they agree (about 44.0 dB there).
- **1/1/1, and red and green at 3/3/2:** the published errors are lower.
  Those messages probably filled less than the whole capacity.

To simulate one with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/stego_pkg.sv tb/stego_top_tb.sv \
          --top-module stego_top_tb -o sim && ./obj_dir/sim
```

Swap in another testbench name for the others. The end-to-end test takes
under a second.
