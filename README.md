# MP3 (MPEG-1 Layer III) decoding core in SystemVerilog

This core turns an MPEG-1 Layer III byte stream into 16-bit PCM and an I2S
serial output, entirely in hardware. It decodes one channel at a 44.1 kHz
sample rate. It is organised for a small FPGA:

- one 576-word memory holds the granule being decoded, and every processing
  stage works on it in place, one stage after another;
- one multiplier is shared by the requantizer, the alias-reduction stage and
  the IMDCT;
- a simple controller starts each stage in turn and hands it the memory and
  the multiplier.

With a 24 MHz clock, a granule (576 output samples, 13.06 ms of audio) takes
about 31,000 cycles to decode. The real-time budget is 313,469 cycles, so the
core runs about ten times faster than needed. An output FIFO smooths the
granule-sized bursts into a steady 44.1 kHz stream.

## Data flow

```
 bytes ──► synchronizer ──► bit reservoir ──► huffman ──┐
            │ side info                                  ▼
            ▼                               ┌──── main memory (576 x 32) ────┐
        controller ── stage ──►  requantizer → reorder → antialias → imdct → filterbank
                                  └─────── shared multiplier ──────┘           │ PCM
                                                                               ▼
                                              I2S (bclk, ws, sd) ◄── FIFO (1024 x 16)
```

For each frame, the **synchronizer** does the following:

1. It finds the sync word and checks the header. MPEG-1, Layer III, a legal
   bitrate and 44.1 kHz are required; any other header is rejected with a
   `bad_header` pulse.
2. It skips the CRC word if there is one.
3. It parses the side information of both granules.
4. It copies the frame's main data into the **bit reservoir**, a 2048-byte
   circular buffer.

Main data of a frame may start up to 511 bytes before the frame itself
(`main_data_begin`). The controller therefore computes each granule's first
bit as follows:

- granule 0: `8 × (frame's first reservoir byte − main_data_begin)`;
- granule 1: granule 0's start plus granule 0's `part2_3_length`;
- for a stereo stream, granule 1 also adds channel 1's `part2_3_length`,
  because channel 1 is skipped.

The **controller** then runs, for granule 0 and then granule 1:

```
HUFF → REQ → REORD → ALIAS → IMDCT → FBANK
```

Each stage gets a one-cycle `start` and answers with `done`. After the second
granule, `frame_done` lets the synchronizer accept the next frame. Back-pressure
works in two places:

- a stalled filterbank, which waits when the FIFO is full, stalls the whole
  chain;
- the synchronizer holds `in_ready` low while a frame is being decoded.

## Number formats

| Quantity | Format |
|---|---|
| Main memory words | signed 32-bit. Integers from the Huffman stage; afterwards fixed point with 20 fraction bits, so the range is ±2048 and saturating. |
| Coefficients (gain correction, alias constants, IMDCT cosines and windows, window D) | signed 20-bit with 18 fraction bits |
| Lee DCT coefficients 1/(2cos) | 14 fraction bits (the largest is about 10.2) |
| `|is|^(4/3)` table | 1024 × 24 bits, 10 fraction bits |
| PCM | 16-bit, saturated; full scale ±1.0 of the filterbank output |

Every constant table except two is computed during elaboration with `$cos`,
`$sqrt` and `$pow` in constant functions: the 4/3-power table, the gain
correction, the alias-reduction constants, the IMDCT cosine table and the
reorder map. Nothing is read from files.

## The stages

### Huffman decoder (`huffman.sv`)

A state machine reads the scalefactors first, then the Huffman data:

- **Scalefactors:** long, short or mixed layout, with `slen1`/`slen2` chosen
  by `scalefac_compress`. In granule 1 it reuses granule 0's values for every
  scfsi group whose bit is set.
- **Big-values:** pairs decoded with the table of their region. A value of 15
  in a table with linbits is an escape: the linbits are added to it.
- **Count1:** quadruples decoded with table A or B until `part2_3_length` is
  used up. A quadruple that would run past the budget is dropped.
- **Rzero:** the remaining lines are zero-filled.

Results go to the main memory as signed integers. The scalefactors stay in
registers for the requantizer.

**The code tables are not built in.** They live in a loadable 4096 × 16
tree RAM:

- Word *t* (0..31) holds the root address of big-values table *t*.
- Words 32 and 33 hold the roots of count1 tables A and B.
- A node is two consecutive words; the next stream bit picks one of them.
- A word with bit 15 set is a leaf: x in [7:4] and y in [3:0], or v w x y in
  [3:0] for count1.
- Any other word is the address of the next node.
- Table 0 (and the unused numbers 4 and 14) decode to zeros without reading
  bits. Linbits per table are built in.

Load the ISO/IEC 11172-3 tables through `tbl_we/tbl_addr/tbl_wdata` after
reset. `tb/tb_huffman.sv` shows how to build such trees from (code, length,
value) lists. The RAM has one cycle of read latency, so decoding costs two
cycles per code bit.

### Requantizer (`requantizer.sv`)

It computes `xr = sign(is)·|is|^(4/3)·2^(E/4)`:

- E combines `global_gain − 210`, the subblock gain, the scalefactor (times 2
  or 4) and `pretab` when `preflag` is set.
- `|is|^(4/3)` comes from a 1024-entry table. Values of 1024 and above are
  divided by 8, looked up, and multiplied by 16; this is exact for multiples
  of 8 and accurate to about 0.1 % otherwise.
- `E mod 4` selects a gain-correction factor 2^(k/4), applied on the shared
  multiplier.
- `floor(E/4)` becomes a saturating barrel shift.

A line counter and a window divider track the scalefactor band and the short
window of each line. The stage takes 3 cycles per line, 1728 per granule.

### Reorder (`reorder.sv`)

This stage runs only for granules with short blocks. Short blocks arrive
ordered band → window → frequency; the IMDCT needs subband → frequency →
window. The stage copies the granule into its own 576-word memory and writes
it back through an address ROM. The ROM holds two maps, pure short and mixed,
and both are computed from the 44.1 kHz band table. A short granule takes
1154 cycles; any other granule returns `done` at once.

### Alias reduction (`antialias.sv`)

At every subband boundary it applies eight butterflies:

```
lo' = lo·cs − hi·ca
hi' = hi·cs + lo·ca
```

Each butterfly reads 2 lines, does 4 multiplications on the shared
multiplier, and writes 2 lines, in 8 cycles. Pure short blocks are skipped.
Mixed blocks process only the boundary between subbands 0 and 1.

### IMDCT (`imdct.sv`)

- **Long blocks:** each subband's 18 lines produce 36 samples. Only outputs
  0..8 and 18..26 are computed by multiply-accumulate. The others follow from
  `x[17−i] = −x[i]` and `x[53−i] = x[i]`.
- **Short blocks:** three 12-point transforms are placed at offsets 6, 12 and
  18 of the 36 outputs.
- **Windows:** normal, start, stop or short sine windows are applied.
- **Overlap:** the first half is added to the second half saved from the
  previous granule; the new second half is saved in a 576-word overlap
  memory.
- **Frequency inversion:** odd samples of odd subbands are negated here.

All cosines and window sines are multiples of π/72, so one 144-entry table
serves both. A long granule takes about 12,700 cycles. The overlap memory is
cleared for 576 cycles after reset.

### Synthesis filterbank (`filterbank.sv`)

For each of the 18 time slots of a granule, the filterbank does three things:

1. **DCT.** It computes the 32-point DCT of the 32 subband samples with Lee's
   recursive algorithm. Five split levels (`g = x_k + x_(L−1−k)`,
   `h = (x_k − x_(L−1−k))/(2cos(π(2k+1)/2L))`) are followed by five
   recombination levels (`X_2n = G_n`, `X_2n+1 = H_n + H_(n+1)`).
2. **V vector.** It maps the 32 DCT outputs to the 64-value vector V by
   symmetry and writes it into a 1024-word ring buffer. The buffer holds the
   last 16 vectors, and its base address moves by 64 for each new vector.
3. **PCM.** It forms 32 PCM samples, each a 16-term sum of window D times
   buffered V values.

The filterbank has its own multiplier.

**Window D is not built in.** It is a loadable 512 × 20-bit RAM
(`d_we/d_addr/d_wdata`, 18 fraction bits); load the standard's table after
reset. The V memory is cleared for 1024 cycles after reset (`init_busy`).

The filterbank takes about 16,000 cycles per granule when the FIFO does not
stall it.

### Output FIFO and I2S (`output_fifo.sv`, `i2s_interface.sv`)

The FIFO holds 1024 16-bit samples, which covers a granule's 576 samples with
margin. The I2S transmitter divides the system clock by 544 into 32 bit slots
of 17 clocks, so a 24 MHz clock gives a 44.118 kHz word clock.

- Each sample is sent MSB first, on both the left and the right channel.
- The serial data changes one bit after `ws` changes (standard I2S).
- When the FIFO is empty, a zero word is sent and `underflow` pulses.

## Top-level interface (`mp3_decoder_top.sv`)

| Port | Meaning |
|---|---|
| `in_valid/in_data/in_ready` | MP3 byte stream |
| `tbl_we/tbl_addr/tbl_wdata` | Huffman tree RAM load port |
| `d_we/d_addr/d_wdata` | synthesis window load port |
| `i2s_bclk/i2s_ws/i2s_sd` | I2S output |
| `pcm_valid/pcm_data` | copy of each sample entering the FIFO |
| `bad_header`, `underflow` | event pulses |
| `granules_done`, `stage_code`, `init_busy`, `bit_pos`, `fifo_level`, `sample_tick` | status |

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `RES_BYTES` | 2048 | bit reservoir size |
| `TBL_DEPTH` | 4096 | Huffman tree RAM size |
| `FIFO_DEPTH` | 1024 | output FIFO size |
| `I2S_DIV` | 544 | system clocks per I2S frame |

## Where this design departs from the reference architecture

- **Tables are loaded at run time.** The Huffman code tables and window D of
  ISO/IEC 11172-3 are loaded after reset. The reference design keeps them in
  initialised block RAM. Until they are loaded, the core cannot decode a real
  stream.
- **Smaller 4/3-power table.** The table has 1024 entries with the
  divide-by-8 rule for larger values, rather than one entry for each of the
  8192 possible inputs.
- **Frequency inversion** is done in the IMDCT stage.
- **Mono only.** Channel 0 of a stereo stream is decoded, and channel 1 is
  skipped. There is no joint-stereo processing.
- **44.1 kHz only.** Other sample rates are rejected as bad headers.
- **CRC.** The CRC word is skipped and not checked.
- **Own choices** for details the reference leaves open: widths, handshakes,
  state encodings, the controller's strict stage order, the I2S slot layout
  and the reset clearing of the overlap and V memories.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

- compares against values worked out independently, mostly floating-point
  models;
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_synchronizer` | garbage, a rejected Layer II header, a mono frame with padding and a stereo frame with CRC; every side-info field and every main-data byte |
| `tb_bit_reservoir` | bit order and wrap-around |
| `tb_huffman` | encodes its own granules (long, short, mixed, scfsi reuse, linbits, count1 overrun) and checks all lines and scalefactors |
| `tb_requantizer` | long, short and mixed blocks against the formula, plus 3 cycles per line |
| `tb_reorder` | pure short, mixed and long granules |
| `tb_antialias` | long, mixed and short granules |
| `tb_imdct` | all block types with overlap across granules |
| `tb_filterbank` | a direct 64×32 matrixing model, random window D, random output stalls |
| `tb_output_fifo`, `tb_i2s_interface`, `tb_main_mem`, `tb_shared_mult`, `tb_controller` | their own blocks |
| `tb_mp3_decoder_top` | end to end at default parameters (below) |

`tb_mp3_decoder_top` runs the whole core at its default parameters:

1. It loads Huffman trees and a random window D.
2. It encodes a stream itself: garbage, a rejected header, and three
   48 kbit/s frames. The middle frame is stereo, and its channel-1 bits must
   be skipped. The six granules have block types normal, short, start, stop,
   normal and empty. Two of the frames borrow reservoir bytes from earlier
   frames.
3. It compares every PCM sample with a floating-point model of the whole
   chain, to within 64 LSB + 1 %. It also checks the words rebuilt from the
   I2S pins against the FIFO output.
4. It requires each mechanism to happen at least once: header rejection,
   linbits escapes, count1 quadruples, a short block, block-type switches,
   reservoir reuse, a skipped stereo channel, FIFO-full stalls, I2S underflow
   and six finished granules.
5. It measures decode cycles per granule.

It runs in a few seconds.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/mp3_pkg.sv rtl/*.sv \
    tb/tb_mp3_decoder_top.sv --top-module tb_mp3_decoder_top -Mdir obj -o sim
./obj/sim
```

The end-to-end test uses stand-in tables (table 1 and the count1 tables of
the standard, plus an 8-bit fixed-length code in place of table 24) and a
random window. It has therefore not been run on a real MP3 file with the
full standard tables.
