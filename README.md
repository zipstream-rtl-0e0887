# ZipStream: a compressed fallback bitstream for partial reconfiguration

Dynamic partial reconfiguration rewrites one region of an SRAM FPGA (a
*partition*) at run time through the Internal Configuration Access Port
(ICAP). The ICAP checks the bitstream's CRC only after the last word, so a
corrupted bitstream from external memory has already been written when the
error is reported. Worse, static routes of the rest of the design may cross
the partition, so a bad load can break logic outside it too.

ZipStream keeps, on chip, a compressed *black-box* bitstream for each
partition: a configuration with no user logic in the partition, only the
static routes that pass through it. When the ICAP reports a CRC error, the
reconfiguration controller decodes this image from a block RAM and loads it.
The partition then does nothing useful, but the static system works again
(graceful degradation). A black-box bitstream is mostly zeros, so a
run-length code followed by a single-side growing (SGH) Huffman code shrinks
it to a fraction of its size, and the decoder stays small.

The RTL here is the protected static block: the reconfiguration controller,
the hardware decompressor, and the block RAM holding the compressed images of
`NUM_PARTS` partitions (4 by default).
The ICAP, the external memory and the partition sit outside it. For the
scheme to work, these blocks and the wires between them must be placed
outside every reconfigurable partition. That is a floorplanning rule, not
logic.

## Recovery flow

`zs_reconfig_controller` is a six-state machine:

| state        | action                                                              |
|--------------|---------------------------------------------------------------------|
| `S_IDLE`     | wait for `req` with `req_len` > 0; latch `req_part`; pulse `ext_start` |
| `S_EXT`      | pass the external word stream to the ICAP, one word per clock while `icap_busy` is low; flag the last word with `icap_last` |
| `S_EXT_WAIT` | wait for `icap_done`; no CRC error: result `RES_OK`                  |
| `S_BB_START` | CRC error: pulse `dec_start`, with `dec_part` = the requested partition |
| `S_BB`       | pass decoded words to the ICAP; a decoder `dec_error` ends with `RES_FAILED` |
| `S_BB_WAIT`  | wait for `icap_done`: `RES_RECOVERED`, or `RES_FAILED` on a second CRC error |

`done` pulses for one clock with `result` valid. There is no retry after a
failed black-box load. A source feeding the ICAP must hold a word until it is
taken, and an assertion checks this. On a real device the CRC result is read
back from the ICAP. Here it is abstracted as the two inputs `icap_done` and
`icap_crc_err`.

## The compressed images

The block RAM (`zs_bitstream_bram`, 1024 x 16 bits, one 18 Kbit block RAM)
holds 16-bit *packets*. Packets `0 .. NUM_PARTS-1` form a directory: packet
`p` holds the address of partition `p`'s image. Each image is laid out as
follows, relative to that address:

| packet | content |
|--------|---------|
| +0     | number of 32-bit output words, bits 31..16 |
| +1     | number of 32-bit output words, bits 15..0  |
| +2 ... | the code bits, first bit in bit 15, last packet padded with zeros |

The code bits are made in two steps:

1. **Run-length step.** The bitstream is cut into 8-bit symbols, the first
   byte of a word being its most significant. Each symbol becomes a 9-bit RLE
   symbol `{run, value}`. `run = 0` is a literal byte. `run = 1` stands for
   `value` zero bytes (1 to 255).
2. **Huffman step.** The RLE symbols are Huffman-coded with a single-side
   growing code. No code word is longer than 12 bits.

The compressor builds a separate code for each image, so each partition has
its own LUT ROM page and group table. The compressor is software and is not
part of the RTL. The testbench package
`zs_tb_pkg` holds a small model of it. That model splits zero runs into powers
of two (2 to 128) and assigns code words of a fixed growing shape in order of
symbol frequency. It is not an optimal Huffman coder.

## Decoding the SGH code

This is the core of the design (`zs_huffman_decoder`). It decodes one code
word per clock through a loop of five parts:

```
 packets --> REG B --> REG A
               \         \
                +---------+--> {REG A, REG B} --> barrel shifter --> 12 bits
                                      ^                               |
                                      | REG C                  LUT addr decoder
                                      |                               |
                                 accumulator <--- code length --- LUT ROM --> RLE symbol
```

**Window.** REG A holds the packet being decoded and REG B the next one
(`zs_packet_regs`). REG C is the number of bits of REG A already used. The
barrel shifter shifts `{REG A, REG B}` left by REG C and passes the top 12
bits on. No code word is longer than 12 bits, and REG C never exceeds 15, so
the whole next code word is always in view. REG B is filled before decoding
starts.

**Groups.** In a single-side growing code, the code words sort into groups by
their number of leading ones. `zs_lut_addr_decoder` counts the leading ones
with a priority encoder and caps the count at `gmax`, the last group. The
prefix of group `g` is then:

- `g` ones and a zero (`g + 1` bits), for `g < gmax`;
- `gmax` ones, for the last group.

Each group has a descriptor `{base, idx_bits}`. The LUT address is `base` plus
the `idx_bits` bits that follow the prefix. Counting ones takes only logic, so
the table needs just one entry per leaf, not one entry per possible 12-bit
pattern.

**Codes of mixed length.** A group may hold code words of different lengths.
A code word `s` bits shorter than its group's longest then fills `2^s`
consecutive entries. Every entry stores `{run, value, len}`, the code word's
true length (`zs_lut_rom`, 128 entries per partition, addressed as
`{partition, entry}`, read in the same clock).

Example: the 15-symbol table used as a test vector, with `gmax = 5`:

| group | prefix | code words                         | idx_bits | entries |
|-------|--------|------------------------------------|----------|---------|
| 0     | `0`    | 00, 01                             | 1        | 2       |
| 1     | `10`   | 1000, 1001, 1010, 1011             | 2        | 4       |
| 2     | `110`  | 1100, 1101                         | 1        | 2       |
| 3     | `1110` | 11100 (2 entries), 111010, 111011  | 2        | 4       |
| 4     | `11110`| 111100, 111101                     | 1        | 2       |
| 5     | `11111`| 111110, 111111                     | 1        | 2       |

The contents follow directly from the list of code words, `base` being the
running sum of `2^idx_bits` over the groups before it:

- `idx_bits[g] = max(len - prefix_len(g))` over the code words of group `g`;
- a code word of length `len` with suffix `x` (its `len - prefix_len(g)` bits
  after the prefix) fills the entries
  `base[g] + (x << (idx_bits[g] - sl)) + k`, with `sl = len - prefix_len(g)`
  and `0 <= k < 2^(idx_bits[g] - sl)`.

**Accumulator.** `zs_accumulator` adds the code length to REG C. When the sum
reaches 16 (an *overflow*), the code word has used up REG A. REG B then moves
into REG A, the next packet enters REG B, and REG C keeps the sum minus 16.
This happens at most once per clock, because a code word is shorter than a
packet. The accumulator and REG C are 16 bits wide, although only 4 bits are
ever used.

**Corrupt image.** An unused LUT entry has length 0. If the decoder lands on
one, it raises `code_err` instead of a symbol. The decompressor then stops
with `error`, and the controller reports `RES_FAILED` instead of hanging.

## Run-length stage and word packing

`zs_run_len_decoder` packs literal bytes into a 32-bit word. A run emits up
to `4 - fill` zero bytes per clock, so a long zero run leaves at one full word
per clock. Finished words wait in an output register (valid/ready).
`zs_decompressor` reads the header, counts the words formed, stops taking
symbols after the last one, and marks that word with `word_last`.
`zs_packet_fetch` reads the RAM through its one-clock read port into a
four-deep buffer, so it can supply a packet every clock.

## Timing and throughput

- External bitstream: one word per clock to the ICAP while it is not busy.
- Black-box bitstream: one code word per clock. A literal byte takes one
  clock. Zero runs fill up to four bytes per clock.
- Start-up: the time from `dec_start` to the first word is a few clocks (the
  header, then filling the window). The tests bound the total at the
  run-length decoder's own clock count plus 12.

The published implementation, with its controller, runs at up to 163.55 MHz
in 189 Virtex-4 slices. It is reported to deliver a 32-bit word every clock at the 100 MHz ICAP
clock. This RTL does that only inside zero runs: a word of four non-zero bytes
takes four clocks. Decoding four symbols per clock would need four chained
decoders or a wider LUT, and that is not built.

## `zipstream_top` ports

| port group | signals | meaning |
|------------|---------|---------|
| request    | `req`, `req_part[1:0]`, `req_len[31:0]`, `busy`, `done`, `result`, `recovering` | start a reconfiguration; `result` is `RES_OK` / `RES_RECOVERED` / `RES_FAILED` |
| external   | `ext_start`, `ext_data[31:0]`, `ext_valid`, `ext_ready` | the partial bitstream from off-chip memory, as a word stream |
| ICAP       | `icap_data[31:0]`, `icap_write`, `icap_last`, `icap_busy`, `icap_done`, `icap_crc_err` | write port and end-of-load CRC result |
| load       | `bram_we/waddr/wdata`, `tbl_part`, `lut_we/waddr/wdata`, `grp_we/idx/desc`, `gmax_we/gmax` | initial contents of the image RAM; LUT page and group table of partition `tbl_part` |
| observe    | `dec_split`, `dec_run` | packet advance and zero-run activity, for tests |

The load ports stand in for the memories' initial contents, which come with
the device configuration. `zs_lut_rom` and `zs_bitstream_bram` also accept an
`INIT_FILE` parameter for `$readmemh`. Types and sizes live in `zs_pkg`:
`PKT_W = 16`, `MAX_CODE = 12`, `SYM_W = 8`, `WORD_W = 32`, `LUT_DEPTH = 128`,
`ACC_W = 16`. `BRAM_AW = 10` and `NUM_PARTS = 4` are parameters of the top.

## Where this departs from, or adds to, the published design

- The order of REG A and REG B: here REG A is the current packet and REG B
  is prefetched. The published description decodes from REG B until a code
  word crosses into the next packet.
- "Overflow" of the 16-bit accumulator is taken to mean reaching the 16-bit
  packet width.
- The LUT holds 128 entries of 13 bits per partition, a little over the
  published 128 bytes. The group descriptors sit in a register table written
  at load time, not in fixed logic.
- These are this design's own choices: the number of partitions (4), the
  directory, the image header (word count), the byte order, the zero-run unit
  (bytes, count 1 to 255) and all handshakes.
- Additions: the corrupt-image stop, the FAILED result, and ignoring
  `req_len = 0`.
- Not modelled: the ECC of the block RAM, the real ICAP primitive and its
  status readback.
- Throughput is lower than one word per clock for literal-heavy data (see
  above).

## Files

| file | content |
|------|---------|
| `rtl/zs_pkg.sv` | sizes, `rle_sym_t`, `lut_entry_t`, `group_desc_t`, `rc_result_t` |
| `rtl/zs_packet_regs.sv` | REG A / REG B |
| `rtl/zs_barrel_shifter.sv` | window shifter |
| `rtl/zs_lut_addr_decoder.sv` | leading-ones group decoder and group table |
| `rtl/zs_lut_rom.sv` | SGH look-up table |
| `rtl/zs_accumulator.sv` | accumulator and REG C |
| `rtl/zs_huffman_decoder.sv` | the decoding loop |
| `rtl/zs_run_len_decoder.sv` | zero-run expansion and word packing |
| `rtl/zs_packet_fetch.sv` | block RAM reader with a prefetch buffer |
| `rtl/zs_decompressor.sv` | header, Huffman and RLE stages |
| `rtl/zs_bitstream_bram.sv` | image block RAM |
| `rtl/zs_reconfig_controller.sv` | recovery state machine |
| `rtl/zipstream_top.sv` | the protected static block |
| `tb/zs_tb_pkg.sv` | CRC-32C, bitstream generator, compressor model, cycle model |
| `tb/zs_icap_model.sv` | behavioural ICAP: word log, random busy, CRC check |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_zipstream_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/zs_pkg.sv tb/zs_tb_pkg.sv \
  tb/tb_zipstream_top.sv -o sim && ./obj_dir/sim
```

Replace `tb_zipstream_top` with any other `tb_*` name. The testbenches do
not rely on x or z values.

`tb_zipstream_top` runs at the default sizes. It covers five partition sizes
(1 to 5 frames of 41 words) with ten black-box variants each. These 50 black
boxes are stored in turn into the four partitions, and requests go both to the
partition just loaded and to one loaded earlier. There are three cases:

- clean external bitstreams, which must give `RES_OK`;
- corrupted external bitstreams, which must give `RES_RECOVERED`, and the
  ICAP must then have received exactly the black-box words;
- corrupted external bitstreams plus a corrupted image, which must give
  `RES_FAILED`.

Some runs add random ICAP busy cycles and gaps in the external stream. The
test counts each of these events and fails if one never happens. With the ICAP
never busy, it also checks the black-box load time against the cycle model.

The test bitstreams are synthetic: sparse non-zero words from a small set.
For them, the image plus the LUT (at 2 bytes per entry) comes to about 40% of
the original size. The LUT dominates for such short bitstreams. The published
figure of about 20% was measured on real black-box bitstreams, which these do
not reproduce.

The unit testbenches check against models computed independently of the RTL:

- `tb_zs_barrel_shifter`: all shift amounts, bit by bit.
- `tb_zs_accumulator`: a running bit count modulo 16.
- `tb_zs_packet_regs`: packet order under random gaps.
- `tb_zs_lut_addr_decoder`: every code word of two code shapes, held in
  different partitions' tables.
- `tb_zs_lut_rom`, `tb_zs_bitstream_bram`: each memory's read timing.
- `tb_zs_huffman_decoder`: random symbol streams with back-pressure, and the
  rate of one code word per clock.
- `tb_zs_run_len_decoder`: byte packing, and the exact clock count.
- `tb_zs_decompressor`: four partitions' images of 1 to 5 frames, and the
  clock count.
- `tb_zs_reconfig_controller`: the OK, RECOVERED and FAILED paths.
