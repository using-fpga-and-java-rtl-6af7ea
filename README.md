# A microprogrammed front end and residual path for an H.264/AVC decoder

This RTL is the part of a real-time hardware H.264 (MPEG-4 AVC) decoder that
turns a raw Annex B byte stream into decoded syntax elements, and turns
residual coefficient arrays into reconstructed samples. The decoder is
organised as a pipeline of modules. Each module gets its data from its
predecessor through a FIFO, and each has a small control unit that a host
processor initialises over a system bus. The bus is used only to load
microprograms, set modes and read results, never to move video data. The
intent is a decoder whose stages can be swapped, widened or reprogrammed
without redesigning the rest, for Baseline and Main profile streams from
320x240 to 720x576 at 30 frames per second.

What is built, in pipeline order:

```
 in_data ──► nalu_detector ──► sync_fifo ──► syntax_parser ──► elem_* (to the residual decoder)
  32-bit       start codes,      34-bit        microprogram,      parameter registers readable
  words        re-alignment      words+tags    Exp-Golomb, me(v)  over the system bus

 res_data ──► transform_unit ──► recon_adder ──► recon_* (to the frame memory)
  16-bit        4x4 transforms     + intra/inter prediction, clip
```

`h264_decoder_top` connects these and adds the system-bus register file. The
host CPU, USB link, memories, residual entropy decoder, dequantiser, intra and
inter predictors, deblocking filter and display output are not part of this
RTL. Their signals are ports of the top (see "What is not here").

## Finding NAL units: `nalu_detector`

An Annex B stream is a sequence of NAL units, each preceded by the start code
`00 00 01`, optionally with an extra leading `00`. The detector takes the
stream as 32-bit words, first byte in bits 31:24. It produces each unit's bytes
so that the unit's header byte is the most significant byte of a word. This
way the parser can start each unit on a word boundary.

The detector keeps the two previous words (`rg1`, `rg0`). Together with the
word being presented, they form a 12-byte window. Each input word triggers
these steps:

1. **Detect.** The detector looks for `00 00 01` whose `01` byte lies in the
   new word (window bytes 8 to 11). Every stream position is therefore
   examined exactly once. If the byte before the two zeros is also zero, it
   counts as part of the start code and is dropped.
2. **Emit.** The shifter outputs window bytes `s .. s+3`. Here `s` (0 to 3) is
   the byte offset of the current unit's first byte, fixed for the whole unit.
   The end of the unit is only known once the next start code is seen. The
   detector emits only bytes at positions 6 and below, and a start code found
   in bytes 8 to 11 has its zeros at position 5 or later. So a byte that
   belongs to the next start code is never emitted by mistake. This look-ahead
   is why the window includes the incoming word.
3. **Track.** A unit can end before its bytes have all been emitted, and a
   short unit can begin meanwhile. So up to three units are tracked at once,
   each by its start and end position in the window, and these positions move
   down by 4 every step. Units of two bytes or more never fill the tracker. A
   start code that finds the tracker full sets the sticky `overrun` flag.

Output words trail the input by about two words. The last word of a unit
carries `out_last` and `out_bytes` (1 to 4 valid bytes, the rest zero). With
`data_last` on the final input word, the detector raises `busy` and flushes the
bytes still in its window by itself. `drain_hold` pauses this flush.
Emulation-prevention bytes (`00 00 03`) are passed through unchanged.

## Decoding syntax elements: `syntax_parser`

The parser reads a bit window of two 32-bit words (`rg1`, `rg0`). A 5-bit
accumulator points at the next unread bit. For each element it does the
following, all in one cycle:

- A left shifter brings the next bit to the top of a 32-bit field.
- The prefix-length detector counts the leading zeros `p` of its top 16 bits.
- The code length `k` is `2p+1` for Exp-Golomb codes. For `u(n)` it is `n`
  from the microinstruction.
- A right shift by `32-k` leaves the code as `2^p + info`. Subtracting one
  gives `codeNum`.
- From `codeNum`:
  - `ue(v)` is `codeNum`.
  - `se(v)` maps `2m-1` to `+m` and `2m` to `-m`.
  - `te(v)` with range 1 is a single inverted bit, otherwise `ue(v)`.
  - `me(v)` goes through the coded_block_pattern table of the H.264
    standard (Table 9-4, 4:2:0 and 4:2:2, intra or inter column), in
    `cbp_vlc_table`.
- `acc + k` gives the new bit position. Its carry shifts `rg0` into `rg1` and
  pulls the next word from the FIFO in the same cycle.

The sequence of elements comes from a **microprogram**. Up to 32
microinstructions (`uinstr_t` in `h264_pkg`) are loaded by the host. Each
one holds:

- a descriptor: `U`, `UE`, `SE`, `TE`, `ME`, `ALIGN` or `END`;
- a 5-bit field: the length for `u(n)`, the range-1 flag for `te(v)`, or the
  intra/inter column for `me(v)`;
- a destination parameter register.

The program is linear, with no branches: it describes a fixed header layout.
Syntax that depends on earlier values needs the host to load a new program
between runs.

A `start` pulse makes the parser drop FIFO words until one tagged as a unit's
first word arrives. It then loads both window words (2 cycles), runs the
program from address 0 at one element per cycle, and takes one more cycle for
`END`. Beyond a unit's last word the window is filled with zeros, and the next
unit's words stay in the FIFO.

Limits, which follow from the 16-bit value path:
- element values are 16 bits;
- `u(n)` allows `n` up to 16;
- Exp-Golomb prefixes may have at most 15 zeros (`codeNum` up to 65534).

A longer prefix, or an `me(v)` `codeNum` above 47, stops the run and sets
`error`.

## Transforms without multipliers: `transform_unit`

H.264 residual transforms multiply only by ±1, ±2 or ±1/2. The unit therefore
forms each product as the operand itself, the operand shifted left by one, or
the operand shifted right arithmetically by one, and accumulates it with an
adder/subtractor.

The unit loads a 16x16 array (256 samples, raster order) into its data
memory. It then processes the sixteen 4x4 blocks in raster order, in two
passes per block. When `chroma` is high with the first sample, the unit
instead loads a chroma pair: 64 Cb samples, then 64 Cr samples, each 8x8
array in raster order. The two arrays sit side by side in the data memory.
Their eight 4x4 blocks are processed Cb first, then Cr, each in raster order.
The same unit thus serves luma and chroma in turn. The two passes are:

```
pass 1 (rows):    T[r][c] = Σj M[c][j]·X[r][j]   → temporary memory
pass 2 (columns): Y[r][c] = Σj M[r][j]·T[j][c]   → output register
```

| mode | matrix M | output |
|---|---|---|
| `TMODE_FWD` | `[1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]` (forward core) | Y |
| `TMODE_INV` | `[1 1 1 ½; 1 ½ -1 -1; 1 -½ -1 1; 1 -1 1 -½]` (inverse core) | (Y+32)>>>6 |
| `TMODE_HAD` | `[1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]` (Hadamard) | Y, unscaled |

The inverse mode is bit-exact with the standard's butterfly equations. The
reason is that every halving applies to a single operand before it is added,
which is exactly where the standard puts its `>>1`.

Two variants are selected by `PARALLEL`:

| variant | products per cycle | cycles per value | cycles per block | cycles per 16x16 luma array | cycles per chroma pair |
|---|---|---|---|---|---|
| single-stage (default) | 1 | 4 | 128 | 2048 | 1024 |
| parallel | 4, by replicated shifters | 1 | 32 | 512 | 256 |

Both add the load cycles (256 for luma, 128 for a chroma pair) and one
output-register cycle. The mode is taken when
the last sample is loaded. Everything is 16-bit, wrap-around arithmetic.
Inputs must keep intermediate values in 16-bit range, as conforming streams
do.

## Reconstruction: `recon_adder`

A multiplexer chooses the intra or the inter prediction sample. The adder adds
the transform result, and the sum is clipped to 0..255. There is one register
stage, and `out_clipped` reports clipping.

## Top level and system bus

`h264_decoder_top` parameters: `FIFO_DEPTH` (16), `DW` (16), `N` (16),
`PARALLEL` (0).

System bus: `sys_we`, `sys_addr` (word address), `sys_wdata` and a
combinational `sys_rdata`.

| address | access | meaning |
|---|---|---|
| 0x00-0x1F | W | parser microprogram, `uinstr_t` in bits 12:0 |
| 0x20 | W | bit 0: start the parser on the next NAL unit |
| 0x21 | R/W | transform mode (`tmode_e`), reset value inverse |
| 0x22 | R | `{overrun, parser error, parser busy, transform busy, detector busy}` in bits 4:0 |
| 0x23 | R | number of start codes seen |
| 0x40-0x5F | R | parser parameter registers |

Flow control: `in_ready` drops while the detector flushes, and whenever fewer
than three FIFO places are free. That margin covers a word still inside the
detector. An assertion checks that the FIFO is never written when full.
Residual samples are accepted while `res_ready` is high, which is while the
transform unit is loading. `res_chroma`, given with the first sample of an
array, marks a chroma pair instead of a luma array.

## What is not here

- **Host CPU.** This is an existing MIPS I compatible soft core, extended with
  a USB link and pipeline control. It connects through the `sys_*` port.
- **Memories.** Main memory and the current and reference frame memories are
  off-chip. The reconstructed samples leave at `recon_*`.
- **Other pipeline stages.** The residual VLC decoder, the dequantiser, the
  intra and inter predictors, the deblocking filter and the display interface
  are outside this RTL. Their data meets this RTL at `elem_*`,
  `res_*`, `pred_intra`, `pred_inter` and `sel_inter`.
- **Transform coverage.** There is no 8x8 transform and no 2x2 chroma DC
  transform. Only one pipeline is built. It is shared between luma and chroma
  through the `res_chroma` flag.
- **Entropy coding.** The parser decodes fixed-length and Exp-Golomb
  elements only. CAVLC residual tables and CABAC, which Main profile streams
  use, are not built. Emulation-prevention bytes (`00 00 03`) are passed on
  unchanged.
- **Wide connections.** Every pipeline connection here is one word wide. A
  connection that carries a whole 4x4 or 8x8 block per transfer, to feed
  block-parallel stages, is not built.

## Where this RTL goes beyond its source

These are this design's own choices, not taken from the original design:

- the detector's one-word look-ahead, its three-unit tracker, the output byte
  count and the end-of-stream flush;
- the right-shift option in the transform's shift stage, the three modes,
  the inverse rounding, and the chroma flag with its sample order;
- the microinstruction format, the `ALIGN` descriptor, the start and
  synchronisation protocol and the word tags;
- FIFO depth 16, the bus register map, clipping, and 8-bit samples;
- an asynchronous active-low reset everywhere.

The original detector was reported at 70 flip-flops. This one has about 150,
for the byte count, the flags and the tracker.

## Throughput against the targets

These numbers assume 4:2:0 video, i.e. 1.5 16x16 arrays per macroblock.

| video | macroblocks | single-stage transform | parallel transform |
|---|---|---|---|
| 720x576, 30 fps | 1620 | 168 M cycles/s: needs about a 170 MHz clock (about 200 MHz was reached for the single-stage transform on a Virtex-4) | 56 M cycles/s |
| 320x240, 30 fps | 300 | 31 M cycles/s | — |

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks | reference used |
|---|---|---|
| `tb_nalu_detector` | 60 random units, both start-code forms, a 2-byte first unit, random input gaps | — |
| `tb_sync_fifo` | random traffic | queue model |
| `tb_syntax_parser` | random microprograms, values from its own Exp-Golomb encoder, a starved FIFO, the cycle count, the error case | — |
| `tb_transform_unit` | both variants, all three modes, luma arrays and chroma pairs, the cycle counts | standard butterfly / matrix product |
| `tb_recon_adder` | random inputs | — |
| `tb_h264_decoder_top` | end to end at default parameters: bus-loaded microprograms on 10 units, three luma arrays and one chroma pair through reconstruction, with their cycle counts | — |

`tb_h264_decoder_top` also counts that each mechanism happened at least once:
- both start-code forms;
- input held back by a full FIFO;
- the end-of-stream flush;
- both `me(v)` tables;
- both prediction sources;
- clipping at both ends;
- a transform mode switch;
- a switch from luma to chroma.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/h264_pkg.sv tb/tb_h264_decoder_top.sv --top-module tb_h264_decoder_top
./obj_dir/Vtb_h264_decoder_top
```

Replace the testbench name to run another one. Every run finishes in seconds.
The testbenches use `$urandom` only, with no constrained randomisation, and
reset or initialise everything they read.
