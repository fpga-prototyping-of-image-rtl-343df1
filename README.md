# LFSR image watermarking with a scattered SRAM store

This design hides a gray image in memory. It combines each 8x8-bit block of the
image bitwise with a pseudo-random watermark from one linear-feedback shift
register (LFSR). The eight rows of the result are written to an SRAM at eight
pseudo-random row addresses from a second LFSR. Reading the image back needs
both seeds. Restart both LFSRs from their seeds, read the same rows and combine
them with the same watermark, and the original block comes out unchanged. The
design checks the result by computing the PSNR between the image that was sent
and the image that came back.

Everything works on whole blocks: a block enters the datapath every clock and
takes two clocks to pass through.

## Data format

| term | meaning |
|---|---|
| row | 8 bits, one gray pixel |
| block | 8 rows (`logic [7:0][7:0]`, row 0 in bits 7:0) |
| watermark block | 8 consecutive states of the watermark LFSR |
| address block | 8 consecutive states of the address LFSR, used as SRAM row addresses |

## The two LFSRs

Both generators are the same 8-bit Fibonacci register (`lfsr_block_gen`, step
function `wm_pkg::lfsr_step`). It shifts right, and the new bit 7 is the XOR of
bits 5, 2 and 0. From the address seed `10000000` it produces:

    10000000 01000000 00100000 10010000 01001000 00100100 00010010 00001001 ...

The next state after these is `10000100`.

Things to know about these taps:

* **Period.** The sequence repeats after 105 states, not 255. The feedback
  polynomial is not primitive.
* **Stuck states.** `00000000` and `11111111` map onto themselves, so neither
  can be used as a seed.
* **Seeds.** The watermark seed `8'hE1` lies on a different 105-state cycle
  than the address seed `8'h80`. The two sequences therefore never share a
  state.
* **Block output.** The register is unrolled eight times. On `advance` its
  output takes the next eight states, and the held state jumps eight steps
  ahead. One block of watermark or addresses is produced per clock.
* **Restart.** `reload` sets the register back to its seed. The controller
  asserts it when a run starts and again between insertion and extraction, so
  both passes see identical sequences.

The 105-state period limits how much of the SRAM is usable. One run can place
`floor(105 / 8) = 13` blocks before an address would repeat. That is why the
input RAM, `IMG_BLOCKS`, holds 13 blocks.

## Datapath and timing

```
            stage 1 (clock 1)                     stage 2 (clock 2)
 cover_ram ──► cover_image_bits ─┐
                                 ├─ mux ─► AOI/XOR ─┬─► SRAM write (insertion)
 wm_sram read data ◄─────────────┘ (mode)   ▲       ├─► watermark_aoi_bits
 watermark LFSR ──► lfsr_out_watermark ─────┘       └─► recover_image_bits (extraction)
 address LFSR ──► lfsr_out_add ──► SRAM write/read addresses
```

**Insertion.**
* Clock 1 reads the cover block and produces the watermark and address blocks.
* Clock 2 XORs the cover block with the watermark, registers the result as
  `watermark_aoi_bits` and writes its eight rows into the SRAM.

**Extraction.**
* Clock 1 produces the same watermark and address blocks again. It also
  re-reads the cover block, which the PSNR unit uses as its reference.
* The SRAM read is combinational, so the eight stored rows are present during
  clock 2.
* Clock 2 passes them through the same AOI unit. Since
  `(c ^ w) ^ w = c`, the result registered in `recover_image_bits` is the
  cover block.

The AOI unit (`aoi_watermark`) is a single instance shared by both passes:
* one multiplexer selects its data input, either the cover block or the SRAM
  data;
* the write enables act as a second multiplexer and steer its result, either
  into the SRAM or into the recovered-block register.

Each bit is computed as `~((d & w) | (~d & ~w))`, an AND-OR-invert gate on true
and complemented inputs, which equals `d ^ w`.

## The SRAM

`wm_sram` has 256 rows of 8 bits, addressed by 8 bits, and is built from
flip-flops. To store or fetch a whole block in one clock it has eight write
ports and eight combinational read ports. The eight addresses of one block are
always distinct, and an assertion checks this. The contents are not reset.

## Run sequencing (`wm_controller`)

A run over `nblk` blocks (1 to 13) goes through these steps:

| step | clocks | what happens |
|---|---|---|
| start | – | `start` is accepted; LFSRs restart, PSNR sums cleared |
| INSERT | n | one block per clock through insertion |
| RELOAD | 1 | LFSRs back to their seeds |
| EXTRACT | n | one block per clock through extraction |
| FLUSH | 2 | last block leaves stage 2 and is accumulated |
| FINISH | 1 | PSNR computed |
| WAIT | 1 | `done` pulses |

Timing, with `start` sampled at edge 0:
* the first `wm_valid` follows edge 2;
* the first `rec_valid` follows edge n+3;
* `psnr_valid` follows edge 2n+4;
* `done` follows edge 2n+5.

A new `start` is accepted one clock after `done`.

Cover blocks are written through `img_we`, `img_waddr` and `img_wdata` on their
own RAM port, which can be used during a run. Extraction reads block `b` from
the input RAM at edge n+2+b. A write that lands on the same edge or later does
not disturb that read, so from then on block `b` may be overwritten with the
next image chunk. This lets a long image stream through runs of 13 blocks with
loading hidden behind processing.

## PSNR unit

Each row counts as one pixel with peak value 255. The unit works as follows:

1. During extraction it accumulates the squared difference between the
   reference and recovered pixels into a 32-bit sum (SSE).
2. It also counts the pixels, N.
3. At the end of a run it computes
   `PSNR = 10·log10(2) · (log2(255²·N) − log2(SSE))`.
4. The result is an unsigned Q8.8 value in dB. When SSE = 0, `psnr_inf` is set
   instead.

Each log2 is the position of the leading one plus the mantissa `f`, corrected
by `0.348·f·(1−f)`. The result is within about 0.03 dB of the exact value.

With an error-free SRAM the recovered image is exact, so a normal run reports
infinite PSNR. A finite value appears only when the reference and the
recovered image differ, for example when a cover block is replaced in the
input RAM between insertion and extraction.

## How far to trust it, and where it departs

Taken from the original design:
* 8x8-bit blocks and 8-bit LFSRs;
* an XOR3 feedback register with asynchronous reset;
* the address sequence starting at `10000000`;
* 8-bit SRAM row addresses and a register-based store;
* an input RAM that can load while processing;
* one block per clock with a two-clock latency;
* one AOI unit shared through two multiplexers;
* a PSNR stage.

Reconstructed or chosen here:
* **Feedback taps.** Taps 5 and 2 are fixed by the published address
  sequence. Tap 0 is chosen here, so that all eight bits take part.
* **AOI function.** "AOI based" is read as the XOR form of an AOI gate. This
  is the reading that makes extraction exact.
* **Seeds and sizes.** The watermark seed, the input-RAM depth and the
  controller handshake are choices made here.
* **PSNR arithmetic.** The PSNR number format and the log approximation are
  choices made here.

Not reproduced:
* The original prototype drove its cover rows from a bank of accumulators. What
  they accumulated is not known, so cover data comes from the input RAM
  instead.
* The published PSNR of 45.32 dB is not reproduced, since this datapath
  recovers exactly.
* The published FPGA resource counts (adders, counters, accumulators) describe
  a different netlist.
* Only 105 of the 256 SRAM rows are reachable with these taps.

## Files

| file | contents |
|---|---|
| `rtl/wm_pkg.sv` | sizes and the LFSR step function |
| `rtl/lfsr_block_gen.sv` | block-per-clock LFSR (watermark and address generators) |
| `rtl/aoi_watermark.sv` | AOI/XOR insertion and extraction unit |
| `rtl/wm_sram.sv` | 256x8 register SRAM, 8 write and 8 read ports |
| `rtl/cover_ram.sv` | input block RAM for the cover image |
| `rtl/psnr_unit.sv` | SSE accumulator and PSNR computation |
| `rtl/wm_controller.sv` | run sequencer |
| `rtl/watermark_aoi_logic.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_image_stream.sv` | a generated 32x32 image streamed through 10 runs |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, the end-to-end test of the top
at its default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_watermark_aoi_logic \
  -y rtl -y tb +libext+.sv rtl/wm_pkg.sv tb/tb_watermark_aoi_logic.sv
./obj_dir/Vtb_watermark_aoi_logic
```

Replace the top module name to run any other testbench. All of them finish in
well under a second. The top-level tests compare every bus against a
bit-serial reference model of the LFSRs and a shadow SRAM. They also check the
cycle counts given above.

## Changing it

* **`IMG_BLOCKS`** sets the input-RAM depth and the largest run. Beyond 13,
  addresses repeat within a run and later blocks overwrite earlier ones.
* **`WM_SEED` / `ADDR_SEED`** may be any value except `8'h00` and `8'hFF`.
* **Feedback taps.** Changing the taps in `wm_pkg::lfsr_step` changes both
  LFSRs. A primitive choice, for example a new bit 7 of `q[7]^q[2]^q[1]^q[0]`,
  makes all 255 nonzero addresses reachable (31 blocks per run). It no longer
  reproduces the published address sequence, though.
