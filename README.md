# Heterogeneous MPEG-2 codec: six media modules on one shared bus

This RTL implements the hardware of a single-chip MPEG-2 MP@ML codec. The chip
does not use one large fixed pipeline. Instead, six small processors, the
*media modules* (MMs), each get just the accelerators their task needs. They
pass every intermediate result through a shared external SDRAM:

| MM | Task | Hardware built here |
|---|------|---------------------|
| 0 | bitstream mux/demux | stream I/O engine (byte in / byte out, FIFOs, interrupts) |
| 1 | audio | VLIW multiply-accumulate coprocessor, optional core instructions, IIS I/O (1 in, 3 out) |
| 2 | video encode/decode | VLD and VLC bitstream extensions with their RAMs, PMV, DCT/IDCT/2x4x8 IDCT, Q/IQ, MC, fine ME, SIMD custom instructions |
| 3 | motion estimation | block-matching engine: two 8x8 SAD engines, double-buffered target and reference buffers |
| 4 | video pre/post | ITU-R BT.656 input and output |
| 5 | general control | shell only |

All MMs reach the SDRAM over one main bus, which has two properties:
- **Fair round-robin arbitration.** Any module's worst-case wait is bounded and easy to compute.
- **Hardware semaphore registers.** They let two modules hand a shared SDRAM region to each other safely.

Because data goes through memory, the modules are loosely coupled in time. A module's firmware only moves rectangles between SDRAM and local memories, and starts engines.

The design follows the architecture published as "A Single-Chip MPEG-2 Codec Based on Customizable Media Embedded Processor". The parts that paper describes are built as it describes them. Its block diagrams leave many details open, such as encodings, register maps, buffer sizes and handshakes. This design makes its own choices for those; each file's opening comment says which parts are which.

The processor cores themselves are **not** part of this RTL. Each MM exposes the following as top-level ports, indexed by MM number, so a core model or the testbench can drive them:
- its data-RAM port;
- its main-bus master port;
- its control bus;
- its interrupt lines;
- the instruction-level ports of its extensions.

## The media-module shell

Every MM has the same shell (`media_module`):

- **Data RAM** (`dp_ram`, 4096 x 32 bit by default): the core uses one port, the DMA the other.
- **DMA controller** (`dma_ctrl`). It moves a *rectangle* of W words x H rows between the main bus and the module's local address space. Source and destination each have their own row stride, so a macroblock can be cut out of a picture in one command.
  - **Chain mode**: software leaves descriptors in the data RAM and starts the chain with one register write.
  - The DMA then fetches and runs descriptors until one has NEXT = 0, and raises its interrupt once, at the end.
  - Descriptor layout (6 words): `SRC, DST, {H,W}, {DST_STRIDE,SRC_STRIDE}, CTRL(bit0 = local->main), NEXT`.
  - Registers on the control bus: 0 SRC, 1 DST, 2 SIZE, 3 STRIDES, 4 CTRL, write 6 = start one command, write 7 = start a chain at the given data-RAM address. Any read returns `{busy, done_count}`.
- **Local address space** seen by the DMA:
  - addresses below `DRAM_DEPTH` are the data RAM;
  - addresses above it go out on the module's *local bus*, rebased to 0, into an engine's own memories.
- **Control bus**: addresses 0-7 are the DMA, 8 and up the engines (rebased to 0). Engines take arguments and return results here, one 32-bit register at a time.
- **Bus bridge** (`mm_bridge`): round-robin between the core and the DMA. It holds the winner until the bus acknowledges.
- **Interrupt controller** (`intc`, one per MM in the top):
  - 8 pulse sources, each latched as pending, with an enable and a 2-bit level.
  - The highest pending level wins; ties go to the lowest index.
  - The handler acknowledges by source number.

## Main bus, SDRAM port and semaphores

`main_bus` carries one-word transactions (`codec_pkg::bus_req_t` / `bus_rsp_t`). The request stays up until a one-cycle `ack`, and an assertion checks that rule.

`rr_arbiter` picks the next master after the last one granted, only when the bus is idle. Every requester is therefore served within five other transactions.

Address bit 31 selects the semaphore block (`hw_semaphore`, 16 registers):
- **Take**: *reading* a register returns 1 and records the reader as owner if it was free (or already the reader's); otherwise it returns 0. This makes the test-and-set a single bus read.
- **Release**: the owner writes 0; writes from any other master are ignored.
- **Timing**: a semaphore access takes 2 cycles from grant. Memory accesses wait for the SDRAM controller's `ack` on the `mem_req/mem_rsp` top-level port.

The SDRAM controller is outside this design.

## Motion estimation engine (MM 3)

`me_hwe` finds, for one 16x16 target macroblock, the displacement with the lowest sum of absolute differences (SAD) inside a reference window.

**Engine pair.** `block_match_engine` computes the SAD of one 8x8 block pair per cycle. It is a 3-stage pipeline: 64 absolute differences, then 8 row sums, then the total. Two of these engines work in parallel:
- in the first cycle of a candidate they match the two upper 8x8 quarters of the macroblock;
- in the second cycle, the two lower quarters.

A candidate therefore costs 2 cycles, and a search over N candidates keeps the engine busy for 2N + 3 cycles. The testbench checks this count: 581 cycles for the full +-8 window.

**DC compensation.** A signed offset is subtracted from every pixel difference. A fade, where the whole picture brightens, still matches at the true motion.

**Flexible range.** Every command carries a rectangle `[xmin,xmax] x [ymin,ymax]`, clamped to +-R. The search area can be stretched horizontally for pans or shrunk to save time. Candidates are visited in raster order, and ties keep the first.

**Double buffering.** The target buffer and the reference window buffer (16+2R pixels square) both have two banks. While the engines search one bank, the DMA fills the other over the local bus. The idle reference bank plays the role of the reference prefetch buffer.

**Address and register maps.**
- Local bus: `addr[12]` selects target or reference, `addr[11]` selects the bank, and the low bits give the word (4 pixels, leftmost pixel in the low byte).
- Control bus:
  - writes: 0 = start `{ref_bank, tgt_bank}` (bits 2 and 1), 1 = range `{ymax, ymin, xmax, xmin}` (signed bytes), 2 = dc offset;
  - reads: 0 = busy, 1 = `{mvy, mvx}`, 2 = SAD, 3 = cycles of the last search.

**Search range.** The engine's window is +-8 pixels (`R`). The chip's full +-144 x +-96 search range comes from firmware. The firmware runs a hierarchical telescopic search, issuing many such commands around predicted vectors; it is not RTL.

## Video encode/decode extensions (MM 2)

**VLD (`vld_unit`).** A DSP-extension bit reader.
- **Bit buffer**: 64 bits, refilled one word at a time from the VLD bitstream RAM whenever 32 bits or fewer remain. A GET of up to 32 bits per cycle therefore never waits.
- **Instructions**:
  - `SHOW n` peeks at the next n bits;
  - `GET n` reads and consumes n bits;
  - `MBAI` decodes one macroblock_address_increment code (MPEG-2 Table B-1).
- **Escape**: `MBAI` returns 33 with bit 31 set for the escape code, and the firmware loops.
- **Timing**: results are valid the cycle after the instruction is taken.

**VLC (`vlc_packer`).** The opposite direction: `put(n, code)` appends n bits MSB first, and a full 32-bit word is written to the VLC bitstream RAM in the next cycle. `flush` pads the last word with zeros.

Both bitstream RAMs sit on MM 2's local bus (bit 12 selects between them), so the DMA moves streams between them and the SDRAM.

**Other engines.**
- **`pmv_hwe`** reconstructs MPEG-2 motion vectors from motion_code and motion_residual:
  - it applies f_code scaling and wraps into [-16f, 16f-1];
  - for field vectors it halves the stored vertical predictor on use and doubles it on store;
  - it keeps the eight predictors PMV[r][s][t]. One vector per cycle.
- **`dct_hwe`** performs the 8x8 forward DCT, the 8x8 IDCT and the DV 2x4x8 IDCT.
  - The 2x4x8 IDCT is a vertical 4-point transform of the sums and differences of line pairs.
  - It is a row-column transform with 14-bit cosines, keeping 3 fraction bits between passes.
  - It is within 1 of the exact transform on all test data; `done` comes 17 cycles after `start`.
- **`quant_hwe`** is MPEG-2 inverse quantisation, exact:
  - weighting matrices, intra DC precision, saturation to [-2048, 2047] and the mismatch control on coefficient 63;
  - plus a forward quantiser, which rounds intra coefficients and truncates non-intra ones.

  One coefficient per cycle, 1-cycle latency.
- **`mc_hwe`** does half-pel interpolation with MPEG-2 rounding, forward / backward / bidirectional averaging, and residual add with clipping. It handles 8 pixels per cycle with a 2-cycle latency.
- **`me_fine_hwe`** refines one macroblock around its integer vectors:
  - **Activity.** It computes the target mean and activity (sum of absolute deviations from the mean), which rate control uses.
  - **Half-pel search.** It tests the 9 half-pel positions in each reference direction (18x18 areas). The centre position is tested first and ties keep it.
  - **Bidirectional cost.** It computes the bidirectional SAD with the two best vectors.
  - **Mode choice.** It picks forward, backward, bidirectional or intra. Intra wins when the activity is below the best SAD.
  - **Prediction.** It writes the chosen prediction into its prediction RAM.
  - **Timing.** It processes one 16-pixel row per cycle. A command takes 1 + 32 + 144 per enabled direction + 16 (bidirectional) + 1 + 16 cycles.
- **`simd_uci`** provides single-cycle custom core instructions:
  - byte and halfword parallel add, subtract, shift and set-less-than;
  - logic operations and byte shuffle;
  - motion-vector encoding (difference to motion_code / motion_residual).

## Audio (MM 1)

**Coprocessor (`audio_vliw_cop`).** Holds eight 32-bit registers and two 64-bit accumulators.
- **Operations**, one per cycle:
  - add, subtract, logic, shifts, funnel shift;
  - 32x32 multiply, multiply-to-accumulator, multiply-add and multiply-subtract;
  - accumulator shift-out with saturation;
  - the optional-instruction set: leading-zero count, absolute difference, min/max, clip.
- **Core operand.** A core register can replace the first operand, as when the core feeds the MAC in a VLIW pair.
- **Core options.** The same optional instructions exist as a combinational core unit (`core_opt_unit`).

**IIS I/O (`audio_io_hwe`).**
- The chip is the clock master; the bit clock is the system clock / (2 x `DIV`).
- With `DIV = 49` at 150 MHz, 16-bit stereo frames run at 47.8 kHz.
- The three output ports share bit clock and word select, which is enough for 5.1 channels. A port that is not refilled repeats its last samples.
- The input port synchronises the external clock and delivers a left/right pair with an interrupt.

## Stream and video I/O (MMs 0 and 4)

**Stream I/O (`bitstream_io_hwe`).**
- **Input.** Packs incoming stream bytes into words, first byte most significant. A packet-start flag restarts the packing so each packet begins on a word boundary.
- **FIFOs and interrupts.** The input goes through a 64-word FIFO. The input interrupt fires when the FIFO reaches 47 words, one 188-byte transport packet, and words lost to a full FIFO are counted.
- **Output.** The output side sends words as bytes under `so_ready` and interrupts when its FIFO runs empty.
- **Rate.** One byte per 150 MHz cycle is far above the 300 Mbit/s maximum stream rate.

**Video I/O (`video_io_hwe`, BT.656).**
- **Input decoder.**
  - Finds the `FF 00 00 XY` timing codes, checks their protection bits and counts bad ones.
  - Passes active pixels on as 32-bit words (first byte least significant) with their index in the line.
  - Raises a line interrupt at each active line.
- **Output encoder.** Generates the 525-line raster with EAV/SAV codes and blanking levels, and asks for pixels during active video.
- **Clock.** The 27 MHz byte clock is an enable on the system clock.

## Top level

`mpeg2_codec` instantiates:
- the main bus;
- the six shells with their interrupt controllers;
- the engines above, wired as in the table at the top.

MM 3's local bus fills the block-matching buffers and its control bus runs the engine. MM 2's local bus reaches the two bitstream RAMs. The remaining MM 2 engines are driven from top-level ports.

Each interrupt controller's source 0 is that MM's DMA; its engine interrupts follow:

| MM | Sources after DMA |
|---|---|
| 0 | stream in, stream out |
| 1 | IIS in, IIS out frame |
| 2 | DCT done at 2, fine ME done at 3 |
| 3 | search done |
| 4 | video line, output frame |

Top parameters: `DRAM_DEPTH` (data RAM words per MM), `N_SEM` and `ME_R`.

After coarse synthesis the top at its defaults is about 72,000 cells, 3,800 flip-flops and 0.9 Mbit of RAM. The RAM is mostly data RAMs and ME buffers.

## Where this design departs from the original chip

- **Processor cores and caches are not built.** These are the 5-stage RISC cores, their caches and the VLIW instruction pairing. Their ports are brought out instead.
- **The video pre/postprocessing filter is not built.** Its function is not specified.
- **The SDRAM controller is external.**
- **No bursts on the main bus.** It is 32 bits wide and moves one word per transaction; the original supports 32- or 64-bit buses.
- **No macroblock-level commands.** The video engines have only their single-function forms. The VLD has no macroblock-decode command, and DCT/Q/MC have no macroblock sequencer. In the original, those commands share the same resources.
- **Fewer fine-ME modes.** It does not evaluate field, dual-prime or no-MC candidates.
- **Video-MM engines are driven from ports.** Apart from the bitstream RAMs, MM 2's engines are not attached to double-buffered local memories; their data ports are top-level ports.
- **Small ME window per command.** The ME engine searches +-8 pixels per command, and the wide +-144 x +-96 range is left to firmware.
- **Design choices.** Buffer sizes, register maps, interrupt numbering, FIFO depths, sample widths and all encodings were chosen for this design.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends with a `TB_RESULT checks=N failures=M` line and has a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/codec_pkg.sv tb/tb_me_hwe.sv --top-module tb_me_hwe
./obj_dir/Vtb_me_hwe
```

**Reference models.** The testbenches compare against models written in the testbench:
- exact DCT definitions in floating point;
- the MPEG-2 formulas for IQ, motion vectors, interpolation and Table B-1;
- brute-force SAD searches;
- bit-exact stream packing.

Where a timing is part of the design, the cycle count is checked too: the ME search length, DCT latency, fine-ME command length, VLD throughput, IIS frame period and BT.656 frame length.

**End-to-end testbench.** `tb_mpeg2_codec` runs the top at its default parameters against a behavioural SDRAM (`tb/sdram_model.sv`). Concurrent processes play the six cores, and it runs in seconds. It does the following:
- loads two macroblocks and their reference windows into the ME engine with one four-descriptor DMA chain;
- searches bank 0 while bank 1 is filled;
- checks both planted motion vectors, the second one with dc compensation;
- packs 200 random codes with the VLC, moves them to SDRAM and back into the VLD RAM with DMA under a semaphore, and decodes them with the VLD;
- loops audio and video outputs back to their inputs;
- streams packets through MM 0;
- gives the DCT, IQ, PMV, MC, fine ME, SIMD, core option and audio coprocessor units one known computation each;
- makes random SDRAM traffic from several modules.

It counts each mechanism and fails if any of them never happened:
- bus contention and semaphore refusal;
- VLD refills and double-buffer overlap;
- stream, audio and video traffic;
- interrupts in every module;
- a grant for every MM.

`tb/sdram_model.sv` is a behavioural model for testbenches only. Unwritten words read as a fixed hash of their address.
