# Programmable audio visualizer

A music visualizer in hardware that a user programs rather than rewires.
Audio samples come in from a codec. Once per video frame a small
special-purpose processor runs a short user program. The program reads the
current beat strength and the push buttons, does a little arithmetic, and
writes configuration registers. Those registers steer an effects engine,
which redraws a large virtual frame buffer from the previous frame. The
engine can move the picture (translate, rotate, zoom), blur or sharpen it
with a 3x3 convolution, and draw audio-driven patterns on top: the waveform,
the spectrum, or a ring. Several monitors each show their own window of that
virtual buffer. The buffer is double-buffered, so the screens show a finished
frame while the next one is being drawn.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The exceptions
are the audio codec interface and the SRAM chips, which sit outside the top
module, and the testbenches.

## How the parts fit together

```
 codec --sample--> sample_fifo --+--> fft --> fft_bram --+--> beat_detect --beat--+
                   (last 1 s)    |                       |                       |
                                 +-----------------------+--> generators         v
                                                              (in effects)   processor
 xvga[d] -> display[d] --read--> memory_manager <--read/write-- effects <--params-+
     ^                             |  SRAM 0 | SRAM 1 |                          |
     +------------colour-----------+                        flip <--------------+
```

- **Audio front end.** `sample_fifo` keeps the newest DEPTH samples (48 000
  by default, one second at 48 kHz). On every new frame, `fft` computes the
  spectrum of the newest FFT_N samples into `fft_bram`. When it finishes,
  `beat_detect` turns bass energy plus recent loudness into a beat flag and a
  beat strength.
- **Frame processor** (`processor`). It runs the program in
  `instruction_mem` from address 0. A long instruction (convolve or generate)
  starts a sweep of the effects engine and holds the program counter until
  the sweep is over. At the empty instruction that ends the program, it waits
  for the frame boundary. It then flips the buffers and starts again at
  address 0.
- **Effects engine** (`effects`). A sweep visits every pixel of the back
  buffer in raster order and writes a new colour for each.
- **Display side.** Each `xvga` produces 640x480 timing. Its `display` adds
  the screen's position in the virtual buffer. `memory_manager` turns
  (buffer, x, y) into an SRAM address and arbitrates each SRAM between the
  displays and the effects engine.

The frame boundary is the end of the visible area of display 0. It starts the
FFT and releases the processor.

## The frame program

### Instruction word (36 bits)

| bits  | field | meaning |
|-------|-------|---------|
| 35:33 | op    | 0 END, 1 ALU, 2 ALUI, 3 SKIP, 4 CONV, 5 GEN, 6/7 no operation |
| 32:30 | fn    | ALU function: 0 add, 1 sub, 2 mul (low 16 bits), 3 and, 4 or, 5 xor, 6 set-less-than (signed), 7 arithmetic shift right by b[3:0] |
| 29:28 | asel  | operand A source: 0 register ra, 1 beat strength, 2 buttons (zero-extended), 3 zero |
| 27:22 | wa    | destination register |
| 21:16 | ra    | register for operand A, also the register tested by SKIP |
| 15:0  | imm   | ALUI: operand B. ALU: bits 5:0 name register rb. SKIP: the skip distance |

- `ALU`: `r[wa] <= A fn r[rb]`.
- `ALUI`: `r[wa] <= A fn imm`. Use asel = 3 (zero) with fn = add to load a constant.
- `SKIP`: if `r[ra]` is nonzero, skip the next `imm` instructions; otherwise fall through.
  The zero test is on the register itself, before the asel multiplexer. To
  branch on a button, first copy the buttons into a register (ALUI and with
  asel = 2 and a mask), then SKIP on that register.
- `CONV` / `GEN`: run one full sweep of the effects engine in convolution or
  generator mode. The processor waits until the sweep is done.
- `END` (all-zero word): end of the frame. An unloaded memory is therefore an
  empty program that only flips buffers.

Arithmetic takes one clock and there is no fetch bubble: the instruction
memory is addressed with the next pc. Registers are 16-bit signed and r0
always reads 0. Programs are loaded through the `imem_we/imem_waddr/imem_wdata`
port of the top.

### Configuration registers

The effects engine reads registers 32..56 continuously through fixed read
ports of the register file. The program configures an effect simply by
writing these registers.

| register | name | meaning |
|----------|------|---------|
| 32 + 3m  | motion m type  | 0 none, 1 rotate, 2 translate, 3 zoom (m = 0, 1) |
| 33 + 3m  | motion m p1    | translate: dx; rotate: angle in 1/256 turn; zoom: scale in 1/256 |
| 34 + 3m  | motion m p2    | translate: dy |
| 38 + 4g  | generator g type | 0 disabled, 1 waveform, 2 scope, 3 circle (g = 0, 1) |
| 39 + 4g  | generator g p1 | waveform: centre line y; scope: base line y; circle: radius |
| 40 + 4g  | generator g p2 | waveform: gain in 1/16; scope: [3:0] x-to-bin shift, [7:4] height shift; circle: half-width of the ring |
| 41 + 4g  | generator g colour | 12-bit RGB, 4 bits per channel (r in 11:8) |
| 46       | blend mode | 0 replace, 1 saturating add, 2 average, 3 maximum |
| 47       | convolution shift | the sum is divided by 2^shift |
| 48..56   | kernel | 3x3 coefficients, row-major, 48 = (dx, dy) = (-1, -1) |

Motion vectors of both units are added up. The engine produces pixel (x, y)
from source position (x + vx, y + vy). A translate of (+1, 0) therefore moves
the picture one pixel left each frame. Rotation and zoom are about the buffer
centre.

## Effects engine: one pixel at a time

The engine is the part to understand before changing anything. It is a small
multi-cycle machine, not a pipeline. Each pixel goes through the following
steps:

1. `pixel_fsm` presents (x, y). Both `motion` units and `translate` give the
   source position (x', y').
2. `effects_time_logic` computes the pixel's clock budget, which loads a
   `timer`.
   - Convolution: the number of taps that take part, plus the memory read
     latency. A tap takes part if its coefficient is nonzero and its
     neighbour lies inside the buffer.
   - Generators: a fixed 3 clocks.
3. **Convolution mode.**
   - `conv_fsm` requests the participating neighbours of (x', y') one per
     clock, lowest tap index first. They are read from the *front* buffer,
     which is the frame now on screen.
   - Each pixel arrives two clocks after its request is granted. `mult_add`
     multiplies it by the tap's coefficient, keeping a signed running sum per
     channel. The tap index travels alongside the request through a
     two-stage delay line.
   - The final sum is shifted right by register 47 and clamped to 0..15 per
     channel.
4. **Generator mode.**
   - The engine reads pixel (x, y) of the *back* buffer.
   - Each `generator` decides whether it lights (x', y'), using its own read
     ports on the sample buffer and the spectrum RAM.
   - `blend` starts from the memory pixel and applies the lit generators in
     order, using the blend mode.
5. When the timer has run out and the convolution has finished, the colour is
   written to (x, y) of the back buffer.

When the memory manager refuses a read, the engine retries the same request
on the next clock. While a read is refused, the timer is frozen. Writes wait
for a grant in the same way.

Without refusals, a pixel takes *taps + 5* clocks in convolution mode (14 for
a full 3x3 kernel) and 6 clocks in generator mode.

The processor's `time_logic` gives the matching lower bound for a whole
sweep: PIXELS x 5 and PIXELS x 6. The control logic waits for both that
processor timer and the engine's busy flag, so refusals lengthen a sweep
without breaking it.

## Frame buffers and the memory manager

- The virtual buffer (1280x512 by default) is split into vertical strips,
  one per SRAM: SRAM s holds columns s x 640 .. s x 640 + 639 of *both*
  buffers.
- Address in SRAM s: `buf * 640 * H + y * 640 + (x - s * 640)`.
- Display d is placed at x = d x GLOBAL_W / N_DISP. Each screen therefore
  reads only its own SRAM, and two displays never compete for one chip.
- Displays read the buffer selected by `flip`. The effects engine writes the
  other buffer.
- Every clock, each SRAM serves one request, in this priority order:
  1. displays (lower index first);
  2. the effects read;
  3. the effects write.
- Read data comes back two clocks after the grant. The `xvga` blocks delay
  their syncs by the same two clocks.
- Reads outside the buffer are granted and return black. Writes outside it
  are dropped.
- The SRAMs are assumed to be synchronous with one clock of read latency. A
  behavioural model is `tb/sram_model.sv`.

**Throughput limit.** During active video, a display takes its SRAM on
every clock. The effects engine gets its chip only in the blanking intervals,
about 27 % of the time at 640x480. At a 25 MHz pixel clock, a full-size
program with one convolution and one generate sweep over 655 360 pixels
takes about 29 M clocks, which is roughly 70 video frames. The screens
therefore update at a few frames per second, not every frame. Faster updates
would need more memory bandwidth, for example a wider SRAM word holding
several pixels, or a read cache in the engine. Neither is built here.

## Audio front end

- **`sample_fifo`** is a circular block RAM. Each read port is addressed by
  *age* (0 = newest sample) and returns data one clock later. Ages that have
  not been written yet read 0.
  - Port 0 is for the FFT, port 1 for beat detection, and ports 2 and up for
    the generators.
  - Samples are 8-bit signed.
- **`fft`** is a direct DFT evaluated bin by bin. For each of the N/2 bins
  it makes one pass over the newest N samples, with one complex
  multiply-accumulate per clock. A pass takes N/2 x (N + 2) clocks: 33 024
  at N = 256, well inside one frame. The sine table is computed at
  elaboration time.
  - Magnitude: (|Re| + |Im|) / 2^14, saturated to 16 bits, written to
    `fft_bram` with one bin per word.
  - It produces the same spectrum as a radix-2 FFT. It is sequential and
    needs only one multiplier pair.
- **`beat_detect`** starts when the FFT has finished.
  - It computes E = (sum of bins 1..8) + (sum of |sample| over the newest
    256 samples).
  - It signals a beat when 2E > 3A and E > 64, where A is a running average
    updated as A += (E - A)/8.
  - During a beat, the beat strength is min(E - A, 32767). Otherwise it is 0.
  - It takes BASS_BINS + WIN + 3 clocks.

## Parameters (top level)

| parameter | default | meaning |
|-----------|---------|---------|
| GLOBAL_W, GLOBAL_H | 1280, 512 | virtual buffer size |
| N_SRAM | 2 | SRAM chips (vertical strips) |
| N_DISP | 2 | displays, side by side |
| DEPTH | 48000 | audio history in samples |
| FFT_N | 256 | DFT length (N/2 bins) |
| IMEM_DEPTH | 1024 | program words |
| NBUTTONS | 8 | push buttons |
| H_*/V_* | 640/16/96/48, 480/10/2/33 | video timing |

GLOBAL_W must be a multiple of N_SRAM and N_DISP. Each screen must fit inside
one strip.

## Where this departs from the original description

The original description gives the block structure, the signal names of the
processor and effects engine, the list of effects and an example program. It
gives no widths, encodings, algorithms or sizes. The following are therefore
this design's own choices:

- the instruction set and register map above;
- the kernel size (3x3);
- two motion units and two generators, as in the example program;
- the drawing rules of the generators and the blend modes;
- the beat-detection rule;
- the DFT in place of a specific FFT structure;
- the memory layout and arbitration.

Other points to note:

- **Beat detection timing.** Beat detection is started by the end of the FFT
  pass rather than directly by the frame signal, so that it sees the fresh
  spectrum.
- **Timing.** The processor's timer holds the pc for a lower-bound cycle
  count. The control logic additionally waits for the engine's busy flag
  (see above).
- **Not built.**
  - The codec interface: samples enter on `sample`/`sample_valid`.
  - The SRAM chips: they are reached through the `sram_*` ports.
  - How programs reach the board: they arrive through the `imem_*` port.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/viz_pkg.sv tb/tb_alu.sv \
          --top-module tb_alu -Mdir obj_tb_alu -o sim
obj_tb_alu/sim
```

Replace `tb_alu` with any testbench name. The testbenches do not depend on
initial values, so `+verilator+rand+reset+2` may be added.

- One unit testbench per block: `tb/tb_<module>.sv`. Each checks its block
  against values computed independently in the testbench, including cycle
  counts where a latency is defined. These include the DFT pass length, the
  beat-detection latency, the per-pixel budgets, the memory read latency and
  the sync delay.
- **`tb_visualizer_top`** runs the whole design at a reduced size: a 16x8
  buffer on two 8x8 screens, a 32-point DFT and short frames.
  - It loads a program that counts frames, reads the beat, translates and
    convolves the previous frame, draws rings, and uses SKIP to draw an
    extra disc only on beats.
  - It keeps its own model of every frame and compares both screens, as
    captured from the VGA outputs, pixel by pixel.
  - It also counts the mechanisms and fails any that never happened: buffer
    flips, FFT passes, beats, both sweep kinds, skips taken and not taken,
    and refused memory requests.
- **`tb_figure1_program`** hand-assembles the original example frame program
  and runs it on the reduced-size design.
  - The program: reset-button skip, rotate plus translate, a kernel with
    convolve, waveform and scope generators, then a ring, then an angle
    increment and a compare-and-skip.
  - At every flip it checks the program's registers against a model.
  - It requires both outcomes of both skips, a nonzero rotation, one
    convolve and two generate sweeps per run, and pattern pixels in both
    colours.
- **`tb_visualizer_full`** runs the top at its default parameters.
  - Two 640x480 screens, the 1280x512 buffer and 48 000-sample audio history.
  - A shifted convolution of a known pattern followed by a ring generator,
    checked on both screens before and after the flip.
  - It takes about 30 M clocks, under a minute with Verilator.
