# JPEG encoder accelerators for a soft-core SoC

This design speeds up baseline JPEG encoding on a small FPGA system built around a
32-bit soft CPU (Altera Nios class). The CPU runs the encoder in software. The
expensive steps are moved into custom-instruction hardware that sits beside the
CPU's ALU:

- the 2D DCT, quantization and zig-zag scan of an 8×8 block;
- run-length and Huffman coding.

Two ideas carry the design:

1. **Fast-algorithm DCT.** The 8-point DCT uses an Arai-Agui-Nakajima style
   flow graph with plane rotations. It needs 13 multipliers instead of the
   56 that a direct evaluation of the 7 non-trivial cosine products per
   output would take.
2. **Concurrency.** A custom instruction does not stall the CPU for the whole
   block. The CPU loads a register file, starts the hardware and keeps working,
   for example by entropy-coding the previous block. It reads the results later.
   A counter holds the hardware's register files locked for a fixed number of
   cycles.

A third part is an on-chip clock generator built from a chain of multiplexers,
with a frequency meter. The CPU controls both through a custom instruction.

The SystemVerilog is synthesizable except `ring_clock_gen`, which is a timing
model of a ring oscillator (see below).

## Block map

```
                jpeg_soc_top
 CPU clock clk ──┬──────────────────────────┬─────────────────────┐
 clk_mem (2×) ───┤                          │                     │
            dct_custom_block          enc_custom_block      clk_custom_block ── ring_clock_gen
            ├ input reg file 16×32     ├ coef reg file 32×32   ├ s/a/tap registers     (int_clk)
            ├ op_counter (mod value)   ├ rle_encoder           └ clk_freq_meter
            ├ dct_2d ─ dct_1d_aat      ├ huffman_encoder
            │          ├ dct_butterfly └ bit_packer → bit-stream file 64×32
            │          └ dct_rot ×3
            ├ coefficient RAM 64×16 (ram_2c)
            ├ quant_zigzag (scale table, DC predictor)
            └ output reg file 32×32
```

Shared types, prefix-code enums and all constant tables are in
`rtl/jpeg_pkg.sv`:

- rotation constants;
- zig-zag positions;
- the default quantization table;
- Huffman tables, built at elaboration from the standard BITS/HUFFVAL lists.

The CPU itself and the PLL that doubles its clock are outside the design.
Their connections are the top-level ports.

## The 8-point DCT (`dct_1d_aat`)

The transform computed is

X(k) = α(k) · Σ_{n=0..7} x(n) · cos((2n+1)kπ/16),  α(0)=1/√2, α(k>0)=1.

This is the unnormalised form: a 2D pass gives 4× the JPEG-normalised
coefficient. The quantizer removes that factor.

**Input stage.** The inputs are folded pairwise: s = x(n)+x(7−n) and
d = x(n)−x(7−n).

**Even half.** It works on a0 = s07+s34, a1 = s07−s34, b0 = s25+s16 and
b1 = s25−s16.

- X(0) = C4·(a0+b0) and X(4) = C4·(a0−b0), where C4 = cos(π/4).
- One rotation by π/8 on (a1, b1) gives X(2) and X(6).

**Odd half.**

- One rotation by 3π/16 acts on (d07, d34).
- One rotation by π/16 acts on (d16, d25).
- Cross-subtracting their outputs gives X(3) and X(5).
- A butterfly on each rotation's outputs, followed by two more C4 products,
  gives X(1) and X(7).

**Rotation unit (`dct_rot`).** Each rotation uses three multipliers:
m = cosθ·(x+y), then

- out1 = m + (sinθ−cosθ)·x = x·sinθ + y·cosθ
- out2 = m − (sinθ+cosθ)·y = x·cosθ − y·sinθ

That is 3×3 + 4 = 13 multipliers.

**Arithmetic.**

- Constants are signed Q.12.
- Internal sums are wide enough never to overflow.
- Outputs are rounded half-up and saturated to `OUT_W` bits with `OUT_FRAC`
  fraction bits.
- The unit is combinational.

## 2D DCT engine (`dct_2d`) and its timing

One `dct_1d_aat` instance is shared by the row and column passes. Samples are
8-bit signed, already level-shifted by −128.

**Row pass.**

- Read 8 samples.
- Transform them in one cycle.
- Write the 8 results, rounded to 12 bits with one fraction bit, into a
  64×12 transpose memory.
- The write address has its two 3-bit index fields swapped, so the column
  pass reads columns as contiguous rows.

**Column pass.** It reads from the transpose memory and writes 16-bit integer
coefficients, in raster order, into the coefficient RAM.

**Memory timing.** All memories are built like FPGA block RAM:

- a read registers the address, then reads the array, so it takes 2 cycles;
- a write takes 1 cycle.

One vector costs 16 + 1 + 8 = 25 cycles. A block costs 16 vectors, so
`done` pulses 401 cycles after `start`.

## Quantization and zig-zag (`quant_zigzag`)

Each coefficient is read and multiplied by a 17-bit scale S = round(65536/Q):

q = sign(F) · ((|F|·S + 2^17) >> 18)

The shift of 18 removes both the 65536 and the factor 4 from the DCT scaling.

**Zig-zag scan.** There is no separate reordering pass. The result is written
at the address given by a zig-zag look-up table, so the output file is already
in scan order.

**DC term.** The DC coefficient is replaced by its difference from the
previous block's DC. A `CLR_DC` instruction clears the predictor at the start
of an image.

**Scale table.**

- It is a flop table written from the CPU clock domain.
- Its reset value is the JPEG standard's example luminance table.
- Each coefficient takes 3 cycles, so the pass is 192 cycles.

## The concurrency scheme (`dct_custom_block`, `op_counter`)

**Register files.** The custom instruction owns an input register file
(64 samples) and an output register file (64 coefficients).

**Starting a block.** A `START` instruction loads `op_counter` with the mod
value, which is the number of `clk_mem` cycles one block needs. While the
counter runs:

- the sequential engine is enabled;
- both register files are locked: `LOAD` is ignored and `READ` returns 0.

When the count reaches the mod value, the engine stops and the files unlock.

**Mod value.**

- The default mod value is 594 = 1 + 400 + 1 + 192 `clk_mem` cycles, which
  is 297 CPU cycles.
- `SET_MOD` can change it.
- A value that is too small cuts the engine off. The block is then left
  partly processed, and the end-to-end test checks that this happens.

**Clocking.**

- The engine runs on `clk_mem`, which is twice the CPU clock.
- `clk_mem` must come from a PLL and be phase-aligned with the CPU clock.
- Signals cross between the two domains through plain registers, without
  synchronizers. That is only correct because of the alignment.
- Start and clear requests cross as toggles.

Every custom instruction returns its result two CPU cycles after `start`. On
the CPU side, declare them multi-cycle with a fixed cycle count of 2.

### Prefix codes

The 11-bit prefix selects the operation. Only the low bits are decoded.

| block | prefix | operation | operands / result |
|---|---|---|---|
| DCT | 1 LOAD | write 4 samples | dataa[3:0] word w; datab byte i = sample 4w+i |
| | 2 START | start one block | |
| | 3 READ | read 2 coefficients | dataa[4:0] pair p → {q(2p+1), q(2p)} in zig-zag order |
| | 4 SET_Q | write one scale | dataa[5:0] raster index, datab[16:0] = round(65536/Q) |
| | 5 SET_MOD | counter mod value | datab[15:0] |
| | 6 CLR_DC | clear DC predictor | |
| | 7 STATUS | | {busy, 15'b0, count} |
| ENC | 1 LOAD | write 2 coefficients | dataa[4:0] pair, datab = {c(2p+1), c(2p)} |
| | 2 START | encode the block | |
| | 3 READ | bit-stream word | dataa[5:0] word index; the first bit is bit 31 |
| | 4 STATUS | | {busy, 15'b0, bit count} |
| CLK | 0 STOP | stop the clock, held at 0 | |
| | 1 RUN | set up and run | s = dataa[18:0], tap = dataa[21:19], a = datab[18:0] |
| | 2 MEASURE | start a measurement | |
| | 3 READ | | count value |
| | 4 STATUS | | {30'b0, measure done, running} |

## Entropy coder (`enc_custom_block`)

The coder is baseline JPEG.

**`rle_encoder`.** It scans the 64 zig-zag-ordered values and emits a stream
of symbols over a valid/ready handshake:

- one DC (size, amplitude) symbol;
- AC symbols (run, size, amplitude);
- ZRL for each run of 16 zeros that a later non-zero value ends;
- EOB if the block ends in zeros.

Amplitudes use the JPEG one's-complement form: a negative v is coded as v−1
in `size` bits.

**`huffman_encoder`.** It looks up the code in tables built at elaboration
from the standard luminance DC and AC BITS/HUFFVAL lists. It appends the
amplitude bits and passes on a code word of up to 27 bits.

**`bit_packer`.**

- It packs code words MSB-first into 32-bit words.
- On flush it pads the last word with 1s.
- It does not insert the 0x00 stuffing byte after 0xFF. That belongs to the
  file writer in software.

The encoder runs on the CPU clock. Its run time depends on the data, so the CPU
polls `STATUS` instead of using a fixed count.

## Internal clock generator (`ring_clock_gen`) and meter

**Ring oscillator.** It is a loop of 2:1 multiplexers and one inverter. In
loop order:

- The inverter drives muxes 16 → 17 → 18 in series.
- A majority gate votes over the outputs of muxes 16, 17 and 18.
- The majority output runs through muxes 8–15, then muxes 0–7.
- An 8:1 multiplexer (`tap`) picks the output of one of muxes 0…7. That
  output is the clock, and it feeds back to the inverter.
- With `tap` = k, k+1 of muxes 0–7 are in the loop.

Each mux `i` passes the chain when `s(i)`=1, or its constant `a(i)` when
`s(i)`=0. The select and data words come from the CPU. Stopping the clock
gates the inverter, so the output settles at 0.

**Behavioural model.** This part cannot be described as synthesizable RTL. On
an FPGA it is a deliberate combinational loop placed by hand. The model gives
every element a delay in picoseconds. The defaults are chosen so that tap 0…7
gives periods from 6.076 ns to 13.706 ns, which matches the intended range of
about 6.1–13.7 ns. Real periods depend on placement.

**Frequency meter (`clk_freq_meter`).**

- A mod-80 counter on the CPU clock opens a count-enable window for 40 CPU
  cycles, which is 1.2 µs at 30 ns.
- A 32-bit counter on the measured clock counts its rising edges inside the
  window.
- The enable and clear signals reach the measured clock domain through
  two-flop synchronizers.
- The count is stable once `STATUS` shows done.

## Where this design departs from, or adds to, the original description

- **Prefix codes and operand packing** are this design's own. So is the
  fixed 2-cycle result latency. The description only names the operations:
  load, read, initialise and start.
- **Cycle count.** DCT plus quantization plus zig-zag take 297 CPU cycles per
  block here. The reported hardware figures are 216 cycles for the DCT,
  73 for quantization and 320 for zig-zag, counted separately. Here zig-zag
  costs nothing extra, and the engine does not overlap its memory reads.
  Run-length and Huffman coding together take about 135–200 CPU cycles per
  block here, because the two stages are pipelined. The reported figures are
  128 cycles each.
- **Memory sizes.** The memory bit counts differ from the reported resource
  table:
  - DCT: 2,304 bits against 1,536;
  - quantization: 2,112 against 2,240;
  - entropy coder: 3,072 against 8,448.
  Word widths were not given.
- **Entropy coder details.** The description only names run-length and
  Huffman coding as custom blocks. The baseline JPEG tables, the handshake
  and the bit-stream format are this design's choices.
- **Image preprocessing** (colour conversion, level shift) is assumed done by
  the CPU. The DCT block expects signed, level-shifted samples.
- **Multiplexer chain signals.** The chain has 19 select and 19 data signals,
  so 19 bits of each operand are used. The 8:1 tap select comes from
  dataa[21:19], since its source was not given.
- **Clock control registers.** The clock-generator controls are latched by a
  RUN instruction rather than wired straight to the operand ports, so they
  hold between instructions.
- **Meter window.** The meter window is 40 cycles, half of the mod-80 period.
- **Clock relationship.** `clk_mem` and the CPU clock must be phase-aligned
  2:1, because nothing synchronises the signals between them.

## Simulating

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_ref_pkg.sv` holds
the reference models:

- a floating-point DCT;
- a bit-exact JPEG block encoder.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb rtl/jpeg_pkg.sv tb/tb_ref_pkg.sv tb/tb_jpeg_soc_top.sv \
  --top-module tb_jpeg_soc_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another block's test. The timescale matters
only for `ring_clock_gen`, whose delays are written in picoseconds.

**End-to-end test (`tb_jpeg_soc_top`).** It runs the top at its default
parameters and encodes several 8×8 blocks. Its flow is:

1. Load the samples through the DCT instruction.
2. Start the DCT block.
3. While the block runs, encode the previous block through the encoder
   instruction.
4. Read back and compare everything with the reference model.

It also checks:

- the register-file lockout;
- counter expiry;
- a deliberately short mod value;
- differential DC;
- ZRL and EOB symbols;
- clock start/stop and frequency measurements.

It counts each of these and fails if any never happened. It runs in well under
a second.

**Changing things.**

- The DCT's precision is set by `COEF_FRAC` and the widths in `jpeg_pkg`.
- The quantization table can be changed at run time with `SET_Q`, or at reset
  through `QTAB_LUM`.
- The oscillator periods are set by the delay parameters of `ring_clock_gen`.
