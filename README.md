# A 504-point prime factor FFT with no multipliers

This is synthesizable SystemVerilog for a pipelined processor that computes
504-point complex discrete Fourier transforms. It contains no multiplier. The
architecture is that of the FASTOR II machine, a TTL design built for speech-rate
signal processing. Two ideas carry the design:

* **Prime factor algorithm.** 504 = 8 x 9 x 7, and the three factors are
  mutually prime. The transform therefore splits into three sets of *short*
  transforms (63 8-point, 56 9-point and 72 7-point DFTs). No twiddle factors are
  needed between the sets. The work that is left is reordering the data: once
  on input, between the stages, and once on output.
* **Distributed arithmetic.** A short transform is linear in its inputs. So it
  can be computed one bit position at a time: bit b of all N input words
  forms an N-bit *slice*. A ROM maps the slice to the matching partial sum of
  the transform, and an accumulator adds the partial sums with the right
  power-of-two weights. The "multiplications" are all precomputed in the ROM
  tables. The hardware only adds, subtracts and shifts.

Each stage delivers one complex output point every 48 clock cycles (24 bit
slices per real word, two words per point). That is the throughput of the
whole pipeline, because all four buffers work on different frames at the same
time. At the original 200 ns clock, 48 cycles is 9.6 us per point, or
104 kHz complex.

```
 samples ─► input_ordering ─► 8-point stage ─► stage_link ─► 9-point stage
          (counter + EPROM)   (short_transform)  (counters)   (short_transform)
                                                                   │
 bins ◄── output_ordering ◄── 7-point stage ◄── stage_link ◄───────┘
        (memory, counter+EPROM)
```

Data are complex words of two 12-bit two's complement numbers
(`pfft_pkg::cplx_t`, `{re, im}`). All interfaces are valid/ready streams.

## Inside a short transform stage

`short_transform` (parameter `N` = 8, 9 or 7) is the module that repeats.
Its data path, in order:

1. **Corner turning** (`corner_turn`). Words arrive whole, but the lookup needs
   bit slices. Every input point n of the transform has its own 1-bit-wide RAM
   chip (`bit_ram`, 4K x 1). An incoming word, tagged with its point number
   and a word address, is written into its chip one bit per cycle. A 24:1
   multiplexer and a counter pick the bit. The bit order is
   r0, i0, r1, i1, ..., r11, i11, with the real and imaginary bits of the same
   weight next to each other. Bit c of word address a goes to chip address
   24a + c. Reading all N chips at one address then yields a slice.
2. **Double buffer** (`double_buffer_ram`). There are two banks of N chips. One
   bank is filled with the next frame while the other is read. Each bank holds
   a whole 504-point frame, because a stage cannot start before the previous
   stage has finished every transform that feeds it. The banks swap when the
   write bank is full and the read side is issuing (or has issued) its last
   read. The next frame's first read follows in the next cycle.
3. **Read counters and word select** (`read_ctrl`). For every transform t and
   every output word, the counters issue 24 slice reads. Output words are
   numbered `{k, part}`: output point k, real (0) or imaginary (1) part. This
   word select counter holds its value for 24 cycles, then moves on.
4. **Pipeline latch**. It holds the slice plus `{k, part}` as the ROM address.
5. **Sectioned ROM lookup** (`da_rom_lookup`, `da_rom_section`). One ROM
   addressed by N data bits and the word select would need 2^14 words for
   N = 9. Instead, the points are split into three sections of
   ceil(N/3) = 3 points. Each section has a 256-word ROM, and two adders sum
   the three outputs. This works because the transform is linear. For N = 8
   and N = 7, the missing points of the last section read as zero.
6. **Accumulator** (`da_accumulator`). A pipeline latch on the ROM output feeds
   an adder/subtractor. Its other input comes from a shifter and latch.

### What the ROM holds and how the accumulator uses it

Let W = exp(+j 2 pi / N). Section s of the ROM holds, for slice bits x, point k
and part p:

    ROM_s[k, p, x] = round( 128 * sum_{j : x_j = 1} Re/Im( W^((s*SS + j) k) ) )

The ROM value is a sum of fixed-point numbers with 7 fraction bits, and addresses
with k >= N read zero. A complex input x = xr + j xi contributes to the output as
follows:

    Re X_k = sum xr Re W^nk - sum xi Im W^nk
    Im X_k = sum xr Im W^nk + sum xi Re W^nk

So the ROM part bit is the output part XOR "this slice holds imaginary
bits". The subtractor is used when an imaginary slice feeds a real output.
It is also used for the sign bit level b = 11, whose two's complement weight
is -2^11. When both conditions hold, they cancel.

The accumulator works least significant bit first. For slice c and bit level
b = c/2:

    c = 0      : acc = ±P
    c even > 0 : acc = (acc >>> 1) ± P     (shift once per pair of slices)
    c odd      : acc = acc ± P

After 24 cycles, acc = sum_b (P_re(b) + P_im(b)) * 2^(b-11). This equals the
transform scaled by 128 / 2048 = 1/16 (`GROWTH_SHIFT` = 4). Interleaving real
and imaginary bits lets both parts accumulate into one register. If all real
bits came first, the real-part result would need an extra register.

The scale factor 1/16 makes any stage's output fit in 12 bits, because
|Re X_k| <= 2048 * N * sqrt(2) < 2048 * 16 for N <= 9. The low bit levels can
add up to twice the largest partial sum before the sign level is subtracted.
For that reason the accumulator register has one guard bit (13 bits). The
result is its low 12 bits.

### Pipeline timing of a stage

| cycle | what happens |
|---|---|
| 0 | `read_ctrl` issues the read of slice c |
| 1 | RAM output valid (registered read) |
| 2 | pipeline latch holds slice and word select; ROM sections and adders settle |
| 3 | ROM pipeline latch holds the partial sum |
| 4 | accumulator updated |

A word is finished one cycle after its 24th slice is added. The real word is
held until the imaginary word is done. The complex point then goes into the
output register. After a bank swap, the first point is valid 53 cycles later. From then on one point follows every 48 cycles.

When the output register is full and not being taken, the entire read
pipeline is held (`stall`). This covers the RAM read, both latches, the
accumulator and the counters. It resumes without losing a slice. This happens
when the next stage's write bank is full and waiting for its own swap.

## Data order between the stages

The index maps make every stage a plain DFT:

* input: n = (63 n1 + 56 n2 + 72 n3) mod 504 (Ruritanian map)
* output: (k1, k2, k3) = (k mod 8, k mod 9, k mod 7) (Chinese remainder map)

Only counters and two translation tables (EPROMs, filled at elaboration) are
needed to route the data:

* **`input_ordering`**: a counter n and an EPROM. Sample n goes to chip n1 of
  the 8-point stage at word address n2*7 + n3.
* **Read stride** (`read_ctrl` parameter `P`, the length of the next stage). A
  stage reads transform t from word address (t mod P)*(T/P) + t div P, where T
  is the number of transforms in a frame. Transforms therefore leave in the
  order the next stage needs.
* **`stage_link`**: the N outputs of one transform all go into one chip of the
  next stage, at consecutive addresses. The next transform goes into the next
  chip, and so on, cycling through the chips. This needs only three counters.
* **`output_ordering`**: the 7-point stage produces bin k at position
  s = ((k1*9 + k2)*7 + k3). A double-buffered 504-word memory stores the words
  in that order. A counter and an EPROM holding s(k) read them back in natural
  order 0..503. `out_last` marks bin 503.

Worked through for the default factors:

| stage | N | transforms | stride P | chip n holds, at word address |
|---|---|---|---|---|
| 1 | 8 | 63 | 9 | input n1 = n, address n2*7 + n3 |
| 2 | 9 | 56 | 7 | n2 = n, address n3*8 + k1 |
| 3 | 7 | 72 | 1 | n3 = n, address k1*9 + k2 |

A chip holds at most 72 words x 24 bits = 1728 bits, well inside 4K.

## Result, accuracy and conventions

    out_k = X_k / 4096,   X_k = sum_n x_n exp(+j 2 pi n k / 504)

The kernel sign is `pfft_pkg::KERNEL_SIGN`. Set it to -1.0 for the
exp(-j ...) convention. All ROM and EPROM contents are recomputed from it at
elaboration. Each stage divides by 16.

Measured against a double-precision DFT, the error was at most 1 LSB per part
over eight frames (random, full-scale corner values and a single tone). A
single stage is within 2 to 3 LSB of its exact X_k/16. The errors come from
rounding the three section ROMs and truncating at the shifts.

## Interfaces of the top, `pfft504`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`/`in_ready`/`in_data` | in/out/in | 1/1/24 | sample stream, natural order |
| `out_valid`/`out_ready`/`out_data` | out/in/out | 1/1/24 | bin stream, natural order |
| `out_last` | out | 1 | bin 503 of a frame |
| `swap` | out | 4 | bank swap pulses: stages 1..3, output memory |
| `stall` | out | 3 | stage read pipeline held by its output |

Throughput and latency:

* A stage takes a word in 24 cycles. Stage 1 therefore absorbs a frame at up to
  twice the steady rate, then applies backpressure until its banks swap.
* Steady state is one frame per 24192 cycles, exactly 504 x 48. A bank swap
  happens on the cycle of the last read of the old frame, so the read side
  never idles. Fed one sample every 48 cycles, the processor keeps up
  indefinitely and the source never waits (`tb_pfft504_realtime`, 30 frames).
* The first bin of a frame appears about 84,700 cycles (three and a half
  frame times) after its first sample. This is half a frame to fill stage 1,
  a frame through each of the three stages, and the output memory.

## Files

| file | contents |
|---|---|
| `rtl/pfft_pkg.sv` | constants, `cplx_t`, kernel and index-map functions |
| `rtl/pfft504.sv` | top: the five blocks in a chain |
| `rtl/input_ordering.sv`, `rtl/output_ordering.sv` | counters + address translation tables |
| `rtl/stage_link.sv` | inter-stage write addresses |
| `rtl/short_transform.sv` | one distributed-arithmetic stage |
| `rtl/corner_turn.sv`, `rtl/double_buffer_ram.sv`, `rtl/bit_ram.sv` | corner turning and bit-slice buffer |
| `rtl/read_ctrl.sv` | read and word select counters |
| `rtl/da_rom_lookup.sv`, `rtl/da_rom_section.sv` | sectioned lookup table |
| `rtl/da_accumulator.sv` | latch, add/subtract, shift-and-latch |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. `tb_pfft504` runs the whole processor at its real size. It
streams eight frames, compares every bin with a floating-point DFT, and holds
the output long enough that every stage stalls. It also checks the
steady-state frame period. It runs in well under a second.
`tb_pfft504_realtime` feeds 30 frames at exactly one sample per 48 cycles. It
checks that the source never waits and that output frames are exactly
24192 cycles apart.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/pfft_pkg.sv tb/tb_pfft504.sv \
        --top-module tb_pfft504
    ./obj_dir/Vtb_pfft504

Replace the testbench name to run any other test. Modules are found through
`-Irtl`. The package has to come first on the command line. Lint a module
with `verilator --lint-only -Wall -Irtl rtl/pfft_pkg.sv rtl/<module>.sv`.

## Changing it

* **Other transform lengths.** Change `N1/N2/N3` and `FRAME` in `pfft_pkg`.
  The input and output maps in `in_index`/`out_seq` use those constants. Set
  each `short_transform`'s `P` to the next stage's length (1 for the last) and
  the `stage_link` parameters to match. The arithmetic modules themselves do
  not change: the ROMs depend only on N.
* **ROM sections.** `SECTIONS` of `da_rom_lookup`/`short_transform` trades ROM
  size for adders. Fewer sections mean larger tables. A single 16K-word table
  for N = 9 is heavy to build at elaboration in Verilator and has not been
  simulated.
* **Word width.** `B` in `pfft_pkg`. `ROM_FRAC` follows from `B` and
  `GROWTH_SHIFT`.

## Where this RTL goes beyond, or departs from, the original description

The original description gives the block structure, the slice order, the
corner-turning scheme, the ROM sectioning, the 4K x 1 RAMs and the
48-cycle rate. The following are choices made here:

* The valid/ready handshakes, the reset, and the bank-swap condition. The same
  goes for stalling a stage's read pipeline when its output is not taken.
* The fixed-point scale: 7 ROM fraction bits and a divide by 16 per stage. The
  accumulator also has one guard bit where the original shows a 12-bit path.
* Double buffering of the output memory.
* The read stride and inter-stage address counters. The original states only
  that the stages address their data with counters, and that the outputs of
  one transform go to one RAM chip of the next stage.
* Section sizes of 3, 3, 2 points (N = 8) and 3, 3, 1 (N = 7).
* One extra register between the RAM and the pipeline latch, standing for the
  RAM access time.
* The tables are computed at elaboration rather than programmed into
  EPROMs/ROMs.

Not built:

* The variant that raises throughput with a second ROM and accumulator working
  in parallel: one for the real part and one for the imaginary part of each
  output point.
* A general programmable short-transform chip, which the original only
  proposes.
