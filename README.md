# GALS 8x8 two-dimensional FFT core

This core computes the two-dimensional discrete Fourier transform of an 8x8 block of complex
samples, such as a tile of image pixels. The arithmetic runs on its own clock (`clk2`). The
serial input and output buffers run on another (`clk1`). The two clocks need no fixed
relation: data crosses between them through a two-stage **2-phase micropipeline**, made of
Sutherland capture-pass latches controlled by Muller C-elements. No clock is shared across
that boundary. This style is called GALS: globally asynchronous, locally synchronous.

```
            clk1                                clk2                                   clk1
 data_in ─► input_buffer ─► [C]─latch 1 ─► fft2d_processor ─► [C]─latch 2 ─► output_buffer ─► data_out
 en         16 x 24 bit       384 bit       row/column FFT      3072 bit       128 x 24 bit     rd_en
            buff_full                       fft8_1d: 3 stages x 4 butterflies
```

The external interface is narrow. One 24-bit word goes in per `clk1` cycle, and 16 words form
one 8-point row. One 24-bit word comes out per `clk1` cycle, and 128 words form the 8x8
result. Wide parallel paths (384 and 3072 bits) exist only inside the core.

## Number format

* Every value is complex. The real and imaginary parts are each a 24-bit two's-complement
  number in **Q12** (12 fractional bits), so 1.0 is `24'h001000` and the range is
  -2048.0 to +2047.99976.
* Input row word order: word `2i` is Re x[i] and word `2i+1` is Im x[i], for i = 0..7.
  Eight rows make one block, row 0 first.
* Output word order: element X[u][v] is word `2(8u+v)` (real part) followed by word
  `2(8u+v)+1` (imaginary part). The result is row-major, with u the frequency along the
  columns and v the frequency along the rows:
  X[u][v] = Σ_r Σ_c x[r][c]·e^(-j2π(ur+vc)/8).
* There is no scaling between stages. Over a full 2-D transform a value can grow by up to
  64x, and a sum that leaves the 24-bit range wraps around. Inputs must therefore stay below
  about ±32.0 in magnitude. This matters: a block of raw 8-bit pixel values in Q12 (0..255.0)
  overflows at the DC term (64 × 255 = 16320 needs 28 bits). See "Departures and open
  points".
* Twiddle factors are Q12 constants. The non-trivial one is cos 45° = 2896/4096. Each product
  B·w is kept at full precision (49 bits, Q24). It is then shifted right by 12 bits, which
  truncates it toward −∞. This rounding and the twiddle rounding limit the accuracy to a
  relative error of a few 1e-4 of the input magnitude.

## The asynchronous handshake

This is the least conventional part of the design.

### Events, not levels

Each handshake wire carries **events**, and an event is a *transition* of the wire, rising
or falling. A request transition says that the data is ready. The matching acknowledge
transition says that the data has been taken. After reset every request and acknowledge
wire is 0. A channel has a request outstanding exactly when its request and acknowledge
wires differ.

### Muller C-element (`muller_c`)

The output copies the two inputs when they agree and holds its value when they differ. In
each stage, one input is the incoming request. The other input is the *inverted* pass-done
of the latch that the C-element controls. The C-element therefore produces a capture event
only when both of these hold:

* a new request has arrived, and
* the latch has passed its previous contents on.

The module is a level-sensitive latch. Its enable is `a == b` and its data input is `a`. Its
`rst` input forces 0.

### Capture-pass latch (`capture_pass_latch`)

This is a data latch driven by two event inputs:

* **C (capture)** makes the latch opaque.
* **P (pass)** makes it transparent again.

While C and P are at the same level the latch is transparent. Once C has made one more
transition than P, it holds the data. The outputs **Cd** (capture done) and **Pd** (pass
done) report the C and P levels after the latch has switched.

### One stage, step by step (latch 1)

1. The input buffer has stored 16 words. It raises `buff_full`, and one `clk1` cycle later it
   toggles its request.
2. C-element 1 sees the request and the inverted Pd of latch 1 agree, so it toggles C. Latch 1
   closes on the 384-bit row.
3. Cd of latch 1 is `ack1`. It goes back to the input buffer (through a two-flip-flop
   synchroniser), which drops `buff_full` and starts filling the next row. The latch is
   still holding the previous row, so the buffer can refill while the processor works.
4. Cd also passes through a **delay element** and becomes `req1` towards the processor. In
   silicon this delay is matched to the worst-case settling time of the data.
5. The processor synchronises `req1` into `clk2` and copies the row. It then toggles its
   acknowledge, which is wired to P of latch 1, so the latch becomes transparent again.
6. Pd returns to C-element 1 through another delay. If the next request is already waiting,
   the C-element fires only after the latch has had time to pass the new row through. Without
   this delay the reopening and the next capture would coincide, and the new data would never
   be taken.

Latch 2 works the same way:

* The processor's request goes through a delay and then C-element 2. C-element 2 closes
  latch 2 on the 3072-bit result.
* Cd of latch 2 acknowledges the processor. Through a delay, it also becomes `req2` towards
  the output buffer.
* The output buffer copies the block and toggles P of latch 2.

### Back-pressure

Each latch is a one-place buffer, and nothing is ever dropped. The following holds happen,
and the end-to-end test makes every one of them occur:

* The input buffer ignores `en` while `buff_full` is high. The writer must hold its word until
  `buff_full` falls.
* Latch 1 stays closed while the processor is busy transforming. It reopens when the
  processor starts collecting the next block.
* The output buffer takes a new block only after all 128 words of the previous block have
  been read. Until then, latch 2 stays closed.
* When latch 2 is still full, the processor keeps a finished result until the previous one
  has been acknowledged.

## The transform (`fft2d_processor`, `fft8_1d`)

### Row-column schedule

The 2-D DFT is separable. `fft2d_processor` runs on `clk2` and uses one 8-point FFT twice:

| phase   | what happens | `clk2` cycles |
|---------|--------------|---------------|
| COLLECT | eight rows arrive over latch 1 and are written into an 8x8 working store | set by the input rate |
| ROWS    | rows 0..7 enter the FFT on consecutive cycles; each result overwrites its row | 17 |
| COLS    | columns 0..7 enter the FFT; each result overwrites its column | 17 |
| OUTPUT  | once the previous result is acknowledged, the store is copied to the output register and the request toggles one cycle later | ≥ 1 |

`busy` is high for exactly 34 cycles per block. The processor starts collecting the next
block right after OUTPUT, while the previous result is still travelling out.

### 8-point FFT (`fft8_1d`)

This is a radix-2 decimation-in-time FFT: three stages of four butterflies, all working in
parallel.

* Inputs are taken in bit-reversed order: x0, x4, x2, x6, x1, x5, x3, x7.
* Outputs come out in natural order.
* Stage s pairs line j with line j + 2^(s−1) inside groups of 2^s lines.
* The twiddles are W8^0 in stage 1, W8^0 and W8^2 in stage 2, and W8^0 to W8^3 in stage 3.

The FFT is fully pipelined. It accepts one 8-point vector per cycle, and the result appears
9 cycles later.

### Butterfly (`radix2_butterfly`)

The butterfly computes out1 = A + B·w and out2 = A − B·w through three register ranks:

1. **Operand registers.**
2. **`complex_multiplier`.** It computes B·w = (cx − dy) + (cy + dx)j with four signed 24x24
   Booth multipliers (`booth_multiplier`, radix-4 recoding, 48-bit products). Two 49-bit carry
   look-ahead adder/subtractors combine the products. The product is rescaled to Q12 and
   registered, together with A.
3. **Two carry look-ahead adders per part.** `cla_adder` uses 4-bit groups with group-level
   look-ahead. One adder forms A + Bw and one forms A − Bw, and both results are registered.

The latency is 3 cycles.

## Buffers

* **`input_buffer`** (`clk1`) is a serial-to-parallel buffer.
  * It stores one word on each cycle where `en` is high. `sel` is the word counter.
  * `buff_full` rises on the edge that stores the 16th word.
  * The request toggles one cycle later, so the data is settled before the capture event.
  * `buff_full` falls once `ack1` has answered.
* **`output_buffer`** (`clk1`) is a parallel-to-serial buffer.
  * It loads all 3072 bits in one cycle. It does this when a block is waiting in latch 2 and
    the buffer is empty.
  * On every cycle where `rd_en` is high it registers the next word on `data_out`, with
    `out_valid`.

## Timing summary

| path | cost |
|------|------|
| loading one row | 16 `clk1` cycles, plus synchroniser and handshake latency (a few cycles of each clock) |
| one block in | 8 rows = 128 `clk1` cycles minimum |
| transform | 34 `clk2` cycles |
| one block out | 128 `clk1` cycles with `rd_en` held high |

At equal clock rates, throughput is bounded by the serial ports at one block per roughly
130–150 `clk1` cycles.

## Departures and open points

The following parts follow the original design: the block structure, the two clocks, the
2-phase micropipeline built from C-elements and capture-pass latches, the Q12 format, the
24-bit words, the 16-word serial input, the 3072-bit output buffer, the three-stage radix-2
DIT FFT with four butterflies per stage, and the Booth multipliers and carry look-ahead
adders in the butterfly. The following are choices made here:

* **Where requests go.** In the original block diagram, the delayed capture-done of latch 1
  goes straight into the C-element of latch 2. The 2-D processor, however, must gather eight
  rows before it has a result. Here the first channel therefore ends at the processor, which
  issues the pass event of latch 1, and the processor issues the request of the second
  channel itself.
* **Pass events of latch 2.** These come from the output buffer when it has copied a block,
  not from `rd_en` directly. A level `rd_en` would give two events per block.
* **Pd delays.** The pass-done feedback into each C-element is delayed (see step 6 above).
* **Synchronisers.** A 2-phase request is derived from `buff_full`. Every handshake line that
  enters a clocked domain passes through a two-flip-flop synchroniser.
* **Butterfly alignment.** A is carried through the middle register rank of the butterfly so
  that one butterfly can start per cycle. The original figure routes A from the first rank
  directly to the adders, which is only correct when the inputs are held.
* **Arithmetic details.** Truncation rather than rounding, wrap-around rather than
  saturation, the word orders, the 4-bit carry look-ahead grouping, radix-4 Booth recoding,
  and synchronous active-high reset.
* **Delay values.** Each delay element is set to 2 time units, with no relation to a real
  process. `delay_element` is a **behavioural model** using `assign #DELAY`, and it is the only
  part of `rtl/` that does not synthesize. Before building silicon, replace each one with a
  matched delay line sized to the logic it guards.
* **Latches.** `muller_c` and `capture_pass_latch` synthesize to latches on purpose.
* **Dynamic range.** The 24-bit Q12 datapath cannot hold the 2-D transform of a full-range
  8-bit image. To transform such data, add per-stage scaling (a right shift by 1 in each of
  the six butterfly stages) or widen the words.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | widths, complex type `cplx_t`, twiddle table |
| `rtl/gals_fft2d_top.sv` | top level: buffers, C-elements, latches, delays, processor |
| `rtl/input_buffer.sv`, `rtl/output_buffer.sv` | serial/parallel buffers on `clk1` |
| `rtl/muller_c.sv`, `rtl/capture_pass_latch.sv`, `rtl/delay_element.sv` | micropipeline control (the last is behavioural) |
| `rtl/sync2.sv` | two-flip-flop synchroniser |
| `rtl/fft2d_processor.sv` | row-column 2-D FFT controller and working store on `clk2` |
| `rtl/fft8_1d.sv`, `rtl/radix2_butterfly.sv` | 8-point FFT and its butterfly |
| `rtl/complex_multiplier.sv`, `rtl/booth_multiplier.sv`, `rtl/cla_adder.sv` | butterfly arithmetic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends any
run that hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/fft_pkg.sv tb/tb_gals_fft2d_top.sv \
  --top-module tb_gals_fft2d_top -o sim
./obj_dir/sim
```

Replace `tb_gals_fft2d_top` with any other testbench name. `--timing` is needed because of the
clock generators and the delay elements.

## What the tests establish

* **Arithmetic units** (`cla_adder`, `booth_multiplier`, `complex_multiplier`) are compared
  bit-exactly with integer arithmetic, on corner cases and thousands of random operands.
* **`radix2_butterfly`** is compared bit-exactly with a reference model, under random
  back-to-back issue, and each result must appear exactly 3 cycles after its operands.
* **`fft8_1d`** and **`fft2d_processor`** are compared with a direct floating-point DFT,
  within the tolerance that twiddle rounding and truncation allow. Their latency (9 cycles)
  and transform time (34 cycles) are checked too.
* **Handshake parts** are checked against their event rules.
* **End to end.** `tb_gals_fft2d_top` runs the top with its default parameters and unrelated
  clocks (periods 10 and 7). It sends four blocks through, including an impulse, and compares
  all 512 output words with the DFT. It also requires each back-pressure case listed above to
  happen at least once.

**Not covered:** metastability (the simulator is two-state and the synchronisers are not
stressed), gate-level timing of the self-timed paths, and power and area.
