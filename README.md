# Systolic ladder filters for 3-D recursive video filtering

This RTL implements a recursive 3-D digital filter for video: two spatial
dimensions (pixel k1, line k2) and time (frame k3). It processes one pixel per
clock. The filter is built as a *systolic ladder*: one linear chain of identical
small processing elements (PEs). Every wire runs between neighbours, and the
longest register-to-register path is one multiplier followed by one adder,
whatever the filter order. The large stores, the line registers (one image
line each) and the frame registers (one whole frame each), are kept at the
minimum number that the filter equation requires. Only a few extra single-pixel
registers are added, and these are what give the chain its short paths and
local wiring.

Five realisations of the filter are provided. All follow X. Liu and
L. T. Bruton, "High-Speed Systolic Ladder Structures for Multidimensional
Recursive Digital Filters":

* `md_ladder_s1s1s3`, the S1-S1-S3 ladder. It keeps the direct form of the
  equation and has an input latency of 2·floor(N1/2) + 2 clocks.
* `md_ladder_dual`, the dual (transpose) of the S1-S1-S4 ladder. It runs the
  canonic form, has half as many PEs, each with four multipliers, and an
  input latency of one clock.
* `md_ladder_s2s2s3`, the S2-S2-S3 ladder. It splits the filter into a
  nonrecursive and a recursive ladder, each with its own line and frame
  stores, so every section is of one kind. The output is bit-identical to
  S1-S1-S3 but comes about one frame later.
* `md_ladder_s1s1s1`, the simple S1-S1-S1 structure that the ladders are
  derived from. It broadcasts x and y to every multiplier and needs no extra
  pixel registers, but its longest path holds two multipliers and a chain
  of adders. It is there as the baseline of the family.
* `md_ladder_s1s1s2`, the intermediate S1-S1-S2 structure: one chain of
  one-multiplier PEs with a register after every adder, so the longest path
  is one multiplier and one adder, but x and y are still broadcast. Its
  latency is N1 clocks.

The top level `md_ladder_filters` runs all five on the same input stream. The
register bookkeeping, the word formats, the interface and the zero-boundary
circuitry are this implementation's own. The section
"Departures and choices" lists where the RTL goes beyond the published
structure or differs from it.

## What the filter computes

For an input video x and output y, both scanned in raster order (pixel index
fastest, then line, then frame), with K x K pixels per frame:

    y(k1,k2,k3) =   sum over i1<=N1, i2<=N2, i3<=N3        a(i1,i2,i3) x(k1-i1, k2-i2, k3-i3)
                  + sum over the same range, i != (0,0,0)   b(i1,i2,i3) y(k1-i1, k2-i2, k3-i3)

In the raster stream, a step of one in k1 is a delay of 1 clock. A step in k2
is a delay of K clocks (one *line register*, T2). A step in k3 is a delay of
K*K clocks (one *frame register*, T3). A tap (i1,i2,i3) therefore reads the
sample D = i1 + K*i2 + K^2*i3 clocks back.

Number formats:

* Pixels and partial sums are 16-bit two's complement. Every addition wraps
  modulo 2^16; nothing saturates.
* Coefficients are 12-bit two's complement with 10 fractional bits, so they
  cover [-2, 2) in steps of 1/1024.
* Each product keeps bits [25:10] of the full 28-bit product. This is an
  arithmetic shift right by 10 that truncates, then the low 16 bits are kept.

All arithmetic wraps, so the order of the additions does not change the
result. The hardware is therefore bit-exact against a direct evaluation of
the equation, and the testbenches check it that way.

## The ladder PE: two taps, round trip of two

A PE (`s3_pe`) holds two coefficients and multiplies one bus by both of them.
A recursive PE uses the y bus; a nonrecursive PE uses the x bus.

```
        x bus ──[T1]──┬───────────────────────────► to next PE
        y bus ──[T1]──┼─┬─────────────────────────► to next PE
                      s │
                 ×c_first   ×c_second
                      │        │
                      │      [T1]  v
  z ◄──[T1]──(+)◄─────┘        │
  (to left)   ▲                │
              └────(+)◄────────┘◄──── w (partial sum from the PE to the right)
```

Here `z(t+1) = w(t) + q(c_first * s(t-1)) + q(c_second * s(t-2))`.

The buses move right and pass one pixel register per PE. The partial sum
moves left and also passes one pixel register per PE. A product formed in the
PE that is n positions from the output therefore reaches the output 2n clocks
after its operand left the output, so each PE sits two taps further out than
its left neighbour. The register inside the PE delays the second product by
one clock, so one PE covers taps i1 and i1+1 exactly.

The adders are ordered `(w + v) + p_first`. The first sum adds two register
outputs while the multiplier is still working, so only one adder follows the
multiplier.

The first PE of each section has none of its own bus or output registers
(`REG = 0`). Its registers are the pixel registers counted at the front of the
line or frame register that feeds it. In the very first PE of the filter, the
output node y is the combinational sum of two registers. The tap b(0,0,0)
does not exist there, because y cannot depend on itself, and b(1,0,0) uses
the registered second product. The tightest recursive loop is therefore
y → multiplier b(1,0,0) → register → adder → y: one multiplier and one adder.

## Sections and the balancing of line and frame registers

`s3_level1` is one *section*. It realises all taps i1 = 0..N1 that share one
line tap i2 and one frame tap i3. It holds NP = floor(N1/2)+1 recursive PEs,
with coefficient pairs b(0)b(1), b(2)b(3), and so on. These are followed by NP
nonrecursive PEs with pairs a(0)a(1), a(2)a(3), and so on. If N1 is even, the
last pair's second coefficient is zero. A section has P = 2·NP PEs and
p2 = P − 1 pixel registers on its bus path, and as many on its partial-sum
path.

The direct-form filter, `md_ladder_s1s1s3`, puts all (N2+1)(N3+1) sections in one
chain. The order is (i2,i3) = (0,0), (1,0), …, (N2,0), (0,1), …. Between two
neighbouring sections:

* each bus (x, y and their tags) passes exactly one pixel register;
* the partial sum passes the rest of a line register when the next section is
  one line further out. That rest is `K − (2·p2 + 1)` pixels.
* the partial sum passes the rest of a frame register when the next section
  starts a new frame tap. That rest is `K² − (N2·K + 2·p2 + 1)` pixels.

These lengths follow from one condition. The round trip from one section's
first PE to the next section's first PE must be exactly K clocks for a line
step. For a frame step, where the chain has already covered N2 line steps, it
must be K² − N2·K clocks. The bus path contributes p2 + 1. The partial-sum
path contributes p2 plus the remaining register. So each line and frame
register is still present exactly once: only p2 + (p2 + 1) of its pixels have
been moved into the bus and into the PEs. The functions `line_gap` and
`frame_gap` in `ladder_pkg` compute these lengths.

With the default parameters (N1 = 3, N2 = N3 = 1, K = 64):

| quantity | value |
|---|---|
| sections | 4, each with 4 PEs (2 recursive, 2 nonrecursive) |
| multipliers | 31 (32 taps, less b(0,0,0)) |
| p2 (bus registers per section) | 3 |
| line-register remainder | 64 − 7 = 57 words (two of them) |
| frame-register remainder | 4096 − 71 = 4025 words (one) |
| input-to-output latency | 4 clocks |

The nonrecursive PEs come after the recursive ones in each section. So x
reaches the a(0,·,·) multiplier 2·NP clocks later than y would, and the output
is the filter response delayed by LAT = 2·NP = 2·floor(N1/2) + 2 clocks.

## The dual chain: one state bus, two partial-sum lines

`md_ladder_dual` is the same chain with every arrow reversed. Transposing a
signal-flow graph keeps its transfer function. Here it also moves the long
stores from the partial-sum path onto a bus, and lets the input enter right
at the output end. The filter is computed in canonic form:

    v(n) = x(n) + sum over i != 0 of b(i) v(n − D(i))
    y(n) = sum over i of a(i) v(n − D(i))

A PE (`s5_pe`) multiplies the state bus v by four coefficients. Two of them
feed the **a line**, which runs left to the output node. The other two feed
the **b line**, which runs left to the state node A. Each line has one
register inside the PE (second product) and one at the PE output. The bus
has one register at the PE input, so the round trip is again two clocks per
PE, and one PE covers two pixel taps of a and of b. A section (`s5_level1`)
therefore needs only NP = floor(N1/2) + 1 PEs, and has p2 = floor(N1/2) bus
registers.

```
                        x_in
                         │
  A ◄─[T1]─◄ b line ─ PE0 ◄─(+)◄─ PE1 ◄─ ... ◄─[T1]───────────────── next section
  │                    │           │
  └─► v bus ─────────► PE0 ─[T1]─► PE1 ─► ... ─[line/frame store]──► next section
                       │           │
  y ◄─────── a line ── PE0 ◄────── PE1 ◄─ ... ◄─[T1] (two at B)───── next section
```

The registers that make it work:

* **The b line closes through one register at A.** That register breaks
  the recursion. The state node is then a register output, and the tightest
  loop is v → multiplier b(1,0,0) → adder → A: one multiplier and one adder.
  The register adds one clock to every b tap. So the origin section holds
  b(1,0,0), b(2,0,0) in its first PE, b(3,0,0), b(4,0,0) in the second, and
  so on, while the a taps start at a(0,0,0).
* **Register B.** The other sections must hold b(0,i2,i3) next to
  a(0,i2,i3). So the a line gets one extra register between the first two
  sections, which matches the extra register of the b line. To keep every
  round trip at K, the first bus store is one pixel shorter.
* **Stores on the bus.** Between sections the bus passes the rest of a line
  store, K − (2·p2 + 1) pixels, or of a frame store,
  K² − (N2·K + 2·p2 + 1) pixels. The first store is one pixel shorter,
  because of B. Each partial-sum line passes a single register. There is
  still exactly one store per line and frame tap, now holding the state v.
* **Input.** x_in is added into the b line in front of the first PE, so
  node A takes pixel n at the same edge as the input register would. The
  output node is combinational from A, and `y_out` holds the response to
  pixel n − 1 after the edge that takes pixel n.

Because the state v, not y, is the stored and multiplied signal, rounding
happens at different points than in the direct form. The two filters agree
to within the product rounding, not bit for bit. Each is checked bit-exactly
against its own reference.

With the default parameters the dual chain has 4 sections of 2 PEs and 31
working multipliers. Its bus stores are 60 words (the first line store),
4029 words (frame) and 61 words (second line store).

Zero-boundary mode works as in the direct chain, with one change. The tag
would otherwise have to pass through the line and frame stores on the bus.
Instead, each section has its own raster counter. The counter is reset to
the position that the section's input sample has after the section's bus
delay.

## Two ladders: S2-S2-S3

S2-S2-S3 trades stores for modularity. If the line and frame stores are
off-chip anyway, doubling them costs little, and each ladder then needs only
one kind of section:

```
 x_in ──> [a sec (0,0)]─T1─>[a sec (1,0)]─T1─> ... x bus
 u <──── partial sum <─ line / frame stores <── 0
 u ─T1─────────────────────────────────────────────┐
 y <──── partial sum <─ line / frame stores <──────┘
 y ───> [b sec (0,0)]─T1─>[b sec (1,0)]─T1─> ...   y bus
```

* The nonrecursive ladder carries x on its bus and forms
  u = sum a(i) x(k − i) at its first section.
* u passes one pixel register and enters the far end of the recursive
  ladder's partial-sum path. When the two ladders are folded side by side,
  that end sits next to the first section of the nonrecursive ladder.
* The recursive ladder carries y on its bus and adds sum b(i) y(k − i).
  Its first section has no b(0,0,0), and its output node is y.

Each section has floor(N1/2) + 1 S3 PEs, so p2 = floor(N1/2), as the source
states for this structure. The store remainders are K − (2·p2 + 1) per line
and K² − (N2·K + 2·p2 + 1) per frame, the same lengths as in the dual chain.
With the defaults each ladder has stores of 61, 4029 and 61 words.

Because u has to cross the whole recursive partial-sum path, the latency is
N2·K + N3·K² − (G − 1)·(floor(N1/2) + 1) + floor(N1/2) + 1 clocks, with
G = (N2+1)(N3+1). That is 4156 clocks at the defaults. The package function
`s2_latency` gives it. The coupling follows the published drawing of the
structure; the latency is not stated there and was worked out here. The
tests confirm it.
Zero-boundary mode uses one raster counter for the x tags and a second one,
offset by the latency, for the y tags.

## The starting point: S1-S1-S1

S1-S1-S1 nests the textbook canonic structure at all three levels. Each tap
(i1, i2, i3) multiplies the current x and the current y by its a and b
coefficients and adds both products into a partial sum. The partial sums
then travel to the output node through delays:

* one pixel register per step in i1 inside a first-level block;
* one full line register (K pixels) per step in i2 between first-level
  blocks;
* one full frame register (K² pixels) per step in i3 between second-level
  blocks.

The line and frame stores are at their minimum number and no pixel
register is added. The price is wiring and speed. x and y are broadcast to
every multiplier, and the path from x through a(0,0,0), the node adders, y,
a b multiplier and the adders behind it is combinational. Tap (0,0,0) has no
b product, so there is no loop. The output is bit-identical to S1-S1-S3, and
`y_out` holds the response to the pixel taken on the same edge.

## One chain of one-multiplier PEs: S1-S1-S2

S1-S1-S2 keeps the broadcast buses of S1-S1-S1 but registers the partial
sum after every adder. Each first-level block is a run of PEs with one
multiplier each: b(0..N1) on the y bus, then a(0..N1) on the x bus. The
origin block has no b(0,0,0). All blocks form one chain toward the output,
in the order (i2,i3) = (0,0), (1,0), ..., (0,1), ...

Counting registers from a PE to the output, b(i1) of the origin block sits
at i1 and a(i1) at N1 + 1 + i1. The output node Y is therefore the filter
output delayed by N1 + 1 registers. Every later block must start at its tap
delay D = i2·K + i3·K². Each store between blocks is shortened by the
registers of the block in front of it:

* a line step uses K − q2 words, with q2 = 2·(N1 + 1);
* a frame step uses K² − q3 words, with q3 = N2·K + q2.

These are the published q2 and q3. With N1 = 3 and K = 64 the stores hold
56, 4024 and 56 words.

## Delay lines

`pixel_delay` provides every storage register.

* Up to 4 pixels, it is a flip-flop chain.
* Longer delays use a circular buffer of LEN − 1 words plus an output
  register. Each clock reads the old word and writes the new one at the same
  address, which maps onto a single-port memory.

The buffer outputs zero until it has been written once all the way round.
The filter therefore starts from a zero state after reset without the
memories being cleared.

## Zero-boundary mode

When `zb_en = 0`, the raster stream is filtered as one long 1-D signal. A tap
that reaches left of column 0 reads the end of the previous line, and a tap
that reaches above line 0 reads the previous frame.

When `zb_en = 1`, pixels outside the image count as zero:

1. A raster counter gives each input pixel a tag {row, column}.
2. The tag travels with the pixel through the same registers on the x bus.
3. A copy of the tag, delayed by the latency LAT, travels on the y bus with
   the output sample it belongs to.
4. Each PE knows its taps (i1, i2) at elaboration time. It replaces a product
   by zero when column + i1 ≥ K or row + i2 ≥ K, that is, when the tap would
   carry the pixel past the right or bottom edge into a neighbouring line or
   frame. The second product of a PE is tested with i1 + 1.

Frame edges need no masking, because frames are taps in time. In the
direct chain this mode costs a 2·ceil(log2 K)-bit tag beside each x and y
bus register, plus two small comparators per PE. `zb_en` is a static mode
input: change it only while reset is asserted.

## Interface

`md_ladder_s1s1s3`, `md_ladder_dual`, `md_ladder_s2s2s3`, `md_ladder_s1s1s1`
and `md_ladder_s1s1s2` have the same ports. `md_ladder_filters` has the same
inputs and five outputs, `y_s3`, `y_dual`, `y_s2`, `y_s1` and `y_s12`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | pixel clock, one processing period |
| `rst_n` | in | 1 | asynchronous active-low reset; clears all flip-flops and empties the stores |
| `zb_en` | in | 1 | zero-boundary mode (static) |
| `a_coef[i3][i2][i1]` | in | 12 each | nonrecursive coefficients a(i1,i2,i3) |
| `b_coef[i3][i2][i1]` | in | 12 each | recursive coefficients b(i1,i2,i3); `[0][0][0]` is ignored |
| `x_in` | in | 16 | input pixel, raster order, one per clock |
| `y_out` | out | 16 | output pixel, registered (`y_s3` / `y_dual` / `y_s2` / `y_s1` / `y_s12` in `md_ladder_filters`) |

Timing:

* The first rising edge after reset takes pixel (0,0) of frame 0. Every
  later edge takes the next pixel; there is no valid or stall handshake.
* The edge that takes pixel n loads `y_out` with the output for pixel
  n − LAT, and `y_out` is 0 before that. LAT = 2·floor(N1/2) + 2 for
  S1-S1-S3, 1 for the dual chain, and `ladder_pkg::s2_latency(N1, N2, N3, K)`
  (4156 at the defaults) for S2-S2-S3. For S1-S1-S1, LAT = 0: the response
  to a pixel is on `y_out` right after the edge that takes that pixel. For
  S1-S1-S2, LAT = N1.
* The coefficients are ordinary inputs. They are meant to be held constant
  while the filter runs.

Parameters:

* `N1`, `N2`, `N3`: the filter orders in pixel, line and frame direction.
  Defaults 3, 1, 1 (1, 1, 1 for `md_ladder_s1s1s1` and `md_ladder_s1s1s2`;
  the top sets 3, 1, 1 for all five).
* `K`: the frame size, K x K. Default 64. It must satisfy
  K ≥ 4·(floor(N1/2) + 1) for S1-S1-S3, K ≥ 2·floor(N1/2) + 3 for the
  dual chain, K ≥ 2·(floor(N1/2) + 1) for S2-S2-S3, K ≥ N1 + 1 for
  S1-S1-S1 and K ≥ 2·N1 + 3 for S1-S1-S2 (when N2 or N3 is nonzero);
  elaboration stops with an error otherwise.
* `W`, `CW`, `FRAC`: the word formats. Defaults 16, 12, 10.

Setting N2 = N3 = 0 gives the plain 1-D ladder filter (S3, or S5 for the
dual chain).

## Files

| file | contents |
|---|---|
| `rtl/ladder_pkg.sv` | word-format constants; section size and register-length functions |
| `rtl/s3_pe.sv` | two-coefficient ladder PE with boundary gating |
| `rtl/s3_level1.sv` | one section: NP recursive and NP nonrecursive PEs |
| `rtl/pixel_delay.sv` | pixel, line and frame storage registers |
| `rtl/md_ladder_s1s1s3.sv` | the complete S1-S1-S3 filter |
| `rtl/s5_pe.sv` | four-coefficient PE of the dual chain |
| `rtl/s5_level1.sv` | one section of the dual chain |
| `rtl/md_ladder_dual.sv` | the complete dual S1-S1-S4 filter |
| `rtl/md_ladder_s2s2s3.sv` | the complete S2-S2-S3 filter (two ladders of S3 PEs) |
| `rtl/md_ladder_s1s1s1.sv` | the complete S1-S1-S1 filter (broadcast form) |
| `rtl/md_ladder_s1s1s2.sv` | the complete S1-S1-S2 filter (one chain, broadcast buses) |
| `rtl/md_ladder_filters.sv` | top level: all five filters on one input |
| `tb/ladder_checker.sv` | stimulus and reference model (direct or canonic form), shared by the filter-level tests |
| `tb/tb_s3_pe.sv`, `tb/tb_pixel_delay.sv`, `tb/tb_s3_level1.sv`, `tb/tb_s5_pe.sv`, `tb/tb_s5_level1.sv` | unit tests |
| `tb/tb_md_ladder_filters.sv` | default-size end-to-end test of the top, all five filters, raster and zero-boundary mode |
| `tb/tb_md_ladder_s1s1s3.sv` | default-size test of the S1-S1-S3 filter alone |
| `tb/tb_md_ladder_dual.sv` | dual filter at the default size and five other orders and frame sizes |
| `tb/tb_md_ladder_s2s2s3.sv` | S2-S2-S3 filter at the default size and five other orders and frame sizes |
| `tb/tb_md_ladder_s1s1s1.sv` | S1-S1-S1 filter at the default size and five other orders and frame sizes |
| `tb/tb_md_ladder_s1s1s2.sv` | S1-S1-S2 filter at the default size and five other orders and frame sizes |
| `tb/tb_ladder_configs.sv` | 1-D filter, even N1, N2 = 2, N3 = 2, non-power-of-two K, minimum K, N1 = 0 and 1 |
| `tb/tb_video_frame.sv` | all five filters at video frame sizes K = 720 and K = 960, two frames each |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/ladder_pkg.sv tb/tb_md_ladder_filters.sv \
          --top-module tb_md_ladder_filters
./obj_dir/Vtb_md_ladder_filters
```

To run another test, substitute its name. The package goes first on the
command line; Verilator finds the other files through `-I`.

What the tests cover:

* The filter-level tests drive random pixels and random coefficients and
  compare every output sample with the equation above, including the exact
  latency. The dual chain is compared with the canonic form, all other
  filters with the direct form. The tests also count how often a recursive
  tap, a line-register tap, a frame-register tap and a removed border tap
  contributed, and fail if one of these paths never did.
* The default-size test of the top runs three 64 x 64 frames through all
  five filters in each mode, about 131,000 checked samples.
* The video-size test runs two 720 x 720 and two 960 x 960 frames through
  all five filters, about 16 million samples, in about seven seconds.
* Recursive coefficients are drawn from ±1/16, so the test filters are stable.
  Because arithmetic wraps, the comparison is exact even when a filter
  overflows.

## Departures and choices

These points follow the published structure:

* a chain of two-coefficient PEs with recursive PEs before nonrecursive PEs
  in each section;
* one pixel register per PE on the buses and on the partial-sum path;
* a canonic number of line and frame registers, shortened by the pixel
  registers moved into the chain;
* one pixel register on the buses between sections;
* the first section without b(0,0,0);
* 16-bit data and 12-bit coefficients, following the published 16 x 12-bit
  multiply and 16-bit add;
* for the dual chain: one bus between two partial-sum lines, the origin
  section holding b(1,0,0), b(2,0,0) beside a(0,0,0), a(1,0,0), the input
  added into the b line next to the first PE, the extra register at B, the
  first line store shortened by one pixel, and p2 = floor(N1/2);
* for S2-S2-S3: separate nonrecursive and recursive ladders of S3 sections,
  each with its own line and frame stores, u entering the far end of the
  recursive ladder through one pixel register, and p2 = floor(N1/2);
* for S1-S1-S1: broadcast x and y, one pixel register per i1 step, full
  line and frame registers on the partial sums, and no b(0,0,0);
* for S1-S1-S2: one chain of one-multiplier PEs in the published order,
  stores shortened by q2 = 2·N1 + 2 and q3 = N2·K + q2, and an input
  latency of N1 + 1 registers.

These are this implementation's own:

* **Partial-sum registers per section.** Each section here has p2 registers
  on the partial-sum path, where the published bookkeeping counts p2 + 1.
  Each line-register remainder is therefore one pixel longer
  (K − 2·p2 − 1). The round trip per line (K) and per frame (K²) is the same,
  and this is what makes the filter correct. The bus count p2 = 2·floor(N1/2)+1
  agrees with the published count.
* **Latency.** The latency is 2·floor(N1/2) + 2 clocks from input pixel to
  output node. The published text gives two different figures for this
  structure: floor(N1/2) + 1 (that is where x reaches the first nonrecursive
  PE) and 2·floor(N1/2) + 1.
* **Frame size and coefficient format.** The frame size K (default 64) and
  the coefficient binary point (10 fractional bits) are not given by the
  source and were chosen here.
* **Overflow, rounding and reset.** These are not specified by the source.
  Products truncate, sums wrap, and reset gives a zero initial state.
* **Zero-boundary circuitry.** The source only states that a zero boundary
  condition can be added with little extra circuitry. The tag-and-gate scheme
  described above is this design's own, and so are the per-section counters
  of the dual chain.
* **Store lengths of the dual chain.** The source prints the line and frame
  store expressions but not where each sits in the chain. The bus placement
  follows from the transposition, and the lengths follow from the round-trip
  condition. Both are confirmed by the tests.
* **Latency of S2-S2-S3.** The source does not state it. With u fed into
  the far end of the recursive partial-sum path, as drawn, it is about one
  frame; the formula above is this design's own derivation.
* **Rounding of the dual chain.** Not specified by the source. The products
  of the state are rounded like all others, so the dual output differs from
  the direct-form output by rounding.
* **All filters in one top.** The source presents the structures as
  alternatives for the same filter. `md_ladder_filters` carries all five only so
  that they can be compared on the same stream. A design that needs one of
  them should instantiate that module directly.
* **Speed is not verified.** No gate-level timing has been done. The claim
  that the longest path is one multiplier plus one adder comes from the
  register placement, not from a timing report. The source estimates such a
  path at under 25 ns, fast enough for 13.5 MHz and 18 MHz video pixel rates.
* **Frame shape.** The frame is square (K x K), as in the source. A 720 x 576
  video frame needs K = 720, and part of the frame store is then unused.

Not included is S1-S1-S4 itself. It is only the intermediate step from
which the dual chain is derived: the source does not draw it and takes its
dual, with the shorter critical path of S5 PEs, as the final structure.
