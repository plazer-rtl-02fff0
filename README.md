# PLazeR max-convolution co-processor

PLazeR is a low-cost planar laser rangefinder. A line laser and a camera are
mounted side by side at a fixed offset. The laser draws a vertical line on
whatever is in front of it, and the column where that line appears in each
image row depends on the distance to the object in that row (triangulation).
The work per row is to find the laser line's column reliably in a noisy
grayscale image. Software then maps that column to a distance through a
calibrated power law, `D = w0 * x^w1` (for example `w0 = 15138.3`,
`w1 = -1.32275`).

The hardware in this repository does the column search. It smooths a row
segment with a 16-tap symmetric FIR filter, normally a Gaussian, and returns
the largest filtered value and where it occurs. The host CPU sees it as a
small memory on a 32-bit Avalon memory-mapped slave port. The host writes a
window of pixels, then reads back one result word. The whole computation is
combinational and is redone on every clock, so there is no start command, no
busy flag and no wait state.

## The max-convolution

One transaction works on a 48-byte window cut from an image row:

```
 window byte:  0 ......... 7 | 8 ............................ 39 | 40 ........ 47
               left fill (8) |          data (32 pixels)         | right fill (8)
```

The kernel has 16 taps and is symmetric, so the host sends only its outer
half, `g[0..7]`. `g[0]` is the outermost tap and `g[7]` the tap next to the
centre. For each data position `i = 0..31` the hardware computes

```
C_i = ( sum_{k=0..7} g[k] * (w[i+k] + w[i+15-k]) ) >> 3
```

All products are 8 x 8 unsigned, so the 16 products add up in 20 bits. The
sum is divided by 8, which leaves a 17-bit `C_i`. The 16 window bytes under
`C_i` are `w[i] .. w[i+15]`, with their centre between `w[i+7]` and `w[i+8]`.
So `C_i` is the filter response half a pixel left of data pixel `i` (window
byte `8+i`). Window byte 47 is never used: the last position reaches only byte 46.

A chain of comparators walks the 32 responses in order. It keeps the running
maximum and its index, and takes a new candidate only if it is strictly
larger. The first (leftmost) of several equal maxima therefore wins, and a
flat window reports position 0. The comparison uses all 17 bits. The reported
value is 16 bits wide and is clamped to `0xFFFF` if the response is larger.
That can only happen with unusually heavy kernels: with the sigma-3 Gaussian
below, the largest possible response is 4462.

### Splitting a row

A 640-pixel row is processed as 20 segments of 32 pixels. Segment `s` covers
columns `32s .. 32s+31`. Its left fill is columns `32s-8 .. 32s-1` and its
right fill is columns `32s+32 .. 32s+39`, with zeros outside the row. The host
keeps the largest of the 20 results (strictly larger wins again). The row's
peak column is `32s + maxpos` of the winning segment. 32 divides both 640 and
480, so the same scheme works along columns too.

### The kernel

The host computes the Gaussian half kernel with the formula
`g[k] = floor(255 * exp(-(8-k)^2 / sigma^2) / sqrt(2*pi*sigma^2))`. With
`sigma = 3` this gives `0 0 0 2 5 12 21 30`. Any other symmetric 16-tap kernel
with 8-bit unsigned coefficients works just as well.

## Memory map and host protocol

The slave is word addressed (`address` counts 32-bit words). Byte `n` of the
map is byte lane `n % 4` of word `n / 4`, so a little-endian CPU sees the
bytes in order.

| bytes  | words | contents                              | written by |
|--------|-------|---------------------------------------|------------|
| 0–7    | 0–1   | left fill                             | host       |
| 8–39   | 2–9   | 32 data pixels                        | host       |
| 40–47  | 10–11 | right fill                            | host       |
| 48–55  | 12–13 | half kernel, `g[0]` at byte 48        | host       |
| 56–57  | 14    | max value (16 bits, little-endian)    | hardware   |
| 58     | 14    | max position, 0–31                    | hardware   |
| 59     | 14    | ready flag in bit 0                   | hardware   |

Read as a whole, word 14 is `{7'b0, ready, maxpos[7:0], maxval[15:0]}`. The
host cannot write it; writes to word 14 and above are ignored. Reads above
word 14 return 0. Words 0–13 read back what was written.

Use it like this:

1. Write the kernel (words 12–13) once.
2. For each segment, write words 0–11 (left fill, data, right fill).
3. Read word 14.
4. Repeat from step 2.

### Timing

- `waitrequest` is always 0. `readdata` depends combinationally on `address`,
  so the read latency is 0.
- A write takes effect on the clock edge where `write` is high. It honours
  `byteenable`.
- The window and kernel drive the max-convolution logic directly. Its output
  is registered into word 14 on every clock edge.
- So a write accepted at edge `t` shows in word 14 from edge `t+1` on. A read
  sampled at edge `t+1`, in the bus cycle right after the last write, still
  returns the previous result. A read sampled at edge `t+2` or later returns
  the new one. Any real host bridge leaves at least that one idle cycle.
  The testbench checks both cases cycle by cycle.
- `reset` is synchronous and active high. It clears the window, the kernel
  and word 14, so `ready` is 0 during reset. `ready` becomes 1 on the first
  clock after reset is released and stays 1.
- An assertion flags a cycle in which `read` and `write` are both high.

The original system clocks this slave at 500 MHz. The convolution is one
deep combinational path (a multiply, a 16-input add and a 32-stage compare
chain) between the window registers and the result register. Closing timing
at a high clock rate would need pipelining, which this RTL does not add.

## Module hierarchy

```
process_device            Avalon-MM slave, 56 host bytes + result register
└── convmax               32 convolvers + comparator chain + clamp
    └── conv  (x32)       one 16-tap symmetric convolution
        ├── mult (x16)    8 x 8 -> 16 unsigned multiply
        └── p_add         16-input adder, 16-bit operands -> 20-bit sum
plazer_pkg                sizes, memory map, pixel/coef/result types
```

Everything below `process_device` is combinational. `process_device` is the
top module and has no parameters. Its sizes come from `plazer_pkg`.
`convmax`, `conv`, `mult` and `p_add` take their sizes as parameters
(`NSEG`, `NTAPS`, `SHIFT`, `A_W`, `B_W`, `N`, `IN_W`, `OUT_W`). The defaults
are the sizes above. `convmax` also outputs all 32 responses on `val`.
`process_device` does not use them.

The synthesised size is about 32 x 16 = 512 small multipliers, 32 sixteen-input
adders, 31 comparators, 56 bytes of storage and 22 bits of result
register (the constant bits of word 14 drop out).

## Where this RTL departs from, or fills in, the original design

The original design describes the algorithm, the memory map and the module
structure. Its sources are inconsistent in a few places. These are the
choices made here:

- **Addressing.** The slave is word addressed. Words 0–13 are host-writable
  and word 14 is read-only. The original's write decode mixed byte and word
  counts.
- **Result word layout.** Max value in bytes 56–57, position in byte 58,
  ready in byte 59, as in the memory-layout table and the bring-up test
  script. One of the original C headers places the fields differently (value
  in the upper half-word, position in bits 15:8, ready in bit 0). The
  original driver also assembles the value in big-endian order. Host
  software written against those headers must be adapted.
- **Position 0 and the returned index.** All 32 positions compete, and the
  returned position is the index of the first maximum. This matches the
  original software model. The original comparator chain skipped position 0
  and carried a value instead of an index. Position 0 seeds the chain here,
  so it has 31 comparators rather than 32.
- **16-bit clamp.** The max value is clamped to 16 bits instead of truncated.
- **Reset** clears the window, the kernel and the result. The original left
  the memory uninitialised and cleared it from software.
- **Convolved-value readback.** The original had a debug path: a write to a
  word address outside the 60-byte map copied the low 8 bits of the 32
  responses over the data bytes. It is not included.
- **Vendor cores.** The original used vendor-generated multiplier and
  parallel-adder cores. Here they are plain `*` and `+` with the same widths
  (unsigned, 8 x 8 -> 16; 16 x 16-bit -> 20-bit, no pipelining).

## Not included

The ARM hard processor, its AXI-to-Avalon bridge, the generated bus fabric,
the JTAG debug master, the board top level, the camera and the laser are
outside this RTL. The slave port of `process_device` is where the bus fabric
connects. Grayscale conversion, row splitting, calibration and the distance
formula run in host software. In this repository they exist only as the host
model inside the top-level testbench.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_mult`            | all 65536 operand pairs against a shift-and-add product |
| `tb_p_add`           | zeros, all-ones (the 20-bit worst case), one-hot and 2000 random operand sets |
| `tb_conv`            | one bright pixel at each tap (checks the tap pairing), all-255 worst case, 500 random windows against a folded-sum model |
| `tb_convmax`         | a bright pixel walked over all 32 positions, a flat window (tie goes to position 0), two equal peaks, the peak at position 0, clamping, 300 random windows; all 32 responses and the max are checked |
| `tb_process_device`  | the whole design through the bus, at default sizes (described below) |

`tb_process_device` runs these steps in order:

1. Reset state.
2. The bring-up pattern: kernel taps 0 and 7 set to 255, one pixel at byte 5.
3. Readback of every word.
4. Cycle-exact result timing: the stale value on the first read after a write,
   the new value one cycle later.
5. Byte-enable writes, ignored writes to word 14, reads beyond the map, a
   tie, a clamp.
6. A full 640 x 480 synthetic frame: a noisy background with a Gaussian laser
   line at a random column in each row, the sigma-3 kernel, 20 segments per
   row.
7. Reset in mid-operation.

Every result word is compared with an independent model. Each row's peak
column is compared with the model and with the column where the line was
drawn (within -1..+2 pixels). The test counts how often each mechanism
happened and fails if one never did. The full frame (9600 transactions,
about 135k cycles) simulates in well under a second.

### Running a testbench

From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/plazer_pkg.sv \
          tb/tb_process_device.sv --top-module tb_process_device -o sim
./obj_dir/sim
```

Replace `tb_process_device` with any other testbench name to run that one.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/plazer_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused package constants and the three low
sum bits that the divide-by-8 drops.
