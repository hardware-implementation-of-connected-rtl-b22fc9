# Row-streaming connected-component labelling

This design labels the connected objects of a thresholded grey-level image.
Every pixel that belongs to an object gets the number of its object, and
background pixels get 0. The FPGA holds only three image rows. The host
therefore streams the image through it one row at a time, over a 32-bit
Avalon memory-mapped bus, and does so twice:

1. **Pass 1 (label).** The host sends pixel rows. For each pixel the
   hardware looks at three neighbours it has already labelled: top-left,
   top and left. It gives the pixel a label and records in a lookup table
   when two different labels turn out to belong to the same object. The
   host reads back each row of provisional labels.
2. **Pass 2 (resolve).** The hardware first flattens the lookup table, so
   that every label points straight at the lowest label of its object. The
   host then sends the provisional label rows back in. The hardware replaces
   each label by that lowest label, and the host reads the final rows out.

The lookup table stays on the chip between the passes. The image itself
never needs to fit on the chip.

## Adjacency and the label rule

Two foreground pixels are connected when one is left, right, above or below
the other, or when one is diagonally up-left or down-right of the other.
This is six-neighbour connectivity, which treats the square grid as a
hexagonal one. Connectivity of this kind has no "diagonal leak" between
objects and no gaps: a closed outline encloses its inside. The scan runs
left to right within a row and then row by row. When pixel C is reached,
its already-visited neighbours are

```
  TL  T
  CL  C
```

and its label is decided as follows (0 means background or outside the
image):

| TL | T | CL | label of C | table update |
|----|---|----|------------|--------------|
| 0 | 0 | 0 | new label | `LUT[new] = new` |
| labelled | any | any | L(TL) | none |
| 0 | 0 | labelled | L(CL) | none |
| 0 | labelled | 0 | L(T) | none |
| 0 | labelled | labelled | min(L(T), L(CL)) | if they differ: `LUT[larger] = smaller` |

The second row is what keeps the rule cheap. TL touches both T and CL. So
whenever TL is labelled, any equivalence among the three labels was
already recorded when T or CL was labelled, and C can take L(TL) without
looking further. A new equivalence can therefore arise only when T and CL
are both labelled and TL is not. One table update per pixel is enough.

## The equivalence table

`ccl_lut` holds 256 entries of 8 bits. The invariant is that
`LUT[l] <= l` for every label in use. A label whose entry points to itself
is the root of its class, and the root is the lowest label of the class.

**Merging without losing information.** The rule `LUT[larger] = smaller`
cannot simply overwrite the entry. If the larger label `x` already points
at some `old`, overwriting it would forget that `x ~ old`. The table
therefore walks the chain, one step per clock:

```
x = max(a,b); y = min(a,b)
loop:
  old = LUT[x]
  if old == x:  LUT[x] = y; done            (x was a root)
  if old == y:  done                        (already joined)
  if old >  y:  LUT[x] = y; x = old         (now join old with y)
  else:         x = y; y = old              (join y with old)
```

`x` falls at every step, so the walk ends. It keeps every equivalence and
keeps `LUT[l] <= l`. While the walk runs, the labeller stalls. A merge costs
one clock when `x` is already a root, and more when the walk follows a
chain.

**Flattening.** `ccl_lut_resolve` makes one ascending sweep,
`LUT[l] = LUT[LUT[l]]` for `l = 1 .. count`, at one label per clock. When
`l` is reached, `LUT[l] < l` has already been flattened, so `LUT[LUT[l]]`
is a root. After the sweep every entry names the lowest label of its
object. `ccl_final_label` then maps each pass-1 label through the table
and leaves 0 as 0.

**Labels are provisional counts, not objects.** Pass 1 hands out a new
label for every pixel that has no labelled TL, T or CL. Objects whose top
edge has several local peaks use several labels. One case is worth knowing:
a stroke running up-right gets a new label in each row, because the
diagonal up-right is not a neighbour. Labels are 8 bits, so at most 255 can
be handed out per image. After that, every further new label is 255 and
the sticky `overflow` status bit is set. The final image is then not
trustworthy, and the host should split the image or threshold it
differently. The count register tells the host how many labels were used.

## The three-row ring

The 2048-byte row RAM (`ram_cc`) is divided into slots of 512 bytes.
`circular_buffer` uses three of them as a ring: image row `n` lives in
slot `n mod 3`. At any moment:

* the labeller works on the *active* row and reads labels from the row
  above it, the *top* row, which holds that row's pass-1 labels;
* the host writes the next row into the free slot, or reads back a
  finished row.

The host sees a single one-row *window* and never deals with slots. A
window write goes to the slot of the next row to be written. A window read
comes from the oldest finished row not yet released. Two status bits drive
the host:

* `space`: row `n` may be written. This requires that row `n-3` has been
  released by the host, and, for `n >= 3`, that row `n-2` has been
  labelled, because row `n-2` still needs row `n-3` as its top row.
* `ready`: a labelled row is waiting to be read.

The host sets `COMMIT` after writing a row and `RELEASE` after reading one.
A commit without space, or a release with nothing ready, is ignored.
Writing `CTRL` empties the ring. The first row after that has no top row,
so its top neighbours are treated as background.

Labels are written back in place, over the pixels of the active row. The
window therefore returns labels from the same slot the pixels went into.

## Bus interface

`ccl_top` is an Avalon-MM slave with a 9-bit word address and 32-bit data.

| word address | name | access | meaning |
|---|---|---|---|
| `0x000-0x07F` | window | RW | one row, 4 pixels per word, first pixel in bits 7:0 (little-endian) |
| `0x100` | CTRL | W | bit 0: start pass 1 (clears label count and ring); bit 1: start pass 2 (flattens table, clears ring) |
| | | R | bit 0: pass-2 mode |
| `0x101` | WIDTH | RW | row width in pixels, 1..512 (reset 512) |
| `0x102` | THRESH | RW | pixel is foreground when `pixel >= THRESH` (reset 128) |
| `0x103` | COMMIT | W | the row in the window is complete |
| `0x104` | RELEASE | W | the finished row in the window has been read |
| `0x105` | STATUS | R | bit 3 overflow, bit 2 busy, bit 1 ready, bit 0 space |
| `0x106` | LABELS | R | number of pass-1 labels handed out |

Writes finish in one clock. The RAM registers both its address and its
output, so a read holds `waitrequest` for two clocks. `readdata` is valid
in the third clock, when `waitrequest` is low. Register reads take the same
path. There is no `byteenable`: the window is written in whole words.

Host sequence for one image of `H` rows:

```
write WIDTH, THRESH; write CTRL = 1
repeat until H rows read back:
    if STATUS.ready: read window words, store row of labels; write RELEASE
    elif rows sent < H and STATUS.space: write row of pixels; write COMMIT
write CTRL = 2                     # table flattening starts
same loop, sending the pass-1 label rows and keeping the final rows
```

Rows can overlap: the host writes the next row while the labeller is still
busy on the current one.

## Timing

* The labeller takes 4 clocks per pixel: read top, read pixel, wait, then
  decide and write back. It reads both values through the one byte-wide RAM
  port, which has a two-clock read latency. A merge adds its walk length
  plus one clock. A row takes `4*W + 1` clocks plus the merge clocks. Pass 2
  takes exactly `4*W + 1` clocks per row.
* Flattening takes one clock per label in use.
* Bus: 1 clock per write and 3 per read. Moving a 512-pixel row in and out
  costs about 128 + 384 clocks, so the labeller is the bottleneck.

The end-to-end test streams a 512 x 512 image through both passes in about
2.1 million clocks, bus traffic included.

## Hierarchy

```
ccl_top
├── avalon_slave        bus decode, wait states, registers, command pulses
├── circular_buffer     three-slot ring, window-to-slot mapping, space/ready
├── ram_cc              2048-byte dual-port RAM: 8-bit port a, 32-bit port b
└── ccl_core            pass sequencing and per-pixel schedule
    ├── ccl_counter       column counter
    ├── ccl_neighborhood  TL/T/CL registers, top and active RAM addresses
    ├── ccl_threshold     foreground test
    ├── ccl_label         label decision, label counter, overflow
    ├── ccl_lut           equivalence table with merge walk
    ├── ccl_lut_resolve   flattening sweep
    └── ccl_final_label   pass-2 lookup
```

`ccl_pkg` holds the sizes (8-bit pixels and labels, 32-bit bus, 2048-byte
RAM, 3 slots of 512 bytes), the register map and the shared structs. To
change the maximum row width, change `SLOT_BYTES`. The RAM must hold
`ROWS * SLOT_BYTES` bytes, and the window address is `log2(SLOT_BYTES/4)`
bits. The label width is `LABEL_W`. Wider labels would also need wider RAM
lanes, because labels are stored in place of pixels.

The whole design runs on one clock with a synchronous active-high reset.
The same reset also drives the RAM's asynchronous output clear, so lint
reports `reset` as used both synchronously and asynchronously. That is
intended.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`, which
prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ccl_pkg.sv tb/tb_ccl_top.sv \
          --top-module tb_ccl_top -o sim && ./obj_dir/sim
```

Replace `tb_ccl_top` with any other testbench name. The package file must
be given first, and `-Irtl` finds the rest.

* `tb_ccl_top` is the end-to-end test at the default sizes. A host model
  runs both passes over several random images, an image that overflows the
  255 labels, and a 512 x 512 image of crosses and bars. Checks against an
  independent flood fill:
  * background stays 0;
  * every object ends with one label, the lowest of its pass-1 labels;
  * no two objects share a label;
  * the label count and the overflow flag are correct.

  It also counts new labels, merges, merge stalls, multi-step walks, ring
  wrap-around, "no space" waits, pass switches, flattening and overflow,
  and fails if any of them never happened.
* `tb_ccl_core` runs the labeller with a real RAM and checks the
  per-row clock count exactly.
* The other testbenches check one block each against a reference written
  separately: the RAM's byte order and latency, the bus wait states and
  registers, the ring rules, the label table of cases, the merge walk
  against explicit classes, and the flattening against precomputed roots.

## Departures and own choices

The following follow the original design description:

* the two-pass algorithm and its neighbourhood table;
* the rule `LUT[larger] = smaller`;
* the three-row circular buffer that holds a row and its top row;
* the 2048-byte dual-port single-clock RAM, with a 4-byte bus port and a
  1-byte labeller port, little-endian, with registered ports, and the
  extra read delay this causes on the bus;
* the block split of the labeller: counter, neighbourhood, threshold,
  label, lookup table, table resolve, final label.

The original description is inconsistent about which RAM port is the wide
one. This design uses port a as the byte port and port b as the word port.

The original description also gives two rules for a labelled top-left
neighbour. Its general rule takes the smallest neighbouring label. Its
neighbourhood table takes L(TL) whenever TL is labelled. This design
follows the table. Both choices give the same final labels, because the
table already records those equivalences.

The following are this implementation's own:

* the chain walk, which keeps the table update lossless;
* the flattening sweep;
* the register map and the `space`/`ready` protocol;
* the 512-byte slot size, and with it the 512-pixel row limit;
* the `>=` threshold test and its reset value of 128;
* the 4-clock pixel schedule;
* saturating at 255 labels with an overflow flag;
* treating the first row's top neighbours as background.

The host driver and the user-space program that splits images into rows
are software and are not part of this RTL. The bus fabric between the host
and this slave is also outside it. It is generated by the FPGA vendor's
system-integration tool. The end-to-end testbench contains a model of the
host side.
