# Zhang-Suen fingerprint thinning processor (96 x 96), with GDI cell models

A fingerprint sensor produces a black-and-white ridge image. Matching works
on the ridges' centre lines. Thinning strips pixels off the edges of every
ridge until only a skeleton one pixel wide is left, without breaking or
shortening a ridge. This RTL does that in hardware for a 96 x 96 binary
image, using the parallel Zhang-Suen algorithm. The core is deliberately
small, about 44 flip-flops of logic beside the image memory. It was the
benchmark circuit for a low-power standard-cell style built on
gate-diffusion-input (GDI) cells. Logic models of those GDI primitive
cells are included as well.

## The thinning rule

Each pixel is judged by its 3x3 neighbourhood, numbered like this
(row 0 of the image is at the top):

```
P7 P6 P5
P8 Pc P4
P1 P2 P3
```

1 is black and 0 is white. Two counts are made over the eight neighbours:

* **N** is how many of them are black (`zs_neighbor_count`).
* **S** counts the black-to-white steps met while walking once around
  P1, P2, …, P8 and back to P1 (`zs_transition_count`). S = 1 means the
  black neighbours form a single arc, so removing the centre cannot split
  the ridge.

A black centre pixel is erased (`zs_erase_logic`) when all of these hold:

| rule | first sub-iteration | second sub-iteration |
|---|---|---|
| not an end point or interior point | 2 ≤ N ≤ 6 | 2 ≤ N ≤ 6 |
| does not disconnect | S = 1 | S = 1 |
| directional rule a | P2·P6·P8 = 0 | P2·P4·P8 = 0 |
| directional rule b | P4·P6·P8 = 0 | P2·P4·P6 = 0 |

In the textbook statement of Zhang-Suen, P2 is the pixel above the centre
and the neighbours run clockwise. With the numbering used here, the
directional rules are the textbook ones turned by 180°. Put another way,
they are the textbook's two sub-iterations in swapped order. The skeleton
is equally valid. The rules are used exactly as written above. Counting
black-to-white steps anticlockwise gives the same S as the textbook's count
of white-to-black steps clockwise.

The algorithm is *parallel*. Within a sub-iteration every decision is made
on the image as it stood when the sub-iteration began, never on pixels
already erased in the same pass. One **iteration** is a first sub-iteration
followed by a second. Iterations repeat until one of them erases nothing.
Pixels outside the image count as white.

## How the processor runs it

`zs_thinning_core` handles one pixel at a time and keeps no image
internally.

* **Two image buffers, swapped every sub-iteration.** The first
  sub-iteration reads buffer 0 and writes buffer 1. The second reads
  buffer 1 and writes buffer 0. Every pixel of the destination is written,
  as `centre AND NOT erase`. This is what makes the algorithm parallel, and
  it leaves the finished image in buffer 0 after each whole iteration.
* **Column-wise window.** At the start of each row the window
  (`zs_window_buffer`) is cleared, which supplies the white column to the
  left of the image. Then one column of three pixels (rows r-1, r, r+1) is
  fetched at a time and shifted in from the right. When the column right of
  pixel (r, c) has arrived, the window is centred on (r, c). A fetch
  outside the image is not sent to memory: it is taken as white.
* **Stop rule.** The core records whether each sub-iteration erased
  anything. After a second sub-iteration in which neither half erased a
  pixel, it pulses `done` and returns to idle.

Assertions in the core check that every memory address lies inside the
image and that the memory ports are quiet while idle.

### Timing

The memory read is synchronous: data arrives one cycle after the address.

| step | cycles |
|---|---|
| start of row (clear window) | 1 |
| first column (primes the window) | 4 |
| each pixel: fetch next column + write | 4 + 1 |
| end of sub-iteration | 1 |

One sub-iteration therefore takes `H*(5+5W)+1` cycles: 46,561 for 96 x 96,
or 1.86 ms at 25 MHz. A run of `k` iterations ends with `done`
`2*k*(H*(5+5W)+1) + 1` cycles after `start` was sampled. `k` is reported
on `iter_count` and includes the last iteration, which erases nothing.
Typical test images take 4 iterations for a fingerprint-like pattern with
ridges about 5 pixels thick, and 49 for an entirely black 96 x 96 frame.

## Using the top level, `thinning_top`

`thinning_top` holds the core, both buffers (`image_frame_buffer`, 1 bit
per pixel, address `row*W + col`) and a host port on buffer 0:

1. While `busy` is low, write the image through `host_we` / `host_waddr` /
   `host_wdata`.
2. Pulse `start` for one cycle.
3. Wait for `done`. While the core is busy, host writes and further starts
   are ignored.
4. Read the skeleton back: `host_rdata` gives the pixel at `host_raddr`
   one cycle later.

`step` and `erase_pulse` show the sub-iteration in progress and every
erased pixel. The parameters `W`, `H` (default 96), `ADDR_W` and `ITER_W`
(default 8) carry through to all parts. `rst_n` is an asynchronous,
active-low reset of the control logic. The image memories are not reset.

## GDI cell models

GDI cells are the low-power, small-area cell style the processor was
mapped onto. A GDI base cell is one PMOS and one NMOS sharing a gate input
G, with their sources P and N used as logic inputs rather than tied to the
rails. Its function is a multiplexer, `out = G ? N : P`. Tying the inputs
gives the other functions:

* OR: N = 1
* AND: P = 0
* NOT: P = 1, N = 0

The cells modelled here, under `rtl/gdi_*.sv`, are:

| model | cell | structure |
|---|---|---|
| `gdi_cell` | base cell / MUX | the multiplexer above |
| `gdi_or #(N)`, `gdi_and #(N)` | OR2–4, AND2–4 | one base cell; input 0 is the common gate |
| `gdi_xor2` | XOR2, 4 transistors | a GDI inverter on A, then a base cell with gate B choosing A or /A |
| `gdi_xor3` | XOR3, 8 transistors | two XOR2 stages |
| `gdi_dff` | 12-transistor flip-flop | master and slave latches, each a GDI mux, a CMOS inverter and a feedback inverter |

In `gdi_dff` the master is transparent while the clock is low and the
slave while it is high, so Q takes D at the rising edge.

These are **logic models only**: ideal 0/1 values with no delay. A real GDI
output may stop a threshold voltage short of the rail, a "weak" 0 or 1. A
following GDI cell can then misread it. That is why a mixed netlist always
lets a GDI output drive a full-swing CMOS cell. None of that analogue
behaviour is modelled. The choice of which gates of a netlist become GDI
is a step of the physical design flow and is not part of this RTL.

`thinning_top` places one of each cell in a separate row with its own pins
(`cell_in[3:0]`, `cell_ck`, `cell_*_y`, `cell_dff_q`), independent of the
processor. `gdi_dff` is written with two `always_latch` blocks on purpose,
so lint and synthesis report two latches in it.

## What is taken from the original design and what is chosen here

Taken from it:

* the 96 x 96 binary image, with 1 = black;
* the 3x3 neighbour numbering, N, S and the order used to count S;
* the erase conditions of both sub-iterations;
* the logic functions and structures of the GDI base cell, XOR2 and the
  flip-flop;
* the transistor counts that imply the XOR3 structure.

Chosen here, because the source does not describe them:

* the whole processor micro-architecture: one pixel at a time, the
  column-wise window, two 1-bit-wide buffers, the scan order and all
  cycle counts;
* white padding around the image;
* the stop rule (a whole iteration with no erasure);
* the host port;
* the reading of the multi-input OR/AND cells as plain OR/AND of all
  inputs;
* XOR3 as two XOR2 stages.

The source gives 20–25 MHz operation and a 395-cell netlist. Neither can be
confirmed from RTL simulation. Binarizing the grey fingerprint is assumed
to happen before this block; the input must already be binary.

## Files

| file | purpose |
|---|---|
| `rtl/zs_pkg.sv` | image size, window and sub-iteration types |
| `rtl/zs_neighbor_count.sv`, `rtl/zs_transition_count.sv` | N and S |
| `rtl/zs_erase_logic.sv` | erase decision |
| `rtl/zs_window_buffer.sv` | 3x3 window |
| `rtl/zs_thinning_core.sv` | scan controller, the processor |
| `rtl/image_frame_buffer.sv` | image memory |
| `rtl/thinning_top.sv` | top level |
| `rtl/gdi_*.sv` | GDI cell models |
| `tb/zs_ref_pkg.sv` | independent software model of the algorithm, test-image generators |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/zs_pkg.sv tb/zs_ref_pkg.sv rtl/*.sv tb/tb_thinning_top.sv \
  --top-module tb_thinning_top -o sim
./obj_dir/sim
```

Replace `tb_thinning_top` with any other `tb_*` module to test one block.
`tb_thinning_top` runs the top at its default 96 x 96 size, in a few
seconds. It checks the following:

* thinning of a fingerprint-like ridge pattern, random blobs, an all-black
  and an all-white frame, every pixel compared with the reference model;
* the iteration count and the exact cycle count of each run;
* that a load and a start issued while busy are ignored;
* the GDI cell row.

It also counts that each rule actually decided some pixels: end points,
interior points, S ≠ 1, the directional rules, and erasures on the border
and in both sub-iterations.

The block testbenches are exhaustive where the input space allows: all 256
neighbour patterns, all 512 windows in both sub-iterations, and all cell
input combinations. `tb_zs_thinning_core` runs the core on a 14 x 11 image
with memories modelled in the testbench. It checks every read and write
address and the cycle count.
