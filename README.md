# Window-parallel image matching with periodic memory allocation

A window operation such as a SAD match, a filter or a morphology step needs every
pixel of its window in the same cycle. Here each processing element (PE) gets its
own small single-port memory and no crossbar sits between memories and PEs. That
works only if the pixels of every window, wherever the window sits, land in
different memories. Several differently shaped windows may also have to be served.
The number of memories should be as small as possible, because each one brings a
PE with it.

The RTL uses a **periodic allocation**. The image is tiled by the lattice of two
integer period vectors. All pixels that differ by a lattice vector go to the same
memory, and the number of memories equals the area of the parallelogram spanned by
the two vectors. A good pair of vectors follows the actual window shapes instead of
their bounding box. It can therefore need far fewer memories than the usual
"rectangle of the bounding box" scheme:

| case | windows that must be read in one cycle | bounding-box scheme | periodic, as built |
|---|---|---|---|
| stereo, multi-resolution | 4 x 4 window sampled every 1..8 pixels | 25 x 25 = 625 modules | 17 modules, A=(17,0) B=(4,1) |
| stereo, small example | 3 x 3 window sampled every 1..3 pixels | 7 x 7 = 49 | 11 modules, A=(11,0) B=(3,1) |
| optical flow | one 10-pixel row and one 10-pixel column | 10 x 10 = 100 | 10 modules, A=(10,0) B=(1,1) |

The method and these module counts come from the published work "Optimal Periodic
Memory Allocation for Image Processing With Multiple Windows". The code and the
choices listed under "Where this RTL makes its own choices" belong to this design.

Two processors are built on the allocation, and `pma_top` holds them side by side:

* `stereo_processor` is a coarse-to-fine stereo matcher (disparity search).
* `optical_flow_processor` is a 10 x 10 block matcher (motion vector search) that reuses pixels between neighbouring candidate windows.

## 1. The addressing function (`periodic_addr`)

Every lattice has a basis in the form A = (AX, 0), B = (BX, BY) with 0 <= BX < AX.
This is the "equivalent vector pair": BY is the gcd of the y parts of any basis,
and AX*BY is the parallelogram area. In this form each of the K = AX*BY memories
holds one coset of the lattice, and the module of a pixel is computed as:

```
n    = y / BY                       -- which horizontal band of height BY
bank = (y mod BY)*AX + ((x - n*BX) mod AX)
addr = n*ceil(W/AX) + x/AX          -- word inside the module
```

Why the address is unique: in one image row, a module owns exactly one pixel in
every AX columns, so `x/AX` tells them apart. A module sees only one row of each
band, so `n` tells the rows apart. Each module has ceil(H/BY)*ceil(W/AX) words.
Together the modules hold the image exactly once, apart from rounding.

All divisions and remainders are by constants. For the default BY = 1 the function
reduces to `bank = (x - BX*y) mod AX` and `addr = y*ceil(W/AX) + x/AX`.

Some worked cases:

* A=(2,0), B=(1,2) gives the same partition as the closed form (2x + y) mod 4. Only the module numbers differ.
* The stereo default gives bank = (x - 4y) mod 17.
* The optical-flow default gives bank = (x - y) mod 10, so every diagonal line sits in one module.

The module numbering and the word address are choices of this design. The method
only asks for a simple function from (x, y) to a module.

## 2. Choosing the period vectors

The vectors are parameters (`AX`, `BX`, `BY`). They are found offline; no hardware
in this design searches for them. To find them:

1. List every window that must be read in one cycle.
2. For each candidate area S, starting at the largest window's pixel count, try all (AX, BX, BY) with AX*BY = S.
3. Keep the first triple for which every window, at every position, hits S different modules.

Because the allocation is periodic, checking the window origins inside one period
(AX x BY) is enough. The published method speeds this search up by using the
equivalent-pair form and per-pixel "parallel access patterns".

The 17-module stereo pair A=(17,0), B=(4,1) was found this way. Only the module
count 17 was published for that case. The 11-module pair A=(11,0), B=(3,1) was
published and is reproduced by the same search.

To check a parameter set, simulate it. `window_memory` asserts on every read that no
two window pixels share a module.

## 3. Window memory (`window_memory`, `mem_module`)

`window_memory` is K `mem_module`s: single-port, synchronous read, one cycle of
latency. One `periodic_addr` serves each window pixel, and one more serves the load
port.

* **Read.** The caller gives a window origin and the offsets of its NPIX pixels. Each module takes the address of the one window pixel that falls in it; modules the window misses stay idle. The data come back one cycle later in two views:
  * **Per module:** `bank_data`, plus `bank_idx` (which window pixel that is) and `bank_used`. This is the view of the PE tied to that module.
  * **Window order:** `win_data[j]`. For the row and column reads of the diagonal allocation, this selector is a rotation.
* **Write.** The load port writes one pixel per cycle. A read and a write in the same cycle are illegal, because the modules are single-ported.
* **Assertions.** There are three: no module conflict on a read, no read together with a write, and the window stays inside the image. The `conflict` output gives the first condition as a signal.

## 4. Stereo matcher (`stereo_processor`)

**What it computes.** For a reference pixel (rx, ry) it finds the horizontal
disparity d that minimises the SAD between two Q x Q windows:

* the reference window, pixels (rx + SP*c, ry + SP*r);
* the candidate window, pixels (rx + d + SP*c, ry + SP*r).

The windows are sampled: the sampling period SP runs from SP_MAX down to 1.

**The levels.**

* Level SP_MAX tries d = 0, SP_MAX, 2*SP_MAX, ... up to D_MAX.
* Each later level SP tries every d in [best - SP, best + SP] around the previous level's best, clipped to [0, D_MAX].
* The best d of level 1 is the result. Among equal SADs the earliest candidate wins.

**Datapath.**

* The reference image and the candidate image each sit in their own `window_memory`, with the same allocation.
* At the start of each level, the reference window is read once into 16 registers, in window order.
* After that, one candidate window is read per cycle. Each of the 17 modules drives its own `ad_unit`, which picks the reference register of the window pixel its module holds. One module is idle on every read, and its AD unit outputs 0.
* A 17-input `adder_tree` (16 adders) forms the SAD. The SAD is registered and then passed to `min_select`.

**Timing.** A level takes 1 reference-read cycle, plus one cycle per candidate,
plus 3 cycles for the pipeline to drain. The drain makes the level's best known
before the next level's range is formed. A search therefore takes
sum over levels of (candidates + 4) cycles, from the edge that takes `start` to the
edge that raises `done`. At the defaults that is about 103 cycles for a pixel away
from the range limits.

The published processor reports 9.8 ms for a 500 x 500 image at 129 MHz, which is
about 5 cycles per pixel. Its schedule is not described, so this design does not
try to match that figure.

**Interface.**

* `start`/`ready`: a start is taken when `ready` is high.
* `done`: a one-cycle pulse. `disparity` and `best_sad` are valid with it and held until the next search.
* `ld_*`: the image load port (`ld_sel` 0 = reference image, 1 = candidate image). Use it only while the processor is idle.
* `level_start`, `cur_sp` and `cand_issue` show progress.

## 5. Optical-flow matcher (`optical_flow_processor`, `window_regs`)

**What it computes.** For a 10 x 10 reference window at (rx, ry) in the frame at
time T, it searches all 100 candidate positions (rx+u, ry+v), u,v in -5..4, in the
frame at T+dT.

**Square-wave order.** The candidates are visited down the first column, one step
right, up the next column, and so on. Every step moves the window by one pixel.

**Pixel reuse.** The candidate window lives in a 10 x 10 register array,
`window_regs`. A vertical step needs only the newly uncovered row, a 1-pixel-high,
10-wide line. A horizontal step needs only the new column. With the diagonal
allocation, a row and a column each spread over the 10 modules, so every step is a
single parallel read. Each line enters the array through the window-order output of
`window_memory`.

**Datapath.** 100 `ad_unit`s and a 100-input `adder_tree` (99 adders) compute the
SAD of the whole window every cycle.

**The first window.** It is built by 10 row reads. During those same 10 cycles the
reference window is read, row by row, from a second memory with the same
allocation.

**Timing.** A search issues exactly 10 + 99 = 109 line reads on consecutive
cycles: 10 fill, 45 down, 45 up, 9 right. `ready` is also high in the last read
cycle, so searches can run back to back at 109 cycles each. `done` (with `mv_u`,
`mv_v`, `best_sad`) follows 4 cycles after the last read.

109 cycles per window, times 250,000 windows, is 27.25 M cycles. At the published
178 MHz that is 153 ms, the processing time reported for the published processor.
`ev_fill`, `ev_down`, `ev_up` and `ev_right` show which kind of read is issued.

## 6. Where this RTL makes its own choices

The method fixes the module counts, the window shapes, one PE per module, the image
size (500 x 500, 8 bit), Q = 4 with SP_MAX = 8, E = 10 with a 10 x 10 search area,
and the AD-unit and adder counts. It leaves the following open, and this design
decides them:

* **The stereo vector pair.** B = (4,1) comes from running the search; only the module count 17 was published.
* **Stereo search limits.** The disparity range is 0..63 (`D_MAX`), and the refinement range is +/- SP around the previous best. The published design inherits both from earlier work and does not state them.
* **Stereo window anchor.** The window hangs to the right of and below the reference pixel, and disparity counts towards larger x.
* **Where the reference windows come from.** Both processors read them from a second memory with the same allocation.
* **How PEs meet their reference pixels.** In the stereo matcher each AD unit has a 16-way selector. In the optical-flow matcher a rotation puts each new line in window order.
* **Square-wave details.** The order goes column first, starting downwards, and the candidate offsets run -5..4.
* **Ties.** The earliest candidate with the minimum SAD wins.
* **Memory timing.** Reads are synchronous with one cycle of latency. Loading is one pixel per cycle while idle. Reset is synchronous and active low.
* **Pipeline depths and cycle counts**, as given in sections 4 and 5.

Known differences from the published implementation figures:

* **Stereo processing time.** The published stereo processor reports about 5 cycles per pixel; this design takes about 103 (section 4).
* **Optical-flow registers.** The published optical-flow processor reports 487 registers. This design keeps both the candidate and the reference window in flip-flops, 2 x 800 bits. The published design does not say where its reference window is held.

Not built:

* The period-vector search itself. It is a design-time program, not hardware.
* The multi-step schedules discussed with the method, where a window is split over several cycles. These are allocation examples only: they change which windows you feed to the search, not the hardware.

## 7. How far it is tested

Every module has a self-checking testbench in `tb/` that compares it with a model
written independently in the testbench:

| testbench | what it checks |
|---|---|
| `tb_periodic_addr` | three allocations, including the (2x+y) mod 4 case; the 4 x 4 window at periods 1..8 is conflict-free under the stereo default |
| `tb_alloc_examples` | published 6-, 4-, 3- and 9-module allocation tables: `periodic_addr` groups the pixels exactly as each table does |
| `tb_window_memory` | random window reads at all periods, in both output views |
| `tb_stereo_processor` | shifted images (exact disparity, SAD 0) and random images against a model of the coarse-to-fine search, with exact cycle counts |
| `tb_stereo_q3` | the 3 x 3 / periods 1..3 / 11-module configuration |
| `tb_optical_flow_processor` | moved images and random images against a full-search model in the same order; checks the 109-read schedule and back-to-back operation |
| `tb_pma_top` | the whole top at full size (500 x 500, all defaults) |

`tb_pma_top` loads four full images and runs both processors at once. It counts
each mechanism and fails if one never occurs: the resolution levels, range clipping
at 0 and at D_MAX, the idle 17th module, fill, down, up and right reads, and a
back-to-back start.

## 8. Simulating and changing it

The testbenches need nothing but Verilator 5. Pass the package first and let
Verilator find the other modules in `rtl/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pma_pkg.sv tb/tb_pma_top.sv \
          --top-module tb_pma_top -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`. The full-size top test
runs in a few seconds.

**To change a processor,** override its parameters. Some depend on each other:

* For a new window set, find a new (AX, BX, BY) as in section 2. The `window_memory` assertion catches a pair that does not work.
* `D_MAX` must satisfy ref_x + D_MAX + (Q-1)*SP_MAX < IMG_W for the pixels you search. An assertion checks this at `start`.
* The widths of `pma_top`'s ports are those of the defaults. Change them together with the processor parameters.

**Files:**

* `rtl/pma_pkg.sv` holds the pixel type and the window-shift enum.
* Every other module has a file of its own name in `rtl/`.
* Each testbench `tb/tb_<module>.sv` tests the module of that name.
