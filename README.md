# Hough-transform straight-line detector

This is synthesizable SystemVerilog for a straight-line detector for real-time video, such as
lane detection. It takes the feature (edge) pixels of a frame and returns the lines they lie on.
Each line is reported as (ρ, θ): θ is the angle of the line's normal and ρ its distance from the
origin, so that every pixel (x, y) on the line satisfies

    ρ = x·cos θ + y·sin θ

Every feature pixel votes for all the (ρ, θ) bins it could belong to. Bins with many votes are
lines. The Hough transform is expensive in two ways: each pixel needs one multiply-add per angle,
and the vote array is large. This design attacks both:

* **No run-time trigonometry.** sin θ and cos θ come from fixed-point look-up tables.
* **n-way parallelism.** The angles are split over `N_PAR` computing units. Each unit has its own
  slice of the tables and its own bank of the vote array, so the units never share a memory port.
* **Peaks found during voting.** A bin is reported the moment its count passes a threshold. No
  scan of the array is needed after the frame.
* **Initialisation in the background.** The array is zeroed while the next frame is already
  voting.
* **Local-maximum search during voting.** A small table follows the candidate peaks as they
  appear. When the frame ends, only the strongest bin of each neighbourhood is left.

The design follows the architecture of the thesis *Research on Hardware Implementation of
Straight-Line Detection Based on Hough Transform for Real-Time Applications*. That architecture
is described at block level only. Every size except the image format, and the interfaces, the
stall rules and the peak merge, are choices made here. They are listed under
[Choices and departures](#choices-and-departures).

## Data flow

```
 (x,y) ─► ht_sequencer ──(x,y,k)──► rho_unit[i] ──ρ──► hough_bank[i] ──peak──► peak_collector ─► local_max ─► lines
          angle step k              trig_lut[i]        votes, threshold        per-bank FIFOs     A×A windows
          0..K-1                    (i = 0..N_PAR-1)   clear port ◄── hough_init_ctrl (background sweep)
```

`hough_top` wires these blocks together and also runs the frame control.

## Angles, tables and ρ arithmetic

There are `N_THETA` = 180 angles: θ = θ_idx·180°/N_THETA, so the default step is 1°. They are
split into `N_PAR` = 30 consecutive slices of K = N_THETA/N_PAR = 6 angles. Unit *i* handles
θ_idx = i·K + k, for k = 0..K-1.

* **Tables (`trig_lut`).** Each unit holds a K-entry table of round(cos θ·2^16) and
  round(sin θ·2^16), as 18-bit two's-complement numbers. The tables are computed at elaboration
  by `ht_pkg::trig_q`, so no data files are needed.
* **Multiply-add (`rho_unit`).** The unit forms x·C + y·S exactly, at scale 2^16. It then drops
  the 16 fraction bits with an arithmetic shift, which is floor, not rounding. This leaves ρ at
  the bin resolution of 1 pixel.
* **Bin index.** The origin is pixel (0,0), so ρ ranges over ±RHO_MAX, with
  RHO_MAX = ⌈√(W²+H²)⌉ = 800 for 640×480. The unit outputs rho_idx = ρ + RHO_MAX, an unsigned
  index into N_RHO = 1601 bins.
* **Counters, not fixed wiring (`ht_sequencer`).** A single counter k steps all units together
  through their K angles for each pixel. Changing `N_PAR` therefore only changes K and the number
  of instances. `N_THETA` must be a multiple of `N_PAR`.

## The banked vote array

Bank *i* (`hough_bank`) stores the votes of its K angles. The angles advance in equal steps, so
the (k, ρ) slice maps onto a plain one-dimensional memory:

    address = k·N_RHO + rho_idx          (6 × 1601 = 9606 words of 10 bits per bank)

All 30 banks together hold 180 × 1601 × 10 = 2.88 Mbit. A synthesis tool sees 30 independent
memories.

### Voting timing

`clk` is the memory clock. It runs at twice the rate of vote operations.

| cycle | phase | what happens |
|---|---|---|
| t | 0 (issue) | every bank reads the counter at its address |
| t+1 | 1 | counter + 1 (saturating at 1023) is written back; a peak is flagged if it is now > `thr` |
| t+2 | 0 | next angle step issued |

Each operation finishes before the next one starts. Consecutive operations of a bank also go to
different angle rows. As a result the read-modify-write never needs forwarding and has no
address hazards.

A pixel costs 2·K = 12 clock cycles when nothing stalls; `tb_hough_top` checks this cycle count.
`rho_unit` adds one pipeline register in front of the banks. It computes the next step's ρ while
the current vote is being written.

## Background initialisation (the part to read carefully)

A memory cannot be zeroed by one reset signal. Zeroing 9606 words per bank before every frame
would cost 9606 cycles per frame. Instead, each bank memory has a second write port, which is
free in every cycle because voting uses only the first port.

* `frame_start` starts `hough_init_ctrl`. It sweeps the address range once, one word per
  clock cycle, and zeroes that word in all banks in parallel.
* Voting of the new frame may begin at once. A vote to address *a* may issue only once the
  sweep has passed it (`a < clr_addr`); otherwise the whole datapath waits one vote slot. These
  cycles show on `stall_init`.
* Because of this rule, the sweep never overwrites a fresh vote, and no vote reads a stale
  counter. The banks carry assertions for both properties.

The cost is at most 9606 clock cycles per frame. Those cycles are hidden when the first feature
pixels of a frame arrive later than that, for example during vertical blanking or in the upper
image rows, which are often empty of edges. A frame whose pixels arrive at once, as in frame A of
`tb_hough_top`, waits for most of the sweep.

## Threshold peaks and their merge

When a bin's new count exceeds `thr`, its bank outputs a peak event (rho_idx, θ_idx, count) in
the write-back cycle. What happens to the counter depends on `lms_en`:

* **`lms_en = 0`**: the bin is written back as zero. This reports each line once per `thr`
  votes and needs no further search. Every such peak carries count = thr + 1.
* **`lms_en = 1`**: the bin keeps counting, and every further vote above `thr` is reported
  again with its new count. The local-maximum search can then compare real counts. With zeroing,
  every peak would carry the same count.

Up to N_PAR banks can report a peak in the same cycle. `peak_collector` gives each bank a 4-deep
FIFO and drains the FIFOs one event per cycle, round-robin. While any FIFO is full, no new vote
issues (`stall_fifo`). No event is ever dropped, and the `peak_*` outputs show each event as it
enters the local-maximum unit.

## Local-maximum search

Around each real line, the threshold lets a cluster of neighbouring bins through, because of the
quantisation of ρ and θ. `local_max` reduces each cluster to its best bin, as the peaks arrive:

* It keeps up to `MAX_LINES` = 16 candidates. Each candidate is the centre of an A×A window,
  with A = `WIN` = 5, i.e. |Δρ| ≤ 2 and |Δθ| ≤ 2.
* **Peak inside a window** (first matching candidate): the centre moves to the peak if the peak's
  count is larger (`lms_move`); otherwise the peak is dropped (`lms_drop`).
* **Peak inside no window**: it opens a new window (`lms_insert`). If the table is full, the
  peak is dropped and `lms_overflow` stays high until the readout.

Only windows that hold a peak are ever examined, and each event is decided in one cycle. When
voting ends, the result is therefore already complete. The readout emits the valid entries on
`line_*`, one per cycle, in table order, and empties the table.

Limits of this rule:

* A centre can drift until two windows overlap. The windows are then not merged.
* θ does not wrap around between 179° and 0°.

## Interface of `hough_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | memory clock; asynchronous active-low reset |
| `thr` | in | VW | vote threshold, a peak is count > thr |
| `lms_en` | in | 1 | 1: keep counting and use the local-maximum search; 0: zero bins when reported |
| `frame_start` / `start_ready` | in / out | 1 | open a frame; taken when `start_ready` is high |
| `in_valid` / `in_ready` / `in_x` / `in_y` | in / out / in / in | 1/1/10/9 | feature pixels, valid/ready |
| `frame_end` | in | 1 | one-cycle pulse after the last pixel |
| `frame_done` | out | 1 | pulses when the line readout has finished |
| `peak_valid`, `peak_rho`, `peak_theta`, `peak_votes` | out | 1/11/8/10 | threshold peaks as found |
| `line_valid`, `line_rho`, `line_theta`, `line_votes` | out | 1/11/8/10 | local maxima, read out after the frame, no back-pressure |
| `init_busy`, `stall_init`, `stall_fifo` | out | 1 | sweep running; a vote slot lost to the sweep or to a full FIFO |
| `lms_overflow`, `lms_insert`, `lms_move`, `lms_drop` | out | 1 | local-maximum table status and activity |

Frame sequence:

1. `frame_start` (when `start_ready` is high).
2. Pixels.
3. `frame_end`.
4. The detector drains its votes and peaks, reads out the lines and pulses `frame_done`.

The next `frame_start` is taken once the sweep of the previous start has also finished.
Reported values are rho_idx = ρ + RHO_MAX and θ_idx in steps of 180°/N_THETA.

## Parameters

| parameter | default | origin |
|---|---|---|
| `IMG_W`, `IMG_H` | 640, 480 | the VGA format the local-maximum version targets |
| `N_THETA` | 180 | choice (1° steps) |
| `N_PAR` | 30 | choice; must divide `N_THETA` |
| `FRAC` | 16 | choice: table scale 2^FRAC |
| `VW` | 10 | choice: vote counter width (a VGA line has at most 800 pixels) |
| `WIN` (A) | 5 | choice |
| `MAX_LINES` | 16 | choice |
| `FIFO_D` | 4 | choice, power of two |

For XGA (1024×768) without the local-maximum search, set `IMG_W=1024`, `IMG_H=768` and use
`lms_en = 0`. The array then grows to 180 × 2561 × 10 bits = 4.6 Mbit.

Throughput at the defaults: 12 memory-clock cycles per feature pixel, plus at most 9606 cycles of
initialisation per frame. As an example, with a 100 MHz memory clock (not a measured figure), a
frame rate of 135 frames/s leaves room for about 61,700 feature pixels per frame. That is 20 % of a
VGA frame.

## Choices and departures

* The input is feature-pixel coordinates. Edge detection, video input and output, and the FPGA
  boards of the prototypes are outside this RTL.
* "Double-clock" initialisation is read here as a memory clocked at twice the vote rate, with a
  second write port for the clear sweep. A vote waits only if its word has not yet been swept.
* With `lms_en = 1` the reported bins are not zeroed (see above). With `lms_en = 0` they are,
  which is the behaviour of the first prototype of the thesis.
* ρ is truncated (floor), the origin is pixel (0,0), Δρ = 1 pixel.
* Parallel peaks are merged through per-bank FIFOs with a round-robin arbiter and back-pressure.
* In the local-maximum search, the first matching window wins, windows are never merged, and θ
  does not wrap around.

## Files

* `rtl/ht_pkg.sv`: defaults and elaboration-time functions (ρ range, table entries).
* `rtl/trig_lut.sv`, `rtl/rho_unit.sv`, `rtl/ht_sequencer.sv`: tables, ρ units, angle counter.
* `rtl/hough_bank.sv`, `rtl/hough_init_ctrl.sv`: vote banks, background sweep.
* `rtl/peak_collector.sv` (with `rtl/sync_fifo.sv`), `rtl/local_max.sv`: peak merge and
  local-maximum search.
* `rtl/hough_top.sv`: the detector.
* `tb/tb_<block>.sv`: a self-checking testbench per block.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.

* **Unit tests.** These compare each block with values computed in the testbench from first
  principles: tables from `$cos`/`$sin`, ρ from the exact product, a reference vote array, and
  reference FIFO and local-maximum models. They also check the cycle timing: one register in
  `rho_unit`, K cycles per pixel in the sequencer, one word per cycle in the sweep.
* **`tb_hough_top`.** This runs the detector at its default size over three frames:
  * Frame A: three lines plus noise, `lms_en=1`.
  * Frame B: a repeated pixel blob with a low threshold, which fills the FIFOs and overflows the
    candidate table.
  * Frame C: `lms_en=0`, with the pixel rate measured.

  A reference accumulator predicts every threshold peak exactly, as a multiset per frame. A
  reference of the window rules predicts the line readout. Each true line must be found within
  2 bins. Every mechanism must occur at least once: initialisation stall, FIFO stall, zeroing,
  window insert, move and drop, overflow, and mode switch.

* **`tb_video_frames`.** This runs whole synthetic frames in raster order.
  * VGA, default parameters, `lms_en=1`: two lane markings, a horizon edge and 3 % edge noise.
    10,310 feature pixels took 132,820 cycles. That is 12 per pixel plus about 9,100 cycles of
    waiting for the sweep, or about 750 frames/s at a 100 MHz memory clock. All three lines were
    found. The long horizon edge also leaves weaker local maxima in the wings of its butterfly,
    8 to 9 ρ bins away, which a 5×5 window does not cover.
  * XGA, `IMG_W=1024, IMG_H=768`, `lms_en=0`: 17,433 pixels took 223,932 cycles, and all three
    lines were reported.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/ht_pkg.sv tb/tb_hough_top.sv -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module by its file name. Only the package has to be named, and
it must come first. Replace `tb_hough_top` with any other testbench.

The full-size end-to-end test builds in a few seconds and runs in well under a second.
