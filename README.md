# Frame-parallel motion estimation core for IBBP H.264 encoding

In an IBBP group of pictures, the two B frames and the P frame that lie
between a pair of reference frames do not depend on each other. All three
predict from the same references. This core therefore encodes the
co-located macroblocks (MBs) of B0, B1 and P together:

- The search-range (SR) pixels of reference 0 and reference 1 are fetched
  once per MB position.
- The fetched pixels are held in an on-chip SR memory.
- Integer motion estimation (IME) and fractional motion estimation (FME)
  use them for all three frames.

Compared with encoding the frames one after the other, external SR traffic
falls to a third. For 720p IBBP at 30 frames/s that is 92.16 MB/s on a
32-bit bus.

The RTL covers the motion-estimation part of such an encoder:

- SR loading with data reuse between neighbouring MBs;
- a full-search IME;
- a half-pel FME with an interleaved Hadamard processing-element (PE) array;
- bi-directional refinement;
- Lagrangian partition-mode decision.

For each frame the core produces a mode, direction and motion-vector
decision. These go to that frame's residual coder (transform, quantisation
and entropy coding), which is not part of this RTL.

## Block structure

```
              system bus (32 bit)
                   |
              sr_loader ---------------------------+
                   |                               |
       sr_bank (ref 0)   sr_bank (ref 1)     fp_controller
          |  IME port  \   /  FME port             |
          |             \ /                        |
     parallel_ime    parallel_fme  <---------------+
     (8 x sad_tree)  (2 x interp_6tap, register, 4 x hadamard_pe,
          |           mv_cost_gen x2, lagrangian_md + mode_cost_gen)
          +---- integer MVs ---->|
                                 +--> res_dec[B0], res_dec[B1], res_dec[P]
```

| File | Role |
|---|---|
| `fp_pkg.sv` | Sizes, pixel, vector and decision types, FME slot table, 6-tap helper |
| `fp_encoder_top.sv` | Top: wires everything, exposes the bus and the three decision outputs |
| `fp_controller.sv` | Two-stage MB pipeline (IME of MB n+1 alongside FME of MB n), double buffers, window origin |
| `sr_loader.sv` | Fetches SR strips over the bus, reference 0 first, and writes the SR banks |
| `sr_bank.sv` | One reference's SR memory: a circular column buffer with an IME and an FME read port |
| `sad_tree.sv` | SAD of one candidate over 16x8 pixels |
| `ime_search.sv` | 64x32 full search of one MB in one reference, 8 candidates in parallel |
| `parallel_ime.sv` | Runs the six searches of one MB position in a fixed order |
| `interp_6tap.sv` | H.264 half-pel interpolation, 8 pixels per cycle |
| `hadamard_pe.sv` | 4x4 Hadamard SATD, row-serial, with one row store per filter lane |
| `mv_cost_gen.sv`, `mode_cost_gen.sv` | Rate terms: lambda x Exp-Golomb bits of the MV difference, lambda x mode bits |
| `lagrangian_md.sv` | Best direction per partition, then best partition mode per MB |
| `parallel_fme.sv` | The interleaved FME of the three frames |

## SR memory and data reuse

Each reference has a 160 x 80 pixel bank. The window for an MB covers:

- horizontally, 64 pixels left of the MB, the MB itself and 64 pixels right
  of it: 144 columns;
- vertically, 32 rows above and 32 rows below the MB: 80 rows.

The window is read by column modulo 160 from an origin `base`. When the
core moves one MB to the right, only a new 16-column strip is needed. That
strip is 80 rows x 4 bus words = 320 words per reference. It goes into the
16 columns the window has just left.

The first MB of a row gets a full load of 9 strips per reference. Before
that load starts, the FME of the previous row's last MB runs in a stage of
its own, because the full load would overwrite pixels that FME still reads.

Loader addresses:

- `bus_x = 16*mb_x - 64 + 16*strip + 4*word`
- `bus_y = 16*mb_y - 32 + row`

The bus returns 4 pixels per word, with pixel x in bits 7:0. Reads are
in order, with request/grant handshaking. The bus model in the testbenches
clamps coordinates at the picture edges.

## IME schedule

The three current MBs are searched one at a time on the shared SAD hardware:

- 8 SAD trees score 8 horizontally adjacent candidates;
- each candidate takes two cycles, one per 16x8 half of the MB;
- a 64 x 32 search therefore takes 64*32/8*2 = 512 cycles.

The order is:

1. B0 forward, B1 forward, P on reference 0;
2. B0 backward, B1 backward, P on reference 1.

Reference 0 is loaded first, so the three reference-0 searches run while
reference 1 is still loading. The loading cost seen by the stage is
therefore 320 cycles rather than 640, which gives 320 + 6 x 512 = 3392
cycles. The RTL takes 3407: each search adds 2 cycles of hand-over, and
there are a few cycles of start-up.

The IME cost is the SAD alone. On ties, the first candidate in raster
order wins.

## FME: interleaving two filters into one PE array

This is the least obvious part of the design. The FME has eight
operations per MB position:

- B0 and B1: forward, backward and bi-directional each (six operations);
- P: reference 0 and reference 1 (two operations).

Each SR bank has one FME read port. The operations are therefore split into
two lanes, each tied to one bank, and each lane runs four slots:

| slot | lane 0 (filter 0, reference-0 SRAM) | lane 1 (filter 1, reference-1 SRAM) |
|---|---|---|
| 0 | B0 forward | P reference 1 |
| 1 | B0 bi-directional | B0 backward |
| 2 | P reference 0 | B1 backward |
| 3 | B1 forward | B1 bi-directional |

A bi-directional slot needs the best prediction of the other direction.
Slot 0 of lane 0 found the best B0 forward vector, so in slot 1 a MUX turns
lane 0's filter onto the reference-0 bank again to rebuild that prediction,
while lane 1 searches B0 backward. Each candidate of lane 1 is then scored
twice:

- alone, as a backward candidate;
- averaged with the rebuilt forward prediction (`(a+b+1)>>1`), as a
  bi-directional candidate.

B1 works the same way with the lanes swapped: slot 2 of lane 1 finds B1
backward, and slot 3 of lane 1 rebuilds it while lane 0 searches B1
forward. Within a slot the two lanes never read the same bank. An assertion
checks this.

Timing inside a slot:

- The slot covers the 9 half-pel candidates around the IME vector.
- Each filter produces 8 pixels, half of a 16-pixel row, per cycle.
- A stage register holds filter 0's output for one cycle. The PE array can
  then take a full 16-pixel row, 4 PEs x 4 pixels, from one lane in one
  cycle and from the other lane in the next.
- One MB takes 16 rows x 2 halves = 32 cycles per candidate, which is
  9 x 32 = 288 cycles per slot. Both lanes run in lock step.
- Each PE keeps a separate 4-row store per lane. The array is fed on every
  cycle of a slot: 1152 of the 1172 FME cycles.
- Each slot adds 4 cycles of drain and save. The FME then spends 3 cycles
  on mode decision, one per frame.

The 4x4 SATDs are summed per 8x8 quadrant. That gives the costs of all nine
partitions from one pass: 16x16, 16x8 (x2), 8x16 (x2) and 8x8 (x4). Each
partition and direction keeps its lowest

`J = SATD + lambda * (se_bits(mvd_x) + se_bits(mvd_y))`

with the MV difference (`mvd`) taken in quarter-pel units against the input
predictor `mvp`. A bi-directional candidate pays for both vectors.
`lagrangian_md` then works in two steps:

1. For each partition it picks the cheapest of L0, L1 and bi.
2. For the MB it picks the cheapest mode, adding `lambda * {1, 3, 3, 7}`
   bits for 16x16, 16x8, 8x16 and 8x8.

The P frame only has the L0 and L1 directions.

## Pipeline and timing

The controller overlaps the IME stage of MB position n+1 with the FME
stage of MB position n. The longer unit sets the stage length:

| | cycles per MB position (3 MBs) |
|---|---|
| SR load, seen by the stage | 320 (640 bus words in total) |
| IME | 3407 (3392 + hand-over) |
| FME | 1172 |
| stage | 3407 |

720p30 has 3600 MBs per frame. One stage covers 3 MBs, so the rate is
3407 x 3600 x 30 / 3 = 122.7 MHz. A budget of 4000 cycles per stage would
need 144 MHz.

SR bandwidth is 640 words x 4 bytes per 3 MBs, which gives 92.16 MB/s.

At 1080p (8160 MBs) the same core would need about 278 MHz.

## Interfaces

- Commands use a `cmd_valid`/`cmd_ready` handshake. Each command carries:
  - the three current MBs in `cmd_pix[frame][y][x]`, with frames in the
    order B0, B1, P;
  - `cmd_mb_x` and `cmd_mb_y`;
  - `cmd_first` for the first MB of a row.
- `mvp[frame][ref]` and `lambda` are sampled while the FME runs.
- `res_valid` pulses once per MB position with `res_mb_x`/`res_mb_y` and
  `res_dec[frame]`. Each `res_dec[frame]` holds the mode, the cost, and for
  each 8x8 quadrant the direction, `mv0` and `mv1`. Vectors are in
  quarter-pel units.
- Reset is asynchronous and active low.

## Departures and simplifications

- **Half-pel only.** The FME refines to half-pel; quarter-pel refinement is
  not implemented.
- **One search pass for all partitions.** All partitions share the
  candidate set around the 16x16 IME vector.
- **Fixed bi-directional partner.** Bi-directional refinement pairs each
  candidate with the best 16x16 prediction of the other direction.
- **Which side of a bi pair is fixed.** The bi slot uses the same two
  SRAMs in the same slots, but which side is fixed differs from a scheme
  that buffers the same-slot prediction of the other lane:
  - The lane holding the bi slot rebuilds the best prediction its own SRAM
    gave in the previous slot (B0 forward, B1 backward).
  - Each candidate of the other lane is averaged with that prediction.
  - Filter 0 always serves lane 0. The filters never swap SRAMs.
- **No Direct or Skip modes.** They are not evaluated, and neither are
  sub-8x8 partitions.
- **IBBP only.** The schedule is fixed for IBBP. IBP or hierarchical
  B structures, with two MBs in parallel, would need another job list and
  slot table.
- **Mode bits borrowed from P syntax.** The mode bits are the P-slice
  `mb_type`/`sub_mb_type` code lengths, also used for B MBs.
- **External predictors.** The MV predictor is an input; its derivation
  from neighbouring MBs lies outside the core.
- **No residual coding or reconstruction.**
- **Fixed sizes.** The window sizes are fixed by `fp_pkg` (128x64 maximum
  SR, 64x32 IME range). Changing them means changing the package constants
  together.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds independent
reference models: a hashed test picture, half-pel interpolation, matrix
SATD and Exp-Golomb bit counts.

To simulate with Verilator 5, for example the whole core:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fp_encoder_top \
  rtl/fp_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v fp_pkg) \
  tb/tb_fp_encoder_top.sv
./obj_dir/Vtb_fp_encoder_top
```

The packages must come first. The other testbenches are built the same
way, with their own top module name.

`tb_fp_encoder_top` runs the top at its default sizes on five MB
positions:

- Three MBs of one row go through with the bus always granted. The
  testbench checks 3392..3408 IME cycles and 640 bus words per MB position.
- Two MBs of the next row follow with random bus stalls.

The current MBs are built from the references with known motion:

- B0 is the average of two shifted references;
- B1 is a half-pel shift of reference 1;
- P is a shift of reference 0.

The expected decision and cost are therefore exact. The testbench also
counts how often each mechanism happened:

- IME overlapping the reference-1 load;
- IME/FME overlap;
- full loads;
- flush stages;
- bus stalls;
- PE-array busy cycles;
- bi-directional and half-pel decisions.
