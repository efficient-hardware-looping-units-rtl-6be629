# Zero-overhead hardware looping units

Software that walks a perfect loop nest spends instructions at the end of
every loop body: increment the index, compare it with the bound, branch, and
at the end of a loop reset it and step the loop outside. When several loops
end at once (the last pixel of a row that is also the last row of a block)
the overhead multiplies. A hardware looping unit keeps the whole iteration
vector in registers and produces the next vector every clock cycle, including
the cycles in which several nested loops end together. The datapath that
executes the innermost loop body only says "done" (`innerloop_end`). The
looping unit answers with the next set of indices at the next clock edge, and
with `loops_end` when the whole nest has run.

This repository holds three implementations of such a unit, a bank of loop
bound registers that feeds them, and two applications built on the units:

* a scanner for a polyhedron whose inner bound depends on the outer indices;
* a full-search block motion estimator.

## Iteration vector layout

Every unit has the same ports:

| port            | dir | width    | meaning                                        |
|-----------------|-----|----------|------------------------------------------------|
| `clk`, `reset`  | in  | 1        | clock, active-high reset                       |
| `innerloop_end` | in  | 1        | the body of the innermost loop has finished    |
| `loop_count`    | in  | NLP*DW   | bound of each loop                             |
| `index`         | out | NLP*DW   | current iteration vector                       |
| `loops_end`     | out | 1        | this cycle finishes the last iteration         |

Loop *q* (1..NLP) occupies bits `[q*DW-1:(q-1)*DW]`. **Loop NLP, the most
significant segment, is the innermost loop.** Loop 1, bits `DW-1:0`, is the
outermost. The defaults are NLP = 8 loops of DW = 16 bits.

`loops_end` is combinational. It is high in the cycle whose `innerloop_end`
completes the last iteration. At the following edge every index returns to 0,
so the unit is ready for the next run. To stop it, the surrounding control
keeps `innerloop_end` low. A unit advances only in cycles with
`innerloop_end` high; otherwise it holds.

### Two bound conventions

The variants do not read `loop_count` the same way. Mixing them up is the
easiest mistake to make with this code:

| unit         | loop *q* runs            | iterations            |
|--------------|--------------------------|-----------------------|
| `hw_looping` | 0 .. `loop_count`-1      | `loop_count` (0 means 2^DW) |
| `ixgen_b`, `ixgen_r` | 0 .. `loop_count`, step STRIDE | ceil(`loop_count`/STRIDE)+1 |

The index generators test "index < bound" before they increment. The last
value is therefore the bound itself, or the first stride step past it when
the bound is not a multiple of the stride.

## The three looping units

### `hw_looping`: structural unit

It is built from one slice per loop plus shared control:

```
 loop_count[q] ─┐
                ▼
 index_inc[q] ──index+1──► cmpeq[q] ──flag[q]──┐
    ▲    ▲                                      ▼
    │    └──incl[q]──────────────── priority_encoder ◄── innerloop_end
    │                                  │         └──► loops_end
    └──reset_vct_ix[q]── reset_control ◄── reset_vct
                              ▲
                            reset
```

* `index_inc` is the index register. It also outputs index+1, so one adder
  serves both the update and the test.
* `cmpeq` raises `flag` when index+1 equals the bound, meaning the loop is in
  its last iteration.
* `priority_encoder` scans from the innermost loop outwards while
  `innerloop_end` is high:
  * every loop whose flag is set, and whose inner loops all end too, is
    cleared;
  * the first loop with a clear flag is incremented;
  * if all flags are set, `loops_end` rises and everything clears.
* `reset_control` ORs the global reset into the per-loop clears.

The global reset reaches the registers only through `reset_control`, so this
unit samples reset **synchronously**.

### `ixgen_b`: behavioural index generator

This is one `always_comb` process. It loops from loop NLP down to loop 1, and
the first loop still below its bound:

1. advances by STRIDE;
2. clears every loop inside it;
3. ends the search.

If no loop can advance, the vector clears and `loops_end` rises. Reset is
asynchronous.

### `ixgen_r`: priority-encoded index generator

It has the same function as `ixgen_b`, written the way a generated if/elsif
chain comes out. All NLP comparisons are made in parallel. Each segment then
picks one of three cases:

* **advance**: it is the innermost loop below its bound;
* **clear**: no loop from it inwards is below its bound;
* **hold**: otherwise.

No loop-carried search remains, so the logic depth hardly grows with DW.
Published FPGA results for this style show the highest clock rate. The
structural unit uses the fewest LUTs at 16-bit width. Reset is asynchronous.

## Loop bound register bank (`loop_bound_regfile`)

The bank has NLP entries, each with its own write enable, and drives all of
them on `loop_count` while the output enable `oe` is high. With `oe` low the
output is zero. In a processor, the host writes the bounds, raises `oe` while
the accelerator runs, and drops it on `loops_end`.

Reads are write-through: an entry written in a cycle shows its new value in
that same cycle. The polyhedron scanner depends on this.

## Polyhedron scanner (`polyhedron_scan`)

It visits every integer point of

    0 <= i <= n,   0 <= j <= n,   0 <= k <= i + j

once, in lexicographic order, one point per `point_done` cycle. The hardware
is a three-loop `ixgen_r`, an adder forming i + j, and a bound bank:

* `load` writes n into the bounds of i and j;
* the bound of k is rewritten with i + j every cycle.

Because the bank reads write-through, the bound the generator compares
against always matches the indices it holds. When i or j steps and k returns
to 0, the new bound is already in force and no bubble is needed.
`loops_end` marks the point (n, n, 2n). The sum is DW bits wide, so n must be
less than 2^(DW-1).

## Full-search motion estimator (`fsme_engine`)

For each BxB block of the current frame, the engine tries every displacement
(i, j) in [-P, P]² against the reference frame. Reference pixels outside the
picture count as 0. It keeps the displacement with the smallest sum of
absolute differences (SAD); on ties the first one found wins, scanning i
outer and j inner. The loop nest has six loops and is split over three
two-loop `ixgen_r` units:

| unit   | loops | range                    | advanced by            |
|--------|-------|--------------------------|------------------------|
| `u_kl` | k, l  | 0..B-1                   | every busy cycle       |
| `u_ij` | i, j  | 0..2P (offset by -P)     | `u_kl.loops_end`       |
| `u_xy` | x, y  | 0..H-B, 0..W-B, stride B | `u_ij.loops_end`       |

Each unit's `loops_end` is the next unit's `innerloop_end`, so all three can
step in the same cycle. A frame therefore takes exactly
(H/B)·(W/B)·(2P+1)²·B² cycles. At the defaults (CIF 352×288, B = 16, P = 7)
that is 22,809,600 cycles.

The tasks of the algorithm run in the cycle of the pixel that closes their
loop:

* **T3**: SAD accumulation, every cycle;
* **T4** and **T2**: "better than min?" and clearing the accumulator, on the
  last pixel of a position;
* **T1**: resetting min to 255·B², on the last position of a block.

The vector, block position and SAD come out on `mv_valid` one cycle after
the block's last pixel.

Pixel memories are external. `cur_addr` and `ref_addr` are `row*W + col`,
and the data must come back in the same cycle, like distributed RAM. If your
memories have a read latency, pipeline the datapath.

## Top level (`hwlu_top`)

`hwlu_top` puts everything side by side:

* a bound bank feeding all three looping units (prefixes `lb_`, `hwlu_`,
  `ixb_`, `ixr_`);
* the polyhedron scanner (`poly_`);
* the motion estimator (`me_`).

The host processor, the accelerator that executes the innermost body, and the
frame memories are outside the design. Their signals are ports.

## Where this design makes its own choices

* **Loop order.** The most significant segment is the innermost loop. The
  polyhedron scanner therefore keeps i in bits `DW-1:0` and k in
  `3*DW-1:2*DW`, which is the reverse of the order one might expect from a
  `{i, j, k}` listing.
* **Comparison in the index generators.** They use "index < bound"; a
  "<=" form would run one extra iteration per loop.
* **`loops_end`.** It is combinational (Mealy), not registered. Chained units
  rely on this to advance in the same cycle.
* **Motion estimator parameters.** The block size B = 16 and the search range
  P = 7 are choices. With them, a three-cycle-per-pixel datapath would come
  close to published cycle counts for this kernel; the datapath here does one
  pixel per cycle.
* **Best-match update.** The motion estimator updates `min` together with the
  best vector. A description that only stores the vector would never narrow
  the search.
* **Reset.** It is synchronous in `hw_looping` and asynchronous everywhere
  else. Hold reset for at least one clock edge. Verilator reports
  SYNCASYNCNET on the top for this reason.
* **Datapaths.** Only the motion estimator's datapath is provided. No
  matrix-multiply or DCT datapath is included.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* The looping-unit testbenches compare the index vector and `loops_end` with
  a software counter every cycle. The counter runs under random stalls, with
  random bounds, at NLP = 8 and DW = 16. The index-generator testbenches also
  run 3 loops with stride 3. They check the exact step count of each nest
  (zero overhead), cycles where several loops end at once, and reset in the
  middle of a nest.
* `tb_priority_encoder` and `tb_reset_control` are exhaustive at 8 loops.
* `tb_polyhedron_scan` checks every point for n = 0..3 and 6.
* `tb_fsme_engine` runs two 48×32 frames (B = 8, P = 3) against a software
  full search. The frames come from an integer hash of the pixel
  coordinates, so no frame is stored (`fsme_frames`).
* `tb_hwlu_top` runs the whole design at its default parameters. It covers
  all three units through the bound bank, an output-enable pause, a
  polyhedron scan with n = 5, and one complete CIF motion-estimation frame
  (22.8 M cycles, about 20 s of simulation). It also counts that each
  mechanism occurred: stalls, multi-loop ends, nest ends, the pause, bound
  updates, and out-of-picture searches.

To simulate one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_hwlu_top.sv \
        tb/fsme_frames.sv --top-module tb_hwlu_top -Mdir obj -o sim
    obj/sim

Other testbenches work the same way: add `tb/fsme_frames.sv` for the two
motion-estimation benches and `tb/ixgen_harness.sv` for `tb_ixgen_b` and
`tb_ixgen_r`. Verilator finds the RTL modules through `-Irtl`.
