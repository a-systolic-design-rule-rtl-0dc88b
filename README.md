# SDRC — a systolic, edge-based design-rule checker

This RTL implements a hardware design-rule checker for rectilinear layout
polygons. It reports **width violations** (a piece of material thinner than
the minimum width) and **spacing violations** (two pieces of material closer
than the minimum spacing). It works on *edges*, not on a bitmap. Every
polygon edge is sorted into sweep order by a systolic priority queue. A
systolic checker array then sweeps across the layout once, comparing each
new edge only with the edges directly facing it. Horizontal and vertical
edges are handled in two passes through the same checker.

The design is built for a host computer that streams polygon descriptions in
and reads a sorted list of violations back. All logic is synthesizable
SystemVerilog; the only model outside the design is the host, which the
testbenches play.

## Polygons and how they are described

A polygon has only horizontal and vertical edges, and it may contain holes.
Polygons must be *well formed*: closed, not overlapping, not sharing an edge
with each other or with a hole. The checker does not test this.

The host sends each outline as a compact token stream:

```
header(p, n)  x1 y1  x2 y3 x4 y5 ... x_k y1
```

* The header token is `TOK_POLY` for an enclosing polygon or `TOK_HOLE` for
  a hole. Its value is the polygon number `n`, and a hole carries the number
  of the polygon that encloses it.
* `x1 y1` is the lowest-left vertex. After it, the coordinates alternate:
  an x gives the next vertex on the same horizontal line, and a y gives the
  next vertex on the same vertical line. The first step runs east.
* The outline is walked with the region it encloses on its left, so
  polygons and holes both run counter-clockwise. The stream ends with the y
  token that brings the walk back to `(x1, y1)`.

A rectangle `[x0,x1] x [y0,y1]` is therefore `p,n, x0,y0, x1, y1, x0, y0`.

For a polygon the enclosed region is material; for a hole it is empty. Each
explicit edge therefore records which side the material is on (`mat_hi`):
above a horizontal edge, or east of a vertical one.

## Data flow (`sdrc_top`)

```
           tokens                         tokens
 host ───────────────┬──────────────────────────────┐
                     ▼                              ▼
          ┌──────────────────┐           ┌──────────────────┐
          │ controller (SAX) │           │ controller (SAY) │
          │  edge former H   │           │  edge former V   │
          └──┬────────────┬──┘           └──┬────────────┬──┘
             │            │  edges / errors │            │
        ┌────▼───┐        └───────┬─────────┘       ┌────▼───┐
        │  SAX   │                │                 │  SAY   │
        │ sort   │           ┌────▼────┐            │ sort   │
        │ array  │           │   DRC   │            │ array  │
        └────────┘           └─────────┘            └────────┘
```

One check runs in these phases:

1. **Load.** Both controllers receive every token. The SAX controller builds
   the horizontal edges and the SAY controller the vertical ones. Each edge
   goes into that controller's sort array.
2. **`go`.** The host pulses `go` after its last token.
3. **SAX pass.** SAX pops its edges in order `(y, x_lo)` and sends them
   through the DRC. The DRC measures vertical separations between horizontal
   edges. Each violation goes back into SAX.
4. The DRC is cleared.
5. **SAY pass.** The same happens for the vertical edges, in order
   `(x, y_lo)`, measuring horizontal separations. Violations go back into SAY.
6. **Unload.** SAX's violations go to the host first, then SAY's, each
   group in sorted order. `err_axis` says which pass found a violation.
   `done` pulses at the end.

Edges and violations share each sort array. A violation's sort key has its
top bit set, so it sorts after every edge. The DRC can therefore push
violations into SAX while SAX still holds edges waiting to be sent. Popping
edges stops on its own once the head item is a violation.

## The sort arrays (`sdrc_sort_array`)

Each sort array is a linear systolic priority queue of `DEPTH` cells. Cell
`i` holds one item and talks only to its two neighbours. The held items stay
in ascending key order from cell 0, with the empty cells at the far end.

* **Insert.** An insert enters at cell 0 and moves down one cell per clock.
  In each cell the smaller of the held and the travelling item stays, and
  the larger travels on. An empty cell keeps the item, which ends the wave.
* **Extract.** Cell 0's item is delivered. Then, as the wave reaches each
  cell, the cell takes its successor's item, so the array shifts up by one.

A new operation may enter every **second** clock (`op_ready` is low for one
clock after each operation). With that spacing, a wave is always at least
two cells behind the wave before it. So whenever a cell reads its successor,
the successor has already been updated by every earlier wave. As a result
cell 0 holds the true minimum in every clock, even with waves still running
deeper in the array.

The sort key is `{is_err, c, lo}`: the fixed coordinate (y for a horizontal
edge), then the lower end of the span. Because edges never overlap, this
order is unique. Equal keys, which only violations can have, leave in
arrival order.

## The checker array (`sdrc_drc`)

This is the core of the design. It receives one family of parallel edges in
sweep order. To keep the wording simple, take them as horizontal, sorted by
y and then by x.

### The skyline

The array keeps a *skyline*. At every x position, the skyline holds the last
edge seen so far: the edge directly below the sweep line. Its pieces are
disjoint x-intervals, and each of the `CELLS` cells holds one piece (or
none). Each piece keeps the full record of its edge: y, span, material side
and polygon number.

Take a new edge `e` and a skyline piece `s` whose span overlaps it by a
positive length. No other edge lies between them over that common span.
That gives two cases:

* `s` has material above and `e` has material below. The band between them
  is solid, so its thickness `e.y − s.y` is a **width**. A violation is
  reported when it is `< W_MIN`.
* `s` has material below and `e` has material above. The band is empty, so
  `e.y − s.y` is a **spacing**. A violation is reported when it is `< S_MIN`.
  This covers a gap between two polygons, a notch in one polygon, and a
  gap between a polygon and its hole.

After the check, `e` replaces `s` over the common span. There are four cases:

* `s` sticks out on the left only: `s` is cut short.
* `s` sticks out on the right only: `s` is cut short from the left.
* `s` lies entirely under `e`: `s` is deleted.
* `e` lies strictly inside `s`: `s` splits. The left part stays in the cell.
  The right part, called the *remainder*, travels on with `e`.

Skyline pieces never overlap, so an edge splits at most one piece.

### Systolic operation

Each edge travels through all cells, one cell per clock. A travelling edge
carries a flag saying whether it has been stored yet, plus at most one
remainder. The first cell that is empty (or just freed) stores the edge. The
next such cell stores the remainder. An edge changes only the cell it is in,
and every cell sees the edges in arrival order. So a new edge can enter every
clock, and each edge finds the skyline exactly as the edges before it left
it. The latency through the array is `CELLS` clocks.

If an edge or a remainder leaves the last cell without finding a place, the
skyline is incomplete. The sticky flag `overflow` is then raised. `CELLS`
must be at least the largest number of skyline pieces along one sweep line;
in an `N`-unit-wide field there are never more than `N` pieces.

### Getting violations out

One edge can cause several violations in one clock, one in each piece it
overlaps. Several edges are in flight at once. Violations therefore leave
through a chain of registers beside the cells, which moves one step per
clock toward the output.

A cell puts its violation into the chain where the slot coming from
upstream is empty. If that slot is full, the whole cell array holds for a
clock (`edge_ready` low) while the chain keeps moving. The chain itself only
holds when the consumer is not ready. Violations therefore leave in no
particular order, and the sort array they return to puts them in order.

### What is reported

A violation reports the kind (`ERR_WIDTH` or `ERR_SPACING`), the
coordinates of the two facing edges (`c_lo < c_hi`), the common span
`[lo, hi]` and both polygon numbers. A violation found against several
skyline pieces is reported once per piece, so each unit of span is reported
exactly once.

## Interfaces and timing

All modules use one clock and an asynchronous active-low reset. All streams
use valid/ready handshakes.

| port of `sdrc_top` | meaning |
|---|---|
| `tok_valid/tok_ready/tok` | polygon tokens (`token_t`: kind, 16-bit value) |
| `go` | pulse after the last token; the check starts when loading has finished |
| `busy`, `done` | a check is running; one-clock pulse when the last violation has been delivered |
| `err_valid/err_ready/err_o`, `err_axis` | violations (`err_t`), SAX's first (`err_axis` 0: between horizontal edges) |
| `sa_overflow`, `drc_overflow`, `fmt_err` | status of the last check, valid from `done` until the next `go` |

Throughput:

* **Loading** takes one edge per side every two clocks, which is the sort
  array's operation rate.
* **Sending** also runs at one edge every two clocks. The DRC itself could
  take one edge per clock.
* A pass ends when the sort array holds no more edges and the DRC is empty.
  Emptying the DRC takes up to `CELLS` clocks after the last edge.
* **Unloading** delivers one violation every two clocks.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `sdrc_pkg::CW` | 16 | coordinate width |
| `sdrc_pkg::NW` | 8 | polygon-number width |
| `SA_DEPTH` | 128 | items per sort array: that side's edges plus the violations it collects |
| `DRC_CELLS` | 64 | skyline cells |
| `W_MIN` | 4 | minimum width |
| `S_MIN` | 4 | minimum spacing |

None of these sizes comes from the original design, which gives the minimum
width only as a symbol and sets no word sizes or array depths. They are
sized so that a 64 x 64 field with sixteen shapes fits without overflow.

## How far this follows the original design, and where it departs

Taken from the original design:

* the polygon representation and traversal rule;
* the block structure: two sort arrays, each with a controller that forms
  its own edges, and one shared systolic checker;
* the pass order, SAX then SAY;
* violations collected back in the sort arrays and then handed to the host;
* width and spacing as the two checks.

This implementation's own choices:

* **Sort-array cells.** The original calls the sort arrays systolic
  priority queues without giving their cells here. The classic linear
  systolic priority queue is used.
* **The DRC's internal algorithm.** The skyline array, its cut-and-split
  rule, the violation chain and the stall are this design's.
* **Token framing.** `p, n` is one header token.
* **Holes.** A hole's edges have the material on their right, because a
  hole is walked with its own, empty, interior on the left.
* **Spacing rule.** `S_MIN` is a separate parameter.
* **The rest:** the phase handshakes between the controllers and the
  top-level sequencer, the overflow and format flags, and the host port.

Departures and limits:

* **Corner proximity is not checked.** Two edges whose spans do not overlap
  are never compared. This includes two pieces of one polygon that meet only
  diagonally through a narrow neck. The original treats that case as a width
  error, measured either along the axes or diagonally, depending on the
  designer.
* Each pass measures separations **across** its edges: the SAX pass finds
  vertical separations between horizontal edges, and the SAY pass horizontal
  ones. Between them, the two passes cover width and spacing in both
  directions.
* Only one DRC is built, so the two passes run one after the other. A
  second DRC would let them overlap, which is a possible extension.
* Malformed input is not detected, apart from token-order errors
  (`fmt_err`). Overlapping or touching polygons give meaningless results.
* When a sort array is full, an edge or violation that does not fit is
  dropped and `sa_overflow` is set. When the skyline runs out of cells,
  `drc_overflow` is set.

## Files

| file | content |
|---|---|
| `rtl/sdrc_pkg.sv` | token, edge, violation and sort-item types; key and conversion functions |
| `rtl/sdrc_edge_former.sv` | token stream → horizontal or vertical edges |
| `rtl/sdrc_sort_array.sv` | systolic priority queue (SAX, SAY) |
| `rtl/sdrc_sa_ctrl.sv` | sort-array controller: load, send, collect, unload |
| `rtl/sdrc_drc.sv` | systolic skyline width/spacing checker |
| `rtl/sdrc_top.sv` | the whole checker and its sequencer |
| `tb/sdrc_tb_pkg.sv` | random scene generator and bitmap reference model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

The testbenches do not trust the edge-based algorithm. The reference model
(`sdrc_tb_pkg::golden`) paints the scene into a unit bitmap using a
point-in-polygon test. It then scans every column and every row for solid
runs shorter than the width rule, and empty runs between material shorter
than the spacing rule. The hardware's violations are expanded into unit
columns and compared with it one to one. The scenes are random rectangles,
rectangles with holes, eight-vertex stepped outlines, and wide bases with
two blocks standing on them, placed one per 16 x 16 tile of a 64 x 64
field. The last kind matters for the checker: a base edge is split by the
blocks' edges, so the remainder that travels with an edge is exercised.

Each testbench was also run against a copy of its block broken in one way
(hole edges not flipped, sort comparison reversed, send phase ending before
the checker is idle, split remainder dropped, pass flag inverted); every
such copy fails its testbench.

| testbench | what it checks |
|---|---|
| `tb_sdrc_edge_former` | edges from both orientations against the vertex lists, including outlines shaped like the original's examples with holes; back-pressure; `fmt_err` |
| `tb_sdrc_sort_array` | random insert/extract mix against a sorted-list model; one operation per two clocks; full and empty |
| `tb_sdrc_drc` | both passes of random scenes against the bitmap model, with back-pressure; latency `CELLS`; one edge per clock; stalls, width and spacing errors all occur |
| `tb_sdrc_sa_ctrl` | one controller with its sort array and the DRC through all phases; sorted output; overflow of a small sort array |
| `tb_sdrc_top` | the whole checker at default parameters, six scenes up to sixteen shapes, both passes, sorted output, DRC stalls, violations inserted while edges wait |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed number of clocks if the design hangs.

## Simulating

With Verilator 5, for example the full design:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sdrc_pkg.sv rtl/sdrc_edge_former.sv rtl/sdrc_sort_array.sv \
  rtl/sdrc_drc.sv rtl/sdrc_sa_ctrl.sv rtl/sdrc_top.sv \
  tb/sdrc_tb_pkg.sv tb/tb_sdrc_top.sv --top-module tb_sdrc_top
./obj_dir/Vtb_sdrc_top
```

For another block, list the package, the block and what it instantiates,
`tb/sdrc_tb_pkg.sv` and its testbench. The simulation takes well under a
second.
