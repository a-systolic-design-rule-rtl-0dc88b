// sdrc_tb_pkg: scene generator and reference model shared by the testbenches.
//
// A scene is a list of rectilinear outlines (enclosing polygons and holes),
// each a list of vertices that starts at its lowest-left vertex, goes east
// first, and keeps the enclosed region on its left. Shapes are placed one per
// TILE x TILE tile of a GRID x GRID field, so they never overlap or share an
// edge; neighbouring shapes can come as close as two units.
//
// The reference model does not use edges at all: it paints the material into
// a unit-cell bitmap (a cell is material when a ray from its centre crosses an
// odd number of vertical edges of all outlines), then scans every column
// (and, for the vertical pass, every row) for runs bounded on both sides by a
// material/empty change. A material run shorter than W is a width error, an
// empty run between two material runs shorter than S a spacing error. Each
// violation is recorded per unit column as the key
// {axis, column, c_lo, c_hi, kind}, so results of the hardware, which come as
// spans, can be compared after expanding the spans into columns.
package sdrc_tb_pkg;
  import sdrc_pkg::*;

  localparam int GRID = 64;
  localparam int TILE = 16;
  localparam int MAXV = 16;

  typedef struct {
    bit is_hole;
    int n;
    int nv;
    int vx[MAXV];
    int vy[MAXV];
  } outline_t;

  typedef longint unsigned key_t;

  function automatic key_t mk_key(bit axis, int col, int clo, int chi, bit kind);
    return {14'd0, axis, col[15:0], clo[15:0], chi[15:0], kind};
  endfunction

  function automatic int rnd(int lo, int hi);  // inclusive range
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function automatic outline_t rect(bit hole, int n, int x0, int y0, int x1, int y1);
    outline_t o;
    o.is_hole = hole;
    o.n = n;
    o.nv = 4;
    o.vx[0] = x0; o.vy[0] = y0;
    o.vx[1] = x1; o.vy[1] = y0;
    o.vx[2] = x1; o.vy[2] = y1;
    o.vx[3] = x0; o.vy[3] = y1;
    return o;
  endfunction

  // Eight-vertex outline of the kind drawn in the original design's first example:
  // a base, a step up on the right, a taller arm, and a lower left shoulder.
  function automatic outline_t step8(int n, int a, int b, int A, int B, int C, int D, int E, int F);
    outline_t o;
    o.is_hole = 0;
    o.n = n;
    o.nv = 8;
    o.vx[0] = a;       o.vy[0] = b;
    o.vx[1] = a+A;     o.vy[1] = b;
    o.vx[2] = a+A;     o.vy[2] = b+B;
    o.vx[3] = a+A+C;   o.vy[3] = b+B;
    o.vx[4] = a+A+C;   o.vy[4] = b+D;
    o.vx[5] = a+E;     o.vy[5] = b+D;
    o.vx[6] = a+E;     o.vy[6] = b+F;
    o.vx[7] = a;       o.vy[7] = b+F;
    return o;
  endfunction

  // Random scene: one shape (or a group of three rectangles) in each of the
  // first ntiles tiles.
  function automatic void gen_scene(int ntiles, ref outline_t ol[$]);
    int n = 1;
    ol.delete();
    for (int t = 0; t < ntiles; t++) begin
      int tx = (t % (GRID / TILE)) * TILE;
      int ty = (t / (GRID / TILE)) * TILE;
      int kind = rnd(0, 3);
      if (kind == 0) begin
        int x0 = tx + rnd(1, 6), y0 = ty + rnd(1, 6);
        ol.push_back(rect(0, n, x0, y0, x0 + rnd(1, 15 - (x0 - tx)), y0 + rnd(1, 15 - (y0 - ty))));
      end else if (kind == 1) begin
        int x0 = tx + rnd(1, 3), y0 = ty + rnd(1, 3);
        int x1 = x0 + rnd(5, 15 - (x0 - tx)), y1 = y0 + rnd(5, 15 - (y0 - ty));
        int hx0 = x0 + rnd(1, 3), hy0 = y0 + rnd(1, 3);
        int hx1 = hx0 + rnd(1, x1 - hx0 - 1), hy1 = hy0 + rnd(1, y1 - hy0 - 1);
        ol.push_back(rect(0, n, x0, y0, x1, y1));
        ol.push_back(rect(1, n, hx0, hy0, hx1, hy1));
      end else if (kind == 3) begin
        // A wide base with two blocks above it, both strictly inside its
        // span: the first block splits the base's top edge, and the second
        // is checked against the part to the right of the split.
        int y1  = ty + 1 + rnd(1, 5);
        int ax0 = tx + 2 + rnd(0, 2);
        int ax1 = ax0 + rnd(2, 4);
        int bx0 = ax1 + rnd(2, 3);
        int bx1 = bx0 + rnd(1, tx + 13 - bx0);
        int ay0 = y1 + rnd(1, 4), by0 = y1 + rnd(1, 4);
        ol.push_back(rect(0, n, tx + 1, ty + 1, tx + 14, y1));
        n++;
        ol.push_back(rect(0, n, ax0, ay0, ax1, ay0 + rnd(1, 15 - (ay0 - ty))));
        n++;
        ol.push_back(rect(0, n, bx0, by0, bx1, by0 + rnd(1, 15 - (by0 - ty))));
      end else begin
        int A, B, C, D, E, F;
        do begin
          A = rnd(1, 8); C = rnd(1, 5); D = rnd(2, 13);
          B = rnd(1, D - 1); F = rnd(1, D - 1); E = rnd(1, A + C - 1);
        end while (!(E < A || F > B));
        ol.push_back(step8(n, tx + rnd(1, 2), ty + rnd(1, 2), A, B, C, D, E, F));
      end
      n++;
    end
  endfunction

  // Host token stream of one outline: header, x1, y1, then alternately the
  // next x and the next y, closing with y1.
  function automatic void outline_tokens(outline_t o, ref token_t tq[$]);
    token_t t;
    t.kind = o.is_hole ? TOK_HOLE : TOK_POLY;
    t.val  = coord_t'(o.n);
    tq.push_back(t);
    t.kind = TOK_COORD;
    t.val = coord_t'(o.vx[0]); tq.push_back(t);
    t.val = coord_t'(o.vy[0]); tq.push_back(t);
    for (int i = 1; i < o.nv; i++) begin
      t.val = coord_t'((i % 2 == 1) ? o.vx[i] : o.vy[i]);
      tq.push_back(t);
    end
    t.val = coord_t'(o.vy[0]);
    tq.push_back(t);
  endfunction

  // Edges of one orientation of an outline, straight from its vertex list.
  function automatic void outline_edges(outline_t o, bit vertical, ref edge_t eq[$]);
    for (int i = 0; i < o.nv; i++) begin
      int j = (i + 1) % o.nv;
      edge_t e;
      if (!vertical && o.vy[i] == o.vy[j]) begin
        e.c      = coord_t'(o.vy[i]);
        e.lo     = coord_t'((o.vx[i] < o.vx[j]) ? o.vx[i] : o.vx[j]);
        e.hi     = coord_t'((o.vx[i] < o.vx[j]) ? o.vx[j] : o.vx[i]);
        e.mat_hi = (o.vx[j] > o.vx[i]) != o.is_hole;   // east: enclosed region above
        e.n      = polyno_t'(o.n);
        eq.push_back(e);
      end else if (vertical && o.vx[i] == o.vx[j]) begin
        e.c      = coord_t'(o.vx[i]);
        e.lo     = coord_t'((o.vy[i] < o.vy[j]) ? o.vy[i] : o.vy[j]);
        e.hi     = coord_t'((o.vy[i] < o.vy[j]) ? o.vy[j] : o.vy[i]);
        e.mat_hi = (o.vy[j] < o.vy[i]) != o.is_hole;   // south: enclosed region east
        e.n      = polyno_t'(o.n);
        eq.push_back(e);
      end
    end
  endfunction

  function automatic bit edge_less(edge_t a, edge_t b);
    return {a.c, a.lo} < {b.c, b.lo};
  endfunction

  function automatic void sort_edges(ref edge_t eq[$]);
    for (int i = 1; i < eq.size(); i++) begin
      edge_t v = eq[i];
      int j = i - 1;
      while (j >= 0 && edge_less(v, eq[j])) begin
        eq[j+1] = eq[j];
        j--;
      end
      eq[j+1] = v;
    end
  endfunction

  // Reference violations of a whole scene.
  function automatic void golden(outline_t ol[$], int W, int S, ref int exp[key_t]);
    bit bm[GRID][GRID];  // [x][y]
    exp.delete();
    foreach (bm[x, y]) begin
      int ncross = 0;
      foreach (ol[k]) begin
        for (int i = 0; i < ol[k].nv; i++) begin
          int j = (i + 1) % ol[k].nv;
          if (ol[k].vx[i] == ol[k].vx[j] && ol[k].vx[i] > x) begin
            int ylo = (ol[k].vy[i] < ol[k].vy[j]) ? ol[k].vy[i] : ol[k].vy[j];
            int yhi = (ol[k].vy[i] < ol[k].vy[j]) ? ol[k].vy[j] : ol[k].vy[i];
            if (y >= ylo && y < yhi) ncross++;
          end
        end
      end
      bm[x][y] = ncross[0];
    end
    for (int axis = 0; axis < 2; axis++) begin
      for (int col = 0; col < GRID; col++) begin
        int prev_b = -1;   // position of the previous boundary
        bit prev_m = 0;
        for (int p = 0; p <= GRID; p++) begin
          bit m = (p == GRID) ? 1'b0 : (axis == 0 ? bm[col][p] : bm[p][col]);
          if (m != prev_m) begin
            if (prev_b >= 0) begin
              int len = p - prev_b;
              if (prev_m && len < W) exp[mk_key(axis[0], col, prev_b, p, 1'b0)] = 1;
              if (!prev_m && len < S) exp[mk_key(axis[0], col, prev_b, p, 1'b1)] = 1;
            end
            prev_b = p;
            prev_m = m;
          end
        end
      end
    end
  endfunction

  // Expand one reported violation into per-column keys.
  function automatic void add_err(bit axis, err_t r, ref int got[key_t]);
    for (int col = int'(r.lo); col < int'(r.hi); col++) begin
      key_t k = mk_key(axis, col, int'(r.c_lo), int'(r.c_hi), r.kind);
      if (got.exists(k)) got[k]++;
      else               got[k] = 1;
    end
  endfunction

endpackage
