// sdrc_pkg: types and constants shared by the systolic design-rule checker.
//
// The checker works on rectilinear polygons sent in a compact form: a header
// token (an enclosing polygon "p" or a hole "h", carrying the polygon number n)
// followed by the coordinates of the vertices, x1, y1, then alternately an x
// and a y coordinate until the outline returns to (x1, y1). Holes carry the
// number of the polygon that encloses them. Every edge is traversed with the
// region it encloses on its left; for a hole that region is empty.
//
// An explicit edge is stored with its fixed coordinate (y for a horizontal
// edge, x for a vertical one), its span [lo, hi], the polygon number, and a
// flag telling whether the material lies on the high-coordinate side of the
// edge (above a horizontal edge, east of a vertical one).
//
// The sort arrays keep edges and, later, errors in one item type. Its sort key
// is {is_err, c, lo}: errors sort after every edge, so errors can be inserted
// into a sort array while its edges are still being drained in order.
//
// Coordinate and polygon-number widths are this design's choice; the original design
// gives no word sizes.
package sdrc_pkg;

  parameter int unsigned CW = 16;  // coordinate width
  parameter int unsigned NW = 8;   // polygon-number width

  typedef logic [CW-1:0] coord_t;
  typedef logic [NW-1:0] polyno_t;

  // Token from the host: header of an outline or one coordinate.
  typedef enum logic [1:0] {
    TOK_POLY  = 2'd0,  // "p, n": start of an enclosing polygon, val = n
    TOK_HOLE  = 2'd1,  // "h, n": start of a hole, val = n
    TOK_COORD = 2'd2   // one vertex coordinate
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e kind;
    coord_t    val;
  } token_t;

  // Explicit edge.
  typedef struct packed {
    coord_t  c;       // fixed coordinate
    coord_t  lo;      // span start (smaller coordinate)
    coord_t  hi;      // span end
    logic    mat_hi;  // material lies on the high-coordinate side
    polyno_t n;       // polygon number
  } edge_t;

  typedef enum logic {
    ERR_WIDTH   = 1'b0,
    ERR_SPACING = 1'b1
  } err_kind_e;

  // Violation between two facing edges: c_lo < c_hi, over the common span
  // [lo, hi].
  typedef struct packed {
    err_kind_e kind;
    coord_t    c_lo;
    coord_t    c_hi;
    coord_t    lo;
    coord_t    hi;
    polyno_t   n_lo;
    polyno_t   n_hi;
  } err_t;

  // Item held by a sort array. For an edge: c, lo, hi, flag = mat_hi, n.
  // For an error: c = c_lo, c2 = c_hi, lo, hi, flag = kind, n = n_lo, n2 = n_hi.
  typedef struct packed {
    logic    is_err;
    coord_t  c;
    coord_t  lo;
    coord_t  hi;
    coord_t  c2;
    logic    flag;
    polyno_t n;
    polyno_t n2;
  } sa_item_t;

  localparam int unsigned KEYW = 1 + 2 * CW;
  typedef logic [KEYW-1:0] sa_key_t;

  function automatic sa_key_t sa_key(sa_item_t it);
    return {it.is_err, it.c, it.lo};
  endfunction

  function automatic sa_item_t edge_to_item(edge_t e);
    sa_item_t it;
    it.is_err = 1'b0;
    it.c      = e.c;
    it.lo     = e.lo;
    it.hi     = e.hi;
    it.c2     = '0;
    it.flag   = e.mat_hi;
    it.n      = e.n;
    it.n2     = '0;
    return it;
  endfunction

  function automatic edge_t item_to_edge(sa_item_t it);
    edge_t e;
    e.c      = it.c;
    e.lo     = it.lo;
    e.hi     = it.hi;
    e.mat_hi = it.flag;
    e.n      = it.n;
    return e;
  endfunction

  function automatic sa_item_t err_to_item(err_t r);
    sa_item_t it;
    it.is_err = 1'b1;
    it.c      = r.c_lo;
    it.lo     = r.lo;
    it.hi     = r.hi;
    it.c2     = r.c_hi;
    it.flag   = r.kind;
    it.n      = r.n_lo;
    it.n2     = r.n_hi;
    return it;
  endfunction

  function automatic err_t item_to_err(sa_item_t it);
    err_t r;
    r.kind = err_kind_e'(it.flag);
    r.c_lo = it.c;
    r.c_hi = it.c2;
    r.lo   = it.lo;
    r.hi   = it.hi;
    r.n_lo = it.n;
    r.n_hi = it.n2;
    return r;
  endfunction

endpackage
