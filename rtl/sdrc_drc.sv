// sdrc_drc: systolic width and spacing checker for one family of parallel
// edges (all horizontal, or all vertical with x and y exchanged).
//
// Edges arrive in lexical order: by their fixed coordinate c, then by lo.
// The array of CELLS cells holds the "skyline": for every position along the
// edges' direction, the last edge seen so far (the nearest one below the edges
// still to come). Its pieces are disjoint intervals, one per cell. Each new
// edge e travels through all cells, one cell per clock, and in every cell
// whose piece s overlaps it (a common span of positive length):
//   - checks the gap g = e.c - s.c, measured perpendicular to the edges. The
//     region between s and e is crossed by no other edge, so it is material
//     when s has material on its high side and e on its low side (a width
//     check, error when g < W_MIN), and empty when s has material on its low
//     side and e on its high side (a spacing check, error when g < S_MIN);
//   - cuts the covered part out of s: s shrinks, disappears, or, when e lies
//     strictly inside it, splits, its right part travelling on with e as a
//     remainder.
// A new edge, and a remainder, are written into the first free cell they
// pass. Every cell sees the edges in arrival order, and an edge only changes
// the cell it is in, so a new edge may enter every clock.
//
// Errors leave through a chain of registers that runs beside the cells. A
// cell with an error puts it into the chain where the slot arriving from
// upstream is empty; if it is not, the whole array holds for a clock (edge
// input not ready) while the chain keeps moving. Errors therefore leave in no
// particular order; the sort array they are returned to orders them.
//
// What the checker does (width violations and spacing violations between
// edges, reported back to the sort array) is the original design's. The skyline
// algorithm, the cell structure, the error chain, the separate spacing rule
// S_MIN and the values of W_MIN, S_MIN and CELLS are this design's choices.
// Only facing edges with overlapping spans are checked; corner-to-corner
// proximity of edges whose spans do not overlap is not reported.
//
// Interface: edge_valid/edge_ready input, err_valid/err_ready output. clear
// (used between passes, while idle) empties the skyline and overflow.
// overflow is sticky: an edge or remainder found no free cell, so the skyline
// was incomplete and later checks may be missed. Latency of an edge through
// the array: CELLS clocks; of an error to the output: at most CELLS clocks
// after detection when the output is ready.
module sdrc_drc
  import sdrc_pkg::*;
#(
  parameter int unsigned CELLS = 64,
  parameter int unsigned W_MIN = 4,
  parameter int unsigned S_MIN = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  edge_valid,
  output logic  edge_ready,
  input  edge_t edge_i,
  output logic  err_valid,
  input  logic  err_ready,
  output err_t  err_o,
  output logic  idle,
  output logic  overflow
);

  typedef struct packed {
    logic  valid;
    logic  stored;     // the edge has been written into a cell
    logic  rem_valid;  // a remainder of a split piece still travels
    edge_t e;
    edge_t rem;
  } carry_t;

  typedef struct packed {
    logic valid;
    err_t err;
  } eslot_t;

  // Skyline pieces and their valid bits.
  edge_t  sky_q  [CELLS];
  logic   skyv_q [CELLS];
  // car_q[i]: edge arriving at cell i+1 (output register of cell i).
  carry_t car_q  [CELLS];
  eslot_t esl_q  [CELLS];

  carry_t car_in [CELLS];
  carry_t car_out[CELLS];
  edge_t  sky_nx [CELLS];
  logic   skyv_nx[CELLS];
  logic   det    [CELLS];
  err_t   det_err[CELLS];
  logic   can_emit[CELLS];

  logic adv, chain_adv;

  assign chain_adv  = !esl_q[CELLS-1].valid || err_ready;
  assign err_valid  = esl_q[CELLS-1].valid;
  assign err_o      = esl_q[CELLS-1].err;
  assign edge_ready = adv;

  // Per-cell combinational work.
  always_comb begin
    for (int i = 0; i < CELLS; i++) begin
      logic ov, left, right, freed;
      logic [CW:0] gap;
      edge_t s, e;

      if (i == 0) begin
        car_in[i]           = '0;
        car_in[i].valid     = edge_valid;
        car_in[i].e         = edge_i;
      end else begin
        car_in[i] = car_q[i-1];
      end

      s     = sky_q[i];
      e     = car_in[i].e;
      ov    = car_in[i].valid && skyv_q[i] && (e.lo < s.hi) && (s.lo < e.hi);
      left  = s.lo < e.lo;
      right = e.hi < s.hi;
      gap   = {1'b0, e.c} - {1'b0, s.c};

      det[i] = ov && ((s.mat_hi && !e.mat_hi && gap < (CW+1)'(W_MIN)) ||
                      (!s.mat_hi && e.mat_hi && gap < (CW+1)'(S_MIN)));
      det_err[i].kind = s.mat_hi ? ERR_WIDTH : ERR_SPACING;
      det_err[i].c_lo = s.c;
      det_err[i].c_hi = e.c;
      det_err[i].lo   = left ? e.lo : s.lo;
      det_err[i].hi   = right ? e.hi : s.hi;
      det_err[i].n_lo = s.n;
      det_err[i].n_hi = e.n;

      car_out[i] = car_in[i];
      sky_nx[i]  = s;
      skyv_nx[i] = skyv_q[i];
      freed      = 1'b0;
      if (ov) begin
        if (left && right) begin
          sky_nx[i].hi          = e.lo;
          car_out[i].rem_valid  = 1'b1;
          car_out[i].rem        = s;
          car_out[i].rem.lo     = e.hi;
        end else if (left) begin
          sky_nx[i].hi = e.lo;
        end else if (right) begin
          sky_nx[i].lo = e.hi;
        end else begin
          freed = 1'b1;
        end
      end
      if (car_in[i].valid && (!skyv_q[i] || freed)) begin
        if (!car_in[i].stored) begin
          sky_nx[i]         = e;
          skyv_nx[i]        = 1'b1;
          car_out[i].stored = 1'b1;
        end else if (car_in[i].rem_valid) begin
          sky_nx[i]            = car_in[i].rem;
          skyv_nx[i]           = 1'b1;
          car_out[i].rem_valid = 1'b0;
        end else begin
          skyv_nx[i] = 1'b0;
        end
      end

      if (i == 0) can_emit[i] = chain_adv;
      else        can_emit[i] = chain_adv && !esl_q[i-1].valid;
    end
  end

  always_comb begin
    adv = 1'b1;
    for (int i = 0; i < CELLS; i++)
      if (det[i] && !can_emit[i]) adv = 1'b0;
  end

  always_comb begin
    idle = 1'b1;
    for (int i = 0; i < CELLS; i++)
      if (car_q[i].valid || esl_q[i].valid) idle = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CELLS; i++) begin
        sky_q[i]  <= '0;
        skyv_q[i] <= 1'b0;
        car_q[i]  <= '0;
        esl_q[i]  <= '0;
      end
      overflow <= 1'b0;
    end else begin
      if (clear) begin
        for (int i = 0; i < CELLS; i++) skyv_q[i] <= 1'b0;
        overflow <= 1'b0;
      end else if (adv) begin
        for (int i = 0; i < CELLS; i++) begin
          sky_q[i]  <= sky_nx[i];
          skyv_q[i] <= skyv_nx[i];
          car_q[i]  <= car_out[i];
        end
        if (car_out[CELLS-1].valid &&
            (!car_out[CELLS-1].stored || car_out[CELLS-1].rem_valid))
          overflow <= 1'b1;
      end
      if (chain_adv) begin
        for (int i = 0; i < CELLS; i++) begin
          if (i > 0 && esl_q[i-1].valid) esl_q[i] <= esl_q[i-1];
          else if (adv && det[i])        esl_q[i] <= '{valid: 1'b1, err: det_err[i]};
          else                           esl_q[i] <= '0;
        end
      end
    end
  end

  a_clear_idle: assert property (@(posedge clk) disable iff (!rst_n)
    clear |-> idle && !edge_valid)
    else $error("sdrc_drc: clear while edges are in flight");

endmodule
