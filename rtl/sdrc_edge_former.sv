// sdrc_edge_former: turns the compact polygon description into explicit
// edges of one orientation.
//
// The host sends, per outline, a header token (TOK_POLY or TOK_HOLE carrying
// the polygon number) and then the coordinates x1, y1, x2, y3, x4, ... : after
// the first vertex every coordinate changes only one of the two, so an x token
// closes a horizontal edge and a y token closes a vertical edge. The outline
// ends with the y token that brings the walk back to (x1, y1). This follows
// the representation the original design defines; the framing of "p, n" as a single
// header token is this design's choice.
//
// Each outline is walked with its enclosed region on the left. For an
// enclosing polygon that region is material; for a hole it is empty, so the
// material side is flipped. The emitted edge carries the flag mat_hi:
//   horizontal, walked east (x grows) : material above  -> mat_hi = 1 ^ hole
//   vertical,   walked north (y grows): material to west -> mat_hi = 0 ^ hole
// VERTICAL = 0 gives the horizontal edges (SAX side), VERTICAL = 1 the
// vertical ones (SAY side): the original design gives each sort array a controller
// that forms its own edges from the same description.
//
// Interface: valid/ready token input and valid/ready edge output, one
// register stage. A token is taken in the cycle tok_valid && tok_ready; its
// edge (if it forms one of this orientation) is presented the next cycle.
// fmt_err is a sticky flag for a coordinate arriving where a header is due or
// a header arriving inside an open outline.
module sdrc_edge_former
  import sdrc_pkg::*;
#(
  parameter bit VERTICAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tok_valid,
  output logic   tok_ready,
  input  token_t tok,
  output logic   edge_valid,
  input  logic   edge_ready,
  output edge_t  edge_o,
  output logic   busy,      // inside an outline
  output logic   fmt_err
);

  typedef enum logic [2:0] {
    S_HDR, S_X1, S_Y1, S_X, S_Y
  } state_e;

  state_e  state;
  polyno_t n_q;
  logic    hole_q;
  coord_t  x1_q, y1_q, xc_q, yc_q;
  logic    take;

  assign tok_ready = !edge_valid || edge_ready;
  assign take      = tok_valid && tok_ready;
  assign busy      = (state != S_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_HDR;
      n_q        <= '0;
      hole_q     <= 1'b0;
      x1_q       <= '0;
      y1_q       <= '0;
      xc_q       <= '0;
      yc_q       <= '0;
      edge_valid <= 1'b0;
      edge_o     <= '0;
      fmt_err    <= 1'b0;
    end else begin
      if (edge_valid && edge_ready) edge_valid <= 1'b0;
      if (take) begin
        if (tok.kind != TOK_COORD) begin
          if (state != S_HDR) fmt_err <= 1'b1;
          n_q    <= polyno_t'(tok.val);
          hole_q <= (tok.kind == TOK_HOLE);
          state  <= S_X1;
        end else begin
          unique case (state)
            S_HDR: fmt_err <= 1'b1;
            S_X1: begin
              x1_q  <= tok.val;
              xc_q  <= tok.val;
              state <= S_Y1;
            end
            S_Y1: begin
              y1_q  <= tok.val;
              yc_q  <= tok.val;
              state <= S_X;
            end
            S_X: begin
              if (!VERTICAL && tok.val != xc_q) begin
                edge_valid    <= 1'b1;
                edge_o.c      <= yc_q;
                edge_o.lo     <= (tok.val > xc_q) ? xc_q : tok.val;
                edge_o.hi     <= (tok.val > xc_q) ? tok.val : xc_q;
                edge_o.mat_hi <= (tok.val > xc_q) ^ hole_q;
                edge_o.n      <= n_q;
              end
              xc_q  <= tok.val;
              state <= S_Y;
            end
            S_Y: begin
              if (VERTICAL && tok.val != yc_q) begin
                edge_valid    <= 1'b1;
                edge_o.c      <= xc_q;
                edge_o.lo     <= (tok.val > yc_q) ? yc_q : tok.val;
                edge_o.hi     <= (tok.val > yc_q) ? tok.val : yc_q;
                edge_o.mat_hi <= !(tok.val > yc_q) ^ hole_q;
                edge_o.n      <= n_q;
              end
              yc_q  <= tok.val;
              state <= (tok.val == y1_q && xc_q == x1_q) ? S_HDR : S_X;
            end
            default: state <= S_HDR;
          endcase
        end
      end
    end
  end

endmodule
