// sdrc_top: systolic design-rule checker (SDRC) for rectilinear polygons.
//
// Two sort arrays, SAX for horizontal edges and SAY for vertical ones, each
// with its own controller, share one systolic checker (DRC). One check runs:
//   1. LOAD : the host streams polygon descriptions (tokens); both
//             controllers see every token and form their own edges, which
//             their sort arrays keep in lexical order.
//   2. go   : once the host has sent everything it pulses go.
//   3. SAX pass: SAX's edges go through the DRC in order; width errors and
//             spacing errors across y (between horizontal edges) return to SAX.
//   4. the DRC's skyline is cleared.
//   5. SAY pass: the same for the vertical edges (separations across x);
//             errors return to SAY.
//   6. SAX's errors, then SAY's, are handed to the host in sorted order,
//             err_axis telling which pass found them; done pulses at the end.
// This organisation (two sort arrays, their controllers, one DRC, the SAX
// pass before the SAY pass, errors collected in the sort arrays and then sent
// to the host) is the original design's block diagram. The sequencer, the host port
// (valid/ready token stream, go/done, valid/ready error stream) and all sizes
// are this design's choices.
//
// Errors are reported with the coordinates of the two facing edges (c_lo,
// c_hi), the common span [lo, hi] and both polygon numbers. For err_axis = 0
// c_lo/c_hi are y values and lo/hi x values; for err_axis = 1 the other way.
// Status flags (valid from done until the next go): sa_overflow (a sort array
// was full and dropped an edge or error), drc_overflow (the DRC skyline ran
// out of cells), fmt_err (malformed token stream).
module sdrc_top
  import sdrc_pkg::*;
#(
  parameter int unsigned SA_DEPTH  = 128,
  parameter int unsigned DRC_CELLS = 64,
  parameter int unsigned W_MIN     = 4,
  parameter int unsigned S_MIN     = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tok_valid,
  output logic   tok_ready,
  input  token_t tok,
  input  logic   go,
  output logic   busy,
  output logic   done,
  output logic   err_valid,
  input  logic   err_ready,
  output err_t   err_o,
  output logic   err_axis,
  output logic   sa_overflow,
  output logic   drc_overflow,
  output logic   fmt_err
);

  typedef enum logic [2:0] {
    T_LOAD, T_GO, T_XSEND, T_CLEAR, T_YSEND, T_XUNLOAD, T_YUNLOAD
  } tstate_e;
  tstate_e state;

  // ---------------- controllers and sort arrays ----------------
  logic     c_tok_valid [2], c_tok_ready [2];
  logic     sa_op_ready [2], sa_ins_valid[2], sa_ext_valid[2];
  sa_item_t sa_ins_item [2], sa_head_item[2];
  logic     sa_head_valid[2], sa_full[2], sa_empty[2];
  logic     c_edge_valid[2], c_edge_ready[2];
  edge_t    c_edge      [2];
  logic     c_err_valid [2], c_err_ready [2];
  logic     c_send_start[2], c_send_done [2];
  logic     c_unl_start [2], c_unl_done  [2];
  logic     c_herr_valid[2], c_herr_ready[2];
  err_t     c_herr      [2];
  logic     c_loading   [2], c_ovf[2], c_fmt[2];

  // DRC side
  logic  d_edge_valid, d_edge_ready, d_err_valid, d_err_ready, d_idle, d_clear, d_ovf;
  edge_t d_edge;
  err_t  d_err;
  logic  sel;  // 0: SAX owns the DRC, 1: SAY

  // Broadcast of host tokens to both controllers.
  assign tok_ready      = c_tok_ready[0] && c_tok_ready[1];
  assign c_tok_valid[0] = tok_valid && c_tok_ready[1];
  assign c_tok_valid[1] = tok_valid && c_tok_ready[0];

  for (genvar s = 0; s < 2; s++) begin : g_side
    sdrc_sa_ctrl #(.VERTICAL(s == 1)) u_ctrl (
      .clk            (clk),
      .rst_n          (rst_n),
      .tok_valid      (c_tok_valid[s]),
      .tok_ready      (c_tok_ready[s]),
      .tok            (tok),
      .sa_op_ready    (sa_op_ready[s]),
      .sa_ins_valid   (sa_ins_valid[s]),
      .sa_ins_item    (sa_ins_item[s]),
      .sa_ext_valid   (sa_ext_valid[s]),
      .sa_head_valid  (sa_head_valid[s]),
      .sa_head_item   (sa_head_item[s]),
      .sa_full        (sa_full[s]),
      .sa_empty       (sa_empty[s]),
      .drc_edge_valid (c_edge_valid[s]),
      .drc_edge_ready (c_edge_ready[s]),
      .drc_edge       (c_edge[s]),
      .drc_err_valid  (c_err_valid[s]),
      .drc_err_ready  (c_err_ready[s]),
      .drc_err        (d_err),
      .drc_idle       (d_idle),
      .send_start     (c_send_start[s]),
      .send_done      (c_send_done[s]),
      .unload_start   (c_unl_start[s]),
      .unload_done    (c_unl_done[s]),
      .host_err_valid (c_herr_valid[s]),
      .host_err_ready (c_herr_ready[s]),
      .host_err       (c_herr[s]),
      .loading        (c_loading[s]),
      .overflow       (c_ovf[s]),
      .fmt_err        (c_fmt[s])
    );

    sdrc_sort_array #(.DEPTH(SA_DEPTH)) u_sa (
      .clk        (clk),
      .rst_n      (rst_n),
      .op_ready   (sa_op_ready[s]),
      .ins_valid  (sa_ins_valid[s]),
      .ins_item   (sa_ins_item[s]),
      .ext_valid  (sa_ext_valid[s]),
      .head_valid (sa_head_valid[s]),
      .head_item  (sa_head_item[s]),
      .full       (sa_full[s]),
      .empty      (sa_empty[s]),
      .count      ()
    );

    assign c_edge_ready[s] = d_edge_ready && (sel == s);
    assign c_err_valid[s]  = d_err_valid && (sel == s);
    assign c_herr_ready[s] = err_ready && ((s == 0) ? (state == T_XUNLOAD) : (state == T_YUNLOAD));
  end

  sdrc_drc #(.CELLS(DRC_CELLS), .W_MIN(W_MIN), .S_MIN(S_MIN)) u_drc (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (d_clear),
    .edge_valid (d_edge_valid),
    .edge_ready (d_edge_ready),
    .edge_i     (d_edge),
    .err_valid  (d_err_valid),
    .err_ready  (d_err_ready),
    .err_o      (d_err),
    .idle       (d_idle),
    .overflow   (d_ovf)
  );

  assign d_edge_valid = sel ? c_edge_valid[1] : c_edge_valid[0];
  assign d_edge       = sel ? c_edge[1] : c_edge[0];
  assign d_err_ready  = sel ? c_err_ready[1] : c_err_ready[0];
  assign d_clear      = (state == T_CLEAR) || (state == T_GO);

  // ---------------- errors to the host ----------------
  assign err_axis  = (state == T_YUNLOAD);
  assign err_valid = (state == T_XUNLOAD) ? c_herr_valid[0] :
                     (state == T_YUNLOAD) ? c_herr_valid[1] : 1'b0;
  assign err_o     = err_axis ? c_herr[1] : c_herr[0];

  // ---------------- sequencer ----------------
  assign busy = (state != T_LOAD);

  always_comb begin
    c_send_start[0] = 1'b0;
    c_send_start[1] = 1'b0;
    c_unl_start[0]  = 1'b0;
    c_unl_start[1]  = 1'b0;
    unique case (state)
      T_GO:    c_send_start[0] = !c_loading[0] && !c_loading[1];
      T_CLEAR: c_send_start[1] = 1'b1;
      default: ;
    endcase
    if (state == T_YSEND && c_send_done[1]) c_unl_start[0] = 1'b1;
    if (state == T_XUNLOAD && c_unl_done[0]) c_unl_start[1] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= T_LOAD;
      sel          <= 1'b0;
      done         <= 1'b0;
      sa_overflow  <= 1'b0;
      drc_overflow <= 1'b0;
      fmt_err      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_LOAD:    if (go) begin
                     state        <= T_GO;
                     sa_overflow  <= 1'b0;
                     drc_overflow <= 1'b0;
                     fmt_err      <= 1'b0;
                   end
        T_GO:      if (c_send_start[0]) begin
                     state <= T_XSEND;
                     sel   <= 1'b0;
                   end
        T_XSEND:   if (c_send_done[0]) begin
                     state        <= T_CLEAR;
                     drc_overflow <= d_ovf;
                   end
        T_CLEAR:   begin
                     state <= T_YSEND;
                     sel   <= 1'b1;
                   end
        T_YSEND:   if (c_send_done[1]) begin
                     state        <= T_XUNLOAD;
                     drc_overflow <= drc_overflow || d_ovf;
                     sa_overflow  <= c_ovf[0] || c_ovf[1];
                     fmt_err      <= c_fmt[0] || c_fmt[1];
                   end
        T_XUNLOAD: if (c_unl_done[0]) state <= T_YUNLOAD;
        T_YUNLOAD: if (c_unl_done[1]) begin
                     state <= T_LOAD;
                     done  <= 1'b1;
                   end
        default:   state <= T_LOAD;
      endcase
    end
  end

endmodule
