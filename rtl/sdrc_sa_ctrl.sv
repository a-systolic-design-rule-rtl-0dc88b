// sdrc_sa_ctrl: controller of one sort array (SAX or SAY).
//
// The controller runs its sort array through the phases the original design gives it:
//   LOAD   : polygon tokens from the host pass through an edge former that
//            makes this side's edges (horizontal for SAX, vertical for SAY),
//            and each edge is inserted into the sort array.
//   SEND   : after send_start the edges are popped in lexical order and sent
//            to the DRC; errors coming back from the DRC are inserted into
//            the same sort array. Errors sort after all edges, so popping
//            stops by itself when the head is an error. The phase ends when
//            no edge is left, the DRC is idle and no error is pending; then
//            send_done is raised for one clock.
//   UNLOAD : after unload_start the errors, now in sorted order, are handed
//            to the host one by one; unload_done pulses when the array is
//            empty and the controller returns to LOAD.
// An error pending from the DRC takes the sort array before an edge pop.
//
// The original design states what the controllers do (form edges, feed the sort
// arrays, move edges to the DRC and errors back); the phase handshake with
// the top-level sequencer and the overflow handling are this design's. When
// the sort array is full an arriving edge or error is dropped and the sticky
// flag overflow is set, so the host knows the result is incomplete.
//
// Timing: the sort array takes one operation every second clock, so loading
// and sending proceed at one edge per two clocks at best.
module sdrc_sa_ctrl
  import sdrc_pkg::*;
#(
  parameter bit VERTICAL = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  // host tokens (LOAD)
  input  logic     tok_valid,
  output logic     tok_ready,
  input  token_t   tok,
  // sort array
  input  logic     sa_op_ready,
  output logic     sa_ins_valid,
  output sa_item_t sa_ins_item,
  output logic     sa_ext_valid,
  input  logic     sa_head_valid,
  input  sa_item_t sa_head_item,
  input  logic     sa_full,
  input  logic     sa_empty,
  // DRC
  output logic     drc_edge_valid,
  input  logic     drc_edge_ready,
  output edge_t    drc_edge,
  input  logic     drc_err_valid,
  output logic     drc_err_ready,
  input  err_t     drc_err,
  input  logic     drc_idle,
  // sequencing
  input  logic     send_start,
  output logic     send_done,
  input  logic     unload_start,
  output logic     unload_done,
  // errors to the host (UNLOAD)
  output logic     host_err_valid,
  input  logic     host_err_ready,
  output err_t     host_err,
  // status
  output logic     loading,     // in LOAD with an outline open or an edge pending
  output logic     overflow,
  output logic     fmt_err
);

  typedef enum logic [1:0] {P_LOAD, P_SEND, P_SENT, P_UNLOAD} phase_e;
  phase_e phase;

  logic  fe_tok_valid, fe_tok_ready;
  logic  fe_edge_valid, fe_edge_ready;
  edge_t fe_edge;
  logic  fe_busy;

  assign fe_tok_valid = tok_valid && (phase == P_LOAD);
  assign tok_ready    = fe_tok_ready && (phase == P_LOAD);

  sdrc_edge_former #(.VERTICAL(VERTICAL)) u_former (
    .clk       (clk),
    .rst_n     (rst_n),
    .tok_valid (fe_tok_valid),
    .tok_ready (fe_tok_ready),
    .tok       (tok),
    .edge_valid(fe_edge_valid),
    .edge_ready(fe_edge_ready),
    .edge_o    (fe_edge),
    .busy      (fe_busy),
    .fmt_err   (fmt_err)
  );

  assign loading = fe_busy || fe_edge_valid;

  logic head_is_edge, out_free, do_err_ins, do_err_drop, do_send, do_unload;

  assign head_is_edge = sa_head_valid && !sa_head_item.is_err;
  assign out_free     = !drc_edge_valid || drc_edge_ready;

  // LOAD: edges into the sort array.
  assign fe_edge_ready = (phase == P_LOAD) && sa_op_ready;

  // SEND: errors back in, edges out.
  assign do_err_ins  = (phase == P_SEND) && sa_op_ready && drc_err_valid && !sa_full;
  assign do_err_drop = (phase == P_SEND) && drc_err_valid && sa_full && !head_is_edge;
  assign do_send     = (phase == P_SEND) && sa_op_ready && !drc_err_valid &&
                       head_is_edge && out_free;
  assign drc_err_ready = do_err_ins || do_err_drop;

  // UNLOAD: errors to the host.
  assign host_err_valid = (phase == P_UNLOAD) && sa_head_valid && sa_op_ready;
  assign host_err       = item_to_err(sa_head_item);
  assign do_unload      = host_err_valid && host_err_ready;

  always_comb begin
    sa_ins_valid = 1'b0;
    sa_ins_item  = edge_to_item(fe_edge);
    if (fe_edge_valid && fe_edge_ready) begin
      sa_ins_valid = 1'b1;
    end else if (do_err_ins) begin
      sa_ins_valid = 1'b1;
      sa_ins_item  = err_to_item(drc_err);
    end
  end
  assign sa_ext_valid = do_send || do_unload;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= P_LOAD;
      drc_edge_valid <= 1'b0;
      drc_edge       <= '0;
      send_done      <= 1'b0;
      unload_done    <= 1'b0;
      overflow       <= 1'b0;
    end else begin
      send_done   <= 1'b0;
      unload_done <= 1'b0;
      if (drc_edge_valid && drc_edge_ready) drc_edge_valid <= 1'b0;
      if (do_send) begin
        drc_edge_valid <= 1'b1;
        drc_edge       <= item_to_edge(sa_head_item);
      end
      if ((fe_edge_valid && fe_edge_ready && sa_full) || do_err_drop)
        overflow <= 1'b1;
      unique case (phase)
        P_LOAD:   if (send_start) phase <= P_SEND;
        P_SEND:   if (!head_is_edge && !drc_edge_valid && !drc_err_valid && drc_idle &&
                      sa_op_ready) begin
                    phase     <= P_SENT;
                    send_done <= 1'b1;
                  end
        P_SENT:   if (unload_start) phase <= P_UNLOAD;
        P_UNLOAD: if (sa_empty && sa_op_ready) begin
                    phase       <= P_LOAD;
                    unload_done <= 1'b1;
                    overflow    <= 1'b0;
                  end
        default:  phase <= P_LOAD;
      endcase
    end
  end

  a_send_from_load: assert property (@(posedge clk) disable iff (!rst_n)
    send_start |-> phase == P_LOAD && !loading)
    else $error("sdrc_sa_ctrl: send_start while loading is unfinished");

endmodule
