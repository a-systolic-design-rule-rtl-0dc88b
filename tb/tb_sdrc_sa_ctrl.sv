// tb_sdrc_sa_ctrl: self-checking testbench of one sort-array controller.
//
// The controller under test is the vertical-edge one (the SAY side). It is
// connected to a sort array and a checker, as in the full design, and taken
// through its phases by the testbench: LOAD (tokens of a random scene),
// send_start -> send_done (edges to the checker, errors back into the sort
// array), unload_start -> unload_done (errors to the host). The errors handed
// to the host must match the bitmap reference model for vertical edges and
// come in sort order. The sort array is made small (DEPTH 48) so that a final,
// large scene overflows it: the controller must then raise overflow.
module tb_sdrc_sa_ctrl;
  import sdrc_pkg::*;
  import sdrc_tb_pkg::*;

  localparam int DEPTH = 48;
  localparam int W = 4, S = 4;

  logic clk = 0, rst_n = 0;
  logic tok_valid = 0, tok_ready;
  token_t tok = '0;
  logic sa_op_ready, sa_ins_valid, sa_ext_valid, sa_head_valid, sa_full, sa_empty;
  sa_item_t sa_ins_item, sa_head_item;
  logic drc_edge_valid, drc_edge_ready, drc_err_valid, drc_err_ready, drc_idle, drc_ovf;
  edge_t drc_edge;
  err_t drc_err;
  logic drc_clear = 0;
  logic send_start = 0, send_done, unload_start = 0, unload_done;
  logic host_err_valid, host_err_ready = 1;
  err_t host_err;
  logic loading, overflow, fmt_err;

  int checks = 0, failures = 0;
  int got[key_t];
  bit have_prev;
  logic [2*CW-1:0] prev_key;

  always #5 clk = ~clk;

  sdrc_sa_ctrl #(.VERTICAL(1'b1)) dut (.*);

  sdrc_sort_array #(.DEPTH(DEPTH)) u_sa (
    .clk(clk), .rst_n(rst_n), .op_ready(sa_op_ready), .ins_valid(sa_ins_valid),
    .ins_item(sa_ins_item), .ext_valid(sa_ext_valid), .head_valid(sa_head_valid),
    .head_item(sa_head_item), .full(sa_full), .empty(sa_empty), .count());

  sdrc_drc #(.CELLS(64), .W_MIN(W), .S_MIN(S)) u_drc (
    .clk(clk), .rst_n(rst_n), .clear(drc_clear), .edge_valid(drc_edge_valid),
    .edge_ready(drc_edge_ready), .edge_i(drc_edge), .err_valid(drc_err_valid),
    .err_ready(drc_err_ready), .err_o(drc_err), .idle(drc_idle), .overflow(drc_ovf));

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (host_err_valid && host_err_ready) begin
      logic [2*CW-1:0] k;
      add_err(1'b1, host_err, got);
      k = {host_err.c_lo, host_err.lo};
      checks++;
      if (have_prev && k < prev_key) begin
        failures++;
        $display("FAIL: error out of order");
      end
      have_prev <= 1'b1;
      prev_key  <= k;
    end
    host_err_ready <= ($urandom % 4) != 0;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic run_scene(outline_t ol[$], bit expect_ovf, int sc);
    token_t tq[$];
    int exp_all[key_t], exp[key_t];
    bit ok;
    golden(ol, W, S, exp_all);
    foreach (exp_all[k]) if (k[49]) exp[k] = 1;
    foreach (ol[k]) outline_tokens(ol[k], tq);
    got.delete();
    have_prev = 0;
    drc_clear = 1;
    tick();
    drc_clear = 0;
    foreach (tq[i]) begin
      tok_valid = 1;
      tok       = tq[i];
      do begin
        #1 ok = tok_ready;
        tick();
      end while (!ok);
    end
    tok_valid = 0;
    while (loading) tick();
    send_start = 1;
    tick();
    send_start = 0;
    while (!send_done) tick();
    check(sa_head_valid ? sa_head_item.is_err : 1'b1, "edges left after send_done");
    check(overflow == expect_ovf, $sformatf("scene %0d: overflow %b", sc, overflow));
    unload_start = 1;
    tick();
    unload_start = 0;
    while (!unload_done) tick();
    check(sa_empty, "sort array not empty after unload");
    if (!expect_ovf) begin
      foreach (exp[k])
        check(got.exists(k) && got[k] == 1,
              $sformatf("scene %0d: expected violation %h reported %0d times", sc, k,
                        got.exists(k) ? got[k] : 0));
      foreach (got[k])
        if (!exp.exists(k)) check(0, $sformatf("scene %0d: unexpected violation %h", sc, k));
    end
  endtask

  initial begin
    outline_t ol[$];
    repeat (3) tick();
    rst_n = 1;
    tick();
    // Scenes of up to five shapes fit the small sort array.
    for (int sc = 0; sc < 4; sc++) begin
      gen_scene(rnd(1, 5), ol);
      run_scene(ol, 1'b0, sc);
    end
    gen_scene(16, ol);
    run_scene(ol, 1'b1, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
