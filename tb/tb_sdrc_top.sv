// tb_sdrc_top: end-to-end testbench of the whole checker at its default
// parameters.
//
// For each random scene the testbench streams the polygon tokens to the host
// port, pulses go, and collects every error the checker hands back until
// done. Errors are compared, after expanding their spans into unit columns,
// with the bitmap reference model for both passes (err_axis 0: between
// horizontal edges, 1: between vertical edges); each expected column must be
// reported exactly once and nothing else. Within each pass the errors must
// arrive in sort order {c_lo, lo}. The error port is randomly held not-ready.
//
// Mechanisms counted (a failure is counted for any that never happens):
//   - both passes report width and spacing errors;
//   - the DRC holds its array because the error chain is busy (stall);
//   - an error from the DRC is inserted into a sort array while edges are
//     still waiting in it (errors and edges share the priority queue).
// One complete check of a scene of sixteen shapes is included.
module tb_sdrc_top;
  import sdrc_pkg::*;
  import sdrc_tb_pkg::*;

  localparam int W = 4, S = 4;   // the top's default rules

  logic   clk = 0, rst_n = 0;
  logic   tok_valid = 0, tok_ready, go = 0, busy, done;
  token_t tok = '0;
  logic   err_valid, err_ready = 1, err_axis;
  err_t   err_o;
  logic   sa_overflow, drc_overflow, fmt_err;

  int checks = 0, failures = 0;
  int n_stall = 0, n_mixed = 0, n_kind[2][2];
  int got[key_t];
  int bp_pct = 0;
  bit have_prev;
  logic [2*CW:0] prev_key;

  always #5 clk = ~clk;

  sdrc_top dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
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
    if (err_valid && err_ready) begin
      logic [2*CW:0] k;
      add_err(err_axis, err_o, got);
      n_kind[err_axis][err_o.kind]++;
      k = {err_axis, err_o.c_lo, err_o.lo};
      checks++;
      if (have_prev && k < prev_key) begin
        failures++;
        $display("FAIL: error out of order");
      end
      have_prev <= 1'b1;
      prev_key  <= k;
    end
    if (dut.u_drc.edge_valid && !dut.u_drc.edge_ready) n_stall++;
    if ((dut.g_side[0].u_ctrl.do_err_ins && dut.g_side[0].u_ctrl.head_is_edge) ||
        (dut.g_side[1].u_ctrl.do_err_ins && dut.g_side[1].u_ctrl.head_is_edge))
      n_mixed++;
    err_ready <= ($urandom % 100) >= bp_pct;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic run_scene(int ntiles, int sc);
    outline_t ol[$];
    token_t tq[$];
    int exp[key_t];
    bit ok;
    gen_scene(ntiles, ol);
    golden(ol, W, S, exp);
    foreach (ol[k]) outline_tokens(ol[k], tq);
    got.delete();
    have_prev = 0;
    foreach (tq[i]) begin
      tok_valid = 1;
      tok       = tq[i];
      do begin
        #1 ok = tok_ready;
        tick();
      end while (!ok);
    end
    tok_valid = 0;
    go = 1;
    tick();
    go = 0;
    while (!done) tick();
    check(!sa_overflow && !drc_overflow && !fmt_err,
          $sformatf("scene %0d: status flags %b%b%b", sc, sa_overflow, drc_overflow, fmt_err));
    foreach (exp[k])
      check(got.exists(k) && got[k] == 1,
            $sformatf("scene %0d: expected violation %h reported %0d times", sc, k,
                      got.exists(k) ? got[k] : 0));
    foreach (got[k])
      if (!exp.exists(k)) check(0, $sformatf("scene %0d: unexpected violation %h", sc, k));
    $display("scene %0d: %0d shapes, %0d violating columns", sc, ntiles, exp.num());
  endtask

  initial begin
    foreach (n_kind[a, k]) n_kind[a][k] = 0;
    repeat (3) tick();
    rst_n = 1;
    tick();
    for (int sc = 0; sc < 6; sc++) begin
      bp_pct = (sc % 2) * 50;
      run_scene((sc == 5) ? 16 : rnd(2, 16), sc);
    end
    check(n_kind[0][0] > 0, "no width error between horizontal edges");
    check(n_kind[0][1] > 0, "no spacing error between horizontal edges");
    check(n_kind[1][0] > 0, "no width error between vertical edges");
    check(n_kind[1][1] > 0, "no spacing error between vertical edges");
    check(n_stall > 0, "DRC never stalled");
    check(n_mixed > 0, "no error inserted while edges were waiting");
    $display("width/spacing: x-pass %0d/%0d y-pass %0d/%0d, stalls %0d, mixed inserts %0d",
             n_kind[0][0], n_kind[0][1], n_kind[1][0], n_kind[1][1], n_stall, n_mixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
