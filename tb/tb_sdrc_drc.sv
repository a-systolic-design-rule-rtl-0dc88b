// tb_sdrc_drc: self-checking testbench of the systolic width/spacing checker.
//
// Random scenes of rectilinear shapes (rectangles, rectangles with a hole and
// eight-vertex stepped outlines) are turned into edges, sorted, and streamed
// into the checker: first the horizontal edges, then, after clear, the
// vertical ones. Every reported violation is expanded into unit columns and
// compared with a bitmap reference model (sdrc_tb_pkg::golden): each expected
// column must be reported exactly once and nothing else may be reported. The
// error output is randomly held not-ready so that the array's stall path is
// exercised; the testbench counts stalls, width and spacing errors, and fails
// if any of them never happened. It also checks the one-clock-per-cell
// latency of an edge through the array and that a new edge is taken every
// clock when no error is pending.
module tb_sdrc_drc;
  import sdrc_pkg::*;
  import sdrc_tb_pkg::*;

  localparam int CELLS = 64;
  localparam int W = 4, S = 3;

  logic  clk = 0, rst_n = 0, clear = 0;
  logic  edge_valid = 0, edge_ready, err_valid, err_ready = 1, idle, overflow;
  edge_t edge_i = '0;
  err_t  err_o;

  int checks = 0, failures = 0;
  int n_stall = 0, n_width = 0, n_spacing = 0;
  int got[key_t];
  int exp[key_t];
  bit cur_axis;
  int bp_pct = 0;

  always #5 clk = ~clk;

  sdrc_drc #(.CELLS(CELLS), .W_MIN(W), .S_MIN(S)) dut (.*);

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error collector with random back-pressure
  always @(posedge clk) begin
    if (err_valid && err_ready) begin
      add_err(cur_axis, err_o, got);
      if (err_o.kind == ERR_WIDTH) n_width++; else n_spacing++;
    end
    if (edge_valid && !edge_ready) n_stall++;
    err_ready <= ($urandom % 100) >= bp_pct;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_pass(edge_t eq[$]);
    bit ok;
    clear <= 1;
    tick();
    clear <= 0;
    foreach (eq[i]) begin
      edge_valid <= 1;
      edge_i     <= eq[i];
      do begin
        #1 ok = edge_ready;
        tick();
      end while (!ok);
    end
    edge_valid <= 0;
    tick();
    while (!idle) tick();
    check(!overflow, "skyline overflow");
  endtask

  task automatic compare(string tag);
    foreach (exp[k]) begin
      check(got.exists(k) && got[k] == 1,
            $sformatf("%s: expected violation %h reported %0d times", tag, k,
                      got.exists(k) ? got[k] : 0));
    end
    foreach (got[k]) begin
      if (!exp.exists(k)) begin
        check(0, $sformatf("%s: unexpected violation %h", tag, k));
      end
    end
  endtask

  initial begin
    outline_t ol[$];
    edge_t hq[$], vq[$];
    int exp_all[key_t];

    repeat (3) tick();
    rst_n = 1;
    tick();

    // Latency: one lone edge; it must be gone from the array after CELLS clocks.
    begin
      int t0, t1;
      clear <= 1; tick(); clear <= 0;
      edge_valid <= 1;
      edge_i     <= '{c: 16'd5, lo: 16'd1, hi: 16'd9, mat_hi: 1'b1, n: 8'd1};
      tick();
      edge_valid <= 0;
      t0 = 0;
      while (!idle) begin tick(); t0++; end
      check(t0 == CELLS, $sformatf("edge latency %0d clocks, expected %0d", t0, CELLS));
    end

    for (int sc = 0; sc < 24; sc++) begin
      bp_pct = (sc % 3) * 40;
      gen_scene(rnd(1, 16), ol);
      golden(ol, W, S, exp_all);
      hq.delete(); vq.delete();
      foreach (ol[k]) begin
        outline_edges(ol[k], 1'b0, hq);
        outline_edges(ol[k], 1'b1, vq);
      end
      sort_edges(hq);
      sort_edges(vq);

      for (int axis = 0; axis < 2; axis++) begin
        int t_start, t_end;
        got.delete();
        exp.delete();
        foreach (exp_all[k]) if (k[49] == axis[0]) exp[k] = 1;
        cur_axis = axis[0];
        t_start = int'($time / 10);
        run_pass(axis == 0 ? hq : vq);
        t_end = int'($time / 10);
        compare($sformatf("scene %0d axis %0d", sc, axis));
        // Without back-pressure the array accepts one edge per clock.
        if (bp_pct == 0 && exp.num() == 0)
          check(t_end - t_start <= (axis == 0 ? hq.size() : vq.size()) + CELLS + 4,
                $sformatf("pass took %0d clocks", t_end - t_start));
      end
    end

    check(n_stall > 0, "array never stalled on a busy error chain");
    check(n_width > 0, "no width error seen");
    check(n_spacing > 0, "no spacing error seen");
    $display("stalls=%0d width=%0d spacing=%0d", n_stall, n_width, n_spacing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
