// tb_sdrc_edge_former: self-checking testbench of the edge former.
//
// Two formers, one per orientation, receive the token stream of random scenes
// (rectangles, rectangles with holes, eight-vertex stepped outlines) and of
// the two outlines drawn as the original design's first examples. Their edges are
// compared, in order, with edges taken directly from the vertex lists
// (sdrc_tb_pkg::outline_edges). The output is randomly held not-ready. A
// malformed stream (a coordinate where a header is due) must raise fmt_err.
module tb_sdrc_edge_former;
  import sdrc_pkg::*;
  import sdrc_tb_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   tok_valid = 0;
  token_t tok = '0;
  logic   tr[2], ev[2], er[2], busy[2], ferr[2];
  edge_t  eo[2];

  int checks = 0, failures = 0;
  edge_t expq[2][$];

  always #5 clk = ~clk;

  for (genvar v = 0; v < 2; v++) begin : g_dut
    sdrc_edge_former #(.VERTICAL(v == 1)) dut (
      .clk(clk), .rst_n(rst_n),
      .tok_valid(tok_valid && tr[1-v]), .tok_ready(tr[v]), .tok(tok),
      .edge_valid(ev[v]), .edge_ready(er[v]), .edge_o(eo[v]),
      .busy(busy[v]), .fmt_err(ferr[v]));

    always @(posedge clk) begin
      edge_t x;
      if (ev[v] && er[v]) begin
        checks++;
        if (expq[v].size() == 0) begin
          failures++;
          $display("FAIL: unexpected edge on side %0d", v);
        end else begin
          x = expq[v].pop_front();
          if (x != eo[v]) begin
            failures++;
            $display("FAIL: side %0d edge %p, expected %p", v, eo[v], x);
          end
        end
      end
      er[v] <= ($urandom % 3) != 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic send(token_t tq[$]);
    bit ok;
    foreach (tq[i]) begin
      tok_valid = 1;
      tok       = tq[i];
      do begin
        #1 ok = tr[0] && tr[1];
        tick();
      end while (!ok);
    end
    tok_valid = 0;
  endtask

  initial begin
    outline_t ol[$];
    token_t tq[$];
    er[0] = 1; er[1] = 1;
    repeat (3) tick();
    rst_n = 1;
    tick();

    // Outlines shaped like the original design's two polygon examples, with made-up coordinates:
    // (a) an eight-vertex outline; (b) a twelve-vertex outline with two holes.
    begin
      outline_t o;
      o = step8(1, 2, 2, 8, 3, 4, 12, 5, 9);
      ol.push_back(o);
      o.is_hole = 0; o.n = 2; o.nv = 12;
      o.vx = '{20, 34, 34, 44, 44, 50, 50, 40, 40, 46, 46, 20, 0, 0, 0, 0};
      o.vy = '{20, 20, 24, 24, 28, 28, 32, 32, 36, 36, 44, 44, 0, 0, 0, 0};
      ol.push_back(o);
      o.is_hole = 1; o.nv = 8;
      o.vx = '{23, 25, 25, 24, 24, 22, 22, 23, 0, 0, 0, 0, 0, 0, 0, 0};
      o.vy = '{30, 30, 40, 40, 36, 36, 32, 32, 0, 0, 0, 0, 0, 0, 0, 0};
      ol.push_back(o);
      o.nv = 6;
      o.vx = '{30, 33, 33, 34, 34, 30, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      o.vy = '{30, 30, 32, 32, 40, 40, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      ol.push_back(o);
    end
    for (int sc = 0; sc < 6; sc++) begin
      outline_t more[$];
      gen_scene(rnd(1, 16), more);
      foreach (more[k]) ol.push_back(more[k]);
    end
    foreach (ol[k]) begin
      tq.delete();
      outline_tokens(ol[k], tq);
      outline_edges(ol[k], 1'b0, expq[0]);
      outline_edges(ol[k], 1'b1, expq[1]);
      send(tq);
    end
    repeat (10) tick();
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d edges missing", expq[0].size(), expq[1].size());
    end
    checks++;
    if (busy[0] || busy[1] || ferr[0] || ferr[1]) begin
      failures++;
      $display("FAIL: former busy or in error after complete outlines");
    end
    // malformed stream: a coordinate where a header is due
    tq.delete();
    tq.push_back('{kind: TOK_COORD, val: 16'd3});
    send(tq);
    repeat (2) tick();
    checks++;
    if (!(ferr[0] && ferr[1])) begin
      failures++;
      $display("FAIL: fmt_err not raised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
