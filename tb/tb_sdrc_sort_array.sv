// tb_sdrc_sort_array: self-checking testbench of the systolic priority queue.
//
// A queue model in the testbench (a list kept sorted by the same key) is
// driven alongside the array with a random mix of inserts and extracts, so
// that waves of both kinds run through the array back to back. Every
// extracted item must equal the model's smallest item. The testbench also
// checks the operation rate (one operation every second clock: op_ready
// drops for exactly one clock after each operation), fills the array to
// DEPTH to see full, and drains it to see empty; it counts inserts into a full
// array that were refused and fails if none occurred.
module tb_sdrc_sort_array;
  import sdrc_pkg::*;

  localparam int DEPTH = 16;

  logic     clk = 0, rst_n = 0;
  logic     op_ready, ins_valid = 0, ext_valid = 0, head_valid, full, empty;
  sa_item_t ins_item = '0, head_item;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0, n_refused = 0;
  sa_item_t model[$];

  always #5 clk = ~clk;

  sdrc_sort_array #(.DEPTH(DEPTH)) dut (.*);

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

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic sa_item_t rnd_item();
    sa_item_t it;
    it        = '0;
    it.is_err = ($urandom % 4) == 0;
    it.c      = coord_t'($urandom % 8);     // many equal c: exercises the lo tie-break
    it.lo     = coord_t'($urandom % 64);
    it.hi     = coord_t'($urandom);
    it.n      = polyno_t'($urandom);
    return it;
  endfunction

  function automatic void model_insert(sa_item_t it);
    int i = 0;
    while (i < model.size() && !(sa_key(it) < sa_key(model[i]))) i++;
    model.insert(i, it);
  endfunction

  // One operation: 1 = insert, 0 = extract. Waits for op_ready.
  task automatic do_op(bit ins);
    sa_item_t it;
    bit done_op;
    while (!op_ready) tick();
    if (ins) begin
      it = rnd_item();
      ins_valid = 1;
      ins_item  = it;
      done_op = !full;
      if (full) begin
        n_refused++;
      end else begin
        model_insert(it);
      end
    end else begin
      ext_valid = 1;
      done_op = model.size() > 0;
      if (model.size() > 0) begin
        check(head_valid, "head not valid while queue holds items");
        check(sa_key(head_item) == sa_key(model[0]),
              $sformatf("popped key %h, expected %h", sa_key(head_item), sa_key(model[0])));
        void'(model.pop_front());
      end else begin
        check(!head_valid && empty, "empty queue shows a head");
      end
    end
    tick();
    ins_valid = 0;
    ext_valid = 0;
    check(op_ready != done_op, "op_ready wrong in the clock after an operation");
    tick();
    check(op_ready, "op_ready low two clocks after an operation");
    check(int'(count) == model.size(), $sformatf("count %0d, model %0d", count, model.size()));
  endtask

  initial begin
    repeat (3) tick();
    rst_n = 1;
    tick();
    // random mix
    for (int i = 0; i < 600; i++) do_op(($urandom % 100) < 55);
    // fill up past DEPTH
    for (int i = 0; i < DEPTH + 4; i++) do_op(1'b1);
    check(full, "array not full after DEPTH inserts");
    // drain
    while (model.size() > 0) do_op(1'b0);
    check(empty && !head_valid, "array not empty after draining");
    check(n_refused > 0, "no insert into a full array was refused");
    $display("refused=%0d", n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
