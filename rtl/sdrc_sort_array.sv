// sdrc_sort_array: systolic priority queue (the SAX and SAY sort arrays).
//
// DEPTH cells form a linear array; cell i holds one item K[i] and talks only
// to cells i-1 and i+1. The held items stay in ascending key order, K[0]
// being the smallest, and empty cells sit at the far end. Operations enter at
// cell 0 and travel down the array one cell per clock as a wave:
//   insert : the travelling item is compared with the held one; the smaller
//            stays, the larger travels on. An empty cell keeps the item and
//            ends the wave.
//   extract: K[0] is delivered; every cell, as the wave reaches it, takes the
//            item of its successor, so the array shifts up by one.
// A new operation may enter every second clock. Then each wave is at least
// two cells behind the one before it, and whenever a cell reads its successor
// that successor has already taken every earlier wave, so the key order holds
// at the head at all times. That the sort arrays are systolic priority queues
// is the original design's; the cell algorithm, the two-clock spacing and the depth
// are this design's choices (the classic linear systolic priority queue).
//
// Interface: an operation is taken when op_ready is high: ins_valid inserts
// ins_item (ignored when full), otherwise ext_valid pops the head (ignored
// when empty). head_item/head_valid show the smallest item; the item popped
// is the one shown in the cycle of the pop. Items are ordered by
// sdrc_pkg::sa_key = {is_err, c, lo}; equal keys keep their arrival order.
module sdrc_sort_array
  import sdrc_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     op_ready,
  input  logic                     ins_valid,
  input  sa_item_t                 ins_item,
  input  logic                     ext_valid,
  output logic                     head_valid,
  output sa_item_t                 head_item,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  typedef enum logic [1:0] {OP_NONE, OP_INS, OP_EXT} op_e;

  sa_item_t k_q   [DEPTH];
  logic     v_q   [DEPTH];
  op_e      op_q  [DEPTH];   // operation arriving at cell i (op_q[0] unused)
  sa_item_t car_q [DEPTH];   // item travelling with it

  op_e      op_in [DEPTH];
  sa_item_t car_in[DEPTH];
  logic     busy_q;          // an operation entered in the previous clock
  logic     do_ins, do_ext;

  assign op_ready   = !busy_q;
  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty      = (count == '0);
  assign do_ins     = op_ready && ins_valid && !full;
  assign do_ext     = op_ready && !ins_valid && ext_valid && !empty;
  assign head_valid = v_q[0];
  assign head_item  = k_q[0];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      if (i == 0) begin
        op_in[i]  = do_ins ? OP_INS : (do_ext ? OP_EXT : OP_NONE);
        car_in[i] = ins_item;
      end else begin
        op_in[i]  = op_q[i];
        car_in[i] = car_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      count  <= '0;
    end else begin
      busy_q <= do_ins || do_ext;
      if (do_ins)      count <= count + 1'b1;
      else if (do_ext) count <= count - 1'b1;
    end
  end

  for (genvar i = 0; i < DEPTH; i++) begin : g_cell
    op_e      pass_op;
    sa_item_t pass_car;
    sa_item_t nxt_k;
    logic     nxt_v;

    // Successor's contents, read by an extract wave.
    if (i == DEPTH - 1) begin : g_last
      assign nxt_k = '0;
      assign nxt_v = 1'b0;
    end else begin : g_mid
      assign nxt_k = k_q[i+1];
      assign nxt_v = v_q[i+1];
    end

    always_comb begin
      pass_op  = OP_NONE;
      pass_car = car_in[i];
      unique case (op_in[i])
        OP_INS: begin
          if (v_q[i]) begin
            pass_op = OP_INS;
            if (sa_key(car_in[i]) < sa_key(k_q[i])) pass_car = k_q[i];
          end
        end
        OP_EXT: pass_op = OP_EXT;
        default: ;
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        k_q[i] <= '0;
        v_q[i] <= 1'b0;
      end else begin
        unique case (op_in[i])
          OP_INS: begin
            if (!v_q[i] || sa_key(car_in[i]) < sa_key(k_q[i])) begin
              k_q[i] <= car_in[i];
              v_q[i] <= 1'b1;
            end
          end
          OP_EXT: begin
            k_q[i] <= nxt_k;
            v_q[i] <= nxt_v;
          end
          default: ;
        endcase
      end
    end

    if (i < DEPTH - 1) begin : g_fwd
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          op_q[i+1]  <= OP_NONE;
          car_q[i+1] <= '0;
        end else begin
          op_q[i+1]  <= pass_op;
          car_q[i+1] <= pass_car;
        end
      end
    end
  end

  // Cell 0 has no predecessor register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q[0]  <= OP_NONE;
      car_q[0] <= '0;
    end else begin
      op_q[0]  <= OP_NONE;
      car_q[0] <= '0;
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    !(op_ready && ins_valid && ext_valid))
    else $error("sdrc_sort_array: insert and extract requested together");

endmodule
