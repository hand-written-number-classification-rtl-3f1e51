// argmax_tree: index of the largest of ten class scores.
//
// A tree of nine two-input comparators in four registered layers:
//   layer 1: (0,1) (2,3) (4,5) (6,7) (8,9)        5 comparators -> 5 winners
//   layer 2: (w01,w23) (w45,w67), w89 passed on   2 comparators -> 3
//   layer 3: (w0123,w4567), w89 passed on         1 comparator  -> 2
//   layer 4: final comparison                     1 comparator  -> 1
// Each comparator forwards the larger signed value together with its index.
// On equal values the lower index wins. in_valid travels with the data, so
// out_valid follows in_valid by exactly four cycles and a new set of scores
// may enter every cycle.
//
// The comparator count, the four layers and the four-cycle latency follow the
// source description; the pairing, the tie rule and the reset are this
// design's choices. The tree is written for N = 10.
module argmax_tree
  import nn_pkg::*;
#(
  parameter int unsigned N     = NUM_CLASSES,
  parameter int unsigned VAL_W = ACC_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [VAL_W-1:0]     scores [N],
  output logic                        out_valid,
  output logic [$clog2(N)-1:0]        max_idx,
  output logic signed [VAL_W-1:0]     max_val
);

  localparam int unsigned IW = $clog2(N);

  typedef struct packed {
    logic signed [VAL_W-1:0] val;
    logic [IW-1:0]           idx;
  } cand_t;

  // larger of two candidates; `a` must carry the lower index
  function automatic cand_t cmp2(cand_t a, cand_t b);
    return (a.val >= b.val) ? a : b;
  endfunction

  cand_t l1_q [5];
  cand_t l2_q [3];
  cand_t l3_q [2];
  cand_t l4_q;
  logic [TREE_STAGES-1:0] v_q;

  cand_t in_c [N];
  for (genvar i = 0; i < N; i++) begin : g_in
    assign in_c[i] = '{val: scores[i], idx: IW'(i)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= '0;
    end else begin
      v_q <= {v_q[TREE_STAGES-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 5; k++) l1_q[k] <= cmp2(in_c[2*k], in_c[2*k+1]);
    l2_q[0] <= cmp2(l1_q[0], l1_q[1]);
    l2_q[1] <= cmp2(l1_q[2], l1_q[3]);
    l2_q[2] <= l1_q[4];
    l3_q[0] <= cmp2(l2_q[0], l2_q[1]);
    l3_q[1] <= l2_q[2];
    l4_q    <= cmp2(l3_q[0], l3_q[1]);
  end

  assign out_valid = v_q[TREE_STAGES-1];
  assign max_idx   = l4_q.idx;
  assign max_val   = l4_q.val;

  initial assert (N == 10) else $error("argmax_tree is built for ten inputs");

endmodule
