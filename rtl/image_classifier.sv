// image_classifier: perceptron classifier for 28x28 hand-written digits.
//
// Ten single-layer perceptrons, one per digit, score an image as
//   score_k = sum_{i<784} w_k[i] * x[i] + b_k
// and the digit with the largest score is reported. The datapath is:
//
//   pix_data -> pixel_frontend -> 10 x mac_unit -> argmax_tree -> res_digit
//                                      ^
//   wr_* -> weight_mem (10 banks + bias registers), read at the pixel index
//   classifier_ctrl counts pixels, marks first/last, inserts the bias cycle
//
// Pixels are fed serially; all ten perceptrons consume the same pixel in the
// same cycle. Timing with a source that never pauses: the score of an image
// is complete 785 cycles after its first pixel is accepted, the comparator
// tree adds 4, so res_valid pulses 789 cycles after the first pixel. The next
// image is accepted from cycle 785 on, so consecutive results are 785 cycles
// apart and N images take 785*N + 4 cycles (10 images: 7854 cycles, 157.08 us
// at a 20 ns clock).
//
// Interface: load the 10 x 785 weights through wr_* (entry 784 is the bias),
// wait one cycle, then stream pixels with pix_valid/pix_ready. Results come
// out on res_valid/res_digit/res_score in image order.
//
// BINARY = 0 is the grayscale design with ten multipliers. BINARY = 1 is the
// resource-saving variant: each pixel is reduced to one bit (1 when brighter
// than 128) and the multipliers become weight gates; the timing is unchanged.
//
// The structure, widths and cycle counts follow the source description; the
// port protocols, the reset and the accumulator width are this design's.
module image_classifier
  import nn_pkg::*;
#(
  parameter bit          BINARY = 1'b0,
  parameter int unsigned AW     = ACC_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // weight loading
  input  logic                      wr_en,
  input  logic [CLASS_W-1:0]        wr_class,
  input  logic [IDX_W-1:0]          wr_idx,
  input  logic signed [W_IN_W-1:0]  wr_data,
  // pixel stream
  input  logic                      pix_valid,
  input  logic [PIX_IN_W-1:0]       pix_data,
  output logic                      pix_ready,
  // result
  output logic                      res_valid,
  output logic [CLASS_W-1:0]        res_digit,
  output logic signed [AW-1:0]      res_score,
  output logic                      busy
);

  logic                    acc_valid, acc_first, acc_last;
  logic [IDX_W-1:0]        pix_idx, pix_idx_next;
  logic [PIX_W-1:0]        pix_gray;
  logic                    pix_bin;
  logic signed [W_W-1:0]   weight [NUM_CLASSES];
  logic signed [W_W-1:0]   bias   [NUM_CLASSES];
  logic signed [AW-1:0]    score  [NUM_CLASSES];
  logic [NUM_CLASSES-1:0]  score_valid;

  classifier_ctrl u_ctrl (
    .clk, .rst_n, .pix_valid, .pix_ready,
    .acc_valid, .acc_first, .acc_last,
    .pix_idx, .pix_idx_next, .busy
  );

  weight_mem u_wmem (
    .clk, .wr_en, .wr_class, .wr_idx, .wr_data,
    .rd_idx_next(pix_idx_next), .rd_weight(weight), .bias
  );

  pixel_frontend u_pix (
    .pix_in(pix_data), .pix_gray, .pix_bin
  );

  for (genvar k = 0; k < NUM_CLASSES; k++) begin : g_mac
    mac_unit #(.AW(AW), .BINARY(BINARY)) u_mac (
      .clk, .rst_n,
      .in_valid(acc_valid), .in_first(acc_first), .in_last(acc_last),
      .pix_gray, .pix_bin,
      .weight(weight[k]), .bias(bias[k]),
      .score(score[k]), .score_valid(score_valid[k])
    );
  end

  argmax_tree #(.VAL_W(AW)) u_tree (
    .clk, .rst_n,
    .in_valid(score_valid[0]), .scores(score),
    .out_valid(res_valid), .max_idx(res_digit), .max_val(res_score)
  );

  // all ten MAC units run in lock step
  always_ff @(posedge clk)
    if (rst_n) assert (score_valid == '0 || score_valid == '1)
      else $error("MAC units out of step");

  // pix_idx is used only through pix_idx_next and the first/last flags
  logic unused_idx;
  assign unused_idx = ^pix_idx;

endmodule
