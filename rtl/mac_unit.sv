// mac_unit: multiply-accumulate engine of one perceptron (one digit class).
//
// Ten of these work in parallel on the same pixel stream, each with its own
// class's weights. The unit is a two-stage pipeline:
//   stage 1 (multiply):   prod <= weight * pixel
//   stage 2 (accumulate): acc  <= (first ? 0 : acc) + prod (+ bias on the last)
// The accumulator therefore needs no separate clear cycle: the first product
// of an image overwrites it, which lets the next image start while the
// comparator tree is still working on the previous scores.
//
// Bias: the bias is the weight of an extra element of value 1 appended after
// the 784 pixels. Since 1 * bias = bias, it needs no multiplier; it is added
// in the accumulation cycle of the last pixel, the cycle in which the
// controller accepts no pixel. So 784 pixels take 785 cycles from the first
// multiply to a complete score. score_valid pulses for one cycle, and `score`
// holds the finished score in that cycle (the next image's first product
// overwrites it one or more cycles later).
//
// BINARY = 1 builds the resource-saving variant: the pixel is a single bit
// and stage 1 passes either the weight or zero, so there is no multiplier.
// The timing is the same in both variants.
//
// Weights are signed, pixels unsigned; the accumulator is ACC_W bits wide and
// wraps on overflow. The pipeline structure, the bias handling and the binary
// variant follow the source description; signedness, wrap-around and the
// reset are this design's choices.
module mac_unit
  import nn_pkg::*;
#(
  parameter int unsigned WW     = W_W,
  parameter int unsigned PW     = PIX_W,
  parameter int unsigned AW     = ACC_W,
  parameter bit          BINARY = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic [PW-1:0]        pix_gray,
  input  logic                 pix_bin,
  input  logic signed [WW-1:0] weight,
  input  logic signed [WW-1:0] bias,
  output logic signed [AW-1:0] score,
  output logic                 score_valid
);

  logic signed [AW-1:0] prod_q;
  logic                 p_valid_q, p_first_q, p_last_q;
  logic signed [AW-1:0] acc_q;
  logic                 done_q;

  // stage 1: multiplication (or weight gating in the binary variant)
  logic signed [AW-1:0] prod_d;
  if (BINARY) begin : g_bin
    assign prod_d = pix_bin ? AW'(weight) : '0;
  end else begin : g_gray
    assign prod_d = AW'(weight * $signed({1'b0, pix_gray}));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid_q <= 1'b0;
      p_first_q <= 1'b0;
      p_last_q  <= 1'b0;
      prod_q    <= '0;
    end else begin
      p_valid_q <= in_valid;
      p_first_q <= in_first;
      p_last_q  <= in_last;
      if (in_valid) prod_q <= prod_d;
    end
  end

  // stage 2: accumulation, bias joined with the last product
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= p_valid_q && p_last_q;
      if (p_valid_q)
        acc_q <= (p_first_q ? AW'(0) : acc_q) + prod_q
                 + (p_last_q ? AW'(bias) : AW'(0));
    end
  end

  assign score       = acc_q;
  assign score_valid = done_q;

endmodule
