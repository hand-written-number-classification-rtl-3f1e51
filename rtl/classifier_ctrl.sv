// classifier_ctrl: sequencing of the serial pixel stream.
//
// Pixels of an image enter one per cycle over a valid/ready handshake. The
// controller counts accepted pixels (pix_idx, 0..783) and tells the MAC units
// which pixel is the first and which the last of an image. After the last
// pixel it drops pix_ready for exactly one cycle: this is the slot of the
// appended bias element, in which the MAC units fold the bias into the
// score. With a source that always has data, images are therefore accepted
// 785 cycles apart, while the four-cycle comparison of one image overlaps the
// first pixels of the next.
//
// pix_idx_next is the value pix_idx will have after the coming clock edge;
// the weight memory is read with it so that the weights are ready in the same
// cycle as their pixel. After reset, or after the last weight write, one
// clock cycle must pass before the first pixel is offered.
//
// The serial order, the 785-cycle period and the overlap follow the source
// description; the handshake and the synchronous active-low reset are this
// design's choices.
module classifier_ctrl
  import nn_pkg::*;
#(
  parameter int unsigned NPIX = NUM_PIXELS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        pix_valid,
  output logic                        pix_ready,
  output logic                        acc_valid,
  output logic                        acc_first,
  output logic                        acc_last,
  output logic [$clog2(NPIX+1)-1:0]   pix_idx,
  output logic [$clog2(NPIX+1)-1:0]   pix_idx_next,
  output logic                        busy
);

  localparam int unsigned AW = $clog2(NPIX+1);

  typedef enum logic {S_PIXELS, S_BIAS} state_t;

  state_t        state_q;
  logic [AW-1:0] idx_q;
  logic          accept;

  assign pix_ready = (state_q == S_PIXELS);
  assign accept    = pix_valid && pix_ready;
  assign acc_valid = accept;
  assign acc_first = (idx_q == '0);
  assign acc_last  = (idx_q == AW'(NPIX-1));
  assign pix_idx   = idx_q;
  assign busy      = (idx_q != '0) || (state_q == S_BIAS);

  always_comb begin
    pix_idx_next = idx_q;
    if (!rst_n)
      pix_idx_next = '0;
    else if (accept)
      pix_idx_next = acc_last ? '0 : idx_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_PIXELS;
      idx_q   <= '0;
    end else begin
      idx_q <= pix_idx_next;
      unique case (state_q)
        S_PIXELS: if (accept && acc_last) state_q <= S_BIAS;
        S_BIAS:   state_q <= S_PIXELS;
        default:  state_q <= S_PIXELS;
      endcase
    end
  end

endmodule
