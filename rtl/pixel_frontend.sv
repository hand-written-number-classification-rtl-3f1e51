// pixel_frontend: width handling and binarisation of one received pixel.
//
// A pixel arrives as a 10-bit unsigned brightness. It is zero-extended to the
// 24-bit reception width and then reduced to the 8-bit processing width (the
// brightness range 0..255), which is what the multipliers of the grayscale
// design use. In parallel it is compared with a threshold: pixels brighter
// than 128 give pix_bin = 1, all others 0. The binary variant of the
// classifier uses pix_bin instead of a multiplier.
//
// Purely combinational. The widths and the threshold follow the source
// description; keeping the low 8 bits, and mapping exactly 128 to 0, are this
// design's choices.
module pixel_frontend
  import nn_pkg::*;
#(
  parameter int unsigned IN_W      = PIX_IN_W,
  parameter int unsigned EXT_W     = PIX_EXT_W,
  parameter int unsigned OUT_W     = PIX_W,
  parameter int unsigned THRESHOLD = BIN_THRESHOLD
) (
  input  logic [IN_W-1:0]  pix_in,
  output logic [OUT_W-1:0] pix_gray,
  output logic             pix_bin
);

  logic [EXT_W-1:0] pix_ext;

  always_comb begin
    pix_ext  = EXT_W'(pix_in);
    pix_gray = pix_ext[OUT_W-1:0];
    pix_bin  = (pix_ext > EXT_W'(THRESHOLD));
  end

endmodule
