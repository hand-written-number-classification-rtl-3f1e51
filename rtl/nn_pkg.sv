// nn_pkg: constants shared by the perceptron digit classifier.
//
// The classifier scores a 28x28 image against ten linear perceptrons (one per
// digit) and reports the digit whose score is largest. The numbers below are
// the ones the design is built around: ten classes, 784 pixels, 785 weight
// entries per class (the last is the bias), 19-bit received weights widened to
// 32 bits and processed at 24 bits, and 10-bit received pixels widened to 24
// bits and processed at 8 bits. The 32-bit accumulator width is this design's
// choice (it matches the 32-bit internal weight width).
package nn_pkg;

  localparam int unsigned NUM_CLASSES = 10;
  localparam int unsigned NUM_PIXELS  = 784;            // 28 x 28
  localparam int unsigned NUM_ENTRIES = NUM_PIXELS + 1; // pixels + bias
  localparam int unsigned CLASS_W     = $clog2(NUM_CLASSES);
  localparam int unsigned IDX_W       = $clog2(NUM_ENTRIES);

  localparam int unsigned W_IN_W    = 19;  // received weight width
  localparam int unsigned W_EXT_W   = 32;  // internal reception width
  localparam int unsigned W_W       = 24;  // width used by the multipliers
  localparam int unsigned PIX_IN_W  = 10;  // received pixel width
  localparam int unsigned PIX_EXT_W = 24;  // internal reception width
  localparam int unsigned PIX_W     = 8;   // width used by the multipliers
  localparam int unsigned ACC_W     = 32;  // class score width

  localparam int unsigned BIN_THRESHOLD = 128; // binary variant: pixel > 128 -> 1
  localparam int unsigned TREE_STAGES   = 4;   // comparator tree layers

  typedef logic signed [W_W-1:0]   weight_t;
  typedef logic        [PIX_W-1:0] pixel_t;
  typedef logic signed [ACC_W-1:0] score_t;
  typedef logic        [CLASS_W-1:0] class_t;
  typedef logic        [IDX_W-1:0]   idx_t;

endpackage
