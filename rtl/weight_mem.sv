// weight_mem: storage for the ten perceptrons' weights and biases.
//
// Each class receives 785 signed 19-bit entries: 784 pixel weights followed by
// the bias. An entry is written through a simple address-based port (class,
// entry index, data). Index NUM_PIXELS (the last entry) goes to a separate
// bias register for that class; the others go to that class's pixel-weight
// bank. Each entry is sign-extended to the 32-bit reception width and then cut
// to the 24-bit processing width, which keeps its value.
//
// Reading: all ten banks are read together at the same pixel index, so the
// ten MAC units see their weights in parallel. The read is synchronous and
// addressed with the index of the pixel that will be current in the next
// cycle (rd_idx_next), so rd_weight belongs to the pixel present in the same
// cycle. Biases are always visible on `bias`.
//
// The write port, the bank organisation and the read-ahead addressing are this
// design's choices; the entry count, the widths and the separation of the bias
// follow the source description. Writes are meant to happen before images are
// streamed in.
module weight_mem
  import nn_pkg::*;
#(
  parameter int unsigned NCLS   = NUM_CLASSES,
  parameter int unsigned NPIX   = NUM_PIXELS,
  parameter int unsigned WIN_W  = W_IN_W,
  parameter int unsigned WEXT_W = W_EXT_W,
  parameter int unsigned WOUT_W = W_W
) (
  input  logic                            clk,
  input  logic                            wr_en,
  input  logic [$clog2(NCLS)-1:0]         wr_class,
  input  logic [$clog2(NPIX+1)-1:0]       wr_idx,
  input  logic signed [WIN_W-1:0]         wr_data,
  input  logic [$clog2(NPIX+1)-1:0]       rd_idx_next,
  output logic signed [WOUT_W-1:0]        rd_weight [NCLS],
  output logic signed [WOUT_W-1:0]        bias      [NCLS]
);

  localparam int unsigned AW = $clog2(NPIX+1);

  logic signed [WEXT_W-1:0] wr_ext;
  logic signed [WOUT_W-1:0] wr_cut;

  // 19 -> 32 bit sign extension, then 32 -> 24 bit reduction
  assign wr_ext = WEXT_W'(wr_data);
  assign wr_cut = wr_ext[WOUT_W-1:0];

  logic signed [WOUT_W-1:0] bank     [NCLS][NPIX];
  logic signed [WOUT_W-1:0] bias_q   [NCLS];
  logic signed [WOUT_W-1:0] rd_q     [NCLS];

  for (genvar c = 0; c < NCLS; c++) begin : g_bank
    always_ff @(posedge clk) begin
      if (wr_en && wr_class == c[$clog2(NCLS)-1:0]) begin
        if (wr_idx == AW'(NPIX))
          bias_q[c] <= wr_cut;
        else if (wr_idx < AW'(NPIX))
          bank[c][wr_idx] <= wr_cut;
      end
    end

    always_ff @(posedge clk) begin
      if (rd_idx_next < AW'(NPIX))
        rd_q[c] <= bank[c][rd_idx_next];
      else
        rd_q[c] <= '0;
    end

    assign rd_weight[c] = rd_q[c];
    assign bias[c]      = bias_q[c];
  end

endmodule
