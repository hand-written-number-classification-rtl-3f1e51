// image_classifier_tb: end-to-end test of the digit classifier at its
// default sizes (10 classes, 784 pixels, 19-bit weights, 10-bit pixels).
//
// Two classifiers are built side by side: the grayscale design (default
// parameters) and the binary variant. Test data is generated here: each
// digit class gets a random stroke template inside the central 20x20 region
// of the 28x28 frame; its perceptron weights reward pixels on the template
// and penalise pixels off it, and each test image is a noisy copy of one
// template (brightness 150..255 on the strokes, 0..60 or noise elsewhere).
// A reference model computes all ten 32-bit scores and the winning digit for
// both variants; every result of the hardware is compared with it.
//
// Sequence: load all 7850 weights, stream 10 images back to back (one per
// digit) and check the timing given for the design: first result 789
// cycles after the first pixel, results 785 cycles apart, 7854 cycles
// (157080 ns at 20 ns) for all ten. Then 10 more images with a source that
// pauses at random, which must give the same results. Mechanisms counted:
// bias cycles, overlap of the comparison with the next image's pixels,
// source stalls, and results of both variants; each must occur.
module image_classifier_tb;
  localparam int NC = 10, NP = 784, NE = 785;
  localparam int NIMG = 20;
  localparam int CLK_NS = 20;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [3:0] wr_class;
  logic [9:0] wr_idx;
  logic signed [18:0] wr_data;
  logic pix_valid;
  logic [9:0] pix_data;
  logic pix_ready_g, pix_ready_b;
  logic res_valid_g, res_valid_b, busy_g, busy_b;
  logic [3:0] res_digit_g, res_digit_b;
  logic signed [31:0] res_score_g, res_score_b;

  image_classifier dut_g (
    .clk, .rst_n, .wr_en, .wr_class, .wr_idx, .wr_data,
    .pix_valid, .pix_data, .pix_ready(pix_ready_g),
    .res_valid(res_valid_g), .res_digit(res_digit_g), .res_score(res_score_g), .busy(busy_g));

  image_classifier #(.BINARY(1'b1)) dut_b (
    .clk, .rst_n, .wr_en, .wr_class, .wr_idx, .wr_data,
    .pix_valid, .pix_data, .pix_ready(pix_ready_b),
    .res_valid(res_valid_b), .res_digit(res_digit_b), .res_score(res_score_b), .busy(busy_b));

  always #(CLK_NS / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int  weights [NC][NE];
  bit  tmpl [NC][NP];
  int  img [NIMG][NP];
  int  label [NIMG];
  int  exp_dg [NIMG], exp_db [NIMG];
  int  exp_sg [NIMG], exp_sb [NIMG];
  int  first_cyc [NIMG];
  int  res_cyc [NIMG];
  int  n_res_g = 0, n_res_b = 0;
  int  correct_g = 0, correct_b = 0;
  int  cnt_bias = 0, cnt_overlap = 0, cnt_stall = 0;

  initial begin
    repeat (NC * NE + NIMG * 1200 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- data
  function automatic bit central(int p);
    int r, c;
    r = p / 28; c = p % 28;
    return r >= 4 && r < 24 && c >= 4 && c < 24;
  endfunction

  task automatic make_data();
    for (int k = 0; k < NC; k++) begin
      for (int p = 0; p < NP; p++) begin
        tmpl[k][p] = central(p) && ($urandom_range(0, 99) < 25);
        if (tmpl[k][p]) weights[k][p] = $urandom_range(800, 1200);
        else if (central(p)) weights[k][p] = -int'($urandom_range(200, 400));
        else weights[k][p] = int'($urandom_range(0, 20)) - 10;
      end
      weights[k][NP] = int'($urandom_range(0, 40000)) - 20000;   // bias
    end
    for (int i = 0; i < NIMG; i++) begin
      label[i] = i % NC;
      for (int p = 0; p < NP; p++) begin
        if (tmpl[label[i]][p] && $urandom_range(0, 9) != 0) img[i][p] = $urandom_range(150, 255);
        else if ($urandom_range(0, 19) == 0) img[i][p] = $urandom_range(129, 255);
        else img[i][p] = $urandom_range(0, 60);
      end
      if (i == 3) img[i][100] = 128;   // exactly at the binary threshold
    end
  endtask

  // reference scores, 32-bit wrap-around like the hardware accumulators
  task automatic reference(int i);
    longint sg, sb;
    int bg, bb;
    logic signed [31:0] s32g, s32b, bestg, bestb;
    bg = 0; bb = 0; bestg = 0; bestb = 0;
    for (int k = 0; k < NC; k++) begin
      sg = longint'(weights[k][NP]); sb = longint'(weights[k][NP]);
      for (int p = 0; p < NP; p++) begin
        sg += longint'(weights[k][p]) * img[i][p];
        if (img[i][p] > 128) sb += longint'(weights[k][p]);
      end
      s32g = 32'(sg); s32b = 32'(sb);
      if (k == 0 || s32g > bestg) begin bestg = s32g; bg = k; end
      if (k == 0 || s32b > bestb) begin bestb = s32b; bb = k; end
    end
    exp_dg[i] = bg; exp_sg[i] = bestg; exp_db[i] = bb; exp_sb[i] = bestb;
  endtask

  // ------------------------------------------------------------ monitors
  always @(posedge clk) if (rst_n) begin
    if (!pix_ready_g) cnt_bias++;
    if (pix_valid && pix_ready_g && dut_g.u_tree.v_q != '0) cnt_overlap++;
    if (!pix_valid && busy_g) cnt_stall++;
    checks++;
    if (pix_ready_g != pix_ready_b || busy_g != busy_b || res_valid_g != res_valid_b) begin
      failures++; $display("variants out of step at cycle %0d", cycle);
    end
    if (res_valid_g) begin
      int i;
      i = n_res_g++;
      res_cyc[i] = cycle;
      checks++;
      if (i >= NIMG) begin failures++; $display("extra result"); end
      else begin
        if (res_digit_g != 4'(exp_dg[i]) || res_score_g != exp_sg[i]) begin
          failures++;
          $display("image %0d grayscale: digit %0d score %0d, expected %0d / %0d",
                   i, res_digit_g, res_score_g, exp_dg[i], exp_sg[i]);
        end
        if (res_digit_g == 4'(label[i])) correct_g++;
      end
    end
    if (res_valid_b) begin
      int i;
      i = n_res_b++;
      checks++;
      if (i < NIMG) begin
        if (res_digit_b != 4'(exp_db[i]) || res_score_b != exp_sb[i]) begin
          failures++;
          $display("image %0d binary: digit %0d score %0d, expected %0d / %0d",
                   i, res_digit_b, res_score_b, exp_db[i], exp_sb[i]);
        end
        if (res_digit_b == 4'(label[i])) correct_b++;
      end else failures++;
    end
  end

  // ------------------------------------------------------------- stimulus
  task automatic send_image(int i, bit pauses);
    int p;
    p = 0;
    while (p < NP) begin
      pix_valid = !(pauses && $urandom_range(0, 7) == 0);
      pix_data  = 10'(img[i][p]);
      if (p == 0 && pix_valid && pix_ready_g) first_cyc[i] = cycle;
      @(posedge clk);
      if (pix_valid && pix_ready_g) p++;
      #1;
    end
  endtask

  initial begin
    longint t0;
    wr_en = 0; wr_class = 0; wr_idx = 0; wr_data = 0; pix_valid = 0; pix_data = 0;
    make_data();
    for (int i = 0; i < NIMG; i++) reference(i);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NC; k++)
      for (int e = 0; e < NE; e++) begin
        wr_en = 1; wr_class = 4'(k); wr_idx = 10'(e); wr_data = 19'(weights[k][e]);
        @(posedge clk); #1;
      end
    wr_en = 0;
    @(posedge clk); #1;

    // part 1: ten digits back to back from a continuous source
    t0 = $time;
    for (int i = 0; i < NC; i++) send_image(i, 1'b0);
    pix_valid = 0;
    wait (n_res_g == NC);
    @(negedge clk);
    $display("Processing time of %0d pictures: %0d ns (%0d cycles)",
             NC, (res_cyc[NC-1] - first_cyc[0]) * CLK_NS, res_cyc[NC-1] - first_cyc[0]);
    checks++;
    if (res_cyc[0] - first_cyc[0] != 789) begin
      failures++; $display("latency %0d cycles, expected 789", res_cyc[0] - first_cyc[0]);
    end
    for (int i = 1; i < NC; i++) begin
      checks++;
      if (res_cyc[i] - res_cyc[i-1] != 785 || first_cyc[i] - first_cyc[i-1] != 785) begin
        failures++; $display("image %0d: period %0d cycles, expected 785", i, res_cyc[i] - res_cyc[i-1]);
      end
    end
    checks++;
    if ((res_cyc[NC-1] - first_cyc[0]) * CLK_NS != 157080) begin
      failures++; $display("ten images took %0d ns, expected 157080", (res_cyc[NC-1] - first_cyc[0]) * CLK_NS);
    end

    // part 2: the same kind of images from a source that pauses
    repeat (5) @(posedge clk); #1;
    for (int i = NC; i < NIMG; i++) send_image(i, 1'b1);
    pix_valid = 0;
    repeat (800) @(posedge clk);

    checks++;
    if (n_res_g != NIMG || n_res_b != NIMG) begin
      failures++; $display("results: %0d grayscale, %0d binary, expected %0d", n_res_g, n_res_b, NIMG);
    end
    $display("Classification rate vs. labels: grayscale %0d/%0d, binary %0d/%0d",
             correct_g, NIMG, correct_b, NIMG);
    $display("bias cycles %0d, overlapped cycles %0d, source stalls %0d", cnt_bias, cnt_overlap, cnt_stall);
    checks++;
    if (cnt_bias < NIMG) begin failures++; $display("bias cycle missing"); end
    checks++;
    if (cnt_overlap < 4 * (NC - 1)) begin failures++; $display("comparison never overlapped the next image"); end
    checks++;
    if (cnt_stall == 0) begin failures++; $display("source never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
