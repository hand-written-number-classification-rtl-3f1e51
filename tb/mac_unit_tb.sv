// mac_unit_tb: drives a grayscale and a binary MAC unit with the same stream
// of 784-pixel images (random 24-bit signed weights within the 19-bit range,
// random 8-bit pixels, random bias) and compares each finished score with a
// reference sum computed here. It also checks that the score appears exactly
// 785 cycles after the first pixel, and covers back-to-back images (one idle
// bias cycle between them), gaps inside an image and 32-bit wrap-around.
module mac_unit_tb;
  localparam int NPIX = 784;
  localparam int NIMG = 12;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last;
  logic [7:0] pix_gray;
  logic pix_bin;
  logic signed [23:0] weight, bias;
  logic signed [31:0] score_g, score_b;
  logic sv_g, sv_b;

  int checks = 0, failures = 0;
  int cycle = 0;
  int first_cyc [$];
  longint exp_g [$], exp_b [$];

  mac_unit #(.BINARY(1'b0)) dut_g (.clk, .rst_n, .in_valid, .in_first, .in_last,
    .pix_gray, .pix_bin, .weight, .bias, .score(score_g), .score_valid(sv_g));
  mac_unit #(.BINARY(1'b1)) dut_b (.clk, .rst_n, .in_valid, .in_first, .in_last,
    .pix_gray, .pix_bin, .weight, .bias, .score(score_b), .score_valid(sv_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NIMG * 1000 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && (sv_g || sv_b)) begin
      int fc; longint eg, eb;
      checks++;
      fc = first_cyc.pop_front(); eg = exp_g.pop_front(); eb = exp_b.pop_front();
      if (!(sv_g && sv_b)) begin failures++; $display("variants out of step"); end
      if (score_g != 32'(eg)) begin failures++; $display("gray score %0d expected %0d", score_g, 32'(eg)); end
      if (score_b != 32'(eb)) begin failures++; $display("binary score %0d expected %0d", score_b, 32'(eb)); end
      checks++;
      if (fc >= 0 && cycle - fc != 785) begin
        failures++; $display("latency %0d, expected 785", cycle - fc);
      end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; pix_gray = 0; pix_bin = 0; weight = 0; bias = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int img = 0; img < NIMG; img++) begin
      longint sg, sb;
      sg = 0; sb = 0;
      bias = 24'(int'($urandom_range(0, 1 << 19)) - (1 << 18));
      first_cyc.push_back(img == 3 ? -1 : cycle);
      for (int p = 0; p < NPIX; p++) begin
        // image 3 has idle cycles inside it, so its latency is not fixed
        while (img == 3 && $urandom_range(0, 3) == 0) begin
          in_valid = 0; @(posedge clk); #1;
        end
        in_valid = 1; in_first = (p == 0); in_last = (p == NPIX - 1);
        if (img == 5) begin                 // large values: accumulator wraps
          weight = 24'sh03ffff; pix_gray = 8'hff;
        end else begin
          weight = 24'(int'($urandom_range(0, 1 << 19)) - (1 << 18));
          pix_gray = 8'($urandom);
        end
        pix_bin = (pix_gray > 128);
        sg += longint'(weight) * longint'(pix_gray);
        if (pix_bin) sb += longint'(weight);
        @(posedge clk); #1;
      end
      sg += longint'(bias); sb += longint'(bias);
      exp_g.push_back(sg); exp_b.push_back(sb);
      in_valid = 0; in_first = 0; in_last = 0;
      @(posedge clk); #1;                    // bias cycle
      if (img == 2) repeat (20) @(posedge clk);
      #0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_g.size() != 0) begin failures++; $display("%0d scores missing", exp_g.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
