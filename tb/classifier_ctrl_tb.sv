// classifier_ctrl_tb: offers pixels with a continuous source and then with a
// random one, and checks the controller cycle by cycle against a reference
// counter: index of each accepted pixel, first/last marks, exactly one
// non-ready (bias) cycle after each 784th pixel, the read-ahead index, and
// the 785-cycle period between images when the source never pauses.
module classifier_ctrl_tb;
  localparam int NP = 784;

  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_ready, acc_valid, acc_first, acc_last, busy;
  logic [9:0] pix_idx, pix_idx_next;

  int checks = 0, failures = 0;
  int cycle = 0;
  int ref_idx = 0;
  bit ref_gap = 0;
  int last_first = -1, periods = 0, bias_cycles = 0;
  bit random_src = 0;

  classifier_ctrl dut (.clk, .rst_n, .pix_valid, .pix_ready, .acc_valid,
    .acc_first, .acc_last, .pix_idx, .pix_idx_next, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive the source after each edge
  always @(posedge clk) begin
    #1;
    pix_valid = random_src ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // compare just before each edge
  always @(negedge clk) begin
    if (rst_n) begin
      int nxt;
      checks++;
      if (pix_ready != !ref_gap || pix_idx != 10'(ref_idx) ||
          acc_valid != (pix_valid && !ref_gap) ||
          acc_first != (ref_idx == 0) || acc_last != (ref_idx == NP - 1) ||
          busy != (ref_idx != 0 || ref_gap)) begin
        failures++;
        $display("cycle %0d: ready=%0d idx=%0d first=%0d last=%0d (ref idx %0d gap %0d)",
                 cycle, pix_ready, pix_idx, acc_first, acc_last, ref_idx, ref_gap);
      end
      nxt = ref_idx;
      if (ref_gap) bias_cycles++;
      if (acc_valid && acc_first) begin
        if (!random_src && last_first >= 0) begin
          checks++; periods++;
          if (cycle - last_first != 785) begin
            failures++; $display("image period %0d, expected 785", cycle - last_first);
          end
        end
        last_first = cycle;
      end
      if (ref_gap) ref_gap = 0;
      else if (pix_valid) begin
        if (ref_idx == NP - 1) begin nxt = 0; ref_gap = 1; end
        else nxt = ref_idx + 1;
      end
      checks++;
      if (pix_idx_next != 10'(nxt)) begin failures++; $display("idx_next %0d expected %0d", pix_idx_next, nxt); end
      ref_idx = nxt;
      cycle++;
    end
  end

  initial begin
    pix_valid = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (785 * 4) @(posedge clk);
    random_src = 1;
    last_first = -1;
    repeat (785 * 8) @(posedge clk);
    checks++;
    if (periods < 3 || bias_cycles < 6) begin failures++; $display("too few images"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
