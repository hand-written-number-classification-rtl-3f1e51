// argmax_tree_tb: feeds a new set of ten signed scores every cycle (random
// values, sets with ties, all-equal sets, extreme values) and checks that
// each result appears exactly four cycles later with the index of the
// largest score, the lowest such index on ties, and that score's value.
module argmax_tree_tb;
  localparam int N = 10;
  localparam int NSETS = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [31:0] scores [N];
  logic out_valid;
  logic [3:0] max_idx;
  logic signed [31:0] max_val;

  int checks = 0, failures = 0;
  int cycle = 0;

  logic signed [31:0] exp_val [$];
  int                 exp_idx [$];
  int                 exp_cyc [$];
  int                 ties = 0;

  argmax_tree dut (.clk, .rst_n, .in_valid, .scores, .out_valid, .max_idx, .max_val);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NSETS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: linear scan, strict > keeps the lowest index on ties
  task automatic ref_max(output int idx, output logic signed [31:0] val);
    idx = 0; val = scores[0];
    for (int i = 1; i < N; i++)
      if (scores[i] > val) begin idx = i; val = scores[i]; end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_idx.size() == 0) begin
        failures++; $display("unexpected result");
      end else begin
        int ei, ec; logic signed [31:0] ev;
        ei = exp_idx.pop_front(); ev = exp_val.pop_front(); ec = exp_cyc.pop_front();
        if (max_idx != 4'(ei) || max_val != ev || cycle - ec != 4) begin
          failures++;
          $display("mismatch: idx %0d/%0d val %0d/%0d latency %0d", max_idx, ei, max_val, ev, cycle - ec);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    foreach (scores[i]) scores[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int s = 0; s < NSETS; s++) begin
      int mode, ei; logic signed [31:0] ev;
      mode = s % 5;
      for (int i = 0; i < N; i++) begin
        case (mode)
          0: scores[i] = $signed($urandom);
          1: scores[i] = $signed($urandom_range(0, 6)) - 3;            // many ties
          2: scores[i] = 32'sd7;                                      // all equal
          3: scores[i] = (i == s % N) ? 32'sh7fffffff : -32'sh80000000 + i;
          default: scores[i] = $signed($urandom_range(0, 2000)) - 1000;
        endcase
      end
      if (mode == 1 || mode == 2) ties++;
      in_valid = (s % 7 != 6);   // a few idle cycles in the stream
      ref_max(ei, ev);
      if (in_valid) begin
        exp_idx.push_back(ei); exp_val.push_back(ev); exp_cyc.push_back(cycle);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_idx.size() != 0) begin failures++; $display("%0d results missing", exp_idx.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
