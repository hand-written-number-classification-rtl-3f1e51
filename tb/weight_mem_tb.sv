// weight_mem_tb: writes all 10 x 785 entries with random signed 19-bit
// values (plus some out-of-range writes that must be ignored), then reads the
// pixel weights back in the read-ahead fashion the classifier uses: the index
// presented on rd_idx_next before a clock edge must appear on rd_weight for
// every class after it. Also checks the sign extension and the separated
// bias registers, and reads in a random order.
module weight_mem_tb;
  localparam int NC = 10, NP = 784;

  logic clk = 0;
  logic wr_en;
  logic [3:0] wr_class;
  logic [9:0] wr_idx;
  logic signed [18:0] wr_data;
  logic [9:0] rd_idx_next;
  logic signed [23:0] rd_weight [NC];
  logic signed [23:0] bias [NC];

  int checks = 0, failures = 0;
  int model [NC][NP + 1];

  weight_mem dut (.clk, .wr_en, .wr_class, .wr_idx, .wr_data, .rd_idx_next, .rd_weight, .bias);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(int idx);
    rd_idx_next = 10'(idx);
    @(posedge clk); #1;
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (rd_weight[c] != 24'(model[c][idx])) begin
        failures++;
        $display("class %0d idx %0d: read %0d expected %0d", c, idx, rd_weight[c], model[c][idx]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_class = 0; wr_idx = 0; wr_data = 0; rd_idx_next = 0;
    @(posedge clk); #1;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i <= NP; i++) begin
        int v;
        v = int'($urandom_range(0, (1 << 19) - 1)) - (1 << 18);
        if (i == 5) v = -(1 << 18);            // most negative 19-bit value
        if (i == 6) v = (1 << 18) - 1;         // most positive
        model[c][i] = v;
        wr_en = 1; wr_class = 4'(c); wr_idx = 10'(i); wr_data = 19'(v);
        @(posedge clk); #1;
      end
    // writes to a non-existent entry or class must change nothing
    wr_en = 1; wr_class = 4'd3; wr_idx = 10'd900; wr_data = 19'h12345;
    @(posedge clk); #1;
    wr_class = 4'd12; wr_idx = 10'd7; wr_data = 19'h12345;
    @(posedge clk); #1;
    wr_en = 0;
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (bias[c] != 24'(model[c][NP])) begin
        failures++; $display("bias %0d: %0d expected %0d", c, bias[c], model[c][NP]);
      end
    end
    for (int i = 0; i < NP; i++) check_read(i);
    for (int k = 0; k < 500; k++) check_read($urandom_range(0, NP - 1));
    // the bias index reads as zero on the pixel-weight path
    rd_idx_next = 10'(NP);
    @(posedge clk); #1;
    checks++;
    if (rd_weight[0] != 0) begin failures++; $display("bias index read not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
