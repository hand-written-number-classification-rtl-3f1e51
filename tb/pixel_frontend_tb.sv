// pixel_frontend_tb: exhaustive check of the pixel width reduction and the
// binarisation threshold over all 1024 possible 10-bit inputs. The expected
// values are the low eight bits of the input and (input > 128).
module pixel_frontend_tb;
  logic [9:0] pix_in;
  logic [7:0] pix_gray;
  logic       pix_bin;
  int checks = 0, failures = 0;
  int ones = 0;

  pixel_frontend dut (.pix_in, .pix_gray, .pix_bin);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      pix_in = 10'(v);
      #1;
      checks++;
      if (pix_gray != 8'(v % 256)) begin
        failures++;
        $display("gray mismatch in=%0d got=%0d", v, pix_gray);
      end
      checks++;
      if (pix_bin != (v > 128)) begin
        failures++;
        $display("bin mismatch in=%0d got=%0d", v, pix_bin);
      end
      if (pix_bin) ones++;
    end
    checks++;
    if (ones != 1024 - 129) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
