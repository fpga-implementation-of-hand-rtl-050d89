// tb_relu: exhaustive check of relu over all 512 input codes.
module tb_relu;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  fx_t x, y;
  relu dut (.x(x), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = -256; i < 256; i++) begin
      int exp_y;
      x = fx_t'(i);
      #1;
      exp_y = (i < 0) ? 0 : i;
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        $display("relu(%0d) = %0d, expected %0d", i, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
