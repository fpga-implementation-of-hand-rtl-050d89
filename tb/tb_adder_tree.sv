// tb_adder_tree: sums of 147 and of 9 random 9-bit values, including all
// extreme values, against a plain loop sum.
module tb_adder_tree;
  int checks = 0, failures = 0;
  logic signed [8:0]  a147 [147];
  logic signed [16:0] s147;
  logic signed [8:0]  a9 [9];
  logic signed [12:0] s9;
  adder_tree #(.N(147), .IW(9), .OW(17)) dut147 (.in(a147), .sum(s147));
  adder_tree #(.N(9),   .IW(9), .OW(13)) dut9   (.in(a9),   .sum(s9));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 500; n++) begin
      int e147, e9;
      e147 = 0; e9 = 0;
      for (int i = 0; i < 147; i++) begin
        int x;
        x = (n == 0) ? -256 : (n == 1) ? 255 : int'($urandom_range(511)) - 256;
        a147[i] = 9'(x); e147 += x;
      end
      for (int i = 0; i < 9; i++) begin
        int x;
        x = (n == 0) ? -256 : (n == 1) ? 255 : int'($urandom_range(511)) - 256;
        a9[i] = 9'(x); e9 += x;
      end
      #1;
      checks += 2;
      if (int'(s147) != e147) begin failures++; $display("147: got %0d exp %0d", s147, e147); end
      if (int'(s9) != e9)     begin failures++; $display("9: got %0d exp %0d", s9, e9); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
