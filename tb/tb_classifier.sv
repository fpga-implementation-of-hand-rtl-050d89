// tb_classifier: random scores, with forced ties, checked against a first-
// maximum search; class_id and out_valid one cycle after in_valid.
module tb_classifier;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  fx_t scores [NCLASS];
  logic [3:0] class_id;
  classifier dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .scores(scores),
                  .out_valid(out_valid), .class_id(class_id));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    in_valid = 0;
    for (int i = 0; i < NCLASS; i++) scores[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int s [NCLASS];
      int best;
      for (int i = 0; i < NCLASS; i++) begin
        s[i] = int'($urandom_range(511)) - 256;
        if (n % 4 == 0) s[i] = int'($urandom_range(3));   // many ties
      end
      best = 0;
      for (int i = 1; i < NCLASS; i++) if (s[i] > s[best]) best = i;
      @(negedge clk);
      for (int i = 0; i < NCLASS; i++) scores[i] = fx_t'(s[i]);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int i = 0; i < NCLASS; i++) scores[i] = fx_t'(int'($urandom_range(511)) - 256);
      checks += 2;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      if (int'(class_id) != best) begin failures++; $display("got %0d exp %0d", class_id, best); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
