// tb_image_buffer: writes a random 28x28 image and checks the 3x3 window,
// zero outside the image, at every pixel position.
module tb_image_buffer;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [9:0] waddr;
  logic [4:0] row, col;
  fx_t wdata;
  fx_t win [KTAPS];
  int img [28][28];
  image_buffer dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .row(row), .col(col), .win(win));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; row = 0; col = 0;
    for (int r = 0; r < 28; r++)
      for (int c = 0; c < 28; c++) begin
        @(negedge clk);
        img[r][c] = int'($urandom_range(511)) - 256;
        we = 1; waddr = 10'(r*28 + c); wdata = fx_t'(img[r][c]);
      end
    @(negedge clk); we = 0;
    for (int r = 0; r < 28; r++)
      for (int c = 0; c < 28; c++) begin
        row = 5'(r); col = 5'(c);
        #1;
        for (int t = 0; t < 9; t++) begin
          int rr, cc, e;
          rr = r + t/3 - 1; cc = c + t%3 - 1;
          e = (rr < 0 || rr > 27 || cc < 0 || cc > 27) ? 0 : img[rr][cc];
          checks++;
          if (int'(win[t]) != e) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) tap %0d got %0d exp %0d", r, c, t, win[t], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
