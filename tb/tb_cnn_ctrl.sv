// tb_cnn_ctrl: checks the issue sequence of the controller (raster scan,
// three kernels per pixel, feature-map lane and location of every issue),
// its 2352-cycle convolution phase, the start of the fully connected layer
// 4 cycles after the last issue, and that `done` waits for both the softmax
// and the classifier, in either order of their completion.
module tb_cnn_ctrl;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic conv_valid, fc_start, fc_done, post_start, sm_done, cls_done;
  logic [4:0] row, col;
  logic [1:0] ksel;
  logic [7:0] tag_lane;
  logic [3:0] tag_addr;
  cnn_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
                .conv_valid(conv_valid), .row(row), .col(col), .ksel(ksel),
                .tag_lane(tag_lane), .tag_addr(tag_addr),
                .fc_start(fc_start), .fc_done(fc_done),
                .post_start(post_start), .sm_done(sm_done), .cls_done(cls_done));
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    start = 0; fc_done = 0; sm_done = 0; cls_done = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int n, gap, waitc;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 0;
      // convolution issues, one per cycle
      while (conv_valid) begin
        int pix, k;
        pix = n / 3; k = n % 3;
        checks++;
        if (int'(row) != pix / 28 || int'(col) != pix % 28 || int'(ksel) != k ||
            int'(tag_lane) != 3*(pix % 49) + k || int'(tag_addr) != pix / 49) begin
          failures++;
          if (failures < 10)
            $display("issue %0d: row %0d col %0d k %0d lane %0d addr %0d", n, row, col, ksel, tag_lane, tag_addr);
        end
        n++;
        @(negedge clk);
      end
      checks++;
      if (n != 3*IMG*IMG) begin failures++; $display("%0d issues", n); end
      gap = 1;
      while (!fc_start && gap < 50) begin @(negedge clk); gap++; end
      checks++;
      if (gap != 4) begin failures++; $display("fc_start %0d cycles after last issue", gap); end
      repeat (20) @(negedge clk);
      checks++;
      if (!busy || done) begin failures++; $display("ended before fc_done"); end
      pulse(fc_done);
      waitc = 0;
      while (!post_start && waitc < 10) begin @(negedge clk); waitc++; end
      checks++;
      if (!post_start) begin failures++; $display("no post_start"); end
      @(negedge clk);
      if (run == 0) begin
        pulse(cls_done);
        repeat (5) @(negedge clk);
        checks++;
        if (done || !busy) begin failures++; $display("done before softmax"); end
        pulse(sm_done);
      end else begin
        pulse(sm_done);
        repeat (3) @(negedge clk);
        checks++;
        if (done || !busy) begin failures++; $display("done before classifier"); end
        pulse(cls_done);
      end
      checks++;
      if (!done) begin failures++; $display("no done"); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
