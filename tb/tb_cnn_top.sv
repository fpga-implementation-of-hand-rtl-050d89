// tb_cnn_top: end-to-end test of the whole classifier at full size.
//
// For each of three runs it loads a random 28x28 image, random convolution
// parameters and a random 2352x10 weight matrix, classifies the image, and
// compares the 10 scores, the 10 softmax probabilities and the class with a
// reference model of the network written here from scratch. It checks the
// run time (2532 cycles from start to done) and counts how often each
// mechanism of the datapath occurred across the runs: zero padding at the
// image border, ReLU clipping, saturation of the convolution sum, saturation
// in the fully connected layer, each of the three kernels. A mechanism that
// never occurred counts as a failure.
module tb_cnn_top;
  import cnn_pkg::*;
  import tb_ref_pkg::*;

  localparam int CYCLES = 2532;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic img_we, fcw_we, start, busy, done;
  logic [9:0] img_waddr;
  fx_t img_wdata, fcw_data, conv_c, conv_v;
  logic [7:0] fcw_lane, fcw_addr;
  fx_t conv_w [NKER][KTAPS];
  fx_t conv_b [NKER];
  fx_t scores [NCLASS];
  logic [8:0] probs [NCLASS];
  logic [3:0] class_id;

  cnn_top dut (.clk(clk), .rst_n(rst_n),
               .img_we(img_we), .img_waddr(img_waddr), .img_wdata(img_wdata),
               .conv_w(conv_w), .conv_b(conv_b), .conv_c(conv_c), .conv_v(conv_v),
               .fcw_we(fcw_we), .fcw_lane(fcw_lane), .fcw_addr(fcw_addr), .fcw_data(fcw_data),
               .start(start), .busy(busy), .done(done),
               .scores(scores), .probs(probs), .class_id(class_id));
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [IMG][IMG];
  int w [NKER][KTAPS];
  int b [NKER];
  int c, v;
  int fm [FM_LEN];
  int wt [NCLASS][FM_LEN];
  int exp_s [NCLASS];
  int n_pad = 0, n_relu = 0, n_conv_sat = 0, n_fc_sat = 0;
  int n_kernel [NKER];

  task automatic reference();
    for (int r = 0; r < IMG; r++)
      for (int cc = 0; cc < IMG; cc++)
        for (int k = 0; k < NKER; k++) begin
          longint s;
          int y;
          bit pad;
          s = 0; pad = 0;
          for (int t = 0; t < KTAPS; t++) begin
            int rr, c2, p;
            rr = r + t/3 - 1; c2 = cc + t%3 - 1;
            if (rr < 0 || rr >= IMG || c2 < 0 || c2 >= IMG) begin p = 0; pad = 1; end
            else p = img[rr][c2];
            s += mul9(sat9(mul9(w[k][t], p) + c + b[k]), v);
          end
          y = sat9(s);
          if (longint'(y) != s) n_conv_sat++;
          if (y < 0) begin y = 0; n_relu++; end
          if (pad) n_pad++;
          n_kernel[k]++;
          fm[3*(r*IMG + cc) + k] = y;
        end
    for (int o = 0; o < NCLASS; o++) begin
      int acc;
      acc = 0;
      for (int a = 0; a < FM_DEPTH; a++) begin
        longint s;
        int ss;
        s = 0;
        for (int l = 0; l < LANES; l++) s += mul9(fm[a*LANES + l], wt[o][a*LANES + l]);
        ss = sat9(s);
        if (longint'(ss) != s) n_fc_sat++;
        if (a == 0) acc = ss;
        else begin
          if (sat9(acc + ss) != acc + ss) n_fc_sat++;
          acc = sat9(acc + ss);
        end
      end
      exp_s[o] = acc;
    end
  endtask

  initial begin
    img_we = 0; fcw_we = 0; start = 0; img_waddr = 0; img_wdata = 0;
    fcw_lane = 0; fcw_addr = 0; fcw_data = 0; conv_c = 0; conv_v = 0;
    for (int k = 0; k < NKER; k++) begin
      conv_b[k] = 0; n_kernel[k] = 0;
      for (int t = 0; t < KTAPS; t++) conv_w[k][t] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;

    for (int run = 0; run < 3; run++) begin
      int cycles, wlim, best, mx;
      longint esum;
      // image: pixel values in [0, 1)
      for (int r = 0; r < IMG; r++)
        for (int cc = 0; cc < IMG; cc++) begin
          img[r][cc] = rnd(0, 127);
          @(negedge clk);
          img_we = 1; img_waddr = 10'(r*IMG + cc); img_wdata = fx_t'(img[r][cc]);
        end
      @(negedge clk); img_we = 0;
      // convolution parameters; run 2 uses large weights so the sum saturates
      wlim = (run == 2) ? 255 : 48;
      for (int k = 0; k < NKER; k++) begin
        b[k] = rnd(-6, 6); conv_b[k] = fx_t'(b[k]);
        for (int t = 0; t < KTAPS; t++) begin w[k][t] = rnd(-wlim, wlim); conv_w[k][t] = fx_t'(w[k][t]); end
      end
      c = rnd(-3, 3); v = rnd(96, 160);
      conv_c = fx_t'(c); conv_v = fx_t'(v);
      // fully connected weights
      for (int o = 0; o < NCLASS; o++)
        for (int j = 0; j < FM_LEN; j++) begin
          // runs 0 and 2: sparse weights, one in 48 non-zero; run 1: dense
          if (run == 1) wt[o][j] = rnd(-120, 120);
          else          wt[o][j] = ($urandom_range(47) == 0) ? rnd(-110, 110) : 0;
          @(negedge clk);
          fcw_we = 1; fcw_lane = 8'(j % LANES); fcw_addr = 8'(o*FM_DEPTH + j / LANES);
          fcw_data = fx_t'(wt[o][j]);
        end
      @(negedge clk); fcw_we = 0;
      reference();

      start = 1;
      @(negedge clk); start = 0;
      cycles = 0;
      while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != CYCLES) begin failures++; $display("run %0d: %0d cycles", run, cycles); end

      for (int o = 0; o < NCLASS; o++) begin
        checks++;
        if (int'(scores[o]) != exp_s[o]) begin
          failures++; $display("run %0d score %0d got %0d exp %0d", run, o, scores[o], exp_s[o]);
        end
      end
      best = 0;
      for (int o = 1; o < NCLASS; o++) if (exp_s[o] > exp_s[best]) best = o;
      checks++;
      if (int'(class_id) != best) begin failures++; $display("run %0d class %0d exp %0d", run, class_id, best); end
      mx = exp_s[best];
      esum = 0;
      for (int o = 0; o < NCLASS; o++) esum += exp_entry(mx - exp_s[o]);
      for (int o = 0; o < NCLASS; o++) begin
        int pe;
        pe = int'((longint'(exp_entry(mx - exp_s[o])) * 256) / esum);
        checks++;
        if (int'(probs[o]) != pe) begin failures++; $display("run %0d p%0d got %0d exp %0d", run, o, probs[o], pe); end
      end
      $display("run %0d: class %0d, scores %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d, %0d cycles", run, class_id,
               scores[0], scores[1], scores[2], scores[3], scores[4], scores[5], scores[6], scores[7],
               scores[8], scores[9], cycles);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end

    $display("mechanisms: border padding %0d, relu clip %0d, conv saturation %0d, fc saturation %0d, kernels %0d/%0d/%0d",
             n_pad, n_relu, n_conv_sat, n_fc_sat, n_kernel[0], n_kernel[1], n_kernel[2]);
    checks += 7;
    if (n_pad == 0)      begin failures++; $display("border padding never happened"); end
    if (n_relu == 0)     begin failures++; $display("relu clipping never happened"); end
    if (n_conv_sat == 0) begin failures++; $display("conv saturation never happened"); end
    if (n_fc_sat == 0)   begin failures++; $display("fc saturation never happened"); end
    for (int k = 0; k < NKER; k++)
      if (n_kernel[k] == 0) begin failures++; $display("kernel %0d never used", k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
