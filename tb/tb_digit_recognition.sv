// tb_digit_recognition: the whole classifier recognising ten synthetic digit
// images with hand-made weights, at full size.
//
// Each digit 0..9 is drawn on the 28x28 grid as a seven-segment figure with
// strokes two pixels wide (pixel value 100, about 0.78; background 0). The
// set of pixels covered by any segment is the "slot" area.
//
// Convolution parameters: kernel 0 copies the image (centre tap 1.0), kernel
// 1 gives the inverted image, relu(0.77 - pixel) (centre tap -1.0, bias 11
// added by each of the nine PEs), kernel 2 is unused. v = 1.0, c = 0.
// Fully connected weights for class o: on feature map 0, +2/128 on slot
// pixels lit in digit o and -2/128 on slot pixels dark in digit o; on feature
// map 1 the opposite signs; zero elsewhere. Every slot pixel then adds +1 to
// the score of the matching class, so the correct class scores exactly the
// number of slot pixels, and each mismatching pixel costs the others.
//
// Checks, per digit: class_id equals the digit drawn, the score of that class
// equals the slot pixel count, its softmax probability is the largest, and
// the run takes 2532 cycles.
module tb_digit_recognition;
  import cnn_pkg::*;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segments a..g as bits 0..6
  localparam logic [6:0] SEGS [10] = '{
    7'b0111111, 7'b0000110, 7'b1011011, 7'b1001111, 7'b1100110,
    7'b1101101, 7'b1111101, 7'b0000111, 7'b1111111, 7'b1101111};

  // segment s covers pixel (r, c)
  function automatic bit in_seg(input int s, input int r, input int c);
    case (s)
      0: return r >= 3  && r <= 4  && c >= 9  && c <= 18;   // a, top
      1: return r >= 4  && r <= 13 && c >= 17 && c <= 18;   // b, upper right
      2: return r >= 14 && r <= 23 && c >= 17 && c <= 18;   // c, lower right
      3: return r >= 23 && r <= 24 && c >= 9  && c <= 18;   // d, bottom
      4: return r >= 14 && r <= 23 && c >= 9  && c <= 10;   // e, lower left
      5: return r >= 4  && r <= 13 && c >= 9  && c <= 10;   // f, upper left
      default: return r >= 13 && r <= 14 && c >= 9 && c <= 18; // g, middle
    endcase
  endfunction

  function automatic bit lit(input int d, input int r, input int c);
    for (int s = 0; s < 7; s++) if (SEGS[d][s] && in_seg(s, r, c)) return 1;
    return 0;
  endfunction

  function automatic bit slot(input int r, input int c);
    for (int s = 0; s < 7; s++) if (in_seg(s, r, c)) return 1;
    return 0;
  endfunction

  initial begin
    int nslot;
    img_we = 0; fcw_we = 0; start = 0; img_waddr = 0; img_wdata = 0;
    fcw_lane = 0; fcw_addr = 0; fcw_data = 0;
    for (int k = 0; k < NKER; k++) begin
      conv_b[k] = 0;
      for (int t = 0; t < KTAPS; t++) conv_w[k][t] = 0;
    end
    conv_w[0][4] = fx_t'(128);     // identity
    conv_w[1][4] = fx_t'(-128);    // inversion
    conv_b[1]    = fx_t'(11);      // 9 * 11 = 99 after the sum
    conv_c = 0;
    conv_v = fx_t'(128);
    repeat (3) @(negedge clk); rst_n = 1;

    nslot = 0;
    for (int r = 0; r < IMG; r++) for (int c = 0; c < IMG; c++) nslot += slot(r, c);

    // fully connected weights
    for (int o = 0; o < NCLASS; o++)
      for (int j = 0; j < FM_LEN; j++) begin
        int pix, k, r, c, wv;
        pix = j / 3; k = j % 3; r = pix / IMG; c = pix % IMG;
        wv = 0;
        if (slot(r, c) && k == 0) wv = lit(o, r, c) ? 2 : -2;
        if (slot(r, c) && k == 1) wv = lit(o, r, c) ? -2 : 2;
        @(negedge clk);
        fcw_we = 1; fcw_lane = 8'(j % LANES); fcw_addr = 8'(o*FM_DEPTH + j / LANES);
        fcw_data = fx_t'(wv);
      end
    @(negedge clk); fcw_we = 0;

    for (int d = 0; d < 10; d++) begin
      int cycles, pbest;
      for (int r = 0; r < IMG; r++)
        for (int c = 0; c < IMG; c++) begin
          @(negedge clk);
          img_we = 1; img_waddr = 10'(r*IMG + c); img_wdata = fx_t'(lit(d, r, c) ? 100 : 0);
        end
      @(negedge clk); img_we = 0;
      start = 1;
      @(negedge clk); start = 0;
      cycles = 0;
      while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
      pbest = 0;
      for (int o = 1; o < NCLASS; o++) if (probs[o] > probs[pbest]) pbest = o;
      $display("digit %0d: class %0d, scores %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d, p=%0d/256",
               d, class_id, scores[0], scores[1], scores[2], scores[3], scores[4], scores[5],
               scores[6], scores[7], scores[8], scores[9], probs[d]);
      checks += 4;
      if (int'(class_id) != d) begin failures++; $display("digit %0d recognised as %0d", d, class_id); end
      if (int'(scores[d]) != nslot) begin failures++; $display("score %0d, expected %0d", scores[d], nslot); end
      if (pbest != d) begin failures++; $display("largest probability at %0d", pbest); end
      if (cycles != 2532) begin failures++; $display("%0d cycles", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
