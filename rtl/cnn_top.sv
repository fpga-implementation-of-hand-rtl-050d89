// cnn_top: handwritten-digit classifier for 28x28 images.
//
// Network: one convolutional layer of three 3x3 kernels (with bias, folded
// batch normalisation and ReLU) producing three 28x28 feature maps, a fully
// connected layer from the 2352 feature values to 10 scores, a softmax and
// a classification (argmax). All arithmetic is 9-bit fixed point.
//
// Dataflow: image_buffer -> conv_layer (9 PEs, one feature value per clock)
// -> fm_buffer (147 RAMs x 16) -> fc_layer (147 multipliers, adder tree,
// 16 slices per class) -> softmax and classifier. cnn_ctrl sequences it.
//
// Use: write the 784 pixels through img_*, load the 147 weight memories
// through fcw_* (lane = j % 147, address = class*16 + j / 147 for feature
// element j), hold conv_w/conv_b/conv_c/conv_v stable, pulse `start`.
// `done` pulses when scores, probs and class_id are valid, after
// 3*784 + 4 (convolution and drain) + 162 (fully connected) + 12 (softmax)
// + 2 cycles: CYCLES = 2532 cycles from the start pulse. The loading ports
// and the handshake are this design's own; the image must not be written
// while `busy` is high.
//
// Feature element j = 3*(row*28 + col) + k holds map k at (row, col).
//
// Two assertions check that the image and the weights are not written
// during a run. They are disabled while rst_n is low, so lint tools see
// rst_n sampled synchronously as well; this has no effect on the circuit.
// The busy outputs of fc_layer and softmax are left open on purpose: the
// controller tracks both units through their done pulses.
module cnn_top
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // image loading
  input  logic        img_we,
  input  logic [9:0]  img_waddr,      // row*28 + col
  input  fx_t         img_wdata,
  // convolution parameters
  input  fx_t         conv_w [NKER][KTAPS],
  input  fx_t         conv_b [NKER],
  input  fx_t         conv_c,
  input  fx_t         conv_v,
  // fully connected weight loading
  input  logic        fcw_we,
  input  logic [7:0]  fcw_lane,
  input  logic [7:0]  fcw_addr,
  input  fx_t         fcw_data,
  // control and results
  input  logic        start,
  output logic        busy,
  output logic        done,
  output fx_t         scores [NCLASS],
  output logic [8:0]  probs  [NCLASS],
  output logic [3:0]  class_id
);
  localparam int unsigned TAGW = 8 + 4;

  // controller
  logic       conv_valid, fc_start, fc_done, post_start;
  logic       sm_done, cls_done;
  logic [4:0] row, col;
  logic [1:0] ksel;
  logic [7:0] tag_lane;
  logic [3:0] tag_addr;

  cnn_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .busy       (busy),
    .done       (done),
    .conv_valid (conv_valid),
    .row        (row),
    .col        (col),
    .ksel       (ksel),
    .tag_lane   (tag_lane),
    .tag_addr   (tag_addr),
    .fc_start   (fc_start),
    .fc_done    (fc_done),
    .post_start (post_start),
    .sm_done    (sm_done),
    .cls_done   (cls_done)
  );

  // input image
  fx_t win [KTAPS];
  image_buffer u_img (
    .clk   (clk),
    .we    (img_we),
    .waddr (img_waddr),
    .wdata (img_wdata),
    .row   (row),
    .col   (col),
    .win   (win)
  );

  // convolutional layer
  logic            cv_valid;
  logic [TAGW-1:0] cv_tag;
  fx_t             cv_val;
  conv_layer #(.TAGW(TAGW)) u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (conv_valid),
    .in_tag    ({tag_addr, tag_lane}),
    .ksel      (ksel),
    .win       (win),
    .w         (conv_w),
    .b         (conv_b),
    .c         (conv_c),
    .v         (conv_v),
    .out_valid (cv_valid),
    .out_tag   (cv_tag),
    .out_val   (cv_val)
  );

  // feature-map RAMs
  logic [3:0] fm_raddr;
  fx_t        fm_rdata [LANES];
  fm_buffer u_fm (
    .clk   (clk),
    .we    (cv_valid),
    .wlane (cv_tag[7:0]),
    .waddr (cv_tag[11:8]),
    .wdata (cv_val),
    .raddr (fm_raddr),
    .rdata (fm_rdata)
  );

  // fully connected layer
  fc_layer u_fc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (fc_start),
    .busy     (),
    .done     (fc_done),
    .fm_raddr (fm_raddr),
    .fm_rdata (fm_rdata),
    .wl_we    (fcw_we),
    .wl_lane  (fcw_lane),
    .wl_addr  (fcw_addr),
    .wl_data  (fcw_data),
    .scores   (scores)
  );

  // softmax and classification layer
  softmax u_sm (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (post_start),
    .scores (scores),
    .busy   (),
    .done   (sm_done),
    .probs  (probs)
  );

  classifier u_cls (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (post_start),
    .scores    (scores),
    .out_valid (cls_done),
    .class_id  (class_id)
  );

  // Usage rules: the image and the weights stay unchanged during a run.
  a_no_img_write_busy: assert property (@(posedge clk) disable iff (!rst_n) !(img_we && busy))
    else $error("image written during a classification");
  a_no_fcw_write_busy: assert property (@(posedge clk) disable iff (!rst_n) !(fcw_we && busy))
    else $error("FC weight written during a classification");
endmodule
