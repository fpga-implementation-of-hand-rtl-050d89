// cnn_ctrl: sequencer of one image classification.
//
// After `start` it scans the image in raster order (row by row, column by
// column) and, for each pixel, issues three consecutive conv_layer cycles,
// one per kernel (ksel = 0,1,2), so the convolution takes 3*N*N cycles.
// Each issue carries, as its tag, where the result goes in the feature-map
// RAMs: element j = 3*(row*N+col) + ksel of the flattened feature vector,
// stored in RAM j % NLANES at location j / NLANES. With NLANES = 147 = 3*49
// these are lane 3*(pixel % 49) + ksel and location pixel / 49, kept as
// running counters. Once the last result has left the conv_layer pipeline
// (CONV_LAT cycles) it starts the fully connected layer, then, when that
// finishes, the softmax and the classifier in parallel, and ends with a
// one-cycle `done` when both have finished.
//
// The scan order, the feature-vector order and the handshake (start/done
// pulses) are this design's choices.
module cnn_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned N        = IMG,
  parameter int unsigned NLANES   = LANES,
  parameter int unsigned DEPTH    = FM_DEPTH,
  parameter int unsigned CONV_LAT = 2,
  localparam int unsigned RW  = $clog2(N),
  localparam int unsigned LW  = $clog2(NLANES),
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned PPL = NLANES / NKER    // pixels per RAM location
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // convolution issue
  output logic          conv_valid,
  output logic [RW-1:0] row,
  output logic [RW-1:0] col,
  output logic [1:0]    ksel,
  output logic [LW-1:0] tag_lane,
  output logic [AW-1:0] tag_addr,
  // fully connected layer
  output logic          fc_start,
  input  logic          fc_done,
  // softmax and classification
  output logic          post_start,
  input  logic          sm_done,
  input  logic          cls_done
);
  typedef enum logic [2:0] {C_IDLE, C_CONV, C_DRAIN, C_FC, C_POST} cstate_t;
  cstate_t state;

  logic [$clog2(PPL)-1:0]  pix_in_loc;     // pixel % PPL
  logic [$clog2(CONV_LAT+1)-1:0] drain;
  logic sm_seen, cls_seen;

  logic last_pix, last_issue;
  assign last_pix   = (row == RW'(N-1)) && (col == RW'(N-1));
  assign last_issue = last_pix && (ksel == 2'(NKER-1));

  assign conv_valid = (state == C_CONV);
  assign tag_lane   = LW'(NKER) * LW'(pix_in_loc) + LW'(ksel);
  assign busy       = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      row        <= '0;
      col        <= '0;
      ksel       <= '0;
      pix_in_loc <= '0;
      tag_addr   <= '0;
      drain      <= '0;
      fc_start   <= 1'b0;
      post_start <= 1'b0;
      done       <= 1'b0;
      sm_seen    <= 1'b0;
      cls_seen   <= 1'b0;
    end else begin
      fc_start   <= 1'b0;
      post_start <= 1'b0;
      done       <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (start) begin
            state      <= C_CONV;
            row        <= '0;
            col        <= '0;
            ksel       <= '0;
            pix_in_loc <= '0;
            tag_addr   <= '0;
          end
        end
        C_CONV: begin
          if (ksel != 2'(NKER-1)) begin
            ksel <= ksel + 1'b1;
          end else begin
            ksel <= '0;
            // next pixel
            if (col == RW'(N-1)) begin
              col <= '0;
              row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
            if (pix_in_loc == ($clog2(PPL))'(PPL-1)) begin
              pix_in_loc <= '0;
              tag_addr   <= tag_addr + 1'b1;
            end else begin
              pix_in_loc <= pix_in_loc + 1'b1;
            end
          end
          if (last_issue) begin
            state <= C_DRAIN;
            drain <= '0;
          end
        end
        C_DRAIN: begin
          if (drain == ($clog2(CONV_LAT+1))'(CONV_LAT)) begin
            state    <= C_FC;
            fc_start <= 1'b1;
          end else begin
            drain <= drain + 1'b1;
          end
        end
        C_FC: begin
          if (fc_done) begin
            state      <= C_POST;
            post_start <= 1'b1;
            sm_seen    <= 1'b0;
            cls_seen   <= 1'b0;
          end
        end
        C_POST: begin
          if (sm_done)  sm_seen  <= 1'b1;
          if (cls_done) cls_seen <= 1'b1;
          if ((sm_seen || sm_done) && (cls_seen || cls_done)) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
