// conv_layer: the convolutional stage, 3 kernels of 3x3 over the image.
//
// Nine conv_pe instances, one per kernel tap, receive the nine pixels of a
// 3x3 image window together with that tap's weight in each kernel. In one
// clock cycle they produce the nine terms of one output pixel of one kernel;
// the terms are summed, saturated to 9 bits and passed through the ReLU.
// Stepping ksel through 0,1,2 on three consecutive cycles with the same
// window gives the pixel [x,y] of all three feature maps, so the stage
// yields one feature-map value per clock.
//
// Interface: win[t] is the pixel under tap t, t = 3*row_offset + col_offset
// (row 0 is the upper row of the window). w[k][t] is tap t of kernel k.
// in_valid/in_tag accompany a window; out_valid/out_tag/out_val leave
// LATENCY = 2 cycles later (register after the PEs, register after the
// sum and ReLU). The pipeline registers are this design's choice.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int unsigned TAGW = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [TAGW-1:0] in_tag,
  input  logic [1:0]      ksel,
  input  fx_t             win [KTAPS],
  input  fx_t             w   [NKER][KTAPS],
  input  fx_t             b   [NKER],
  input  fx_t             c,
  input  fx_t             v,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output fx_t             out_val
);
  localparam int unsigned SUMW = DW + 4;

  fx_t pe_y   [KTAPS];
  fx_t pe_q   [KTAPS];
  logic            v1;
  logic [TAGW-1:0] tag1;

  for (genvar t = 0; t < KTAPS; t++) begin : g_pe
    fx_t w_tap [NKER];
    for (genvar k = 0; k < NKER; k++) begin : g_w
      assign w_tap[k] = w[k][t];
    end
    conv_pe u_pe (
      .pixel (win[t]),
      .w     (w_tap),
      .b     (b),
      .c     (c),
      .v     (v),
      .ksel  (ksel),
      .y     (pe_y[t])
    );
  end

  // Stage 1: register the PE outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      tag1 <= '0;
      for (int t = 0; t < KTAPS; t++) pe_q[t] <= '0;
    end else begin
      v1   <= in_valid;
      tag1 <= in_tag;
      for (int t = 0; t < KTAPS; t++) pe_q[t] <= pe_y[t];
    end
  end

  // Stage 2: sum of the nine terms, 9-bit saturation, ReLU.
  logic signed [SUMW-1:0] sum;
  fx_t sum_sat, act;

  adder_tree #(.N(KTAPS), .IW(DW), .OW(SUMW)) u_sum (.in(pe_q), .sum(sum));
  assign sum_sat = sat(32'(sum));
  relu u_relu (.x(sum_sat), .y(act));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_val   <= '0;
    end else begin
      out_valid <= v1;
      out_tag   <= tag1;
      out_val   <= act;
    end
  end
endmodule
