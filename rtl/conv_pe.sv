// conv_pe: one convolutional processing element.
//
// The PE owns one tap position of the 3x3 kernel. Its inputs are the image
// pixel that falls on that tap, the weight of the same tap in each of the
// three kernels, the three kernel biases, an offset c and a scale v. In the
// cycle where kernel `ksel` is processed the PE computes
//     y = trunc( sat( trunc(w[ksel] * pixel) + c + b[ksel] ) * v )
// i.e. a weight multiplexer, a multiplier, a three-input adder fed by a bias
// multiplexer and c, and a second multiplier by v. This is the structure of
// the design's PE (two multiplexers, two multipliers, one adder). c and v
// carry the folded batch-normalisation offset and scale. Because every one
// of the nine PEs adds c and b and the nine results are summed afterwards,
// the values loaded into c and b are one ninth of the offset wanted after
// the sum; that loading convention is this design's own.
//
// Purely combinational; conv_layer registers its output.
module conv_pe
  import cnn_pkg::*;
(
  input  fx_t        pixel,
  input  fx_t        w [NKER],   // same tap of kernels 0..2
  input  fx_t        b [NKER],   // biases of kernels 0..2
  input  fx_t        c,
  input  fx_t        v,
  input  logic [1:0] ksel,       // kernel processed this cycle, 0..2
  output fx_t        y
);
  fx_t w_sel, b_sel, prod, biased;

  always_comb begin
    w_sel  = (ksel < 2'(NKER)) ? w[ksel] : '0;
    b_sel  = (ksel < 2'(NKER)) ? b[ksel] : '0;
    prod   = mul_trunc(w_sel, pixel);
    biased = sat(32'(prod) + 32'(c) + 32'(b_sel));
    y      = mul_trunc(biased, v);
  end
endmodule
