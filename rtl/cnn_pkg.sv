// cnn_pkg: sizes, the 9-bit fixed-point type and its arithmetic, shared by
// every module of the handwritten-digit CNN.
//
// All data (pixels, weights, biases, feature-map values, scores) are 9-bit
// two's-complement fixed-point numbers. The 9-bit width is the design's
// defining choice; the split into 2 integer bits (sign included) and 7
// fraction bits, range [-2, 2) with a step of 1/128, is this design's own.
// A product of two 9-bit values is truncated to 9 bits: the 7 low fraction
// bits are dropped (rounding toward minus infinity) and the result is
// saturated to the 9-bit range. Sums are formed at full width and saturated
// to 9 bits where they are stored.
package cnn_pkg;

  // Number format
  localparam int unsigned DW   = 9;   // data width, all operands
  localparam int unsigned FRAC = 7;   // fraction bits

  // Network geometry
  localparam int unsigned IMG      = 28;             // image is IMG x IMG
  localparam int unsigned NKER     = 3;              // convolution kernels
  localparam int unsigned KTAPS    = 9;              // 3x3 kernel taps = PEs
  localparam int unsigned NCLASS   = 10;             // digits 0..9
  localparam int unsigned FM_LEN   = NKER*IMG*IMG;   // 2352-element vector
  localparam int unsigned LANES    = 147;            // parallel FC multipliers
  localparam int unsigned FM_DEPTH = FM_LEN/LANES;   // 16 locations per RAM

  typedef logic signed [DW-1:0] fx_t;

  localparam fx_t FX_MAX = fx_t'((1 << (DW-1)) - 1);
  localparam fx_t FX_MIN = fx_t'(-(1 << (DW-1)));

  // Saturate a wide signed value to the 9-bit range.
  function automatic fx_t sat(input logic signed [31:0] x);
    if (x > 32'(signed'(FX_MAX)))      return FX_MAX;
    else if (x < 32'(signed'(FX_MIN))) return FX_MIN;
    else                               return fx_t'(x);
  endfunction

  // 9x9 multiply, result truncated back to 9 bits.
  function automatic fx_t mul_trunc(input fx_t a, input fx_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return sat(32'(p >>> FRAC));
  endfunction

endpackage
