// relu: rectified linear unit, y = max(0, x), on a 9-bit fixed-point value.
// Combinational. The sign bit of y is therefore always 0; it is kept so that
// the result stays in the common 9-bit format of the data path.
module relu
  import cnn_pkg::*;
(
  input  fx_t x,
  output fx_t y
);
  assign y = x[DW-1] ? fx_t'(0) : x;
endmodule
