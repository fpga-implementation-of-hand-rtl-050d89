// image_buffer: holds the 28x28 input image and presents the 3x3 window
// centred on a chosen pixel.
//
// Pixels are written one per clock through (we, waddr, wdata), waddr being
// row*IMG + col. The window around (row, col) is read combinationally, nine
// pixels at once, as win[3*dr+dc] = image[row+dr-1][col+dc-1]; positions
// outside the image read as zero, so the feature maps keep the 28x28 size
// of the image. The storage is a register array with nine read ports,
// which an FPGA maps to distributed RAM or flip-flops. The buffer
// organisation and the zero padding are this design's choices.
module image_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned N = IMG
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(N*N)-1:0]      waddr,
  input  fx_t                         wdata,
  input  logic [$clog2(N)-1:0]        row,
  input  logic [$clog2(N)-1:0]        col,
  output fx_t                         win [KTAPS]
);
  fx_t mem [N*N];

  always_ff @(posedge clk) begin
    if (we && waddr < ($clog2(N*N))'(N*N)) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int dr = 0; dr < 3; dr++) begin
      for (int dc = 0; dc < 3; dc++) begin
        int r, cc;
        r  = int'(row) + dr - 1;
        cc = int'(col) + dc - 1;
        if (r < 0 || r >= int'(N) || cc < 0 || cc >= int'(N))
          win[3*dr+dc] = '0;
        else
          win[3*dr+dc] = mem[r*N + cc];
      end
    end
  end
endmodule
