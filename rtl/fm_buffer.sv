// fm_buffer: the feature-map store between the convolutional and the fully
// connected layer, LANES RAMs of DEPTH locations (147 x 16 = 2352 values).
//
// Element j of the flattened feature vector lives in RAM j % LANES at
// location j / LANES. The convolution writes one element per clock through
// (we, wlane, waddr, wdata); the fully connected layer reads location raddr
// of all LANES RAMs at once (combinational read), i.e. the vector slice
// j = raddr*LANES .. raddr*LANES+LANES-1.
module fm_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned NLANES = LANES,
  parameter int unsigned DEPTH  = FM_DEPTH
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(NLANES)-1:0] wlane,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  fx_t                       wdata,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output fx_t                       rdata [NLANES]
);
  for (genvar l = 0; l < NLANES; l++) begin : g_ram
    fm_ram #(.DEPTH(DEPTH)) u_ram (
      .clk   (clk),
      .we    (we && (wlane == ($clog2(NLANES))'(l))),
      .waddr (waddr),
      .wdata (wdata),
      .raddr (raddr),
      .rdata (rdata[l])
    );
  end
endmodule
