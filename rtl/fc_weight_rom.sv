// fc_weight_rom: one of the LANES weight memories of the fully connected
// layer, DEPTH = NCLASS*FM_DEPTH = 160 words of 9 bits.
//
// Word (o*FM_DEPTH + a) holds the weight that multiplies feature-vector
// element a*LANES + lane for output class o. Reads are synchronous (one
// clock of latency), the shape of an FPGA block RAM. During inference the
// memory is only read, as a ROM; the trained weights are not part of this
// RTL, so a write port (we, waddr, wdata) fills the memory before use, in
// the role a bitstream initialisation plays on an FPGA.
module fc_weight_rom
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = NCLASS*FM_DEPTH
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  fx_t                      wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output fx_t                      rdata
);
  fx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
