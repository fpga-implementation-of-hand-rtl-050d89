// fm_ram: one feature-map RAM, DEPTH locations of 9 bits (16 by default).
//
// One synchronous write port and one asynchronous read port, the shape of a
// small distributed (LUT) RAM. 147 of these hold the 2352 feature-map values
// so that 147 of them can be read in the same cycle.
module fm_ram
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = FM_DEPTH
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
  end

  assign rdata = mem[raddr];
endmodule
