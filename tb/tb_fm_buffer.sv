// tb_fm_buffer: writes all 2352 elements one per clock in a random order of
// lanes, then reads each location and checks all 147 lanes at once.
module tb_fm_buffer;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [7:0] wlane;
  logic [3:0] waddr, raddr;
  fx_t wdata;
  fx_t rdata [LANES];
  int model [16][LANES];
  fm_buffer dut (.clk(clk), .we(we), .wlane(wlane), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; wlane = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < 16; a++)
      for (int l0 = 0; l0 < LANES; l0++) begin
        int l;
        l = (l0 * 37 + a) % LANES;   // visits every lane once per location
        @(negedge clk);
        model[a][l] = int'($urandom_range(511)) - 256;
        we = 1; wlane = 8'(l); waddr = 4'(a); wdata = fx_t'(model[a][l]);
      end
    @(negedge clk); we = 0;
    for (int a = 15; a >= 0; a--) begin
      raddr = 4'(a);
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (int'(rdata[l]) != model[a][l]) begin
          failures++;
          if (failures < 10) $display("loc %0d lane %0d got %0d exp %0d", a, l, rdata[l], model[a][l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
