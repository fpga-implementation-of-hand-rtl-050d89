// tb_fm_ram: fills the 16 locations, reads them back (asynchronous read),
// then rewrites random locations and checks against a model array.
module tb_fm_ram;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [3:0] waddr, raddr;
  fx_t wdata, rdata;
  int model [16];
  fm_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); model[i] = int'($urandom_range(511)) - 256; wdata = fx_t'(model[i]);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      raddr = 4'($urandom_range(15));
      we = ($urandom_range(1) == 1);
      waddr = 4'($urandom_range(15));
      wdata = fx_t'(int'($urandom_range(511)) - 256);
      #1;
      checks++;
      if (int'(rdata) != model[raddr]) begin
        failures++;
        $display("addr %0d got %0d exp %0d", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = int'(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
