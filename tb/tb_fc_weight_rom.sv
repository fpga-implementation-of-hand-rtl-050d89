// tb_fc_weight_rom: loads all 160 words, then checks random reads, which
// must appear one clock after the address.
module tb_fc_weight_rom;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  fx_t wdata, rdata;
  int model [160];
  fc_weight_rom dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 160; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); model[i] = int'($urandom_range(511)) - 256; wdata = fx_t'(model[i]);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 400; n++) begin
      int a;
      a = int'($urandom_range(159));
      @(negedge clk); raddr = 8'(a);
      @(negedge clk); raddr = 8'((a + 1) % 160);
      #1;
      checks++;
      if (int'(rdata) != model[a]) begin
        failures++;
        $display("addr %0d got %0d exp %0d", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
