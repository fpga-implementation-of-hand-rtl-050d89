// tb_conv_pe: random operands, including saturating ones, against the
// reference y = mul(sat(mul(w[k], p) + c + b[k]), v).
module tb_conv_pe;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  fx_t pixel, c, v, y;
  fx_t w [NKER];
  fx_t b [NKER];
  logic [1:0] ksel;
  conv_pe dut (.pixel(pixel), .w(w), .b(b), .c(c), .v(v), .ksel(ksel), .y(y));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int iw [NKER];
    int ib [NKER];
    int ip, ic, iv, e;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < NKER; k++) begin
        iw[k] = rnd(-256, 255); ib[k] = rnd(-256, 255);
        w[k] = fx_t'(iw[k]); b[k] = fx_t'(ib[k]);
      end
      ip = rnd(-256, 255); ic = rnd(-256, 255); iv = rnd(-256, 255);
      if (n % 3 == 0) begin ic = rnd(-20, 20); iv = 128; end
      pixel = fx_t'(ip); c = fx_t'(ic); v = fx_t'(iv);
      ksel = 2'(n % 3);
      #1;
      e = mul9(sat9(mul9(iw[n%3], ip) + ic + ib[n%3]), iv);
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("n=%0d k=%0d got %0d expected %0d", n, n%3, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
