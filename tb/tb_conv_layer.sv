// tb_conv_layer: streams random windows with ksel 0,1,2 through the layer
// and checks each result and its tag exactly 2 cycles later against
// relu(sat(sum over taps of mul(sat(mul(w,p)+c+b), v))).
module tb_conv_layer;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid;
  logic [11:0] in_tag, out_tag;
  logic [1:0] ksel;
  fx_t win [KTAPS];
  fx_t w [NKER][KTAPS];
  fx_t b [NKER];
  fx_t c, v, out_val;
  logic out_valid;
  int iw [NKER][KTAPS];
  int ib [NKER];
  int ic, iv;
  int exp_q [$];
  int tag_q [$];
  int relu_clips = 0;
  conv_layer dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_tag(in_tag), .ksel(ksel),
                  .win(win), .w(w), .b(b), .c(c), .v(v),
                  .out_valid(out_valid), .out_tag(out_tag), .out_val(out_val));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // results must come out exactly two cycles after issue
  int pending [$];   // cycle numbers of issues
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && rst_n) begin
      int e, et, ic0;
      e = exp_q.pop_front(); et = tag_q.pop_front(); ic0 = pending.pop_front();
      checks += 3;
      if (int'(out_val) != e) begin failures++; $display("val got %0d exp %0d", out_val, e); end
      if (int'(out_tag) != et) begin failures++; $display("tag got %0d exp %0d", out_tag, et); end
      if (cyc - ic0 != 2) begin failures++; $display("latency %0d", cyc - ic0); end
    end
    if (in_valid && rst_n) pending.push_back(cyc);
  end
  initial begin
    in_valid = 0; in_tag = 0; ksel = 0; c = 0; v = 0;
    for (int t = 0; t < KTAPS; t++) win[t] = 0;
    for (int k = 0; k < NKER; k++) begin
      ib[k] = rnd(-8, 8); b[k] = fx_t'(ib[k]);
      for (int t = 0; t < KTAPS; t++) begin iw[k][t] = rnd(-128, 127); w[k][t] = fx_t'(iw[k][t]); end
    end
    ic = rnd(-4, 4); iv = rnd(100, 200); c = fx_t'(ic); v = fx_t'(iv);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int ip [KTAPS];
      int k, e;
      longint s;
      @(negedge clk);
      k = n % 3;
      if (k == 0) for (int t = 0; t < KTAPS; t++) begin ip[t] = rnd(0, 255); win[t] = fx_t'(ip[t]); end
      else        for (int t = 0; t < KTAPS; t++) ip[t] = int'(win[t]);
      in_valid = ($urandom_range(4) != 0);
      in_tag = 12'($urandom);
      ksel = 2'(k);
      s = 0;
      for (int t = 0; t < KTAPS; t++) s += mul9(sat9(mul9(iw[k][t], ip[t]) + ic + ib[k]), iv);
      e = sat9(s);
      if (e < 0) begin e = 0; if (in_valid) relu_clips++; end
      if (in_valid) begin exp_q.push_back(e); tag_q.push_back(int'(in_tag)); end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || relu_clips == 0) begin
      failures++; $display("left %0d results, %0d relu clips", exp_q.size(), relu_clips);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
