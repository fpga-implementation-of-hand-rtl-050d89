// tb_softmax: random score vectors against floor(e_i*256/sum e_j), with
// e = 65535*(65026/65536)^(max-s_i) computed independently; checks the run
// time (done NCL+1 cycles after start) and that the probabilities sum to
// nearly 256 (1.0).
module tb_softmax;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start, busy, done;
  fx_t scores [NCLASS];
  logic [8:0] probs [NCLASS];
  int etab [512];
  softmax dut (.clk(clk), .rst_n(rst_n), .start(start), .scores(scores), .busy(busy),
               .done(done), .probs(probs));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    start = 0;
    for (int i = 0; i < NCLASS; i++) scores[i] = 0;
    for (int n = 0; n < 512; n++) etab[n] = exp_entry(n);
    // spot values of the table: exp(-1) and exp(-2) in 0.16
    checks += 2;
    if (etab[128] < 24000 || etab[128] > 24250) begin failures++; $display("e^-1 entry %0d", etab[128]); end
    if (etab[256] < 8800  || etab[256] > 8930)  begin failures++; $display("e^-2 entry %0d", etab[256]); end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int s [NCLASS];
      int mx, cycles, psum;
      longint esum;
      for (int i = 0; i < NCLASS; i++) begin
        s[i] = (n % 2 == 0) ? rnd(-256, 255) : rnd(-60, 60);
        scores[i] = fx_t'(s[i]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 0;
      while (!done && cycles < 100) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != NCLASS + 1) begin failures++; $display("took %0d cycles", cycles); end
      mx = s[0];
      for (int i = 1; i < NCLASS; i++) if (s[i] > mx) mx = s[i];
      esum = 0;
      for (int i = 0; i < NCLASS; i++) esum += etab[mx - s[i]];
      psum = 0;
      for (int i = 0; i < NCLASS; i++) begin
        int e;
        e = int'((longint'(etab[mx - s[i]]) * 256) / esum);
        psum += int'(probs[i]);
        checks++;
        if (int'(probs[i]) != e) begin failures++; $display("p[%0d] got %0d exp %0d", i, probs[i], e); end
      end
      checks++;
      if (psum > 256 || psum < 246) begin failures++; $display("probabilities sum to %0d", psum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
