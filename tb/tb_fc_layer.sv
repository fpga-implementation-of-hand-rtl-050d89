// tb_fc_layer: loads random weights into the 147 weight memories, serves a
// random feature vector from a model of the feature-map RAMs, and checks
// the 10 scores and the run time (done 162 cycles after start). Run 0 uses
// small values; run 1 uses large ones so that the 9-bit saturation of the
// slice sums and of the accumulator is exercised.
module tb_fc_layer;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic [3:0] fm_raddr;
  fx_t fm_rdata [LANES];
  logic wl_we;
  logic [7:0] wl_lane, wl_addr;
  fx_t wl_data;
  fx_t scores [NCLASS];
  int fm [FM_LEN];
  int wt [NCLASS][FM_LEN];
  int sat_events = 0;
  int unsat = 0;

  fc_layer dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
                .fm_raddr(fm_raddr), .fm_rdata(fm_rdata),
                .wl_we(wl_we), .wl_lane(wl_lane), .wl_addr(wl_addr), .wl_data(wl_data),
                .scores(scores));
  always #5 clk = ~clk;

  always_comb
    for (int l = 0; l < LANES; l++) fm_rdata[l] = fx_t'(fm[int'(fm_raddr)*LANES + l]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; wl_we = 0; wl_lane = 0; wl_addr = 0; wl_data = 0;
    for (int j = 0; j < FM_LEN; j++) fm[j] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int lim_f, lim_w, cycles;
      // run 0: sparse weights (one in 64 non-zero) keep most sums in range
      lim_f = (run == 0) ? 127 : 255;
      lim_w = (run == 0) ? 100 : 255;
      for (int j = 0; j < FM_LEN; j++) fm[j] = rnd(0, lim_f);
      for (int o = 0; o < NCLASS; o++)
        for (int j = 0; j < FM_LEN; j++) begin
          wt[o][j] = (run == 0 && $urandom_range(63) != 0) ? 0 : rnd(-lim_w, lim_w);
          @(negedge clk);
          wl_we = 1; wl_lane = 8'(j % LANES); wl_addr = 8'(o*FM_DEPTH + j / LANES);
          wl_data = fx_t'(wt[o][j]);
        end
      @(negedge clk); wl_we = 0;
      start = 1;
      @(negedge clk); start = 0;
      cycles = 0;
      while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != NCLASS*FM_DEPTH + 2) begin
        failures++; $display("run %0d took %0d cycles", run, cycles);
      end
      for (int o = 0; o < NCLASS; o++) begin
        int acc;
        acc = 0;
        for (int a = 0; a < FM_DEPTH; a++) begin
          longint s;
          int ss;
          s = 0;
          for (int l = 0; l < LANES; l++) s += mul9(fm[a*LANES+l], wt[o][a*LANES+l]);
          ss = sat9(s);
          if (longint'(ss) != s) sat_events++;
          if (a == 0) acc = ss;
          else begin
            if (sat9(acc + ss) != acc + ss) sat_events++;
            acc = sat9(acc + ss);
          end
        end
        checks++;
        if (int'(scores[o]) != acc) begin
          failures++; $display("run %0d class %0d got %0d exp %0d", run, o, scores[o], acc);
        end
        if (acc > -256 && acc < 255) unsat++;
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy"); end
    end
    checks++;
    if (sat_events == 0) begin failures++; $display("saturation never exercised"); end
    checks++;
    if (unsat < 5) begin failures++; $display("only %0d scores inside the range", unsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
