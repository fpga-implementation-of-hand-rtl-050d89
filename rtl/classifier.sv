// classifier: the classification layer, picks the digit with the largest
// score.
//
// When in_valid is high the index of the largest of the NCL scores is
// registered in class_id and out_valid pulses one cycle later. On equal
// scores the lower index wins (this design's choice). Softmax is monotonic,
// so the largest score is also the largest softmax probability.
module classifier
  import cnn_pkg::*;
#(
  parameter int unsigned NCL = NCLASS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  fx_t                    scores [NCL],
  output logic                   out_valid,
  output logic [$clog2(NCL)-1:0] class_id
);
  logic [$clog2(NCL)-1:0] best_idx;
  fx_t                    best_val;

  always_comb begin
    best_idx = '0;
    best_val = scores[0];
    for (int i = 1; i < NCL; i++) begin
      if (scores[i] > best_val) begin
        best_val = scores[i];
        best_idx = ($clog2(NCL))'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      class_id  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) class_id <= best_idx;
    end
  end
endmodule
