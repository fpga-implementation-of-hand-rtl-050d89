// adder_tree: sums N signed IW-bit values into one OW-bit value.
//
// Inputs are sign-extended to OW bits and added pairwise in a balanced
// binary tree of ceil(log2 N) levels, missing leaves being zero. The tree is
// stored heap-style: node k has children 2k+1 and 2k+2, the leaves are nodes
// NP2-1 .. 2*NP2-2 and the root, node 0, is the sum. OW must be wide enough
// for the full sum: no saturation happens here, the caller saturates.
// Combinational.
module adder_tree #(
  parameter int unsigned N  = 147,
  parameter int unsigned IW = 9,
  parameter int unsigned OW = IW + $clog2(N)
) (
  input  logic signed [IW-1:0] in [N],
  output logic signed [OW-1:0] sum
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP2    = 1 << LEVELS;

  logic signed [OW-1:0] node [2*NP2-1];

  for (genvar i = 0; i < NP2; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[NP2-1+i] = OW'(in[i]);
    end else begin : g_zero
      assign node[NP2-1+i] = '0;
    end
  end

  for (genvar k = 0; k < NP2-1; k++) begin : g_add
    assign node[k] = node[2*k+1] + node[2*k+2];
  end

  assign sum = node[0];
endmodule
