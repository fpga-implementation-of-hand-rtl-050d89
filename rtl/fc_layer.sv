// fc_layer: the fully connected layer, a [1 x 2352] by [2352 x 10]
// vector-matrix product done semi-parallel with NLANES = 147 multipliers.
//
// The 2352-element feature vector sits in the 147 feature-map RAMs as 16
// slices of 147 elements (slice a = location a of every RAM). The weight
// matrix is split the same way into 16 sub-matrices of [147 x 10], held in
// 147 weight ROMs. For output class o and slice a, one clock reads slice a
// and the 147 matching weights, multiplies them pairwise (9x9 products
// truncated to 9 bits), sums the 147 products in an adder tree, saturates
// the sum to 9 bits and adds it into a 9-bit saturating accumulator. After
// the 16 slices of class o the accumulator is score o. Classes are taken in
// order 0..9, so a run takes NCL*DEPTH = 160 issue cycles.
//
// Timing: a one-cycle `start` begins a run (ignored while busy). Cycle 0
// issues addresses; the ROM output and the registered RAM slice are ready
// in cycle 1, whose registered products are summed and accumulated in
// cycle 2. `done` pulses for one cycle NCL*DEPTH + 2 cycles after `start`,
// when all scores[] are valid; they hold until the next run ends.
// The slice/class order, the pipeline registers and the 9-bit accumulator
// are this design's choices; there is no bias term.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int unsigned NLANES = LANES,
  parameter int unsigned DEPTH  = FM_DEPTH,
  parameter int unsigned NCL    = NCLASS,
  localparam int unsigned RDEPTH = NCL*DEPTH,
  localparam int unsigned LW     = $clog2(NLANES),
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned RAW    = $clog2(RDEPTH),
  localparam int unsigned CW     = $clog2(NCL)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // feature-map slice read
  output logic [AW-1:0]  fm_raddr,
  input  fx_t            fm_rdata [NLANES],
  // weight loading
  input  logic           wl_we,
  input  logic [LW-1:0]  wl_lane,
  input  logic [RAW-1:0] wl_addr,
  input  fx_t            wl_data,
  // result
  output fx_t            scores [NCL]
);
  localparam int unsigned SUMW = DW + LW + 1;

  // ---------------- issue stage ----------------
  logic          run;
  logic [CW-1:0] cls;
  logic [AW-1:0] slice;
  logic          last_issue;

  assign last_issue = (cls == CW'(NCL-1)) && (slice == AW'(DEPTH-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      cls   <= '0;
      slice <= '0;
    end else if (!run) begin
      if (start) begin
        run   <= 1'b1;
        cls   <= '0;
        slice <= '0;
      end
    end else begin
      if (last_issue) run <= 1'b0;
      if (slice == AW'(DEPTH-1)) begin
        slice <= '0;
        cls   <= cls + 1'b1;
      end else begin
        slice <= slice + 1'b1;
      end
    end
  end

  logic [RAW-1:0] rom_raddr;
  assign fm_raddr  = slice;
  assign rom_raddr = RAW'(cls) * RAW'(DEPTH) + RAW'(slice);

  // ---------------- weight ROMs ----------------
  fx_t rom_q [NLANES];
  for (genvar l = 0; l < NLANES; l++) begin : g_rom
    fc_weight_rom #(.DEPTH(RDEPTH)) u_rom (
      .clk   (clk),
      .we    (wl_we && (wl_lane == LW'(l))),
      .waddr (wl_addr),
      .wdata (wl_data),
      .raddr (rom_raddr),
      .rdata (rom_q[l])
    );
  end

  // ---------------- stage 1: operands aligned ----------------
  fx_t           fm_q [NLANES];
  logic          v1, first1, last1;
  logic [CW-1:0] cls1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; cls1 <= '0;
      for (int l = 0; l < NLANES; l++) fm_q[l] <= '0;
    end else begin
      v1     <= run;
      first1 <= (slice == '0);
      last1  <= (slice == AW'(DEPTH-1));
      cls1   <= cls;
      for (int l = 0; l < NLANES; l++) fm_q[l] <= fm_rdata[l];
    end
  end

  // ---------------- stage 2: products registered ----------------
  fx_t           prod_q [NLANES];
  logic          v2, first2, last2, fin2;
  logic [CW-1:0] cls2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0; cls2 <= '0;
      for (int l = 0; l < NLANES; l++) prod_q[l] <= '0;
    end else begin
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      cls2   <= cls1;
      for (int l = 0; l < NLANES; l++) prod_q[l] <= mul_trunc(fm_q[l], rom_q[l]);
    end
  end

  assign fin2 = v2 && last2 && (cls2 == CW'(NCL-1));

  // ---------------- adder tree and accumulation ----------------
  logic signed [SUMW-1:0] tree_sum;
  fx_t slice_sum, acc, acc_next;

  adder_tree #(.N(NLANES), .IW(DW), .OW(SUMW)) u_tree (.in(prod_q), .sum(tree_sum));

  always_comb begin
    slice_sum = sat(32'(tree_sum));
    acc_next  = first2 ? slice_sum : sat(32'(acc) + 32'(slice_sum));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
      for (int o = 0; o < NCL; o++) scores[o] <= '0;
    end else begin
      done <= fin2;
      if (v2) begin
        acc <= acc_next;
        if (last2) scores[cls2] <= acc_next;
      end
    end
  end

  assign busy = run || v1 || v2;
endmodule
