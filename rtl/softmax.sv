// softmax: turns the NCL class scores into probabilities
//     p_i = exp(s_i) / sum_j exp(s_j).
//
// Scores are 9-bit fixed point with FRAC fraction bits. The unit subtracts
// the largest score first, so every exponent is exp(-d) with
// d = (max - s_i) / 2^FRAC in [0, 4), and looks it up in a 512-entry table
// of exp(-d) in unsigned 0.16 format. The table is computed at elaboration
// by repeated multiplication: entry 0 is 65535 and entry n is entry n-1
// times EXP_STEP/65536, with EXP_STEP = round(65536*exp(-1/128)) = 65026.
// The ten looked-up values are summed and each probability is
// p_i = floor(e_i * 256 / sum), an unsigned 9-bit value where 256 means 1.0.
//
// Timing: `start` (one cycle, scores stable until `done`) registers the ten
// exponentials and their sum in the next cycle; the ten divisions follow, one
// per cycle, and `done` pulses with all of probs[] valid NCL+1 cycles after
// start. Only the existence of a softmax layer is the design's; its number
// format, table and sequencing are this implementation's own.
module softmax
  import cnn_pkg::*;
#(
  parameter int unsigned NCL = NCLASS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  fx_t        scores [NCL],
  output logic       busy,
  output logic       done,
  output logic [8:0] probs  [NCL]
);
  localparam int unsigned LUTN     = 1 << DW;     // all differences max - s
  localparam int unsigned EXP_STEP = 65026;       // 65536 * exp(-1/128)

  typedef logic [15:0] lut_t [LUTN];

  function automatic lut_t gen_lut();
    lut_t t;
    logic [31:0] e;
    e = 32'd65535;
    for (int n = 0; n < LUTN; n++) begin
      t[n] = e[15:0];
      e    = (e * EXP_STEP) >> 16;
    end
    return t;
  endfunction

  localparam lut_t EXP_LUT = gen_lut();

  // Largest score and the exponentials, combinational.
  fx_t         mx;
  logic [15:0] e_c [NCL];
  always_comb begin
    mx = scores[0];
    for (int i = 1; i < NCL; i++)
      if (scores[i] > mx) mx = scores[i];
    for (int i = 0; i < NCL; i++)
      e_c[i] = EXP_LUT[DW'(mx - scores[i])];
  end

  localparam int unsigned SW = 16 + $clog2(NCL);

  typedef enum logic [1:0] {S_IDLE, S_EXP, S_DIV} state_t;
  state_t                 state;
  logic [15:0]            e_q [NCL];
  logic [SW-1:0]          esum;
  logic [$clog2(NCL)-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      esum  <= '0;
      idx   <= '0;
      done  <= 1'b0;
      for (int i = 0; i < NCL; i++) begin
        e_q[i]   <= '0;
        probs[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_EXP;
        S_EXP: begin
          logic [SW-1:0] s;
          s = '0;
          for (int i = 0; i < NCL; i++) begin
            e_q[i] <= e_c[i];
            s       = s + SW'(e_c[i]);
          end
          esum  <= s;
          idx   <= '0;
          state <= S_DIV;
        end
        S_DIV: begin
          probs[idx] <= 9'((32'(e_q[idx]) << 8) / 32'(esum));
          if (idx == ($clog2(NCL))'(NCL-1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
