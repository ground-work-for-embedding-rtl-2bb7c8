// Sine and cosine of n*theta, evaluated together from the lookup tables.
//
// The angle theta (Q3.35 radians, |theta| < 2*pi) is multiplied by the small
// integer n (1 for the resolver angle, the pole-pair count for the electrical
// angle) and then by 1024/(2*pi). The integer part of the result, taken modulo
// 1024, is the table address K; the next 16 fraction bits are the interpolation
// factor f. With S, C the sine and cosine tables:
//   sin = S(K) + (S(K+1) - S(K)) * f,   cos = C(K) + (C(K+1) - C(K)) * f
// K+1 wraps to 0 after 1023. A negative angle works unchanged because the
// address is taken modulo 1024 from the two's complement product.
// State machine, one state per clock (tables have a one-clock read):
//   S0 idle; on start register n*theta
//   S1 present and register address K
//   S2 register S(K), C(K); present address K+1
//   S3 register S(K+1), C(K+1)
//   S4 register the interpolated results; done pulses in the following clock
// Latency: done is high 5 clocks after start, with sin_out/cos_out valid (Q1.16)
// and held until the next evaluation. Start is ignored while busy.
// The method and the state sequence follow the design description; the widths
// of the interpolation factor and the scale constant are this design's choice.
module trig_eval
  import foc_pkg::*;
#(
  parameter logic [28:0] SCALE_Q20 = 29'd170891319  // 1024/(2*pi) in Q8.20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  pos_t                theta,
  input  logic [3:0]          n_mult,
  output logic [LUT_AW-1:0]   lut_addr,
  input  trig_t               lut_sin,
  input  trig_t               lut_cos,
  output trig_t               sin_out,
  output trig_t               cos_out,
  output logic                done,
  output logic                busy
);
  typedef enum logic [2:0] {S0, S1, S2, S3, S4} tri_state_t;
  tri_state_t state;

  logic signed [43:0] ntheta;      // Q8.35
  logic signed [72:0] prod;        // Q.55
  logic [LUT_AW-1:0]  k_comb, k_q;
  logic [15:0]        f_comb, f_q;
  trig_t              s_k, c_k, s_k1, c_k1;

  assign prod   = 73'(ntheta) * $signed({1'b0, SCALE_Q20});
  assign k_comb = prod[55 +: LUT_AW];
  assign f_comb = prod[39 +: 16];

  assign lut_addr = (state == S1) ? k_comb : k_q + LUT_AW'(1);

  function automatic trig_t interp(trig_t a, trig_t b, logic [15:0] f);
    logic signed [18:0] d;
    logic signed [35:0] p;
    d = 19'(b) - 19'(a);
    p = 36'(d) * $signed({1'b0, f});
    return trig_t'(36'(a) + (p >>> 16));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S0;
      ntheta  <= '0;
      k_q     <= '0;
      f_q     <= '0;
      s_k     <= '0;
      c_k     <= '0;
      s_k1    <= '0;
      c_k1    <= '0;
      sin_out <= '0;
      cos_out <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S0: if (start) begin
              ntheta <= 44'(theta) * $signed({1'b0, n_mult});
              state  <= S1;
            end
        S1: begin
              k_q   <= k_comb;
              f_q   <= f_comb;
              state <= S2;
            end
        S2: begin
              s_k   <= lut_sin;
              c_k   <= lut_cos;
              state <= S3;
            end
        S3: begin
              s_k1  <= lut_sin;
              c_k1  <= lut_cos;
              state <= S4;
            end
        S4: begin
              sin_out <= interp(s_k, s_k1, f_q);
              cos_out <= interp(c_k, c_k1, f_q);
              done    <= 1'b1;
              state   <= S0;
            end
        default: state <= S0;
      endcase
    end
  end

  assign busy = (state != S0);

endmodule
