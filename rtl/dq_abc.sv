// Rotor-frame voltage references back to the three phases.
//
// Vd and Vq (Q1.16, 1.0 = full modulation) from the microcontroller are turned
// into phase references in two pipeline steps, each enabled for one clock by the
// DSP controller after a capture:
//   en_load    capture Vd, Vq
//   en_stage1  inverse Park:   V_alpha = cos(th) Vd - sin(th) Vq
//                              V_beta  = sin(th) Vd + cos(th) Vq
//   en_stage2  inverse Clarke: Va = V_alpha
//                              Vb = -V_alpha/2 + sqrt(3)/2 V_beta
//                              Vc = -V_alpha/2 - sqrt(3)/2 V_beta
// sin_e/cos_e (Q1.16) must be valid at stage 1. Results saturate to 18 bits and
// are held for the motor PWM until the next update.
// The equations and the two-stage split follow the design description; the
// number formats are this design's choice.
module dq_abc
  import foc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  volt_t  vd,
  input  volt_t  vq,
  input  trig_t  sin_e,
  input  trig_t  cos_e,
  input  logic   en_load,
  input  logic   en_stage1,
  input  logic   en_stage2,
  output volt_t  v_abc [3]
);
  localparam logic signed [17:0] SQRT3_2_Q16 = 18'sd56756;

  volt_t vd_q, vq_q, v_alpha, v_beta;

  logic signed [63:0] al_w, be_w, half_al, k_be;
  always_comb begin
    al_w    = (64'(cos_e) * 64'(vd_q) - 64'(sin_e) * 64'(vq_q)) >>> 16;
    be_w    = (64'(sin_e) * 64'(vd_q) + 64'(cos_e) * 64'(vq_q)) >>> 16;
    half_al = 64'(v_alpha) >>> 1;
    k_be    = (64'(SQRT3_2_Q16) * 64'(v_beta)) >>> 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vd_q    <= '0;
      vq_q    <= '0;
      v_alpha <= '0;
      v_beta  <= '0;
      for (int p = 0; p < 3; p++) v_abc[p] <= '0;
    end else begin
      if (en_load) begin
        vd_q <= vd;
        vq_q <= vq;
      end
      if (en_stage1) begin
        v_alpha <= volt_t'(sat_s(al_w, VOLT_BITS));
        v_beta  <= volt_t'(sat_s(be_w, VOLT_BITS));
      end
      if (en_stage2) begin
        v_abc[0] <= v_alpha;
        v_abc[1] <= volt_t'(sat_s(-half_al + k_be, VOLT_BITS));
        v_abc[2] <= volt_t'(sat_s(-half_al - k_be, VOLT_BITS));
      end
    end
  end

endmodule
