// Phase currents to the rotor (d, q) frame.
//
// The ADC codes of the phase a and b currents are made signed around mid-scale
// (code - 2048, zero current at half the ADC range) and carried in Q11.5. Two
// pipeline steps, each enabled for one clock by the DSP controller, follow a
// capture of the codes:
//   en_load    capture Ia, Ib
//   en_stage1  Clarke:  I_alpha = Ia,  I_beta = (Ia + 2 Ib) / sqrt(3)
//   en_stage2  Park:    Id =  cos(th) I_alpha + sin(th) I_beta
//                       Iq = -sin(th) I_alpha + cos(th) I_beta
// sin_e/cos_e (Q1.16) of the electrical angle must be valid at stage 2. Results
// saturate to 18 bits (Q11.5), the format the microcontroller reads.
// The two-stage split and the equations follow the design description; the
// mid-scale offset, the formats and the saturation are this design's choice.
module abc_dq
  import foc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  adc_code_t  ia_code,
  input  adc_code_t  ib_code,
  input  trig_t      sin_e,
  input  trig_t      cos_e,
  input  logic       en_load,
  input  logic       en_stage1,
  input  logic       en_stage2,
  output cur_t       id,
  output cur_t       iq
);
  localparam logic signed [17:0] INV_SQRT3_Q17 = 18'sd75674;

  logic signed [12:0] ia_s, ib_s;   // ADC counts, Q12.0
  cur_t               i_alpha, i_beta;

  logic signed [63:0] beta_w, d_w, q_w;
  always_comb begin
    beta_w = (64'(ia_s) + 64'(ib_s) * 64'sd2) * 64'(INV_SQRT3_Q17) >>> 12;  // Q.17 -> Q.5
    d_w    = (64'(cos_e) * 64'(i_alpha) + 64'(sin_e) * 64'(i_beta)) >>> 16;
    q_w    = (64'(cos_e) * 64'(i_beta)  - 64'(sin_e) * 64'(i_alpha)) >>> 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ia_s    <= '0;
      ib_s    <= '0;
      i_alpha <= '0;
      i_beta  <= '0;
      id      <= '0;
      iq      <= '0;
    end else begin
      if (en_load) begin
        ia_s <= $signed({1'b0, ia_code}) - 13'sd2048;
        ib_s <= $signed({1'b0, ib_code}) - 13'sd2048;
      end
      if (en_stage1) begin
        i_alpha <= cur_t'(18'(ia_s) <<< 5);
        i_beta  <= cur_t'(sat_s(beta_w, CUR_BITS));
      end
      if (en_stage2) begin
        id <= cur_t'(sat_s(d_w, CUR_BITS));
        iq <= cur_t'(sat_s(q_w, CUR_BITS));
      end
    end
  end

endmodule
