// Resolver-to-digital converter datapath (tracking loop), one sample per call.
//
// The resolver sine and cosine windings carry sin(P) and cos(P) of the rotor
// angle P, amplitude-modulated by the 10 kHz excitation. Each 40 kHz sample goes
// through four stages, each enabled for one clock by the DSP controller:
//   I   ST = ADCSINE*3/4096 - 1.5, CT = ADCCOSE*3/4096 - 1.5         (Q1.12)
//   II  X1 = MIXER * (cos(P2)*ST - sin(P2)*CT)                      (Q2.15)
//       products Q.28, trimmed by 12 bits to Q1.16, times the mixer
//       gain (Q1.1) to Q2.17, trimmed by 2 bits
//   III V1 = 515.8 X1 + 1951.19 X2 + 116.985 X3 - 1809.49 X4
//            - 491.095 X5 + V2                                      (Q14.3 rad/s)
//       coefficients Q11.6, sum in Q.21, saturated to 18 bits
//   IV  P1 = P2 + V1/40000, wrapped into (-2*pi, 2*pi)              (Q3.35 rad)
//       V1 * 6.5536 (= 2.5e-5 * 2^18, Q3.14) read as Q.35 after a virtual
//       18-bit right shift
// en_shuffle, given before stage I of a new sample, ages the histories
// (X5..X2 <- X4..X1, V2 <- V1, P2 <- P1) and loads the mixer with +MIXER_AMP or
// -MIXER_AMP from the excitation polarity at the sample, which demodulates the
// carrier (the samples fall at +-45 degree points of the excitation).
// sin_p/cos_p are sin(P2), cos(P2) from the trigonometric evaluator and must be
// valid at stage II. v_sat and wrapped are one-clock event flags.
// Stages, formats and coefficients follow the design description; the stage III
// formats, the mixer magnitude 1.5 and its polarity rule are this design's choice.
module rdc_dsp
  import foc_pkg::*;
#(
  parameter logic signed [2:0]  MIXER_AMP = 3'sb011,  // 1.5 in Q1.1
  parameter logic signed [17:0] C1 = 18'sd33011,      // 515.8    in Q11.6
  parameter logic signed [17:0] C2 = 18'sd124876,     // 1951.19
  parameter logic signed [17:0] C3 = 18'sd7487,       // 116.985
  parameter logic signed [17:0] C4 = -18'sd115807,    // -1809.49
  parameter logic signed [17:0] C5 = -18'sd31430,     // -491.095
  parameter logic signed [17:0] DT_Q14 = 18'sd107374  // 6.5536 in Q3.14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  adc_code_t  sin_code,
  input  adc_code_t  cos_code,
  input  logic       exc_positive,
  input  trig_t      sin_p,
  input  trig_t      cos_p,
  input  logic       en_shuffle,
  input  logic       en_stage1,
  input  logic       en_stage2,
  input  logic       en_stage3,
  input  logic       en_stage4,
  output speed_t     omega,
  output pos_t       p1,
  output pos_t       p2,
  output logic signed [17:0] x1,
  output logic       v_sat,
  output logic       wrapped
);
  logic signed [13:0] st, ct;          // Q1.12
  logic signed [2:0]  mixer;           // Q1.1
  logic signed [17:0] xh [2:5];        // X2..X5, Q2.15
  speed_t             v1, v2;

  // ---- stage I
  function automatic logic signed [13:0] to_volts(adc_code_t c);
    return 14'($signed({2'b00, c}) * 14'sd3) - 14'sd6144;
  endfunction

  // ---- stage II
  logic signed [32:0] e28;
  logic signed [17:0] e16;             // Q1.16
  logic signed [20:0] m17;             // Q2.17
  always_comb begin
    e28 = 33'(cos_p * st) - 33'(sin_p * ct);
    e16 = 18'(sat_s(64'(e28 >>> 12), 18));
    m17 = 21'(e16) * 21'(mixer);
  end

  // ---- stage III
  logic signed [41:0] acc21;
  logic signed [63:0] v_wide;
  always_comb begin
    acc21 = 42'(C1 * x1) + 42'(C2 * xh[2]) + 42'(C3 * xh[3])
          + 42'(C4 * xh[4]) + 42'(C5 * xh[5]) + (42'(v2) <<< 18);
    v_wide = 64'(acc21 >>> 18);
  end

  // ---- stage IV
  logic signed [39:0] p_sum;
  always_comb
    p_sum = 40'(p2) + 40'(v1 * DT_Q14);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= '0;
      ct      <= '0;
      mixer   <= MIXER_AMP;
      x1      <= '0;
      for (int i = 2; i <= 5; i++) xh[i] <= '0;
      v1      <= '0;
      v2      <= '0;
      p1      <= '0;
      p2      <= '0;
      v_sat   <= 1'b0;
      wrapped <= 1'b0;
    end else begin
      v_sat   <= 1'b0;
      wrapped <= 1'b0;
      if (en_shuffle) begin
        xh[5] <= xh[4];
        xh[4] <= xh[3];
        xh[3] <= xh[2];
        xh[2] <= x1;
        v2    <= v1;
        p2    <= p1;
        mixer <= exc_positive ? MIXER_AMP : -MIXER_AMP;
      end
      if (en_stage1) begin
        st <= to_volts(sin_code);
        ct <= to_volts(cos_code);
      end
      if (en_stage2)
        x1 <= 18'(m17 >>> 2);
      if (en_stage3) begin
        v1    <= speed_t'(sat_s(v_wide, SPEED_BITS));
        v_sat <= (sat_s(v_wide, SPEED_BITS) != v_wide);
      end
      if (en_stage4) begin
        if (p_sum > 40'(TWO_PI_Q35)) begin
          p1 <= pos_t'(p_sum - 40'(TWO_PI_Q35));
          wrapped <= 1'b1;
        end else if (p_sum < -40'(TWO_PI_Q35)) begin
          p1 <= pos_t'(p_sum + 40'(TWO_PI_Q35));
          wrapped <= 1'b1;
        end else begin
          p1 <= pos_t'(p_sum);
        end
      end
    end
  end

  assign omega = v1;

endmodule
