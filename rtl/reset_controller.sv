// Central, sequenced reset of the fabric.
//
// Four active-low resets ('1' = released) are released in order:
//   interface_reset_n    APB register block and lookup tables       (s1)
//   adc_pwm_reset_n      resolver excitation PWM and ADC interface  (s4)
//   math_reset_n         DSP component, once the tables are loaded  (s6)
//   control_mod_reset_n  motor PWM, in step with FRAME_CONTROL_MOD  (s8)
// States and transitions:
//   s0  all resets asserted; to s1 when POWER_ON_RESET and RESET_N_M2F are high
//   s1  release the interface reset; next clock s2
//   s2  assert the other three; wait for PLL_LOCK
//   s3, s4  (s4 releases the ADC/PWM reset), one clock each
//   s5  wait for RAM_INT_DONE with FRAME_MC low
//   s6  release the math reset; s7 wait for FRAME_CONTROL_MOD
//   s8  release the motor PWM reset; stay while PLL_LOCK is high, back to s2
//       (everything but the interface held in reset again) when it drops
// A low POWER_ON_RESET or RESET_N_M2F resets the controller to s0 at once.
// A reset output keeps the level of the last state that set it.
// The states, conditions and levels follow the design description.
module reset_controller (
  input  logic       clk,
  input  logic       power_on_reset_n,
  input  logic       reset_n_m2f,
  input  logic       pll_lock,
  input  logic       ram_init_done,
  input  logic       frame_mc,
  input  logic       frame_control_mod,
  output logic       interface_reset_n,
  output logic       adc_pwm_reset_n,
  output logic       math_reset_n,
  output logic       control_mod_reset_n,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {s0, s1, s2, s3, s4, s5, s6, s7, s8} rst_state_t;
  rst_state_t state;

  wire ext_rst_n = power_on_reset_n & reset_n_m2f;

  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) begin
      state               <= s0;
      interface_reset_n   <= 1'b0;
      adc_pwm_reset_n     <= 1'b0;
      math_reset_n        <= 1'b0;
      control_mod_reset_n <= 1'b0;
    end else begin
      unique case (state)
        s0: state <= s1;
        s1: begin
              interface_reset_n <= 1'b1;
              state <= s2;
            end
        s2: begin
              adc_pwm_reset_n     <= 1'b0;
              math_reset_n        <= 1'b0;
              control_mod_reset_n <= 1'b0;
              if (pll_lock) state <= s3;
            end
        s3: state <= s4;
        s4: begin
              adc_pwm_reset_n <= 1'b1;
              state <= s5;
            end
        s5: if (ram_init_done && !frame_mc) state <= s6;
        s6: begin
              math_reset_n <= 1'b1;
              state <= s7;
            end
        s7: if (frame_control_mod) state <= s8;
        s8: begin
              control_mod_reset_n <= 1'b1;
              if (!pll_lock) state <= s2;
            end
        default: state <= s0;
      endcase
    end
  end

  assign state_o = state;

endmodule
