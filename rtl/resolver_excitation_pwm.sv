// Resolver excitation PWM and fabric frame reference.
//
// A 60 MHz counter runs through PERIOD_CLKS = 6000 counts, one 10 kHz excitation
// period. Comparators against the ten selective-harmonic-elimination switching
// angles (alpha_1..alpha_10 in the first quarter period, converted to counts as
// round(alpha * PERIOD_CLKS / (2*pi))) set the output level: high from 0 to
// alpha_1, toggling at each angle, mirrored in the second quarter and inverted in
// the second half. This removes harmonics 3 to 19 so that a simple filter leaves
// a 10 kHz sine. The output is unipolar (0/1).
//
// The same counter is the timing reference of the fabric:
//   frame_adc         FRAME_ADC, high except for one SCLK period (4 clocks)
//                     ending at count ADC_FRAME_START; the ADC interface restarts
//                     its S1..S3 sequence there, so the resolver terms are sampled
//                     at 45, 135, 225 and 315 degrees of the excitation.
//   frame_control_mod FRAME_CONTROL_MOD, a one-clock pulse at count CARRIER_SYNC
//                     that restarts the motor PWM carrier so its positive zero
//                     crossing falls on the current samples.
//   exc_positive      1 in the positive half of the excitation fundamental; the
//                     RDC uses it as the demodulation sign.
// The switching angles, clock and frequency follow the design description; the
// two frame positions are this design's choice and are checked by the testbench
// of the full fabric. All outputs are decoded from the registered counter.
module resolver_excitation_pwm #(
  parameter int unsigned PERIOD_CLKS     = 6000,
  parameter int unsigned NSW             = 10,
  parameter int unsigned SW_CNT [NSW]    = '{142, 250, 427, 502, 713, 759, 1004, 1029, 1317, 1328},
  parameter int unsigned ADC_FRAME_START = 677,
  parameter int unsigned FRAME_LOW_CLKS  = 4,
  parameter int unsigned CARRIER_SYNC    = 821
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        exc_pwm,
  output logic        exc_positive,
  output logic        frame_adc,
  output logic        frame_control_mod,
  output logic [12:0] phase
);
  localparam int unsigned QTR  = PERIOD_CLKS / 4;
  localparam int unsigned HALF = PERIOD_CLKS / 2;

  logic [12:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (cnt == 13'(PERIOD_CLKS-1)) cnt <= '0;
    else                              cnt <= cnt + 13'd1;
  end

  // Position inside the quarter wave and the half-wave sign.
  logic [12:0] qpos;
  logic        second_half;
  logic        level;

  always_comb begin
    second_half = (cnt >= 13'(HALF));
    if (cnt < 13'(QTR))                 qpos = cnt;
    else if (cnt < 13'(HALF))           qpos = 13'(HALF) - cnt;
    else if (cnt < 13'(HALF + QTR))     qpos = cnt - 13'(HALF);
    else                                qpos = 13'(PERIOD_CLKS) - cnt;
    // one comparator per switching angle; each passed angle toggles the level
    level = 1'b1;
    for (int i = 0; i < int'(NSW); i++)
      if (qpos >= 13'(SW_CNT[i])) level = ~level;
  end

  assign exc_pwm           = level ^ second_half;
  assign exc_positive      = ~second_half;
  assign frame_adc         = !((cnt >= 13'(ADC_FRAME_START - FRAME_LOW_CLKS)) && (cnt < 13'(ADC_FRAME_START)));
  assign frame_control_mod = (cnt == 13'(CARRIER_SYNC));
  assign phase             = cnt;

endmodule
