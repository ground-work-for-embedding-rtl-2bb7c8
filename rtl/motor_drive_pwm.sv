// Sinusoidal PWM for the three-phase inverter.
//
// A two's complement up/down counter at 60 MHz forms a triangular carrier from 0
// up to +CARRIER_PEAK, down to -CARRIER_PEAK and back to 0: 4*CARRIER_PEAK clocks,
// 10 kHz for the default 1500. Each phase reference (Q1.16, 1.0 = carrier peak) is
// scaled to carrier counts and compared with the carrier; the high-side gate is on
// while the reference is above the carrier and the low-side gate is its plain
// complement (no dead time is inserted here). FRAME_CONTROL_MOD restarts the
// carrier at 0 counting up, which puts the carrier's positive zero crossing on the
// current sampling instants and pulls the carrier back in phase if it drifted.
// Gates are registered: they follow the carrier and references by one clock.
// Carrier shape and frequency follow the design description; the reference scaling
// and the gate polarity are this design's choice.
module motor_drive_pwm
  import foc_pkg::*;
#(
  parameter int unsigned CARRIER_PEAK = 1500
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_control_mod,
  input  volt_t              v_abc [3],
  output logic [2:0]         gate_h,
  output logic [2:0]         gate_l,
  output logic signed [11:0] carrier,
  output logic               resync
);
  localparam logic signed [47:0] PEAK_S = 48'(CARRIER_PEAK);

  logic up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier <= '0;
      up      <= 1'b1;
      resync  <= 1'b0;
    end else begin
      resync <= frame_control_mod && !(carrier == -12'sd1 && up);
      if (frame_control_mod) begin
        carrier <= '0;
        up      <= 1'b1;
      end else if (up) begin
        if (carrier == 12'(CARRIER_PEAK) - 12'sd1) up <= 1'b0;
        carrier <= carrier + 12'sd1;
      end else begin
        if (carrier == -12'(CARRIER_PEAK) + 12'sd1) up <= 1'b1;
        carrier <= carrier - 12'sd1;
      end
    end
  end

  // reference in carrier counts: v * CARRIER_PEAK / 2^16
  logic signed [31:0] ref_cnt [3];
  always_comb
    for (int p = 0; p < 3; p++)
      ref_cnt[p] = 32'((48'(v_abc[p]) * PEAK_S) >>> 16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_h <= '0;
      gate_l <= '0;
    end else begin
      for (int p = 0; p < 3; p++) begin
        gate_h[p] <= (ref_cnt[p] > 32'(carrier));
        gate_l[p] <= !(ref_cnt[p] > 32'(carrier));
      end
    end
  end

endmodule
