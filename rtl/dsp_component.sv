// DSP component: all fabric math between the ADC interface and the motor PWM.
//
// Per 40 kHz sample: the resolver terms run through the RDC tracking loop
// (speed, position); one shared sine/cosine evaluator serves first the RDC angle
// (P2, n = 1) and then the electrical angle (n * P1, n = POLE_PAIRS); the phase
// currents are turned into Id, Iq; omega, Id and Iq are offered to the
// microcontroller over APB with an interrupt; when it has written back Vd and Vq
// they are turned into Va, Vb, Vc for the motor PWM. dsp_control enables every
// step. The lookup tables sit outside this block (lut_addr / lut_sin / lut_cos,
// one clock read latency).
// if_rst_n resets the APB register block (interface reset), rst_n the rest
// (math reset). Event outputs (tri_done, v_sat, wrapped) are one-clock pulses
// brought out for observation.
// The structure follows the DSP component of the design description; the
// sharing of one evaluator by an angle select is this design's choice.
module dsp_component
  import foc_pkg::*;
#(
  parameter int unsigned POLE_PAIRS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              if_rst_n,
  input  adc_code_t         sin_code,
  input  adc_code_t         cos_code,
  input  adc_code_t         ia_code,
  input  adc_code_t         ib_code,
  input  logic              frame_mc,
  input  logic              i_ready,
  input  logic              exc_positive,
  output logic [LUT_AW-1:0] lut_addr,
  input  trig_t             lut_sin,
  input  trig_t             lut_cos,
  input  apb_req_t          apb_req,
  output apb_rsp_t          apb_rsp,
  output volt_t             v_abc [3],
  output logic              irq,
  output speed_t            omega,
  output pos_t              position,
  output cur_t              id,
  output cur_t              iq,
  output logic              tri_done,
  output logic              v_sat,
  output logic              wrapped,
  output logic [4:0]        ctl_state
);
  dsp_ctl_t ctl;
  trig_t    sin_t, cos_t;
  pos_t     p1, p2;
  volt_t    vd, vq;
  logic     u_f_completed, f_u_completed;
  logic     tri_busy;
  logic signed [17:0] x1;

  dsp_control u_ctl (
    .clk, .rst_n, .frame_mc, .i_ready, .tri_done,
    .f_u_completed, .u_f_completed, .ctl, .irq, .state_o(ctl_state));

  trig_eval u_tri (
    .clk, .rst_n, .start(ctl.en_tri),
    .theta (ctl.tri_sel ? p1 : p2),
    .n_mult(ctl.tri_sel ? 4'(POLE_PAIRS) : 4'd1),
    .lut_addr, .lut_sin, .lut_cos,
    .sin_out(sin_t), .cos_out(cos_t), .done(tri_done), .busy(tri_busy));

  rdc_dsp u_rdc (
    .clk, .rst_n, .sin_code, .cos_code, .exc_positive,
    .sin_p(sin_t), .cos_p(cos_t),
    .en_shuffle(ctl.en_shuffle), .en_stage1(ctl.en_stage1), .en_stage2(ctl.en_stage2),
    .en_stage3(ctl.en_stage3), .en_stage4(ctl.en_stage4),
    .omega, .p1, .p2, .x1, .v_sat, .wrapped);

  abc_dq u_abc_dq (
    .clk, .rst_n, .ia_code, .ib_code, .sin_e(sin_t), .cos_e(cos_t),
    .en_load(ctl.abc_load), .en_stage1(ctl.stage1_a), .en_stage2(ctl.stage2_a),
    .id, .iq);

  fabric_transactions u_xact (
    .clk, .rst_n(if_rst_n), .apb_req, .apb_rsp,
    .load(ctl.out_load), .omega_in(omega), .id_in(id), .iq_in(iq),
    .vd, .vq, .u_f_completed, .f_u_completed);

  dq_abc u_dq_abc (
    .clk, .rst_n, .vd, .vq, .sin_e(sin_t), .cos_e(cos_t),
    .en_load(ctl.dq_load), .en_stage1(ctl.stage1_b), .en_stage2(ctl.stage2_b),
    .v_abc);

  assign position = p1;

  // the evaluator is never restarted while it works
  a_tri_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
      ctl.en_tri |-> !tri_busy)
    else $error("trigonometric evaluator started while busy");

endmodule
