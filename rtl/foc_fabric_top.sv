// Fabric of a resolver-based field-oriented PMSM drive.
//
// The fabric does the time-critical work of the drive; the microcontroller next
// to it closes the speed and current loops in software over APB. Blocks:
//   resolver_excitation_pwm  10 kHz SHE excitation; master timing reference
//   adc_interface            two external ADCs, resolver and current pairs, 40 kHz
//   dsp_component            RDC loop, sin/cos evaluation, abc<->dq, APB registers
//   trig_lut                 sine and cosine tables loaded by the microcontroller
//   motor_drive_pwm          10 kHz triangular-carrier sinusoidal PWM
//   reset_controller         sequenced release of the four fabric resets
// One 60 MHz clock. The APB port comes from the microcontroller's AHB-Lite to APB
// bridge; it is decoded here by PADDR[31:24]: 0x30 sine table, 0x31 cosine table,
// 0x32 DSP registers (omega, Id, Iq, Vd, Vq); other slots answer with PSLVERR.
// irq tells the microcontroller that omega, Id and Iq of a new sample are ready;
// it answers by reading them and writing Vd, Vq.
// Timing chain: FRAME_ADC aligns the ADC sequence to the excitation, FRAME_MC
// (resolver pair read) starts the DSP sequence, I_ready (current pair read) lets
// it continue, and FRAME_CONTROL_MOD aligns the motor PWM carrier so that its
// positive zero crossing falls on the current samples.
// The observation outputs (position, omega, v_abc, resets, event flags) are the
// values a test setup logs; they are not needed by the drive.
// The set of blocks, their synchronisation signals, the reset domains, the
// 60 MHz clock and the rates follow the design description; the slot decode
// and PSLVERR rule, the default of four pole pairs and the observation outputs
// are this design's choices.
module foc_fabric_top
  import foc_pkg::*;
#(
  parameter int unsigned POLE_PAIRS = 4
) (
  input  logic        clk,
  input  logic        power_on_reset_n,
  input  logic        reset_n_m2f,
  input  logic        pll_lock,
  input  apb_req_t    apb_req,
  output apb_rsp_t    apb_rsp,
  output logic        irq,
  output logic        adc_sclk,
  output logic        adc_cs_n,
  output logic        adc_din,
  input  logic        adc_dout_a,
  input  logic        adc_dout_b,
  output logic        exc_pwm,
  output logic [2:0]  gate_h,
  output logic [2:0]  gate_l,
  output pos_t        position,
  output speed_t      omega,
  output cur_t        id,
  output cur_t        iq,
  output volt_t       v_abc [3],
  output logic signed [11:0] carrier,
  output logic [3:0]  resets_n,      // {control_mod, math, adc_pwm, interface}
  output logic [7:0]  events         // one-clock event flags, see below
);
  logic interface_reset_n, adc_pwm_reset_n, math_reset_n, control_mod_reset_n;
  logic exc_positive, frame_adc, frame_control_mod;
  logic [12:0] exc_phase;
  adc_code_t sin_code, cos_code, ia_code, ib_code;
  logic frame_mc, i_ready, adc_resync, pwm_resync;
  logic ram_init_done;
  logic [LUT_AW-1:0] lut_addr;
  trig_t lut_sin, lut_cos;
  logic tri_done, v_sat, wrapped;
  logic [4:0] ctl_state;
  logic [3:0] rst_state;

  // ---- APB slot decode
  apb_req_t req_lut, req_dsp;
  apb_rsp_t rsp_lut, rsp_dsp;
  wire sel_lut = (apb_req.paddr[31:25] == 7'b0011_000);   // 0x30, 0x31
  wire sel_dsp = (apb_req.paddr[31:24] == 8'h32);

  always_comb begin
    req_lut      = apb_req;
    req_dsp      = apb_req;
    req_lut.psel = apb_req.psel && sel_lut;
    req_dsp.psel = apb_req.psel && sel_dsp;
    if (sel_lut)      apb_rsp = rsp_lut;
    else if (sel_dsp) apb_rsp = rsp_dsp;
    else              apb_rsp = '{prdata: 32'd0, pready: 1'b1,
                                  pslverr: apb_req.psel && apb_req.penable};
  end

  reset_controller u_rst (
    .clk, .power_on_reset_n, .reset_n_m2f, .pll_lock, .ram_init_done,
    .frame_mc, .frame_control_mod,
    .interface_reset_n, .adc_pwm_reset_n, .math_reset_n, .control_mod_reset_n,
    .state_o(rst_state));

  resolver_excitation_pwm u_exc (
    .clk, .rst_n(adc_pwm_reset_n), .exc_pwm, .exc_positive, .frame_adc,
    .frame_control_mod, .phase(exc_phase));

  adc_interface u_adc (
    .clk, .rst_n(adc_pwm_reset_n), .frame_adc,
    .adc_sclk, .adc_cs_n, .adc_din, .adc_dout_a, .adc_dout_b,
    .sin_code, .cos_code, .ia_code, .ib_code, .frame_mc, .i_ready,
    .resync(adc_resync));

  trig_lut u_lut (
    .clk, .rst_n(interface_reset_n), .apb_req(req_lut), .apb_rsp(rsp_lut),
    .addr(lut_addr), .sin_data(lut_sin), .cos_data(lut_cos), .ram_init_done);

  dsp_component #(.POLE_PAIRS(POLE_PAIRS)) u_dsp (
    .clk, .rst_n(math_reset_n), .if_rst_n(interface_reset_n),
    .sin_code, .cos_code, .ia_code, .ib_code, .frame_mc, .i_ready, .exc_positive,
    .lut_addr, .lut_sin, .lut_cos, .apb_req(req_dsp), .apb_rsp(rsp_dsp),
    .v_abc, .irq, .omega, .position, .id, .iq, .tri_done, .v_sat, .wrapped,
    .ctl_state);

  motor_drive_pwm u_pwm (
    .clk, .rst_n(control_mod_reset_n), .frame_control_mod, .v_abc,
    .gate_h, .gate_l, .carrier, .resync(pwm_resync));

  assign resets_n = {control_mod_reset_n, math_reset_n, adc_pwm_reset_n, interface_reset_n};
  // events: 0 frame_mc, 1 i_ready, 2 tri_done, 3 rdc speed saturation,
  //         4 position wrap, 5 ADC resync, 6 carrier resync, 7 frame_control_mod
  assign events = {frame_control_mod, pwm_resync, adc_resync, wrapped, v_sat,
                   tri_done, i_ready, frame_mc};

endmodule
