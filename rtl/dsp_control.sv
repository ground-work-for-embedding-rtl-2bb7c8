// Sequencer of the DSP component.
//
// The math of the fabric is split into steps that each take one clock; this
// state machine enables them in the order their data dependencies require.
// It has 19 states, S0 to S18:
//   S0   idle until a resolver sample is ready (FRAME_MC)
//   S1   ENSHUFFLE + ENSTAGEI: age RDC histories, ADC codes to volts
//   S2   ENTRI, angle P2 with n = 1          S3  wait for the evaluation
//   S4   ENSTAGEII (error X1)   S5 ENSTAGEIII (speed)   S6 ENSTAGEIV (position)
//   S7   ENTRI, electrical angle n*P1        S8  wait for the evaluation
//   S9   wait for the current sample (I_ready)
//   S10  capture Ia, Ib   S11 STAGEI_A (Clarke)   S12 STAGEII_A (Park)
//   S13  load omega, Id, Iq for the microcontroller and interrupt it
//   S14  wait for F_U_completed (microcontroller has read its inputs)
//   S15  wait for U_F_completed (microcontroller has written Vd, Vq)
//   S16  capture Vd, Vq   S17 STAGEI_B (inverse Park)   S18 STAGEII_B
// FRAME_MC, I_ready, F_U_completed and U_F_completed are pulses; each sets a
// pending flag so that an event arriving before its wait state is not lost.
// The first two are cleared when their wait is left, the completion flags when
// S13 starts a new exchange; a stale I_ready is also dropped when FRAME_MC
// starts a new pass. With I_ready already pending, the interrupt comes
// 21 clocks after FRAME_MC (two 5-clock trig evaluations included); otherwise
// 4 clocks after I_ready. The last stage strobe comes 3 clocks after
// U_F_completed. irq is a one-clock pulse.
// The state count, the enable signals and the overall order (RDC on FRAME_MC,
// currents on I_ready, voltages on U_F_completed) follow the design description;
// the exact assignment of steps to states and the pending flags are this
// design's choice.
module dsp_control
  import foc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      frame_mc,
  input  logic      i_ready,
  input  logic      tri_done,
  input  logic      f_u_completed,
  input  logic      u_f_completed,
  output dsp_ctl_t  ctl,
  output logic      irq,
  output logic [4:0] state_o
);
  typedef enum logic [4:0] {
    S0, S1, S2, S3, S4, S5, S6, S7, S8, S9,
    S10, S11, S12, S13, S14, S15, S16, S17, S18
  } ctl_state_t;

  ctl_state_t state, nxt;
  logic mc_pend, i_pend, fu_pend, uf_pend;

  wire mc_now = mc_pend || frame_mc;
  wire i_now  = i_pend  || i_ready;
  wire fu_now = fu_pend || f_u_completed;
  wire uf_now = uf_pend || u_f_completed;

  always_comb begin
    nxt = state;
    unique case (state)
      S0:  if (mc_now)   nxt = S1;
      S1:                nxt = S2;
      S2:                nxt = S3;
      S3:  if (tri_done) nxt = S4;
      S4:                nxt = S5;
      S5:                nxt = S6;
      S6:                nxt = S7;
      S7:                nxt = S8;
      S8:  if (tri_done) nxt = S9;
      S9:  if (i_now)    nxt = S10;
      S10:               nxt = S11;
      S11:               nxt = S12;
      S12:               nxt = S13;
      S13:               nxt = S14;
      S14: if (fu_now)   nxt = S15;
      S15: if (uf_now)   nxt = S16;
      S16:               nxt = S17;
      S17:               nxt = S18;
      S18:               nxt = S0;
      default:           nxt = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S0;
      mc_pend <= 1'b0;
      i_pend  <= 1'b0;
      fu_pend <= 1'b0;
      uf_pend <= 1'b0;
    end else begin
      state <= nxt;
      // pending events: a wait state that is left consumes its event
      mc_pend <= (state == S0 && mc_now) ? 1'b0 : mc_now;
      // an I_ready left over from an earlier frame (possible after the ADC
      // sequencer resynchronises) is dropped when a new frame starts, so the
      // currents used are always the ones sampled after this frame's resolver
      // sample
      i_pend  <= ((state == S9 && i_now) || (state == S0 && mc_now)) ? 1'b0 : i_now;
      if (state == S13) begin
        fu_pend <= f_u_completed;
        uf_pend <= u_f_completed;
      end else begin
        fu_pend <= fu_now;
        uf_pend <= uf_now;
      end
    end
  end

  always_comb begin
    ctl            = '0;
    ctl.en_shuffle = (state == S1);
    ctl.en_stage1  = (state == S1);
    ctl.en_tri     = (state == S2) || (state == S7);
    ctl.tri_sel    = (state >= S7);
    ctl.en_stage2  = (state == S4);
    ctl.en_stage3  = (state == S5);
    ctl.en_stage4  = (state == S6);
    ctl.abc_load   = (state == S10);
    ctl.stage1_a   = (state == S11);
    ctl.stage2_a   = (state == S12);
    ctl.out_load   = (state == S13);
    ctl.dq_load    = (state == S16);
    ctl.stage1_b   = (state == S17);
    ctl.stage2_b   = (state == S18);
  end

  assign irq     = (state == S13);
  assign state_o = state;

endmodule
