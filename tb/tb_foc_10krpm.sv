// End-to-end test of foc_fabric_top at its default parameters, with the rotor
// at 10000 rpm (1047.2 rad/s mechanical, 4189 rad/s electrical with four pole
// pairs), the speed of the no-load drive test. The bench is the same as the
// 500 rad/s end-to-end test: resolver, motor current and converter models, a
// microcontroller model on the APB bus, a loss of PLL lock at 20 ms, a
// deliberate loss of ADC and PWM synchronisation at 36 ms and a restart by
// RESET_N_M2F at 42 ms. At
// this speed the rotor turns 0.026 rad (0.105 rad electrical) between two
// 40 kHz samples, so the tracking loop, the position wrap-around (about every
// 6 ms) and the predicted angle used by the transforms are all exercised at
// the highest speed the drive is run at. The same checks and mechanism counts
// apply; a mechanism that never occurs is a failure.
module tb_foc_10krpm;
  import foc_pkg::*;
  localparam real PI   = 3.14159265358979;
  localparam real TCLK = 1.0 / 60.0e6;
  localparam real W_ROTOR = 1047.1976;         // rad/s mechanical
  localparam real I_AMP = 500.0, I_PHI = 0.4;  // current model, ADC counts
  localparam real VQ_SET = 0.6;
  localparam int  NPP = 4;
  // the transforms use the electrical angle predicted for the next sample, so
  // the measured current vector appears rotated back by this angle
  localparam real LEAD = NPP * W_ROTOR / 40000.0;

  logic clk = 1'b0;
  always #(1000.0 / 120.0) clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 40 || failures % 50 == 0) $display("FAIL %s at %0t", what, $time);
    end
  endtask
  function automatic real absr(real a); return a < 0.0 ? -a : a; endfunction
  function automatic real wrap(real a);
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  // ---------------------------------------------------------------- DUT
  logic por_n = 1'b0, m2f_n = 1'b1, pll_lock = 1'b0;
  apb_req_t apb_req;
  apb_rsp_t apb_rsp;
  logic irq, sclk, cs_n, din, dout_a, dout_b, exc_pwm;
  logic [2:0] gate_h, gate_l;
  pos_t position;
  speed_t omega;
  cur_t id, iq;
  volt_t v_abc [3];
  logic signed [11:0] carrier;
  logic [3:0] resets_n;
  logic [7:0] events;

  foc_fabric_top dut (
    .clk, .power_on_reset_n(por_n), .reset_n_m2f(m2f_n), .pll_lock, .apb_req, .apb_rsp,
    .irq, .adc_sclk(sclk), .adc_cs_n(cs_n), .adc_din(din), .adc_dout_a(dout_a),
    .adc_dout_b(dout_b), .exc_pwm, .gate_h, .gate_l, .position, .omega, .id, .iq, .v_abc,
    .carrier, .resets_n, .events);

  // ---------------------------------------------------------------- plant
  real theta = 1.0;            // mechanical rotor angle
  logic [11:0] a0, a1, b0, b1; // ADC A: ch0 resolver sine, ch1 Ia; ADC B: cosine, Ib
  logic sp_a, sp_b, sch_a, sch_b;
  logic [11:0] sv_a, sv_b;
  ad7912_model adc_a (.clk, .cs_n, .sclk, .din, .dout(dout_a), .ch0(a0), .ch1(a1),
                      .sample_pulse(sp_a), .sample_ch(sch_a), .sample_val(sv_a));
  ad7912_model adc_b (.clk, .cs_n, .sclk, .din, .dout(dout_b), .ch0(b0), .ch1(b1),
                      .sample_pulse(sp_b), .sample_ch(sch_b), .sample_val(sv_b));

  function automatic logic [11:0] volts(real v);
    return 12'($rtoi(v * 4096.0 / 3.0 + 0.5));
  endfunction
  function automatic logic [11:0] counts(real c);
    return 12'($rtoi(2048.0 + c + 0.5));
  endfunction

  always @(posedge clk) begin
    real ex, te;
    theta <= wrap(theta + W_ROTOR * TCLK);
    // excitation fundamental, in phase with the generator's phase counter
    ex = resets_n[1] ? $sin(2.0 * PI * real'(dut.u_exc.phase) / 6000.0) : 0.0;
    a0 <= volts(1.5 + ex * $sin(theta));
    b0 <= volts(1.5 + ex * $cos(theta));
    te = NPP * theta;
    a1 <= counts(I_AMP * $cos(te + I_PHI));
    b1 <= counts(I_AMP * $cos(te + I_PHI - 2.0 * PI / 3.0));
  end

  // ---------------------------------------------------------------- counters
  int n_mc = 0, n_ir = 0, n_tri = 0, n_wrap = 0, n_adc_rs = 0, n_pwm_rs = 0, n_fcm = 0;
  int n_irq = 0, n_fu = 0, n_uf = 0, n_gate = 0, n_lock_loss = 0, n_handover = 0;
  int n_refused = 0, n_unmapped = 0, n_res_smp = 0, n_cur_smp = 0, n_track = 0, n_idq = 0;
  int n_vabc = 0, n_m2f = 0, n_sync_loss = 0, rs_adc0 = 0, rs_pwm0 = 0;
  bit settled = 1'b0;
  real theta_smp = 0.0;        // rotor angle at the last resolver sample
  logic prev_ch0 = 1'b0;

  // clocks since the control domain left reset; the carrier comes out of reset
  // two clocks behind the frame and is pulled in by the first FRAME_CONTROL_MOD
  int ctl_run = 0;
  always @(posedge clk) ctl_run <= resets_n[3] ? ctl_run + 1 : 0;
  // after a deliberate loss of synchronisation the alignment checks pause
  // until the next excitation period has pulled the block back in
  int quiet = 0;
  always @(posedge clk) if (quiet > 0) quiet <= quiet - 1;

  always @(posedge clk) if (por_n) begin
    if (events[0]) n_mc++;
    if (events[1]) n_ir++;
    if (events[2]) n_tri++;
    if (events[4]) n_wrap++;
    if (events[5]) n_adc_rs++;
    if (events[6]) n_pwm_rs++;
    if (events[7]) n_fcm++;
    if (irq) n_irq++;
    if (dut.u_dsp.f_u_completed) n_fu++;
    if (dut.u_dsp.u_f_completed) n_uf++;
    // sample instants, seen one clock after the CS falling edge: the resolver
    // sample at 45 degrees of each excitation quarter (phase 750 + k*1500),
    // the current sample at a carrier zero or peak, i.e. the middle of the
    // switching pattern (one clock later the carrier is one count away)
    if (sp_a) begin
      if (sch_a == 1'b0) begin
        if (prev_ch0) begin
          n_res_smp++;
          theta_smp = theta;
          if (resets_n[3] && quiet == 0) check((int'(dut.u_exc.phase) % 1500) == 751,
                $sformatf("resolver sample at phase %0d", dut.u_exc.phase));
        end
        prev_ch0 <= 1'b1;
      end else begin
        n_cur_smp++;
        if (ctl_run > 6100 && quiet == 0) check(carrier == 1 || carrier == -1 || carrier == 1499 || carrier == -1499, $sformatf("current sample at carrier %0d", carrier));
        prev_ch0 <= 1'b0;
      end
    end
  end

  // release order of the four reset domains
  always @(posedge clk) if (por_n && m2f_n) begin
    if (resets_n[1]) check(resets_n[0], "ADC/PWM out of reset before interface");
    if (resets_n[2]) check(resets_n[1], "math out of reset before ADC/PWM");
    if (resets_n[3]) check(resets_n[2], "control out of reset before math");
    if (resets_n[2]) check(dut.u_lut.ram_init_done, "math running before tables loaded");
  end

  // gates follow the carrier comparison one clock later; low side complementary
  logic signed [11:0] carrier_q;
  logic signed [11:0] ref_q [3];
  logic gates_live = 1'b0;
  always @(posedge clk) begin
    carrier_q <= carrier;
    for (int p = 0; p < 3; p++)
      ref_q[p] <= 12'((48'(v_abc[p]) * 48'sd1500) >>> 16);
    gates_live <= resets_n[3];
    if (gates_live && resets_n[3]) begin
      for (int p = 0; p < 3; p++) begin
        check(gate_h[p] == (ref_q[p] > carrier_q), "high-side gate vs comparison");
        check(gate_l[p] == !gate_h[p], "low-side gate complementary");
      end
      if (gate_h[0] != $past(gate_h[0])) n_gate++;
    end
  end

  // speed and position tracking, checked at every interrupt once settled
  always @(posedge clk) if (irq && settled) begin
    real w, pe;
    w = real'(omega) / 8.0;
    pe = wrap(real'(position) / 34359738368.0 - (theta_smp + W_ROTOR / 40000.0));
    check(absr(w - W_ROTOR) < 6.0, $sformatf("speed %f", w));
    check(absr(pe) < 0.006, $sformatf("position error %f", pe));
    n_track++;
  end

  // phase voltages after each inverse transform, against the rotor angle
  real vd_w = 0.0, vq_w = 0.0;
  logic abc_next = 1'b0;
  always @(posedge clk) begin
    abc_next <= dut.u_dsp.ctl.stage2_b;
    if (abc_next && settled) begin
      real te, al, be, e[3];
      te = NPP * (theta_smp + W_ROTOR / 40000.0);
      al = vd_w * $cos(te) - vq_w * $sin(te);
      be = vd_w * $sin(te) + vq_w * $cos(te);
      e[0] = al;
      e[1] = -0.5 * al + $sqrt(3.0) / 2.0 * be;
      e[2] = -0.5 * al - $sqrt(3.0) / 2.0 * be;
      for (int p = 0; p < 3; p++)
        check(absr(real'(v_abc[p]) / 65536.0 - e[p]) < 0.04,
              $sformatf("V%0d %f vs %f", p, real'(v_abc[p]) / 65536.0, e[p]));
      n_vabc++;
    end
  end

  // ---------------------------------------------------------------- host
  initial apb_req = '0;
  task automatic apb(input logic [31:0] addr, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd, output bit err);
    @(negedge clk);
    apb_req = '{psel: 1'b1, penable: 1'b0, pwrite: wr, paddr: addr, pwdata: wd};
    @(negedge clk);
    apb_req.penable = 1'b1;
    #1;
    rd = apb_rsp.prdata;
    err = apb_rsp.pslverr;
    @(negedge clk);
    apb_req = '0;
  endtask

  // The host loads the tables whenever the interface domain comes out of
  // reset (the tables are cleared with it), then serves interrupts until the
  // next interface reset.
  initial forever begin
    logic [31:0] rd;
    bit err;
    wait (por_n && m2f_n && resets_n[0]);
    repeat (5) @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      apb(32'h3000_0000 + 32'(4 * k), 1'b1,
          32'($rtoi($floor($sin(2.0 * PI * k / 1024.0) * 65536.0 + 0.5))), rd, err);
      check(!err, "table write accepted");
    end
    check(!dut.u_lut.ram_init_done, "no hand-over before the cosine table");
    for (int k = 0; k < 1024; k++)
      apb(32'h3100_0000 + 32'(4 * k), 1'b1,
          32'($rtoi($floor($cos(2.0 * PI * k / 1024.0) * 65536.0 + 0.5))), rd, err);
    @(negedge clk);
    check(dut.u_lut.ram_init_done, "tables handed over");
    if (dut.u_lut.ram_init_done) n_handover++;
    apb(32'h3000_0010, 1'b1, 32'd5, rd, err);
    check(err, "write after hand-over refused");
    if (err) n_refused++;
    apb(32'h4000_0000, 1'b0, 32'd0, rd, err);
    check(err, "unmapped address gives an error");
    if (err) n_unmapped++;
    while (resets_n[0]) begin
      cur_t id_r, iq_r;
      real vd_new;
      @(posedge irq or negedge resets_n[0]);
      if (!resets_n[0]) break;
      repeat ($urandom_range(10, 200)) @(negedge clk);
      apb(32'h3200_0000, 1'b0, 0, rd, err);
      apb(32'h3200_0004, 1'b0, 0, rd, err); id_r = cur_t'(rd[17:0]);
      check(rd[31:17] == {15{rd[17]}}, "Id read is sign extended");
      apb(32'h3200_0008, 1'b0, 0, rd, err); iq_r = cur_t'(rd[17:0]);
      if (settled) begin
        check(absr(real'(id_r) / 32.0 - I_AMP * $cos(I_PHI - LEAD)) < 10.0,
              $sformatf("Id %f", real'(id_r) / 32.0));
        check(absr(real'(iq_r) / 32.0 - I_AMP * $sin(I_PHI - LEAD)) < 10.0,
              $sformatf("Iq %f", real'(iq_r) / 32.0));
        n_idq++;
      end
      vd_new = real'(id_r) / 32.0 / 4096.0;
      repeat ($urandom_range(1, 100)) @(negedge clk);
      apb(32'h3200_000c, 1'b1, 32'(volt_t'($rtoi(vd_new * 65536.0))), rd, err);
      vd_w = real'(volt_t'($rtoi(vd_new * 65536.0))) / 65536.0;
      vq_w = VQ_SET;
      apb(32'h3200_0010, 1'b1, 32'(volt_t'($rtoi(VQ_SET * 65536.0))), rd, err);
    end
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    repeat (10) @(negedge clk);
    por_n = 1'b1;
    repeat (50) @(negedge clk);
    check(resets_n == 4'b0001, "only the interface runs before PLL lock");
    pll_lock = 1'b1;
    #10ms settled = 1'b1;
    #10ms settled = 1'b0;
    // loss of PLL lock
    @(negedge clk) pll_lock = 1'b0;
    n_lock_loss++;
    repeat (3) @(negedge clk);
    check(resets_n == 4'b0001, "lock loss resets all but the interface");
    repeat (100) @(negedge clk);
    pll_lock = 1'b1;
    repeat (10000) @(negedge clk);
    check(resets_n == 4'b1111, "all domains running again after relock");
    #10ms settled = 1'b1;
    #6ms settled = 1'b0;
    // loss of synchronisation: a false FRAME_ADC drop at the wrong time
    // restarts the ADC sequencer out of step, then a false FRAME_CONTROL_MOD
    // restarts the PWM carrier out of step. Each must be pulled back by the
    // next true FRAME_ADC / FRAME_CONTROL_MOD without a reset.
    rs_adc0 = n_adc_rs; rs_pwm0 = n_pwm_rs;
    @(negedge clk) quiet = 12000;
    force dut.u_adc.frame_adc = 1'b0;
    repeat (4) @(negedge clk);
    release dut.u_adc.frame_adc;
    repeat (6000) @(negedge clk);
    check(n_adc_rs > rs_adc0, "ADC sequencer resynchronised after a disturbance");
    @(negedge clk) quiet = 12000;
    while (dut.u_exc.phase != 13'd2000) @(negedge clk);
    force dut.u_pwm.frame_control_mod = 1'b1;
    @(negedge clk) release dut.u_pwm.frame_control_mod;
    repeat (6000) @(negedge clk);
    check(n_pwm_rs > rs_pwm0, "PWM carrier resynchronised after a disturbance");
    check(resets_n == 4'b1111, "no reset needed to regain synchronisation");
    n_sync_loss += (n_adc_rs > rs_adc0 && n_pwm_rs > rs_pwm0) ? 1 : 0;
    #2ms settled = 1'b1;
    #2ms settled = 1'b0;
    // reset from the microcontroller: every domain, the tables included, goes
    // back into reset; the host reloads the tables and the sequence reruns
    @(negedge clk) m2f_n = 1'b0;
    #1 check(resets_n == 4'b0000, "RESET_N_M2F resets every domain at once");
    check(!dut.u_lut.ram_init_done, "tables cleared by the interface reset");
    repeat (20) @(negedge clk);
    m2f_n = 1'b1;
    repeat (20000) @(negedge clk);
    check(resets_n == 4'b1111, "all domains running again after RESET_N_M2F");
    if (resets_n == 4'b1111 && n_handover > 1) n_m2f++;
    #8ms settled = 1'b1;
    #3ms;
    $display("events: mc %0d i_ready %0d tri %0d wraps %0d adc_resync %0d pwm_resync %0d",
             n_mc, n_ir, n_tri, n_wrap, n_adc_rs, n_pwm_rs);
    $display("        sync losses regained %0d, table loads %0d, M2F restarts %0d", n_sync_loss,
             n_handover, n_m2f);
    $display("        fcm %0d irq %0d F_U %0d U_F %0d gate edges %0d tracked %0d idq %0d vabc %0d",
             n_fcm, n_irq, n_fu, n_uf, n_gate, n_track, n_idq, n_vabc);
    check(n_mc > 1000, "FRAME_MC");
    check(n_ir > 1000, "I_ready");
    check(n_tri > 2000, "trig evaluations");
    check(n_wrap > 0, "position wrap");
    check(n_adc_rs > 0, "ADC frame resynchronisation");
    check(n_pwm_rs > 0, "PWM carrier resynchronisation");
    check(n_fcm > 300, "FRAME_CONTROL_MOD");
    check(n_irq > 1000 && n_fu > 1000 && n_uf > 1000, "interrupt / F_U / U_F exchange");
    check(n_gate > 300, "gate switching");
    check(n_lock_loss > 0, "PLL lock loss handled");
    check(n_sync_loss > 0, "loss of synchronisation regained");
    check(n_m2f > 0, "restart after RESET_N_M2F with table reload");
    check(n_handover > 0 && n_refused > 0 && n_unmapped > 0, "table hand-over and bus errors");
    check(n_res_smp > 1000 && n_cur_smp > 1000, "sample instants");
    check(n_track > 500 && n_idq > 500 && n_vabc > 500, "settled checks ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #70ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
