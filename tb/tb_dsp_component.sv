// Self-checking test of dsp_component.
//
// The ADC interface and the table RAMs are replaced by models: every 1500
// clocks the bench presents new resolver codes (a rotor at 800 rad/s, the
// excitation sign alternating every two samples) and pulses FRAME_MC, then
// 72 clocks later new current codes and I_ready. The table model answers
// sine and cosine of the requested index one clock after the address. A host
// model answers each interrupt over APB: reads speed, Id and Iq, then writes
// Vd and Vq. Checks after settling: speed and position follow the rotor, Id
// and Iq match the current model at the estimated angle, the phase voltages
// are the inverse transforms of the written values, one interrupt per frame,
// and the two trig evaluations per frame. Finally the host stops answering and
// the state machine must wait at the exchange.
module tb_dsp_component;
  import foc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real W = 800.0;
  localparam real Q35 = 34359738368.0;
  // both transforms use the electrical angle predicted for the next sample,
  // so the measured current vector appears rotated back by this angle
  localparam real LEAD = 4.0 * W / 40000.0;

  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0, if_rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic real absr(real a); return a < 0.0 ? -a : a; endfunction
  function automatic real wrap(real a);
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  adc_code_t sin_code = '0, cos_code = '0, ia_code = 12'd2048, ib_code = 12'd2048;
  logic frame_mc = 0, i_ready = 0, exc_positive = 0;
  logic [LUT_AW-1:0] lut_addr;
  trig_t lut_sin, lut_cos;
  apb_req_t apb_req;
  apb_rsp_t apb_rsp;
  volt_t v_abc [3];
  logic irq, tri_done, v_sat, wrapped;
  speed_t omega;
  pos_t position;
  cur_t id, iq;
  logic [4:0] ctl_state;
  dsp_component dut (.clk, .rst_n, .if_rst_n, .sin_code, .cos_code, .ia_code, .ib_code,
                     .frame_mc, .i_ready, .exc_positive, .lut_addr, .lut_sin, .lut_cos,
                     .apb_req, .apb_rsp, .v_abc, .irq, .omega, .position, .id, .iq,
                     .tri_done, .v_sat, .wrapped, .ctl_state);

  // table model, one clock latency
  always @(posedge clk) begin
    lut_sin <= trig_t'($rtoi($floor($sin(2.0 * PI * lut_addr / 1024.0) * 65536.0 + 0.5)));
    lut_cos <= trig_t'($rtoi($floor($cos(2.0 * PI * lut_addr / 1024.0) * 65536.0 + 0.5)));
  end

  real theta = 0.5, theta_smp = 0.5;
  int n_irq = 0, n_tri = 0, n_frames = 0;
  bit settled = 0, host_on = 1;
  always @(posedge clk) begin
    if (irq) n_irq++;
    if (tri_done) n_tri++;
  end

  // frame source
  initial begin
    int k = 0;
    @(posedge rst_n);
    forever begin
      real ex, te;
      repeat (1500 - 73) @(negedge clk);
      theta = wrap(theta + W / 40000.0);
      theta_smp = theta;
      ex = (k % 4 < 2) ? 0.70710678 : -0.70710678;
      k++;
      sin_code = 12'($rtoi((1.5 + ex * $sin(theta)) * 4096.0 / 3.0 + 0.5));
      cos_code = 12'($rtoi((1.5 + ex * $cos(theta)) * 4096.0 / 3.0 + 0.5));
      exc_positive = ex > 0.0;
      frame_mc = 1; @(negedge clk) frame_mc = 0;
      n_frames++;
      repeat (71) @(negedge clk);
      te = 4.0 * theta;
      ia_code = 12'($rtoi(2048.0 + 400.0 * $cos(te - 0.7) + 0.5));
      ib_code = 12'($rtoi(2048.0 + 400.0 * $cos(te - 0.7 - 2.0 * PI / 3.0) + 0.5));
      i_ready = 1; @(negedge clk) i_ready = 0;
    end
  end

  initial apb_req = '0;
  task automatic apb(input int idx, input bit wr, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    apb_req = '{psel: 1'b1, penable: 1'b0, pwrite: wr, paddr: 32'h3200_0000 | 32'(idx * 4),
                pwdata: wd};
    @(negedge clk) apb_req.penable = 1'b1;
    #1 rd = apb_rsp.prdata;
    @(negedge clk) apb_req = '0;
  endtask

  real vd_w = 0.0, vq_w = 0.0;
  initial forever begin
    logic [31:0] rd;
    real w, pe;
    @(posedge irq);
    if (host_on) begin
      repeat ($urandom_range(5, 300)) @(negedge clk);
      apb(0, 0, 0, rd);
      w = real'(speed_t'(rd[17:0])) / 8.0;
      if (settled) begin
        pe = wrap(real'(position) / Q35 - theta_smp - W / 40000.0);
        check(absr(w - W) < 6.0, $sformatf("speed %f", w));
        check(absr(pe) < 0.006, $sformatf("position error %f", pe));
      end
      apb(1, 0, 0, rd);
      if (settled) check(absr(real'(cur_t'(rd[17:0])) / 32.0 - 400.0 * $cos(0.7 + LEAD)) < 10.0,
                         $sformatf("Id %f", real'(cur_t'(rd[17:0])) / 32.0));
      apb(2, 0, 0, rd);
      if (settled) check(absr(real'(cur_t'(rd[17:0])) / 32.0 + 400.0 * $sin(0.7 + LEAD)) < 10.0,
                         $sformatf("Iq %f", real'(cur_t'(rd[17:0])) / 32.0));
      vd_w = real'($urandom_range(0, 1000)) / 1000.0 - 0.5;
      vq_w = real'($urandom_range(0, 1000)) / 1000.0 - 0.5;
      apb(3, 1, 32'(volt_t'($rtoi(vd_w * 65536.0))), rd);
      apb(4, 1, 32'(volt_t'($rtoi(vq_w * 65536.0))), rd);
      vd_w = real'(volt_t'($rtoi(vd_w * 65536.0))) / 65536.0;
      vq_w = real'(volt_t'($rtoi(vq_w * 65536.0))) / 65536.0;
      repeat (6) @(negedge clk);
      if (settled) begin
        real te, al, be, e[3];
        te = 4.0 * (theta_smp + W / 40000.0);
        al = vd_w * $cos(te) - vq_w * $sin(te);
        be = vd_w * $sin(te) + vq_w * $cos(te);
        e[0] = al;
        e[1] = -0.5 * al + $sqrt(3.0) / 2.0 * be;
        e[2] = -0.5 * al - $sqrt(3.0) / 2.0 * be;
        for (int p = 0; p < 3; p++)
          check(absr(real'(v_abc[p]) / 65536.0 - e[p]) < 0.03,
                $sformatf("V%0d %f vs %f", p, real'(v_abc[p]) / 65536.0, e[p]));
      end
    end
  end

  initial begin
    int f0, i0, t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; if_rst_n = 1'b1;
    repeat (400 * 1500) @(negedge clk);
    settled = 1;
    f0 = n_frames; i0 = n_irq; t0 = n_tri;
    repeat (300 * 1500) @(negedge clk);
    check(n_irq - i0 >= n_frames - f0 - 1 && n_irq - i0 <= n_frames - f0 + 1,
          $sformatf("one interrupt per frame: %0d/%0d", n_irq - i0, n_frames - f0));
    check(n_tri - t0 >= 2 * (n_frames - f0) - 2, "two trig evaluations per frame");
    // host silent: the state machine waits at the exchange, the loop stops
    host_on = 0;
    repeat (10 * 1500) @(negedge clk);
    check(ctl_state == 5'd14, "waits for the host");
    $display("frames %0d irq %0d tri %0d", n_frames, n_irq, n_tri);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
