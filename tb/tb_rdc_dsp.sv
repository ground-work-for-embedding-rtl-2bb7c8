// Self-checking test of rdc_dsp in closed loop.
//
// Resolver signals for a rotor at constant speed are generated here: the sine
// and cosine terms are amplitude 1 V, multiplied by the excitation value at the
// sample (+-0.7071 at 45/135/225/315 degrees), converted to 12-bit codes around
// 1.5 V. sin(P2)/cos(P2) come from $sin/$cos rounded to Q1.16. Each sample runs
// shuffle+stage I, stage II, III, IV in turn. Every stage result is compared
// with equations (1)-(5) evaluated in real arithmetic on the block's own
// previous state; after settling the speed must equal the rotor speed within 2 rad/s (ADC
// quantisation noise passes through the loop gain) and the
// position must lead the last sample's angle by one sample step. The runs at
// +300 rad/s and -500 rad/s wrap the position both ways; a step to 16000 rad/s
// drives the speed into its 18-bit saturation.
module tb_rdc_dsp;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam real PI = 3.14159265358979;
  localparam real Q35 = 34359738368.0;

  adc_code_t sin_code = '0, cos_code = '0;
  logic exc_positive = 1'b1;
  trig_t sin_p = '0, cos_p = '0;
  logic en_shuffle = 0, en_stage1 = 0, en_stage2 = 0, en_stage3 = 0, en_stage4 = 0;
  speed_t omega;
  pos_t p1, p2;
  logic signed [17:0] x1;
  logic v_sat, wrapped;
  rdc_dsp dut (.clk, .rst_n, .sin_code, .cos_code, .exc_positive, .sin_p, .cos_p,
               .en_shuffle, .en_stage1, .en_stage2, .en_stage3, .en_stage4,
               .omega, .p1, .p2, .x1, .v_sat, .wrapped);

  int n_wrap_pos = 0, n_wrap_neg = 0, n_sat = 0;
  real theta = 0.0;
  longint k_sample = 0;

  function automatic real absr(real a); return a < 0.0 ? -a : a; endfunction

  task automatic pulse(ref logic en);
    @(negedge clk) en = 1'b1;
    @(negedge clk) en = 1'b0;
  endtask

  task automatic sample(input real w, input bit check_steps);
    real s_exc, st, ct, x_exp, v_exp, p_exp, pr;
    real c [5] = '{515.8, 1951.19, 116.985, -1809.49, -491.095};
    int code_s, code_c;
    theta += w / 40000.0;
    if (theta > PI) theta -= 2.0 * PI;
    if (theta < -PI) theta += 2.0 * PI;
    s_exc = (k_sample % 4 < 2) ? 0.70710678 : -0.70710678;
    code_s = $rtoi((1.5 + s_exc * $sin(theta)) * 4096.0 / 3.0 + 0.5);
    code_c = $rtoi((1.5 + s_exc * $cos(theta)) * 4096.0 / 3.0 + 0.5);
    k_sample++;
    @(negedge clk);
    sin_code = 12'(code_s); cos_code = 12'(code_c); exc_positive = (s_exc > 0.0);
    en_shuffle = 1'b1; en_stage1 = 1'b1;
    @(negedge clk);
    en_shuffle = 1'b0; en_stage1 = 1'b0;
    // trig of P2
    pr = real'(p2) / Q35;
    sin_p = trig_t'($rtoi($floor($sin(pr) * 65536.0 + 0.5)));
    cos_p = trig_t'($rtoi($floor($cos(pr) * 65536.0 + 0.5)));
    st = code_s * 3.0 / 4096.0 - 1.5;
    ct = code_c * 3.0 / 4096.0 - 1.5;
    if (check_steps) begin
      check(absr(real'(dut.st) / 4096.0 - st) < 1e-9, "stage I sine term");
      check(absr(real'(dut.ct) / 4096.0 - ct) < 1e-9, "stage I cosine term");
    end
    pulse(en_stage2);
    x_exp = 1.5 * (exc_positive ? 1.0 : -1.0) *
            (real'(cos_p) / 65536.0 * st - real'(sin_p) / 65536.0 * ct);
    if (check_steps) check(absr(real'(x1) / 32768.0 - x_exp) < 1e-4, "stage II error X1");
    v_exp = real'(dut.v2) / 8.0 + c[0] * real'(x1) / 32768.0;
    for (int i = 2; i <= 5; i++) v_exp += c[i-1] * real'(dut.xh[i]) / 32768.0;
    pulse(en_stage3);
    if (v_exp < 16383.0 && v_exp > -16383.0) begin
      if (check_steps) check(absr(real'(omega) / 8.0 - v_exp) < 0.25, "stage III speed");
    end else if (v_exp > 16384.5 || v_exp < -16384.5) begin
      check(v_sat, "saturation flagged");
      check(omega == (v_exp > 0 ? 18'sh1ffff : -18'sh20000), "speed clamps");
      n_sat++;
    end
    p_exp = real'(p2) / Q35 + real'(omega) / 8.0 / 40000.0;
    pulse(en_stage4);
    if (p_exp > 2.0 * PI) begin p_exp -= 2.0 * PI; n_wrap_pos++; check(wrapped, "wrap flagged"); end
    else if (p_exp < -2.0 * PI) begin p_exp += 2.0 * PI; n_wrap_neg++; check(wrapped, "wrap flagged"); end
    if (check_steps) check(absr(real'(p1) / Q35 - p_exp) < 1e-6, "stage IV position");
  endtask

  task automatic settle_check(input real w);
    real e;
    check(absr(real'(omega) / 8.0 - w) < 2.0, $sformatf("speed %f tracks %f", real'(omega) / 8.0, w));
    e = real'(p1) / Q35 - (theta + w / 40000.0);
    while (e > PI) e -= 2.0 * PI;
    while (e < -PI) e += 2.0 * PI;
    check(absr(e) < 0.005, $sformatf("position error %f", e));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) sample(300.0, 1'b1);
    settle_check(300.0);
    for (int i = 0; i < 3000; i++) sample(-500.0, 1'b1);
    settle_check(-500.0);
    check(n_wrap_pos > 0, "position wrapped at +2pi");
    check(n_wrap_neg > 0, "position wrapped at -2pi");
    for (int i = 0; i < 400; i++) sample(16000.0, 1'b0);
    check(n_sat > 0, "speed saturation reached");
    $display("wraps +%0d -%0d saturations %0d", n_wrap_pos, n_wrap_neg, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
