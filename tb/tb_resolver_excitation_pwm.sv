// Self-checking test of resolver_excitation_pwm.
//
// Over two 10 kHz periods every output sample is compared with the waveform
// rebuilt from the switching angles in radians (quarter-wave and half-wave
// symmetry). A discrete Fourier transform of one period checks the point of the
// scheme: harmonics 3 to 19 below 2% of the fundamental, and the DC level of the
// 0/1 output about 105% of the fundamental. Frame outputs: FRAME_ADC low for
// exactly 4 clocks and FRAME_CONTROL_MOD one pulse per 6000 clocks.
module tb_resolver_excitation_pwm;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic exc_pwm, exc_positive, frame_adc, frame_control_mod;
  logic [12:0] phase;
  resolver_excitation_pwm dut (.clk, .rst_n, .exc_pwm, .exc_positive, .frame_adc,
                               .frame_control_mod, .phase);

  localparam real PI = 3.14159265358979;
  real alpha [10] = '{0.148916144, 0.261327547, 0.44708158, 0.525310346, 0.746757968,
                      0.795273217, 1.051831591, 1.077303206, 1.379492596, 1.391117437};

  function automatic bit expected(int c);
    int q; bit lvl; bit neg;
    neg = (c >= 3000);
    if (c < 1500) q = c; else if (c < 3000) q = 3000 - c;
    else if (c < 4500) q = c - 3000; else q = 6000 - c;
    lvl = 1'b1;
    foreach (alpha[i]) if (q >= $rtoi(alpha[i] * 6000.0 / (2.0 * PI) + 0.5)) lvl = ~lvl;
    return lvl ^ neg;
  endfunction

  real re [0:25], im [0:25];
  int n_low, n_fcm, mism;

  initial begin
    foreach (re[h]) begin re[h] = 0.0; im[h] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    while (phase != 0) begin @(posedge clk); #1; end
    mism = 0; n_low = 0; n_fcm = 0;
    for (int c = 0; c < 12000; c++) begin
      if (exc_pwm !== expected(c % 6000)) mism++;
      if (c < 6000) begin
        for (int h = 0; h <= 25; h++) begin
          re[h] += (exc_pwm ? 1.0 : 0.0) * $cos(2.0 * PI * h * c / 6000.0);
          im[h] += (exc_pwm ? 1.0 : 0.0) * $sin(2.0 * PI * h * c / 6000.0);
        end
        if (!frame_adc) n_low++;
        if (frame_control_mod) begin
          n_fcm++;
          check(c == 821, "FRAME_CONTROL_MOD position");
        end
        check(exc_positive == (c < 3000), "excitation polarity");
      end
      @(posedge clk); #1;
    end
    check(mism == 0, "waveform matches the switching angles");
    begin
      real fund, dc, h_amp;
      fund = 2.0 * $sqrt(re[1]*re[1] + im[1]*im[1]) / 6000.0;
      dc   = re[0] / 6000.0;
      $display("fundamental %f dc %f ratio %f", fund, dc, dc / fund);
      check(dc / fund > 1.0 && dc / fund < 1.1, "DC about 105% of fundamental");
      for (int h = 2; h <= 19; h++) begin
        h_amp = 2.0 * $sqrt(re[h]*re[h] + im[h]*im[h]) / 6000.0;
        check(h_amp < 0.02 * fund, $sformatf("harmonic %0d eliminated", h));
      end
      h_amp = 2.0 * $sqrt(re[21]*re[21] + im[21]*im[21]) / 6000.0;
      check(h_amp > 0.3 * fund, "harmonic 21 remains (first one not eliminated)");
    end
    check(n_low == 4, "FRAME_ADC low for 4 clocks per period");
    check(n_fcm == 1, "one FRAME_CONTROL_MOD per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
