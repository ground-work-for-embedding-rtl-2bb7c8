// Self-checking test of adc_interface with two ADC models.
//
// A frame reference drops FRAME_ADC for 4 clocks every 6000 clocks (10 kHz), as
// the excitation PWM does. The ADC inputs change every clock, so each result can
// be matched with the value the model converted at its CS falling edge. Checks:
// resolver pair on FRAME_MC and current pair on I_ready carry the channel 0 and
// channel 1 conversions of the same transfer pair; resolver conversions are
// 1500 clocks apart (40 kHz) and each current conversion follows its resolver
// conversion by 72 clocks (18 SCLKs); four of each per 10 kHz period; an
// out-of-phase FRAME_ADC drop raises resync, as does the next regular drop that
// pulls the sequence back, and then the sequence stays in phase.
module tb_adc_interface;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic rst_n = 1'b0;
  logic frame_adc;
  int unsigned cyc = 0, fcnt = 0;
  logic extra_drop = 1'b0;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    fcnt <= (fcnt == 5999) ? 0 : fcnt + 1;
  end
  assign frame_adc = !((fcnt >= 673 && fcnt < 677) || extra_drop);

  logic sclk, cs_n, din, dout_a, dout_b;
  adc_code_t sin_code, cos_code, ia_code, ib_code;
  logic frame_mc, i_ready, resync;

  adc_interface dut (
    .clk, .rst_n, .frame_adc, .adc_sclk(sclk), .adc_cs_n(cs_n), .adc_din(din),
    .adc_dout_a(dout_a), .adc_dout_b(dout_b),
    .sin_code, .cos_code, .ia_code, .ib_code, .frame_mc, .i_ready, .resync);

  logic [11:0] a0, a1, b0, b1;
  assign a0 = 12'(cyc * 7 + 11);
  assign a1 = 12'(cyc * 13 + 5);
  assign b0 = 12'(cyc * 3 + 1000);
  assign b1 = 12'(4095 - cyc * 5);

  logic sp_a, sp_b, sch_a, sch_b;
  logic [11:0] sv_a, sv_b;
  ad7912_model adc_a (.clk, .cs_n, .sclk, .din, .dout(dout_a), .ch0(a0), .ch1(a1),
                      .sample_pulse(sp_a), .sample_ch(sch_a), .sample_val(sv_a));
  ad7912_model adc_b (.clk, .cs_n, .sclk, .din, .dout(dout_b), .ch0(b0), .ch1(b1),
                      .sample_pulse(sp_b), .sample_ch(sch_b), .sample_val(sv_b));

  // expected values: the last channel 0 and channel 1 conversions
  logic [11:0] exp_a0, exp_b0, exp_a1, exp_b1;
  int unsigned t_ch0 = 0, t_ch0_prev = 0, t_ch1 = 0;
  int n_mc = 0, n_ir = 0, n_resync = 0, n_ch0 = 0;
  logic prev_was_ch0 = 1'b0;
  bit checking = 1'b0;

  always @(posedge clk) begin
    if (sp_a) begin
      check(sp_b, "both ADCs convert together");
      if (sch_a == 1'b0) begin
        // two channel 0 conversions in a row: the second is the resolver sample
        if (prev_was_ch0) begin
          exp_a0 <= sv_a; exp_b0 <= sv_b;
          t_ch0_prev <= t_ch0; t_ch0 <= cyc; n_ch0++;
          if (checking && n_ch0 > 2) check(cyc - t_ch0 == 1500, "resolver samples 1500 clocks apart");
        end
        prev_was_ch0 <= 1'b1;
      end else begin
        exp_a1 <= sv_a; exp_b1 <= sv_b; t_ch1 <= cyc;
        if (checking) check(cyc - t_ch0 == 72, "current sample 72 clocks after resolver sample");
        prev_was_ch0 <= 1'b0;
      end
    end
    if (frame_mc) begin
      n_mc++;
      if (checking) begin
        check(sin_code == exp_a0, "sine term = A0 conversion");
        check(cos_code == exp_b0, "cosine term = B0 conversion");
      end
    end
    if (i_ready) begin
      n_ir++;
      if (checking) begin
        check(ia_code == exp_a1, "Ia = A1 conversion");
        check(ib_code == exp_b1, "Ib = B1 conversion");
      end
    end
    if (resync) n_resync++;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (7000) @(posedge clk);
    checking = 1'b1;
    n_resync = 0;   // the first drop after reset aligns the sequence
    // four samples of each per 10 kHz period
    begin
      int m0, i0;
      m0 = n_mc; i0 = n_ir;
      repeat (6000) @(posedge clk);
      check(n_mc - m0 == 4, "4 resolver samples per 6000 clocks");
      check(n_ir - i0 == 4, "4 current samples per 6000 clocks");
    end
    check(n_resync == 0, "no resync while in phase");
    // knock the sequence out of phase, then let the reference pull it back
    @(posedge clk); while (fcnt != 3000) @(posedge clk);
    checking = 1'b0;
    extra_drop = 1'b1;
    repeat (4) @(posedge clk);
    extra_drop = 1'b0;
    repeat (6000) @(posedge clk);
    check(n_resync == 2, "odd drop and the pull back into phase both flagged");
    checking = 1'b1;
    n_ch0 = 0;
    repeat (12000) @(posedge clk);
    check(n_resync == 2, "in phase again after the reference pull");
    check(n_mc > 15 && n_ir > 15, "samples delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
