// Self-checking test of abc_dq.
//
// Random phase current codes and random angles; sin/cos are given in Q1.16.
// The Clarke and Park results after each enabled stage are compared with
// equations (6)-(7) in real arithmetic (offset 2048, Q11.5 result), within
// 0.1 count. A balanced sinusoidal set must give constant Id, Iq. The
// full-scale corners must stay in range without wrapping around.
module tb_abc_dq;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic real absr(real a); return a < 0.0 ? -a : a; endfunction

  localparam real PI = 3.14159265358979;
  adc_code_t ia_code = '0, ib_code = '0;
  trig_t sin_e = '0, cos_e = '0;
  logic en_load = 0, en_stage1 = 0, en_stage2 = 0;
  cur_t id, iq;
  abc_dq dut (.clk, .rst_n, .ia_code, .ib_code, .sin_e, .cos_e, .en_load, .en_stage1,
              .en_stage2, .id, .iq);

  task automatic run(input int a, input int b, input real th, output real gd, output real gq);
    real ia, ib, al, be, s, c, ed, eq;
    @(negedge clk);
    ia_code = 12'(a); ib_code = 12'(b);
    s = real'($rtoi($floor($sin(th) * 65536.0 + 0.5))) / 65536.0;
    c = real'($rtoi($floor($cos(th) * 65536.0 + 0.5))) / 65536.0;
    sin_e = trig_t'($rtoi(s * 65536.0)); cos_e = trig_t'($rtoi(c * 65536.0));
    en_load = 1;  @(negedge clk); en_load = 0;
    en_stage1 = 1; @(negedge clk); en_stage1 = 0;
    en_stage2 = 1; @(negedge clk); en_stage2 = 0;
    ia = a - 2048.0; ib = b - 2048.0;
    al = ia; be = (ia + 2.0 * ib) / $sqrt(3.0);
    ed = c * al + s * be; eq = -s * al + c * be;
    gd = real'(id) / 32.0; gq = real'(iq) / 32.0;
    if (absr(be) < 4095.0) begin
      check(absr(real'(dut.i_beta) / 32.0 - be) < 0.1, "I_beta");
      if (absr(ed) < 4095.0) check(absr(gd - ed) < 0.1, $sformatf("Id %f vs %f", gd, ed));
      if (absr(eq) < 4095.0) check(absr(gq - eq) < 0.1, $sformatf("Iq %f vs %f", gq, eq));
    end else begin
      check(dut.i_beta == (be > 0 ? 18'sh1ffff : -18'sh20000), "I_beta saturates");
    end
    check(real'(dut.i_alpha) / 32.0 == al, "I_alpha");
  endtask

  initial begin
    real gd, gq;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++)
      run($urandom_range(600, 3500), $urandom_range(600, 3500),
          (real'($urandom_range(0, 10000)) / 10000.0 * 2.0 - 1.0) * PI, gd, gq);
    // balanced set: amplitude 800 counts, phase offset 0.3 rad; Id, Iq constant
    for (int i = 0; i < 50; i++) begin
      real th;
      th = 2.0 * PI * i / 50.0;
      run($rtoi(2048.0 + 800.0 * $cos(th + 0.3) + 0.5),
          $rtoi(2048.0 + 800.0 * $cos(th + 0.3 - 2.0 * PI / 3.0) + 0.5), th, gd, gq);
      check(absr(gd - 800.0 * $cos(0.3)) < 1.5, "balanced set: constant Id");
      check(absr(gq - 800.0 * $sin(0.3)) < 1.5, "balanced set: constant Iq");
    end
    // full-scale corner: I_beta = 3*2047/sqrt(3) stays inside the Q11.5 range
    run(4095, 4095, 0.0, gd, gq);
    run(0, 0, 1.0, gd, gq);
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
