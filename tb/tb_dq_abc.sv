// Self-checking test of dq_abc.
//
// Random Vd, Vq (Q1.16) and random angles. The inverse Park result and the
// three phase voltages are compared with equations (8)-(9) in real arithmetic
// within 4 LSB. The three outputs must sum to about zero. A vector larger
// than full scale must saturate the phase outputs at the rails, with no
// wrap-around.
module tb_dq_abc;
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
  function automatic real clip(real a);
    return a > 131071.0 / 65536.0 ? 131071.0 / 65536.0 : (a < -2.0 ? -2.0 : a);
  endfunction

  localparam real PI = 3.14159265358979;
  localparam real LSB = 1.0 / 65536.0;
  volt_t vd = '0, vq = '0;
  trig_t sin_e = '0, cos_e = '0;
  logic en_load = 0, en_stage1 = 0, en_stage2 = 0;
  volt_t v_abc [3];
  dq_abc dut (.clk, .rst_n, .vd, .vq, .sin_e, .cos_e, .en_load, .en_stage1, .en_stage2,
              .v_abc);

  task automatic run(input real d, input real q, input real th);
    real s, c, al, be, e[3], g[3];
    @(negedge clk);
    vd = volt_t'($rtoi(d * 65536.0)); vq = volt_t'($rtoi(q * 65536.0));
    s = real'($rtoi($floor($sin(th) * 65536.0 + 0.5))) / 65536.0;
    c = real'($rtoi($floor($cos(th) * 65536.0 + 0.5))) / 65536.0;
    sin_e = trig_t'($rtoi(s * 65536.0)); cos_e = trig_t'($rtoi(c * 65536.0));
    en_load = 1;  @(negedge clk); en_load = 0;
    en_stage1 = 1; @(negedge clk); en_stage1 = 0;
    en_stage2 = 1; @(negedge clk); en_stage2 = 0;
    d = real'(vd) * LSB; q = real'(vq) * LSB;
    al = clip(c * d - s * q); be = clip(s * d + c * q);
    e[0] = al;
    e[1] = clip(-0.5 * al + $sqrt(3.0) / 2.0 * be);
    e[2] = clip(-0.5 * al - $sqrt(3.0) / 2.0 * be);
    for (int p = 0; p < 3; p++) begin
      g[p] = real'(v_abc[p]) * LSB;
      check(absr(g[p] - e[p]) < 4.0 * LSB, $sformatf("phase %0d: %f vs %f", p, g[p], e[p]));
    end
    if (absr(e[0]) < 1.99 && absr(e[1]) < 1.99 && absr(e[2]) < 1.99)
      check(absr(g[0] + g[1] + g[2]) < 8.0 * LSB, "phases sum to zero");
  endtask

  function automatic real rnd(real m);
    return (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * m;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) run(rnd(1.0), rnd(1.0), rnd(PI));
    // beyond full scale: every stage must clip at the rails
    for (int i = 0; i < 40; i++) run(rnd(1.99), rnd(1.99), rnd(PI));
    run(1.99, 1.99, PI / 4.0);
    check(v_abc[0] == 18'sh1ffff || v_abc[1] == 18'sh1ffff || v_abc[2] == 18'sh1ffff ||
          dut.v_beta == 18'sh1ffff, "a rail is reached");
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
