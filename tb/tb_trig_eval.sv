// Self-checking test of trig_eval.
//
// A table model (two 1024-entry arrays computed here, one clock read latency)
// stands in for the lookup tables. Random angles in (-2*pi, 2*pi) with n = 1, 4
// and 7 are evaluated; results must match $sin/$cos of n*theta within 1e-4
// (interpolation plus Q1.16 rounding), done must come exactly 5 clocks after
// start, and angles that need K = 1023 (wrap to address 0) are included.
module tb_trig_eval;
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
  trig_t s_tab [1024], c_tab [1024];
  initial for (int k = 0; k < 1024; k++) begin
    s_tab[k] = trig_t'($rtoi($floor(65536.0 * $sin(2.0*PI*k/1024.0) + 0.5)));
    c_tab[k] = trig_t'($rtoi($floor(65536.0 * $cos(2.0*PI*k/1024.0) + 0.5)));
  end

  logic start = 1'b0;
  pos_t theta = '0;
  logic [3:0] n_mult = 4'd1;
  logic [9:0] lut_addr;
  trig_t lut_sin, lut_cos, sin_out, cos_out;
  logic done, busy;
  trig_eval dut (.clk, .rst_n, .start, .theta, .n_mult, .lut_addr, .lut_sin, .lut_cos,
                 .sin_out, .cos_out, .done, .busy);

  always @(posedge clk) begin
    lut_sin <= s_tab[lut_addr];
    lut_cos <= c_tab[lut_addr];
  end

  int n_wrap = 0;
  task automatic eval(input real th, input int n);
    int lat;
    real es, ec, gs, gc;
    @(negedge clk);
    theta = pos_t'(longint'(th * 34359738368.0));   // 2^35
    n_mult = 4'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 5, $sformatf("latency %0d", lat));
    es = $sin(n * th); ec = $cos(n * th);
    gs = real'(sin_out) / 65536.0; gc = real'(cos_out) / 65536.0;
    check((gs - es) < 1e-4 && (es - gs) < 1e-4, $sformatf("sin(%0d*%f) = %f, expected %f", n, th, gs, es));
    check((gc - ec) < 1e-4 && (ec - gc) < 1e-4, $sformatf("cos(%0d*%f) = %f, expected %f", n, th, gc, ec));
    if (dut.k_q == 10'd1023) n_wrap++;
  endtask

  initial begin
    int nlist [3] = '{1, 4, 7};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    eval(0.0, 1);
    eval(PI / 2.0, 1);
    eval(-PI / 3.0, 1);
    eval(2.0 * PI - 0.003, 1);     // K = 1023, K+1 wraps
    eval(-0.002, 1);               // K = 1023 from a negative angle
    for (int i = 0; i < 300; i++) begin
      real th;
      th = (real'($urandom_range(0, 1000000)) / 1000000.0 * 4.0 - 2.0) * PI * 0.9999;
      eval(th, nlist[i % 3]);
    end
    check(n_wrap >= 2, "table wrap from 1023 to 0 exercised");
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
