// Self-checking test of motor_drive_pwm.
//
// The carrier is compared every clock with an independent triangle model
// (0 -> +1500 -> -1500 -> 0 in 6000 clocks, restarted by FRAME_CONTROL_MOD). Gates
// are checked each clock against the previous carrier and the scaled references,
// and the duty over one period against (1 + v)/2 for references of 0.5, -0.25 and
// 0.9. An out-of-phase FRAME_CONTROL_MOD must restart the carrier and set resync.
module tb_motor_drive_pwm;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic fcm = 1'b0;
  volt_t v_abc [3];
  logic [2:0] gate_h, gate_l;
  logic signed [11:0] carrier;
  logic resync;
  motor_drive_pwm dut (.clk, .rst_n, .frame_control_mod(fcm), .v_abc, .gate_h, .gate_l,
                       .carrier, .resync);

  // triangle model
  int model = 0, dir = 1;
  task automatic model_step(input bit restart);
    if (restart) begin model = 0; dir = 1; end
    else begin
      model += dir;
      if (model == 1500) dir = -1;
      if (model == -1500) dir = 1;
    end
  endtask

  int on_cnt [3];
  int n_resync = 0;
  int prev_carrier;
  real vr [3] = '{0.5, -0.25, 0.9};

  initial begin
    for (int p = 0; p < 3; p++) v_abc[p] = volt_t'($rtoi(vr[p] * 65536.0));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    model = int'(carrier); dir = 1;
    check(model == 1, "carrier starts at 0 counting up");
    for (int c = 0; c < 18000; c++) begin
      prev_carrier = int'(carrier);
      fcm = (c == 9000);     // off-phase restart halfway through a period
      @(posedge clk); #1;
      model_step(c == 9000);
      check(int'(carrier) == model, "carrier follows triangle");
      for (int p = 0; p < 3; p++) begin
        int r;
        r = (int'(v_abc[p]) * 1500) >>> 16;
        check(gate_h[p] == (r > prev_carrier), "gate_h compare");
        check(gate_l[p] == !gate_h[p], "gate_l complement");
        if (c < 6000 && gate_h[p]) on_cnt[p]++;
      end
      if (resync) n_resync++;
    end
    for (int p = 0; p < 3; p++) begin
      real duty;
      duty = on_cnt[p] / 6000.0;
      check(duty > (1.0 + vr[p]) / 2.0 - 0.002 && duty < (1.0 + vr[p]) / 2.0 + 0.002,
            $sformatf("duty phase %0d = %f", p, duty));
    end
    check(n_resync == 1, "off-phase restart flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
