// Self-checking test of reset_controller.
//
// The inputs are driven by hand so that every gate of the sequence can be
// held: the other blocks must stay in reset while PLL lock is low, math stays
// in reset until the tables are loaded and no FRAME_MC is present, and the
// control block stays in reset until FRAME_CONTROL_MOD. The release order must
// be interface, ADC/PWM, math, control. Loss of PLL lock must put the three
// later blocks back in reset while the interface stays running, and the
// sequence must run again. Either external reset input restarts from s0.
module tb_reset_controller;
  logic clk = 1'b0;
  always #8 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic por_n = 0, m2f_n = 1, pll_lock = 0, ram_init_done = 0, frame_mc = 0, fcm = 0;
  logic i_n, a_n, m_n, c_n;
  logic [3:0] state_o;
  reset_controller dut (.clk, .power_on_reset_n(por_n), .reset_n_m2f(m2f_n), .pll_lock,
                        .ram_init_done, .frame_mc, .frame_control_mod(fcm),
                        .interface_reset_n(i_n), .adc_pwm_reset_n(a_n), .math_reset_n(m_n),
                        .control_mod_reset_n(c_n), .state_o);

  // release order monitor: a block may only leave reset after the ones before
  always @(posedge clk) if (por_n && m2f_n) begin
    if (a_n) check(i_n, "ADC/PWM released before interface");
    if (m_n) check(a_n, "math released before ADC/PWM");
    if (c_n) check(m_n, "control released before math");
  end

  task automatic wait_clk(input int n); repeat (n) @(negedge clk); endtask
  task automatic pulse(ref logic s); s = 1; @(negedge clk); s = 0; endtask

  task automatic sequence_up(input bit first);
    ram_init_done = 0;   // the gate input is driven low again to hold math
    wait_clk(20);
    if (first) check(i_n, "interface released without PLL lock");
    check(!a_n && !m_n && !c_n, "others held while PLL unlocked");
    pll_lock = 1;
    wait_clk(5);
    check(a_n && !m_n, "ADC/PWM released after PLL lock; math held");
    wait_clk(50);
    check(!m_n, "math held until tables loaded");
    ram_init_done = 1; frame_mc = 1;
    wait_clk(20);
    check(!m_n, "math held while FRAME_MC is present");
    frame_mc = 0;
    wait_clk(3);
    check(m_n && !c_n, "math released; control held");
    wait_clk(40);
    check(!c_n, "control held until FRAME_CONTROL_MOD");
    pulse(fcm);
    wait_clk(3);
    check(c_n, "control released after FRAME_CONTROL_MOD");
    check(state_o == 4'd8, "in s8");
  endtask

  initial begin
    wait_clk(4);
    check(!i_n && !a_n && !m_n && !c_n, "all in reset at power on");
    por_n = 1;
    sequence_up(1);
    // PLL lock lost: back to s2
    pll_lock = 0;
    wait_clk(3);
    check(i_n && !a_n && !m_n && !c_n, "lock loss: interface kept, others reset");
    check(state_o == 4'd2, "back in s2");
    sequence_up(0);
    // reset from the microcontroller side
    @(negedge clk) m2f_n = 0;
    #1 check(!i_n && !a_n && !m_n && !c_n, "RESET_N_M2F resets all immediately");
    wait_clk(3);
    m2f_n = 1; pll_lock = 0; ram_init_done = 0;
    sequence_up(1);
    @(negedge clk) por_n = 0;
    #1 check(!i_n && state_o == 4'd0, "power-on reset restarts from s0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
