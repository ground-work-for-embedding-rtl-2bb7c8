// Self-checking test of dsp_control.
//
// Environment models: FRAME_MC every 1500 clocks, I_ready 72 clocks later,
// a trig unit that answers TRI_done 5 clocks after each start, and a host
// that on each interrupt waits a random time, reads (F_U_completed) and then
// writes (U_F_completed). Each frame the strobes seen must follow the fixed
// order below, with one strobe each and one interrupt per frame. The clocks
// from FRAME_MC to the interrupt and from U_F_completed to the last strobe
// are measured and must match the documented values. A host that answers
// within the same clock as the interrupt, and an I_ready that arrives before
// the state machine waits for it, must not be lost; an I_ready left over from
// before the frame must be dropped, not used for the frame's currents.
module tb_dsp_control;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic frame_mc = 0, i_ready = 0, tri_done = 0, f_u = 0, u_f = 0;
  dsp_ctl_t ctl;
  logic irq;
  logic [4:0] state_o;
  dsp_control dut (.clk, .rst_n, .frame_mc, .i_ready, .tri_done, .f_u_completed(f_u),
                   .u_f_completed(u_f), .ctl, .irq, .state_o);

  // strobe codes: 1 shuffle+stage I, 2 trig start (then 0 = speed angle or
  // 6 = electrical angle), 3..5 stages II..IV, 7..9 current load and the two
  // abc->dq stages, 10 output load, 11 interrupt, 12..14 dq->abc load/stages
  localparam int IRQ_MIN = 21;
  int seen[$];
  int i_delay = 72;
  int cyc = 0, t_mc = 0, t_uf = 0, lat_irq = -1, lat_end = -1, n_irq = 0;
  logic host_fast = 0, stale = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (ctl.en_shuffle && ctl.en_stage1) seen.push_back(1);
      if (ctl.en_tri) seen.push_back(2);
      if (ctl.en_stage2) seen.push_back(3);
      if (ctl.en_stage3) seen.push_back(4);
      if (ctl.en_stage4) seen.push_back(5);
      if (ctl.en_tri && ctl.tri_sel) seen.push_back(6);
      if (ctl.en_tri && !ctl.tri_sel) seen.push_back(0);
      if (ctl.abc_load) seen.push_back(7);
      if (ctl.stage1_a) seen.push_back(8);
      if (ctl.stage2_a) seen.push_back(9);
      if (ctl.out_load) seen.push_back(10);
      if (irq) begin seen.push_back(11); n_irq++; lat_irq = cyc - t_mc; end
      if (ctl.dq_load) seen.push_back(12);
      if (ctl.stage1_b) seen.push_back(13);
      if (ctl.stage2_b) begin seen.push_back(14); lat_end = cyc - t_uf; end
    end
  end

  // trig unit model: done 5 clocks after start
  initial forever begin
    @(posedge clk);
    if (ctl.en_tri) begin
      repeat (4) @(posedge clk);
      @(negedge clk) tri_done = 1;
      @(negedge clk) tri_done = 0;
    end
  end

  // ADC timing model
  initial forever begin
    @(posedge rst_n);
    forever begin
      if (stale) begin
        // a spurious I_ready well before the frame, as after a resynchronisation
        repeat (1500 - 1 - i_delay - 300) @(negedge clk);
        i_ready = 1;
        @(negedge clk) i_ready = 0;
        repeat (299) @(negedge clk);
      end else begin
        repeat (1500 - 1 - i_delay) @(negedge clk);
      end
      frame_mc = 1; t_mc = cyc + 1;
      @(negedge clk) frame_mc = 0;
      repeat (i_delay - 1) @(negedge clk);
      i_ready = 1;
      @(negedge clk) i_ready = 0;
    end
  end

  // host model
  initial forever begin
    @(posedge clk);
    if (irq) begin
      if (!host_fast) repeat ($urandom_range(20, 400)) @(negedge clk);
      else @(negedge clk);
      f_u = 1; @(negedge clk) f_u = 0;
      if (!host_fast) repeat ($urandom_range(1, 300)) @(negedge clk);
      u_f = 1; t_uf = cyc + 1; @(negedge clk) u_f = 0;
    end
  end

  task automatic check_frame(input int k);
    // expected record: 1,(2,0),3,4,5,(2,6),7,8,9,10,11,12,13,14
    int exp_q[$] = '{1, 2, 0, 3, 4, 5, 2, 6, 7, 8, 9, 10, 11, 12, 13, 14};
    check(seen.size() == exp_q.size(), $sformatf("frame %0d: %0d strobes", k, seen.size()));
    for (int i = 0; i < exp_q.size() && i < seen.size(); i++)
      check(seen[i] == exp_q[i], $sformatf("frame %0d strobe %0d: %0d vs %0d", k, i,
                                           seen[i], exp_q[i]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      if (k == 10) host_fast = 1;        // host answers immediately
      if (k == 20) begin host_fast = 0; i_delay = 5; end  // I_ready before S9
      if (k == 26) begin i_delay = 72; stale = 1; end     // stale I_ready dropped
      @(posedge frame_mc);
      seen.delete();
      n_irq = 0;
      repeat (1490) @(posedge clk);
      check_frame(k);
      check(n_irq == 1, "one interrupt per frame");
      check(lat_irq == ((k >= 20 && k < 26) ? IRQ_MIN : i_delay + 4), $sformatf("irq latency %0d", lat_irq));
      check(lat_end == 3, $sformatf("U_F to last strobe %0d", lat_end));
      if (k == 0 || k == 25) $display("frame %0d: MC->irq %0d clocks, U_F->end %0d", k,
                                       lat_irq, lat_end);
    end
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
