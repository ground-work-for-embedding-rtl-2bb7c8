// Self-checking test of trig_table_ram.
//
// An APB master writes all 1024 words, reading some back during initialisation.
// Checks: init_done stays low until the last write and rises right after it;
// the DSP side then reads every word with one clock of latency; after hand-over
// an APB write is refused with PSLVERR and leaves the RAM unchanged; PREADY is 1.
module tb_trig_table_ram;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic [9:0] user_addr = '0;
  logic [17:0] user_rdata;
  logic init_done;
  trig_table_ram dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .user_addr, .user_rdata, .init_done);

  function automatic logic [17:0] pat(int k);
    return 18'((k * 37 + 5) ^ (k << 7));
  endfunction

  task automatic apb_write(input logic [31:0] a, input logic [31:0] d, output logic err);
    @(negedge clk);
    req.psel = 1'b1; req.penable = 1'b0; req.pwrite = 1'b1; req.paddr = a; req.pwdata = d;
    @(negedge clk);
    req.penable = 1'b1;
    #1;
    check(rsp.pready, "PREADY");
    err = rsp.pslverr;
    @(negedge clk);
    req.psel = 1'b0; req.penable = 1'b0;
  endtask

  task automatic apb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    req.psel = 1'b1; req.penable = 1'b0; req.pwrite = 1'b0; req.paddr = a;
    @(negedge clk);
    req.penable = 1'b1;
    #1;
    d = rsp.prdata;
    @(negedge clk);
    req.psel = 1'b0; req.penable = 1'b0;
  endtask

  initial begin
    logic err;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1024; k++) begin
      check(!init_done, "not done before the last write");
      apb_write(32'h3000_0000 + 32'(k * 4), {14'h1555, pat(k)}, err);
      check(!err, "write accepted during init");
      if (k % 97 == 0) begin
        apb_read(32'h3000_0000 + 32'(k * 4), d);
        check(d == 32'($signed(pat(k))), "read back during init");
      end
    end
    check(init_done, "done after 1024 writes");
    // DSP side, one clock latency
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk) user_addr = 10'(k);
      @(negedge clk);
      check(user_rdata == pat(k), "DSP read");
    end
    apb_write(32'h3000_0010, 32'h0, err);
    check(err, "write refused after hand-over");
    @(negedge clk) user_addr = 10'd4;
    @(negedge clk);
    check(user_rdata == pat(4), "RAM unchanged by refused write");
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
