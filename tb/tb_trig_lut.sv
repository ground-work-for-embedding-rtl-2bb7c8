// Self-checking test of trig_lut.
//
// The sine table (0x3000_0000) is written first, then the cosine table
// (0x3100_0000), both with values computed here as round(65536*sin/cos(2*pi*k/1024)).
// Checks: RAM_INT_DONE stays low after the sine table alone and rises after the
// cosine table; the DSP address returns S(k) and C(k) together one clock later;
// APB reads during initialisation reach the right table.
module tb_trig_lut;
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
  logic [9:0] addr = '0;
  trig_t sin_data, cos_data;
  logic done;
  trig_lut dut (.clk, .rst_n, .apb_req(req), .apb_rsp(rsp), .addr, .sin_data, .cos_data,
                .ram_init_done(done));

  localparam real PI = 3.14159265358979;
  function automatic trig_t s_of(int k); return trig_t'($rtoi($floor(65536.0 * $sin(2.0*PI*k/1024.0) + 0.5))); endfunction
  function automatic trig_t c_of(int k); return trig_t'($rtoi($floor(65536.0 * $cos(2.0*PI*k/1024.0) + 0.5))); endfunction

  task automatic apb(input logic wr, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    req.psel = 1'b1; req.penable = 1'b0; req.pwrite = wr; req.paddr = a; req.pwdata = wd;
    @(negedge clk);
    req.penable = 1'b1;
    #1 rd = rsp.prdata;
    @(negedge clk);
    req.psel = 1'b0; req.penable = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1024; k++) begin
      apb(1'b1, 32'h3000_0000 + 32'(4*k), 32'(s_of(k)), d);
      if (k == 300) begin
        apb(1'b0, 32'h3000_0000 + 32'(4*256), 0, d);
        check(d == 32'(s_of(256)), "sine table read back");
      end
    end
    check(!done, "not done with the sine table alone");
    for (int k = 0; k < 1024; k++) begin
      apb(1'b1, 32'h3100_0000 + 32'(4*k), 32'(c_of(k)), d);
      if (k == 0) begin
        apb(1'b0, 32'h3100_0000, 0, d);
        check(d == 32'(c_of(0)), "cosine table read back");
      end
    end
    check(done, "RAM_INT_DONE after both tables");
    for (int k = 0; k < 1024; k += 3) begin
      @(negedge clk) addr = 10'(k);
      @(negedge clk);
      check(sin_data == s_of(k) && cos_data == c_of(k), "S(k), C(k) at one address");
    end
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
