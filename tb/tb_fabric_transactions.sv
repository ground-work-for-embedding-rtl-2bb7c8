// Self-checking test of fabric_transactions.
//
// An APB host model does SETUP/ACCESS transfers to the five register
// indices. Checks: reads return the values captured at the last load pulse
// (sign extended to 32 bits), not the live inputs; Vd/Vq writes land at the
// end of the ACCESS cycle; U_F_completed pulses once, for one clock, after
// the Vq write; F_U_completed pulses once after the Iq read; reads of the
// written Vd/Vq come back; unused indices read zero.
module tb_fabric_transactions;
  import foc_pkg::*;
  logic clk = 1'b0;
  always #8 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  apb_req_t apb_req;
  apb_rsp_t apb_rsp;
  logic load = 0;
  speed_t omega_in = '0;
  cur_t id_in = '0, iq_in = '0;
  volt_t vd, vq;
  logic u_f_completed, f_u_completed;
  fabric_transactions dut (.clk, .rst_n, .apb_req, .apb_rsp, .load, .omega_in, .id_in,
                           .iq_in, .vd, .vq, .u_f_completed, .f_u_completed);

  int n_uf = 0, n_fu = 0;
  always @(posedge clk) begin
    if (u_f_completed) n_uf++;
    if (f_u_completed) n_fu++;
  end

  initial apb_req = '0;
  task automatic apb_write(input int idx, input logic [31:0] d);
    @(negedge clk);
    apb_req = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b1, paddr: 32'h3200_0000 | 32'(idx * 4),
                pwdata: d};
    @(negedge clk); apb_req.penable = 1'b1;
    @(negedge clk); apb_req = '0;
  endtask
  task automatic apb_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    apb_req = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b0, paddr: 32'h3200_0000 | 32'(idx * 4),
                pwdata: 32'(0)};
    @(negedge clk); apb_req.penable = 1'b1;
    #1 check(apb_rsp.pready, "PREADY high in ACCESS");
    d = apb_rsp.prdata;
    @(negedge clk); apb_req = '0;
  endtask

  initial begin
    logic [31:0] r;
    speed_t w; cur_t a, b; volt_t x, y;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 50; it++) begin
      w = speed_t'($urandom); a = cur_t'($urandom); b = cur_t'($urandom);
      x = volt_t'($urandom); y = volt_t'($urandom);
      @(negedge clk);
      omega_in = w; id_in = a; iq_in = b; load = 1;
      @(negedge clk); load = 0;
      // the live inputs change; the registers must keep the loaded values
      omega_in = ~w; id_in = ~a; iq_in = ~b;
      n_uf = 0; n_fu = 0;
      apb_read(0, r); check(r == 32'(w), "omega read");
      apb_read(1, r); check(r == 32'(a), "Id read");
      check(n_fu == 0, "no F_U before Iq read");
      apb_read(2, r); check(r == 32'(b), "Iq read");
      @(negedge clk);
      check(n_fu == 1, "F_U once after Iq read");
      apb_write(3, 32'(x));
      check(vd == x && n_uf == 0, "Vd written, no U_F yet");
      apb_write(4, 32'(y));
      check(vq == y, "Vq written");
      @(negedge clk);
      check(n_uf == 1, "U_F once after Vq write");
      apb_read(3, r); check(r == 32'(x), "Vd readback");
      apb_read(4, r); check(r == 32'(y), "Vq readback");
      apb_read(6, r); check(r == 32'd0, "unused index reads zero");
      apb_write(0, 32'hdead_beef);
      apb_read(0, r); check(r == 32'(w), "omega is read-only");
      check(n_uf == 1 && n_fu == 1, "no further completion pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
