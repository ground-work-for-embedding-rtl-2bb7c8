// Trigonometric lookup table data component.
//
// Two trig_table_ram wrappers: the sine table in the 0x3000_0000 APB slot and the
// cosine table in the 0x3100_0000 slot (PADDR[24] picks the table inside the
// PSEL given for both). The microcontroller writes S(k) = sin(2*pi*k/1024) and
// C(k) = cos(2*pi*k/1024) in Q1.16 after reset. When both tables are complete,
// ram_init_done (RAM_INT_DONE) rises and the DSP reads S(k) and C(k) together at
// one address, one clock after presenting it.
module trig_lut
  import foc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  apb_req_t                 apb_req,
  output apb_rsp_t                 apb_rsp,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output trig_t                    sin_data,
  output trig_t                    cos_data,
  output logic                     ram_init_done
);
  apb_req_t req_sin, req_cos;
  apb_rsp_t rsp_sin, rsp_cos;
  logic     done_sin, done_cos;
  logic [TRIG_BITS-1:0] sin_raw, cos_raw;

  always_comb begin
    req_sin      = apb_req;
    req_cos      = apb_req;
    req_sin.psel = apb_req.psel && !apb_req.paddr[24];
    req_cos.psel = apb_req.psel &&  apb_req.paddr[24];
    apb_rsp      = apb_req.paddr[24] ? rsp_cos : rsp_sin;
  end

  trig_table_ram #(.DEPTH(DEPTH), .WIDTH(TRIG_BITS)) u_sin (
    .clk, .rst_n, .apb_req(req_sin), .apb_rsp(rsp_sin),
    .user_addr(addr), .user_rdata(sin_raw), .init_done(done_sin));

  trig_table_ram #(.DEPTH(DEPTH), .WIDTH(TRIG_BITS)) u_cos (
    .clk, .rst_n, .apb_req(req_cos), .apb_rsp(rsp_cos),
    .user_addr(addr), .user_rdata(cos_raw), .init_done(done_cos));

  assign sin_data      = trig_t'(sin_raw);
  assign cos_data      = trig_t'(cos_raw);
  assign ram_init_done = done_sin && done_cos;

endmodule
