// Register exchange between the DSP component and the microcontroller.
//
// Zero-wait APB slave (PREADY always 1) in the 0x3200_0000 slot, word offsets
// decoded from PADDR[4:2]:
//   0x00 omega (read)  0x04 Id (read)  0x08 Iq (read)
//   0x0C Vd (write)    0x10 Vq (write)  - Vd and Vq also read back
// Read values are sign-extended to 32 bits; Vd and Vq take PWDATA[17:0] (Q1.16).
// Timing, with T1 the SETUP cycle and T2 the ACCESS cycle of a transfer: the
// decoded write enables EN_Vd / EN_Vq and the read data register PRDATA_t are
// registered at the start of T2, and Vd / Vq at the start of T3.
// load copies omega, Id and Iq from the DSP datapath into the read registers.
// f_u_completed pulses for one clock after the microcontroller has read Iq (the
// last of its inputs); u_f_completed pulses with the Vq register update (Vq being
// the last value it writes). The DSP controller tracks the exchange with them.
// Registers, addresses and the T2/T3 timing follow the design description; which
// access marks completion is this design's choice.
module fabric_transactions
  import foc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  apb_req_t  apb_req,
  output apb_rsp_t  apb_rsp,
  input  logic      load,
  input  speed_t    omega_in,
  input  cur_t      id_in,
  input  cur_t      iq_in,
  output volt_t     vd,
  output volt_t     vq,
  output logic      u_f_completed,
  output logic      f_u_completed
);
  typedef enum logic [2:0] {
    R_OMEGA = 3'd0, R_ID = 3'd1, R_IQ = 3'd2, R_VD = 3'd3, R_VQ = 3'd4
  } reg_idx_t;

  speed_t omega_r;
  cur_t   id_r, iq_r;
  logic   en_vd, en_vq;
  logic [31:0] prdata_t;

  wire [2:0] idx    = apb_req.paddr[4:2];
  wire       setup  = apb_req.psel && !apb_req.penable;
  wire       access = apb_req.psel &&  apb_req.penable;

  logic [31:0] rd_mux;
  always_comb begin
    unique case (idx)
      R_OMEGA: rd_mux = 32'(omega_r);
      R_ID:    rd_mux = 32'(id_r);
      R_IQ:    rd_mux = 32'(iq_r);
      R_VD:    rd_mux = 32'(vd);
      R_VQ:    rd_mux = 32'(vq);
      default: rd_mux = 32'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      omega_r       <= '0;
      id_r          <= '0;
      iq_r          <= '0;
      vd            <= '0;
      vq            <= '0;
      en_vd         <= 1'b0;
      en_vq         <= 1'b0;
      prdata_t      <= '0;
      u_f_completed <= 1'b0;
      f_u_completed <= 1'b0;
    end else begin
      u_f_completed <= 1'b0;
      f_u_completed <= 1'b0;
      if (load) begin
        omega_r <= omega_in;
        id_r    <= id_in;
        iq_r    <= iq_in;
      end
      // end of T1: decode
      en_vd <= setup && apb_req.pwrite && (idx == R_VD);
      en_vq <= setup && apb_req.pwrite && (idx == R_VQ);
      if (setup && !apb_req.pwrite) prdata_t <= rd_mux;
      // end of T2: write the variable registers
      if (access && en_vd) vd <= volt_t'(apb_req.pwdata[VOLT_BITS-1:0]);
      if (access && en_vq) begin
        vq            <= volt_t'(apb_req.pwdata[VOLT_BITS-1:0]);
        u_f_completed <= 1'b1;
      end
      if (access && !apb_req.pwrite && idx == R_IQ) f_u_completed <= 1'b1;
    end
  end

  always_comb begin
    apb_rsp.prdata  = prdata_t;
    apb_rsp.pready  = 1'b1;
    apb_rsp.pslverr = 1'b0;
  end

  // APB rule: PENABLE is raised only in the cycle after a SETUP cycle.
  logic setup_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) setup_q <= 1'b0;
    else        setup_q <= setup;

  a_access_after_setup: assert property (@(posedge clk) disable iff (!rst_n)
      access |-> setup_q)
    else $error("APB ACCESS without SETUP");

endmodule
