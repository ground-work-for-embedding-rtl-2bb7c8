// Shared types and constants of the field-oriented motor-control fabric.
//
// All fabric logic runs from one 60 MHz clock. Fixed-point values are signed
// two's complement; a format Qi.f has i integer bits and f fraction bits besides
// the sign. The formats follow the datapath drawings of the design: ADC-derived
// resolver voltages Q1.12, table sine/cosine Q1.16, RDC tracking error Q2.15,
// speed Q14.3 (rad/s), position Q3.35 (rad), phase currents Q11.5 (ADC counts)
// and voltage references Q1.16 (1.0 = full modulation).
// The APB request/response bundles are the fabric side of the microcontroller's
// AHB-Lite-to-APB bridge; PSEL is already decoded for the receiving slave.
package foc_pkg;

  localparam int unsigned ADC_BITS   = 12;
  localparam int unsigned TRIG_BITS  = 18;  // Q1.16
  localparam int unsigned SPEED_BITS = 18;  // Q14.3
  localparam int unsigned POS_BITS   = 39;  // Q3.35
  localparam int unsigned CUR_BITS   = 18;  // Q11.5
  localparam int unsigned VOLT_BITS  = 18;  // Q1.16
  localparam int unsigned LUT_AW     = 10;  // 1024-entry tables

  typedef logic signed [TRIG_BITS-1:0]  trig_t;
  typedef logic signed [SPEED_BITS-1:0] speed_t;
  typedef logic signed [POS_BITS-1:0]   pos_t;
  typedef logic signed [CUR_BITS-1:0]   cur_t;
  typedef logic signed [VOLT_BITS-1:0]  volt_t;
  typedef logic        [ADC_BITS-1:0]   adc_code_t;

  // 2*pi in Q3.35
  localparam logic signed [POS_BITS-1:0] TWO_PI_Q35 = 39'sd215888603272;

  typedef struct packed {
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [31:0] paddr;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_rsp_t;

  // Enable bundle from the DSP control state machine to the datapath.
  typedef struct packed {
    logic en_shuffle;   // ENSHUFFLE: shift RDC histories, load mixer sign
    logic en_stage1;    // ENSTAGEI : ADC codes to volts
    logic en_stage2;    // ENSTAGEII: tracking error X1
    logic en_stage3;    // ENSTAGEIII: speed V1
    logic en_stage4;    // ENSTAGEIV: position P1
    logic en_tri;       // ENTRI: start a sine/cosine evaluation
    logic tri_sel;      // 0: RDC angle P2 with n=1, 1: electrical angle n*P1
    logic abc_load;     // capture Ia, Ib
    logic stage1_a;     // STAGEI_A : Clarke
    logic stage2_a;     // STAGEII_A: Park
    logic out_load;     // load omega, Id, Iq into the microcontroller registers
    logic dq_load;      // capture Vd, Vq
    logic stage1_b;     // STAGEI_B : inverse Park
    logic stage2_b;     // STAGEII_B: inverse Clarke
  } dsp_ctl_t;

  // Saturate a wide signed value to an N-bit signed result.
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int unsigned n);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (n-1)) - 64'sd1;
    lo = -(64'sd1 <<< (n-1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
