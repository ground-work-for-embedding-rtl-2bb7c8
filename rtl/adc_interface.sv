// Interface to the two external dual-channel 12-bit ADCs.
//
// Both ADCs share SCLK, CS and DIN; each returns its own DOUT. Channel 0 of ADC A
// and of ADC B carries the resolver sine and cosine terms, channel 1 the phase
// currents Ia and Ib, so one transfer samples a pair simultaneously. The state
// machine repeats S1, S2, S3 at 40 kHz (375 SCLK periods of 15 MHz):
//   S0  counters cleared, CS high, DIN low; leaves when FRAME_ADC is high
//   S1  18 SCLKs: DIN selects channel 0; the word read is a dummy
//   S2  18 SCLKs: DIN selects channel 1; reads the channel 0 pair (resolver)
//   S3  339 SCLKs: DIN selects channel 0; reads the channel 1 pair (currents)
// Any state returns to S0 while FRAME_ADC is low, so the reference PWM can pull
// the sequence back into phase; resync flags a pull that came at an unexpected
// point. A transfer is 16 SCLKs with CS low at the start of the state, then CS
// stays high for the rest of it.
//
// Bit timing (this design's choice; the document leaves it to the ADC data sheet):
// SCLK idles high, each bit is 4 clocks, high for two and low for two. DIN is
// changed at the start of a bit and is read by the ADC on the SCLK falling edge;
// DOUT is taken at the end of the second clock of each bit (SCLK still high),
// MSB first. The 12-bit
// result is the low 12 bits of the 16-bit word. frame_mc (resolver pair ready)
// and i_ready (current pair ready) are one-clock pulses one clock after the last
// bit of the S2 and S3 transfers. SCLK, CS and DIN are decoded from registers.
module adc_interface #(
  parameter int unsigned SCLK_DIV  = 4,
  parameter int unsigned S1_SCLKS  = 18,
  parameter int unsigned S2_SCLKS  = 18,
  parameter int unsigned S3_SCLKS  = 339,
  parameter int unsigned XFER_BITS = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     frame_adc,
  output logic                     adc_sclk,
  output logic                     adc_cs_n,
  output logic                     adc_din,
  input  logic                     adc_dout_a,
  input  logic                     adc_dout_b,
  output foc_pkg::adc_code_t       sin_code,
  output foc_pkg::adc_code_t       cos_code,
  output foc_pkg::adc_code_t       ia_code,
  output foc_pkg::adc_code_t       ib_code,
  output logic                     frame_mc,
  output logic                     i_ready,
  output logic                     resync
);
  typedef enum logic [1:0] {S0, S1, S2, S3} adc_state_t;

  localparam int unsigned PHW = (SCLK_DIV > 1) ? $clog2(SCLK_DIV) : 1;

  adc_state_t      state;
  logic [PHW-1:0]  ph;       // clock within one SCLK period
  logic [8:0]      sc;       // SCLK period within the state
  logic [XFER_BITS-1:0] sh_a, sh_b;

  logic xfer;
  logic [8:0] state_len;
  logic [XFER_BITS-1:0] din_word;

  always_comb begin
    unique case (state)
      S1:      begin state_len = 9'(S1_SCLKS); din_word = XFER_BITS'(16'h0000); end
      S2:      begin state_len = 9'(S2_SCLKS); din_word = XFER_BITS'(16'h3000); end
      S3:      begin state_len = 9'(S3_SCLKS); din_word = XFER_BITS'(16'h0000); end
      default: begin state_len = 9'd1;         din_word = '0;                   end
    endcase
  end

  assign xfer     = (state != S0) && (sc < 9'(XFER_BITS));
  assign adc_cs_n = !xfer;
  assign adc_sclk = !(xfer && (ph >= PHW'(SCLK_DIV/2)));
  assign adc_din  = xfer ? din_word[XFER_BITS-1 - int'(sc)] : 1'b0;

  wire last_ph   = (ph == PHW'(SCLK_DIV-1));
  wire expected_pull = (state == S3) && (sc >= 9'(S3_SCLKS-2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S0;
      ph       <= '0;
      sc       <= '0;
      sh_a     <= '0;
      sh_b     <= '0;
      sin_code <= '0;
      cos_code <= '0;
      ia_code  <= '0;
      ib_code  <= '0;
      frame_mc <= 1'b0;
      i_ready  <= 1'b0;
      resync   <= 1'b0;
    end else begin
      frame_mc <= 1'b0;
      i_ready  <= 1'b0;
      resync   <= 1'b0;
      if (!frame_adc) begin
        if (state != S0 && !expected_pull) resync <= 1'b1;
        state <= S0;
        ph    <= '0;
        sc    <= '0;
      end else if (state == S0) begin
        state <= S1;
        ph    <= '0;
        sc    <= '0;
      end else begin
        // shift in DOUT at the end of the second clock of each bit
        if (xfer && ph == PHW'(1)) begin
          sh_a <= {sh_a[XFER_BITS-2:0], adc_dout_a};
          sh_b <= {sh_b[XFER_BITS-2:0], adc_dout_b};
        end
        // word complete: one clock into the first quiet SCLK period
        if (sc == 9'(XFER_BITS) && ph == '0) begin
          if (state == S2) begin
            sin_code <= sh_a[11:0];
            cos_code <= sh_b[11:0];
            frame_mc <= 1'b1;
          end else if (state == S3) begin
            ia_code <= sh_a[11:0];
            ib_code <= sh_b[11:0];
            i_ready <= 1'b1;
          end
        end
        ph <= last_ph ? '0 : ph + PHW'(1);
        if (last_ph) begin
          if (sc == state_len - 9'd1) begin
            sc <= '0;
            unique case (state)
              S1:      state <= S2;
              S2:      state <= S3;
              default: state <= S1;
            endcase
          end else begin
            sc <= sc + 9'd1;
          end
        end
      end
    end
  end

endmodule
