// Behavioural model of one dual-channel 12-bit serial ADC, for testbenches only.
//
// Oversamples its serial pins with the fabric clock. On the CS falling edge it
// samples the channel chosen by the previous transfer's control word and starts
// shifting out {0, channel, 0, 0, result[11:0]} MSB first; each later SCLK falling
// edge moves to the next bit and takes one DIN bit. When CS rises after a full
// 16-bit transfer, DIN bit 13 of the received word selects the next channel.
// ch0/ch1 are the analog inputs as codes; sample_* report each conversion.
module ad7912_model (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] ch0,
  input  logic [11:0] ch1,
  output logic        sample_pulse,   // one clock, at the CS falling edge
  output logic        sample_ch,      // channel converted
  output logic [11:0] sample_val      // value converted
);
  logic cs_q = 1'b1, sclk_q = 1'b1;
  logic sel = 1'b0;
  logic [15:0] word = '0, din_sh = '0;
  int unsigned nbit = 0;

  initial begin
    dout = 1'b0;
    sample_pulse = 1'b0;
    sample_ch = 1'b0;
    sample_val = '0;
  end

  always @(posedge clk) begin
    cs_q   <= cs_n;
    sclk_q <= sclk;
    sample_pulse <= 1'b0;
    if (cs_q && !cs_n) begin
      word         <= {1'b0, sel, 2'b00, sel ? ch1 : ch0};
      dout         <= 1'b0;
      nbit         <= 1;
      sample_pulse <= 1'b1;
      sample_ch    <= sel;
      sample_val   <= sel ? ch1 : ch0;
    end else if (!cs_n && sclk_q && !sclk) begin
      din_sh <= {din_sh[14:0], din};
      dout   <= (nbit < 16) ? word[15 - nbit] : 1'b0;
      nbit   <= nbit + 1;
    end else if (!cs_q && cs_n) begin
      if (nbit == 17) sel <= din_sh[13];
      dout <= 1'b0;
    end
  end

endmodule
