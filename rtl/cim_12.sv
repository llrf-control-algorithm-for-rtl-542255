// cim_12: the shared mixer/integrator array of the APEX DSP.
//
// Six IF signals -- adc1..adc4, the drive output (outm) and one ADC picked by
// xsel (adcx) -- are each mixed with cos and sin of an LO, giving 12 channels
// (channel 2k = signal k x cos, channel 2k+1 = signal k x sin).  The first five
// pairs use the receiver LO (DDS A); the adcx pair uses the characterization LO
// (DDS B), so it can be tuned to harmonics and interference lines.  Every
// 14 clocks `samp` copies all 12 second-integrator values into the shift chain;
// they then leave on sr_out in channel order 0..11 on the 12 clocks following
// samp, marked by sr_valid and numbered by sr_ch.  The channel set, LO
// assignment, xsel and serialization follow the design description; the outm
// scaling (top ADC_W bits of the DAC word) is this implementation's choice.
module cim_12
  import apex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc [4],
  input  logic signed [DAC_W-1:0] outm,
  input  logic [1:0]              xsel,
  input  logic signed [LO_W-1:0]  cos_a, sin_a,
  input  logic signed [LO_W-1:0]  cos_b, sin_b,
  input  logic                    samp,
  output logic signed [INT_W-1:0] sr_out,
  output logic                    sr_valid,
  output logic [3:0]              sr_ch
);
  logic signed [ADC_W-1:0] sig [NPAIR];
  logic signed [INT_W-1:0] chain [NCHAN+1];

  always_comb begin
    for (int k = 0; k < 4; k++) sig[k] = adc[k];
    sig[4] = ADC_W'(outm >>> (DAC_W-ADC_W));
    sig[5] = adc[xsel];
  end

  assign chain[NCHAN] = '0;
  for (genvar c = 0; c < NCHAN; c++) begin : g_chan
    logic signed [LO_W-1:0] lo;
    if (c/2 == NPAIR-1) begin : g_b
      assign lo = (c % 2 == 0) ? cos_b : sin_b;
    end else begin : g_a
      assign lo = (c % 2 == 0) ? cos_a : sin_a;
    end
    mon_chan u_chan (.clk, .rst, .adc(sig[c/2]), .lo, .samp,
                     .sr_in(chain[c+1]), .sr_out(chain[c]));
  end
  assign sr_out = chain[0];

  // Channel numbering of the serial stream
  logic [3:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; sr_valid <= 1'b0;
    end else if (samp) begin
      cnt <= '0; sr_valid <= 1'b1;
    end else if (sr_valid) begin
      cnt <= cnt + 4'd1;
      sr_valid <= (cnt != 4'(NCHAN-1));
    end
  end
  assign sr_ch = cnt;
endmodule
