// half_band: half-band FIR applied to each channel of the serial waveform stream.
//
// Taps (x 1/128): 2, 0, -9, 0, 39, 64, 39, 0, -9, 0, 2 -- an 11-tap half-band
// low-pass with unity DC gain that sharpens the rejection of what the CIC
// decimator aliases.  The stream carries the 12 channels in a fixed order, so the
// same channel's previous samples sit 12, 24, ... words back in one delay line
// advanced by each valid input.  One output per input, one clock later, with the
// channel number passed along.  The coefficients -9/128, 39/128, 1/2 and 1/64
// are those of the design description; the outer taps 2/128 (= 1/64) placed
// symmetrically and the rounding are this implementation's reading.
module half_band
  import apex_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [CC_W-1:0] in_data,
  input  logic                   in_valid,
  input  logic [3:0]             in_ch,
  output logic signed [CC_W-1:0] out_data,
  output logic                   out_valid,
  output logic [3:0]             out_ch
);
  localparam int NT = 11;
  localparam int signed COEF [NT] = '{2, 0, -9, 0, 39, 64, 39, 0, -9, 0, 2};
  localparam int DL = NCHAN * (NT - 1);

  logic signed [CC_W-1:0] line [DL];
  logic signed [CC_W+8:0] acc;

  always_comb begin
    acc = (CC_W+9)'(COEF[0]) * (CC_W+9)'(in_data);
    for (int k = 1; k < NT; k++)
      acc += (CC_W+9)'(COEF[k]) * (CC_W+9)'(line[NCHAN*k-1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DL; k++) line[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        line[0] <= in_data;
        for (int k = 1; k < DL; k++) line[k] <= line[k-1];
        out_data <= CC_W'(sat(64'(acc + (CC_W+9)'(64)) >>> 7, CC_W));
        out_ch   <= in_ch;
      end
    end
  end
endmodule
