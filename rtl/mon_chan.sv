// mon_chan: one channel of the 12-channel mixer/integrator array.
//
// Each clock the IF sample is multiplied by the LO (the digital mixer), and the
// product is summed by two cascaded integrators: the integrator half of the
// two-stage CIC decimator.  When samp is high the second integrator is copied into
// the output register; on every other clock that register loads sr_in, so the
// channels form a shift chain that serializes their results.  The integrators
// wrap (two's complement), which the later comb stages undo exactly as long as
// INT_W covers the CIC gain.  Mixer, two integrators and sample/shift stage follow
// the design description; the product scaling (>>> LO_W-1) is this design's choice.
module mon_chan
  import apex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc,
  input  logic signed [LO_W-1:0]  lo,
  input  logic                    samp,
  input  logic signed [INT_W-1:0] sr_in,
  output logic signed [INT_W-1:0] sr_out
);
  logic signed [ADC_W+LO_W-1:0] prod;
  logic signed [MIX_W-1:0]      mix;
  logic signed [INT_W-1:0]      int1, int2;

  always_ff @(posedge clk) begin
    if (rst) begin
      mix <= '0; int1 <= '0; int2 <= '0; sr_out <= '0;
    end else begin
      mix  <= MIX_W'(prod >>> (LO_W-1));
      int1 <= int1 + INT_W'(mix);
      int2 <= int2 + int1;
      sr_out <= samp ? int2 : sr_in;
    end
  end
  assign prod = adc * lo;
endmodule
