// infilt: input filter of the low-latency RF feedback path.
//
// The cavity probe IF samples are used directly (no down-conversion, no CIC) to
// keep the loop delay small.  This FIR forms
//     y[n] = x[n-1] + 0.5*x[n-2] - 0.25*x[n-3] - 0.25*x[n-4]
// with shifts and adds only; the output is registered (total delay of the
// newest tap: 2 clocks) and is ADC_W+2 bits wide.  The tap values 0.5, -0.25,
// -0.25 and the four delays are those of the design description; assigning the
// values to particular delays and the unity first tap are this implementation's
// reading.
module infilt
  import apex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] x,
  output logic signed [ADC_W+1:0] y
);
  logic signed [ADC_W-1:0] d [1:4];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= 4; k++) d[k] <= '0;
      y <= '0;
    end else begin
      d[1] <= x;
      for (int k = 2; k <= 4; k++) d[k] <= d[k-1];
      // 4*y = 4*x1 + 2*x2 - x3 - x4, then /4 with rounding
      y <= (ADC_W+2)'(((ADC_W+4)'(d[1]) * (ADC_W+4)'(4) + (ADC_W+4)'(d[2]) * (ADC_W+4)'(2)
                       - (ADC_W+4)'(d[3]) - (ADC_W+4)'(d[4]) + (ADC_W+4)'(2)) >>> 2);
    end
  end
endmodule
