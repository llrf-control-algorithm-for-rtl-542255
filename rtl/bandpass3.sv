// bandpass3: third-order IIR with transfer function
//     H(z) = (1 - z^-1) / (1 - z^-1 + c z^-2 + d z^-3)
// i.e.  y[n] = x[n] - x[n-1] + y[n-1] - (c*y[n-2] + d*y[n-3]) / 2**GF.
// The zero at DC removes offsets; with suitable c, d the poles put a narrow
// high-gain resonance at the IF, acting as the integral term of an IF-domain
// feedback.  c, d are signed 18-bit with GF fraction bits; the state is kept
// W+6 bits wide and saturated there; the output is saturated to W bits.
// One clock latency (y is the registered state).  The transfer function is the
// design description's; formats and saturation are this implementation's.
module bandpass3 #(
  parameter int W  = 18,
  parameter int GF = 15
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  input  logic signed [17:0]  c,
  input  logic signed [17:0]  d,
  output logic signed [W-1:0] y
);
  localparam int SW = W + 6;
  logic signed [W-1:0]  x1;
  logic signed [SW-1:0] y1, y2, y3;
  logic signed [SW+19:0] fb, nxt;
  always_comb begin
    fb  = (SW+20)'(c) * (SW+20)'(y2) + (SW+20)'(d) * (SW+20)'(y3);
    nxt = (SW+20)'(x) - (SW+20)'(x1) + (SW+20)'(y1) - (fb >>> GF);
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0; y1 <= '0; y2 <= '0; y3 <= '0;
    end else begin
      x1 <= x;
      y3 <= y2;
      y2 <= y1;
      if (nxt > (SW+20)'((1 <<< (SW-1)) - 1))   y1 <= {1'b0, {(SW-1){1'b1}}};
      else if (nxt < -(SW+20)'(1 <<< (SW-1)))   y1 <= {1'b1, {(SW-1){1'b0}}};
      else                                       y1 <= SW'(nxt);
    end
  end
  always_comb begin
    if (y1 > SW'((1 <<< (W-1)) - 1))   y = {1'b0, {(W-1){1'b1}}};
    else if (y1 < -SW'(1 <<< (W-1)))   y = {1'b1, {(W-1){1'b0}}};
    else                               y = W'(y1);
  end
endmodule
