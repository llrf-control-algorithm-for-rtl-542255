// phshift: two-tap gain and phase shifter, y[n] = (ka*x[n] + kb*x[n-2]) / 2**GF.
//
// On a signal at f_clk/7 the two taps, two samples apart, set both gain and
// phase of the result: this is how the feedback applies a complex gain to a raw
// IF stream.  Gains are signed 18-bit with GF fraction bits; output saturated to
// W bits and registered (1 clock).  The form K_a + K_b z^-2 is the design
// description's; formats are this implementation's.
module phshift #(
  parameter int W  = 18,
  parameter int GF = 15
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  input  logic signed [17:0]  ka,
  input  logic signed [17:0]  kb,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] d1, d2;
  logic signed [W+18:0] acc;
  logic signed [W+18:0] ys;
  always_comb begin
    acc = (W+19)'(ka) * (W+19)'(x) + (W+19)'(kb) * (W+19)'(d2);
    ys  = acc >>> GF;
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0; y <= '0;
    end else begin
      d1 <= x;
      d2 <= d1;
      if (ys > (W+19)'((1 <<< (W-1)) - 1))   y <= {1'b0, {(W-1){1'b1}}};
      else if (ys < -(W+19)'(1 <<< (W-1)))   y <= {1'b1, {(W-1){1'b0}}};
      else                                    y <= W'(ys);
    end
  end
endmodule
