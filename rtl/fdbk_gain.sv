// fdbk_gain: RF amplitude and phase feedback on the raw IF error.
//
// The loop filter realizes
//   (Kpa + Kpb z^-2) * (1 + (Kia + Kib z^-2) * (1 - z^-1)/(1 - z^-1 + c z^-2 + d z^-3))
// as: p = phshift_P(err); out = p + bandpass3(phshift_I(p)).  The proportional
// branch is delayed by two clocks to line up with the integral branch.  The drive
// is then selected: with rf_on low the output is 0; otherwise it is the loop
// output when closeloop is set, or the open-loop set point `src` when not.
// err = src - probe is formed here.  Latency from probe to drive: 5 clocks.
// Structure, gains and the closeloop / rf_on selection follow the design
// description; widths, delays and saturation are this implementation's choices.
module fdbk_gain
  import apex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W+1:0] probe,   // filtered cavity probe (infilt)
  input  logic signed [DAC_W-1:0] src,     // IF set point (source)
  input  logic signed [17:0]      kpa, kpb, kia, kib, c, d,
  input  logic                    closeloop,
  input  logic                    rf_on,
  output logic signed [DAC_W-1:0] drive,
  output logic signed [17:0]      err
);
  logic signed [17:0] p, i_in, bp, p_d1, p_d2;
  logic signed [19:0] sum;

  always_ff @(posedge clk) begin
    if (rst) err <= '0;
    else     err <= 18'(sat(64'(src) - 64'(probe), 18));
  end

  phshift u_p (.clk, .rst, .x(err), .ka(kpa), .kb(kpb), .y(p));
  phshift u_i (.clk, .rst, .x(p),   .ka(kia), .kb(kib), .y(i_in));
  bandpass3 u_bp (.clk, .rst, .x(i_in), .c, .d, .y(bp));

  always_comb sum = 20'(p_d2) + 20'(bp);

  always_ff @(posedge clk) begin
    if (rst) begin
      p_d1 <= '0; p_d2 <= '0; drive <= '0;
    end else begin
      p_d1 <= p;
      p_d2 <= p_d1;
      if (!rf_on)         drive <= '0;
      else if (closeloop) drive <= DAC_W'(sat(64'(sum), DAC_W));
      else                drive <= src;
    end
  end
endmodule
