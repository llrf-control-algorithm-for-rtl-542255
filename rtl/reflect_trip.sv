// reflect_trip: reflected-power fault detector with a filling-transient threshold.
//
// On the decay-path stream it pairs the I and Q words of the selected channel
// pair (refl_ch), forms P = I^2 + Q^2, and compares it with
//     thresh(n) = thresh_init * (1 - decaycoef^n) + thresh_noise
// where n counts the pair's samples since the last pulse_start.  decaycoef^n is
// kept as a running product (unsigned, 1.0 = 2**17), so the threshold follows
// the transient without a power function.  P > thresh(n) sets the sticky
// reflect_fault until `clear`.  The threshold formula and the I^2+Q^2 test are
// those of the design description; the fixed-point formats, sample counting
// from pulse_start and the sticky flag are this implementation's choices.
module reflect_trip
  import apex_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [CC_W-1:0] in_data,
  input  logic                   in_valid,
  input  logic [3:0]             in_ch,
  input  logic [2:0]             refl_ch,
  input  logic                   pulse_start,
  input  logic [31:0]            thresh_init,
  input  logic [31:0]            thresh_noise,
  input  logic [17:0]            decaycoef,
  input  logic                   clear,
  output logic [2*CC_W-1:0]      power,
  output logic [33:0]            thresh,
  output logic                   reflect_fault
);
  logic signed [CC_W-1:0] i_r;
  logic [17:0]  pw;           // decaycoef^n, 1.0 = 2**17
  logic [35:0]  pw_next;
  logic [49:0]  ramp;
  logic         is_i, is_q;
  logic signed [2*CC_W+1:0] p_now;

  always_comb begin
    is_i    = in_valid && (in_ch == {refl_ch, 1'b0});
    is_q    = in_valid && (in_ch == {refl_ch, 1'b1});
    pw_next = pw * decaycoef;
    ramp    = thresh_init * 50'(18'd131072 - pw);
    p_now   = (2*CC_W+2)'(i_r) * (2*CC_W+2)'(i_r) + (2*CC_W+2)'(in_data) * (2*CC_W+2)'(in_data);
    thresh  = 34'(ramp >> 17) + 34'(thresh_noise);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pw <= 18'd131072; reflect_fault <= 1'b0; power <= '0; i_r <= '0;
    end else begin
      if (clear) reflect_fault <= 1'b0;
      if (pulse_start) pw <= 18'd131072;
      if (is_i) i_r <= in_data;
      if (is_q) begin
        power <= (2*CC_W)'(p_now);
        if (p_now > (2*CC_W+2)'(thresh)) reflect_fault <= 1'b1;
        if (!pulse_start) pw <= 18'(pw_next >> 17);
      end
    end
  end
endmodule
