// piloop3: laser phase-lock controller.
//
// Each valid laser phase sample goes through the phase detector
// e = phase - setpoint (wrapped, signed; full turn = 2**PH_W).  The fast-piezo
// drive is a proportional-integral law with a single-pole smoothing of the
// integral term:
//     I1[n]  = I1[n-1] + Ki*e[n]
//     L[n]   = L[n-1]  + pole*(I1[n] - L[n-1]) / 2**GF
//     fast   = (Kp*e[n] + L[n]) / 2**OUT_SH
// and an extra integrator drives the slow piezo: I2[n] = I2[n-1] + Ki2*e[n],
// slow = I2 / 2**OUT_SH.  Gains are signed GAIN_W-bit numbers with GF fraction
// bits.  Accumulators saturate instead of wrapping.  Outputs update one clock
// after `valid`, marked by out_valid.  The phase detector, Kp, Ki, pole and Ki2
// terms and the slow-piezo integrator follow the design description; the exact
// placement of the pole, formats and saturation are this implementation's choices.
module piloop3
  import apex_pkg::*;
#(
  parameter int GAIN_W = 18,
  parameter int GF     = 15,
  parameter int OUT_W  = 16,
  parameter int OUT_SH = 19,
  parameter int ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid,
  input  logic [PH_W-1:0]          phase,
  input  logic [PH_W-1:0]          setpoint,
  input  logic signed [GAIN_W-1:0] kp, ki, pole, ki2,
  output logic signed [PH_W-1:0]   err,
  output logic signed [OUT_W-1:0]  fast,
  output logic signed [OUT_W-1:0]  slow,
  output logic                     out_valid
);
  logic signed [ACC_W-1:0] i1, lp, i2;
  logic signed [ACC_W-1:0] i1_n, lp_n, i2_n, p_term;
  logic signed [63:0] t;

  always_comb begin
    err    = $signed(phase - setpoint);
    p_term = ACC_W'(kp * err);
    i1_n   = ACC_W'(sat(64'(i1) + 64'(ki * err), ACC_W));
    t      = 64'(pole) * 64'(i1_n - lp);
    lp_n   = ACC_W'(sat(64'(lp) + (t >>> GF), ACC_W));
    i2_n   = ACC_W'(sat(64'(i2) + 64'(ki2 * err), ACC_W));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i1 <= '0; lp <= '0; i2 <= '0; fast <= '0; slow <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        i1   <= i1_n;
        lp   <= lp_n;
        i2   <= i2_n;
        fast <= OUT_W'(sat((64'(p_term) + 64'(lp_n)) >>> OUT_SH, OUT_W));
        slow <= OUT_W'(sat(64'(i2_n) >>> OUT_SH, OUT_W));
      end
    end
  end
endmodule
