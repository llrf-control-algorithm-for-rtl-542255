// ccfilt: comb half of the two-stage CIC decimator, working on the serial
// 12-channel integrator stream from cim_12.
//
// `take` (valid with `strobe`) marks the integrator snapshots this path keeps;
// the 12 values that follow such a strobe pass through two comb stages,
// y1 = x - x_prev and y2 = y1 - y1_prev, where *_prev is the same channel's value
// one kept snapshot earlier (12-word delay lines advanced only by kept data).
// With snapshots R = 14*per clocks apart this completes the CIC response
// ((1-z^-R)/(1-z^-1))^2, DC gain R^2.  The result is shifted right by `shift`
// and saturated to CC_W bits.  Output has 2 clocks of latency and keeps the
// channel number.  The comb stages and the decimation-dependent shift follow the
// design description; widths and saturation are this implementation's choice.
module ccfilt
  import apex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    strobe,
  input  logic                    take,
  input  logic [5:0]              shift,
  input  logic signed [INT_W-1:0] in_data,
  input  logic                    in_valid,
  input  logic [3:0]              in_ch,
  output logic signed [CC_W-1:0]  out_data,
  output logic                    out_valid,
  output logic [3:0]              out_ch
);
  logic keep;
  logic signed [INT_W-1:0] d0 [NCHAN];   // previous integrator value per channel
  logic signed [INT_W-1:0] d1 [NCHAN];   // previous first-comb value per channel
  logic signed [INT_W-1:0] y1, y2;
  logic v1;
  logic [3:0] ch1;

  always_ff @(posedge clk) begin
    if (rst) keep <= 1'b0;
    else if (strobe) keep <= take;
  end

  always_comb y1 = in_data - d0[NCHAN-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      for (int k = 0; k < NCHAN; k++) begin d0[k] <= '0; d1[k] <= '0; end
    end else begin
      v1 <= in_valid && keep;
      ch1 <= in_ch;
      if (in_valid && keep) begin
        d0[0] <= in_data;
        for (int k = 1; k < NCHAN; k++) d0[k] <= d0[k-1];
        y2 <= y1 - d1[NCHAN-1];
        d1[0] <= y1;
        for (int k = 1; k < NCHAN; k++) d1[k] <= d1[k-1];
      end
      out_valid <= v1;
      out_ch    <= ch1;
      out_data  <= CC_W'(sat(64'(y2 >>> shift), CC_W));
    end
  end
endmodule
