// source: IF set-point generator.
//
// out = (re*cos + im*sin) / 2**(LO_W-1) with re, im the complex set point scaled
// by the pulse envelope env (unsigned, 0xFFFF = 1.0).  With cos/sin from the
// receiver DDS at f_IF this is the IF waveform the cavity probe should show.
// Registered twice: the set point reaches the output 2 clocks after it (and
// the envelope) change, the LO sample 1 clock after it arrives.
// The formula source_re*cos + source_im*sin is the design description's; the
// envelope scaling and formats are this implementation's choices.
module source
  import apex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [15:0]      setp_re,
  input  logic signed [15:0]      setp_im,
  input  logic [15:0]             env,
  input  logic signed [LO_W-1:0]  cosd,
  input  logic signed [LO_W-1:0]  sind,
  output logic signed [DAC_W-1:0] out
);
  logic signed [15:0] re, im;
  logic signed [33:0] re_w, im_w;
  logic signed [LO_W+17:0] acc;

  always_comb begin
    re_w = setp_re * $signed({1'b0, env});
    im_w = setp_im * $signed({1'b0, env});
    acc  = (LO_W+18)'(re) * (LO_W+18)'(cosd) + (LO_W+18)'(im) * (LO_W+18)'(sind);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      re <= '0; im <= '0; out <= '0;
    end else begin
      re  <= 16'(re_w >>> 16);
      im  <= 16'(im_w >>> 16);
      out <= DAC_W'(sat(64'(acc >>> (LO_W-1)), DAC_W));
    end
  end
endmodule
