// rotdds: direct digital synthesizer used as the digital LO.
//
// The phase advances each clock by {phase_step_h, phase_step_l}: a PH_W-bit
// coarse step plus a 12-bit fine step whose accumulator wraps at 4096-modulo
// instead of 4096 ("correction of modulo").  This makes frequencies such as
// f_clk/7 exact: step_h=149796, step_l=2340, modulo=1 repeats every 7 clocks.
// The coarse phase drives a rotation-mode CORDIC that turns the constant vector
// (AMP, 0) into cos and sin.  Outputs lag the phase accumulator by STAGES+2
// clocks.  The split step and modulo correction follow the design description;
// the CORDIC as sine generator and the widths are choices of this implementation.
module rotdds
  import apex_pkg::*;
#(
  parameter int STAGES = 18,
  // 2**(LO_W-1)/1.6468 so the CORDIC output stays inside LO_W bits
  parameter int AMP    = 79590
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [PH_W-1:0]        phase_step_h,
  input  logic [11:0]            phase_step_l,
  input  logic [11:0]            modulo,
  output logic signed [LO_W-1:0] cosd,
  output logic signed [LO_W-1:0] sind,
  output logic [PH_W-1:0]        phase    // accumulator value, for test and monitoring
);
  logic [PH_W-1:0] ph_h;
  logic [12:0]     ph_l_sum;
  logic [12:0]     wrap;
  logic            carry;
  logic [11:0]     ph_l;

  always_comb begin
    wrap     = 13'd4096 - {1'b0, modulo};
    ph_l_sum = {1'b0, ph_l} + {1'b0, phase_step_l};
    carry    = (ph_l_sum >= wrap);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_h <= '0;
      ph_l <= '0;
    end else begin
      ph_h <= ph_h + phase_step_h + PH_W'(carry);
      ph_l <= carry ? 12'(ph_l_sum - wrap) : ph_l_sum[11:0];
    end
  end
  assign phase = ph_h;

  logic signed [LO_W+1:0] xo, yo;
  logic [PH_W-1:0] zo;
  logic vo;
  cordic #(.W(LO_W), .PH_W(PH_W), .STAGES(STAGES)) u_cordic (
    .clk, .rst, .in_valid(1'b1), .vec(1'b0),
    .x(LO_W'(AMP)), .y('0), .z(ph_h),
    .out_valid(vo), .x_o(xo), .y_o(yo), .z_o(zo));

  always_ff @(posedge clk) begin
    cosd <= LO_W'(sat(64'(xo), LO_W));
    sind <= LO_W'(sat(64'(yo), LO_W));
  end
endmodule
