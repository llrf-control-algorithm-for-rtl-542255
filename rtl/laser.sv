// laser: laser-to-RF synchronization path.
//
// From the laser-path CIC stream (low decimation for a high loop bandwidth) it
// takes the I/Q pair laser_ch (the laser photodiode, detected at its fifth
// harmonic, which equals the RF frequency), measures amplitude and phase with a
// vectoring CORDIC, feeds the phase to the PI loop (piloop3) that drives the
// fast and slow piezos, and to the frequency meter (freq).  Latency from the
// pair's Q word to new piezo words is STAGES+2 clocks.  The chain CORDIC ->
// piloop3 and CORDIC -> freq follows the design description.
module laser
  import apex_pkg::*;
#(
  parameter int STAGES = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [CC_W-1:0]  in_data,
  input  logic                    in_valid,
  input  logic [3:0]              in_ch,
  input  logic [2:0]              laser_ch,
  input  logic [PH_W-1:0]         setpoint,
  input  logic signed [17:0]      kp, ki, pole, ki2,
  input  logic [3:0]              freq_len,
  output logic [CC_W+1:0]         amp,
  output logic [PH_W-1:0]         phase,
  output logic signed [15:0]      fast,
  output logic signed [15:0]      slow,
  output logic                    piezo_valid,
  output logic signed [31:0]      freq_o,
  output logic                    freq_valid
);
  logic signed [CC_W-1:0] i_r;
  logic signed [CC_W+1:0] xo, yo;
  logic [PH_W-1:0] zo;
  logic vo;
  logic signed [PH_W-1:0] err;

  always_ff @(posedge clk) if (in_valid && in_ch == {laser_ch, 1'b0}) i_r <= in_data;

  cordic #(.W(CC_W), .PH_W(PH_W), .STAGES(STAGES)) u_cordic (
    .clk, .rst, .in_valid(in_valid && in_ch == {laser_ch, 1'b1}), .vec(1'b1),
    .x(i_r), .y(in_data), .z('0),
    .out_valid(vo), .x_o(xo), .y_o(yo), .z_o(zo));

  always_ff @(posedge clk) begin
    if (rst) begin
      amp <= '0; phase <= '0;
    end else if (vo) begin
      amp <= xo; phase <= zo;
    end
  end

  piloop3 u_pi (.clk, .rst, .valid(vo), .phase(zo), .setpoint, .kp, .ki, .pole, .ki2,
                .err, .fast, .slow, .out_valid(piezo_valid));

  freq u_freq (.clk, .rst, .valid(vo), .phase(zo), .len_log2(freq_len),
               .freq_o, .freq_valid);
endmodule
