// mon_inlk: amplitude interlock for the monitor and interlock chassis.
//
// The decay-path stream delivers I then Q of each of the 6 channel pairs; each
// completed pair goes through a vectoring CORDIC, and the amplitude (including
// the CORDIC gain of 1.6468) is compared with that pair's upper and lower limit.
// Per pair, a 2-bit mode chooses the trip condition: above upper, below lower,
// inside [lower, upper] or outside it (see apex_pkg::inlk_mode_e).  A pair whose
// bit in inlk_en is set and whose condition holds sets its sticky `trip` bit;
// `interlock` is their OR.  `clear` resets the trips.  Latency from the Q word
// to a trip is STAGES+2 clocks.  The CORDIC amplitude, the two limits and the
// four trip options are those of the design description; the per-pair enable,
// the sticky trips and the clear are this implementation's choices.
module mon_inlk
  import apex_pkg::*;
#(
  parameter int STAGES = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [CC_W-1:0]  in_data,
  input  logic                    in_valid,
  input  logic [3:0]              in_ch,
  input  logic [NPAIR-1:0][CC_W:0] upper,
  input  logic [NPAIR-1:0][CC_W:0] lower,
  input  logic [2*NPAIR-1:0]      inlk_mode,
  input  logic [NPAIR-1:0]        inlk_en,
  input  logic                    clear,
  output logic [NPAIR-1:0][CC_W:0] amp,
  output logic [NPAIR-1:0][PH_W-1:0] phase,
  output logic [NPAIR-1:0]        trip,
  output logic                    interlock
);
  logic signed [CC_W-1:0] i_r;
  logic signed [CC_W+1:0] xo, yo;
  logic [PH_W-1:0] zo;
  logic vo;
  logic [2:0] pair_pipe [STAGES+1];

  always_ff @(posedge clk) if (in_valid && !in_ch[0]) i_r <= in_data;

  cordic #(.W(CC_W), .PH_W(PH_W), .STAGES(STAGES)) u_cordic (
    .clk, .rst, .in_valid(in_valid && in_ch[0]), .vec(1'b1),
    .x(i_r), .y(in_data), .z('0),
    .out_valid(vo), .x_o(xo), .y_o(yo), .z_o(zo));

  // carry the pair number through the CORDIC pipeline
  always_ff @(posedge clk) begin
    pair_pipe[0] <= in_ch[3:1];
    for (int k = 1; k <= STAGES; k++) pair_pipe[k] <= pair_pipe[k-1];
  end

  function automatic logic tripped(input inlk_mode_e m, input logic [CC_W:0] a,
                                   input logic [CC_W:0] up, input logic [CC_W:0] lo);
    case (m)
      INLK_ABOVE:  return a > up;
      INLK_BELOW:  return a < lo;
      INLK_INSIDE: return (a >= lo) && (a <= up);
      default:     return (a > up) || (a < lo);
    endcase
  endfunction

  logic [2:0] pr;
  logic [CC_W:0] a_now;
  always_comb begin
    pr    = pair_pipe[STAGES];
    a_now = (xo > 0) ? (CC_W+1)'(xo) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trip <= '0; amp <= '0; phase <= '0;
    end else begin
      if (clear) trip <= '0;
      if (vo && pr < 3'(NPAIR)) begin
        amp[pr]   <= a_now;
        phase[pr] <= zo;
        if (inlk_en[pr] && tripped(inlk_mode_e'(inlk_mode[2*pr +: 2]), a_now, upper[pr], lower[pr]))
          trip[pr] <= 1'b1;
      end
    end
  end
  assign interlock = |trip;
endmodule
