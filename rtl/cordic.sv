// cordic: pipelined CORDIC with a per-sample mode bit.
//
// Vectoring (vec=1): takes (x, y) and returns the magnitude in x_o (scaled by the
// CORDIC gain 1.6468) and the angle atan2(y, x) in z_o, in turns (2**PH_W = 360 deg).
// Rotation (vec=0): rotates (x, y) by the angle z and returns the rotated vector
// in (x_o, y_o); with (x, y) = (A/1.6468, 0) this gives A*cos(z), A*sin(z).
// A first stage folds the left half plane by 180 degrees, then STAGES shift-add
// iterations follow, one per pipeline register.  Latency is STAGES+1 clocks; one
// sample per clock.  The design description calls for a CORDIC for amplitude and
// phase; the pipelining, widths and stage count are choices of this implementation.
module cordic #(
  parameter int W      = 20,  // input/output data width (signed)
  parameter int PH_W   = 20,  // angle width
  parameter int STAGES = 18
) (
  input  logic                  clk,
  input  logic                  rst,     // clears the valid pipeline only
  input  logic                  in_valid,
  input  logic                  vec,
  input  logic signed [W-1:0]   x,
  input  logic signed [W-1:0]   y,
  input  logic        [PH_W-1:0] z,
  output logic                  out_valid,
  output logic signed [W+1:0]   x_o,   // two bits wider: gain 1.6468 of a diagonal vector
  output logic signed [W+1:0]   y_o,
  output logic        [PH_W-1:0] z_o
);
  localparam int G  = 3;       // extra fraction bits against truncation error
  localparam int IW = W + 2 + G; // internal width: growth guard and fraction
  // atan(2**-i) in turns, scaled to 2**32
  localparam logic [31:0] ATAN [20] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465,  32'd10679838,  32'd5340245,   32'd2670163,  32'd1335087,
    32'd667544,    32'd333772,    32'd166886,    32'd83443,    32'd41722,
    32'd20861,     32'd10430,     32'd5215,      32'd2608,     32'd1304 };

  logic signed [IW-1:0] xs [STAGES+1];
  logic signed [IW-1:0] ys [STAGES+1];
  logic        [PH_W-1:0] zs [STAGES+1];
  logic                 vs [STAGES+1];
  logic                 ms [STAGES+1];
  // ms is the per-sample mode bit carried alongside the data.

  // Stage 0: move the problem into the right half plane.
  always_ff @(posedge clk) begin
    if (rst) vs[0] <= 1'b0;
    else     vs[0] <= in_valid;
    ms[0] <= vec;
    if (vec) begin
      if (x < 0) begin
        xs[0] <= -(IW'(x) <<< G); ys[0] <= -(IW'(y) <<< G); zs[0] <= {1'b1, {(PH_W-1){1'b0}}};
      end else begin
        xs[0] <= IW'(x) <<< G;  ys[0] <= IW'(y) <<< G;  zs[0] <= '0;
      end
    end else begin
      if (z[PH_W-1] != z[PH_W-2]) begin   // angle in the left half plane
        xs[0] <= -(IW'(x) <<< G); ys[0] <= -(IW'(y) <<< G); zs[0] <= z + {1'b1, {(PH_W-1){1'b0}}};
      end else begin
        xs[0] <= IW'(x) <<< G;  ys[0] <= IW'(y) <<< G;  zs[0] <= z;
      end
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    localparam logic [PH_W-1:0] A = PH_W'(ATAN[i] >> (32 - PH_W));
    logic dir;  // 1: rotate counter-clockwise
    always_comb dir = ms[i] ? (ys[i] < 0) : !zs[i][PH_W-1];
    always_ff @(posedge clk) begin
      if (rst) vs[i+1] <= 1'b0;
      else     vs[i+1] <= vs[i];
      ms[i+1] <= ms[i];
      if (dir) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - A;
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + A;
      end
    end
  end

  // z holds (start angle - rotation applied): the residual angle in rotation
  // mode, the input angle once y has been driven to zero in vectoring mode.
  assign out_valid = vs[STAGES];
  assign x_o = (W+2)'(xs[STAGES] >>> G);
  assign y_o = (W+2)'(ys[STAGES] >>> G);
  assign z_o = zs[STAGES];
endmodule
