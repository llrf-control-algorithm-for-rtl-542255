// slow_chain: 8-bit wide shift register for slow monitoring points.
//
// slow_snap copies NBYTES bytes of monitoring data (byte 0 in snap_data[7:0])
// into the chain in one clock, so all points belong to the same instant;
// each slow_op clock then moves the chain by one byte.  slow_out shows the
// current head byte, starting with byte NBYTES-1 (the most significant) right
// after the snapshot.  The 8-bit shift register with snap/op/out names follows
// the design description; the ordering is this implementation's choice.
module slow_chain #(
  parameter int NBYTES = 32
) (
  input  logic                  clk,
  input  logic                  slow_snap,
  input  logic                  slow_op,
  input  logic [8*NBYTES-1:0]   snap_data,
  output logic [7:0]            slow_out
);
  logic [8*NBYTES-1:0] sr;
  always_ff @(posedge clk) begin
    if (slow_snap)    sr <= snap_data;
    else if (slow_op) sr <= {sr[8*NBYTES-9:0], 8'h00};
  end
  assign slow_out = sr[8*NBYTES-1 -: 8];
endmodule
