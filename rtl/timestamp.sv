// timestamp: free-running clock-cycle counter.
//
// Counts clocks from reset with W bits and wraps; `count` is placed in the
// slow readout snapshot so that host data can be time-ordered.  The block name
// is the design description's; its width and use are this implementation's.
module timestamp #(
  parameter int W = 48
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
