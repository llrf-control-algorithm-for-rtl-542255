// wave_buf: circular waveform buffer with fault freeze (waveform monitor and
// fault record).
//
// Every valid word of the filtered waveform stream is written into a DEPTH-word
// dual-port RAM at a wrapping address.  A rising fault_trig starts a count of
// post_trig further words; when it reaches zero writing stops, `frozen` goes
// high and `boundary` holds the address of the oldest word, so the record
// shows the waveforms before and after the fault.  buf_sync (one clock) re-arms
// the buffer.  The read port returns `result` one clock after rd_addr, with
// `strobe` marking the read.  Dual-port RAM and the circular organization follow
// the design description; depth, freeze rule and port names of the read side
// are choices of this implementation.
module wave_buf
  import apex_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [CC_W-1:0]   wr_data,
  input  logic                     wr_valid,
  input  logic                     fault_trig,
  input  logic [15:0]              post_trig,
  input  logic                     buf_sync,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic signed [CC_W-1:0]   result,
  output logic                     strobe,
  output logic [$clog2(DEPTH)-1:0] boundary,
  output logic                     frozen
);
  localparam int AW = $clog2(DEPTH);
  logic signed [CC_W-1:0] mem [DEPTH];
  logic [AW-1:0] wptr;
  logic          armed_fault, fault_d;
  logic [15:0]   remain;

  always_ff @(posedge clk) begin
    if (rst || buf_sync) begin
      wptr <= '0; frozen <= 1'b0; armed_fault <= 1'b0; remain <= '0; fault_d <= 1'b0;
    end else begin
      fault_d <= fault_trig;
      if (!frozen) begin
        if (fault_trig && !fault_d && !armed_fault) begin
          armed_fault <= 1'b1;
          remain      <= post_trig;
          if (post_trig == 16'd0) frozen <= 1'b1;
        end
        if (wr_valid && !(armed_fault && remain == 16'd0)) begin
          wptr <= wptr + 1'b1;
          if (armed_fault) begin
            remain <= remain - 16'd1;
            if (remain == 16'd1) frozen <= 1'b1;
          end
        end
      end
    end
  end
  assign boundary = wptr;

  always_ff @(posedge clk) begin
    if (wr_valid && !frozen && !(armed_fault && remain == 16'd0)) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    result <= mem[rd_addr];
    strobe <= rd_en;
  end
endmodule
