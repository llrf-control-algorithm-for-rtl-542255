// decay_buf: buffer dedicated to the cavity decay waveform.
//
// A decay_trig pulse (the end of an RF pulse) arms the buffer; from the next
// channel-0 word of the decay-path stream it stores DEPTH consecutive valid
// words (all 12 channels, interleaved) into a dual-port RAM, then raises
// `done` until the next trigger.  The host reads word rd_addr as
// decay_result_out one clock later, with decay_strobe marking the read.  The
// dedicated dual-port buffer and the trigger/result/strobe names follow the
// design description; length and arming rule are this implementation's choices.
module decay_buf
  import apex_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [CC_W-1:0]   wr_data,
  input  logic                     wr_valid,
  input  logic [3:0]               wr_ch,
  input  logic                     decay_trig,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic signed [CC_W-1:0]   decay_result_out,
  output logic                     decay_strobe,
  output logic                     done
);
  localparam int AW = $clog2(DEPTH);
  typedef enum logic [1:0] {IDLE, ARMED, REC} st_e;
  st_e st;
  logic [AW-1:0] wptr;
  logic signed [CC_W-1:0] mem [DEPTH];
  logic we;

  always_comb we = wr_valid && ((st == REC) || (st == ARMED && wr_ch == 4'd0));

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; wptr <= '0; done <= 1'b0;
    end else if (decay_trig) begin
      st <= ARMED; wptr <= '0; done <= 1'b0;
    end else if (we) begin
      st   <= REC;
      wptr <= wptr + 1'b1;
      if (wptr == AW'(DEPTH-1)) begin
        st <= IDLE; done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) if (we && !decay_trig) mem[wptr] <= wr_data;

  always_ff @(posedge clk) begin
    decay_result_out <= mem[rd_addr];
    decay_strobe     <= rd_en;
  end
endmodule
