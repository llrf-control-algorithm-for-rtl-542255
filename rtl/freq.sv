// freq: frequency measurement of the laser channel.
//
// On each valid phase sample the difference from the previous sample,
// dphi = phase[n] - phase[n-1] (wrapped, signed), is the frequency offset from
// the LO in turns per sample; 2**len_log2 differences are accumulated and the
// sum is published as `freq` with `freq_valid` for one clock.  The
// difference-then-accumulate structure follows the design description; the
// window length and the dump-and-clear readout are this implementation's choices.
module freq
  import apex_pkg::*;
#(
  parameter int OUT_W = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   valid,
  input  logic [PH_W-1:0]        phase,
  input  logic [3:0]             len_log2,
  output logic signed [OUT_W-1:0] freq_o,
  output logic                   freq_valid
);
  logic [PH_W-1:0]         last;
  logic                    primed;
  logic signed [OUT_W-1:0] acc;
  logic [15:0]             cnt;
  logic signed [PH_W-1:0]  dphi;

  always_comb dphi = $signed(phase - last);

  always_ff @(posedge clk) begin
    if (rst) begin
      last <= '0; primed <= 1'b0; acc <= '0; cnt <= '0; freq_o <= '0; freq_valid <= 1'b0;
    end else begin
      freq_valid <= 1'b0;
      if (valid) begin
        last   <= phase;
        primed <= 1'b1;
        if (primed) begin
          if (cnt == (16'd1 << len_log2) - 16'd1) begin
            freq_o     <= acc + OUT_W'(dphi);
            freq_valid <= 1'b1;
            acc        <= '0;
            cnt        <= '0;
          end else begin
            acc <= acc + OUT_W'(dphi);
            cnt <= cnt + 16'd1;
          end
        end
      end
    end
  end
endmodule
