// timing: sample strobes for the mixer array and the three decimation paths.
//
// `samp` pulses once every BASE clocks (14 = two IF periods at f_IF = f_clk/7):
// it samples the 12 integrators.  Three counters divide that strobe by the
// waveform, decay and laser decimation factors (wave_per, decay_per, laser_per,
// 1..127, 0 treated as 1); take_* is high together with samp on the samples a
// path keeps, so path p decimates by 14*p_per overall.  Strobe generation by one
// module follows the design description; the counter arrangement is this
// implementation's.
module timing #(
  parameter int BASE = 14
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] wave_per,
  input  logic [6:0] decay_per,
  input  logic [6:0] laser_per,
  output logic       samp,
  output logic       take_wave,
  output logic       take_decay,
  output logic       take_laser
);
  logic [$clog2(BASE)-1:0] cnt;
  logic [6:0] cw, cd, cl;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= (cnt == ($clog2(BASE))'(BASE-1)) ? '0 : cnt + 1'b1;
  end
  assign samp = (cnt == ($clog2(BASE))'(BASE-1));

  function automatic logic [6:0] next_cnt(input logic [6:0] c, input logic [6:0] per);
    return (c + 7'd1 >= per) ? 7'd0 : c + 7'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cw <= '0; cd <= '0; cl <= '0;
    end else if (samp) begin
      cw <= next_cnt(cw, wave_per);
      cd <= next_cnt(cd, decay_per);
      cl <= next_cnt(cl, laser_per);
    end
  end
  assign take_wave  = samp && (cw == 7'd0);
  assign take_decay = samp && (cd == 7'd0);
  assign take_laser = samp && (cl == 7'd0);
endmodule
