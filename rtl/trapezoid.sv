// trapezoid: RF pulse generator with a trapezoidal envelope.
//
// A pulse starts every `period` clocks (internal mode) or on each rising edge of
// trig_in (ext_trig set).  The gate stays high for `width` clocks; the envelope
// `env` (0..0xFFFF) rises by `ramp` per clock while the gate is high and falls
// by `ramp` per clock after it, giving a trapezoid.  rf_on is high while the
// gate is high or the envelope has not yet returned to zero; pulse_start and
// pulse_end (decay trigger) are one-clock strobes, and trig_out repeats
// pulse_start for external equipment.  Nothing runs while `enable` is low.
// The programmable pulse width and repetition rate are the design description's;
// the ramped envelope and the trigger handling are this implementation's reading
// of the block's name and ports.
module trapezoid (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        ext_trig,
  input  logic        trig_in,
  input  logic [31:0] period,
  input  logic [31:0] width,
  input  logic [15:0] ramp,
  output logic [15:0] env,
  output logic        gate,
  output logic        rf_on,
  output logic        pulse_start,
  output logic        pulse_end,
  output logic        trig_out
);
  logic [31:0] pcnt, wcnt;
  logic        trig_d, start;
  logic [16:0] up, dn;

  always_comb begin
    start = enable && (ext_trig ? (trig_in && !trig_d) : (pcnt == 32'd0));
    up    = {1'b0, env} + {1'b0, ramp};
    dn    = {1'b0, env} - {1'b0, ramp};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pcnt <= '0; wcnt <= '0; trig_d <= 1'b0; env <= '0; gate <= 1'b0;
      pulse_start <= 1'b0; pulse_end <= 1'b0;
    end else begin
      trig_d      <= trig_in;
      pulse_start <= 1'b0;
      pulse_end   <= 1'b0;
      if (!enable || ext_trig || pcnt + 32'd1 >= period) pcnt <= '0;
      else                                                pcnt <= pcnt + 32'd1;
      if (start && width != 32'd0) begin
        gate <= 1'b1; wcnt <= width - 32'd1; pulse_start <= 1'b1;
      end else if (gate) begin
        if (wcnt == 32'd0 || !enable) begin
          gate <= 1'b0; pulse_end <= 1'b1;
        end else wcnt <= wcnt - 32'd1;
      end
      if (gate) env <= up[16] ? 16'hFFFF : up[15:0];
      else      env <= dn[16] ? 16'h0000 : dn[15:0];
    end
  end
  assign rf_on    = gate || (env != 16'd0);
  assign trig_out = pulse_start;
endmodule
