// mdac_seq: writes the laser piezo drive words into the multi-channel DAC.
//
// When `update` pulses, the fast and slow piezo words are latched.  The
// sequencer then, each time the DAC is not busy, presents one word on
// mdac_val/mdac_addr with a one-clock mdac_load (address 0 = fast piezo,
// 1 = slow piezo), and after both a one-clock mdac_trig to update the DAC
// outputs together.  An update that arrives while a transfer is running is
// kept and sent afterwards.  The port names are the design description's; the
// protocol (load while not busy, then trig) is this implementation's choice.
module mdac_seq (
  input  logic               clk,
  input  logic               rst,
  input  logic               update,
  input  logic signed [15:0] fast,
  input  logic signed [15:0] slow,
  input  logic               mdac_busy,
  output logic [15:0]        mdac_val,
  output logic [2:0]         mdac_addr,
  output logic               mdac_load,
  output logic               mdac_trig
);
  typedef enum logic [1:0] {S_IDLE, S_FAST, S_SLOW, S_TRIG} st_e;
  st_e st;
  logic [15:0] f_l, s_l;     // latest words waiting
  logic [15:0] f_c, s_c;     // words being sent
  logic        pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; mdac_load <= 1'b0; mdac_trig <= 1'b0; mdac_val <= '0;
      mdac_addr <= '0; f_l <= '0; s_l <= '0; f_c <= '0; s_c <= '0; pend <= 1'b0;
    end else begin
      mdac_load <= 1'b0;
      mdac_trig <= 1'b0;
      if (update) begin
        f_l <= fast; s_l <= slow; pend <= 1'b1;
      end
      case (st)
        S_IDLE: if (pend) begin
                  st <= S_FAST; pend <= update; f_c <= f_l; s_c <= s_l;
                end
        S_FAST: if (!mdac_busy && !mdac_load) begin
                  mdac_val <= f_c; mdac_addr <= 3'd0; mdac_load <= 1'b1; st <= S_SLOW;
                end
        S_SLOW: if (!mdac_busy && !mdac_load) begin
                  mdac_val <= s_c; mdac_addr <= 3'd1; mdac_load <= 1'b1; st <= S_TRIG;
                end
        S_TRIG: if (!mdac_busy && !mdac_load) begin
                  mdac_trig <= 1'b1; st <= S_IDLE;
                end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A word is never loaded while the DAC reports busy.
  a_no_load_busy: assert property (@(posedge clk) disable iff (rst)
                                   $rose(mdac_load) |-> !$past(mdac_busy));
endmodule
