// apex_dsp: LLRF signal processing of one LLRF4 board for the APEX VHF gun.
//
// Four IF inputs (f_IF = f_clk/7 = 14.3 MHz at f_clk = 100 MHz) enter two
// paths.  The fast path runs on raw IF samples: the cavity probe (adc[0]) is
// filtered (infilt), compared with the IF set point (source, driven by DDS A
// and the trapezoid pulse envelope) and the error goes through fdbk_gain,
// whose output is the drive word.  The monitor path mixes the four inputs, the
// drive and one xsel-selected input with two DDS LOs (cim_12), integrates, and
// serializes the 12 results every 14 clocks; three comb filters (ccfilt)
// complete CIC decimators for
//   - waveforms: R = 14*wave_per, shift 2*wave_shift+1, half_band, circular
//     buffer frozen after a fault (wave_buf);
//   - decay/interlock: R = 14*decay_per, shift 9, reflection trip
//     (reflect_trip), amplitude interlock (mon_inlk), decay buffer (decay_buf)
//     started at each pulse end;
//   - laser: R = 14*laser_per, shift 11, CORDIC + PI loop + frequency meter
//     (laser), piezo words sent to the external DAC (mdac_seq).
// The host writes registers over a write-only local bus (lb_regs, 7-bit
// address, 32-bit data); slow monitoring points leave through an 8-bit shift
// register (slow_chain) snapped with a timestamp.  A latched interlock or
// reflection fault drops rf_permit1/2, forces rf_on and the drive to zero and
// freezes the waveform buffer.
// The drive word is the input of the DAC output stage, which is outside this
// module, as are the ADC/DAC parts, the USB link and the piezo DAC.
// Block partition, rates and shifts follow the design description; the port
// list of the board pins beyond the printed names, the permit logic and the
// slow-readout contents are this implementation's choices.
module apex_dsp
  import apex_pkg::*;
#(
  parameter int WAVE_DEPTH  = 8192,
  parameter int DECAY_DEPTH = 2048,
  parameter int STAGES      = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc [4],
  // host local bus (write only)
  input  logic                    lb_write,
  input  logic [LB_AW-1:0]        lb_addr,
  input  logic [LB_DW-1:0]        lb_data,
  // drive to the DAC output stage
  output logic signed [DAC_W-1:0] drive,
  // external trigger
  input  logic                    trig_in,
  output logic                    trig_out,
  // interlocks and RF status
  output logic                    interlock,
  output logic                    reflect_fault,
  output logic                    rf_permit1,
  output logic                    rf_permit2,
  output logic                    rf_on,
  // piezo DAC
  output logic [15:0]             mdac_val,
  output logic [2:0]              mdac_addr,
  output logic                    mdac_load,
  output logic                    mdac_trig,
  input  logic                    mdac_busy,
  // slow readout
  input  logic                    slow_snap,
  input  logic                    slow_op,
  output logic [7:0]              slow_out,
  // waveform buffer readout
  input  logic                    wave_rd_en,
  input  logic [$clog2(WAVE_DEPTH)-1:0] wave_rd_addr,
  output logic signed [CC_W-1:0]  wave_result,
  output logic                    wave_strobe,
  output logic [$clog2(WAVE_DEPTH)-1:0] wave_boundary,
  output logic                    wave_frozen,
  // decay buffer readout
  input  logic                    decay_rd_en,
  input  logic [$clog2(DECAY_DEPTH)-1:0] decay_rd_addr,
  output logic signed [CC_W-1:0]  decay_result_out,
  output logic                    decay_strobe,
  output logic                    decay_done
);
  apex_cfg_t cfg;
  logic clr_inlk, clr_refl, buf_sync;

  lb_regs u_regs (.clk, .rst, .lb_write, .lb_addr, .lb_data, .cfg,
                  .clr_inlk, .clr_refl, .buf_sync);

  // ---------------- LOs ----------------
  logic signed [LO_W-1:0] cos_a, sin_a, cos_b, sin_b;
  logic [PH_W-1:0] ph_a, ph_b;
  rotdds #(.STAGES(STAGES)) rotdds_a (.clk, .rst, .phase_step_h(cfg.step_h_a),
    .phase_step_l(cfg.step_l_a), .modulo(cfg.mod_a), .cosd(cos_a), .sind(sin_a), .phase(ph_a));
  rotdds #(.STAGES(STAGES)) rotdds_b (.clk, .rst, .phase_step_h(cfg.step_h_b),
    .phase_step_l(cfg.step_l_b), .modulo(cfg.mod_b), .cosd(cos_b), .sind(sin_b), .phase(ph_b));

  // ---------------- pulse timing and RF feedback ----------------
  logic permit;
  logic [15:0] env;
  logic gate, pulse_on, pulse_start, pulse_end;
  trapezoid u_trap (.clk, .rst, .enable(cfg.rf_enable && permit), .ext_trig(cfg.ext_trig),
    .trig_in, .period(cfg.period), .width(cfg.width), .ramp(cfg.ramp), .env, .gate,
    .rf_on(pulse_on), .pulse_start, .pulse_end, .trig_out);

  logic signed [DAC_W-1:0] src;
  source u_source (.clk, .rst, .setp_re(cfg.setp_re), .setp_im(cfg.setp_im), .env,
                   .cosd(cos_a), .sind(sin_a), .out(src));

  logic signed [ADC_W+1:0] probe;
  infilt u_infilt (.clk, .rst, .x(adc[0]), .y(probe));

  logic signed [17:0] fb_err;
  fdbk_gain u_fdbk (.clk, .rst, .probe, .src, .kpa(cfg.kpa), .kpb(cfg.kpb),
    .kia(cfg.kia), .kib(cfg.kib), .c(cfg.bp_c), .d(cfg.bp_d),
    .closeloop(cfg.closeloop), .rf_on, .drive, .err(fb_err));

  assign permit     = !(interlock || reflect_fault);
  assign rf_permit1 = permit;
  assign rf_permit2 = permit;
  assign rf_on      = pulse_on && permit;

  // ---------------- mixer / integrator array ----------------
  logic samp, take_wave, take_decay, take_laser;
  timing #(.BASE(BASE_DECIM)) u_timing (.clk, .rst, .wave_per(cfg.wave_per),
    .decay_per(cfg.decay_per), .laser_per(cfg.laser_per),
    .samp, .take_wave, .take_decay, .take_laser);

  logic signed [INT_W-1:0] sr_out;
  logic sr_valid;
  logic [3:0] sr_ch;
  cim_12 u_cim (.clk, .rst, .adc, .outm(drive), .xsel(cfg.xsel), .cos_a, .sin_a,
                .cos_b, .sin_b, .samp, .sr_out, .sr_valid, .sr_ch);

  // ---------------- waveform path ----------------
  logic signed [CC_W-1:0] w_d, hb_d;
  logic w_v, hb_v;
  logic [3:0] w_ch, hb_ch;
  ccfilt u_cc_wave (.clk, .rst, .strobe(samp), .take(take_wave),
    .shift({2'b00, cfg.wave_shift, 1'b1}), .in_data(sr_out), .in_valid(sr_valid),
    .in_ch(sr_ch), .out_data(w_d), .out_valid(w_v), .out_ch(w_ch));
  half_band u_hb (.clk, .rst, .in_data(w_d), .in_valid(w_v), .in_ch(w_ch),
                  .out_data(hb_d), .out_valid(hb_v), .out_ch(hb_ch));
  wave_buf #(.DEPTH(WAVE_DEPTH)) u_wbuf (.clk, .rst, .wr_data(hb_d), .wr_valid(hb_v),
    .fault_trig(!permit), .post_trig(cfg.post_trig), .buf_sync, .rd_en(wave_rd_en),
    .rd_addr(wave_rd_addr), .result(wave_result), .strobe(wave_strobe),
    .boundary(wave_boundary), .frozen(wave_frozen));

  // ---------------- decay / interlock path ----------------
  logic signed [CC_W-1:0] d_d;
  logic d_v;
  logic [3:0] d_ch;
  ccfilt u_cc_decay (.clk, .rst, .strobe(samp), .take(take_decay), .shift(6'd9),
    .in_data(sr_out), .in_valid(sr_valid), .in_ch(sr_ch),
    .out_data(d_d), .out_valid(d_v), .out_ch(d_ch));

  logic [2*CC_W-1:0] refl_power;
  logic [33:0] refl_thresh;
  reflect_trip u_refl (.clk, .rst, .in_data(d_d), .in_valid(d_v), .in_ch(d_ch),
    .refl_ch(cfg.refl_ch), .pulse_start, .thresh_init(cfg.th_init),
    .thresh_noise(cfg.th_noise), .decaycoef(cfg.decaycoef), .clear(clr_refl),
    .power(refl_power), .thresh(refl_thresh), .reflect_fault);

  logic [NPAIR-1:0][CC_W:0] mon_amp;
  logic [NPAIR-1:0][PH_W-1:0] mon_phase;
  logic [NPAIR-1:0] trip;
  mon_inlk #(.STAGES(STAGES)) u_inlk (.clk, .rst, .in_data(d_d), .in_valid(d_v),
    .in_ch(d_ch), .upper(cfg.upper), .lower(cfg.lower), .inlk_mode(cfg.inlk_mode),
    .inlk_en(cfg.inlk_en), .clear(clr_inlk), .amp(mon_amp), .phase(mon_phase),
    .trip, .interlock);

  decay_buf #(.DEPTH(DECAY_DEPTH)) u_dbuf (.clk, .rst, .wr_data(d_d), .wr_valid(d_v),
    .wr_ch(d_ch), .decay_trig(pulse_end), .rd_en(decay_rd_en), .rd_addr(decay_rd_addr),
    .decay_result_out, .decay_strobe, .done(decay_done));

  // ---------------- laser path ----------------
  logic signed [CC_W-1:0] l_d;
  logic l_v;
  logic [3:0] l_ch;
  ccfilt u_cc_laser (.clk, .rst, .strobe(samp), .take(take_laser), .shift(6'd11),
    .in_data(sr_out), .in_valid(sr_valid), .in_ch(sr_ch),
    .out_data(l_d), .out_valid(l_v), .out_ch(l_ch));

  logic [CC_W+1:0] l_amp;
  logic [PH_W-1:0] l_phase;
  logic signed [15:0] pz_fast, pz_slow;
  logic pz_valid, f_valid;
  logic signed [31:0] l_freq;
  laser #(.STAGES(STAGES)) u_laser (.clk, .rst, .in_data(l_d), .in_valid(l_v),
    .in_ch(l_ch), .laser_ch(cfg.laser_ch), .setpoint(cfg.laser_sp),
    .kp(cfg.laser_kp), .ki(cfg.laser_ki), .pole(cfg.laser_pole), .ki2(cfg.laser_ki2),
    .freq_len(cfg.freq_len), .amp(l_amp), .phase(l_phase), .fast(pz_fast),
    .slow(pz_slow), .piezo_valid(pz_valid), .freq_o(l_freq), .freq_valid(f_valid));

  mdac_seq u_mdac (.clk, .rst, .update(pz_valid), .fast(pz_fast), .slow(pz_slow),
    .mdac_busy, .mdac_val, .mdac_addr, .mdac_load, .mdac_trig);

  // ---------------- slow readout ----------------
  localparam int NB = 44;
  logic [47:0] ts;
  timestamp #(.W(48)) u_ts (.clk, .rst, .count(ts));

  logic [8*NB-1:0] snap;
  always_comb begin
    snap = '0;
    snap[47:0]    = ts;
    snap[79:48]   = 32'(l_amp);
    snap[111:80]  = 32'(l_phase);
    snap[143:112] = l_freq;
    snap[159:144] = pz_fast;
    snap[175:160] = pz_slow;
    for (int k = 0; k < NPAIR; k++) snap[176 + 24*k +: 24] = 24'(mon_amp[k]);
    snap[327:320] = {trip, reflect_fault, interlock};
    snap[335:328] = {4'd0, wave_frozen, decay_done, rf_on, permit};
    snap[351:336] = 16'(fb_err);
  end
  slow_chain #(.NBYTES(NB)) u_slow (.clk, .slow_snap, .slow_op, .snap_data(snap), .slow_out);
endmodule
