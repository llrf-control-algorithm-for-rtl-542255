// lb_regs: host register file on the write-only local bus.
//
// The USB link delivers writes as (lb_addr 7 bits, lb_data 32 bits, lb_write
// strobe).  Each address updates one field of the configuration record `cfg`
// (apex_pkg::apex_cfg_t) on the clock of the strobe; reset loads CFG_RESET.
// Address A_CLEAR produces one-clock pulses instead of stored bits:
// data bit 0 clears the amplitude interlock, bit 1 the reflection fault, bit 2
// re-arms the waveform buffer.  There is no read-back: monitoring data leave
// through the slow chain and the buffers.  The 7-bit/32-bit write-only bus is
// the design description's; the register map is this implementation's.
module lb_regs
  import apex_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             lb_write,
  input  logic [LB_AW-1:0] lb_addr,
  input  logic [LB_DW-1:0] lb_data,
  output apex_cfg_t        cfg,
  output logic             clr_inlk,
  output logic             clr_refl,
  output logic             buf_sync
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= CFG_RESET;
      clr_inlk <= 1'b0; clr_refl <= 1'b0; buf_sync <= 1'b0;
    end else begin
      clr_inlk <= 1'b0; clr_refl <= 1'b0; buf_sync <= 1'b0;
      if (lb_write) begin
        if (lb_addr >= A_UPPER0 && lb_addr < A_UPPER0 + 7'(NPAIR))
          cfg.upper[lb_addr - A_UPPER0] <= lb_data[CC_W:0];
        if (lb_addr >= A_LOWER0 && lb_addr < A_LOWER0 + 7'(NPAIR))
          cfg.lower[lb_addr - A_LOWER0] <= lb_data[CC_W:0];
        case (lb_addr)
          A_STEP_H_A:   cfg.step_h_a   <= lb_data[PH_W-1:0];
          A_STEP_L_A:   cfg.step_l_a   <= lb_data[11:0];
          A_MOD_A:      cfg.mod_a      <= lb_data[11:0];
          A_STEP_H_B:   cfg.step_h_b   <= lb_data[PH_W-1:0];
          A_STEP_L_B:   cfg.step_l_b   <= lb_data[11:0];
          A_MOD_B:      cfg.mod_b      <= lb_data[11:0];
          A_XSEL:       cfg.xsel       <= lb_data[1:0];
          A_WAVE_PER:   cfg.wave_per   <= lb_data[6:0];
          A_WAVE_SH:    cfg.wave_shift <= lb_data[2:0];
          A_DECAY_PER:  cfg.decay_per  <= lb_data[6:0];
          A_LASER_PER:  cfg.laser_per  <= lb_data[6:0];
          A_SETP_RE:    cfg.setp_re    <= lb_data[15:0];
          A_SETP_IM:    cfg.setp_im    <= lb_data[15:0];
          A_KPA:        cfg.kpa        <= lb_data[17:0];
          A_KPB:        cfg.kpb        <= lb_data[17:0];
          A_KIA:        cfg.kia        <= lb_data[17:0];
          A_KIB:        cfg.kib        <= lb_data[17:0];
          A_BP_C:       cfg.bp_c       <= lb_data[17:0];
          A_BP_D:       cfg.bp_d       <= lb_data[17:0];
          A_CTRL:       {cfg.ext_trig, cfg.rf_enable, cfg.closeloop} <= lb_data[2:0];
          A_PERIOD:     cfg.period     <= lb_data;
          A_WIDTH:      cfg.width      <= lb_data;
          A_RAMP:       cfg.ramp       <= lb_data[15:0];
          A_LASER_CH:   cfg.laser_ch   <= lb_data[2:0];
          A_LASER_SP:   cfg.laser_sp   <= lb_data[PH_W-1:0];
          A_LASER_KP:   cfg.laser_kp   <= lb_data[17:0];
          A_LASER_KI:   cfg.laser_ki   <= lb_data[17:0];
          A_LASER_POLE: cfg.laser_pole <= lb_data[17:0];
          A_LASER_KI2:  cfg.laser_ki2  <= lb_data[17:0];
          A_REFL_CH:    cfg.refl_ch    <= lb_data[2:0];
          A_TH_INIT:    cfg.th_init    <= lb_data;
          A_TH_NOISE:   cfg.th_noise   <= lb_data;
          A_DECAYCOEF:  cfg.decaycoef  <= lb_data[17:0];
          A_CLEAR:      {buf_sync, clr_refl, clr_inlk} <= lb_data[2:0];
          A_INLK_MODE:  cfg.inlk_mode  <= lb_data[2*NPAIR-1:0];
          A_INLK_EN:    cfg.inlk_en    <= lb_data[NPAIR-1:0];
          A_POST_TRIG:  cfg.post_trig  <= lb_data[15:0];
          A_FREQ_LEN:   cfg.freq_len   <= lb_data[3:0];
          default: ;
        endcase
      end
    end
  end
endmodule
