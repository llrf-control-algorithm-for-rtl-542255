// apex_pkg: widths, the host register map and the configuration record shared by
// the APEX LLRF DSP modules.
//
// The clock is the 100 MHz ADC clock; the IF sits at f_clk/7, so every filter rate
// is a multiple of 14 clocks (two IF periods).  The 7-bit address / 32-bit data
// write-only local bus and the 14-clock common factor follow the design
// description; the ADC/DAC widths, the register addresses and the reset values
// below are choices of this implementation.
package apex_pkg;

  localparam int ADC_W   = 14;   // ADC sample width (signed)
  localparam int LO_W    = 18;   // DDS sine/cosine width (signed)
  localparam int MIX_W   = 16;   // mixer product kept after scaling
  localparam int INT_W   = 36;   // CIC integrator width: MIX_W + 2*ceil(log2(64*14))
  localparam int CC_W    = 20;   // CIC output width after shift/saturation
  localparam int PH_W    = 20;   // phase word (full turn = 2**PH_W)
  localparam int DAC_W   = 16;   // drive word to the output DAC
  localparam int NCHAN   = 12;   // serialized channels (6 I/Q pairs)
  localparam int NPAIR   = 6;
  localparam int BASE_DECIM = 14; // common decimation factor (2 IF periods)

  localparam int LB_AW = 7;
  localparam int LB_DW = 32;

  // Host register addresses (write-only local bus)
  typedef enum logic [LB_AW-1:0] {
    A_STEP_H_A = 7'd0,  A_STEP_L_A = 7'd1,  A_MOD_A   = 7'd2,
    A_STEP_H_B = 7'd3,  A_STEP_L_B = 7'd4,  A_MOD_B   = 7'd5,
    A_XSEL     = 7'd6,  A_WAVE_PER = 7'd7,  A_WAVE_SH = 7'd8,
    A_DECAY_PER= 7'd9,  A_LASER_PER= 7'd10, A_SETP_RE = 7'd11,
    A_SETP_IM  = 7'd12, A_KPA      = 7'd13, A_KPB     = 7'd14,
    A_KIA      = 7'd15, A_KIB      = 7'd16, A_BP_C    = 7'd17,
    A_BP_D     = 7'd18, A_CTRL     = 7'd19, A_PERIOD  = 7'd20,
    A_WIDTH    = 7'd21, A_RAMP     = 7'd22, A_LASER_CH= 7'd23,
    A_LASER_SP = 7'd24, A_LASER_KP = 7'd25, A_LASER_KI= 7'd26,
    A_LASER_POLE=7'd27, A_LASER_KI2= 7'd28, A_REFL_CH = 7'd29,
    A_TH_INIT  = 7'd30, A_TH_NOISE = 7'd31, A_DECAYCOEF=7'd32,
    A_CLEAR    = 7'd33, A_INLK_MODE= 7'd34, A_INLK_EN = 7'd35,
    A_POST_TRIG= 7'd36, A_FREQ_LEN = 7'd37,
    A_UPPER0   = 7'd40, A_LOWER0   = 7'd48
  } lb_addr_e;

  // Interlock trip conditions (one per I/Q pair)
  typedef enum logic [1:0] {
    INLK_ABOVE   = 2'd0,  // amplitude higher than upper limit
    INLK_BELOW   = 2'd1,  // amplitude lower than lower limit
    INLK_INSIDE  = 2'd2,  // lower <= amplitude <= upper
    INLK_OUTSIDE = 2'd3   // amplitude outside [lower, upper]
  } inlk_mode_e;

  typedef struct packed {
    // DDS A (receiver LO) and DDS B (characterization LO)
    logic [PH_W-1:0] step_h_a;
    logic [11:0]     step_l_a;
    logic [11:0]     mod_a;
    logic [PH_W-1:0] step_h_b;
    logic [11:0]     step_l_b;
    logic [11:0]     mod_b;
    logic [1:0]      xsel;         // adcx source: 0..3 = adc1..adc4
    // decimation
    logic [6:0]      wave_per;     // R = 14*wave_per, 1..64
    logic [2:0]      wave_shift;   // output shift 2*wave_shift+1
    logic [6:0]      decay_per;
    logic [6:0]      laser_per;
    // RF feedback
    logic signed [15:0] setp_re;
    logic signed [15:0] setp_im;
    logic signed [17:0] kpa, kpb, kia, kib, bp_c, bp_d;
    logic            closeloop;
    logic            rf_enable;
    logic            ext_trig;
    logic [31:0]     period;
    logic [31:0]     width;
    logic [15:0]     ramp;
    // laser synchronization
    logic [2:0]      laser_ch;
    logic [PH_W-1:0] laser_sp;
    logic signed [17:0] laser_kp, laser_ki, laser_pole, laser_ki2;
    logic [3:0]      freq_len;     // window = 2**freq_len samples
    // reflection trip
    logic [2:0]      refl_ch;
    logic [31:0]     th_init;
    logic [31:0]     th_noise;
    logic [17:0]     decaycoef;    // unsigned, 1.0 = 2**17
    // interlock
    logic [2*NPAIR-1:0] inlk_mode;
    logic [NPAIR-1:0]   inlk_en;
    logic [NPAIR-1:0][CC_W:0] upper;
    logic [NPAIR-1:0][CC_W:0] lower;
    // waveform buffer
    logic [15:0]     post_trig;
  } apex_cfg_t;

  // Power-on register values: LO at exactly f_clk/7
  // (2**20/7 = 149796 + 2340/4095, modulo 4096-4095 = 1).
  localparam apex_cfg_t CFG_RESET = '{
    step_h_a: 20'd149796, step_l_a: 12'd2340, mod_a: 12'd1,
    step_h_b: 20'd149796, step_l_b: 12'd2340, mod_b: 12'd1,
    xsel: 2'd0, wave_per: 7'd1, wave_shift: 3'd0, decay_per: 7'd1, laser_per: 7'd1,
    setp_re: '0, setp_im: '0,
    kpa: 18'sd32768, kpb: '0, kia: '0, kib: '0, bp_c: '0, bp_d: '0,
    closeloop: 1'b0, rf_enable: 1'b0, ext_trig: 1'b0,
    period: 32'd100000, width: 32'd50000, ramp: 16'd256,
    laser_ch: 3'd1, laser_sp: '0, laser_kp: '0, laser_ki: '0, laser_pole: '0, laser_ki2: '0,
    freq_len: 4'd4,
    refl_ch: 3'd3, th_init: '1, th_noise: '1, decaycoef: 18'd131072,
    inlk_mode: '0, inlk_en: '0, upper: '1, lower: '0,
    post_trig: 16'd4096
  };

  // Saturate a wide signed value to W bits.
  function automatic logic signed [63:0] sat(input logic signed [63:0] v, input int w);
    logic signed [63:0] mx, mn;
    mx = (64'sd1 <<< (w-1)) - 1;
    mn = -(64'sd1 <<< (w-1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

endpackage
