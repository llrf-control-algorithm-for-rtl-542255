// tb_lb_regs: after reset the record equals the power-on values; writes to
// each address must change exactly the intended field (checked against a
// shadow copy maintained by the testbench), writes without lb_write must be
// ignored, and the clear address must give one-clock pulses only.
module tb_lb_regs;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, lb_write = 0;
  logic [LB_AW-1:0] lb_addr = 0;
  logic [LB_DW-1:0] lb_data = 0;
  apex_cfg_t cfg, shadow;
  logic clr_inlk, clr_refl, buf_sync;

  lb_regs dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input int a, input logic [31:0] v);
    lb_write = 1; lb_addr = 7'(a); lb_data = v;
    @(negedge clk);
    lb_write = 0;
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(cfg == CFG_RESET, "reset values");
    check(cfg.step_h_a == 20'd149796 && cfg.step_l_a == 12'd2340 && cfg.mod_a == 12'd1, "LO f_clk/7 at reset");
    shadow = cfg;
    for (int r = 0; r < 400; r++) begin
      int a;
      a = $urandom_range(0, 127);
      v = $urandom;
      if (a == 33) continue;
      case (a)
        0: shadow.step_h_a = v[19:0];  1: shadow.step_l_a = v[11:0];  2: shadow.mod_a = v[11:0];
        3: shadow.step_h_b = v[19:0];  4: shadow.step_l_b = v[11:0];  5: shadow.mod_b = v[11:0];
        6: shadow.xsel = v[1:0];       7: shadow.wave_per = v[6:0];   8: shadow.wave_shift = v[2:0];
        9: shadow.decay_per = v[6:0];  10: shadow.laser_per = v[6:0]; 11: shadow.setp_re = v[15:0];
        12: shadow.setp_im = v[15:0];  13: shadow.kpa = v[17:0];      14: shadow.kpb = v[17:0];
        15: shadow.kia = v[17:0];      16: shadow.kib = v[17:0];      17: shadow.bp_c = v[17:0];
        18: shadow.bp_d = v[17:0];
        19: begin shadow.closeloop = v[0]; shadow.rf_enable = v[1]; shadow.ext_trig = v[2]; end
        20: shadow.period = v;         21: shadow.width = v;          22: shadow.ramp = v[15:0];
        23: shadow.laser_ch = v[2:0];  24: shadow.laser_sp = v[19:0]; 25: shadow.laser_kp = v[17:0];
        26: shadow.laser_ki = v[17:0]; 27: shadow.laser_pole = v[17:0]; 28: shadow.laser_ki2 = v[17:0];
        29: shadow.refl_ch = v[2:0];   30: shadow.th_init = v;        31: shadow.th_noise = v;
        32: shadow.decaycoef = v[17:0];
        34: shadow.inlk_mode = v[11:0]; 35: shadow.inlk_en = v[5:0]; 36: shadow.post_trig = v[15:0];
        37: shadow.freq_len = v[3:0];
        40, 41, 42, 43, 44, 45: shadow.upper[a-40] = v[20:0];
        48, 49, 50, 51, 52, 53: shadow.lower[a-48] = v[20:0];
        default: ;
      endcase
      wr(a, v);
      check(cfg == shadow, $sformatf("write addr %0d", a));
      check(!clr_inlk && !clr_refl && !buf_sync, "no pulse");
    end
    // strobe without lb_write
    lb_addr = 7'd20; lb_data = 32'hDEAD;
    @(negedge clk);
    check(cfg == shadow, "ignored without lb_write");
    wr(33, 32'h7);
    check(clr_inlk && clr_refl && buf_sync, "clear pulses");
    @(negedge clk);
    check(!clr_inlk && !clr_refl && !buf_sync && cfg == shadow, "pulses end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
