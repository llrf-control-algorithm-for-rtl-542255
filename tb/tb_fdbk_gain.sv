// tb_fdbk_gain: random probe and set point.  Checks, with the 5-clock
// latency from probe/src to drive:
//   rf_on = 0                    -> drive 0
//   open loop                    -> drive = src (1 clock)
//   kpa = 1, integral off        -> drive = src - probe
//   kpa = 1, kia = 1, c = d = 0  -> the resonator is the identity, drive = 2*(src-probe)
//   kpa = 1, kib = 1, c = d = 0  -> drive = e[n] + e[n-2]
//   kpb = 0.5 only               -> drive = e[n-2]/2
module tb_fdbk_gain;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, closeloop = 0, rf_on = 0;
  logic signed [ADC_W+1:0] probe = 0;
  logic signed [DAC_W-1:0] src = 0, drive;
  logic signed [17:0] kpa = 0, kpb = 0, kia = 0, kib = 0, c = 0, d = 0, err;

  fdbk_gain dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint eh [$];
  longint sh [$];

  task automatic phase_run(input int mode, input int n);
    longint e, ex;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    eh.delete(); sh.delete();
    for (int k = 0; k < 10; k++) begin eh.push_back(0); sh.push_back(0); end
    for (int i = 0; i < n; i++) begin
      probe = (ADC_W+2)'($signed(14'($urandom)));
      src   = DAC_W'($signed(14'($urandom)));
      eh.push_back(longint'(src) - longint'(probe));
      sh.push_back(longint'(src));
      @(negedge clk);
      // value that entered 5 clocks ago is at index size-5 (e[n]), e[n-2] at size-7
      case (mode)
        0: ex = 0;
        1: ex = sh[sh.size()-1];
        2: ex = eh[eh.size()-5];
        3: ex = 2 * eh[eh.size()-5];
        4: ex = eh[eh.size()-5] + eh[eh.size()-7];
        default: ex = eh[eh.size()-7] >>> 1;
      endcase
      if (i >= 8) begin
        checks++;
        if (longint'(drive) != ex) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d i=%0d drive %0d exp %0d", mode, i, drive, ex);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rf_on = 0; closeloop = 1; kpa = 18'sd32768; phase_run(0, 50);
    rf_on = 1; closeloop = 0;                   phase_run(1, 200);
    closeloop = 1;                              phase_run(2, 200);
    kia = 18'sd32768;                           phase_run(3, 200);
    kia = 0; kib = 18'sd32768;                  phase_run(4, 200);
    kia = 0; kib = 0; kpa = 0; kpb = 18'sd16384; phase_run(5, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
