// tb_laser: 12-channel bursts where only pair laser_ch = 1 carries the laser
// signal, amplitude 100000 at a phase that advances 0.002 turn per burst.
// Checks the measured amplitude (x1.6468) and phase, that one piezo update
// follows each burst, the proportional piezo word against kp*(phase-setpoint),
// and the frequency word (8-sample windows) against 8*0.002 turn.
module tb_laser;
  import apex_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, in_valid = 0;
  logic signed [CC_W-1:0] in_data = 0;
  logic [3:0] in_ch = 0;
  logic [2:0] laser_ch = 3'd1;
  logic [PH_W-1:0] setpoint = 20'd100000;
  logic signed [17:0] kp = 18'sd16384, ki = 0, pole = 0, ki2 = 0;
  logic [3:0] freq_len = 4'd3;
  logic [CC_W+1:0] amp;
  logic [PH_W-1:0] phase;
  logic signed [15:0] fast, slow;
  logic piezo_valid, freq_valid;
  logic signed [31:0] freq_o;
  int n_piezo = 0, n_freq = 0;

  laser dut (.*);

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
  function automatic real rabs(input real v);
    return v < 0 ? -v : v;
  endfunction

  always @(negedge clk) begin
    if (piezo_valid) n_piezo++;
    if (freq_valid) begin
      n_freq++;
      check(rabs(real'(freq_o) - 0.016 * 2.0**20) < 20, $sformatf("freq %0d", freq_o));
    end
  end

  initial begin
    real ph, e, ef;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 40; b++) begin
      ph = 0.05 + 0.002 * b;
      for (int c = 0; c < 12; c++) begin
        in_valid = 1; in_ch = 4'(c);
        if (c == 2)      in_data = CC_W'($rtoi(100000.0 * $cos(2*PI*ph)));
        else if (c == 3) in_data = CC_W'($rtoi(100000.0 * $sin(2*PI*ph)));
        else             in_data = CC_W'($urandom_range(0, 200000));
        @(negedge clk);
      end
      in_valid = 0;
      repeat (24) @(negedge clk);
      check(rabs(real'(amp) - 164676.0) < 200, $sformatf("amp %0d", amp));
      check(rabs(real'(phase) - ph * 2.0**20) < 8, $sformatf("phase %0d exp %f", phase, ph * 2.0**20));
      e  = ph * 2.0**20 - 100000.0;
      ef = 16384.0 * e / 2.0**19;
      check(rabs(real'(fast) - ef) < 2, $sformatf("fast %0d exp %f", fast, ef));
    end
    check(n_piezo == 40, $sformatf("piezo updates %0d", n_piezo));
    check(n_freq == 4, $sformatf("freq windows %0d", n_freq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
