// tb_piloop3: (1) proportional only: fast = kp*e >> 19 for a set of phase
// errors, including wrap-around (phase just below a full turn vs. setpoint 0
// is a small negative error).  (2) Random phases with all gains set, compared
// with a reference model of I1 += ki*e, L += pole*(I1-L)/2**15,
// fast = (kp*e + L) >> 19, I2 += ki2*e, slow = I2 >> 19, with saturation.
module tb_piloop3;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, valid = 0;
  logic [PH_W-1:0] phase = 0, setpoint = 0;
  logic signed [17:0] kp = 0, ki = 0, pole = 0, ki2 = 0;
  logic signed [PH_W-1:0] err;
  logic signed [15:0] fast, slow;
  logic out_valid;

  piloop3 dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint satw(longint v, int w);
    longint mx = (longint'(1) <<< (w-1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  initial begin
    longint i1, lp, i2, e, ef, es;
    repeat (2) @(negedge clk);
    rst = 0;
    // proportional only
    kp = 18'sd20000;
    for (int k = 0; k < 20; k++) begin
      phase = (k % 2) ? 20'(k * 3001) : 20'(-k * 3001);
      setpoint = 0;
      valid = 1; @(negedge clk); valid = 0;
      e = (k % 2) ? k * 3001 : -k * 3001;
      checks++;
      if (!out_valid || fast != 16'(satw((20000 * e) >>> 19, 16)) || err != 20'(e)) begin
        failures++; $display("FAIL P k=%0d fast %0d err %0d", k, fast, err);
      end
    end
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    kp = 18'sd3000; ki = 18'sd700; pole = 18'sd4000; ki2 = 18'sd50;
    setpoint = 20'd12345;
    i1 = 0; lp = 0; i2 = 0;
    for (int n = 0; n < 2000; n++) begin
      phase = 20'($urandom_range(0, 40000) + 12345 - 20000 + (n < 1000 ? 9000 : -9000));
      e = longint'($signed(20'(phase - setpoint)));
      i1 = satw(i1 + 700 * e, 48);
      lp = satw(lp + ((4000 * (i1 - lp)) >>> 15), 48);
      i2 = satw(i2 + 50 * e, 48);
      ef = satw((3000 * e + lp) >>> 19, 16);
      es = satw(i2 >>> 19, 16);
      valid = 1; @(negedge clk); valid = 0;
      checks++;
      if (fast != 16'(ef) || slow != 16'(es)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d fast %0d exp %0d slow %0d exp %0d", n, fast, ef, slow, es);
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle clocks must not update
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
