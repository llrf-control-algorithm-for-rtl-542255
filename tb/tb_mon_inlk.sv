// tb_mon_inlk: six pairs with amplitudes A_k at angle 0.7 rad.  Limits are set
// around 1.6468*A (the CORDIC gain).  Pair modes: 0 above, 1 below, 2 inside,
// 3 outside, 4 above but disabled, 5 above.  Checks amplitude outputs (0.2%),
// the trip pattern for amplitudes chosen to trip / not trip each mode, the OR
// into `interlock`, stickiness and `clear`.
module tb_mon_inlk;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, in_valid = 0, clear = 0;
  logic signed [CC_W-1:0] in_data = 0;
  logic [3:0] in_ch = 0;
  logic [NPAIR-1:0][CC_W:0] upper, lower, amp;
  logic [NPAIR-1:0][PH_W-1:0] phase;
  logic [2*NPAIR-1:0] inlk_mode = {2'd0, 2'd0, 2'd3, 2'd2, 2'd1, 2'd0};
  logic [NPAIR-1:0] inlk_en = 6'b101111, trip;
  logic interlock;

  mon_inlk dut (.*);

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

  task automatic burst(input real a [6]);
    for (int c = 0; c < 12; c++) begin
      in_valid = 1; in_ch = 4'(c);
      in_data = CC_W'($rtoi(c % 2 == 0 ? a[c/2] * $cos(0.7) : a[c/2] * $sin(0.7)));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (25) @(negedge clk);
  endtask

  initial begin
    real a [6];
    // limits on the scaled amplitude: lower = 1.6468*10000, upper = 1.6468*20000
    for (int k = 0; k < NPAIR; k++) begin
      lower[k] = (CC_W+1)'(16468);
      upper[k] = (CC_W+1)'(32935);
    end
    repeat (2) @(negedge clk);
    rst = 0;
    // all amplitudes chosen so that no enabled condition holds
    a = '{15000.0, 15000.0, 25000.0, 15000.0, 30000.0, 15000.0};
    burst(a);
    for (int k = 0; k < 6; k++)
      check(amp[k] > (CC_W+1)'($rtoi(a[k] * 1.6468 * 0.998)) &&
            amp[k] < (CC_W+1)'($rtoi(a[k] * 1.6468 * 1.002)), $sformatf("amp %0d = %0d", k, amp[k]));
    check(trip == 6'b000000 && !interlock, $sformatf("no trip %b", trip));
    // now every condition holds
    a = '{25000.0, 5000.0, 15000.0, 25000.0, 30000.0, 21000.0};
    burst(a);
    check(trip == 6'b101111 && interlock, $sformatf("trip pattern %b", trip));
    // back to safe values: trips stay until clear
    a = '{15000.0, 15000.0, 25000.0, 15000.0, 30000.0, 15000.0};
    burst(a);
    check(trip == 6'b101111, "sticky");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(trip == 0 && !interlock, "cleared");
    // outside mode, below lower
    a = '{15000.0, 15000.0, 25000.0, 5000.0, 30000.0, 15000.0};
    burst(a);
    check(trip == 6'b001000, $sformatf("outside-below %b", trip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
