// tb_infilt: impulse response must be 0, 1, 0.5, -0.25, -0.25 (times the
// impulse, output two clocks after each input); random input is compared with
// the same four-tap formula, rounded.
module tb_infilt;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic signed [ADC_W-1:0] x = 0;
  logic signed [ADC_W+1:0] y;
  longint h [5];

  infilt dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int imp [8];
    for (int k = 0; k < 5; k++) h[k] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // impulse of 4000 at step 0
    for (int n = 0; n < 8; n++) begin
      x = (n == 0) ? 14'sd4000 : 14'sd0;
      @(negedge clk);
      imp[n] = y;
    end
    // y seen after the edge that took x[n] holds taps of x[n-1..n-4]
    checks++;
    if (imp[0] != 0 || imp[1] != 4000 || imp[2] != 2000 || imp[3] != -1000 || imp[4] != -1000 || imp[5] != 0) begin
      failures++; $display("FAIL impulse %0d %0d %0d %0d %0d %0d", imp[0], imp[1], imp[2], imp[3], imp[4], imp[5]);
    end
    for (int n = 0; n < 3000; n++) begin
      x = ADC_W'($urandom);
      for (int k = 4; k > 0; k--) h[k] = h[k-1];
      h[0] = x;
      @(negedge clk);
      e = (4 * h[1] + 2 * h[2] - h[3] - h[4] + 2) >>> 2;
      checks++;
      if (n > 5 && y != (ADC_W+2)'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y %0d exp %0d", n, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
