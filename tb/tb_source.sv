// tb_source: with cos/sin of an f_clk/7 LO (amplitude 131000) and set point
// (re, im) at full envelope, the output must be the IF sine
// |sp|*cos(wt - atan2(im, re)) scaled by 131000/2**17, within 2 LSB, one
// clock after the LO sample.  Envelope 0 must give 0 and half envelope half
// the amplitude.
module tb_source;
  import apex_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic signed [15:0] setp_re = 16'sd12000, setp_im = -16'sd7000;
  logic [15:0] env = 16'hFFFF;
  logic signed [LO_W-1:0] cosd = 0, sind = 0;
  logic signed [DAC_W-1:0] out;

  source dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wt [$];
    real e, g, th;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      env = (n < 200) ? 16'hFFFF : (n < 400) ? 16'h8000 : 16'h0000;
      th = 2 * PI * n / 7.0;
      cosd = LO_W'($rtoi(131000.0 * $cos(th)));
      sind = LO_W'($rtoi(131000.0 * $sin(th)));
      wt.push_back(th);
      @(negedge clk);
      if (n >= 3 && (n % 200) >= 3) begin
        g = (n < 200) ? 65535.0 / 65536.0 : (n < 400) ? 0.5 : 0.0;
        th = wt[n];
        e = g * (12000.0 * $cos(th) - 7000.0 * $sin(th)) * 131000.0 / 131072.0;
        checks++;
        if (real'(out) - e > 2.5 || e - real'(out) > 2.5) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d out %0d exp %f", n, out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
