// tb_phshift: random input and gains against y = (ka*x[n] + kb*x[n-2]) >> 15
// with saturation, one clock later; then a sine at f_clk/7 with ka = 1,
// kb = 0 and with ka = 0, kb = 1 must be the input and the input delayed by
// two samples.
module tb_phshift;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic signed [17:0] x = 0, ka = 0, kb = 0, y;
  longint h [3];

  phshift #(.W(18), .GF(15)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int k = 0; k < 3; k++) h[k] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      if (n % 500 == 0) begin ka = 18'($urandom); kb = 18'($urandom); end
      if (n >= 3000) begin ka = (n < 3500) ? 18'sd32768 : 18'sd0; kb = (n < 3500) ? 18'sd0 : 18'sd32768; end
      x = (n >= 3000) ? 18'($rtoi(50000.0 * $sin(2.0 * 3.14159265 * n / 7.0))) : 18'($urandom);
      h[2] = h[1]; h[1] = h[0]; h[0] = x;
      e = (longint'(ka) * h[0] + longint'(kb) * h[2]) >>> 15;
      if (e > 131071) e = 131071;
      if (e < -131072) e = -131072;
      if (n >= 3000) e = (n < 3500) ? h[0] : h[2];
      @(negedge clk);
      checks++;
      if (y != 18'(e) && !(n == 3000 || n == 3500 || n == 3501)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y %0d exp %0d", n, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
