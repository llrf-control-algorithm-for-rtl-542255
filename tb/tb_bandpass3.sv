// tb_bandpass3: (1) random input with c = 0.25, d = -0.03 against the
// difference equation y[n] = x[n]-x[n-1]+y[n-1]-(c*y[n-2]+d*y[n-3])/2**15 with
// saturation; (2) DC is blocked: a constant input decays to within 4 LSB of 0; (3) a sine at
// f_clk/7 settles to the gain |H| of (1-z^-1)/(1-z^-1+c z^-2+d z^-3)
// computed in real arithmetic, within 1%.
module tb_bandpass3;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic signed [17:0] x = 0, c = 18'sd8192, d = -18'sd983, y;

  bandpass3 #(.W(18), .GF(15)) dut (.*);

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
    longint x1, y1, y2, y3, nx;
    real w, nr, ni, dr, di, g, pk;
    x1 = 0; y1 = 0; y2 = 0; y3 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      x = 18'($signed(16'($urandom)));
      nx = longint'(x) - x1 + y1 - ((8192 * y2 + (-983) * y3) >>> 15);
      nx = satw(nx, 24);
      x1 = x; y3 = y2; y2 = y1; y1 = nx;
      @(negedge clk);
      checks++;
      if (y != 18'(satw(y1, 18))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y %0d exp %0d", n, y, satw(y1, 18));
      end
    end
    // DC blocked
    x = 18'sd20000;
    repeat (400) @(negedge clk);
    checks++;
    if (y > 4 || y < -4) begin failures++; $display("FAIL DC y=%0d", y); end
    // sine gain at f_clk/7
    w = 2 * PI / 7.0;
    nr = 1 - $cos(w);  ni = $sin(w);
    dr = 1 - $cos(w) + 0.25 * $cos(2*w) - 0.03 * $cos(3*w);
    di = $sin(w) - 0.25 * $sin(2*w) + 0.03 * $sin(3*w);
    g  = $sqrt((nr*nr + ni*ni) / (dr*dr + di*di));
    pk = 0;
    for (int n = 0; n < 1400; n++) begin
      x = 18'($rtoi(10000.0 * $sin(w * n)));
      @(negedge clk);
      if (n >= 700) pk += real'(y) * real'(y);
    end
    pk = $sqrt(2.0 * pk / 700.0);
    checks++;
    if (pk < 0.99 * 10000.0 * g || pk > 1.01 * 10000.0 * g) begin
      failures++; $display("FAIL gain amplitude %f exp %f", pk, 10000.0 * g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
