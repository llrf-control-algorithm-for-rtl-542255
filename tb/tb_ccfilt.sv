// tb_ccfilt: feeds the serial stream the integrator snapshots of a constant
// input c_ch per channel, i.e. V(t) = c*t*(t+1)/2 sampled every 14 clocks.
// With one snapshot in `per` kept, the two comb stages return the second
// difference c*R^2 (R = 14*per), which after `shift` must equal
// (c*R^2) >>> shift for every channel once the delay lines are filled.
// Also checks channel numbering, saturation, and that dropped snapshots
// produce no output.
module tb_ccfilt;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, strobe = 0, take = 0, in_valid = 0;
  logic [5:0] shift = 6'd5;
  logic signed [INT_W-1:0] in_data = 0;
  logic [3:0] in_ch = 0;
  logic signed [CC_W-1:0] out_data;
  logic out_valid;
  logic [3:0] out_ch;
  localparam int PER = 2;
  longint c [12];
  int nout, nkept;

  ccfilt dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  initial begin
    int ch_exp;
    longint e;
    ch_exp = 0; nout = 0;
    forever begin
      @(negedge clk);
      if (out_valid) begin
        e = (c[out_ch] * (14*PER) * (14*PER)) >>> shift;
        if (e > 524287) e = 524287;
        if (e < -524288) e = -524288;
        checks++;
        if (out_ch != 4'(ch_exp) || (nout >= 24 && out_data != CC_W'(e))) begin
          failures++;
          if (failures < 10) $display("FAIL ch %0d (exp %0d) got %0d exp %0d", out_ch, ch_exp, out_data, e);
        end
        ch_exp = (ch_exp + 1) % 12;
        nout++;
      end
    end
  end

  initial begin
    longint t;
    for (int k = 0; k < 12; k++) c[k] = longint'(k * 37 - 200);
    c[11] = 4000;    // saturates: 4000*784/32 > 2**19
    repeat (2) @(negedge clk);
    rst = 0;
    nkept = 0;
    for (int s = 0; s < 40; s++) begin
      t = 14 * s;
      strobe = 1; take = (s % PER == 0);
      nkept += take;
      @(negedge clk);
      strobe = 0; take = 0;
      for (int k = 0; k < 12; k++) begin
        in_valid = 1; in_ch = 4'(k);
        in_data = INT_W'(c[k] * t * (t + 1) / 2);
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (nout != 12 * nkept) begin failures++; $display("FAIL outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
