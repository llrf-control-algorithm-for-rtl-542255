// tb_half_band: random samples on all 12 interleaved channels; a per-channel
// reference FIR with taps (2,0,-9,0,39,64,39,0,-9,0,2)/128 (rounded) predicts
// each output.  A constant input must come out unchanged (unity DC gain), and
// an impulse on one channel must not leak into the others.
module tb_half_band;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, in_valid = 0;
  logic signed [CC_W-1:0] in_data = 0, out_data;
  logic [3:0] in_ch = 0, out_ch;
  logic out_valid;
  localparam int TAP [11] = '{2, 0, -9, 0, 39, 64, 39, 0, -9, 0, 2};
  longint h [12][11];

  half_band dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int k, input longint v, input int mode);
    longint acc, e;
    for (int j = 10; j > 0; j--) h[k][j] = h[k][j-1];
    h[k][0] = v;
    acc = 0;
    for (int j = 0; j < 11; j++) acc += TAP[j] * h[k][j];
    e = (acc + 64) >>> 7;
    if (e > 524287) e = 524287;
    if (e < -524288) e = -524288;
    in_valid = 1; in_ch = 4'(k); in_data = CC_W'(v);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || out_ch != 4'(k) || out_data != CC_W'(e) ||
        (mode == 1 && out_data != CC_W'(v))) begin
      failures++;
      if (failures < 10) $display("FAIL ch %0d got %0d exp %0d", k, out_data, e);
    end
  endtask

  initial begin
    for (int k = 0; k < 12; k++) for (int j = 0; j < 11; j++) h[k][j] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 100; s++)
      for (int k = 0; k < 12; k++) push(k, longint'($signed(CC_W'($urandom))) >>> 1, 0);
    // constant input: after 11 samples the output equals the input
    for (int s = 0; s < 30; s++)
      for (int k = 0; k < 12; k++) push(k, 1000 * k - 3000, s >= 11 ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
