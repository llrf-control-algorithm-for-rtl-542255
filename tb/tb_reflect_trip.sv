// tb_reflect_trip: reflection channel pair 3, decaycoef = 0.75, thresh_init =
// 4e6, thresh_noise = 5000.  After pulse_start the threshold must follow
// init*(1-0.75^n)+noise (checked against real math to 0.1%); powers 10% below
// it must not trip, other channel pairs with huge power must not trip, and a
// power 10% above it at sample 6 must set reflect_fault, which stays until
// `clear`.
module tb_reflect_trip;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, in_valid = 0, pulse_start = 0, clear = 0;
  logic signed [CC_W-1:0] in_data = 0;
  logic [3:0] in_ch = 0;
  logic [2:0] refl_ch = 3'd3;
  logic [31:0] thresh_init = 32'd4000000, thresh_noise = 32'd5000;
  logic [17:0] decaycoef = 18'd98304;
  logic [2*CC_W-1:0] power;
  logic [33:0] thresh;
  logic reflect_fault;

  reflect_trip dut (.*);

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

  // one 12-channel burst; pair 3 carries power p (I = sqrt(p), Q = 0)
  task automatic burst(input real p, input bit other_big);
    for (int c = 0; c < 12; c++) begin
      in_valid = 1; in_ch = 4'(c);
      if (c == 6)      in_data = CC_W'($rtoi($sqrt(p)));
      else if (c == 7) in_data = 0;
      else             in_data = other_big ? 20'sd400000 : 20'sd0;
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    real th;
    repeat (2) @(negedge clk);
    rst = 0;
    pulse_start = 1; @(negedge clk); pulse_start = 0;
    for (int n = 0; n < 12; n++) begin
      th = 4.0e6 * (1.0 - 0.75 ** n) + 5000.0;
      check((real'(thresh) - th) < 0.001 * th + 2 && (th - real'(thresh)) < 0.001 * th + 2,
            $sformatf("thresh n=%0d %0d exp %f", n, thresh, th));
      burst(n == 6 ? 1.1 * th : 0.9 * th, 1);
      check(reflect_fault == (n >= 6), $sformatf("fault n=%0d is %0d", n, reflect_fault));
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(!reflect_fault, "cleared");
    // new pulse: threshold back at noise level
    pulse_start = 1; @(negedge clk); pulse_start = 0;
    check(thresh == 34'd5000, $sformatf("restart thresh %0d", thresh));
    burst(6000.0, 0);
    check(reflect_fault, "trip at pulse start above noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
