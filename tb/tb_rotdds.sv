// tb_rotdds: checks the DDS.  (1) With the f_clk/7 setting the phase repeats
// exactly every 7 clocks over 2000 clocks.  (2) With step_l=100, modulo=96 the
// fine accumulator wraps at 4000, so every 40 clocks the coarse phase advances
// by exactly 40*step_h + 1.  (3) cos/sin equal AMP*1.6468*cos/sin of the phase
// STAGES+2 clocks earlier, within 12 LSB.
module tb_rotdds;
  import apex_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int STAGES = 18;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic [PH_W-1:0] step_h = 20'd149796;
  logic [11:0] step_l = 12'd2340, modulo = 12'd1;
  logic signed [LO_W-1:0] cosd, sind;
  logic [PH_W-1:0] phase;
  logic [PH_W-1:0] hist [$];

  rotdds #(.STAGES(STAGES)) dut (.clk, .rst, .phase_step_h(step_h), .phase_step_l(step_l),
                                 .modulo, .cosd, .sind, .phase);

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    real a, ec, es;
    logic [PH_W-1:0] p0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      hist.push_back(phase);
      if (hist.size() > 7) check(hist[hist.size()-1] == hist[hist.size()-8], "period 7");
      if (hist.size() > STAGES + 2) begin
        a  = 2.0 * PI * real'(hist[hist.size()-1-(STAGES+2)]) / 2.0**PH_W;
        ec = 79590.0 * 1.6467602 * $cos(a);
        es = 79590.0 * 1.6467602 * $sin(a);
        check(rabs(real'(cosd) - ec) < 12 && rabs(real'(sind) - es) < 12,
              $sformatf("lo %0d %0d exp %f %f", cosd, sind, ec, es));
      end
    end
    // modulo correction
    step_h = 20'd1000; step_l = 12'd100; modulo = 12'd96;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    // phase accumulator state now 0; after 40 clocks: 40*1000 + 1 carry
    p0 = phase;
    repeat (40) @(negedge clk);
    check(phase - p0 == 20'd40001, $sformatf("40-clock advance %0d", phase - p0));
    p0 = phase;
    repeat (400) @(negedge clk);
    check(phase - p0 == 20'd400010, $sformatf("400-clock advance %0d", phase - p0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
