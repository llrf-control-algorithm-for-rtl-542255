// tb_trapezoid: internal mode with period 100, width 30, ramp 8192: gate must
// be high 30 of every 100 clocks, pulse_start/pulse_end once per period, the
// envelope must rise by 8192 per clock to 0xFFFF and fall back to 0 after the
// gate, with rf_on high until it is 0.  External mode: one pulse per rising
// trig_in edge, none without.  enable low: nothing.
module tb_trapezoid;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, enable = 0, ext_trig = 0, trig_in = 0;
  logic [31:0] period = 100, width = 30;
  logic [15:0] ramp = 16'd8192, env;
  logic gate, rf_on, pulse_start, pulse_end, trig_out;

  trapezoid dut (.*);

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

  initial begin
    int ng, ns, ne, nt, gate_run, prev_env, first_start, last_start;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (200) @(negedge clk);
    check(!gate && !rf_on && env == 0, "idle while disabled");
    enable = 1;
    ng = 0; ns = 0; ne = 0; nt = 0; gate_run = 0; prev_env = 0; first_start = -1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ng += gate; ns += pulse_start; ne += pulse_end; nt += trig_out;
      if (pulse_start) begin
        if (first_start >= 0) check(n - last_start == 100, $sformatf("period %0d", n - last_start));
        else first_start = n;
        last_start = n;
      end
      if (gate) begin
        gate_run++;
        check(int'(env) == ((gate_run - 1) * 8192 > 65535 ? 65535 : (gate_run - 1) * 8192) || gate_run == 1,
              $sformatf("ramp up env %0d run %0d", env, gate_run));
      end else begin
        if (gate_run > 0) check(gate_run == 30, $sformatf("width %0d", gate_run));
        gate_run = 0;
        check(rf_on == (env != 0), "rf_on follows envelope");
        if (prev_env > 0) check(int'(env) == (prev_env > 8192 ? prev_env - 8192 : 0) || env == 65535,
                                $sformatf("ramp down %0d -> %0d", prev_env, env));
      end
      prev_env = env;
    end
    check(ng == 300, $sformatf("gate clocks %0d", ng));
    check(ns == 10 && ne == 10 && nt == 10, $sformatf("starts %0d ends %0d trigs %0d", ns, ne, nt));
    // external trigger mode
    ext_trig = 1;
    repeat (200) @(negedge clk);
    ns = 0;
    for (int n = 0; n < 600; n++) begin
      trig_in = (n % 200) >= 50 && (n % 200) < 60;
      @(negedge clk);
      ns += pulse_start;
    end
    check(ns == 3, $sformatf("external starts %0d", ns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
