// tb_freq: phase ramps with a constant step per sample (positive, negative,
// and crossing the wrap point) must give freq = 2**len * step for each
// window of 2**len samples; the first sample only primes the difference.
module tb_freq;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, valid = 0;
  logic [PH_W-1:0] phase = 0;
  logic [3:0] len_log2 = 4'd3;
  logic signed [31:0] freq_o;
  logic freq_valid;

  freq dut (.clk, .rst, .valid, .phase, .len_log2, .freq_o, .freq_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ramp(input int step, input int nsamp, input int len);
    int nres;
    logic [PH_W-1:0] p;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    len_log2 = 4'(len);
    p = 20'd1000000;
    nres = 0;
    for (int n = 0; n < nsamp; n++) begin
      phase = p; p = p + 20'(step);
      valid = 1; @(negedge clk); valid = 0;
      if (freq_valid) begin
        nres++;
        checks++;
        if (freq_o != 32'(step * (1 << len))) begin
          failures++; $display("FAIL step %0d freq %0d", step, freq_o);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nres != (nsamp - 1) / (1 << len)) begin
      failures++; $display("FAIL windows %0d", nres);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    ramp(1234, 65, 3);
    ramp(-5000, 65, 4);
    ramp(300000, 33, 2);     // wraps the 20-bit phase often
    ramp(-300000, 33, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
