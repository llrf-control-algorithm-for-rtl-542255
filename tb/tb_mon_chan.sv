// tb_mon_chan: random IF and LO samples into one mixer/integrator channel.
// A reference model in the testbench (product >>> 17, two running sums)
// predicts the sampled value; on clocks without samp the output must equal
// the previous sr_in (shift chain behaviour).
module tb_mon_chan;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, samp = 0;
  logic signed [ADC_W-1:0] adc = 0;
  logic signed [LO_W-1:0]  lo = 0;
  logic signed [INT_W-1:0] sr_in = 0, sr_out;
  longint m_mix, m_i1, m_i2;

  mon_chan dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [INT_W-1:0] exp_v;
    logic was_samp;
    m_mix = 0; m_i1 = 0; m_i2 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      adc   = ADC_W'($urandom);
      lo    = LO_W'($urandom);
      sr_in = INT_W'({$urandom, $urandom});
      samp  = ($urandom_range(0, 6) == 0);
      // model: values after this clock edge
      exp_v = samp ? INT_W'(m_i2) : sr_in;
      was_samp = samp;
      m_i2 = m_i2 + m_i1;
      m_i1 = m_i1 + m_mix;
      m_mix = (longint'(adc) * longint'(lo)) >>> (LO_W-1);
      @(negedge clk);
      checks++;
      if (sr_out !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d samp=%0d got %0d exp %0d", n, was_samp, sr_out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
