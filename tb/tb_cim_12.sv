// tb_cim_12: constant, distinct inputs on all six signals and four LO values.
// Every 14 clocks samp is pulsed; the testbench models each channel's two
// integrators and checks that the next 12 clocks deliver channels 0..11 in
// order (sr_valid, sr_ch) with the expected values, that the adcx pair uses
// the xsel input and LO B, and that the drive pair uses outm's top bits.
module tb_cim_12;
  import apex_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, samp = 0;
  logic signed [ADC_W-1:0] adc [4];
  logic signed [DAC_W-1:0] outm = 16'sd8000;
  logic [1:0] xsel = 2'd2;
  logic signed [LO_W-1:0] cos_a = 18'sd65536, sin_a = -18'sd32768;
  logic signed [LO_W-1:0] cos_b = 18'sd100000, sin_b = 18'sd20000;
  logic signed [INT_W-1:0] sr_out;
  logic sr_valid;
  logic [3:0] sr_ch;
  longint mix [12], i1 [12], i2 [12], snap [12];

  cim_12 dut (.*);

  initial begin
    adc[0] = 14'sd1000; adc[1] = -14'sd2000; adc[2] = 14'sd3000; adc[3] = -14'sd4000;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sig_of(int p);
    case (p)
      4: return 2000;          // outm >>> 2
      5: return 3000;          // adc[xsel=2]
      default: return adc[p];
    endcase
  endfunction
  function automatic longint lo_of(int c);
    if (c / 2 == 5) return (c % 2 == 0) ? cos_b : sin_b;
    return (c % 2 == 0) ? cos_a : sin_a;
  endfunction

  initial begin
    int pos;
    for (int c = 0; c < 12; c++) begin mix[c] = 0; i1[c] = 0; i2[c] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    pos = -1;
    for (int n = 0; n < 14 * 40; n++) begin
      samp = (n % 14 == 13);
      if (samp) for (int c = 0; c < 12; c++) snap[c] = i2[c];
      for (int c = 0; c < 12; c++) begin
        i2[c] = i2[c] + i1[c];
        i1[c] = i1[c] + mix[c];
        mix[c] = (sig_of(c/2) * lo_of(c)) >>> (LO_W-1);
      end
      @(negedge clk);
      if (samp) pos = 0;
      else if (pos >= 0) pos++;
      if (pos >= 0 && pos < 12) begin
        checks++;
        if (!sr_valid || sr_ch != 4'(pos) || sr_out !== INT_W'(snap[pos])) begin
          failures++;
          if (failures < 10) $display("FAIL pos %0d valid %0d ch %0d got %0d exp %0d",
                                      pos, sr_valid, sr_ch, sr_out, INT_W'(snap[pos]));
        end
      end else if (pos >= 12) begin
        checks++;
        if (sr_valid) begin failures++; $display("FAIL valid outside burst"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
