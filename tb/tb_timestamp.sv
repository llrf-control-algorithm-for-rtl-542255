// tb_timestamp: after reset the count must equal the number of clocks since
// reset was released, over 5000 clocks; a second reset restarts it; a 8-bit
// counter must wrap from 255 to 0.
module tb_timestamp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic [47:0] count;
  logic [7:0] c8;

  timestamp #(.W(48)) dut (.clk, .rst, .count);
  timestamp #(.W(8)) dut8 (.clk, .rst, .count(c8));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 1; n <= 5000; n++) begin
      @(negedge clk);
      checks++;
      if (count != 48'(n) || c8 != 8'(n)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d count %0d c8 %0d", n, count, c8);
      end
    end
    rst = 1; @(negedge clk); rst = 0;
    @(negedge clk);
    checks++;
    if (count != 1) begin failures++; $display("FAIL restart %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
