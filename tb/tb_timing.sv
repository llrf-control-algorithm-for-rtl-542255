// tb_timing: samp must come every 14 clocks; take_wave/decay/laser must come
// only with samp and on every 3rd, 5th and 1st samp for per = 3, 5, 1;
// per = 0 must behave as 1.
module tb_timing;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1;
  logic [6:0] wave_per = 7'd3, decay_per = 7'd5, laser_per = 7'd1;
  logic samp, take_wave, take_decay, take_laser;

  timing #(.BASE(14)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int last, ns, nw, nd, nl;
    repeat (2) @(negedge clk);
    rst = 0;
    last = -1; ns = 0; nw = 0; nd = 0; nl = 0;
    for (int n = 0; n < 14 * 300; n++) begin
      @(negedge clk);
      check(!(take_wave || take_decay || take_laser) || samp, "take without samp");
      if (samp) begin
        if (last >= 0) check(n - last == 14, $sformatf("samp spacing %0d", n - last));
        last = n;
        ns++;
        nw += take_wave; nd += take_decay; nl += take_laser;
      end
    end
    check(ns == 300, $sformatf("samp count %0d", ns));
    check(nw == 100, $sformatf("wave takes %0d", nw));
    check(nd == 60,  $sformatf("decay takes %0d", nd));
    check(nl == 300, $sformatf("laser takes %0d", nl));
    laser_per = 7'd0;
    nl = 0;
    repeat (14 * 10) begin @(negedge clk); nl += take_laser; end
    check(nl == 10, $sformatf("per=0 takes %0d", nl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
