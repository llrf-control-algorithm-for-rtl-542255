// tb_decay_buf: 32-word buffer fed with 12-channel bursts, word = 100*burst+ch.
// A decay_trig in the middle of burst 3 must start recording at channel 0 of
// burst 4; exactly 32 words are stored, `done` rises, and read-back returns
// 400, 401, ... 411, 500, ... in order.  A second trigger re-records.
module tb_decay_buf;
  import apex_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, wr_valid = 0, decay_trig = 0, rd_en = 0;
  logic signed [CC_W-1:0] wr_data = 0, decay_result_out;
  logic [3:0] wr_ch = 0;
  logic [4:0] rd_addr = 0;
  logic decay_strobe, done;

  decay_buf #(.DEPTH(DEPTH)) dut (.*);

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

  task automatic bursts(input int first, input int last, input int trig_burst);
    for (int b = first; b <= last; b++) begin
      for (int c = 0; c < 12; c++) begin
        wr_valid = 1; wr_ch = 4'(c); wr_data = CC_W'(100 * b + c);
        decay_trig = (b == trig_burst && c == 5);
        @(negedge clk);
      end
      wr_valid = 0; decay_trig = 0;
      @(negedge clk); @(negedge clk);
    end
  endtask

  task automatic readback(input int b0);
    for (int j = 0; j < DEPTH; j++) begin
      rd_en = 1; rd_addr = 5'(j);
      @(negedge clk);
      rd_en = 0;
      check(decay_strobe && decay_result_out == CC_W'(100 * (b0 + j / 12) + j % 12),
            $sformatf("rd %0d got %0d", j, decay_result_out));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(!done, "not done at start");
    bursts(0, 5, 3);
    check(!done, "not done after 24 words");
    bursts(6, 7, -1);
    check(done, "done");
    readback(4);
    bursts(8, 9, 8);   // trigger in burst 8 -> record from burst 9
    check(!done, "re-armed");
    bursts(10, 12, -1);
    check(done, "done again");
    readback(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
