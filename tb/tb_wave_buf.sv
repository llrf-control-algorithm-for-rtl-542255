// tb_wave_buf: 64-word buffer.  Writes a counting sequence, raises fault_trig
// after word 100 with post_trig = 10, and checks that exactly 10 more words are
// stored, that `frozen` rises, that writes then stop, that `boundary` points
// at the oldest word, and that reading back all 64 words gives the 64 words
// written last, in order.  Then buf_sync re-arms and recording resumes.
module tb_wave_buf;
  import apex_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, wr_valid = 0, fault_trig = 0, buf_sync = 0, rd_en = 0;
  logic signed [CC_W-1:0] wr_data = 0, result;
  logic [15:0] post_trig = 16'd10;
  logic [5:0] rd_addr = 0, boundary;
  logic strobe, frozen;

  wave_buf #(.DEPTH(DEPTH)) dut (.*);

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
    int last;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      wr_valid = (n % 3 != 2);      // gaps in the stream
      wr_data  = CC_W'(n);
      fault_trig = (n >= 101);
      if (wr_valid && !frozen) last = n;
      @(negedge clk);
    end
    wr_valid = 0;
    check(frozen, "frozen");
    // words kept after the fault: the 10 valid words from n=101 on
    // valid n are those with n%3 != 2: 101,103,104,106,107,109,110,112,113,115
    check(last == 115, $sformatf("last stored %0d", last));
    // boundary = next write address = oldest word
    for (int j = 0; j < DEPTH; j++) begin
      int exp_n, cnt;
      @(negedge clk);
      rd_en = 1; rd_addr = 6'(boundary + 6'(j));
      @(negedge clk);
      rd_en = 0;
      // exp: the (DEPTH-j)-th valid word counting back from 115
      cnt = DEPTH - j; exp_n = 116;
      while (cnt > 0) begin exp_n--; if (exp_n % 3 != 2) cnt--; end
      check(strobe && result == CC_W'(exp_n), $sformatf("rd %0d got %0d exp %0d", j, result, exp_n));
    end
    // re-arm
    @(negedge clk) buf_sync = 1; fault_trig = 0;
    @(negedge clk) buf_sync = 0;
    check(!frozen && boundary == 0, "re-armed");
    wr_valid = 1; wr_data = 20'sd777;
    @(negedge clk) wr_valid = 0;
    rd_en = 1; rd_addr = 0;
    @(negedge clk);
    check(result == 20'sd777 && boundary == 1, "write after re-arm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
