// tb_mdac_seq: a model DAC raises busy for 3 clocks after every load.  For
// each piezo update the testbench expects a load of the fast word at address
// 0, then the slow word at address 1, then one trig, never a load while busy;
// an update arriving during a transfer is sent afterwards, so the last words
// written are always the last update.
module tb_mdac_seq;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst = 1, update = 0, mdac_busy;
  logic signed [15:0] fast = 0, slow = 0;
  logic [15:0] mdac_val;
  logic [2:0] mdac_addr;
  logic mdac_load, mdac_trig;
  int busy_cnt = 0;
  logic [15:0] dac [8];
  int nload = 0, ntrig = 0;

  mdac_seq dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model DAC
  always @(posedge clk) begin
    if (mdac_load && !rst) begin
      checks++;
      if (mdac_busy) begin failures++; $display("FAIL load while busy"); end
      dac[mdac_addr] <= mdac_val;
      nload++;
      busy_cnt <= 3;
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (mdac_trig && !rst) ntrig++;
  end
  assign mdac_busy = (busy_cnt > 0);

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 30; r++) begin
      fast = 16'($urandom); slow = 16'($urandom);
      update = 1; @(negedge clk); update = 0;
      repeat ($urandom_range(1, 5)) begin
        if ($urandom_range(0, 1) == 0) begin
          fast = 16'($urandom); slow = 16'($urandom);
          update = 1; @(negedge clk); update = 0;
        end else @(negedge clk);
      end
      repeat (40) @(negedge clk);
      checks++;
      if (dac[0] != fast || dac[1] != slow) begin
        failures++; $display("FAIL r=%0d dac %h %h exp %h %h", r, dac[0], dac[1], fast, slow);
      end
    end
    checks++;
    if (nload != 2 * ntrig || ntrig < 30) begin
      failures++; $display("FAIL loads %0d trigs %0d", nload, ntrig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
