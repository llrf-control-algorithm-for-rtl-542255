// tb_slow_chain: snaps 8 random bytes, changes the input afterwards, and
// checks that eight slow_op clocks deliver the snapped bytes most significant
// first, then zeros; clocks without slow_op must hold the head byte.
module tb_slow_chain;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic slow_snap = 0, slow_op = 0;
  logic [63:0] snap_data;
  logic [7:0] slow_out;

  slow_chain #(.NBYTES(8)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ref_v;
    for (int r = 0; r < 20; r++) begin
      ref_v = {$urandom, $urandom};
      snap_data = ref_v;
      @(negedge clk) slow_snap = 1;
      @(negedge clk) slow_snap = 0;
      snap_data = ~ref_v;
      for (int k = 7; k >= -2; k--) begin
        checks++;
        if (slow_out != (k >= 0 ? ref_v[8*k +: 8] : 8'h00)) begin
          failures++; $display("FAIL r=%0d k=%0d got %h", r, k, slow_out);
        end
        if ($urandom_range(0, 1)) @(negedge clk);   // idle clock
        checks++;
        if (slow_out != (k >= 0 ? ref_v[8*k +: 8] : 8'h00)) begin
          failures++; $display("FAIL hold r=%0d k=%0d", r, k);
        end
        @(negedge clk) slow_op = 1;
        @(negedge clk) slow_op = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
