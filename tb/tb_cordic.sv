// tb_cordic: checks the pipelined CORDIC in both modes against real-number
// math.  Vectoring: 64 angles at two amplitudes; amplitude must be
// 1.6468*A within 0.1%, angle within 2**-14 turn plus 1/A.  Rotation: cos/sin of
// 64 angles within 7e-5 of the amplitude (20-bit angle resolution).  Also checks the STAGES+1 clock latency.
module tb_cordic;
  localparam int W = 20, PH_W = 20, STAGES = 18;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1, in_valid = 0, vec = 0;
  logic signed [W-1:0] x = 0, y = 0;
  logic [PH_W-1:0] z = 0;
  logic out_valid;
  logic signed [W+1:0] x_o, y_o;
  logic [PH_W-1:0] z_o;

  cordic #(.W(W), .PH_W(PH_W), .STAGES(STAGES)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_one(input bit v, input real ang, input real amp);
    real e_x, e_y, e_z, got_z, dz;
    int lat;
    @(negedge clk);
    vec = v; in_valid = 1;
    if (v) begin
      x = W'($rtoi(amp * $cos(ang))); y = W'($rtoi(amp * $sin(ang))); z = 0;
    end else begin
      x = W'($rtoi(amp)); y = 0; z = PH_W'($rtoi(ang / (2*PI) * 2.0**PH_W));
    end
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    check(lat == STAGES + 1, $sformatf("latency %0d", lat));
    if (v) begin
      e_x = amp * 1.6467602;
      check(rabs(real'(x_o) - e_x) < 0.001 * e_x + 6, $sformatf("amp %0d exp %f", x_o, e_x));
      got_z = real'(z_o) / 2.0**PH_W;
      e_z = ang / (2*PI);
      dz = got_z - e_z; dz = dz - $floor(dz + 0.5);
      check(rabs(dz) < 2.0**-14 + 1.0 / amp, $sformatf("ang %f exp %f", got_z, e_z));
    end else begin
      e_x = amp * 1.6467602 * $cos(ang); e_y = amp * 1.6467602 * $sin(ang);
      check(rabs(real'(x_o) - e_x) < amp * 7e-5 + 4 && rabs(real'(y_o) - e_y) < amp * 7e-5 + 4,
            $sformatf("rot %0d %0d exp %f %f", x_o, y_o, e_x, e_y));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 64; k++) begin
      run_one(1, 2*PI*k/64.0 + 0.01, 300000.0);
      run_one(1, 2*PI*k/64.0 + 0.03, 1000.0);
      run_one(0, 2*PI*k/64.0 + 0.02, 300000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
