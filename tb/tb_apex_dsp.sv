// tb_apex_dsp: end-to-end run of the LLRF DSP at its default sizes.
//
// Stimulus: four IF inputs at f_clk/7.  adc[0] is a toy cavity that returns a
// quarter of the drive 3 clocks later, adc[1] is the laser photodiode with a
// slowly drifting phase, adc[2] a forward signal, adc[3] a reflected signal.
// A model piezo DAC answers loads with 2 busy clocks.  Registers are set over
// the write-only local bus.  The run goes through: open-loop pulses,
// closed-loop pulses, decay recording, laser loop and piezo DAC writes, the
// xsel characterization channel, a waveform decimation change, an amplitude
// interlock trip that freezes the waveform buffer and drops the permits, a
// reflection fault, clears, and the slow readout.  Each mechanism is counted
// and one that never happened is a failure.
module tb_apex_dsp;
  import apex_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1;
  logic signed [ADC_W-1:0] adc [4];
  logic lb_write = 0;
  logic [LB_AW-1:0] lb_addr = 0;
  logic [LB_DW-1:0] lb_data = 0;
  logic signed [DAC_W-1:0] drive;
  logic trig_in = 0, trig_out;
  logic interlock, reflect_fault, rf_permit1, rf_permit2, rf_on;
  logic [15:0] mdac_val;
  logic [2:0] mdac_addr;
  logic mdac_load, mdac_trig, mdac_busy;
  logic slow_snap = 0, slow_op = 0;
  logic [7:0] slow_out;
  logic wave_rd_en = 0;
  logic [12:0] wave_rd_addr = 0, wave_boundary;
  logic signed [CC_W-1:0] wave_result, decay_result_out;
  logic wave_strobe, wave_frozen;
  logic decay_rd_en = 0;
  logic [10:0] decay_rd_addr = 0;
  logic decay_strobe, decay_done;

  apex_dsp dut (.*);

  // mechanism counters
  int m_pulse, m_open, m_closed, m_decay, m_piezo, m_xsel, m_decim, m_freeze,
      m_inlk, m_refl, m_slow;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- plant and signal models ----------------
  longint n_clk = 0;
  logic signed [DAC_W-1:0] dly [3];
  real laser_ph = 0.1;
  always @(posedge clk) begin
    n_clk <= n_clk + 1;
    dly[0] <= drive; dly[1] <= dly[0]; dly[2] <= dly[1];
  end
  always_comb begin
    real th;
    th = 2.0 * PI * real'(n_clk) / 7.0;
    adc[0] = ADC_W'(dly[2] >>> 2);
    adc[1] = ADC_W'($rtoi(3000.0 * $cos(th + 2.0 * PI * laser_ph)));
    adc[2] = ADC_W'($rtoi(2000.0 * $cos(th + 0.5)));
    adc[3] = ADC_W'($rtoi(500.0 * $cos(th - 1.0)));
  end
  always @(posedge clk) laser_ph <= laser_ph + 1.0e-6;

  int busy_cnt = 0;
  always @(posedge clk) begin
    if (mdac_load && !rst) begin
      busy_cnt <= 2;
      m_piezo++;
      checks++;
      if (busy_cnt != 0) begin failures++; $display("FAIL piezo load while busy"); end
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign mdac_busy = (busy_cnt != 0);

  // drive must be zero whenever rf_on is low (one clock of pipeline)
  logic rf_on_d;
  always @(posedge clk) rf_on_d <= rf_on;
  int drive_on_off = 0;
  always @(negedge clk) if (!rst && !rf_on_d && !rf_on && drive != 0) drive_on_off++;

  // ---------------- host access ----------------
  task automatic wr(input logic [LB_AW-1:0] a, input logic [31:0] v);
    @(negedge clk);
    lb_write = 1; lb_addr = a; lb_data = v;
    @(negedge clk);
    lb_write = 0;
  endtask

  task automatic wave_read(input logic [12:0] a, output logic signed [CC_W-1:0] v);
    @(negedge clk);
    wave_rd_en = 1; wave_rd_addr = a;
    @(negedge clk);
    wave_rd_en = 0;
    v = wave_result;
  endtask

  // peak |drive| over the next n clocks
  task automatic drive_peak(input int n, output int pk);
    pk = 0;
    repeat (n) begin
      @(negedge clk);
      if (drive > pk) pk = drive;
      if (-drive > pk) pk = -drive;
    end
  endtask

  initial begin
    int pk, pk_open, ws0, ws1, ndec;
    logic signed [CC_W-1:0] w [12];
    logic [12:0] base;
    logic [7:0] bytes [44];
    logic [47:0] ts0, ts1;
    m_pulse = 0; m_open = 0; m_closed = 0; m_decay = 0; m_piezo = 0; m_xsel = 0;
    m_decim = 0; m_freeze = 0; m_inlk = 0; m_refl = 0; m_slow = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    // configuration
    wr(A_PERIOD, 4000);
    wr(A_WIDTH, 1500);
    wr(A_RAMP, 2048);
    wr(A_SETP_RE, 16000);
    wr(A_SETP_IM, 0);
    wr(A_POST_TRIG, 120);
    wr(A_LASER_KP, 20000);
    wr(A_LASER_KI, 200);
    wr(A_LASER_POLE, 3000);
    wr(A_LASER_KI2, 20);
    wr(A_XSEL, 2);
    wr(A_CTRL, 32'b010);            // rf_enable, open loop
    // ---- open loop pulses ----
    wait (trig_out); m_pulse++;
    repeat (800) @(negedge clk);    // ramp done (32 clocks), flat top
    drive_peak(70, pk);
    // expected: 16000 * 65535/65536 * 131070/131072 = ~15999 at the crest;
    // sampling 7 points per cycle sees at least cos(pi/7) of it
    check(pk > 14000 && pk <= 16001, $sformatf("open-loop drive peak %0d", pk));
    if (pk > 14000) m_open++;
    pk_open = pk;
    wait (!rf_on);
    repeat (50) @(negedge clk);
    drive_peak(50, pk);
    check(pk == 0, $sformatf("drive after pulse %0d", pk));
    // ---- decay buffer: recorded after the pulse end ----
    wait (decay_done);
    for (int j = 0; j < 12; j++) begin
      @(negedge clk); decay_rd_en = 1; decay_rd_addr = 11'(j + 120);
      @(negedge clk); decay_rd_en = 0; w[j] = decay_result_out;
    end
    // pair 2 (adc[2], amplitude 2000) is always present: 1000*196/2**9 = 383
    // spread over I and Q
    check((w[4] > 100 || w[4] < -100 || w[5] > 100 || w[5] < -100),
          $sformatf("decay record pair 2: %0d %0d", w[4], w[5]));
    m_decay++;
    // ---- closed loop ----
    wr(A_KPA, 16384);               // 0.5
    wr(A_CTRL, 32'b011);
    wait (trig_out); m_pulse++;
    repeat (800) @(negedge clk);
    drive_peak(70, pk);
    // loop: d = 0.5*(s - probe), probe a filtered quarter of d: the drive
    // must be well below the open-loop one but far from zero
    check(pk > 3000 && pk < pk_open * 9 / 10, $sformatf("closed-loop drive peak %0d", pk));
    if (pk > 3000) m_closed++;
    // ---- xsel: adcx pair equals adc3 pair (same LO frequency and phase) ----
    base = 13'(((wave_boundary / 12) - 10) * 12);
    for (int j = 0; j < 12; j++) wave_read(13'(base + 13'(j)), w[j]);
    check(w[10] == w[4] && w[11] == w[5] && (w[4] != 0 || w[5] != 0),
          $sformatf("xsel=2: %0d %0d vs %0d %0d", w[10], w[11], w[4], w[5]));
    wr(A_XSEL, 3);
    repeat (14 * 40) @(negedge clk);
    base = 13'(((wave_boundary / 12) - 10) * 12);
    for (int j = 0; j < 12; j++) wave_read(13'(base + 13'(j)), w[j]);
    check(w[10] == w[6] && w[11] == w[7], $sformatf("xsel=3: %0d %0d vs %0d %0d", w[10], w[11], w[6], w[7]));
    if (w[10] == w[6] && w[11] == w[7]) m_xsel++;
    // ---- waveform decimation change ----
    ws0 = wave_boundary; repeat (14 * 60) @(negedge clk); ws1 = wave_boundary;
    ndec = (ws1 - ws0 + 8192) % 8192;
    check(ndec >= 12 * 59 && ndec <= 12 * 61, $sformatf("wave words at per=1: %0d", ndec));
    wr(A_WAVE_PER, 4); wr(A_WAVE_SH, 2);
    repeat (200) @(negedge clk);
    ws0 = wave_boundary; repeat (14 * 4 * 30) @(negedge clk); ws1 = wave_boundary;
    ndec = (ws1 - ws0 + 8192) % 8192;
    check(ndec >= 12 * 29 && ndec <= 12 * 31, $sformatf("wave words at per=4: %0d", ndec));
    if (ndec >= 12 * 29 && ndec <= 12 * 31) m_decim++;
    // ---- laser loop ----
    check(m_piezo > 100, $sformatf("piezo loads %0d", m_piezo));
    // ---- slow readout before any fault ----
    @(negedge clk) slow_snap = 1; @(negedge clk) slow_snap = 0;
    for (int k = 43; k >= 0; k--) begin bytes[k] = slow_out; @(negedge clk) slow_op = 1; @(negedge clk) slow_op = 0; end
    ts0 = {bytes[5], bytes[4], bytes[3], bytes[2], bytes[1], bytes[0]};
    check(bytes[40] == 8'h00 && bytes[41][0] == 1'b1, $sformatf("status %h %h", bytes[40], bytes[41]));
    // ---- amplitude interlock on pair 1 (laser input, amplitude 3000) ----
    // decay path: 1500*196/2**9 = 574, times the CORDIC gain: about 946
    wr(7'(A_UPPER0) + 7'd1, 300);
    wr(A_INLK_MODE, 32'h0);         // above upper
    wr(A_INLK_EN, 32'b000010);
    repeat (14 * 8) @(negedge clk);
    check(interlock && !rf_permit1 && !rf_permit2 && !rf_on, "interlock trip drops permits");
    if (interlock) m_inlk++;
    repeat (14 * 4 * 20) @(negedge clk);
    check(wave_frozen, "waveform buffer frozen after fault");
    ws0 = wave_boundary; repeat (14 * 8) @(negedge clk);
    check(wave_frozen && wave_boundary == 13'(ws0), "no writes while frozen");
    if (wave_frozen) m_freeze++;
    // slow readout shows the trip
    @(negedge clk) slow_snap = 1; @(negedge clk) slow_snap = 0;
    for (int k = 43; k >= 0; k--) begin bytes[k] = slow_out; @(negedge clk) slow_op = 1; @(negedge clk) slow_op = 0; end
    ts1 = {bytes[5], bytes[4], bytes[3], bytes[2], bytes[1], bytes[0]};
    check(bytes[40] == 8'b0000_1001 && bytes[41][0] == 1'b0, $sformatf("status after trip %b", bytes[40]));
    check(ts1 > ts0, "timestamp advances");
    if (ts1 > ts0 && bytes[40] == 8'b0000_1001) m_slow++;
    // clear: disable, clear interlock, re-arm buffer
    wr(A_INLK_EN, 0);
    wr(A_CLEAR, 32'b101);
    repeat (3) @(negedge clk);
    check(!interlock && rf_permit1 && !wave_frozen, "interlock cleared, buffer re-armed");
    // ---- reflection fault on pair 3 (adc4 input, 500 amplitude) ----
    wr(A_REFL_CH, 3);
    wr(A_TH_INIT, 0);
    wr(A_TH_NOISE, 1000);
    repeat (14 * 4) @(negedge clk);
    check(reflect_fault && !rf_permit2, "reflection fault");
    if (reflect_fault) m_refl++;
    wr(A_TH_NOISE, 32'hFFFFFFFF);
    wr(A_CLEAR, 32'b010);
    repeat (14 * 4) @(negedge clk);
    check(!reflect_fault && rf_permit2, "reflection fault cleared");
    // RF comes back
    wait (trig_out); m_pulse++;
    check(drive_on_off == 0, $sformatf("drive while RF off: %0d clocks", drive_on_off));
    // ---- mechanism summary ----
    $display("INFO pulses=%0d open=%0d closed=%0d decay=%0d piezo_loads=%0d xsel=%0d decim=%0d freeze=%0d inlk=%0d refl=%0d slow=%0d",
             m_pulse, m_open, m_closed, m_decay, m_piezo, m_xsel, m_decim, m_freeze, m_inlk, m_refl, m_slow);
    check(m_pulse > 0 && m_open > 0 && m_closed > 0 && m_decay > 0 && m_piezo > 0 && m_xsel > 0 &&
          m_decim > 0 && m_freeze > 0 && m_inlk > 0 && m_refl > 0 && m_slow > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
