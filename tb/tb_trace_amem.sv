// tb_trace_amem: end-to-end test of the whole analog memory ASIC at its
// default size (64 inputs, 8 slots, 32 + 192 cells).
//
// The inputs carry small sawtooth waveforms (a different phase per input)
// and, on chosen inputs, pulses. The test configures the channels over
// I2C, then:
//  1. with the readout disabled, triggers input 5 by leading edge (with a
//     noisy tail that must not retrigger), input 2 by its external trigger
//     pin, inputs 20-22 by global trigger 0 (simultaneous) and inputs 30-40
//     by global trigger 1: the queue fills after inputs 30-32 and the
//     other eight pulses are lost;
//  2. enables the readout and decodes the 8 frames from the differential
//     output: header, fields, SEC-DED code, wait cycles and every one of
//     the 224 samples against the waveform that was applied (pre-trigger
//     cells rotated by the start position, two precharged cells at 0 V);
//  3. triggers input 5 again, and input 50 twice 190 cycles apart (the
//     second trigger while the first pulse is still being captured: no
//     dead time), and decodes those 3 frames;
//  4. reads the trigger-request and lost-pulse counters over I2C.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_trace_amem;
  import trace_pkg::*;

  logic clk = 0, rst_n = 0, ts_rst = 0, start = 0;
  sample_t vin [N_CH];
  sample_t test_in = '0;
  logic [N_EXT-1:0] ext_trig = '0;
  logic [N_GTRIG-1:0] gtrig = '0;
  logic scl, sda_low, sda_oe, sda;
  logic trigger_out, empty, full, rdclk;
  logic signed [SAMPLE_W:0] out_p, out_n;

  int checks = 0, failures = 0;
  longint cyc = 0;

  trace_amem dut (.clk, .rst_n, .ts_rst, .vin, .test_in, .ext_trig, .gtrig, .scl,
    .sda_in(sda), .sda_oe, .start, .trigger_out, .empty, .full, .rdclk, .out_p, .out_n);

  assign sda = !(sda_low || sda_oe);
  i2c_master_bfm #(.Q(10), .ADDR(7'h2A)) m (.clk, .sda, .scl, .sda_low);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---------------- stimulus: input waveforms ----------------
  localparam int HD = 32768;
  shortint hist [N_CH][HD];     // expected SCA voltage, by timestamp
  int pulse_mv [N_CH];
  logic [TS_W-1:0] ts_tb = '0;  // the timestamp the ASIC sees in a cycle

  function automatic int amp_out(int v);   // input stage, Vref1 = 0 mV
    int e = -(12 * v) / 13;
    return e > 2047 ? 2047 : (e < -2048 ? -2048 : e);
  endfunction

  always @(negedge clk) begin
    int v;
    for (int i = 0; i < N_CH; i++) begin
      v = int'((cyc * 7 + longint'(i) * 37) % 400) - 200 + pulse_mv[i];
      vin[i] = sample_t'(v);
      hist[i][ts_tb % HD] = shortint'(amp_out(v));
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n || ts_rst) ts_tb <= '0;
    else                  ts_tb <= ts_tb + 1;
  end

  // ---------------- mechanism counters ----------------
  int full_cycles = 0, trig_req_cycles = 0, idle_toggles = 0, precharged = 0;
  int gated_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (full) full_cycles++;
    if (trigger_out) trig_req_cycles++;
    if (!start && !empty) gated_cycles++;
  end

  // ---------------- frame decoder ----------------
  typedef struct {
    logic [63:0] dig;
    int          s [231];
  } frame_t;
  frame_t frames [$];
  int     dstate = 0, dn = 0;
  logic [3:0] last4 = '0;
  logic   prev_b = 0, b;
  frame_t cur;

  always @(negedge rdclk) if (rst_n) begin
    b = out_p > 0;
    unique case (dstate)
      0: begin
        if (b != prev_b) idle_toggles++;
        prev_b = b;
        last4 = {last4[2:0], b};
        if (last4 == FRAME_HEADER) begin
          dstate = 1; dn = 0;
        end
      end
      1: begin
        cur.dig[63 - dn] = b;
        dn++;
        if (dn == 64) begin dstate = 2; dn = 0; end
      end
      default: begin
        cur.s[dn] = int'(out_p);
        chk(out_n == -out_p, "differential output");
        dn++;
        if (dn == 231) begin
          frames.push_back(cur);
          dstate = 0; last4 = '0;
        end
      end
    endcase
  end

  function automatic int syndrome(logic [63:0] dig);
    // rebuild the codeword: data at non-power-of-two positions, check bit
    // k at 2^k, overall parity at 0
    logic [56:0] d = dig[63:7];
    logic [6:0]  e = dig[6:0];
    logic [63:0] cw = '0;
    int i = 0, s = 0;
    for (int q = 1; q < 64; q++) begin
      if ((q & (q - 1)) == 0) cw[q] = e[$clog2(q)];
      else begin cw[q] = d[i]; i++; end
    end
    cw[0] = e[6];
    for (int q = 1; q < 64; q++) if (cw[q]) s ^= q;
    return (^cw) ? -1 : s;
  endfunction

  // channel, timestamp of the frames, in arrival order
  int f_ch [$];
  longint f_ts [$];

  task automatic check_frame(input frame_t f, input longint prev_trig_ts);
    int ch, pos, slot, rsv, ts;
    int checked_age;
    ch   = int'(f.dig[63:57]);
    pos  = int'(f.dig[56:52]);
    slot = int'(f.dig[51:48]);
    ts   = int'(f.dig[47:12]);
    rsv  = int'(f.dig[11:7]);
    chk(syndrome(f.dig) == 0, $sformatf("SEC-DED code of frame ch %0d", ch));
    chk(ch < N_CH && slot < N_SLOTS && rsv == 0, "frame fields in range");
    // only cells written since the channel last resumed sampling hold
    // samples of this pulse's history
    checked_age = 29;
    if (prev_trig_ts >= 0 && ts - prev_trig_ts - 186 < 29) checked_age = ts - prev_trig_ts - 186;
    for (int sec = 0; sec < 7; sec++)
      chk(f.s[sec * 33] == 0, "wait cycle at 0 V");
    for (int c = 0; c < PRE_CELLS; c++) begin
      int age = (pos - c + PRE_CELLS) % PRE_CELLS;
      int got = f.s[1 + c];
      if (c == (pos + 1) % PRE_CELLS || c == (pos + 2) % PRE_CELLS) begin
        chk(got == 0, $sformatf("precharged cell %0d of ch %0d", c, ch));
        precharged++;
      end else if (age <= checked_age) begin
        int e = hist[ch][(ts - age) % HD];
        chk(got == e, $sformatf("ch %0d pre cell %0d (age %0d) = %0d expected %0d", ch, c, age, got, e));
      end
    end
    for (int k = 0; k < POST_CELLS; k++) begin
      int got = f.s[2 + PRE_CELLS + (k / PRE_CELLS) + k];   // skip two wait cycles, then one per section
      int e = hist[ch][(ts + 1 + k) % HD];
      chk(got == e, $sformatf("ch %0d post cell %0d = %0d expected %0d", ch, k, got, e));
    end
    f_ch.push_back(ch);
    f_ts.push_back(longint'(ts));
  endtask

  function automatic longint last_ts_of(int ch);
    longint r = -1;
    foreach (f_ch[k]) if (f_ch[k] == ch) r = f_ts[k];
    return r;
  endfunction

  task automatic wait_frames(input int n, input int max_cycles);
    int w = 0;
    while (frames.size() < n && w < max_cycles) begin
      @(posedge clk);
      w++;
    end
  endtask

  task automatic pulse_ch5();
    pulse_mv[5] = -700; repeat (60) @(negedge clk);
    // noisy tail: falls below the trigger threshold but not the re-arm one
    pulse_mv[5] = -400; repeat (20) @(negedge clk);
    pulse_mv[5] = -700; repeat (20) @(negedge clk);
    pulse_mv[5] = 0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [7:0] rd [];
    int nf;
    longint dts;
    frame_t f3;
    for (int i = 0; i < N_CH; i++) pulse_mv[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    ts_rst = 1; @(negedge clk); ts_rst = 0;
    chk(dut.ts_now == 0, "timestamp restarted by ts_rst");

    // configuration
    m.reg_write1(16'h0100 + 4 * 5, 8'h01);                 // input 5: leading edge
    m.reg_write1(16'h0100 + 4 * 2, 8'h10);                 // input 2: external trigger
    for (int i = 20; i <= 22; i++) m.reg_write1(16'h0100 + 16'(4 * i) + 1, 8'h01);
    for (int i = 30; i <= 40; i++) m.reg_write1(16'h0100 + 16'(4 * i) + 1, 8'h02);
    m.reg_write1(16'h0100 + 4 * 50 + 1, 8'h04);
    m.reg_read(16'h0100 + 4 * 31 + 1, rd, 1);
    chk(rd[0] == 8'h02 && m.ack_errors == 0, "configuration read back over I2C");
    chk(empty && !full && frames.size() == 0, "queue empty after configuration");

    // phase 1: fill the queue with the readout disabled
    pulse_ch5();
    repeat (200) @(negedge clk);
    ext_trig[2] = 1; repeat (10) @(negedge clk); ext_trig[2] = 0;
    repeat (300) @(negedge clk);
    gtrig[0] = 1; repeat (10) @(negedge clk); gtrig[0] = 0;
    repeat (300) @(negedge clk);
    gtrig[1] = 1; repeat (10) @(negedge clk); gtrig[1] = 0;
    repeat (300) @(negedge clk);
    chk(full && !empty, "queue full");
    chk(frames.size() == 0, "nothing sent while start is low");

    // phase 2: read out
    start = 1;
    wait_frames(8, 8 * 1300);
    chk(frames.size() == 8, $sformatf("%0d frames after phase 1", frames.size()));
    repeat (100) @(negedge clk);
    chk(empty && !full, "queue empty after readout");
    while (frames.size() > 0) check_frame(frames.pop_front(), -1);
    chk(f_ch.size() == 8, "8 frames decoded");
    if (f_ch.size() == 8) begin
      int exp_ch [8] = '{5, 2, 20, 21, 22, 30, 31, 32};
      for (int k = 0; k < 8; k++)
        chk(f_ch[k] == exp_ch[k], $sformatf("frame %0d from input %0d expected %0d", k, f_ch[k], exp_ch[k]));
      chk(f_ts[2] == f_ts[3] && f_ts[3] == f_ts[4], "simultaneous triggers share a timestamp");
      for (int k = 1; k < 8; k++) chk(f_ts[k] >= f_ts[k - 1], "frames in trigger order");
    end

    // phase 3: second leading-edge pulse, and a retrigger during capture
    pulse_ch5();
    repeat (300) @(negedge clk);
    gtrig[2] = 1; repeat (10) @(negedge clk); gtrig[2] = 0;
    repeat (180) @(negedge clk);
    gtrig[2] = 1; repeat (10) @(negedge clk); gtrig[2] = 0;
    wait_frames(3, 4 * 1300);
    chk(frames.size() == 3, $sformatf("%0d frames in phase 3", frames.size()));
    nf = 0;
    while (frames.size() > 0) begin
      f3 = frames.pop_front();
      check_frame(f3, last_ts_of(int'(f3.dig[63:57])));
      nf++;
    end
    if (f_ch.size() == 11) begin
      chk(f_ch[8] == 5 && f_ch[9] == 50 && f_ch[10] == 50, "phase 3 inputs");
      dts = f_ts[10] - f_ts[9];
    end else dts = 0;

    // status counters over I2C
    m.reg_read(16'h0004, rd, 8);
    chk({rd[3], rd[2], rd[1], rd[0]} == 32'(trig_req_cycles),
        $sformatf("trigger request counter %0d expected %0d", {rd[3], rd[2], rd[1], rd[0]}, trig_req_cycles));
    chk({rd[7], rd[6], rd[5], rd[4]} == 32'd8,
        $sformatf("lost pulse counter %0d expected 8", {rd[7], rd[6], rd[5], rd[4]}));

    // mechanisms
    $display("mechanisms: full=%0d cycles, lost=%0d, idle toggles=%0d, precharged cells=%0d, readout held=%0d cycles, retrigger gap=%0d cycles",
             full_cycles, {rd[7], rd[6], rd[5], rd[4]}, idle_toggles, precharged, gated_cycles, dts);
    chk(full_cycles > 0, "mechanism: queue full");
    chk(idle_toggles > 100, "mechanism: idle pattern");
    chk(precharged == 22, "mechanism: precharged pre-trigger cells");
    chk(gated_cycles > 0, "mechanism: readout held by start");
    chk(dts > 0 && dts < POST_CELLS, "mechanism: retrigger while the previous pulse is captured");
    chk(m.ack_errors == 0, "I2C acknowledges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
