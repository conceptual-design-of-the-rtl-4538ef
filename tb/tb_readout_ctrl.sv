// tb_readout_ctrl: runs the frame sequencer with a read tick every 4
// clocks and a synthetic slot whose cell voltages are a known function of
// (buffer/post, address). Checks the idle 0/1 alternation, that no frame
// starts while start is low, the header, the 64 digital bits (fields and a
// reference SEC-DED code), the wait cycle before each 32-sample section,
// every sample in order, the frame length of 299 ticks, the single
// release pulse, and a second frame from the next slot.
module tb_readout_ctrl;
  import trace_pkg::*;
  logic clk = 0, rst_n = 0, rd_tick, start = 0, head_ready = 0;
  logic [1:0] div = 0;
  logic [2:0] head_slot = 3'd5;
  logic [CHID_W-1:0] head_ch_id = 7'd63;
  logic [POS_W-1:0] head_pos = 5'd17;
  logic [TS_W-1:0] head_ts = 36'hA_BCDE_F012;
  sample_t sample_in;
  logic rd_post, release_slot, busy, sym_bit;
  logic [7:0] rd_addr;
  sym_kind_t sym_kind;
  sample_t sym_sample;
  int checks = 0, failures = 0;
  int releases = 0, tick_n = 0;
  logic tick_d = 0;

  // symbol log
  sym_kind_t k_log [4096];
  logic      b_log [4096];
  sample_t   s_log [4096];

  readout_ctrl dut (.clk, .rst_n, .rd_tick, .start, .head_ready, .head_slot, .head_ch_id,
    .head_pos, .head_ts, .sample_in, .rd_post, .rd_addr, .release_slot, .busy,
    .sym_kind, .sym_bit, .sym_sample);

  function automatic sample_t cellv(logic post, int addr, int slot);
    return post ? sample_t'(1000 - addr * 9 + slot) : sample_t'(-700 + addr * 13 + slot);
  endfunction

  assign rd_tick   = (div == 2'd3);
  assign sample_in = cellv(rd_post, int'(rd_addr), int'(head_slot));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    div <= div + 1'b1;
    tick_d <= rd_tick;
    if (rst_n && release_slot) releases++;
    if (rst_n && tick_d) begin
      k_log[tick_n] = sym_kind;
      b_log[tick_n] = sym_bit;
      s_log[tick_n] = sym_sample;
      tick_n++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // reference SEC-DED: check bit k = XOR of data at positions with bit k set
  function automatic logic [6:0] ref_ecc(logic [56:0] d);
    logic [5:0] p = '0;
    logic all = 1'b0;
    int i = 0;
    for (int q = 3; q < 64; q++) begin
      if ((q & (q - 1)) != 0) begin
        for (int k = 0; k < 6; k++) if ((q >> k) & 1) p[k] ^= d[i];
        all ^= d[i];
        i++;
      end
    end
    return {all ^ (^p), p};
  endfunction

  task automatic check_frame(input int f0, input int slot);
    logic [56:0] d;
    logic [63:0] dig;
    int t;
    d = {head_ch_id, head_pos, 4'(slot), head_ts, 5'b0};
    for (int i = 0; i < 4; i++)
      chk(k_log[f0 + i] == SYM_DIGITAL && b_log[f0 + i] == FRAME_HEADER[3 - i], "header bit");
    for (int i = 0; i < 64; i++) dig[63 - i] = b_log[f0 + 4 + i];
    chk(dig == {d, ref_ecc(d)}, $sformatf("digital word %h expected %h", dig, {d, ref_ecc(d)}));
    t = f0 + 68;
    for (int sec = 0; sec < 7; sec++) begin
      chk(k_log[t] == SYM_WAIT, $sformatf("wait before section %0d", sec));
      t++;
      for (int c = 0; c < 32; c++) begin
        sample_t e = sec == 0 ? cellv(0, c, slot) : cellv(1, (sec - 1) * 32 + c, slot);
        chk(k_log[t] == SYM_SAMPLE && s_log[t] == e,
            $sformatf("section %0d sample %0d = %0d expected %0d", sec, c, s_log[t], e));
        t++;
      end
    end
    chk(t - f0 == 299, "frame length 299 read cycles");
    chk(k_log[t] == SYM_IDLE, "idle after frame");
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f0, f1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    head_ready = 1;                       // data waiting, readout not enabled
    wait (tick_n == 40);
    for (int i = 1; i < 40; i++)
      chk(k_log[i] == SYM_IDLE && b_log[i] != b_log[i - 1], "idle alternates");
    chk(!busy && releases == 0, "no frame while start is low");
    start = 1;
    wait (releases == 1);
    @(negedge clk);
    head_slot = 3'd6; head_ts = 36'h1; head_pos = 5'd0; head_ch_id = 7'd1;
    wait (releases == 2);
    start = 0;
    wait (tick_n == 40 + 2 * 299 + 20);
    f0 = -1; f1 = -1;
    for (int i = 0; i < tick_n; i++) begin
      if (k_log[i] == SYM_DIGITAL && (i == 0 || k_log[i - 1] != SYM_DIGITAL)) begin
        if (f0 < 0) f0 = i; else if (f1 < 0) f1 = i;
      end
    end
    chk(f0 > 0 && f1 > f0, "two frames found");
    if (f0 > 0) begin
      head_slot = 3'd5; head_ch_id = 7'd63; head_pos = 5'd17; head_ts = 36'hA_BCDE_F012;
      check_frame(f0, 5);
    end
    if (f1 > 0) begin
      head_slot = 3'd6; head_ts = 36'h1; head_pos = 5'd0; head_ch_id = 7'd1;
      check_frame(f1, 6);
    end
    chk(releases == 2, "one release per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
