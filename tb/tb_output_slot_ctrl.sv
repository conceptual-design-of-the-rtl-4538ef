// tb_output_slot_ctrl: starts a slot, feeds it copy strobes (every 4
// clocks) and a serial ID word as an input channel would, and checks the
// post-trigger write select (one cell per clock, cells 0..191 in order),
// the buffer writes, the latched timestamp, channel and position, and that
// cap_done comes exactly 192 cycles after start with the copy complete.
module tb_output_slot_ctrl;
  import trace_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, copy_stb = 0, id_stb = 0, id_bit = 0;
  logic [TS_W-1:0] ts_now = 36'h9_8765_4321;
  logic post_wr_en, buf_wr_en, capturing, cap_done, copy_ok;
  logic [191:0] post_wr_sel;
  logic [31:0] buf_wr_sel;
  logic [TS_W-1:0] ts;
  logic [CHID_W-1:0] ch_id;
  logic [POS_W-1:0] pos;
  int checks = 0, failures = 0;
  int cyc = 0, start_cyc = 0, done_cyc = 0, post_writes = 0, buf_writes = 0;
  logic [11:0] word = {7'd99, 5'd21};

  output_slot_ctrl dut (.clk, .rst_n, .start, .ts_now, .copy_stb, .id_stb, .id_bit,
    .post_wr_en, .post_wr_sel, .buf_wr_en, .buf_wr_sel, .capturing, .cap_done,
    .copy_ok, .ts, .ch_id, .pos);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && post_wr_en) begin
      checks++;
      if (post_wr_sel !== (192'(1) << post_writes)) begin
        failures++;
        $display("FAIL post write %0d", post_writes);
      end
      post_writes++;
    end
    if (rst_n && buf_wr_en) begin
      checks++;
      if (buf_wr_sel !== (32'(1) << buf_writes)) begin
        failures++;
        $display("FAIL buffer write %0d", buf_writes);
      end
      buf_writes++;
    end
    if (rst_n && cap_done) done_cyc = cyc;
    ts_now <= ts_now + 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TS_W-1:0] ts_at_start;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    start = 1; ts_at_start = ts_now; start_cyc = cyc + 1;
    @(negedge clk); start = 0;
    // 32 copy strobes then 12 ID bits, one per 4 clocks
    for (int k = 0; k < 44; k++) begin
      repeat (3) @(negedge clk);
      copy_stb = (k < 32);
      id_stb   = (k >= 32);
      id_bit   = (k >= 32) ? word[11 - (k - 32)] : 1'b0;
      @(negedge clk);
      copy_stb = 0; id_stb = 0;
    end
    // extra strobes must be ignored
    copy_stb = 1; id_stb = 1; @(negedge clk); copy_stb = 0; id_stb = 0;
    wait (cap_done);
    @(posedge clk);
    @(negedge clk);
    // start seen at edge start_cyc; 192 writes at the next 192 edges; cap_done
    // is high after the last of them and seen at the edge after that
    chk(done_cyc - start_cyc == 193, $sformatf("capture %0d cycles", done_cyc - start_cyc));
    chk(post_writes == 192, $sformatf("%0d post-trigger writes", post_writes));
    chk(buf_writes == 32, $sformatf("%0d buffer writes", buf_writes));
    chk(ts == ts_at_start, "timestamp latched at start");
    chk(ch_id == 7'd99 && pos == 5'd21, $sformatf("ID %0d pos %0d", ch_id, pos));
    chk(copy_ok && !capturing, "copy complete, capture ended");
    repeat (5) @(negedge clk);
    chk(post_writes == 192 && ts == ts_at_start, "slot holds its data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
