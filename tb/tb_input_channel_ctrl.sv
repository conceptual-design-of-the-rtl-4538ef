// tb_input_channel_ctrl: runs one pre-trigger channel with a 50 MHz read
// tick (every 4 clocks). Checks continuous sampling, the start position
// latched at the trigger, the copy of all 32 cells in cell order, the
// serial channel-ID + position word, the lock time of 44 ticks, and that
// sampling resumes on the cell after the frozen one.
module tb_input_channel_ctrl;
  import trace_pkg::*;
  logic clk = 0, rst_n = 0, trig = 0, rd_tick;
  logic [1:0] div = 0;
  logic [CHID_W-1:0] ch_id = 7'd45;
  logic [31:0] wr_sel;
  logic wr_en, locked, copy_stb, id_stb, id_bit;
  logic [4:0] rd_addr, start_pos;
  int checks = 0, failures = 0;
  int copies = 0, ids = 0, lock_cycles = 0, lock_start = 0, lock_end = 0;
  logic [11:0] id_rx = 0;
  int cyc = 0;

  input_channel_ctrl dut (.clk, .rst_n, .ch_id, .trig, .rd_tick, .wr_sel, .wr_en,
                          .rd_addr, .locked, .copy_stb, .id_stb, .id_bit, .start_pos);

  always #5 clk = ~clk;
  assign rd_tick = (div == 2'd3);
  always @(posedge clk) begin
    div <= div + 1'b1;
    cyc++;
    if (locked) lock_cycles++;
    if (copy_stb) begin
      checks++;
      if (rd_addr != 5'(copies)) begin
        failures++;
        $display("FAIL copy %0d read cell %0d", copies, rd_addr);
      end
      copies++;
    end
    if (id_stb) begin
      id_rx = {id_rx[10:0], id_bit};
      ids++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sel_at_trig;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // sampling: pointer walks one cell per clock
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      chk(wr_en && wr_sel == (32'(1) << ((n + 1) % 32)), "sampling walk");
    end
    // trigger in the cycle cell 8 is written
    sel_at_trig = wr_sel;
    trig = 1;
    @(negedge clk);
    trig = 0;
    chk(locked && !wr_en, "locked after trigger");
    chk(start_pos == 5'(8), $sformatf("start position %0d", start_pos));
    wait (!locked);
    @(negedge clk);
    chk(copies == 32, $sformatf("%0d cells copied", copies));
    chk(ids == 12, $sformatf("%0d ID bits", ids));
    chk(id_rx == {7'd45, 5'd8}, $sformatf("ID word %h", id_rx));
    chk(lock_cycles >= 44 * 4 - 3 && lock_cycles <= 44 * 4 + 1,
        $sformatf("locked %0d cycles, expected 44 read ticks", lock_cycles));
    chk(lock_cycles < 192, "copy ends before the post-trigger capture");
    chk(wr_en && wr_sel == (32'(1) << 9), "sampling resumes after the frozen cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
