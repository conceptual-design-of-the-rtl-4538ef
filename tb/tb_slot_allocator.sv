// tb_slot_allocator: 8 inputs, 4 slots. Checks the chained assignment of
// free slots to simultaneous triggers in input order, the crosspoints,
// FIFO order of completion and release, EMPTY / FULL, and that triggers
// arriving on a full queue are counted as lost.
module tb_slot_allocator;
  localparam int NC = 8, NS = 4;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] trig = 0, grant;
  logic [NS-1:0] cap_done = 0, slot_start;
  logic rd_release = 0;
  logic [NS-1:0][NC-1:0] xpoint;
  logic [2:0] slot_chan [NS];
  logic [1:0] head;
  logic head_ready, empty, full;
  logic [3:0] lost_n;
  int checks = 0, failures = 0;

  slot_allocator #(.N_CH(NC), .N_SLOTS(NS)) dut (
    .clk, .rst_n, .trig, .cap_done, .rd_release, .grant, .slot_start, .xpoint,
    .slot_chan, .head, .head_ready, .lost_n, .empty, .full);

  always #5 clk = ~clk;

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
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && !head_ready, "empty after reset");
    // inputs 2 and 5 at once: slots 0 and 1
    trig = 8'b0010_0100; #1;
    chk(slot_start == 4'b0011 && grant == 8'b0010_0100 && lost_n == 0, "two simultaneous triggers");
    @(negedge clk); trig = 0;
    chk(xpoint[0] == 8'b0000_0100 && xpoint[1] == 8'b0010_0000 && xpoint[2] == 0, "crosspoints closed");
    chk(slot_chan[0] == 3'd2 && slot_chan[1] == 3'd5, "slot channels");
    // inputs 0, 1, 7 at once: slots 2, 3 taken, input 7 lost
    trig = 8'b1000_0011; #1;
    chk(slot_start == 4'b1100 && grant == 8'b0000_0011 && lost_n == 1, "queue fills, one lost");
    @(negedge clk); trig = 0;
    chk(full && !empty, "full");
    trig = 8'b0001_0000; #1;
    chk(slot_start == 0 && grant == 0 && lost_n == 1, "trigger on full queue lost");
    @(negedge clk); trig = 0;
    // slot 1 completes first: head (slot 0) not ready yet
    cap_done = 4'b0010; @(negedge clk); cap_done = 0;
    chk(!head_ready && xpoint[1] == 0 && xpoint[0] != 0, "slot 1 done, head still capturing");
    cap_done = 4'b0001; @(negedge clk); cap_done = 0;
    chk(head_ready && head == 0, "head ready");
    rd_release = 1; @(negedge clk); rd_release = 0;
    chk(head == 1 && head_ready && !full, "released slot 0, slot 1 next");
    // new trigger takes slot 0 (circular)
    trig = 8'b0100_0000; #1;
    chk(slot_start == 4'b0001, "circular allocation reuses slot 0");
    @(negedge clk); trig = 0;
    chk(slot_chan[0] == 3'd6 && full, "slot 0 now input 6, full again");
    cap_done = 4'b1101; @(negedge clk); cap_done = 0;
    for (int k = 0; k < 4; k++) begin
      chk(head_ready && head == 2'((1 + k) % 4), $sformatf("FIFO order %0d", k));
      rd_release = 1; @(negedge clk); rd_release = 0;
    end
    chk(empty && !head_ready, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
