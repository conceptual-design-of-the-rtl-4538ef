// tb_timestamp_counter: checks that the timestamp counts one per clock,
// clears synchronously on ts_rst and wraps at its width (run at 8 bits).
module tb_timestamp_counter;
  logic clk = 0, rst_n = 0, ts_rst = 0;
  logic [7:0] ts;
  int checks = 0, failures = 0;

  timestamp_counter #(.TS_W(8)) dut (.clk, .rst_n, .ts_rst, .ts);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (ts !== exp) begin
      failures++;
      $display("FAIL %s: ts=%0d expected %0d", what, ts, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(8'd0, "reset");
    rst_n = 1;
    for (int n = 1; n <= 300; n++) begin
      @(posedge clk); #1;
      check(8'(n), "count/wrap");
    end
    ts_rst = 1;
    @(posedge clk); #1 check(8'd0, "ts_rst clears");
    @(posedge clk); #1 check(8'd0, "ts_rst holds");
    ts_rst = 0;
    repeat (5) @(posedge clk);
    #1 check(8'd5, "count after ts_rst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
