// tb_onehot_ring: checks the one-hot pointer walks and wraps, holds without
// adv, returns to cell 0 on clr, and regenerates a clean one-hot value
// after being disturbed into an invalid state.
module tb_onehot_ring;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, clr = 0, adv = 0;
  logic [N-1:0] ptr;
  logic [2:0]   idx;
  int checks = 0, failures = 0;
  int expected;

  onehot_ring #(.N(N)) dut (.clk, .rst_n, .clr, .adv, .ptr, .idx);

  always #5 clk = ~clk;

  task automatic check(input int pos, input string what);
    checks++;
    if (ptr !== (N'(1) << pos) || idx !== 3'(pos)) begin
      failures++;
      $display("FAIL %s: ptr=%b idx=%0d expected position %0d", what, ptr, idx, pos);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 check(0, "reset");
    rst_n = 1;
    adv = 1;
    expected = 0;
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1;
      expected = (expected + 1) % N;
      check(expected, "walk");
    end
    adv = 0;
    repeat (3) @(posedge clk);
    #1 check(expected, "hold");
    clr = 1;
    @(posedge clk); #1 check(0, "clr");
    clr = 0; adv = 1;
    repeat (3) @(posedge clk);
    #1 check(3, "walk after clr");
    // disturb the register: two bits set
    force dut.ptr = 8'b0010_0100;
    @(posedge clk); #1;
    release dut.ptr;
    @(posedge clk); #1 check(0, "regenerate from two bits");
    force dut.ptr = 8'b0000_0000;
    @(posedge clk); #1;
    release dut.ptr;
    @(posedge clk); #1 check(0, "regenerate from zero");
    @(posedge clk); #1 check(1, "walk after regenerate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
