// tb_sca_channel: writes a stream of samples through a walking one-hot
// select into an 8-cell SCA with two-cell precharge, and checks the read
// bus: the last written cell holds the newest sample, the two cells ahead
// of it read 0 V, the others hold the samples written before.
module tb_sca_channel;
  import trace_pkg::*;
  localparam int N = 8;
  logic clk = 0, wr_en = 0;
  logic [N-1:0] wr_sel = 0;
  sample_t din = 0, dout;
  logic [2:0] rd_addr = 0;
  int checks = 0, failures = 0;
  sample_t hist [64];

  sca_channel #(.N(N), .PRECHARGE(2)) dut (.clk, .wr_en, .wr_sel, .din, .rd_addr, .dout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last;
    for (int n = 0; n < 21; n++) begin
      @(negedge clk);
      wr_en  = 1;
      wr_sel = N'(1) << (n % N);
      din    = sample_t'(n * 37 - 300);
      hist[n] = din;
    end
    last = 20;
    @(negedge clk);
    wr_en = 0;
    din = 12'sd999;
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      int age;
      sample_t exp;
      rd_addr = 3'(c);
      #1;
      age = ((last % N) - c + N) % N;       // 0 = newest
      if (age >= N - 2) exp = '0;           // the two cells ahead: precharged
      else              exp = hist[last - age];
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL cell %0d: %0d expected %0d", c, dout, exp);
      end
    end
    // held while not writing
    repeat (3) @(negedge clk);
    rd_addr = 3'(last % N); #1;
    checks++;
    if (dout !== hist[last]) begin
      failures++;
      $display("FAIL hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
