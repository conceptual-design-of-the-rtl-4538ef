// tb_trigger_logic: drives comparator, external and global trigger inputs
// and counts trigger pulses: leading edge with 3-cycle latency, no
// retrigger until the low comparator re-arms, polarity inversion, the
// external and masked global triggers, and suppression while locked.
module tb_trigger_logic;
  logic clk = 0, rst_n = 0;
  logic le_en = 0, polarity = 0, ext_en = 0, cmp_hi = 0, cmp_lo = 0, ext_trig = 0, lock = 0;
  logic [3:0] gtrig_mask = 0, gtrig = 0;
  logic fire, trig;
  int checks = 0, failures = 0;
  int pulses = 0;
  int cyc = 0, last_trig_cyc = -1;

  trigger_logic dut (.clk, .rst_n, .le_en, .polarity, .ext_en, .gtrig_mask,
                     .cmp_hi, .cmp_lo, .ext_trig, .gtrig, .lock, .fire, .trig);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (trig) begin
      pulses++;
      last_trig_cyc = cyc;
    end
  end

  task automatic expect_pulses(input int n, input string what);
    checks++;
    if (pulses != n) begin
      failures++;
      $display("FAIL %s: %0d trigger pulses, expected %0d", what, pulses, n);
    end
    pulses = 0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    wait_cycles(2);
    rst_n = 1;
    wait_cycles(2);
    pulses = 0;
    // leading edge disabled: nothing
    cmp_lo = 1; cmp_hi = 1; wait_cycles(10);
    cmp_hi = 0; cmp_lo = 0; wait_cycles(10);
    expect_pulses(0, "leading edge disabled");

    le_en = 1; wait_cycles(5);
    // a pulse crossing both thresholds
    cmp_lo = 1; wait_cycles(3);
    t0 = cyc;
    cmp_hi = 1; wait_cycles(10);
    checks++;
    // trig is high after the 3rd rising edge and seen by the counter at the 4th
    if (last_trig_cyc - t0 != 4) begin
      failures++;
      $display("FAIL latency: %0d cycles", last_trig_cyc - t0);
    end
    expect_pulses(1, "leading edge");
    // noisy falling edge: hi toggles while lo stays set -> no retrigger
    repeat (4) begin
      cmp_hi = 0; wait_cycles(4);
      cmp_hi = 1; wait_cycles(4);
    end
    expect_pulses(0, "hysteresis holds");
    cmp_hi = 0; wait_cycles(4);
    cmp_lo = 0; wait_cycles(4);
    cmp_lo = 1; cmp_hi = 1; wait_cycles(6);
    expect_pulses(1, "re-armed after low threshold");
    cmp_hi = 0; cmp_lo = 0; wait_cycles(6);
    expect_pulses(0, "falling edge is not a trigger");

    // negative polarity: comparators inverted, the baseline reads 1,1
    polarity = 1; cmp_hi = 1; cmp_lo = 1; wait_cycles(8);
    pulses = 0;
    cmp_lo = 0; wait_cycles(2); cmp_hi = 0; wait_cycles(6);
    expect_pulses(1, "negative polarity");
    cmp_hi = 1; cmp_lo = 1; wait_cycles(6);
    polarity = 0; cmp_hi = 0; cmp_lo = 0; le_en = 0; wait_cycles(6);
    pulses = 0;

    // external trigger
    ext_trig = 1; wait_cycles(6); ext_trig = 0; wait_cycles(6);
    expect_pulses(0, "external trigger disabled");
    ext_en = 1;
    ext_trig = 1; wait_cycles(20); ext_trig = 0; wait_cycles(6);
    expect_pulses(1, "external trigger edge");

    // global triggers with mask 0b0100
    gtrig_mask = 4'b0100;
    gtrig = 4'b1011; wait_cycles(6); gtrig = 0; wait_cycles(6);
    expect_pulses(0, "unmasked global triggers ignored");
    gtrig = 4'b0100; wait_cycles(6); gtrig = 0; wait_cycles(6);
    expect_pulses(1, "masked global trigger");

    // lock suppresses
    lock = 1;
    gtrig = 4'b0100; wait_cycles(6); gtrig = 0; wait_cycles(6);
    ext_trig = 1; wait_cycles(6); ext_trig = 0; wait_cycles(6);
    expect_pulses(0, "locked");
    checks++;
    lock = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
