// tb_input_stage: sweeps the input voltage with both references, the test
// input and several thresholds, and compares the amplifier output and the
// two comparator outputs with the inverting-amplifier equation.
module tb_input_stage;
  import trace_pkg::*;
  sample_t vin, test_in, sig;
  logic test_sel, vref_sel, cmp_hi, cmp_lo;
  logic [7:0] vref1, vref2, thr_hi, thr_lo;
  int checks = 0, failures = 0;

  input_stage dut (.vin, .test_in, .test_sel, .vref_sel, .vref1, .vref2, .thr_hi, .thr_lo,
                   .sig, .cmp_hi, .cmp_lo);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vr, vi, e, th, tl;
    vref1 = 8'h80; vref2 = 8'h90;        // 0 mV and +128 mV
    for (int it = 0; it < 500; it++) begin
      vin      = sample_t'(int'($urandom % 4001) - 2000);
      test_in  = sample_t'(int'($urandom % 2001) - 1000);
      test_sel = 1'($urandom);
      vref_sel = 1'($urandom);
      thr_hi   = 8'($urandom);
      thr_lo   = 8'($urandom);
      #1;
      vr = vref_sel ? 128 : 0;
      vi = test_sel ? int'(test_in) : int'(vin);
      e  = vr - (12 * (vi - vr)) / 13;
      if (e > 2047) e = 2047;
      if (e < -2048) e = -2048;
      th = (int'(thr_hi) - 128) * 8;
      tl = (int'(thr_lo) - 128) * 8;
      checks++;
      if (int'(sig) != e || cmp_hi != (e > th) || cmp_lo != (e > tl)) begin
        failures++;
        $display("FAIL vin=%0d sel=%0d ref=%0d: sig=%0d expected %0d", vi, test_sel, vr, sig, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
