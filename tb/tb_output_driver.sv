// tb_output_driver: checks the differential levels for digital ones and
// zeros, analog samples and wait cycles.
module tb_output_driver;
  import trace_pkg::*;
  sym_kind_t sym_kind;
  logic sym_bit;
  sample_t sym_sample;
  logic signed [12:0] out_p, out_n;
  int checks = 0, failures = 0;

  output_driver dut (.sym_kind, .sym_bit, .sym_sample, .out_p, .out_n);

  task automatic chk(input int e, input string what);
    #1;
    checks++;
    if (int'(out_p) != e || int'(out_n) != -e) begin
      failures++;
      $display("FAIL %s: %0d/%0d expected %0d", what, out_p, out_n, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_sample = 12'sd321;
    sym_kind = SYM_IDLE;    sym_bit = 1; chk(1600, "idle one");
    sym_bit = 0;                         chk(-1600, "idle zero");
    sym_kind = SYM_DIGITAL; sym_bit = 1; chk(1600, "digital one");
    sym_bit = 0;                         chk(-1600, "digital zero");
    sym_kind = SYM_WAIT;                 chk(0, "wait");
    sym_kind = SYM_SAMPLE;
    for (int v = -1200; v <= 1200; v += 100) begin
      sym_sample = sample_t'(v);
      chk(v, "sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
