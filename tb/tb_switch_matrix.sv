// tb_switch_matrix: random crosspoint settings (at most one input per
// slot, inputs shared between slots) and random bus contents; each slot
// bus must equal the connected input's bus, or be idle.
module tb_switch_matrix;
  import trace_pkg::*;
  localparam int NC = 16, NS = 4;
  logic [NS-1:0][NC-1:0] xpoint;
  chan_bus_t ch_bus [NC];
  chan_bus_t slot_bus [NS];
  int checks = 0, failures = 0;
  int sel [NS];

  switch_matrix #(.N_CH(NC), .N_SLOTS(NS)) dut (.xpoint, .ch_bus, .slot_bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < NC; i++) ch_bus[i] = chan_bus_t'({$urandom, $urandom});
      xpoint = '0;
      for (int j = 0; j < NS; j++) begin
        sel[j] = int'($urandom % (NC + 4)) - 4;     // negative: unconnected
        if (sel[j] >= 0) xpoint[j][sel[j]] = 1'b1;
      end
      #1;
      for (int j = 0; j < NS; j++) begin
        checks++;
        if (slot_bus[j] !== (sel[j] >= 0 ? ch_bus[sel[j]] : chan_bus_t'(0))) begin
          failures++;
          $display("FAIL slot %0d input %0d", j, sel[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
