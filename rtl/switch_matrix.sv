// switch_matrix: behavioural model of the full-mesh analog switching matrix.
//
// BEHAVIOURAL MODEL. The real part is an N_CH x N_SLOTS array of analog
// crosspoint switches. Each input channel offers two analog buses (its live
// input signal, going on to the slot's post-trigger SCA, and its
// pre-trigger read bus, going on to the slot's storage buffer) and the
// digital copy / serial-ID strobes that travel with them. Closing
// crosspoint xpoint[j][i] connects channel i's buses to slot j. A slot with
// no closed crosspoint sees idle buses (0 V, strobes low). One channel may
// drive several slots; at most one channel is connected to a slot
// (checked by an assertion).
module switch_matrix
  import trace_pkg::*;
#(
  parameter int unsigned N_CH    = trace_pkg::N_CH,
  parameter int unsigned N_SLOTS = trace_pkg::N_SLOTS
) (
  input  logic [N_SLOTS-1:0][N_CH-1:0] xpoint,
  input  chan_bus_t                    ch_bus   [N_CH],
  output chan_bus_t                    slot_bus [N_SLOTS]
);
  always_comb begin
    for (int unsigned j = 0; j < N_SLOTS; j++) begin
      slot_bus[j] = '0;
      for (int unsigned i = 0; i < N_CH; i++)
        if (xpoint[j][i]) slot_bus[j] = slot_bus[j] | ch_bus[i];
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < N_SLOTS; j++)
      assert ($countones(xpoint[j]) <= 1)
        else $error("slot %0d connected to more than one input", j);
  end
endmodule
