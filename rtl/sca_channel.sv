// sca_channel: behavioural model of one switched capacitor array channel.
//
// BEHAVIOURAL MODEL. The real part is a row of N storage capacitors
// (270 fF) with write and read switches; here each cell holds the sampled
// voltage as a signed code. In a cycle with wr_en high the cell selected by
// the one-hot wr_sel takes din (the tracked input voltage). The cells
// ahead of a write are precharged before they are written: with
// PRECHARGE > 0 the PRECHARGE cells following the written one (wrapping
// round) are cleared to 0 V in the same cycle, which is why the two cells
// ahead of the newest sample of a frozen pre-trigger channel hold no data.
// Reading is a switch onto the read bus: dout shows cell rd_addr at once.
// Precharging two cells (one per interleaved odd/even half) and the 0 V
// precharge level are this model's reading of the source design.
module sca_channel
  import trace_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned PRECHARGE = 0
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [N-1:0]         wr_sel,
  input  sample_t              din,
  input  logic [$clog2(N)-1:0] rd_addr,
  output sample_t              dout
);
  sample_t mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int unsigned k = 0; k < N; k++) begin
        for (int unsigned p = 1; p <= PRECHARGE; p++)
          if (wr_sel[(k + N - p) % N]) mem[k] <= '0;
        if (wr_sel[k]) mem[k] <= din;
      end
    end
  end

  assign dout = mem[rd_addr];
endmodule
