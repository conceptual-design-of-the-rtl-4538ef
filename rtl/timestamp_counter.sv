// timestamp_counter: free-running pulse timestamp.
//
// Counts sampling-clock cycles (5 ns per count at 200 MHz) in a TS_W-bit
// register that wraps. ts_rst (the TS RST pin) clears it synchronously so
// that several ASICs can be aligned with a global timestamp. The count is
// latched by an output slot in the cycle its input channel triggers.
// The 36-bit width is the frame's timestamp field; counting at the sampling
// rate and the synchronous clear are this model's choices.
module timestamp_counter #(
  parameter int unsigned TS_W = trace_pkg::TS_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ts_rst,
  output logic [TS_W-1:0] ts
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ts <= '0;
    else if (ts_rst) ts <= '0;
    else             ts <= ts + 1'b1;
  end
endmodule
