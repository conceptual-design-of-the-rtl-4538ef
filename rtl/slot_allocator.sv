// slot_allocator: control of the switching matrix and of the output queue.
//
// The N_SLOTS output slots form a FIFO queue. Each slot is FREE, CAPTURE
// (connected to an input channel through the matrix, recording its pulse)
// or READY (pulse complete, waiting to be read out). Free slots are handed
// out in circular order from wr_ptr and read out in the same order from
// rd_ptr, so events leave in the order they were triggered.
//
// In a cycle with triggers, the free-slot flag is passed along the input
// channels from channel 0 upward: the k-th triggered channel takes slot
// (wr_ptr + k) if fewer than N_SLOTS slots would then be in use; any further
// trigger of that cycle finds the queue full and is counted in lost_n
// (a lost pulse). grant tells each triggered channel whether it got a slot. A slot taken in cycle t shows slot_start in cycle t,
// and its crosspoint (xpoint[slot][channel]) is closed from cycle t+1 until
// the slot reports cap_done. rd_release frees the head slot.
// empty: no slot in use; full: every slot in use (all inputs then locked).
// The FIFO behaviour, the chained allocation and the lost-pulse detection
// follow the source design; the channel priority order and flag timing are
// this model's choices.
module slot_allocator #(
  parameter int unsigned N_CH    = trace_pkg::N_CH,
  parameter int unsigned N_SLOTS = trace_pkg::N_SLOTS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            trig,
  input  logic [N_SLOTS-1:0]         cap_done,
  input  logic                       rd_release,
  output logic [N_CH-1:0]            grant,
  output logic [N_SLOTS-1:0]         slot_start,
  output logic [N_SLOTS-1:0][N_CH-1:0] xpoint,
  output logic [$clog2(N_CH)-1:0]    slot_chan [N_SLOTS],
  output logic [$clog2(N_SLOTS)-1:0] head,
  output logic                       head_ready,
  output logic [$clog2(N_CH+1)-1:0]  lost_n,
  output logic                       empty,
  output logic                       full
);
  localparam int unsigned SW = $clog2(N_SLOTS);
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned NW = $clog2(N_SLOTS + 1);

  typedef enum logic [1:0] {S_FREE, S_CAPTURE, S_READY} slot_state_t;

  slot_state_t        st [N_SLOTS];
  logic [SW-1:0]      wr_ptr;
  logic [NW-1:0]      used;
  logic [NW-1:0]      taken;
  logic [CW-1:0]      new_chan [N_SLOTS];

  // Free-slot propagation through the triggered channels
  always_comb begin
    logic [SW-1:0] s;
    logic [NW:0]   in_use;
    s          = '0;
    in_use     = '0;
    slot_start = '0;
    grant      = '0;
    taken      = '0;
    lost_n     = '0;
    for (int unsigned j = 0; j < N_SLOTS; j++) new_chan[j] = '0;
    for (int unsigned i = 0; i < N_CH; i++) begin
      if (trig[i]) begin
        in_use = (NW+1)'(used) + (NW+1)'(taken);
        if (in_use < (NW+1)'(N_SLOTS)) begin
          s = SW'((NW+1)'(wr_ptr) + (NW+1)'(taken));
          slot_start[s] = 1'b1;
          new_chan[s]   = CW'(i);
          grant[i]      = 1'b1;
          taken         = taken + 1'b1;
        end else begin
          lost_n = lost_n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      head   <= '0;
      used   <= '0;
      for (int unsigned j = 0; j < N_SLOTS; j++) begin
        st[j]        <= S_FREE;
        slot_chan[j] <= '0;
      end
    end else begin
      wr_ptr <= SW'(wr_ptr + SW'(taken));
      used   <= used + taken - NW'(rd_release && head_ready);
      if (rd_release && head_ready) head <= head + 1'b1;
      for (int unsigned j = 0; j < N_SLOTS; j++) begin
        if (slot_start[j]) begin
          st[j]        <= S_CAPTURE;
          slot_chan[j] <= new_chan[j];
        end else if (st[j] == S_CAPTURE && cap_done[j]) begin
          st[j] <= S_READY;
        end else if (rd_release && head_ready && SW'(j) == head) begin
          st[j] <= S_FREE;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < N_SLOTS; j++)
      for (int unsigned i = 0; i < N_CH; i++)
        xpoint[j][i] = (st[j] == S_CAPTURE) && (slot_chan[j] == CW'(i));
  end

  assign head_ready = (st[head] == S_READY);
  assign empty      = (used == '0);
  assign full       = (used == NW'(N_SLOTS));

  // A slot is only handed out when it is free.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int unsigned j = 0; j < N_SLOTS; j++)
        assert (!(slot_start[j] && st[j] != S_FREE))
          else $error("slot %0d allocated while in use", j);
  end
endmodule
