// onehot_ring: regenerative one-hot shift register selecting the active
// cell of an SCA channel.
//
// The single set bit moves one place per cycle while adv is high and wraps
// from the last cell to cell 0. clr puts it back on cell 0. If the ring
// ever holds no set bit or more than one (a disturbed full-custom register),
// the next cycle regenerates a clean one-hot value on cell 0, so the write
// pointer can never stall or write two cells at once. idx gives the same
// position in binary. Shift-register control with one-hot coding follows
// the source design; restarting at cell 0 on regeneration is this model's
// choice.
module onehot_ring #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 adv,
  output logic [N-1:0]         ptr,
  output logic [$clog2(N)-1:0] idx
);
  logic valid;

  always_comb begin
    valid = $onehot(ptr);
    idx   = '0;
    for (int unsigned k = 0; k < N; k++)
      if (ptr[k]) idx = k[$clog2(N)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ptr <= N'(1);
    else if (clr || !valid)  ptr <= N'(1);
    else if (adv)            ptr <= {ptr[N-2:0], ptr[N-1]};
  end
endmodule
