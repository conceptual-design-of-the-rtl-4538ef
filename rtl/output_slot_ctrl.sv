// output_slot_ctrl: control and digital registers of one output queue slot.
//
// On start (the cycle its input channel triggers) the slot latches the
// current timestamp and begins capture: from the next cycle on, its
// POST_CELLS-cell SCA is written one cell per sampling clock, in cell order,
// from the input signal arriving through the switching matrix. In parallel,
// every copy_stb on the matrix bus stores the pre-trigger sample on the bus
// into the next cell of the PRE_CELLS-cell storage buffer, and every id_stb
// shifts one bit of the serial input-channel / start-position word into
// the ID + pos register. After the last post-trigger cell cap_done pulses
// for one cycle and the slot holds its data (buffer, samples, ch_id, pos,
// ts) until it is started again. copy_ok tells whether the whole buffer and
// ID word arrived before capture ended; an assertion checks it.
// Sequencing of the post-trigger capture and the registers follow the
// source design; the strobe protocol is this model's choice.
module output_slot_ctrl
  import trace_pkg::*;
#(
  parameter int unsigned PRE_CELLS  = trace_pkg::PRE_CELLS,
  parameter int unsigned POST_CELLS = trace_pkg::POST_CELLS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [TS_W-1:0]               ts_now,
  input  logic                          copy_stb,
  input  logic                          id_stb,
  input  logic                          id_bit,
  output logic                          post_wr_en,
  output logic [POST_CELLS-1:0]         post_wr_sel,
  output logic                          buf_wr_en,
  output logic [PRE_CELLS-1:0]          buf_wr_sel,
  output logic                          capturing,
  output logic                          cap_done,
  output logic                          copy_ok,
  output logic [TS_W-1:0]               ts,
  output logic [CHID_W-1:0]             ch_id,
  output logic [POS_W-1:0]              pos
);
  localparam int unsigned PW = $clog2(POST_CELLS);
  localparam int unsigned BW = $clog2(PRE_CELLS + 1);
  localparam int unsigned IW = $clog2(IDPOS_W + 1);

  logic [PW-1:0]  post_idx;
  logic [BW-1:0]  buf_cnt;
  logic [IW-1:0]  id_cnt;
  logic           buf_full, id_full;

  assign buf_full   = (buf_cnt == BW'(PRE_CELLS));
  assign id_full    = (id_cnt == IW'(IDPOS_W));
  assign post_wr_en = capturing;
  assign buf_wr_en  = capturing && copy_stb && !buf_full;
  assign copy_ok    = buf_full && id_full;

  onehot_ring #(.N(POST_CELLS)) u_post (
    .clk, .rst_n, .clr(start), .adv(post_wr_en), .ptr(post_wr_sel), .idx(post_idx)
  );
  onehot_ring #(.N(PRE_CELLS)) u_buf (
    .clk, .rst_n, .clr(start), .adv(buf_wr_en), .ptr(buf_wr_sel), .idx()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      capturing <= 1'b0;
      cap_done  <= 1'b0;
      buf_cnt   <= '0;
      id_cnt    <= '0;
      ts        <= '0;
      ch_id     <= '0;
      pos       <= '0;
    end else begin
      cap_done <= 1'b0;
      if (start) begin
        capturing <= 1'b1;
        ts        <= ts_now;
        buf_cnt   <= '0;
        id_cnt    <= '0;
      end else if (capturing) begin
        if (buf_wr_en) buf_cnt <= buf_cnt + 1'b1;
        if (id_stb && buf_full && !id_full) begin
          {ch_id, pos} <= {ch_id[CHID_W-2:0], pos, id_bit};
          id_cnt       <= id_cnt + 1'b1;
        end
        if (post_idx == PW'(POST_CELLS - 1)) begin
          capturing <= 1'b0;
          cap_done  <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && cap_done)
      assert (copy_ok) else $error("pre-trigger copy not finished when capture ended");
  end
endmodule
