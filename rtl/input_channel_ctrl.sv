// input_channel_ctrl: control of one pre-trigger SCA channel.
//
// SAMPLE: the channel writes one cell per sampling clock, the write pointer
//   (a regenerative one-hot ring) circling the PRE_CELLS cells, so that the
//   channel always holds the last PRE_CELLS samples.
// On trig the sample of that cycle is still written, then the channel is
// write-locked (locked high) and the position of that newest cell is kept as
// start_pos.
// COPY: on each read-clock tick (rd_tick, every RD_DIV sampling cycles) one
//   cell, in cell order 0..PRE_CELLS-1, is put on the read bus (rd_addr)
//   with copy_stb, to be stored in the slot's buffer through the switching
//   matrix.
// ID: then the input channel number and start_pos (CHID_W + POS_W = 12 bits,
//   MSB first) are sent serially, one bit per tick with id_stb.
// Then the channel unlocks and samples again, continuing after the frozen
// cell. At 50 MHz the transfer takes 44 ticks = 176 sampling cycles, within
// the 192 post-trigger samples, so the channel is free before its slot's
// capture ends and has no dead time.
// Copying in cell order (the reader rotates with start_pos), the copy rate
// and the serial word order are this model's choices.
module input_channel_ctrl
  import trace_pkg::*;
#(
  parameter int unsigned PRE_CELLS = trace_pkg::PRE_CELLS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [CHID_W-1:0]            ch_id,
  input  logic                         trig,
  input  logic                         rd_tick,
  output logic [PRE_CELLS-1:0]         wr_sel,
  output logic                         wr_en,
  output logic [$clog2(PRE_CELLS)-1:0] rd_addr,
  output logic                         locked,
  output logic                         copy_stb,
  output logic                         id_stb,
  output logic                         id_bit,
  output logic [POS_W-1:0]             start_pos
);
  typedef enum logic [1:0] {ST_SAMPLE, ST_COPY, ST_ID} state_t;
  localparam int unsigned AW = $clog2(PRE_CELLS);

  state_t                    state;
  logic [AW-1:0]             wr_idx;
  logic [AW-1:0]             cnt;
  logic [$clog2(IDPOS_W)-1:0] id_cnt;
  logic [IDPOS_W-1:0]        id_word;

  assign wr_en  = (state == ST_SAMPLE);
  assign locked = (state != ST_SAMPLE);

  onehot_ring #(.N(PRE_CELLS)) u_ptr (
    .clk, .rst_n, .clr(1'b0), .adv(wr_en), .ptr(wr_sel), .idx(wr_idx)
  );

  assign rd_addr  = cnt;
  assign copy_stb = (state == ST_COPY) && rd_tick;
  assign id_stb   = (state == ST_ID) && rd_tick;
  assign id_word  = {ch_id, start_pos};
  assign id_bit   = id_word[($clog2(IDPOS_W))'(IDPOS_W - 1) - id_cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_SAMPLE;
      cnt       <= '0;
      id_cnt    <= '0;
      start_pos <= '0;
    end else begin
      unique case (state)
        ST_SAMPLE: if (trig) begin
          state     <= ST_COPY;
          start_pos <= POS_W'(wr_idx);
          cnt       <= '0;
        end
        ST_COPY: if (rd_tick) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(PRE_CELLS - 1)) begin
            state  <= ST_ID;
            id_cnt <= '0;
          end
        end
        ST_ID: if (rd_tick) begin
          id_cnt <= id_cnt + 1'b1;
          if (id_cnt == ($clog2(IDPOS_W))'(IDPOS_W - 1)) state <= ST_SAMPLE;
        end
        default: state <= ST_SAMPLE;
      endcase
    end
  end
endmodule
