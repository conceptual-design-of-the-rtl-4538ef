// readout_ctrl: event frame sequencer of the readout interface.
//
// Works on read-clock ticks (rd_tick, one per 50 MHz read-clock cycle) and
// puts out one symbol per tick, registered (sym_kind / sym_bit / sym_sample):
//   idle     an alternating 0,1,0,1 pattern (a 25 MHz square wave) that the
//            receiver uses to place its ADC sampling point;
//   header   FRAME_HEADER, 4 bits;
//   digital  64 bits, MSB first: input channel (7), start position (5),
//            output slot (4), timestamp (36), reserved zeros (5), SEC-DED
//            code (7);
//   samples  (PRE_CELLS + POST_CELLS) / PRE_CELLS sections, each a wait
//            cycle followed by PRE_CELLS analog samples: first the storage
//            buffer (pre-trigger samples, in cell order), then the
//            post-trigger SCA in cell order.
// A frame starts at the tick after one where start is high and the head
// slot of the queue is READY; the frame's digital fields are latched then.
// rd_post / rd_addr select the cell whose voltage is expected on sample_in
// (combinationally) at each sample tick. release pulses, in a tick cycle,
// with the last sample, freeing the slot. With the default sizes a frame
// takes 4 + 64 + 7 * (1 + 32) = 299 ticks, 5.98 us at 50 MHz.
// Field order and widths, idle pattern, wait cycles and frame length follow
// the source design; the header value, the MSB-first order and the level
// of start as a readout enable are this model's choices.
module readout_ctrl
  import trace_pkg::*;
#(
  parameter int unsigned N_SLOTS    = trace_pkg::N_SLOTS,
  parameter int unsigned PRE_CELLS  = trace_pkg::PRE_CELLS,
  parameter int unsigned POST_CELLS = trace_pkg::POST_CELLS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          rd_tick,
  input  logic                          start,
  input  logic                          head_ready,
  input  logic [$clog2(N_SLOTS)-1:0]    head_slot,
  input  logic [CHID_W-1:0]             head_ch_id,
  input  logic [POS_W-1:0]              head_pos,
  input  logic [TS_W-1:0]               head_ts,
  input  sample_t                       sample_in,
  output logic                          rd_post,
  output logic [$clog2(POST_CELLS)-1:0] rd_addr,
  output logic                          release_slot,
  output logic                          busy,
  output sym_kind_t                     sym_kind,
  output logic                          sym_bit,
  output sample_t                       sym_sample
);
  localparam int unsigned NSEC = (PRE_CELLS + POST_CELLS) / PRE_CELLS;
  localparam int unsigned CW   = $clog2(PRE_CELLS);
  localparam int unsigned SECW = $clog2(NSEC);
  localparam int unsigned AW   = $clog2(POST_CELLS);

  typedef enum logic [2:0] {P_IDLE, P_HDR, P_DIG, P_WAIT, P_SAMP} phase_t;

  phase_t            phase;
  logic [5:0]        bcnt;
  logic [SECW-1:0]   sec;
  logic [CW-1:0]     cell_q;
  logic              idle_bit;
  logic [DIG_W-1:0]  word;
  logic [DATA_W-1:0] head_data;
  logic [ECC_W-1:0]  head_ecc;

  assign head_data = {head_ch_id, head_pos, SLOTID_W'(head_slot), head_ts, RSV_W'(0)};

  hamming_secded_enc u_ecc (.data(head_data), .ecc(head_ecc));

  assign busy         = (phase != P_IDLE);
  assign rd_post      = (sec != '0);
  assign rd_addr      = rd_post ? AW'((32'(sec) - 1) * PRE_CELLS + 32'(cell_q)) : AW'(cell_q);
  assign release_slot = rd_tick && phase == P_SAMP && cell_q == CW'(PRE_CELLS - 1)
                        && sec == SECW'(NSEC - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= P_IDLE;
      bcnt       <= '0;
      sec        <= '0;
      cell_q       <= '0;
      idle_bit   <= 1'b0;
      word       <= '0;
      sym_kind   <= SYM_IDLE;
      sym_bit    <= 1'b0;
      sym_sample <= '0;
    end else if (rd_tick) begin
      sym_sample <= '0;
      sym_bit    <= 1'b0;
      unique case (phase)
        P_IDLE: begin
          sym_kind <= SYM_IDLE;
          sym_bit  <= idle_bit;
          idle_bit <= ~idle_bit;
          if (start && head_ready) begin
            word  <= {head_data, head_ecc};
            phase <= P_HDR;
            bcnt  <= '0;
          end
        end
        P_HDR: begin
          sym_kind <= SYM_DIGITAL;
          sym_bit  <= FRAME_HEADER[2'(HDR_W - 1) - 2'(bcnt)];
          bcnt     <= bcnt + 1'b1;
          if (bcnt == 6'(HDR_W - 1)) begin
            phase <= P_DIG;
            bcnt  <= '0;
          end
        end
        P_DIG: begin
          sym_kind <= SYM_DIGITAL;
          sym_bit  <= word[6'(DIG_W - 1) - bcnt];
          bcnt     <= bcnt + 1'b1;
          if (bcnt == 6'(DIG_W - 1)) begin
            phase <= P_WAIT;
            sec   <= '0;
          end
        end
        P_WAIT: begin
          sym_kind <= SYM_WAIT;
          phase    <= P_SAMP;
          cell_q     <= '0;
        end
        P_SAMP: begin
          sym_kind   <= SYM_SAMPLE;
          sym_sample <= sample_in;
          cell_q       <= cell_q + 1'b1;
          if (cell_q == CW'(PRE_CELLS - 1)) begin
            if (sec == SECW'(NSEC - 1)) begin
              phase <= P_IDLE;
              sec   <= '0;
            end else begin
              sec   <= sec + 1'b1;
              phase <= P_WAIT;
            end
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end
endmodule
