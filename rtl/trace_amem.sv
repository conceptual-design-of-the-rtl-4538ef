// trace_amem: the dead time-less analog memory ASIC for the TRACE readout.
//
// Every input is sampled continuously into its own small pre-trigger SCA
// (PRE_CELLS cells, always holding the last PRE_CELLS samples). A trigger
// on an input freezes that SCA, takes the next free slot of an N_SLOTS-deep
// output queue and connects the input to it through the switching matrix:
// the slot records POST_CELLS post-trigger samples while the frozen
// pre-trigger samples, then the input number and trigger cell position,
// are copied into the slot's storage buffer. The copy ends before the
// post-trigger capture, so the input samples again at once: a channel has
// no dead time; only a full queue loses pulses (counted). Completed slots
// leave in trigger order through the readout controller as analog event
// frames on a differential output, at the read clock (sampling clock / 4).
//
// Clocking: one sampling clock clk (200 MHz, one cell per cycle); rdclk is
// the 50 MHz read clock, high in the first two clk cycles of each read
// cycle; output symbols change at the start of a read cycle.
// Analog ports carry signed mV codes (trace_pkg::sample_t). Configuration
// is through I2C (SCL / SDA, open drain). start enables the readout of
// frames; empty / full show the queue state; trigger_out is the OR of the
// channel triggers. Inputs 0..N_EXT-1 have an external trigger pin each.
// Blocks, sizes and frame format follow the source design; the single-edge
// sampling clock, the power-of-two slot count, the port coding of analog
// values and the register map are this model's choices.
module trace_amem
  import trace_pkg::*;
#(
  parameter int unsigned N_CH       = trace_pkg::N_CH,
  parameter int unsigned N_SLOTS    = trace_pkg::N_SLOTS,
  parameter int unsigned PRE_CELLS  = trace_pkg::PRE_CELLS,
  parameter int unsigned POST_CELLS = trace_pkg::POST_CELLS,
  parameter int unsigned N_EXT      = trace_pkg::N_EXT,
  parameter logic [6:0]  I2C_ADDR   = 7'h2A
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ts_rst,
  input  sample_t                  vin [N_CH],
  input  sample_t                  test_in,
  input  logic [N_EXT-1:0]         ext_trig,
  input  logic [N_GTRIG-1:0]       gtrig,
  input  logic                     scl,
  input  logic                     sda_in,
  output logic                     sda_oe,
  input  logic                     start,
  output logic                     trigger_out,
  output logic                     empty,
  output logic                     full,
  output logic                     rdclk,
  output logic signed [SAMPLE_W:0] out_p,
  output logic signed [SAMPLE_W:0] out_n
);
  localparam int unsigned SW = $clog2(N_SLOTS);
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned PA = $clog2(PRE_CELLS);
  localparam int unsigned QA = $clog2(POST_CELLS);

  // ---------------- read clock ----------------
  logic [$clog2(RD_DIV)-1:0] rd_cnt;
  logic                      rd_tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_cnt <= '0;
    else        rd_cnt <= rd_cnt + 1'b1;
  end
  assign rd_tick = (rd_cnt == '1);
  assign rdclk   = (rd_cnt < ($clog2(RD_DIV))'(RD_DIV / 2));

  // ---------------- timestamp ----------------
  logic [TS_W-1:0] ts_now;
  timestamp_counter u_ts (.clk, .rst_n, .ts_rst, .ts(ts_now));

  // ---------------- configuration ----------------
  logic [15:0]             reg_raddr, reg_waddr;
  logic [7:0]              reg_rdata, reg_wdata;
  logic                    reg_wr;
  logic [DAC_W-1:0]        vref1, vref2;
  ch_cfg_t                 ch_cfg [N_CH];
  logic [31:0]             trig_cnt, lost_cnt;
  logic [N_CH-1:0]         ch_trig, ch_grant;
  logic [$clog2(N_CH+1)-1:0] lost_n;

  i2c_slave #(.ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst_n, .scl, .sda_in, .sda_oe,
    .reg_raddr, .reg_rdata, .reg_wr, .reg_waddr, .reg_wdata
  );

  config_regs #(.N_CH(N_CH)) u_cfg (
    .clk, .rst_n, .raddr(reg_raddr), .rdata(reg_rdata),
    .wr(reg_wr), .waddr(reg_waddr), .wdata(reg_wdata),
    .trig_req(trigger_out), .lost_n,
    .vref1, .vref2, .ch_cfg, .trig_cnt, .lost_cnt
  );

  // ---------------- input channels ----------------
  chan_bus_t ch_bus [N_CH];

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    sample_t           sig, pre_dout;
    logic              cmp_hi, cmp_lo, locked, wr_en;
    logic              copy_stb, id_stb, id_bit;
    logic [PRE_CELLS-1:0] wr_sel;
    logic [PA-1:0]     rd_addr;
    logic [POS_W-1:0]  start_pos;
    logic              ext;

    assign ext = (i < N_EXT) ? ext_trig[i % N_EXT] : 1'b0;

    input_stage u_in (
      .vin(vin[i]), .test_in, .test_sel(ch_cfg[i].test_sel),
      .vref_sel(ch_cfg[i].vref_sel), .vref1, .vref2,
      .thr_hi(ch_cfg[i].thr_hi), .thr_lo(ch_cfg[i].thr_lo),
      .sig, .cmp_hi, .cmp_lo
    );

    trigger_logic u_trig (
      .clk, .rst_n,
      .le_en(ch_cfg[i].le_en), .polarity(ch_cfg[i].polarity),
      .ext_en(ch_cfg[i].ext_en), .gtrig_mask(ch_cfg[i].gtrig_mask),
      .cmp_hi, .cmp_lo, .ext_trig(ext), .gtrig, .lock(locked),
      .fire(), .trig(ch_trig[i])
    );

    input_channel_ctrl #(.PRE_CELLS(PRE_CELLS)) u_ctrl (
      .clk, .rst_n, .ch_id(CHID_W'(i)), .trig(ch_grant[i]), .rd_tick,
      .wr_sel, .wr_en, .rd_addr, .locked, .copy_stb, .id_stb, .id_bit, .start_pos
    );

    sca_channel #(.N(PRE_CELLS), .PRECHARGE(2)) u_sca (
      .clk, .wr_en, .wr_sel, .din(sig), .rd_addr, .dout(pre_dout)
    );

    assign ch_bus[i] = '{sig: sig, pre: pre_dout, copy_stb: copy_stb,
                         id_stb: id_stb, id_bit: id_bit};
  end

  assign trigger_out = |ch_trig;

  // ---------------- switching matrix and queue ----------------
  logic [N_SLOTS-1:0][N_CH-1:0] xpoint;
  logic [N_SLOTS-1:0]           slot_start, cap_done;
  logic [CW-1:0]                slot_chan [N_SLOTS];
  logic [SW-1:0]                head;
  logic                         head_ready, rd_release;
  chan_bus_t                    slot_bus [N_SLOTS];

  slot_allocator #(.N_CH(N_CH), .N_SLOTS(N_SLOTS)) u_alloc (
    .clk, .rst_n, .trig(ch_trig), .cap_done, .rd_release,
    .grant(ch_grant), .slot_start, .xpoint, .slot_chan, .head, .head_ready,
    .lost_n, .empty, .full
  );

  switch_matrix #(.N_CH(N_CH), .N_SLOTS(N_SLOTS)) u_matrix (
    .xpoint, .ch_bus, .slot_bus
  );

  // ---------------- output slots ----------------
  logic              rd_post;
  logic [QA-1:0]     rd_addr;
  sample_t           post_dout [N_SLOTS];
  sample_t           buf_dout  [N_SLOTS];
  logic [TS_W-1:0]   slot_ts   [N_SLOTS];
  logic [CHID_W-1:0] slot_id   [N_SLOTS];
  logic [POS_W-1:0]  slot_pos  [N_SLOTS];

  for (genvar j = 0; j < N_SLOTS; j++) begin : g_slot
    logic                  post_wr_en, buf_wr_en;
    logic [POST_CELLS-1:0] post_wr_sel;
    logic [PRE_CELLS-1:0]  buf_wr_sel;

    output_slot_ctrl #(.PRE_CELLS(PRE_CELLS), .POST_CELLS(POST_CELLS)) u_ctrl (
      .clk, .rst_n, .start(slot_start[j]), .ts_now,
      .copy_stb(slot_bus[j].copy_stb), .id_stb(slot_bus[j].id_stb), .id_bit(slot_bus[j].id_bit),
      .post_wr_en, .post_wr_sel, .buf_wr_en, .buf_wr_sel,
      .capturing(), .cap_done(cap_done[j]), .copy_ok(),
      .ts(slot_ts[j]), .ch_id(slot_id[j]), .pos(slot_pos[j])
    );

    sca_channel #(.N(POST_CELLS), .PRECHARGE(0)) u_post (
      .clk, .wr_en(post_wr_en), .wr_sel(post_wr_sel), .din(slot_bus[j].sig),
      .rd_addr, .dout(post_dout[j])
    );

    sca_channel #(.N(PRE_CELLS), .PRECHARGE(0)) u_buf (
      .clk, .wr_en(buf_wr_en), .wr_sel(buf_wr_sel), .din(slot_bus[j].pre),
      .rd_addr(rd_addr[PA-1:0]), .dout(buf_dout[j])
    );
  end

  // ---------------- readout ----------------
  sym_kind_t sym_kind;
  logic      sym_bit;
  sample_t   sym_sample;

  readout_ctrl #(.N_SLOTS(N_SLOTS), .PRE_CELLS(PRE_CELLS), .POST_CELLS(POST_CELLS)) u_rd (
    .clk, .rst_n, .rd_tick, .start, .head_ready, .head_slot(head),
    .head_ch_id(slot_id[head]), .head_pos(slot_pos[head]), .head_ts(slot_ts[head]),
    .sample_in(rd_post ? post_dout[head] : buf_dout[head]),
    .rd_post, .rd_addr, .release_slot(rd_release), .busy(),
    .sym_kind, .sym_bit, .sym_sample
  );

  output_driver u_out (.sym_kind, .sym_bit, .sym_sample, .out_p, .out_n);
endmodule
