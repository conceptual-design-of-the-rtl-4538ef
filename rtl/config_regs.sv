// config_regs: configuration and status registers of the ASIC.
//
// Byte-wide register file behind the I2C interface (16-bit byte address):
//   0x0000        VREF1: code of global reference voltage 1
//   0x0001        VREF2: code of global reference voltage 2
//   0x0004-0x0007 trigger-request counter, 32 bits, least significant byte
//                 first, read-only; writing any value to 0x0004 clears it
//   0x0008-0x000B lost-pulse counter (pulses lost to a full queue), as above,
//                 cleared by a write to 0x0008
//   0x0100 + 4*ch channel ch, byte 0: bit0 leading-edge enable, bit1
//                 polarity (1 = negative pulses), bit2 Vref select, bit3
//                 test-input select, bit4 external trigger enable
//   +1            bits 3:0 sensitivity to global triggers 0..3
//   +2            trigger threshold DAC code
//   +3            re-arm (hysteresis) threshold DAC code
// Unmapped addresses read 0. Reads are combinational; writes take effect on
// the clock after reg_wr. The trigger-request counter counts cycles in
// which the global trigger request is active; the lost-pulse counter adds
// lost_n each cycle. Both saturate at 2^32-1.
// The register contents follow the source design; the map, reset values
// (all triggers off, VREF codes mid-scale, thresholds 0xC0/0xA0) and counter
// widths are this model's choices.
module config_regs
  import trace_pkg::*;
#(
  parameter int unsigned N_CH = trace_pkg::N_CH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [15:0]               raddr,
  output logic [7:0]                rdata,
  input  logic                      wr,
  input  logic [15:0]               waddr,
  input  logic [7:0]                wdata,
  input  logic                      trig_req,
  input  logic [$clog2(N_CH+1)-1:0] lost_n,
  output logic [DAC_W-1:0]          vref1,
  output logic [DAC_W-1:0]          vref2,
  output ch_cfg_t                   ch_cfg [N_CH],
  output logic [31:0]               trig_cnt,
  output logic [31:0]               lost_cnt
);
  localparam logic [15:0] CH_BASE = 16'h0100;

  function automatic logic [31:0] sat_add(logic [31:0] a, logic [31:0] b);
    logic [32:0] s = {1'b0, a} + {1'b0, b};
    return s[32] ? '1 : s[31:0];
  endfunction

  logic        ch_hit_w, ch_hit_r;
  logic [15:0] ch_w, ch_r;

  assign ch_hit_w = waddr >= CH_BASE && waddr < CH_BASE + 16'(4 * N_CH);
  assign ch_hit_r = raddr >= CH_BASE && raddr < CH_BASE + 16'(4 * N_CH);
  assign ch_w     = (waddr - CH_BASE) >> 2;
  assign ch_r     = (raddr - CH_BASE) >> 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vref1    <= 8'h80;
      vref2    <= 8'h80;
      trig_cnt <= '0;
      lost_cnt <= '0;
      for (int unsigned c = 0; c < N_CH; c++)
        ch_cfg[c] <= '{le_en: 1'b0, polarity: 1'b0, vref_sel: 1'b0, test_sel: 1'b0,
                       ext_en: 1'b0, gtrig_mask: '0, thr_hi: 8'hC0, thr_lo: 8'hA0};
    end else begin
      trig_cnt <= sat_add(trig_cnt, 32'(trig_req));
      lost_cnt <= sat_add(lost_cnt, 32'(lost_n));
      if (wr) begin
        if (waddr == 16'h0000) vref1 <= wdata;
        if (waddr == 16'h0001) vref2 <= wdata;
        if (waddr == 16'h0004) trig_cnt <= '0;
        if (waddr == 16'h0008) lost_cnt <= '0;
        if (ch_hit_w) begin
          for (int unsigned c = 0; c < N_CH; c++) begin
            if (ch_w == 16'(c)) begin
              unique case (waddr[1:0])
                2'd0: {ch_cfg[c].ext_en, ch_cfg[c].test_sel, ch_cfg[c].vref_sel,
                       ch_cfg[c].polarity, ch_cfg[c].le_en} <= wdata[4:0];
                2'd1: ch_cfg[c].gtrig_mask <= wdata[N_GTRIG-1:0];
                2'd2: ch_cfg[c].thr_hi <= wdata;
                default: ch_cfg[c].thr_lo <= wdata;
              endcase
            end
          end
        end
      end
    end
  end

  always_comb begin
    ch_cfg_t c;
    rdata = '0;
    c     = ch_cfg[0];
    for (int unsigned k = 0; k < N_CH; k++)
      if (ch_r == 16'(k)) c = ch_cfg[k];
    if (ch_hit_r) begin
      unique case (raddr[1:0])
        2'd0:    rdata = {3'b0, c.ext_en, c.test_sel, c.vref_sel, c.polarity, c.le_en};
        2'd1:    rdata = 8'(c.gtrig_mask);
        2'd2:    rdata = c.thr_hi;
        default: rdata = c.thr_lo;
      endcase
    end else begin
      unique case (raddr)
        16'h0000: rdata = vref1;
        16'h0001: rdata = vref2;
        16'h0004: rdata = trig_cnt[7:0];
        16'h0005: rdata = trig_cnt[15:8];
        16'h0006: rdata = trig_cnt[23:16];
        16'h0007: rdata = trig_cnt[31:24];
        16'h0008: rdata = lost_cnt[7:0];
        16'h0009: rdata = lost_cnt[15:8];
        16'h000A: rdata = lost_cnt[23:16];
        16'h000B: rdata = lost_cnt[31:24];
        default:  rdata = '0;
      endcase
    end
  end
endmodule
