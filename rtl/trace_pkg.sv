// trace_pkg: sizes, frame layout and shared types of the TRACE analog memory
// ASIC model.
//
// Array sizes follow the architecture: 64 inputs, each with a 32-cell
// pre-trigger SCA channel, and an 8-slot output queue whose slots hold a
// 192-cell post-trigger SCA and a 32-cell storage buffer (224 samples per
// pulse). The event frame is a 4-bit header, 64 bits of digital data
// (7-bit input channel, 5-bit start position, 4-bit output channel, 36-bit
// timestamp, 5 reserved bits, 7-bit SEC-DED code) and 224 analog samples
// with one wait cycle ahead of each 32-sample section: 299 read-clock
// cycles, 5.98 us at 50 MHz.
//
// Analog voltages are carried as signed SAMPLE_W-bit codes (1 LSB = 1 mV
// here, so +-2047 mV spans the +-1.2 V output range and the 2.6 V input
// swing); the code width, the header pattern and the register layouts
// are this model's choices.
package trace_pkg;

  localparam int unsigned N_CH        = 64;   // ASIC inputs
  localparam int unsigned N_SLOTS     = 8;    // output queue slots
  localparam int unsigned PRE_CELLS   = 32;   // pre-trigger cells per input
  localparam int unsigned POST_CELLS  = 192;  // post-trigger cells per slot
  localparam int unsigned N_GTRIG     = 4;    // global external triggers
  localparam int unsigned N_EXT       = 4;    // inputs with their own external trigger pin
  localparam int unsigned RD_DIV      = 4;    // 200 MHz sampling / 50 MHz read clock

  localparam int unsigned SAMPLE_W    = 12;
  localparam int unsigned DAC_W       = 8;

  // Frame fields (bits)
  localparam int unsigned HDR_W       = 4;
  localparam int unsigned CHID_W      = 7;
  localparam int unsigned POS_W       = 5;
  localparam int unsigned SLOTID_W    = 4;
  localparam int unsigned TS_W        = 36;
  localparam int unsigned RSV_W       = 5;
  localparam int unsigned ECC_W       = 7;
  localparam int unsigned DATA_W      = CHID_W + POS_W + SLOTID_W + TS_W + RSV_W; // 57
  localparam int unsigned DIG_W       = DATA_W + ECC_W;                            // 64
  localparam int unsigned FRAME_LEN   = HDR_W + DIG_W + (PRE_CELLS + POST_CELLS)
                                        + (PRE_CELLS + POST_CELLS) / PRE_CELLS;    // 299
  localparam logic [HDR_W-1:0] FRAME_HEADER = 4'b1100;

  // Serial ID + position word sent from a pre-trigger channel to its slot
  localparam int unsigned IDPOS_W     = CHID_W + POS_W;                            // 12

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // What an input channel presents to the switching matrix: its live input
  // signal, its pre-trigger read bus and the copy / serial-ID strobes.
  typedef struct packed {
    sample_t sig;
    sample_t pre;
    logic    copy_stb;
    logic    id_stb;
    logic    id_bit;
  } chan_bus_t;

  // Local configuration of one input channel
  typedef struct packed {
    logic               le_en;      // leading-edge trigger enable
    logic               polarity;   // 1: pulses go negative
    logic               vref_sel;   // 0: Vref1, 1: Vref2
    logic               test_sel;   // amplifier fed from the global test input
    logic               ext_en;     // sensitive to the channel's own external trigger
    logic [N_GTRIG-1:0] gtrig_mask; // sensitivity to the global triggers
    logic [DAC_W-1:0]   thr_hi;     // trigger threshold DAC
    logic [DAC_W-1:0]   thr_lo;     // re-arm (hysteresis) threshold DAC
  } ch_cfg_t;

  // Kind of symbol on the output during one read-clock cycle
  typedef enum logic [1:0] {
    SYM_IDLE    = 2'd0,
    SYM_DIGITAL = 2'd1,
    SYM_SAMPLE  = 2'd2,
    SYM_WAIT    = 2'd3
  } sym_kind_t;

endpackage
