// trigger_logic: trigger condition of one input channel.
//
// Three sources can trigger a channel, each enabled in its local
// configuration:
//  * leading edge: the high comparator (signal past the programmed
//    threshold) rises while the channel is armed. The channel is then
//    disarmed and only re-armed once the low comparator reports that the
//    signal has fallen back below the second, lower threshold (hysteresis,
//    against false triggers on a noisy falling edge). polarity inverts both
//    comparator outputs so that negative pulses are handled the same way.
//  * the channel's own external trigger pin (rising edge), if ext_en;
//  * any of the N_GTRIG global trigger pins (rising edge) set in gtrig_mask.
// All asynchronous inputs pass a two-flop synchronizer. trig is a one-cycle
// pulse, suppressed while lock is high (the channel is write-locked);
// a suppressed leading-edge trigger still disarms the channel. Latency from
// a comparator edge to trig is three clock cycles.
// The sources and the hysteresis follow the source design; synchronizers,
// edge detection on external inputs and the lock gating are this model's.
module trigger_logic
  import trace_pkg::*;
#(
  parameter int unsigned NG = trace_pkg::N_GTRIG
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          le_en,
  input  logic          polarity,
  input  logic          ext_en,
  input  logic [NG-1:0] gtrig_mask,
  input  logic          cmp_hi,     // signal beyond trigger threshold
  input  logic          cmp_lo,     // signal beyond re-arm threshold
  input  logic          ext_trig,
  input  logic [NG-1:0] gtrig,
  input  logic          lock,
  output logic          fire,       // trigger condition met (before lock)
  output logic          trig        // accepted trigger pulse
);
  logic [1:0]    hi_s, lo_s, ext_s;
  logic [NG-1:0] g_s0, g_s1, g_q;
  logic          hi_q, ext_q, armed;
  logic          hi, lo, le_fire, ext_fire, g_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_s <= '0; lo_s <= '0; ext_s <= '0;
      g_s0 <= '0; g_s1 <= '0; g_q <= '0;
      hi_q <= 1'b0; ext_q <= 1'b0;
    end else begin
      hi_s  <= {hi_s[0], cmp_hi ^ polarity};
      lo_s  <= {lo_s[0], cmp_lo ^ polarity};
      ext_s <= {ext_s[0], ext_trig};
      g_s0  <= gtrig;
      g_s1  <= g_s0;
      hi_q  <= hi_s[1];
      ext_q <= ext_s[1];
      g_q   <= g_s1;
    end
  end

  assign hi       = hi_s[1];
  assign lo       = lo_s[1];
  assign le_fire  = le_en && armed && hi && !hi_q;
  assign ext_fire = ext_en && ext_s[1] && !ext_q;
  assign g_fire   = |(gtrig_mask & g_s1 & ~g_q);
  assign fire     = le_fire || ext_fire || g_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       armed <= 1'b1;
    else if (le_fire) armed <= 1'b0;
    else if (!lo)     armed <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig <= 1'b0;
    else        trig <= fire && !lock;
  end
endmodule
