// input_stage: behavioural model of the analog front of one input channel.
//
// BEHAVIOURAL MODEL. The real part is an inverting amplifier (internal R2,
// external R1) whose input is biased at one of two global reference
// voltages, a selector that can feed it from the global test input
// instead of the preamplifier pad, two threshold DACs and two comparators.
// Voltages are signed codes in mV:
//   vref      = vref_sel ? dac(vref2) : dac(vref1)
//   sig       = vref - GAIN_NUM/GAIN_DEN * (vin_sel - vref), clipped to the
//               code range (GAIN_NUM/GAIN_DEN stands for R2/R1)
//   cmp_hi    = sig > dac(thr_hi),  cmp_lo = sig > dac(thr_lo)
//   dac(code) = (code - 128) * 8 mV for an 8-bit code.
// sig goes to the SCA write bus, the comparators to the trigger logic.
// The amplifier topology, the two references, the test input and the two
// DAC/comparator pairs are the source design's; the DAC scale and the
// default gain of 12/13 (2.6 V of preamplifier swing onto the +-1.2 V
// sample range) are this model's choices.
module input_stage
  import trace_pkg::*;
#(
  parameter int GAIN_NUM = 12,
  parameter int GAIN_DEN = 13
) (
  input  sample_t          vin,
  input  sample_t          test_in,
  input  logic             test_sel,
  input  logic             vref_sel,
  input  logic [DAC_W-1:0] vref1,
  input  logic [DAC_W-1:0] vref2,
  input  logic [DAC_W-1:0] thr_hi,
  input  logic [DAC_W-1:0] thr_lo,
  output sample_t          sig,
  output logic             cmp_hi,
  output logic             cmp_lo
);
  localparam int SMAX = 2 ** (SAMPLE_W - 1) - 1;
  localparam int SMIN = -(2 ** (SAMPLE_W - 1));

  function automatic int dac_mv(logic [DAC_W-1:0] code);
    return (int'(code) - 128) * 8;
  endfunction

  int vref, vsel, vout;

  always_comb begin
    vref = vref_sel ? dac_mv(vref2) : dac_mv(vref1);
    vsel = test_sel ? int'(test_in) : int'(vin);
    vout = vref - (GAIN_NUM * (vsel - vref)) / GAIN_DEN;
    if (vout > SMAX) vout = SMAX;
    if (vout < SMIN) vout = SMIN;
  end

  assign sig    = sample_t'(vout);
  assign cmp_hi = vout > dac_mv(thr_hi);
  assign cmp_lo = vout > dac_mv(thr_lo);
endmodule
