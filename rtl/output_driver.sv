// output_driver: behavioural model of the integrated differential output
// amplifier.
//
// BEHAVIOURAL MODEL. Converts each output symbol of the readout controller
// into a differential voltage (signed mV codes, out_p = v, out_n = -v):
//   digital and idle bits: +DIG_MV for 1, -DIG_MV for 0;
//   analog samples: the sample voltage;
//   wait cycles: 0 V.
// The receiving ADC sees digital data encoded as analog levels and the
// samples themselves, as in the source design. The digital level of 1.6 V
// is read from the simulated output waveform; the wait level is this
// model's choice.
module output_driver
  import trace_pkg::*;
#(
  parameter int DIG_MV = 1600
) (
  input  sym_kind_t              sym_kind,
  input  logic                   sym_bit,
  input  sample_t                sym_sample,
  output logic signed [SAMPLE_W:0] out_p,
  output logic signed [SAMPLE_W:0] out_n
);
  logic signed [SAMPLE_W:0] v;

  always_comb begin
    unique case (sym_kind)
      SYM_IDLE, SYM_DIGITAL: v = sym_bit ? (SAMPLE_W+1)'(DIG_MV) : -(SAMPLE_W+1)'(DIG_MV);
      SYM_SAMPLE:            v = (SAMPLE_W+1)'(sym_sample);
      default:               v = '0;
    endcase
  end

  assign out_p = v;
  assign out_n = -v;
endmodule
