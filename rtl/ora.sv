// ora -- MAC-based output response analyzer.
//
// MUX4 selects the analyzed sample f(nT): the pattern generator's stimulus
// (internal loopback, no converters or DUT in the path) or the ADC sample.
// Mult1/Accum1 correlate it with reference f1 (cosine) and Mult2/Accum2
// with reference f2 (sine):
//   DC1 = sum f(nT) * f1(nT),  DC2 = sum f(nT) * f2(nT)
// which are the in-phase and quadrature parts of the spectrum of f at the
// reference frequency. Structure follows the architecture's analyzer.
//
// The internal loopback adds no register: stimulus and references leave
// the generator in the same cycle and meet in the multipliers in that same
// cycle, so the internal path reads as zero phase delay. (An extra register
// here shows up as a phase error of one clock period times the tone
// frequency.)
//
// Interface: 'clear' and 'en' come from the test controller; dc1/dc2 are
// the accumulator values, stable while 'en' is low.
module ora
  import bist_pkg::*;
#(
  parameter int unsigned N = N_BITS,
  parameter int unsigned M = M_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic                use_adc,   // MUX4: 0 internal loopback, 1 ADC
  input  logic signed [N-1:0] tone,      // stimulus from the generator
  input  logic signed [N-1:0] adc,       // sample returned by the ADC
  input  logic signed [N-1:0] f1,
  input  logic signed [N-1:0] f2,
  output logic signed [N-1:0] f_sample,  // MUX4 output f(nT)
  output logic signed [M-1:0] dc1,
  output logic signed [M-1:0] dc2
);

  assign f_sample = use_adc ? adc : tone;

  mac #(.N(N), .M(M)) u_mac1 (
    .clk, .rst_n, .clear, .en, .a(f_sample), .b(f1), .acc(dc1)
  );
  mac #(.N(N), .M(M)) u_mac2 (
    .clk, .rst_n, .clear, .en, .a(f_sample), .b(f2), .acc(dc2)
  );

endmodule
