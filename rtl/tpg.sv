// tpg -- DDS-based test pattern generator.
//
// Three oscillators (NCO1..NCO3) are restarted together by 'sync'. An adder
// combines NCO1 and NCO2 into a two-tone signal for linearity (intercept
// point) tests; it is halved so that it stays within the N-bit converter
// range. MUX1 chooses the stimulus 'tone' that goes to the DAC and, on the
// internal loopback, straight to the analyzer. MUX2 chooses the first
// analyzer reference f1; NCO3 is the second reference f2. For a phase or
// frequency-response measurement NCO1 (stimulus, via MUX1), NCO2 or NCO1
// (f1, cosine: theta + 90 deg) and NCO3 (f2, sine) run at one frequency.
//
// The oscillator count, the adder and the two multiplexers follow the
// architecture's block diagram. Which inputs each multiplexer can pick is
// this design's choice: both may pick NCO1, NCO2 or the two-tone sum, and
// the halving of the sum is also this design's choice.
//
// Timing: all outputs come from the NCO output registers through
// combinational logic only, so 'tone', 'f1' and 'f2' are mutually aligned
// and no cycle of delay is added between stimulus and references.
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_BITS,
  parameter int unsigned LUT_W = LUT_BITS,
  parameter int unsigned N     = N_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sync,
  input  logic [2:0][ACC_W-1:0]   freq,    // frequency words of NCO1..NCO3
  input  logic [2:0][ACC_W-1:0]   theta,   // initial phases of NCO1..NCO3
  input  tone_sel_e               mux1_sel,
  input  tone_sel_e               mux2_sel,
  output logic signed [N-1:0]     tone,    // MUX1: to DAC and internal loopback
  output logic signed [N-1:0]     f1,      // MUX2: reference of MAC 1
  output logic signed [N-1:0]     f2       // NCO3: reference of MAC 2
);

  logic signed [N-1:0] s [3];
  logic signed [N:0]   sum_full;
  logic signed [N-1:0] sum_half;

  for (genvar k = 0; k < 3; k++) begin : g_nco
    logic [ACC_W-1:0] phase_unused;
    nco #(.ACC_W(ACC_W), .LUT_W(LUT_W), .OUT_W(N)) u_nco (
      .clk, .rst_n, .sync,
      .freq  (freq[k]),
      .theta (theta[k]),
      .phase (phase_unused),
      .sample(s[k])
    );
  end

  assign sum_full = (N+1)'(s[0]) + (N+1)'(s[1]);
  assign sum_half = sum_full[N:1];

  function automatic logic signed [N-1:0] pick(tone_sel_e sel,
      logic signed [N-1:0] a, logic signed [N-1:0] b, logic signed [N-1:0] c);
    unique case (sel)
      TONE_NCO1: return a;
      TONE_NCO2: return b;
      TONE_SUM:  return c;
      default:   return a;
    endcase
  endfunction

  always_comb begin
    tone = pick(mux1_sel, s[0], s[1], sum_half);
    f1   = pick(mux2_sel, s[0], s[1], sum_half);
    f2   = s[2];
  end

endmodule
