// bist_top -- digital part of a mixed-signal built-in self-test that
// measures the gain and phase response of an analog path at one frequency
// per run.
//
// The pattern generator (tpg) synthesizes the stimulus with oscillators and
// sends it to the system's DAC; the analyzer (ora) correlates the returned
// samples with a cosine (f1) and a sine (f2) reference of the same
// frequency, giving DC1 and DC2, the in-phase and quadrature parts of the
// response. The test controller restarts the oscillators, waits for the
// analog path to fill and accumulates for K cycles. When it is done,
// phase_calc turns DC1/DC2 into the phase delay and amp_db into the
// amplitude in dB, both from DC1/DC2 directly, so the amplitude does not
// inherit errors of the phase estimate.
//
// Return paths ('path_sel'):
//   PATH_INTERNAL  stimulus straight into the analyzer (MUX4), converters
//                  and DUT bypassed: must read as zero phase delay.
//   PATH_BYPASS    DAC -> ADC with the DUT bypassed by the analog loopback
//                  switch (MUX3): measures the converters' own delay, to be
//                  subtracted from DUT measurements (calibration).
//   PATH_DUT       DAC -> DUT -> ADC.
// The DAC, DUT, analog switch and ADC are outside this module: 'dac_data'
// and 'mux3_bypass' go out to them and 'adc_data' comes back.
//
// The block structure follows the architecture; the path decoding, the
// settle wait and the sharing of one 'done' by both result units are this
// design's choices. Samples are signed two's complement.
//
// Timing: 'start' high in cycle t; oscillators restart in t+1; the K
// accumulated cycles are t+3+settle .. t+2+settle+K; DC1/DC2 are final and
// 'meas_done' is high in cycle t+3+settle+K; 'amp_valid' follows 4 cycles
// and 'phase_valid' R+3 = 17 cycles after 'meas_done'.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N     = N_BITS,
  parameter int unsigned M     = M_BITS,
  parameter int unsigned ACC_W = ACC_BITS,
  parameter int unsigned LUT_W = LUT_BITS,
  parameter int unsigned AW    = ANGLE_BITS,
  parameter int unsigned SW    = 16,
  localparam int unsigned KW   = M - 2 * N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // measurement set-up and start
  input  logic                   start,
  input  logic [2:0][ACC_W-1:0]  freq,
  input  logic [2:0][ACC_W-1:0]  theta,
  input  tone_sel_e              mux1_sel,
  input  tone_sel_e              mux2_sel,
  input  path_sel_e              path_sel,
  input  logic [KW-1:0]          k_len,
  input  logic [SW-1:0]          settle,
  // analog side
  output logic signed [N-1:0]    dac_data,
  output logic                   mux3_bypass,
  input  logic signed [N-1:0]    adc_data,
  // results
  output logic                   busy,
  output logic                   meas_done,
  output logic signed [M-1:0]    dc1,
  output logic signed [M-1:0]    dc2,
  output logic                   phase_valid,
  output logic                   phase_zero,
  output logic [AW-1:0]          phase,
  output logic [AW-1:0]          phase_offset,
  output logic                   amp_valid,
  output logic                   amp_zero,
  output logic [DB_BITS-1:0]     amp_db_out
);

  logic nco_sync, acc_clear, acc_en, ctrl_busy, phase_busy;
  logic signed [N-1:0] tone, f1, f2, f_sample;

  test_controller #(.KW(KW), .SW(SW)) u_ctrl (
    .clk, .rst_n, .start, .k_len, .settle,
    .nco_sync, .acc_clear, .acc_en,
    .busy(ctrl_busy), .done(meas_done)
  );

  tpg #(.ACC_W(ACC_W), .LUT_W(LUT_W), .N(N)) u_tpg (
    .clk, .rst_n, .sync(nco_sync), .freq, .theta,
    .mux1_sel, .mux2_sel, .tone, .f1, .f2
  );

  assign dac_data    = tone;
  assign mux3_bypass = (path_sel == PATH_BYPASS);

  ora #(.N(N), .M(M)) u_ora (
    .clk, .rst_n, .clear(acc_clear), .en(acc_en),
    .use_adc(path_sel != PATH_INTERNAL),
    .tone, .adc(adc_data), .f1, .f2,
    .f_sample, .dc1, .dc2
  );

  phase_calc #(.M(M), .AW(AW)) u_phase (
    .clk, .rst_n, .start(meas_done), .dc1, .dc2,
    .busy(phase_busy), .valid(phase_valid), .zero(phase_zero),
    .phase, .offset(phase_offset)
  );

  amp_db #(.M(M)) u_amp (
    .clk, .rst_n, .start(meas_done), .dc1, .dc2,
    .valid(amp_valid), .zero(amp_zero), .db(amp_db_out)
  );

  // amp_db is a 4-stage pipeline; keep 'busy' up until its result is out.
  logic [2:0] amp_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) amp_pipe <= '0;
    else        amp_pipe <= {amp_pipe[1:0], meas_done};
  end

  assign busy = ctrl_busy | phase_busy | (|amp_pipe);

endmodule
