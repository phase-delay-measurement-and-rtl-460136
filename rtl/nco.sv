// nco -- numerically controlled oscillator of the DDS test pattern generator.
//
// An ACC_W-bit phase accumulator adds the frequency word every clock, so the
// output frequency is f_out = freq * f_clk / 2**ACC_W. A one-cycle 'sync'
// pulse loads the accumulator with the initial-phase word theta, which lets
// a controller restart all oscillators coherently (or shift a tone's phase
// to compensate a measured delay). The accumulator is truncated to its top
// LUT_W bits, which address a sine table of 2**LUT_W signed OUT_W-bit
// samples of amplitude 2**(OUT_W-1)-1. The table is computed at elaboration
// as round(A*sin(2*pi*i/2**LUT_W)).
//
// Structure (accumulator, truncation, sin LUT) follows the oscillator of
// the architecture; the widths, the load-on-sync behaviour of theta and the
// full-wave table are this design's choices.
//
// Timing: sync in cycle t -> acc = theta in t+1 -> sample = sin(theta) in
// t+2; afterwards one sample per clock, phase advancing by freq.
module nco #(
  parameter int unsigned ACC_W = bist_pkg::ACC_BITS,
  parameter int unsigned LUT_W = bist_pkg::LUT_BITS,
  parameter int unsigned OUT_W = bist_pkg::N_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sync,     // load theta into the accumulator
  input  logic [ACC_W-1:0]        freq,     // frequency word f
  input  logic [ACC_W-1:0]        theta,    // initial phase word
  output logic [ACC_W-1:0]        phase,    // current accumulator value
  output logic signed [OUT_W-1:0] sample    // sin of the truncated phase
);

  localparam int unsigned DEPTH = 2 ** LUT_W;

  function automatic logic signed [OUT_W-1:0] sine_entry(int unsigned i);
    real ang, s, a;
    ang = 2.0 * 3.14159265358979323846 * real'(i) / real'(DEPTH);
    a   = real'((2 ** (OUT_W - 1)) - 1);
    s   = $sin(ang) * a;
    return OUT_W'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  logic signed [OUT_W-1:0] sine_rom [DEPTH];
  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    localparam logic signed [OUT_W-1:0] ENTRY = sine_entry(i);
    assign sine_rom[i] = ENTRY;
  end

  logic [LUT_W-1:0] addr;
  assign addr = phase[ACC_W-1 -: LUT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      sample <= '0;
    end else begin
      phase  <= sync ? theta : phase + freq;
      sample <= sine_rom[addr];
    end
  end

endmodule
