// bist_pkg -- widths, angle constants and selector encodings shared by the
// blocks of the mixed-signal BIST (DDS test pattern generator, MAC output
// response analyzer, test controller, phase and amplitude post-processing).
//
// Angles are carried as unsigned binary angles: a W-bit word spans one full
// turn, so 90 deg is 2**(W-2) and arithmetic wraps modulo 360 deg for free.
// The converter width of 8 bits follows the prototype described for this
// architecture (8-bit DAC and ADC); the accumulator width is one of the
// tabulated MAC configurations. Phase-accumulator, LUT and angle widths are
// this design's own choices.
package bist_pkg;

  // N: bits of the DAC/ADC samples and of each multiplier operand.
  localparam int unsigned N_BITS      = 8;
  // M: accumulator bits; a sequence of K cycles needs K < 2**(M-2N).
  localparam int unsigned M_BITS      = 40;
  // n: phase-accumulator word (frequency and initial-phase words).
  localparam int unsigned ACC_BITS    = 24;
  // p: truncated phase bits addressing the sine LUT.
  localparam int unsigned LUT_BITS    = 10;
  // Width of binary-angle phase results.
  localparam int unsigned ANGLE_BITS  = 16;
  // Amplitude result in dB, unsigned fixed point with DB_FRAC fraction bits.
  localparam int unsigned DB_BITS     = 16;
  localparam int unsigned DB_FRAC     = 8;

  // MUX1 / MUX2 choice of tone inside the pattern generator.
  typedef enum logic [1:0] {
    TONE_NCO1 = 2'd0,   // NCO1 alone
    TONE_NCO2 = 2'd1,   // NCO2 alone
    TONE_SUM  = 2'd2    // two-tone signal, (NCO1 + NCO2) / 2
  } tone_sel_e;

  // Return path used for a measurement (MUX4 in the digital domain, MUX3 in
  // the analog domain).
  typedef enum logic [1:0] {
    PATH_INTERNAL = 2'd0,  // pattern generator straight to the ORA
    PATH_BYPASS   = 2'd1,  // DAC -> ADC, DUT bypassed (converter calibration)
    PATH_DUT      = 2'd2   // DAC -> DUT -> ADC
  } path_sel_e;

endpackage
