// tb_freq_sweep -- phase-response sweep of the BIST at its default sizes,
// at the prototype's 48.5 MHz clock from 1 kHz to 50 kHz in 1 kHz steps.
//
// For each frequency the frequency word is round(f * 2**24 / 48.5 MHz)
// and three measurements are taken:
//   1. internal loopback, K = whole number of tone periods (at least
//      8192 cycles): must read
//      0 deg (within 0.05 deg);
//   2. internal loopback, K = 65536 cycles regardless of the period: the
//      sums do not cancel the double-frequency term, so a small
//      frequency-dependent phase error remains (up to a few degrees at 1 kHz,
//      where K covers 1.35 periods); it is reported, and the
//      result must still equal atan2 of the exact sums;
//   3. DAC -> ADC with the DUT bypassed and a 3-cycle converter delay,
//      whole periods: must read 360 * 3 * f / 48.5 MHz deg (within
//      0.3 deg), the converter delay that a DUT measurement must subtract.
// DC1/DC2 are predicted exactly from the recorded ADC samples and
// independently computed oscillator references.
module tb_freq_sweep;
  import bist_pkg::*;
  localparam real PI   = 3.14159265358979323846;
  localparam real FCLK = 48.5e6;
  localparam int  MAXC = 1 << 18;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0][23:0] freq, theta;
  tone_sel_e mux1_sel = TONE_NCO1, mux2_sel = TONE_NCO2;
  path_sel_e path_sel = PATH_INTERNAL;
  logic [23:0] k_len = '0;
  logic [15:0] settle = '0;
  logic signed [7:0] dac_data, adc_data;
  logic mux3_bypass, busy, meas_done, phase_valid, phase_zero, amp_valid, amp_zero;
  logic signed [39:0] dc1, dc2;
  logic [15:0] phase, phase_offset, amp_db_out;

  bist_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_whole = 0, n_partial = 0, n_conv = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Analog side: pure delay of delay_d cycles, 8-bit ADC.
  int delay_d = 3;
  logic signed [7:0] dac_hist [16];
  int rec_n = 0, done_at = 0;
  int rec_adc [MAXC];
  always @(negedge clk) begin
    for (int i = 15; i > 0; i--) dac_hist[i] = dac_hist[i-1];
    dac_hist[0] = dac_data;
    adc_data = dac_hist[delay_d];
    rec_adc[rec_n % MAXC] = int'(adc_data);
    if (meas_done) done_at = rec_n;
    rec_n++;
  end

  function automatic int ref_sin(logic [23:0] ph);
    real s;
    s = 127.0 * $sin(2.0 * PI * real'(ph[23:14]) / 1024.0);
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic real wrap180(real e);
    while (e > 180.0) e -= 360.0;
    while (e < -180.0) e += 360.0;
    return e;
  endfunction

  task automatic measure(path_sel_e p, int k, real exp_phase, real tol, output real got);
    longint m1, m2;
    int cyc, s0, s2, sa, idx;
    real ref_ang, e;
    @(negedge clk);
    path_sel = p; k_len = 24'(k); settle = 16'(16);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!meas_done && cyc < MAXC) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(cyc == 16 + k + 2, "cycle count");
    m1 = 0; m2 = 0;
    for (int j = 18; j <= 17 + k; j++) begin
      s0  = ref_sin(theta[0] + 24'(j - 2) * freq[0]);
      s2  = ref_sin(theta[2] + 24'(j - 2) * freq[2]);
      idx = (done_at - (16 + k + 2) + j + MAXC) % MAXC;
      sa  = (p == PATH_INTERNAL) ? s0 : rec_adc[idx];
      m1 += longint'(sa) * longint'(s0);   // MUX2 reference = NCO2 = NCO1
      m2 += longint'(sa) * longint'(s2);
    end
    check(longint'(dc1) == m1 && longint'(dc2) == m2, "exact DC1/DC2");
    cyc = 0;
    while (!phase_valid && cyc < 100) begin @(negedge clk); cyc++; end
    got = real'(phase) * 360.0 / 65536.0;
    ref_ang = $atan2(real'(m2), real'(m1)) * 180.0 / PI;
    e = wrap180(got - ref_ang);
    check(e < 0.012 && e > -0.012, "phase vs atan2 of the sums");
    e = wrap180(got - exp_phase);
    check(e < tol && e > -tol, "phase vs expected");
    got = wrap180(got);
  endtask

  initial begin
    real fk, fw, per, p_whole, p_part, p_conv, conv_exp;
    int whole;
    freq = '0; theta = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    $display("  f/kHz   internal,whole  internal,K=65536  converters(3 clk)  expected");
    for (int i = 1; i <= 50; i++) begin
      fk = real'(i);
      fw = $floor(fk * 1.0e3 * 16777216.0 / FCLK + 0.5);
      freq[0] = 24'($rtoi(fw)); freq[1] = freq[0]; freq[2] = freq[0];
      theta[0] = 24'h400000; theta[1] = 24'h400000; theta[2] = 24'h000000;
      per   = 16777216.0 / fw;                   // period in clocks
      whole = $rtoi(per * $ceil(8192.0 / per) + 0.5);
      measure(PATH_INTERNAL, whole, 0.0, 0.05, p_whole);  n_whole++;
      measure(PATH_INTERNAL, 65536, 0.0, 10.0, p_part);    n_partial++;
      conv_exp = 360.0 * 3.0 / per;
      measure(PATH_BYPASS, whole, conv_exp, 0.3, p_conv); n_conv++;
      $display("%8.1f %12.3f %16.3f %16.3f %12.3f", fk, p_whole, p_part, p_conv, conv_exp);
    end
    check(n_whole > 0 && n_partial > 0 && n_conv > 0, "all sweep modes ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
