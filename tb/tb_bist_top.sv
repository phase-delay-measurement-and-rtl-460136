// tb_bist_top -- end-to-end test of the BIST at its default sizes.
//
// A behavioural model of the analog side closes the loop: the DAC output
// reaches the ADC after a delay of D clock cycles, passing either through
// a first-order low-pass DUT, y += a*(x - y), or around it when the BIST
// drives its bypass switch; the ADC rounds and clips to 8 bits. The
// testbench records every sample it returns, rebuilds the oscillator
// references on its own, and predicts DC1/DC2 exactly; phase and dB
// results are then compared with atan2 and 10*log10 of those sums, and
// the phase also with the delay the model was given.
//
// Scenarios (each counted; one that never happens is a failure):
//   internal loopback: zero phase delay, exact sums
//   converter path with the DUT bypassed at delays that put the phase in
//   each of the eight octants (calibration of the converter delay)
//   DUT path: low-pass phase and gain
//   two-tone stimulus (adder + MUX1), measured at one of its tones
//   phase compensation: references shifted by a measured phase read 0
//   a non-integer number of periods (measurement error shows up)
//   settle wait before accumulating, and the measurement cycle count
module tb_bist_top;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int MAXC = 20000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0][23:0] freq, theta;
  tone_sel_e mux1_sel, mux2_sel;
  path_sel_e path_sel;
  logic [23:0] k_len;
  logic [15:0] settle;
  logic signed [7:0] dac_data, adc_data;
  logic mux3_bypass, busy, meas_done, phase_valid, phase_zero, amp_valid, amp_zero;
  logic signed [39:0] dc1, dc2;
  logic [15:0] phase, phase_offset, amp_db_out;

  bist_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_internal = 0, n_bypass = 0, n_dut = 0, n_two_tone = 0, n_comp = 0,
      n_partial = 0, n_settle = 0;
  int octant_seen [8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Samples of every cycle, recorded by the analog model in a circular
  // buffer; done_at is the buffer index of the cycle where meas_done is
  // high, which anchors a measurement's cycles without any race against
  // the stimulus process.
  int rec_n = 0, done_at = 0;
  int rec_adc [MAXC];
  int rec_dac [MAXC];

  // ---------------- analog model ----------------
  int   delay_d = 1;
  real  lp_a = 1.0, lp_y = 0.0;
  logic signed [7:0] dac_hist [64];
  always @(negedge clk) begin
    real x, v;
    for (int i = 63; i > 0; i--) dac_hist[i] = dac_hist[i-1];
    dac_hist[0] = dac_data;
    x = real'(dac_hist[delay_d]);
    lp_y = lp_y + lp_a * (x - lp_y);
    v = mux3_bypass ? x : lp_y;
    v = (v >= 0.0) ? v + 0.5 : v - 0.5;
    if (v > 127.0) v = 127.0;
    if (v < -128.0) v = -128.0;
    adc_data = 8'($rtoi(v));
    rec_adc[rec_n % MAXC] = int'(adc_data);
    rec_dac[rec_n % MAXC] = int'(dac_hist[0]);
    if (meas_done) done_at = rec_n;
    rec_n++;
  end


  function automatic int ref_sin(logic [23:0] ph);
    real s;
    s = 127.0 * $sin(2.0 * PI * real'(ph[23:14]) / 1024.0);
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic int tone_of(tone_sel_e sel, int a, int b);
    case (sel)
      TONE_NCO1: return a;
      TONE_NCO2: return b;
      default:   return (a + b) >>> 1;
    endcase
  endfunction

  function automatic real wrap180(real e);
    while (e > 180.0) e -= 360.0;
    while (e < -180.0) e += 360.0;
    return e;
  endfunction

  real  last_phase_deg, last_db;

  // One measurement. Returns the measured phase in degrees.
  task automatic measure(path_sel_e p, int k, int s, real exp_phase, real tol,
                         string tag);
    longint m1, m2;
    int j0, cyc, s0, s1, s2, sa, idx;
    real got, ref_ang, ref_db, e;
    @(negedge clk);
    path_sel = p; k_len = 24'(k); settle = 16'(s);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!meas_done && cyc < MAXC) begin @(negedge clk); cyc++; end
    @(negedge clk);   // let the analog model note the done cycle
    check(cyc == s + k + 2, {tag, ": measurement cycle count"});
    if (s > 0) n_settle++;
    // Predict the sums from the recorded samples and own references.
    // rec index j is cycle j after the start edge; accumulation uses
    // cycles s+2 .. s+k+1, the oscillators' n-th sample is in cycle n+2.
    m1 = 0; m2 = 0;
    for (int j = s + 2; j <= s + k + 1; j++) begin
      int n;
      n  = j - 2;
      s0 = ref_sin(theta[0] + 24'(n) * freq[0]);
      s1 = ref_sin(theta[1] + 24'(n) * freq[1]);
      s2 = ref_sin(theta[2] + 24'(n) * freq[2]);
      idx = (done_at - (s + k + 2) + j + MAXC) % MAXC;
      sa = (p == PATH_INTERNAL) ? tone_of(mux1_sel, s0, s1) : rec_adc[idx];
      check(rec_dac[idx] == tone_of(mux1_sel, s0, s1), {tag, ": DAC stimulus"});
      m1 += longint'(sa) * longint'(tone_of(mux2_sel, s0, s1));
      m2 += longint'(sa) * longint'(s2);
    end
    check(longint'(dc1) == m1, {tag, ": DC1"});
    check(longint'(dc2) == m2, {tag, ": DC2"});
    // Post-processing results.
    cyc = 0;
    while (!phase_valid && cyc < 100) begin @(negedge clk); cyc++; end
    check(phase_valid && cyc == 16, {tag, ": phase latency"});
    got = real'(phase) * 360.0 / 65536.0;
    ref_ang = $atan2(real'(m2), real'(m1)) * 180.0 / PI;
    e = wrap180(got - ref_ang);
    check(e < 0.012 && e > -0.012, {tag, ": phase vs atan2(DC2,DC1)"});
    e = wrap180(got - exp_phase);
    check(e < tol && e > -tol, {tag, ": phase vs analog model"});
    ref_db = 10.0 * $log10(real'(m1) * real'(m1) + real'(m2) * real'(m2));
    last_db = real'(amp_db_out) / 256.0;
    check(last_db <= ref_db + 0.01 && last_db >= ref_db - 0.27, {tag, ": dB amplitude"});
    begin
      real a1, a2;
      a1 = (m1 < 0) ? -real'(m1) : real'(m1);
      a2 = (m2 < 0) ? -real'(m2) : real'(m2);
      octant_seen[{m1 < 0, m2 < 0, a1 < a2}]++;
    end
    last_phase_deg = got;
    $display("%-28s phase %8.3f deg (model %8.3f)  amplitude %7.2f dB", tag, got,
             exp_phase, last_db);
  endtask

  // Configure a single-tone measurement at period P clocks: NCO1 cosine
  // stimulus, NCO2 cosine reference (MUX2), NCO3 sine reference.
  task automatic single_tone(int period);
    freq[0] = 24'((1 << 24) / period);
    freq[1] = freq[0];
    freq[2] = freq[0];
    theta[0] = 24'h400000;
    theta[1] = 24'h400000;
    theta[2] = 24'h000000;
    mux1_sel = TONE_NCO1;
    mux2_sel = TONE_NCO2;
  endtask

  initial begin
    real ph_exp, w, hr, hi, dre, dim, hmag;
    freq = '0; theta = '0;
    mux1_sel = TONE_NCO1; mux2_sel = TONE_NCO2; path_sel = PATH_INTERNAL;
    k_len = '0; settle = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Internal loopback: zero phase, at several frequencies.
    foreach (octant_seen[i]) octant_seen[i] = 0;
    for (int p = 0; p < 3; p++) begin
      single_tone(64 << (2 * p));
      measure(PATH_INTERNAL, 4 * (64 << (2 * p)), 0, 0.0, 0.02, "internal loopback");
      n_internal++;
    end
    check(n_internal > 0 && last_db > 0.0, "internal amplitude");

    // 2. DAC -> ADC with DUT bypassed: converter delay D gives 360*D/P deg.
    single_tone(64);
    for (int d = 4; d < 64; d += 8) begin
      delay_d = d;
      measure(PATH_BYPASS, 256, 64, 360.0 * real'(d) / 64.0, 0.3, "bypass (converter delay)");
      check(mux3_bypass == 1'b1, "analog switch set to bypass");
      n_bypass++;
    end

    // 3. Through the low-pass DUT.
    delay_d = 2;
    lp_a = 0.25;
    for (int p = 0; p < 2; p++) begin
      single_tone(32 << p);
      w  = 2.0 * PI / real'(32 << p);
      // H = a / (1 - (1-a) e^{-jw}); measured phase is the delay -arg(H)
      dre = 1.0 - (1.0 - lp_a) * $cos(w);
      dim = (1.0 - lp_a) * $sin(w);
      hr = lp_a * dre / (dre * dre + dim * dim);
      hi = -lp_a * dim / (dre * dre + dim * dim);
      hmag = $sqrt(hr * hr + hi * hi);
      ph_exp = -$atan2(hi, hr) * 180.0 / PI + 360.0 * 2.0 / real'(32 << p);
      measure(PATH_DUT, 16 * (32 << p), 100, ph_exp, 1.0, "DUT path (low-pass)");
      check(mux3_bypass == 1'b0, "analog switch set to DUT");
      n_dut++;
    end
    lp_a = 1.0;

    // 4. Two-tone stimulus: sum of NCO1 (P=64) and NCO2 (P=16), measured
    //    at the NCO1 tone, references from NCO1 (MUX2) and NCO3.
    delay_d = 8;
    freq[0] = 24'((1 << 24) / 64);
    freq[1] = 24'((1 << 24) / 16);
    freq[2] = freq[0];
    theta[0] = 24'h400000; theta[1] = 24'h000000; theta[2] = 24'h000000;
    mux1_sel = TONE_SUM;
    mux2_sel = TONE_NCO1;
    measure(PATH_BYPASS, 512, 64, 360.0 * 8.0 / 64.0, 0.5, "two-tone, tone 1");
    n_two_tone++;

    // 5. Phase compensation: measure, shift both references by the
    //    result, and the same path reads zero phase.
    single_tone(128);
    delay_d = 21;
    measure(PATH_BYPASS, 512, 64, 360.0 * 21.0 / 128.0, 0.3, "before compensation");
    theta[1] = 24'h400000 - {phase, 8'h00};
    theta[2] = 24'h000000 - {phase, 8'h00};
    measure(PATH_BYPASS, 512, 64, 0.0, 0.3, "after compensation");
    n_comp++;

    // 6. Accumulation over a non-integer number of periods: the sums stay
    //    exact, the phase deviates from the model (the 'hump' error).
    single_tone(64);
    delay_d = 4;
    measure(PATH_BYPASS, 64 * 2 + 23, 64, 360.0 * 4.0 / 64.0, 10.0, "2.36 periods");
    n_partial++;

    check(n_internal > 0, "internal loopback exercised");
    check(n_bypass > 0,   "converter bypass exercised");
    check(n_dut > 0,      "DUT path exercised");
    check(n_two_tone > 0, "two-tone stimulus exercised");
    check(n_comp > 0,     "phase compensation exercised");
    check(n_partial > 0,  "partial-period accumulation exercised");
    check(n_settle > 0,   "settle wait exercised");
    for (int o = 0; o < 8; o++) check(octant_seen[o] > 0, "octant covered");
    $display("internal %0d bypass %0d dut %0d two-tone %0d compensation %0d partial %0d settle %0d",
             n_internal, n_bypass, n_dut, n_two_tone, n_comp, n_partial, n_settle);
    $display("octants %0d %0d %0d %0d %0d %0d %0d %0d", octant_seen[0], octant_seen[1],
             octant_seen[2], octant_seen[3], octant_seen[4], octant_seen[5],
             octant_seen[6], octant_seen[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
