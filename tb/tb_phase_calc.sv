// tb_phase_calc -- self-checking test of the phase-from-DC1/DC2 unit.
// Vectors cover all eight octants of the octant table, the small-ratio
// (linear) region, equal magnitudes, the axes, full-scale and tiny
// magnitudes and random pairs. Each result is compared with atan2(DC2,
// DC1) computed in floating point (tolerance 2 binary-angle LSBs, about
// 0.011 deg), and the start-to-valid latency must be R+3 = 17 cycles.
module tb_phase_calc;
  localparam int M = 40, AW = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [M-1:0] dc1 = '0, dc2 = '0;
  logic busy, valid, zero;
  logic [AW-1:0] phase, offset;
  int checks = 0, failures = 0;
  int octant_seen [8];
  int small_seen = 0;

  phase_calc #(.M(M), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint a, longint b);
    int lat;
    real ang, got, err, mn, mx;
    @(negedge clk);
    dc1 = M'(a); dc2 = M'(b); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!valid && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 17, "latency R+3");
    if (a == 0 && b == 0) begin
      check(zero && phase == '0, "zero input");
      return;
    end
    check(!zero, "zero flag");
    ang = $atan2(real'(b), real'(a)) * 180.0 / PI;
    if (ang < 0.0) ang += 360.0;
    got = real'(phase) * 360.0 / 65536.0;
    err = got - ang;
    if (err > 180.0) err -= 360.0;
    if (err < -180.0) err += 360.0;
    if (err < 0.0) err = -err;
    checks++;
    if (err > 2.0 * 360.0 / 65536.0) begin
      failures++;
      if (failures < 10) $display("FAIL dc1=%0d dc2=%0d phase=%f exp=%f", a, b, got, ang);
    end
    // octant bookkeeping: signs and |DC1| < |DC2|
    mn = (a < 0) ? -real'(a) : real'(a);
    mx = (b < 0) ? -real'(b) : real'(b);
    octant_seen[{a < 0, b < 0, mn < mx}]++;
    if ((mn < mx ? mn / mx : mx / mn) < 1.0 / 16.0) small_seen++;
  endtask

  initial begin
    longint big;
    big = longint'(1) << (M - 2);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 360; d += 5) begin
      run(longint'(1.0e9 * $cos(real'(d) * PI / 180.0 + 0.001)),
          longint'(1.0e9 * $sin(real'(d) * PI / 180.0 + 0.001)));
    end
    run(0, 0);
    run(1000, 0); run(0, 1000); run(-1000, 0); run(0, -1000);
    run(777, 777); run(-777, 777); run(-777, -777); run(777, -777);
    run(big, 1); run(1, big); run(-big, -3); run(5, -big);
    run(-(longint'(1) << (M - 1)), 12345);
    run(100000, 3000); run(-100000, 6200); run(2000, 100000);
    run(3, 1); run(1, 2);
    for (int t = 0; t < 1500; t++)
      run(longint'($signed(M'({$urandom, $urandom}))) >>> $urandom_range(0, 30),
          longint'($signed(M'({$urandom, $urandom}))) >>> $urandom_range(0, 30));
    for (int o = 0; o < 8; o++) check(octant_seen[o] > 0, "octant covered");
    check(small_seen > 0, "small-ratio path covered");
    $display("octants: %0d %0d %0d %0d %0d %0d %0d %0d, small ratio %0d",
             octant_seen[0], octant_seen[1], octant_seen[2], octant_seen[3],
             octant_seen[4], octant_seen[5], octant_seen[6], octant_seen[7], small_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
