// tb_nco -- self-checking test of the numerically controlled oscillator.
// Checks the phase accumulator against phase(t) = theta + k*freq, every
// output sample against an independently computed rounded sine of the
// truncated phase, the two-cycle sync-to-sample latency, and the output
// period freq = 2**24/64 -> 64 clocks (f_out = freq * f_clk / 2**n).
module tb_nco;
  localparam int ACC_W = 24, LUT_W = 10, OUT_W = 8;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [ACC_W-1:0] freq = '0, theta = '0, phase;
  logic signed [OUT_W-1:0] sample;
  int checks = 0, failures = 0;

  nco #(.ACC_W(ACC_W), .LUT_W(LUT_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_sin(logic [ACC_W-1:0] ph);
    real s;
    s = 127.0 * $sin(2.0 * 3.14159265358979 * real'(ph[ACC_W-1 -: LUT_W]) / 1024.0);
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [ACC_W-1:0] f, logic [ACC_W-1:0] th, int n);
    logic [ACC_W-1:0] exp_ph;
    int hist [$];
    @(negedge clk);
    freq = f; theta = th; sync = 1;
    @(negedge clk);            // cycle 1: accumulator holds theta
    sync = 0;
    check(phase == th, "phase load");
    exp_ph = th;
    @(negedge clk);            // cycle 2: first sample = sin(theta)
    check(int'(sample) == ref_sin(th), "first sample latency");
    for (int k = 0; k < n; k++) begin
      // sample in cycle j is sin(theta + (j-2)*freq)
      check(int'(sample) == ref_sin(th + ACC_W'(k) * f), "sample");
      check(phase == th + ACC_W'(k + 1) * f, "phase accumulate");
      hist.push_back(int'(sample));
      @(negedge clk);
    end
    if (f == ACC_W'(2 ** ACC_W / 64))
      for (int k = 64; k < n; k++) check(hist[k] == hist[k-64], "period 64");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(24'(2 ** 24 / 64), 24'h000000, 300);
    run(24'(2 ** 24 / 64), 24'h400000, 200);   // cosine
    run(24'd12345, 24'h123456, 3000);
    for (int t = 0; t < 5; t++) run(24'($urandom), 24'($urandom), 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
