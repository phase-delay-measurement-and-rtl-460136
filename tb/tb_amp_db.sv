// tb_amp_db -- self-checking test of the dB amplitude unit.
// For each (DC1, DC2) pair the expected output is formed independently:
// S = DC1^2 + DC2^2 with exact 128-bit integers, e = index of its leading
// one, x = next 10 bits, db = round(3.0103 * (e + x/1024) * 256). The
// result must match within one LSB and lie within 0.27 dB below the true
// 10*log10(S). The pipeline is issued back to back and the latency of
// four cycles is checked.
module tb_amp_db;
  localparam int M = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [M-1:0] dc1 = '0, dc2 = '0;
  logic valid, zero;
  logic [15:0] db;
  int checks = 0, failures = 0;
  real exp_q [$];
  real true_q [$];
  bit  zero_q [$];
  int  issue_cyc [$];
  int  cyc = 0;

  amp_db #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(longint a, longint b);
    logic [127:0] s;
    int e;
    real x, lg;
    begin
      logic signed [127:0] aa, bb;
      aa = 128'(a); bb = 128'(b);
      s = 128'(aa * aa) + 128'(bb * bb);
    end
    zero_q.push_back(s == 0);
    e = 0;
    for (int i = 0; i < 128; i++) if (s[i]) e = i;
    x = 0.0;
    for (int i = 1; i <= 10; i++) if (e - i >= 0 && s[e - i]) x += 2.0 ** (-i);
    lg = real'(e) + x;
    exp_q.push_back(s == 0 ? 0.0 : $floor(lg * 1024.0 * 49321.0 / 16384.0 / 4.0 + 0.5) / 256.0);
    true_q.push_back(s == 0 ? 0.0 : 10.0 * $log10(real'(a) * real'(a) + real'(b) * real'(b)));
    issue_cyc.push_back(cyc);
  endtask

  always @(negedge clk) if (rst_n && valid) begin
    real e, t, g;
    e = exp_q.pop_front();
    t = true_q.pop_front();
    g = real'(db) / 256.0;
    checks += 3;
    if (cyc - issue_cyc.pop_front() != 4) begin
      failures++; $display("FAIL latency");
    end
    if (zero != zero_q.pop_front()) begin failures++; $display("FAIL zero flag"); end
    if (g - e > 1.0 / 256.0 || e - g > 1.0 / 256.0 ||
        (!zero && (g > t + 0.01 || g < t - 0.27))) begin
      failures++;
      if (failures < 10) $display("FAIL db=%f exp=%f true=%f", g, e, t);
    end
  end

  initial begin
    longint a, b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: begin a = 0; b = 0; end
        1: begin a = 1; b = 0; end
        2: begin a = -(longint'(1) << (M - 1)); b = -(longint'(1) << (M - 1)); end
        3: begin a = 3; b = -4; end
        4: begin a = 1 << 20; b = 0; end
        default: begin
          a = longint'($signed(M'({$urandom, $urandom}))) >>> $urandom_range(0, 38);
          b = longint'($signed(M'({$urandom, $urandom}))) >>> $urandom_range(0, 38);
        end
      endcase
      dc1 = M'(a); dc2 = M'(b);
      start = 1;
      push(a, b);
      @(negedge clk);
      start = ($urandom_range(0, 3) != 0);
      if (!start) @(negedge clk);
    end
    start = 0;
    repeat (10) @(negedge clk);
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
