// tb_mac -- self-checking test of the multiplier/accumulator pair at the
// default size (N=8, M=40) and at two other tabulated sizes (N=12, M=32
// and N=16, M=44). All three get random signed operands, random enable
// and occasional clear; each accumulator is compared every cycle with a
// 64-bit reference sum. Full-scale products (-2**(N-1))**2 are included.
module tb_mac;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic signed [15:0] a = '0, b = '0;        // drawn at 16 bits
  logic signed [7:0]  a8, b8;
  logic signed [11:0] a12, b12;
  logic signed [39:0] acc8;
  logic signed [31:0] acc12;
  logic signed [43:0] acc16;
  longint m8 = 0, m12 = 0, m16 = 0;
  int checks = 0, failures = 0;

  assign a8  = a[15:8];  assign b8  = b[15:8];
  assign a12 = a[15:4];  assign b12 = b[15:4];

  mac #(.N(8),  .M(40)) dut8  (.clk, .rst_n, .clear, .en, .a(a8),  .b(b8),  .acc(acc8));
  mac #(.N(12), .M(32)) dut12 (.clk, .rst_n, .clear, .en, .a(a12), .b(b12), .acc(acc12));
  mac #(.N(16), .M(44)) dut16 (.clk, .rst_n, .clear, .en, .a(a),   .b(b),   .acc(acc16));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      check(longint'(acc8)  == m8,  "N=8 M=40");
      check(longint'(acc12) == m12, "N=12 M=32");
      check(longint'(acc16) == m16, "N=16 M=44");
      clear = ($urandom_range(0, 999) == 0);
      en    = ($urandom_range(0, 9) != 0);
      a     = 16'($urandom);
      b     = 16'($urandom);
      if (k < 5) begin a = 16'h8000; b = 16'h8000; en = 1; clear = 0; end
      #1;
      if (clear) begin
        m8 = 0; m12 = 0; m16 = 0;
      end else if (en) begin
        m8  += longint'(a8)  * longint'(b8);
        m12 += longint'(a12) * longint'(b12);
        m16 += longint'(a)   * longint'(b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
