// tb_ora -- self-checking test of the output response analyzer.
// Random stimulus, ADC samples and references, with the MUX4 choice
// changed between runs; DC1 = sum f*f1 and DC2 = sum f*f2 are compared
// with reference sums, and f_sample with the selected input.
module tb_ora;
  localparam int N = 8, M = 40;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, use_adc = 0;
  logic signed [N-1:0] tone = '0, adc = '0, f1 = '0, f2 = '0, f_sample;
  logic signed [M-1:0] dc1, dc2;
  longint m1 = 0, m2 = 0;
  int checks = 0, failures = 0;

  ora #(.N(N), .M(M)) dut (.*);
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
    for (int run = 0; run < 8; run++) begin
      @(negedge clk);
      clear = 1; en = 0; use_adc = run[0];
      m1 = 0; m2 = 0;
      @(negedge clk);
      clear = 0;
      for (int k = 0; k < 2000; k++) begin
        check(longint'(dc1) == m1, "dc1");
        check(longint'(dc2) == m2, "dc2");
        tone = N'($urandom); adc = N'($urandom);
        f1 = N'($urandom);   f2 = N'($urandom);
        en = (k < 1990);
        #1;
        check(f_sample == (use_adc ? adc : tone), "mux4");
        if (en) begin
          m1 += longint'(f_sample) * longint'(f1);
          m2 += longint'(f_sample) * longint'(f2);
        end
        @(negedge clk);
      end
      check(longint'(dc1) == m1 && longint'(dc2) == m2, "final dc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
