// tb_tpg -- self-checking test of the test pattern generator.
// Three oscillators are restarted with different frequency and phase
// words; for every MUX1/MUX2 setting the outputs tone, f1 and f2 are
// compared each cycle with independently computed sine samples, the
// two-tone output with floor((s1 + s2) / 2).
module tb_tpg;
  import bist_pkg::*;
  localparam int ACC_W = 24, LUT_W = 10, N = 8;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [2:0][ACC_W-1:0] freq, theta;
  tone_sel_e mux1_sel = TONE_NCO1, mux2_sel = TONE_NCO2;
  logic signed [N-1:0] tone, f1, f2;
  int checks = 0, failures = 0;

  tpg #(.ACC_W(ACC_W), .LUT_W(LUT_W), .N(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_sin(logic [ACC_W-1:0] ph);
    real s;
    s = 127.0 * $sin(2.0 * 3.14159265358979 * real'(ph[ACC_W-1 -: LUT_W]) / 1024.0);
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic int pick(tone_sel_e sel, int a, int b);
    case (sel)
      TONE_NCO1: return a;
      TONE_NCO2: return b;
      default:   return (a + b) >>> 1;
    endcase
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

  initial begin
    int s [3];
    freq = '0; theta = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m1 = 0; m1 < 3; m1++)
      for (int m2 = 0; m2 < 3; m2++) begin
        @(negedge clk);
        mux1_sel = tone_sel_e'(m1);
        mux2_sel = tone_sel_e'(m2);
        for (int k = 0; k < 3; k++) begin
          freq[k]  = ACC_W'($urandom_range(1000, 400000));
          theta[k] = ACC_W'($urandom);
        end
        sync = 1;
        @(negedge clk);
        sync = 0;
        @(negedge clk);
        for (int n = 0; n < 1000; n++) begin
          for (int k = 0; k < 3; k++) s[k] = ref_sin(theta[k] + ACC_W'(n) * freq[k]);
          check(int'(tone) == pick(mux1_sel, s[0], s[1]), "tone (MUX1)");
          check(int'(f1)   == pick(mux2_sel, s[0], s[1]), "f1 (MUX2)");
          check(int'(f2)   == s[2], "f2 (NCO3)");
          @(negedge clk);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
