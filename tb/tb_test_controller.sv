// tb_test_controller -- self-checking test of the measurement sequencer.
// For several sequence lengths K and settle times S it checks the cycle
// of every control output against the documented schedule: sync/clear in
// cycle 0 after start, accumulate enable in cycles S+2 .. S+K+1, done in
// cycle S+K+2, busy throughout, and that a start while busy is ignored.
module tb_test_controller;
  localparam int KW = 24, SW = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [KW-1:0] k_len = '0;
  logic [SW-1:0] settle = '0;
  logic nco_sync, acc_clear, acc_en, busy, done;
  int checks = 0, failures = 0;

  test_controller #(.KW(KW), .SW(SW)) dut (.*);
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

  task automatic run(int k, int s);
    int en_cnt;
    @(negedge clk);
    k_len = KW'(k); settle = SW'(s); start = 1;
    @(negedge clk);            // cycle 0 after the start edge
    start = 0;
    en_cnt = 0;
    for (int j = 0; j <= s + k + 3; j++) begin
      if (j == 2) start = 1;   // ignored while busy
      if (j == 3) start = 0;
      check(nco_sync  == (j == 0), "nco_sync");
      check(acc_clear == (j == 0), "acc_clear");
      check(acc_en    == (j >= s + 2 && j <= s + k + 1), "acc_en window");
      check(done      == (j == s + k + 2), "done cycle");
      check(busy      == (j <= s + k + 2), "busy");
      if (acc_en) en_cnt++;
      @(negedge clk);
    end
    check(en_cnt == k, "K accumulate cycles");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 0);
    run(10, 0);
    run(64, 3);
    run(0, 2);
    run(1000, 17);
    for (int t = 0; t < 10; t++) run($urandom_range(1, 300), $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
