// tb_tsc_test_ctrl: self-checking test of the test controller / pattern
// generator (N=4, K=3, TEST_PERIOD=200).
// 1. A test_start request is held off while the stream is busy and starts
//    in the first idle cycle.
// 2. The sweep visits every (LUT, vector) pair in order, one per cycle, and
//    lasts N*2^K cycles, with sweep_start/sweep_done on its first/last cycle.
// 3. A held next_pattern stalls the generator on its vector.
// 4. The background timer starts the next sweep TEST_PERIOD+1 cycles after
//    the previous one ended (period, then one cycle to find a hole).
// 5. pattern_fail ends a sweep at once without sweep_done.
module tb_tsc_test_ctrl;
  import tsc_pkg::*;
  localparam int unsigned N = 4, K = 3, P = 200, SW = 2;
  localparam int unsigned SWEEP = N * (2**K);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          test_start, in_valid, next_pattern, pattern_fail;
  to_mode_e      mode;
  logic [K-1:0]  test_addr;
  logic [SW-1:0] test_sel;
  logic          sweep_start, sweep_done, busy;
  int checks = 0, failures = 0;

  tsc_test_ctrl #(.N(N), .K(K), .TEST_PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one sweep from its first test cycle with next_pattern held high,
  // checking order, pulses and length.
  task automatic run_sweep();
    int n = 0;
    while (mode == MODE_TEST) begin
      check(int'(test_sel) == n / (2**K) && int'(test_addr) == n % (2**K),
            $sformatf("vector %0d: sel=%0d addr=%0d", n, test_sel, test_addr));
      check(sweep_start == (n == 0), "sweep_start only on the first cycle");
      check(sweep_done == (n == SWEEP - 1), "sweep_done only on the last cycle");
      n++;
      @(posedge clk); #1;
      if (n > SWEEP + 2) break;
    end
    check(n == SWEEP, $sformatf("sweep length %0d, want %0d", n, SWEEP));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    test_start = 0; in_valid = 1; next_pattern = 1; pattern_fail = 0;
    #12 rst_n = 1'b1;
    // 1. request while the stream is busy
    @(negedge clk) test_start = 1;
    @(negedge clk) test_start = 0;
    repeat (10) begin
      @(posedge clk); #1;
      check(mode == MODE_OPERATE && busy, "request waits for an idle cycle");
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    check(mode == MODE_TEST, "test starts in the idle cycle");
    // 2. full sweep
    run_sweep();
    check(mode == MODE_OPERATE && !busy, "back to operation after the sweep");
    // 4. background period (in_valid stays 0)
    gap = 0;
    while (mode != MODE_TEST && gap < 2 * P) begin
      gap++;
      @(posedge clk); #1;
    end
    check(gap == P + 1, $sformatf("gap between sweeps %0d, want %0d", gap, P + 1));
    // 3. stall on a held next_pattern, in the middle of this sweep
    repeat (5) @(posedge clk);
    #1;
    begin
      logic [K-1:0]  a0;
      logic [SW-1:0] s0;
      a0 = test_addr;
      s0 = test_sel;
      @(negedge clk) next_pattern = 0;
      repeat (4) begin
        @(posedge clk); #1;
        check(test_addr == a0 && test_sel == s0 && mode == MODE_TEST, "stalled vector held");
      end
      @(negedge clk) next_pattern = 1;
    end
    // 5. abort
    repeat (3) @(posedge clk);
    @(negedge clk) pattern_fail = 1;
    #1 check(!sweep_done, "no sweep_done on a failing vector");
    @(posedge clk); #1;
    pattern_fail = 0;
    check(mode == MODE_OPERATE && !busy, "pattern_fail ends the sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
