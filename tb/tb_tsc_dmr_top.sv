// tb_tsc_dmr_top: end-to-end test of the self-checking comparator at its
// default size (N=32, K=4, TEST_PERIOD=100000).
// A random operand stream (equal and unequal pairs, with idle cycles) runs
// throughout. Every output cycle is checked against a reference that keeps
// its own copy of both comparators' truth tables: result must be comparator
// B's view of a==b, and sys_error must be raised exactly when the two
// comparators disagree in operation. Scenarios:
//  1. test_start while the stream is busy: the sweep waits for a hole, then
//     runs N*2^K test cycles and passes, with live results served by B.
//  2. The background timer starts the next sweep TEST_PERIOD+1 or a few more
//     cycles (until a hole) after the previous one ended.
//  3. An upset in a truth-table bit of comparator B used in operation is
//     caught by the DMR comparison (sys_error).
//  4. An upset in comparator A at an entry never used in operation is
//     invisible to the DMR check but found by the LUT test, which stops at
//     that LUT and vector.
//  5. After the bit is rewritten, a new sweep passes.
// Each mechanism is counted and must have happened at least once.
module tb_tsc_dmr_top;
  import tsc_pkg::*;
  localparam int unsigned N = 32, K = 4, P = 100_000, SW = 5;
  localparam int unsigned SWEEP = N * (2**K);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid;
  logic [N-1:0]  data_a, data_b;
  logic          out_valid, result, sys_error;
  logic          test_start, test_mode, test_busy, test_error, test_pass;
  logic [SW-1:0] fail_lut;
  logic [K-1:0]  fail_addr;
  logic          fail_tree;
  logic          cfg_we, cfg_comp;
  logic [SW-1:0] cfg_lut;
  logic [K-1:0]  cfg_addr;
  logic          cfg_din;

  tsc_dmr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hole_wait = 0, n_sweep_pass = 0, n_sweep_fail = 0, n_periodic = 0;
  int n_dmr_error = 0, n_live_in_test = 0, n_equal = 0, n_unequal = 0;
  int test_cycles = 0;

  // Reference truth tables of comparators A and B.
  logic [2**K-1:0] ta [N], tbl [N];

  // Stream control.
  bit      stream_busy = 1'b1;  // no idle cycles while set
  bit      target_b7   = 1'b0;  // favour operands that reach B's upset entry

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic ref_eq(input logic [N-1:0] a, input logic [N-1:0] b, input bit use_a);
    logic r = 1'b1;
    for (int i = 0; i < N; i++) begin
      logic [K-1:0] ad = K'({a[i], b[i]});
      r &= use_a ? ta[i][ad] : tbl[i][ad];
    end
    return r;
  endfunction

  // Stimulus: new operands each negedge.
  always @(negedge clk) begin
    if (rst_n) begin
      logic [N-1:0] va, vb;
      va = N'($urandom);
      case ($urandom_range(0, 3))
        0: vb = N'($urandom);
        1: vb = va;
        default: vb = va ^ (N'(1) << $urandom_range(0, N - 1));
      endcase
      if (target_b7 && $urandom_range(0, 1) == 0) begin
        va[7] = 1'b0;
        vb    = va;
        vb[7] = 1'b1;
      end
      in_valid <= stream_busy ? 1'b1 : ($urandom_range(0, 3) != 0);
      data_a   <= va;
      data_b   <= vb;
    end
  end

  // Reference check of the registered outputs, one cycle behind the inputs.
  logic w_valid = 1'b0, w_result = 1'b0, w_error = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      logic ra, rb;
      check(out_valid == w_valid, "out_valid");
      if (w_valid) begin
        check(result == w_result, "result equals comparator B's view");
        check(sys_error == w_error, "sys_error");
        if (sys_error) n_dmr_error++;
      end
      ra = ref_eq(data_a, data_b, 1'b1);
      rb = ref_eq(data_a, data_b, 1'b0);
      w_valid  = in_valid;
      w_result = rb;
      w_error  = in_valid && !test_mode && (ra != rb);
      if (in_valid && test_mode) n_live_in_test++;
      if (in_valid && (data_a == data_b)) n_equal++;
      if (in_valid && (data_a != data_b)) n_unequal++;
      if (test_mode) test_cycles++;
      if (test_busy && !test_mode && in_valid) n_hole_wait++;
    end
  end

  task automatic cfg_write(input bit comp, input int lut, input int ad, input logic v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_comp = comp; cfg_lut = SW'(lut); cfg_addr = K'(ad); cfg_din = v;
    @(posedge clk);
    if (comp) tbl[lut][ad] = v; else ta[lut][ad] = v;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Waits for the current/next sweep to finish; returns its test cycles.
  task automatic wait_sweep(output int cyc);
    while (!test_mode) @(posedge clk);
    test_cycles = 0;
    while (test_mode) @(posedge clk);
    #1 cyc = test_cycles;
  endtask

  initial begin
    #(10 * 400_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, gap;
    for (int i = 0; i < N; i++) begin
      ta[i]  = (2**K)'(eq_lut_init(K));
      tbl[i] = (2**K)'(eq_lut_init(K));
      for (int v = 0; v < 2**K; v++) begin
        // independent statement of the LUT rule: inputs 1 and 0 equal
        if (ta[i][v] != (((v >> 1) & 1) == (v & 1))) $display("FAIL: reference init");
      end
    end
    in_valid = 0; data_a = '0; data_b = '0; test_start = 0;
    cfg_we = 0; cfg_comp = 0; cfg_lut = '0; cfg_addr = '0; cfg_din = 0;
    #22 rst_n = 1'b1;
    repeat (200) @(posedge clk);

    // 1. requested sweep, held until the stream has a hole
    @(negedge clk) test_start = 1;
    @(negedge clk) test_start = 0;
    repeat (20) @(posedge clk);
    check(test_busy && !test_mode, "request pending while the stream is busy");
    stream_busy = 1'b0;
    wait_sweep(cyc);
    check(cyc == SWEEP, $sformatf("sweep took %0d test cycles, want %0d", cyc, SWEEP));
    check(test_pass && !test_error, "fault-free sweep passes");
    if (test_pass) n_sweep_pass++;

    // 2. background sweep after TEST_PERIOD
    gap = 0;
    while (!test_mode) begin
      @(posedge clk); #1;
      gap++;
    end
    check(gap >= P + 1 && gap <= P + 40, $sformatf("background gap %0d cycles", gap));
    if (gap >= P + 1) n_periodic++;
    wait_sweep(cyc);
    check(cyc == SWEEP && test_pass, "background sweep passes");
    if (test_pass) n_sweep_pass++;

    // 3. upset in comparator B, entry (A=0,B=1) of LUT 7: DMR mismatch
    cfg_write(1'b1, 7, 1, 1'b1);
    target_b7 = 1'b1;
    repeat (300) @(posedge clk);
    target_b7 = 1'b0;
    check(n_dmr_error > 0, "DMR mismatch raised by the upset in B");
    cfg_write(1'b1, 7, 1, 1'b0);

    // 4. upset in comparator A at an entry unused in operation
    begin
      int dmr_before;
      dmr_before = n_dmr_error;
      cfg_write(1'b0, 20, 12, 1'b0);
      repeat (500) @(posedge clk);
      check(n_dmr_error == dmr_before, "unused-entry upset is invisible to DMR");
    end
    @(negedge clk) test_start = 1;
    @(negedge clk) test_start = 0;
    wait_sweep(cyc);
    check(cyc == 20 * (2**K) + 12 + 1, $sformatf("failing sweep stopped after %0d cycles", cyc));
    check(test_error && !test_pass && fail_lut == 5'd20 && fail_addr == 4'd12 && !fail_tree,
          $sformatf("diagnosis: err=%b lut=%0d vec=%0d", test_error, fail_lut, fail_addr));
    if (test_error) n_sweep_fail++;

    // 5. rewrite the bit and test again
    cfg_write(1'b0, 20, 12, 1'b1);
    @(negedge clk) test_start = 1;
    @(negedge clk) test_start = 0;
    wait_sweep(cyc);
    check(cyc == SWEEP && test_pass && !test_error, "sweep passes after repair");
    if (test_pass) n_sweep_pass++;
    repeat (50) @(posedge clk);

    $display("mechanisms: hole_wait=%0d sweep_pass=%0d sweep_fail=%0d periodic=%0d dmr_error=%0d live_in_test=%0d equal=%0d unequal=%0d",
             n_hole_wait, n_sweep_pass, n_sweep_fail, n_periodic, n_dmr_error,
             n_live_in_test, n_equal, n_unequal);
    check(n_hole_wait > 0,    "a test request waited for a hole");
    check(n_sweep_pass > 0,   "a sweep passed");
    check(n_sweep_fail > 0,   "a sweep found an upset");
    check(n_periodic > 0,     "a background sweep ran");
    check(n_dmr_error > 0,    "the DMR check fired");
    check(n_live_in_test > 0, "live data was compared during a test");
    check(n_equal > 0 && n_unequal > 0, "both equal and unequal operands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
