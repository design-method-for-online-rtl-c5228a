// tsc_workload_run: testbench harness that runs one tsc_dmr_top
// configuration and checks it, for use by tb_tsc_workloads.
//
// With TEST_PERIOD = 0 (sizes): one sweep of a fault-free comparator must
// take N*2^K test cycles and pass; then UPSETS random truth-table bits of
// comparator A are flipped one at a time, and each requested sweep must stop
// after lut*2^K + entry + 1 cycles, naming that LUT and entry; the bit is
// then rewritten. An upset in entry 0 (the entry that holds untested LUTs
// at 1) of a LUT other than 0 fails the first vector through the tree and
// must be reported with fail_tree; the first upset of a run is of that kind.
// With TEST_PERIOD > 0 (background test): UPSETS upsets are injected at
// random moments and the time to test_error is measured. The mean must lie
// between 0.3 and 0.7 of the test cycle length C = TEST_PERIOD + 1 + N*2^K
// (an upset is found on average about half a cycle later), and no detection
// may take longer than C + N*2^K + 64 cycles.
// A random operand stream with idle cycles runs throughout. done rises when
// the run has finished; checks/failures count its checks.
module tsc_workload_run #(
  parameter int unsigned N           = 16,
  parameter int unsigned K           = 4,
  parameter int unsigned TEST_PERIOD = 0,
  parameter int unsigned UPSETS      = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned SW    = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned SWEEP = N * (2**K);
  localparam int unsigned C     = TEST_PERIOD + 1 + SWEEP;

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

  tsc_dmr_top #(.N(N), .K(K), .TEST_PERIOD(TEST_PERIOD)) dut (.*);

  int test_cycles = 0;
  int n_tree = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      data_a   <= N'($urandom);
      data_b   <= N'($urandom);
    end
  end

  always @(posedge clk) if (test_mode) test_cycles++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (N=%0d K=%0d P=%0d): %s", N, K, TEST_PERIOD, what);
    end
  endtask

  function automatic logic rule(input int v);
    return ((v >> 1) & 1) == (v & 1);
  endfunction

  task automatic cfg_write(input int lut, input int ad, input logic v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_comp = 1'b0; cfg_lut = SW'(lut); cfg_addr = K'(ad); cfg_din = v;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic requested_sweep(output int cyc);
    @(negedge clk) test_start = 1'b1;
    @(negedge clk) test_start = 1'b0;
    while (!test_mode) @(posedge clk);
    test_cycles = 0;
    while (test_mode) @(posedge clk);
    #1 cyc = test_cycles;
  endtask

  initial begin
    int cyc, lut, ent, t0, lat, lat_sum, lat_max;
    done = 0; checks = 0; failures = 0;
    in_valid = 0; data_a = '0; data_b = '0; test_start = 0;
    cfg_we = 0; cfg_comp = 0; cfg_lut = '0; cfg_addr = '0; cfg_din = 0;
    @(posedge rst_n);
    repeat (5) @(posedge clk);
    if (TEST_PERIOD == 0) begin
      requested_sweep(cyc);
      check(cyc == SWEEP && test_pass, $sformatf("fault-free sweep %0d cycles, want %0d", cyc, SWEEP));
      for (int u = 0; u < UPSETS; u++) begin
        lut = $urandom_range(0, N - 1);
        ent = (u == 0) ? 0 : $urandom_range(0, 2**K - 1);
        if (u == 0 && lut == 0) lut = 1;
        cfg_write(lut, ent, !rule(ent));
        requested_sweep(cyc);
        if (ent == 0 && lut != 0) begin
          // entry 0 is the isolation entry: the tree fails on the first
          // vector of the sweep, while LUT 0 itself answers correctly
          check(cyc == 1 && test_error && fail_tree, "isolation-entry upset flagged as tree failure");
          n_tree++;
        end else begin
          check(cyc == lut * (2**K) + ent + 1, $sformatf("upset sweep %0d cycles", cyc));
          check(test_error && !test_pass && !fail_tree && int'(fail_lut) == lut && int'(fail_addr) == ent,
                $sformatf("diagnosis lut %0d/%0d entry %0d/%0d", fail_lut, lut, fail_addr, ent));
        end
        cfg_write(lut, ent, rule(ent));
      end
      requested_sweep(cyc);
      check(cyc == SWEEP && test_pass, "sweep passes after the last repair");
      $display("sizes N=%0d K=%0d: sweep %0d cycles, %0d upsets located, %0d of them as tree failures",
               N, K, SWEEP, UPSETS, n_tree);
      check(n_tree > 0, "an isolation-entry upset was exercised");
    end else begin
      lat_sum = 0; lat_max = 0;
      for (int u = 0; u < UPSETS; u++) begin
        // wait for a clean sweep, then a random moment within one cycle
        while (!test_pass) @(posedge clk);
        repeat ($urandom_range(1, C)) @(posedge clk);
        lut = $urandom_range(0, N - 1);
        ent = $urandom_range(0, 2**K - 1);
        cfg_write(lut, ent, !rule(ent));
        t0 = $time / 10;
        while (!test_error) @(posedge clk);
        lat = $time / 10 - t0;
        lat_sum += lat;
        if (lat > lat_max) lat_max = lat;
        if (ent == 0 && lut != 0) check(fail_tree, "background isolation-entry upset");
        else check(int'(fail_lut) == lut && int'(fail_addr) == ent && !fail_tree, "background diagnosis");
        cfg_write(lut, ent, rule(ent));
      end
      $display("background test: period %0d, cycle %0d, mean detection %0d cycles, max %0d",
               TEST_PERIOD, C, lat_sum / UPSETS, lat_max);
      check(lat_sum / UPSETS >= (3 * C) / 10 && lat_sum / UPSETS <= (7 * C) / 10,
            "mean detection time about half a test cycle");
      check(lat_max <= C + SWEEP + 64, "every upset found within one cycle plus a sweep");
    end
    done = 1;
  end
endmodule
