// tb_tsc_workloads: runs the evaluated configurations of the self-checking
// comparator side by side, each through tsc_workload_run:
//   - 16-bit comparator of 4-input LUTs (256-cycle sweep),
//   - 32-bit comparator of 4-input LUTs (512-cycle sweep, default size),
//   - 32-bit comparator of 5-input LUTs (1024-cycle sweep),
//   - background testing of a 16-bit comparator every 2000 cycles, measuring
//     the time from a random upset to its detection (about half the test
//     cycle on average).
// Finishes when all runs are done, or on the watchdog.
module tb_tsc_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;

  always #5 clk = ~clk;

  tsc_workload_run #(.N(16), .K(4), .TEST_PERIOD(0))    r_n16k4 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  tsc_workload_run #(.N(32), .K(4), .TEST_PERIOD(0))    r_n32k4 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  tsc_workload_run #(.N(32), .K(5), .TEST_PERIOD(0))    r_n32k5 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  tsc_workload_run #(.N(16), .K(4), .TEST_PERIOD(2000), .UPSETS(60)) r_bg (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  initial begin
    #(10 * 2_000_000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    #22 rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end
endmodule
