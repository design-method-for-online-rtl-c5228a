// tsc_dmr_top: online totally self-checking comparator with DMR and a LUT
// test interface.
//
// Two identical N-bit LUT comparators (A and B) compare the operand streams
// data_a and data_b. While the T/O selector is in operate mode, the DMR voter
// checks that both agree. When a test sweep runs (on test_start or every
// TEST_PERIOD cycles, started in the first idle cycle of the stream),
// comparator A is switched to test mode: the pattern generator drives the
// address lines of one LUT at a time with all 2^K vectors, the evaluator
// compares the raw LUT output and the AND-tree output against the Gold ROM,
// and the voter takes its result from comparator B alone. A sweep takes
// N*2^K cycles; a mismatch ends it and reports the failing LUT and vector.
// Ports: data_a/data_b/in_valid in, result/out_valid/sys_error out one cycle
// later; test_start in; test_mode, test_busy, test_error, test_pass,
// fail_lut, fail_addr, fail_tree out. cfg_* write one truth-table bit of one
// LUT of comparator A (cfg_comp=0) or B (cfg_comp=1): the configuration
// memory of the LUTs, through which an upset can be injected or repaired. One clock
// serves the data path and the test logic.
// The block structure (two comparators, T/O switch, LUT test controller and
// pattern generator, Gold ROM, error evaluation, DMR voter) follows the
// described architecture; the widths of the status ports, the single clock
// and the configuration port are this implementation's choices.
module tsc_dmr_top
  import tsc_pkg::*;
#(
  parameter int unsigned N           = 32,
  parameter int unsigned K           = 4,
  parameter int unsigned TEST_PERIOD = 100_000,
  parameter int unsigned SW          = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // operand stream
  input  logic          in_valid,
  input  logic [N-1:0]  data_a,
  input  logic [N-1:0]  data_b,
  // analysed comparison result
  output logic          out_valid,
  output logic          result,
  output logic          sys_error,
  // LUT test interface
  input  logic          test_start,
  output logic          test_mode,
  output logic          test_busy,
  output logic          test_error,
  output logic          test_pass,
  output logic [SW-1:0] fail_lut,
  output logic [K-1:0]  fail_addr,
  output logic          fail_tree,
  // LUT configuration memory access
  input  logic          cfg_we,
  input  logic          cfg_comp,
  input  logic [SW-1:0] cfg_lut,
  input  logic [K-1:0]  cfg_addr,
  input  logic          cfg_din
);

  to_mode_e      mode;
  logic [K-1:0]  test_addr;
  logic [SW-1:0] test_sel;
  logic          sweep_start, sweep_done;
  logic          next_pattern, pattern_fail;
  logic          expected;
  dual_rail_t    eq_a, eq_b;
  logic          err_a, err_b;
  logic [N-1:0]  raw_a;

  tsc_comparator #(.N(N), .K(K), .SW(SW)) u_comp_a (
    .clk       (clk),
    .rst_n     (rst_n),
    .a         (data_a),
    .b         (data_b),
    .mode      (mode),
    .test_addr (test_addr),
    .test_sel  (test_sel),
    .cfg_we    (cfg_we && !cfg_comp),
    .cfg_lut   (cfg_lut),
    .cfg_addr  (cfg_addr),
    .cfg_din   (cfg_din),
    .eq        (eq_a),
    .err       (err_a),
    .lut_raw   (raw_a)
  );

  tsc_comparator #(.N(N), .K(K), .SW(SW)) u_comp_b (
    .clk       (clk),
    .rst_n     (rst_n),
    .a         (data_a),
    .b         (data_b),
    .mode      (MODE_OPERATE),
    .test_addr ('0),
    .test_sel  ('0),
    .cfg_we    (cfg_we && cfg_comp),
    .cfg_lut   (cfg_lut),
    .cfg_addr  (cfg_addr),
    .cfg_din   (cfg_din),
    .eq        (eq_b),
    .err       (err_b),
    .lut_raw   ()
  );

  tsc_test_ctrl #(.N(N), .K(K), .TEST_PERIOD(TEST_PERIOD), .SW(SW)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .test_start   (test_start),
    .in_valid     (in_valid),
    .next_pattern (next_pattern),
    .pattern_fail (pattern_fail),
    .mode         (mode),
    .test_addr    (test_addr),
    .test_sel     (test_sel),
    .sweep_start  (sweep_start),
    .sweep_done   (sweep_done),
    .busy         (test_busy)
  );

  tsc_gold_rom #(.K(K)) u_gold (
    .addr     (test_addr),
    .expected (expected)
  );

  tsc_error_eval #(.N(N), .K(K), .SW(SW)) u_eval (
    .clk          (clk),
    .rst_n        (rst_n),
    .mode         (mode),
    .test_sel     (test_sel),
    .test_addr    (test_addr),
    .lut_raw      (raw_a),
    .eq           (eq_a),
    .comp_err     (err_a),
    .expected     (expected),
    .sweep_start  (sweep_start),
    .sweep_done   (sweep_done),
    .next_pattern (next_pattern),
    .pattern_fail (pattern_fail),
    .test_error   (test_error),
    .test_pass    (test_pass),
    .fail_lut     (fail_lut),
    .fail_addr    (fail_addr),
    .fail_tree    (fail_tree)
  );

  dmr_voter u_voter (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .in_valid  (in_valid),
    .eq_a      (eq_a),
    .err_a     (err_a),
    .eq_b      (eq_b),
    .err_b     (err_b),
    .out_valid (out_valid),
    .result    (result),
    .sys_error (sys_error)
  );

  assign test_mode = (mode == MODE_TEST);

endmodule
