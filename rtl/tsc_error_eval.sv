// tsc_error_eval: result evaluator of the LUT test.
//
// In every test cycle it compares the response of comparator A with the
// expected response from the Gold ROM. Two responses are checked: the raw
// output of the LUT under test (selected from lut_raw by test_sel) and the
// AND-tree output, which carries the same value because the untested LUTs
// are held at a 1-response vector. A non-code word on the comparator's dual
// rails also counts as a mismatch. A match raises next_pattern (the
// generator advances); a mismatch raises pattern_fail (the sweep stops).
// Status registers: test_error is set on a mismatch and kept until the next
// sweep starts, together with the LUT index and test vector at which the
// sweep stopped; test_pass is set when a sweep completes and cleared when one
// starts. fail_tree marks a failure in which the tested LUT itself answered
// correctly but the tree result was wrong: the fault is then in the tree or
// in the isolation entry (address 0) of some other LUT, and fail_lut only
// says where the sweep was.
// Timing: next_pattern/pattern_fail are combinational in the test cycle;
// status registers update at the following rising edge.
// Comparing LUT outputs with precomputed expected responses and driving the
// next pattern follow the described method; checking the tree output and
// the dual rails, and the status registers, are this implementation's choice.
module tsc_error_eval
  import tsc_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned K  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  to_mode_e      mode,
  input  logic [SW-1:0] test_sel,
  input  logic [K-1:0]  test_addr,
  input  logic [N-1:0]  lut_raw,
  input  dual_rail_t    eq,
  input  logic          comp_err,
  input  logic          expected,
  input  logic          sweep_start,
  input  logic          sweep_done,
  output logic          next_pattern,
  output logic          pattern_fail,
  output logic          test_error,
  output logic          test_pass,
  output logic [SW-1:0] fail_lut,
  output logic [K-1:0]  fail_addr,
  output logic          fail_tree
);

  logic raw_bad, tree_bad, mismatch;

  assign raw_bad  = (lut_raw[test_sel] != expected);
  assign tree_bad = (eq != (expected ? DR_TRUE : DR_FALSE)) || comp_err;
  assign mismatch = raw_bad || tree_bad;

  assign next_pattern = (mode == MODE_TEST) && !mismatch;
  assign pattern_fail = (mode == MODE_TEST) && mismatch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_error <= 1'b0;
      test_pass  <= 1'b0;
      fail_lut   <= '0;
      fail_addr  <= '0;
      fail_tree  <= 1'b0;
    end else begin
      if (sweep_start) begin
        test_error <= 1'b0;
        test_pass  <= 1'b0;
      end
      if (pattern_fail) begin
        test_error <= 1'b1;
        fail_lut   <= test_sel;
        fail_addr  <= test_addr;
        fail_tree  <= !raw_bad;
      end
      if (sweep_done) test_pass <= 1'b1;
    end
  end

endmodule
