// tb_tsc_error_eval: self-checking test of the result evaluator (N=8, K=4).
// Random responses in both modes: next_pattern/pattern_fail are checked
// against a reference comparison of the selected raw LUT output, the tree
// output and the dual-rail check with the expected bit, and the status
// registers (error with failing LUT, vector and tree flag, pass) against a reference
// model updated on the same clock edges.
module tb_tsc_error_eval;
  import tsc_pkg::*;
  localparam int unsigned N = 8, K = 4, SW = 3;

  logic          clk = 1'b0, rst_n = 1'b0;
  to_mode_e      mode;
  logic [SW-1:0] test_sel;
  logic [K-1:0]  test_addr;
  logic [N-1:0]  lut_raw;
  dual_rail_t    eq;
  logic          comp_err, expected, sweep_start, sweep_done;
  logic          next_pattern, pattern_fail, test_error, test_pass;
  logic [SW-1:0] fail_lut;
  logic [K-1:0]  fail_addr;
  logic          fail_tree;
  logic          m_err, m_pass, bad, rbad, m_tree;
  logic [SW-1:0] m_lut;
  logic [K-1:0]  m_addr;
  int checks = 0, failures = 0, fails_seen = 0;

  tsc_error_eval #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_OPERATE; test_sel = '0; test_addr = '0; lut_raw = '1;
    eq = DR_TRUE; comp_err = 0; expected = 1; sweep_start = 0; sweep_done = 0;
    m_err = 0; m_pass = 0; m_lut = '0; m_addr = '0; m_tree = 0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      mode        = ($urandom_range(0, 4) != 0) ? MODE_TEST : MODE_OPERATE;
      test_sel    = SW'($urandom);
      test_addr   = K'($urandom);
      expected    = 1'($urandom);
      // mostly a healthy response: selected LUT gives expected, others 1
      lut_raw     = '1;
      lut_raw[test_sel] = expected;
      if ($urandom_range(0, 7) == 0) lut_raw[test_sel] = ~expected;
      if ($urandom_range(0, 7) == 0) lut_raw[(test_sel + 1) % N] = 1'b0;
      eq.t        = &lut_raw;
      eq.f        = ~eq.t;
      if ($urandom_range(0, 11) == 0) eq.f = eq.t;
      comp_err    = (eq.t == eq.f);
      sweep_start = ($urandom_range(0, 19) == 0);
      sweep_done  = ($urandom_range(0, 19) == 0);
      #1;
      rbad = (lut_raw[test_sel] != expected);
      bad = rbad || (eq.t != expected) || (eq.t == eq.f);
      check(next_pattern == (mode == MODE_TEST && !bad), "next_pattern");
      check(pattern_fail == (mode == MODE_TEST && bad), "pattern_fail");
      if (mode == MODE_TEST && bad) fails_seen++;
      @(posedge clk);
      if (sweep_start) begin m_err = 0; m_pass = 0; end
      if (mode == MODE_TEST && bad) begin m_err = 1; m_lut = test_sel; m_addr = test_addr; m_tree = !rbad; end
      if (sweep_done) m_pass = 1;
      #1;
      check(test_error == m_err && test_pass == m_pass, "status flags");
      if (m_err) check(fail_lut == m_lut && fail_addr == m_addr && fail_tree == m_tree, "failing LUT, vector and tree flag");
    end
    check(fails_seen > 10, "mismatches were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
