// tb_tsc_comparator: self-checking test of the LUT-based comparator.
// Operate mode: random and equal operand pairs; eq must be the dual-rail
// code of (a == b) and err low. Test mode: every LUT and every vector; the
// raw output of the selected LUT and the tree output must equal the
// bit-equality rule. Then one truth-table bit of one LUT is flipped: the test
// sweep must see the wrong response at exactly that LUT and vector, and the
// operate-mode result must go wrong for operands that reach that entry.
module tb_tsc_comparator;
  import tsc_pkg::*;
  localparam int unsigned N = 8, K = 4, SW = 3;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  a, b;
  to_mode_e      mode;
  logic [K-1:0]  test_addr;
  logic [SW-1:0] test_sel;
  logic          cfg_we;
  logic [SW-1:0] cfg_lut;
  logic [K-1:0]  cfg_addr;
  logic          cfg_din;
  dual_rail_t    eq;
  logic          err;
  logic [N-1:0]  lut_raw;
  int checks = 0, failures = 0;

  tsc_comparator #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic rule(input int v);
    return ((v >> 1) & 1) == (v & 1);
  endfunction

  // Exhaustive test-mode sweep; returns how many (lut, vector) pairs
  // differ from the rule, and the last one that did.
  task automatic sweep(output int bad, output int bad_lut, output int bad_vec);
    bad = 0; bad_lut = -1; bad_vec = -1;
    mode = MODE_TEST;
    for (int l = 0; l < N; l++) begin
      for (int v = 0; v < 2**K; v++) begin
        test_sel = SW'(l);
        test_addr = K'(v);
        #1;
        check(eq.t == lut_raw[l], "tree output follows the tested LUT");
        check(!err, "dual rails form a code word in test mode");
        if (lut_raw[l] != rule(v)) begin
          bad++; bad_lut = l; bad_vec = v;
        end
      end
    end
    mode = MODE_OPERATE;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad, bl, bv;
    a = '0; b = '0; mode = MODE_OPERATE; test_addr = '0; test_sel = '0;
    cfg_we = 0; cfg_lut = '0; cfg_addr = '0; cfg_din = 0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      a = N'($urandom);
      b = (n % 2) ? a : N'($urandom);
      if (n % 5 == 0) b = a ^ (N'(1) << $urandom_range(0, N - 1));
      #1;
      check(eq == ((a == b) ? DR_TRUE : DR_FALSE),
            $sformatf("operate a=%h b=%h eq=%b", a, b, eq));
      check(!err, "no dual-rail error in operation");
    end
    sweep(bad, bl, bv);
    check(bad == 0, $sformatf("fault-free sweep: %0d mismatches", bad));

    // Flip the entry (A=1, B=0) of LUT 5: it now reports "equal".
    @(negedge clk);
    cfg_we = 1; cfg_lut = 3'd5; cfg_addr = 4'd2; cfg_din = 1'b1;
    @(negedge clk);
    cfg_we = 0;
    sweep(bad, bl, bv);
    check(bad == 1 && bl == 5 && bv == 2,
          $sformatf("upset found by sweep: bad=%0d lut=%0d vec=%0d", bad, bl, bv));
    a = 8'h20; b = 8'h00;
    #1;
    check(eq == DR_TRUE, "upset makes unequal operands compare equal");
    a = 8'h01; b = 8'h00;
    #1;
    check(eq == DR_FALSE, "other bits unaffected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
