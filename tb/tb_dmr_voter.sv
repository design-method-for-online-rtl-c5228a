// tb_dmr_voter: self-checking test of the DMR voter.
// Random dual-rail results (including invalid code words) and modes; checks
// the registered result (always comparator B), out_valid and sys_error
// (disagreement or invalid code in operation, only B's code in test mode)
// one cycle later.
module tb_dmr_voter;
  import tsc_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  to_mode_e   mode;
  logic       in_valid;
  dual_rail_t eq_a, eq_b;
  logic       err_a, err_b;
  logic       out_valid, result, sys_error;
  logic       w_valid, w_result, w_error;
  int checks = 0, failures = 0, errs_seen = 0;

  dmr_voter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_OPERATE; in_valid = 0; eq_a = DR_TRUE; eq_b = DR_TRUE;
    err_a = 0; err_b = 0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      mode     = ($urandom_range(0, 3) == 0) ? MODE_TEST : MODE_OPERATE;
      in_valid = ($urandom_range(0, 7) != 0);
      eq_a     = ($urandom_range(0, 1) != 0) ? DR_TRUE : DR_FALSE;
      eq_b     = ($urandom_range(0, 5) != 0) ? eq_a : dual_rail_t'($urandom);
      if ($urandom_range(0, 9) == 0) eq_a = dual_rail_t'($urandom);
      err_a    = (eq_a.t == eq_a.f);
      err_b    = (eq_b.t == eq_b.f);
      w_valid  = in_valid;
      w_result = eq_b.t;
      if (mode == MODE_TEST) w_error = in_valid && err_b;
      else w_error = in_valid && ((eq_a != eq_b) || err_a || err_b);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != w_valid || result != w_result || sys_error != w_error) begin
        failures++;
        $display("FAIL: n=%0d got v=%b r=%b e=%b want %b %b %b",
                 n, out_valid, result, sys_error, w_valid, w_result, w_error);
      end
      if (w_error) errs_seen++;
    end
    checks++;
    if (errs_seen == 0) begin
      failures++;
      $display("FAIL: no error case generated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
