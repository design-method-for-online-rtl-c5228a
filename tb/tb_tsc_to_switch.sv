// tb_tsc_to_switch: self-checking test of the T/O selector.
// Random operands, test vectors and LUT selections in both modes; every LUT
// address is compared with a reference built bit by bit.
module tb_tsc_to_switch;
  import tsc_pkg::*;
  localparam int unsigned N = 8, K = 4, SW = 3;

  to_mode_e      mode;
  logic [N-1:0]  a, b;
  logic [K-1:0]  test_addr;
  logic [SW-1:0] test_sel;
  logic [K-1:0]  lut_addr [N];
  logic [K-1:0]  want;
  int checks = 0, failures = 0;

  tsc_to_switch #(.N(N), .K(K)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      mode      = (n % 2) ? MODE_TEST : MODE_OPERATE;
      a         = N'($urandom);
      b         = N'($urandom);
      test_addr = K'($urandom);
      test_sel  = SW'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        if (mode == MODE_OPERATE) want = K'({a[i], b[i]});
        else if (i == int'(test_sel)) want = test_addr;
        else want = '0;
        checks++;
        if (lut_addr[i] !== want) begin
          failures++;
          $display("FAIL: mode %0d lut %0d got %h want %h", mode, i, lut_addr[i], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
