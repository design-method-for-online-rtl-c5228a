// tsc_to_switch: Test/Operate (T/O) selector on the LUT address lines.
//
// In MODE_OPERATE every bit-slice LUT i gets its functional inputs
// {0.., a[i], b[i]}. In MODE_TEST the LUT chosen by test_sel gets the test
// vector test_addr from the pattern generator, and every other LUT gets the
// all-zero address, whose specified response is 1, so the AND tree passes
// the tested LUT's response through unchanged (the tested LUT is isolated
// from the rest while the tree is exercised by the same vector).
// Purely combinational.
// Placing a T/O selector on the LUT inputs follows the described method; the
// value held on the untested LUTs is this implementation's choice.
module tsc_to_switch
  import tsc_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned K  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  to_mode_e        mode,
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    b,
  input  logic [K-1:0]    test_addr,
  input  logic [SW-1:0]   test_sel,
  output logic [K-1:0]    lut_addr [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      lut_addr[i] = '0;
      if (mode == MODE_TEST) begin
        if (test_sel == SW'(i)) lut_addr[i] = test_addr;
      end else begin
        lut_addr[i][1] = a[i];
        lut_addr[i][0] = b[i];
      end
    end
  end

endmodule
