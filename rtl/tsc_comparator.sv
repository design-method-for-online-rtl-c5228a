// tsc_comparator: N-bit equality comparator built from one LUT per bit.
//
// Each bit position i has a K-input LUT (tsc_lut) holding the bit-equality
// truth table; its N outputs feed an AND tree that yields A==B. A T/O
// selector (tsc_to_switch) in front of the LUT inputs lets a pattern
// generator drive any LUT's address lines directly, and the raw LUT outputs
// are brought out (lut_raw) so the response of the tested LUT can be
// captured. The result is produced on two rails: eq.t is the AND of the LUT
// outputs, eq.f the OR of their complements, built as two separate trees; a
// fault in either tree gives a non-code word, flagged on err.
// Interface: a/b operands, mode/test_addr/test_sel from the test controller,
// cfg_* write one truth-table bit of LUT cfg_lut. Timing: eq, err and
// lut_raw are combinational in a, b, mode, test_addr and test_sel.
// One LUT per bit plus an AND tree and the T/O selector follow the described
// method; the dual-rail output and its error signal are this
// implementation's reading of the "TSC comparator (dual-rail logic)" block.
module tsc_comparator
  import tsc_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned K  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  to_mode_e      mode,
  input  logic [K-1:0]  test_addr,
  input  logic [SW-1:0] test_sel,
  input  logic          cfg_we,
  input  logic [SW-1:0] cfg_lut,
  input  logic [K-1:0]  cfg_addr,
  input  logic          cfg_din,
  output dual_rail_t    eq,
  output logic          err,
  output logic [N-1:0]  lut_raw
);

  localparam logic [2**K-1:0] LUT_INIT = (2**K)'(eq_lut_init(K));

  logic [K-1:0] lut_addr [N];

  tsc_to_switch #(.N(N), .K(K), .SW(SW)) u_to_switch (
    .mode      (mode),
    .a         (a),
    .b         (b),
    .test_addr (test_addr),
    .test_sel  (test_sel),
    .lut_addr  (lut_addr)
  );

  for (genvar i = 0; i < N; i++) begin : g_bit
    tsc_lut #(.K(K), .INIT(LUT_INIT)) u_lut (
      .clk      (clk),
      .rst_n    (rst_n),
      .addr     (lut_addr[i]),
      .o        (lut_raw[i]),
      .cfg_we   (cfg_we && (cfg_lut == SW'(i))),
      .cfg_addr (cfg_addr),
      .cfg_din  (cfg_din)
    );
  end

  // True rail: AND tree of the LUT outputs. False rail: OR tree of their
  // complements. The two are kept as separate reductions.
  assign eq.t = &lut_raw;
  assign eq.f = |(~lut_raw);
  assign err  = ~dr_valid(eq);

endmodule
