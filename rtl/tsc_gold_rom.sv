// tsc_gold_rom: precomputed expected responses ("Gold ROM") of the LUT test.
//
// Holds, for each of the 2^K test vectors, the response the bit-comparison
// LUT must give. The contents are computed at elaboration from the LUT's
// functional specification (tsc_pkg::eq_lut_fn), so the check needs only the
// truth table the comparator is meant to implement. Every LUT of the
// comparator has the same specification, so one 2^K-entry table serves all
// N of them. Read is combinational: expected follows addr.
// A ROM of expected responses, compared against the LUT outputs, follows the
// described method; computing the contents from the function is this
// implementation's choice.
module tsc_gold_rom
  import tsc_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] addr,
  output logic         expected
);

  localparam logic [2**K-1:0] GOLD = (2**K)'(eq_lut_init(K));

  assign expected = GOLD[addr];

endmodule
