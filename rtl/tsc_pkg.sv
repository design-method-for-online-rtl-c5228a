// tsc_pkg: types and functions shared by the self-checking comparator.
//
// - to_mode_e     the Test/Operate (T/O) selector setting of a comparator.
// - dual_rail_t   a dual-rail coded bit: (t,f) = (1,0) means true, (0,1)
//                 false; (0,0) and (1,1) are invalid code words and can only
//                 appear when the logic that produced them is faulty.
// - eq_lut_fn     the functional specification (truth table) of the per-bit
//                 comparator LUT. LUT input 1 carries bit i of operand A,
//                 input 0 bit i of operand B; the upper inputs are unused in
//                 operation and tied to 0. The output is 1 when the two
//                 operand bits are equal, for every value of the unused
//                 inputs, so the whole 2^k-entry table is defined.
// The per-bit equality LUT and the AND tree follow the method described for
// this comparator; the input assignment and dual-rail coding are choices of
// this implementation.
package tsc_pkg;

  typedef enum logic {
    MODE_OPERATE = 1'b0,
    MODE_TEST    = 1'b1
  } to_mode_e;

  typedef struct packed {
    logic t;
    logic f;
  } dual_rail_t;

  localparam dual_rail_t DR_TRUE  = '{t: 1'b1, f: 1'b0};
  localparam dual_rail_t DR_FALSE = '{t: 1'b0, f: 1'b1};

  // A dual-rail word is a code word when its two rails differ.
  function automatic logic dr_valid(input dual_rail_t d);
    return d.t ^ d.f;
  endfunction

  // Truth table entry of the bit-comparison LUT; ab = its two low inputs
  // (the entry does not depend on the others).
  function automatic logic eq_lut_fn(input logic [1:0] ab);
    return ~(ab[1] ^ ab[0]);
  endfunction

  // Full INIT vector of a K-input bit-comparison LUT.
  function automatic logic [(2**8)-1:0] eq_lut_init(input int k);
    logic [(2**8)-1:0] v;
    v = '0;
    for (int i = 0; i < 2**k; i++) v[i] = eq_lut_fn(2'(i));
    return v;
  endfunction

endpackage
