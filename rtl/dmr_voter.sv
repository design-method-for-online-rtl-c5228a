// dmr_voter: dual-modular-redundancy voter of the two comparators.
//
// In MODE_OPERATE both comparators see the live operands; their dual-rail
// results must agree and both be code words, otherwise sys_error is raised.
// In MODE_TEST comparator A is under test, so its result is masked and only
// comparator B's result and code check are used. The analysed output result
// always comes from comparator B, so it stays steady across a test.
// Timing: one register stage; out_valid/result/sys_error appear one cycle
// after in_valid and the comparator results. sys_error is evaluated only
// for cycles with in_valid set.
// Comparing the two comparators in operation and relying on B while A is
// tested follow the described method; the register stage and taking the
// output from B in both modes are this implementation's choices.
module dmr_voter
  import tsc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  to_mode_e   mode,
  input  logic       in_valid,
  input  dual_rail_t eq_a,
  input  logic       err_a,
  input  dual_rail_t eq_b,
  input  logic       err_b,
  output logic       out_valid,
  output logic       result,
  output logic       sys_error
);

  logic disagree;

  always_comb begin
    if (mode == MODE_TEST) disagree = err_b;
    else                   disagree = (eq_a != eq_b) || err_a || err_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= 1'b0;
      sys_error <= 1'b0;
    end else begin
      out_valid <= in_valid;
      result    <= eq_b.t;
      sys_error <= in_valid && disagree;
    end
  end

endmodule
