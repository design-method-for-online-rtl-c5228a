// tsc_test_ctrl: LUT test controller and pattern generator.
//
// Schedules and runs the online test of comparator A. A test sweep is
// requested by a test_start pulse or, when TEST_PERIOD is non-zero, every
// TEST_PERIOD cycles after the previous sweep ended (background test). A
// request waits for a hole in the incoming data stream (in_valid low) before
// the T/O selector is switched to MODE_TEST. During the sweep the generator
// walks LUT index test_sel from 0 to N-1 and, for each LUT, test vector
// test_addr through all 2^K values, one vector per cycle, advancing on
// next_pattern from the evaluator. A pattern_fail from the evaluator ends the
// sweep at once. A full sweep takes N*2^K cycles in MODE_TEST.
// Outputs: mode (T/O), test_sel, test_addr, sweep_start (one-cycle pulse in
// the first test cycle), sweep_done (one-cycle pulse in the last test cycle
// of a sweep that passed every vector), busy (a request is pending or a
// sweep is running).
// The hole-driven start, the exhaustive 2^K vectors per LUT and the N*2^K
// cycle sweep follow the described method; the request/abort handshake and
// the period counter are this implementation's choices.
module tsc_test_ctrl
  import tsc_pkg::*;
#(
  parameter int unsigned N           = 32,
  parameter int unsigned K           = 4,
  parameter int unsigned TEST_PERIOD = 100_000,
  parameter int unsigned SW          = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_start,
  input  logic          in_valid,
  input  logic          next_pattern,
  input  logic          pattern_fail,
  output to_mode_e      mode,
  output logic [K-1:0]  test_addr,
  output logic [SW-1:0] test_sel,
  output logic          sweep_start,
  output logic          sweep_done,
  output logic          busy
);

  typedef enum logic [1:0] {
    S_OPERATE   = 2'd0,
    S_WAIT_HOLE = 2'd1,
    S_TEST      = 2'd2
  } state_e;

  localparam int unsigned TW = (TEST_PERIOD > 1) ? $clog2(TEST_PERIOD) : 1;

  state_e        state;
  logic [TW-1:0] timer;
  logic          first;
  logic          period_hit;
  logic          last_vec;

  assign period_hit = (TEST_PERIOD != 0) && (timer == TW'(TEST_PERIOD - 1));
  assign last_vec   = (test_addr == '1) && (test_sel == SW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_OPERATE;
      timer     <= '0;
      test_addr <= '0;
      test_sel  <= '0;
      first     <= 1'b0;
    end else begin
      first <= 1'b0;
      unique case (state)
        S_OPERATE: begin
          if (period_hit) timer <= '0;
          else            timer <= timer + 1'b1;
          if (test_start || period_hit) state <= S_WAIT_HOLE;
        end
        S_WAIT_HOLE: begin
          if (!in_valid) begin
            state     <= S_TEST;
            test_addr <= '0;
            test_sel  <= '0;
            first     <= 1'b1;
          end
        end
        S_TEST: begin
          if (pattern_fail || (next_pattern && last_vec)) begin
            state <= S_OPERATE;
            timer <= '0;
          end else if (next_pattern) begin
            test_addr <= test_addr + 1'b1;
            if (test_addr == '1) test_sel <= test_sel + 1'b1;
          end
        end
        default: state <= S_OPERATE;
      endcase
    end
  end

  assign mode        = (state == S_TEST) ? MODE_TEST : MODE_OPERATE;
  assign sweep_start = (state == S_TEST) && first;
  assign sweep_done  = (state == S_TEST) && next_pattern && last_vec && !pattern_fail;
  assign busy        = (state != S_OPERATE);

endmodule
