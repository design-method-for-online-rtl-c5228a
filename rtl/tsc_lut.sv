// tsc_lut: K-input look-up table with a writable truth table.
//
// Models the basic logic element of an SRAM FPGA: a 2^K-bit truth-table
// memory whose read address is the LUT's K inputs and whose addressed bit is
// the output (combinational read). The truth table is loaded from INIT at
// reset (configuration), and single bits can be rewritten through the
// configuration port (cfg_we/cfg_addr/cfg_din), which is how a configuration
// upset (a flipped truth-table bit) is injected or a scrub is performed.
// Timing: o follows addr in the same cycle; a configuration write takes
// effect at the next rising clk edge.
// That the LUT is a small SRAM whose truth table can be written and read
// follows the described method; the reset load and the one-bit write port
// are choices of this implementation (K is at most 8).
module tsc_lut #(
  parameter int unsigned       K    = 4,
  parameter logic [2**K-1:0]   INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] addr,
  output logic         o,
  input  logic         cfg_we,
  input  logic [K-1:0] cfg_addr,
  input  logic         cfg_din
);

  logic [2**K-1:0] tt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      tt <= INIT;
    else if (cfg_we) tt[cfg_addr] <= cfg_din;
  end

  assign o = tt[addr];

endmodule
