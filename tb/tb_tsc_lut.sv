// tb_tsc_lut: self-checking test of tsc_lut.
// Checks the reset-loaded truth table at every address, random single-bit
// configuration writes against a reference copy of the table, and that a
// reset restores INIT.
module tb_tsc_lut;
  localparam int unsigned K = 4;
  localparam logic [15:0] INIT = 16'h9999;  // equality of inputs 1 and 0

  logic clk = 1'b0, rst_n = 1'b0;
  logic [K-1:0] addr, cfg_addr;
  logic o, cfg_we, cfg_din;
  logic [15:0] model;
  int checks = 0, failures = 0;

  tsc_lut #(.K(K), .INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic sweep_read();
    for (int i = 0; i < 16; i++) begin
      addr = K'(i);
      #1;
      check(o == model[i], $sformatf("read addr %0d: got %b want %b", i, o, model[i]));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_din = 0; addr = '0;
    model = INIT;
    #12 rst_n = 1'b1;
    sweep_read();
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      cfg_we   = 1'b1;
      cfg_addr = K'($urandom_range(0, 15));
      cfg_din  = 1'($urandom);
      @(posedge clk);
      model[cfg_addr] = cfg_din;
      #1 cfg_we = 1'b0;
      sweep_read();
    end
    rst_n = 1'b0;
    #1 model = INIT;
    sweep_read();
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
