// tb_tsc_gold_rom: self-checking test of the expected-response ROM.
// Every entry for K=4 and K=5 is compared with the bit-equality rule written
// out independently: expected = (address bit 1 == address bit 0).
module tb_tsc_gold_rom;
  logic [3:0] addr4;
  logic [4:0] addr5;
  logic exp4, exp5;
  int checks = 0, failures = 0;

  tsc_gold_rom #(.K(4)) dut4 (.addr(addr4), .expected(exp4));
  tsc_gold_rom #(.K(5)) dut5 (.addr(addr5), .expected(exp5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      addr4 = 4'(i);
      addr5 = 5'(i);
      #1;
      if (i < 16) begin
        checks++;
        if (exp4 != (((i >> 1) & 1) == (i & 1))) begin
          failures++;
          $display("FAIL: K=4 addr %0d got %b", i, exp4);
        end
      end
      checks++;
      if (exp5 != (((i >> 1) & 1) == (i & 1))) begin
        failures++;
        $display("FAIL: K=5 addr %0d got %b", i, exp5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
