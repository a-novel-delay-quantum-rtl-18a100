// tb_sbv_gate: exhaustive check of the five SBV gate outputs over all 32 input patterns.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_sbv_gate;
  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [4:0] abcde, pqrst, exp;
  logic a, b, c, d, e;
  sbv_gate dut (.abcde(abcde), .pqrst(pqrst));
  initial begin
    for (int i = 0; i < 32; i++) begin
      abcde = 5'(i); #1;
      {a, b, c, d, e} = abcde;
      // P is 1 when A, B and C are all 0, inverted by E.
      exp[4] = (abcde[4:2] == 3'b000) ? ~e : e;
      exp[3] = (b != c);
      exp[2] = c;
      exp[1] = !d;
      exp[0] = !b;
      check($sformatf("SBV %b", abcde), {3'd0, pqrst}, {3'd0, exp});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
