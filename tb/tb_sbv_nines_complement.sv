// tb_sbv_nines_complement: checks that every BCD digit 0..9 yields 9 - digit and the garbage output B2'.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_sbv_nines_complement;
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
  logic [3:0] bcd, nines;
  logic garbage;
  sbv_nines_complement dut (.bcd(bcd), .nines(nines), .garbage(garbage));
  initial begin
    for (int i = 0; i <= 9; i++) begin
      bcd = 4'(i); #1;
      check($sformatf("9's complement of %0d", i), {4'd0, nines}, 8'(9 - i));
      check($sformatf("garbage for %0d", i), {7'd0, garbage}, {7'd0, ~bcd[2]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
