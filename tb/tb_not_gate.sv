// tb_not_gate: exhaustive check of the NOT gate against its truth table (0->1, 1->0).
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_not_gate;
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
  logic a, p;
  not_gate dut (.a(a), .p(p));
  localparam logic [1:0] TABLE = 2'b01; // TABLE[a] = P; row 0 -> 1, row 1 -> 0
  initial begin
    for (int i = 0; i < 2; i++) begin
      a = i[0]; #1;
      check($sformatf("NOT a=%0d", i), {7'd0, p}, {7'd0, TABLE[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
