// tb_feynman_gate: exhaustive check of the Feynman gate against its four-row truth table.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_feynman_gate;
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
  logic a, b, p, q;
  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));
  // Rows A B -> P Q, as in the gate's truth table.
  localparam logic [3:0] ROWS [4] = '{4'b00_00, 4'b01_01, 4'b10_11, 4'b11_10};
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = ROWS[i][3:2]; #1;
      check($sformatf("FG %b", ROWS[i][3:2]), {6'd0, p, q}, {6'd0, ROWS[i][1:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
