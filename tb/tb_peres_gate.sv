// tb_peres_gate: exhaustive check of the Peres gate against its printed eight-row truth table.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_peres_gate;
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
  logic [2:0] abc, pqr;
  peres_gate dut (.abc(abc), .pqr(pqr));
  // PQR for ABC = 000 .. 111, copied row by row from the truth table.
  localparam logic [2:0] PQR [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b111, 3'b101, 3'b100};
  initial begin
    for (int i = 0; i < 8; i++) begin
      abc = 3'(i); #1;
      check($sformatf("Peres %b", abc), {5'd0, pqr}, {5'd0, PQR[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
