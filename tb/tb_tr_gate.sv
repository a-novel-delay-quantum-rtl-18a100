// tb_tr_gate: exhaustive check of the TR gate against its printed eight-row truth table.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_tr_gate;
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
  tr_gate dut (.abc(abc), .pqr(pqr));
  localparam logic [2:0] PQR [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b111, 3'b110, 3'b100, 3'b101};
  initial begin
    for (int i = 0; i < 8; i++) begin
      abc = 3'(i); #1;
      check($sformatf("TR %b", abc), {5'd0, pqr}, {5'd0, PQR[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
