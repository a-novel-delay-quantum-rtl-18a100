// tb_fredkin_gate: exhaustive check of the Fredkin gate against its printed eight-row truth table, plus its use as a multiplexer.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_fredkin_gate;
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
  logic a, b, c, p, q, r;
  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  localparam logic [2:0] PQR [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111};
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i); #1;
      check($sformatf("Fredkin %b", 3'(i)), {5'd0, p, q, r}, {5'd0, PQR[i]});
      // Controlled swap: B and C exchange places exactly when A = 1.
      check($sformatf("Fredkin swap %b", 3'(i)), {6'd0, q, r}, a ? {6'd0, c, b} : {6'd0, b, c});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
