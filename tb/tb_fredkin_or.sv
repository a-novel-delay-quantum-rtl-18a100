// tb_fredkin_or: exhaustive check of the OR made from a Fredkin gate (x, y, 1 -> x+y).
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_fredkin_or;
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
  logic x, y, x_o, x_or_y, g;
  fredkin_or dut (.x(x), .y(y), .x_o(x_o), .x_or_y(x_or_y), .g(g));
  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i); #1;
      check($sformatf("OR %b", 2'(i)), {7'd0, x_or_y}, (i == 0) ? 8'd0 : 8'd1);
      check($sformatf("OR pass %b", 2'(i)), {7'd0, x_o}, {7'd0, i[1]});
      check($sformatf("OR garbage %b", 2'(i)), {7'd0, g}, (i == 2) ? 8'd0 : 8'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
