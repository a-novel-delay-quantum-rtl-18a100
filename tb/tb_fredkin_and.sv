// tb_fredkin_and: exhaustive check of the AND made from a Fredkin gate (x, y, 0 -> xy).
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_fredkin_and;
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
  logic x, y, x_o, g, xy;
  fredkin_and dut (.x(x), .y(y), .x_o(x_o), .g(g), .xy(xy));
  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i); #1;
      check($sformatf("AND %b", 2'(i)), {7'd0, xy}, (i == 3) ? 8'd1 : 8'd0);
      check($sformatf("AND pass %b", 2'(i)), {7'd0, x_o}, {7'd0, i[1]});
      check($sformatf("AND garbage %b", 2'(i)), {7'd0, g}, (i == 1) ? 8'd1 : 8'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
