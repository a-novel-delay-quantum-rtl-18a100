// tb_rev_decoder: for every address of a 3-bit and a 2-bit decoder checks
// that exactly the word line numbered by the address is 1 and that the
// garbage outputs return the address.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_rev_decoder;
  int checks = 0, failures = 0;
  logic [2:0] a3, g3;
  logic [7:0] wl3;
  logic [1:0] a2, g2;
  logic [3:0] wl2;

  rev_decoder #(.ADDR_W(3)) dut3 (.addr(a3), .wl(wl3), .addr_garbage(g3));
  rev_decoder                dut2 (.addr(a2), .wl(wl2), .addr_garbage(g2));

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      a3 = 3'(i); a2 = 2'(i % 4); #1;
      check($sformatf("3-to-8 addr %0d", i), wl3, 8'b1 << i);
      check($sformatf("3-to-8 garbage %0d", i), {5'd0, g3}, 8'(i));
      check($sformatf("2-to-4 addr %0d", i % 4), {4'd0, wl2}, 8'b1 << (i % 4));
      check($sformatf("2-to-4 garbage %0d", i % 4), {6'd0, g2}, 8'(i % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
