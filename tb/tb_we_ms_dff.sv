// tb_we_ms_dff: drives random write enables and data into the write-enabled
// flip-flop and checks it against a one-bit reference: the bit changes to d
// only at a rising edge with we = 1 and otherwise holds. Counts both cases.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_we_ms_dff;
  int checks = 0, failures = 0, writes = 0, holds = 0;
  logic clk = 0, rst_n = 1, we = 0, d = 0, q, model;

  we_ms_dff dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1 check("reset", q, 1'b0);
    @(negedge clk) rst_n = 1;
    model = 1'b0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom);
      d  = 1'($urandom);
      @(posedge clk);
      if (we) begin model = d; writes++; end
      else if (d != model) holds++;   // a hold that a plain D-FF would get wrong
      #1 check($sformatf("cycle %0d we=%0b d=%0b", i, we, d), q, model);
      @(negedge clk);
    end
    if (writes == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage writes=%0d holds=%0d", writes, holds);
    end
    $display("writes=%0d holds_with_different_d=%0d", writes, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
