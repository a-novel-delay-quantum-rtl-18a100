// tb_rev_dff: drives random data into the reversible D flip-flop and checks
// that q and its Feynman copy show, after each rising edge, the bit sampled
// at that edge; also checks the asynchronous reset.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_rev_dff;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, d = 0, q, q_copy, model;

  rev_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .q_copy(q_copy));

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
    #1;
    check("reset q", q, 1'b0);
    check("reset q_copy", q_copy, 1'b0);
    @(negedge clk) rst_n = 1;
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      @(posedge clk) model = d;
      #1;
      check($sformatf("q cycle %0d", i), q, model);
      check($sformatf("q_copy cycle %0d", i), q_copy, model);
      @(negedge clk);
    end
    // Asynchronous reset between edges.
    d = 1'b1;
    @(posedge clk) #1 check("set before reset", q, 1'b1);
    #2 rst_n = 0; #1;
    check("async reset", q, 1'b0);
    #3 rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
