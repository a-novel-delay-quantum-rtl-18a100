// tb_rram: random reads and writes on an 8 x 5 RAM and on the default 4 x 4
// RAM, each compared with an array model. Checks that a read is
// combinational, that a write is visible after the next rising edge, that a
// cycle with we = 0 changes nothing, and that reset clears every word.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_rram;
  int checks = 0, failures = 0, writes = 0, reads = 0;
  logic clk = 0, rst_n = 1;

  // 8 x 5 instance
  logic       we8 = 0;
  logic [2:0] addr8 = '0;
  logic [4:0] din8 = '0, dout8;
  logic [4:0] model8 [8];
  // default 4 x 4 instance
  logic       we4 = 0;
  logic [1:0] addr4 = '0;
  logic [3:0] din4 = '0, dout4;
  logic [3:0] model4 [4];

  rram #(.ADDR_W(3), .DATA_W(5)) dut8 (.clk(clk), .rst_n(rst_n), .we(we8), .addr(addr8), .din(din8), .dout(dout8));
  rram                            dut4 (.clk(clk), .rst_n(rst_n), .we(we4), .addr(addr4), .din(din4), .dout(dout4));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model8[k]) model8[k] = '0;
    foreach (model4[k]) model4[k] = '0;
    #1 rst_n = 0;
    #1;
    for (int k = 0; k < 8; k++) begin
      addr8 = 3'(k); addr4 = 2'(k % 4); #1;
      check($sformatf("reset word8 %0d", k), {3'd0, dout8}, 8'd0);
      check($sformatf("reset word4 %0d", k % 4), {4'd0, dout4}, 8'd0);
    end
    @(negedge clk) rst_n = 1;

    // Fill every word once, then random traffic.
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i < 8) begin
        we8 = 1; addr8 = 3'(i); we4 = 1; addr4 = 2'(i % 4);
      end else begin
        we8 = 1'($urandom); addr8 = 3'($urandom); we4 = 1'($urandom); addr4 = 2'($urandom);
      end
      din8 = 5'($urandom); din4 = 4'($urandom);
      #1;
      // Read before the edge: the stored word, not din.
      check($sformatf("read8 @%0d", addr8), {3'd0, dout8}, {3'd0, model8[addr8]});
      check($sformatf("read4 @%0d", addr4), {4'd0, dout4}, {4'd0, model4[addr4]});
      reads++;
      @(posedge clk);
      if (we8) begin model8[addr8] = din8; writes++; end
      if (we4) model4[addr4] = din4;
      #1;
      // Read after the edge: a write is visible at once.
      check($sformatf("after edge8 @%0d", addr8), {3'd0, dout8}, {3'd0, model8[addr8]});
      check($sformatf("after edge4 @%0d", addr4), {4'd0, dout4}, {4'd0, model4[addr4]});
    end

    // Sweep all words: a write touched only its own word.
    @(negedge clk) we8 = 0; we4 = 0;
    for (int k = 0; k < 8; k++) begin
      addr8 = 3'(k); addr4 = 2'(k % 4); #1;
      check($sformatf("sweep8 %0d", k), {3'd0, dout8}, {3'd0, model8[k]});
      check($sformatf("sweep4 %0d", k % 4), {4'd0, dout4}, {4'd0, model4[k % 4]});
    end

    // Reset clears the array again.
    rst_n = 0; #1;
    for (int k = 0; k < 8; k++) begin
      addr8 = 3'(k); #1;
      check($sformatf("second reset %0d", k), {3'd0, dout8}, 8'd0);
    end
    $display("reads=%0d writes=%0d", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
