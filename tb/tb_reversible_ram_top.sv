// tb_reversible_ram_top: end-to-end test of the top at its default sizes
// (4 words of 4 bits). The RAM is reset, every word is written and read back,
// random read/write traffic runs against an array model, and the stand-alone
// gates are driven through all their input patterns and compared with their
// equations. Counts how often each mechanism occurred (reset, write, read,
// write blocked by we = 0, a nine's complement, one pass of each gate) and
// counts a failure for any that never occurred.
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_reversible_ram_top;
  localparam int AW = 2, DW = 4, ROWS = 4;
  int checks = 0, failures = 0;
  int n_reset = 0, n_write = 0, n_read = 0, n_blocked = 0, n_nines = 0, n_gates = 0;

  logic clk = 0, rst_n = 1, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] din = '0, dout;
  logic [DW-1:0] model [ROWS];

  logic       not_a = 0, not_p;
  logic [2:0] peres_in = '0, peres_out, tr_in = '0, tr_out, urg_in = '0, urg_out, cog_in = '0, cog_out;
  logic [4:0] sbv_in = '0, sbv_out;
  logic [3:0] bcd_in = '0, nines_out;
  logic       nines_garbage;

  reversible_ram_top dut (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .din(din), .dout(dout),
    .not_a(not_a), .not_p(not_p),
    .peres_in(peres_in), .peres_out(peres_out),
    .tr_in(tr_in), .tr_out(tr_out),
    .urg_in(urg_in), .urg_out(urg_out),
    .cog_in(cog_in), .cog_out(cog_out),
    .sbv_in(sbv_in), .sbv_out(sbv_out),
    .bcd_in(bcd_in), .nines_out(nines_out), .nines_garbage(nines_garbage)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("%s: %0d", what, count);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reset
    #1 rst_n = 0; n_reset++;
    foreach (model[k]) model[k] = '0;
    #1;
    for (int k = 0; k < ROWS; k++) begin
      addr = AW'(k); #1;
      check($sformatf("reset word %0d", k), {4'd0, dout}, 8'd0);
    end
    @(negedge clk) rst_n = 1;

    // Write every word, then read each back.
    for (int k = 0; k < ROWS; k++) begin
      @(negedge clk) we = 1; addr = AW'(k); din = DW'(4'hA ^ k * 3);
      @(posedge clk) model[k] = din; n_write++;
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < ROWS; k++) begin
      addr = AW'(k); #1;
      check($sformatf("readback %0d", k), {4'd0, dout}, {4'd0, model[k]}); n_read++;
    end

    // Random traffic.
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = AW'($urandom); din = DW'($urandom);
      #1 check($sformatf("read @%0d", addr), {4'd0, dout}, {4'd0, model[addr]}); n_read++;
      @(posedge clk);
      if (we) begin model[addr] = din; n_write++; end
      else if (din != model[addr]) n_blocked++;
      #1 check($sformatf("after edge @%0d", addr), {4'd0, dout}, {4'd0, model[addr]});
    end
    @(negedge clk) we = 0;

    // Stand-alone gates, every input pattern.
    for (int i = 0; i < 32; i++) begin
      logic a, b, c, d, e;
      // The 3-input gates see the low three bits of i, the SBV gate all five.
      not_a = i[2]; peres_in = 3'(i); tr_in = 3'(i); urg_in = 3'(i); cog_in = 3'(i);
      sbv_in = 5'(i);
      #1;
      if (i < 8) begin
        {a, b, c} = 3'(i);
        check("NOT", {7'd0, not_p}, {7'd0, !a});
        check("Peres", {5'd0, peres_out}, {5'd0, a, a != b, (a && b) != c});
        check("TR", {5'd0, tr_out}, {5'd0, a, a != b, (a && !b) != c});
        check("URG", {5'd0, urg_out}, {5'd0, (a && b) != c, b, (a || b) != c});
        check("COG", {5'd0, cog_out}, {5'd0, a, a ? c : b, b == c});
        n_gates++;
      end
      {a, b, c, d, e} = 5'(i);
      check("SBV", {3'd0, sbv_out}, {3'd0, (!a && !b && !c) != e, b != c, c, !d, !b});
    end
    for (int k = 0; k <= 9; k++) begin
      bcd_in = 4'(k); #1;
      check($sformatf("nines %0d", k), {4'd0, nines_out}, 8'(9 - k));
      check($sformatf("nines garbage %0d", k), {7'd0, nines_garbage}, {7'd0, !bcd_in[2]});
      n_nines++;
    end

    // Reset once more in the middle of use.
    rst_n = 0; n_reset++; #1;
    for (int k = 0; k < ROWS; k++) begin
      addr = AW'(k); #1;
      check($sformatf("second reset word %0d", k), {4'd0, dout}, 8'd0);
    end

    need("resets", n_reset);
    need("writes", n_write);
    need("reads", n_read);
    need("cycles with we=0 that kept a differing din out", n_blocked);
    need("gate library passes", n_gates);
    need("nine's complements", n_nines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
