// we_ms_dff: write-enabled master-slave D flip-flop, one cell of the RAM.
// A Fredkin gate acts as the write-enable multiplexer: with A = we, B = d and
// C = the stored bit, its R output is we ? d : stored. That value is stored
// by a rev_dff at the rising clock edge, and the rev_dff's Feynman fan-out
// returns one copy to the multiplexer and drives q with the other. The
// Fredkin gate's P and Q outputs are garbage.
// Interface: clk, rst_n (active-low, asynchronous), we, d -> q.
// Timing: with we = 1 at a rising edge, q = d after that edge; with we = 0
// q holds. The master and slave latches are represented together by one
// edge-triggered register, which is how the pair behaves at its ports.
// The published work gives this cell's function and costs (logical depth 16,
// quantum cost 16, 3 garbage outputs) but not its circuit; the gate structure
// here is this design's own.
module we_ms_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic d,
  output logic q
);
  logic next_bit, fb, we_garbage, mux_garbage;

  fredkin_gate u_wmux (
    .a(we), .b(d), .c(fb),
    .p(we_garbage), .q(mux_garbage), .r(next_bit)
  );

  rev_dff u_store (.clk(clk), .rst_n(rst_n), .d(next_bit), .q(q), .q_copy(fb));
endmodule
