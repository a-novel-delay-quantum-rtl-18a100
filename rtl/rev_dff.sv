// rev_dff: reversible D flip-flop, the one-bit storage element of the RAM.
// The bit on d is stored at the rising edge of clk. Because a reversible
// circuit may not fan a signal out, the stored bit leaves through a Feynman
// gate whose second input is a constant 0: q and q_copy are the two copies,
// one for the outside and one for feedback in the write-enabled cell.
// Interface: clk, rst_n (active-low, asynchronous, clears the bit), d -> q,
// q_copy. Timing: q follows d one rising edge later.
// The element is named but not detailed in the published work; the choice of
// an edge-triggered register, the clock edge and the reset are this design's.
module rev_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic q_copy
);
  logic state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= 1'b0;
    else        state <= d;
  end

  // Fan-out of the stored bit: P = state, Q = state xor 0.
  feynman_gate u_fanout (.a(state), .b(1'b0), .p(q), .q(q_copy));
endmodule
