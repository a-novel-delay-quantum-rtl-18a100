// rev_decoder: i-to-2^i reversible decoder built from Fredkin gates.
// The decoder is a binary tree. Its root is a constant-1 line. Each Fredkin
// gate takes one line L on B, a constant 0 on C and an address bit a on the
// control A, and splits L into Q = a'L and R = aL. Level k of the tree
// (2^k gates) is controlled by address bit ADDR_W-1-k, so after ADDR_W levels
// exactly one of the 2^ADDR_W leaves is 1: wl[addr]. 2^ADDR_W - 1 gates are
// used in all.
// No signal is fanned out: within a level the address bit runs from gate to
// gate through the control pass-through output P, and the P of the last gate
// of each level leaves as a garbage output (addr_garbage, equal to the
// address).
// Tree nodes are numbered as in a heap: node 1 is the root, node n has
// children 2n (address bit 0) and 2n+1 (address bit 1), and node 2^ADDR_W + m
// is word line m.
// Interface: addr -> wl (one-hot), addr_garbage. Purely combinational.
// The published work proposes an (i x 2^i) reversible decoder but its circuit
// is not given; this tree of Fredkin gates is this design's own.
module rev_decoder #(
  parameter int unsigned ADDR_W = 2
) (
  input  logic [ADDR_W-1:0]    addr,
  output logic [2**ADDR_W-1:0] wl,
  output logic [ADDR_W-1:0]    addr_garbage
);
  localparam int unsigned ROWS = 2 ** ADDR_W;

  logic [2*ROWS-1:1] node;   // tree lines, heap numbered
  logic [ROWS-1:1]   a_in;   // control input of gate n
  logic [ROWS-1:1]   a_out;  // control pass-through of gate n

  assign node[1] = 1'b1;

  for (genvar n = 1; n < ROWS; n++) begin : g_gate
    localparam int unsigned LEVEL = $clog2(n + 1) - 1;
    localparam int unsigned BIT   = ADDR_W - 1 - LEVEL;
    // The first gate of a level takes the address bit; the others take the
    // pass-through of their left neighbour.
    if (n == 2 ** LEVEL) begin : g_first
      assign a_in[n] = addr[BIT];
    end else begin : g_chain
      assign a_in[n] = a_out[n-1];
    end
    // The last gate of a level hands the address bit out as garbage.
    if (n == 2 ** (LEVEL + 1) - 1) begin : g_last
      assign addr_garbage[BIT] = a_out[n];
    end
    fredkin_gate u_fg (
      .a(a_in[n]), .b(node[n]), .c(1'b0),
      .p(a_out[n]), .q(node[2*n]), .r(node[2*n+1])
    );
  end

  assign wl = node[2*ROWS-1:ROWS];

  initial begin
    assert (ADDR_W >= 1) else $error("rev_decoder: ADDR_W must be at least 1");
  end
endmodule
