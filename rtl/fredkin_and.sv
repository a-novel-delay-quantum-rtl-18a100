// fredkin_and: two-input AND made from one Fredkin gate.
// The inputs x, y and a constant 0 enter A, B, C; the R output is x AND y.
// P returns x (so a caller can chain x to the next gate instead of fanning it
// out) and Q = x'y is a garbage output.
// Interface: x, y -> x_o, g, xy. Purely combinational.
// The connection (x, y, 0 -> xy on the third output) follows the published
// AND-from-Fredkin arrangement.
module fredkin_and (
  input  logic x,
  input  logic y,
  output logic x_o,
  output logic g,
  output logic xy
);
  fredkin_gate u_fg (.a(x), .b(y), .c(1'b0), .p(x_o), .q(g), .r(xy));
endmodule
