// fredkin_or: two-input OR made from one Fredkin gate.
// The inputs x, y and a constant 1 enter A, B, C; the Q output is
// x'y xor x = x OR y. P returns x and R = x' + y is a garbage output.
// Interface: x, y -> x_o, x_or_y, g. Purely combinational.
// The connection (x, y, 1 -> x+y on the second output) follows the published
// OR-from-Fredkin arrangement.
module fredkin_or (
  input  logic x,
  input  logic y,
  output logic x_o,
  output logic x_or_y,
  output logic g
);
  fredkin_gate u_fg (.a(x), .b(y), .c(1'b1), .p(x_o), .q(x_or_y), .r(g));
endmodule
