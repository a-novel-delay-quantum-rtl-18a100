// tr_gate: 3x3 TR gate.
// P = A, Q = A xor B, R = AB' xor C. The R equation is the one that matches
// every row of the gate's truth table (a drawing of the gate that shows
// R = AB' xor B does not fit the table; the table is followed).
// Interface: abc = {A,B,C} -> pqr = {P,Q,R} (A and P are the MSBs).
// Purely combinational, no clock.
module tr_gate (
  input  logic [2:0] abc,
  output logic [2:0] pqr
);
  logic a, b, c;
  assign {a, b, c} = abc;
  assign pqr = {a, a ^ b, (a & ~b) ^ c};
endmodule
