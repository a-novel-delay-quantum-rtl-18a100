// urg_gate: 3x3 URG (universal reversible gate).
// P = C xor AB, Q = B, R = C xor (A + B), exactly as the gate is specified.
// Interface: abc = {A,B,C} -> pqr = {P,Q,R} (A and P are the MSBs).
// Purely combinational, no clock.
module urg_gate (
  input  logic [2:0] abc,
  output logic [2:0] pqr
);
  logic a, b, c;
  assign {a, b, c} = abc;
  assign pqr = {c ^ (a & b), b, c ^ (a | b)};
endmodule
