// peres_gate: 3x3 Peres gate.
// P = A, Q = A xor B, R = AB xor C. With C = 0 the R output is an AND, and Q
// is an XOR, so one gate gives both halves of a half adder. Quantum cost 4.
// Interface: abc = {A,B,C} -> pqr = {P,Q,R} (A and P are the MSBs).
// Purely combinational. The equations are those of the published Peres
// truth table; the packing of the three lines into vectors is a local choice.
module peres_gate (
  input  logic [2:0] abc,
  output logic [2:0] pqr
);
  logic a, b, c;
  assign {a, b, c} = abc;
  assign pqr = {a, a ^ b, (a & b) ^ c};
endmodule
