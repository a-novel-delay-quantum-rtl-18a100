// cog_gate: 3x3 COG (controlled operation gate).
// P = A, Q = AC xor A'B, R = BC + B'C'. Q selects C or B under control of A
// and R is the XNOR of B and C, so the inputs can be recovered from the
// outputs: A from P, then B or C from Q, then the other from R.
// Interface: abc = {A,B,C} -> pqr = {P,Q,R} (A and P are the MSBs).
// Purely combinational, no clock.
module cog_gate (
  input  logic [2:0] abc,
  output logic [2:0] pqr
);
  logic a, b, c;
  assign {a, b, c} = abc;
  assign pqr = {a, (a & c) ^ (~a & b), (b & c) | (~b & ~c)};
endmodule
