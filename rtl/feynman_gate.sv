// feynman_gate: 2x2 Feynman (controlled-NOT) gate.
// P passes the control A through unchanged and Q = A xor B. With B tied to a
// constant 0 the gate yields two copies of A, which is how reversible
// circuits make fan-out; the RAM in this design uses it that way.
// Interface: a, b -> p, q. Purely combinational, no clock. Quantum cost 1.
// The equations are the standard Feynman gate; nothing is a design choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
