// fredkin_gate: 3x3 Fredkin (controlled-swap) gate.
// P = A, Q = A'B xor AC, R = A'C xor AB: when the control A is 0 the lines B
// and C pass straight through, when A is 1 they are swapped. The gate is
// therefore a 2:1 multiplexer (R = A ? B : C), and with a constant on one
// data input it gives AND (C = 0 -> R = AB) or OR (C = 1 -> Q = A + B).
// Quantum cost 5. It is the building block of the decoder, the write-enable
// multiplexer and the read path of the RAM in this design.
// Interface: a, b, c -> p, q, r. Purely combinational, no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
