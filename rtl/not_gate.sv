// not_gate: 1x1 reversible NOT gate.
// The single output is the complement of the single input, P = A'. Being a
// 1x1 gate it is its own inverse and carries quantum cost 0.
// Interface: a -> p. Purely combinational, no clock.
// Function as given for the reversible NOT gate; nothing here is a design choice.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
