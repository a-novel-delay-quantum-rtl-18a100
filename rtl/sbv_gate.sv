// sbv_gate: 5x5 SBV gate.
// P = (B'C'A') xor E, Q = B xor C, R = C, S = D', T = B'. With E = 0 and a
// BCD digit on A..D (MSB on A) the first four outputs form the digit's
// nine's complement (see sbv_nines_complement).
// Interface: abcde = {A,B,C,D,E} -> pqrst = {P,Q,R,S,T} (A and P are the MSBs).
// Purely combinational, no clock. The equations are taken as specified.
module sbv_gate (
  input  logic [4:0] abcde,
  output logic [4:0] pqrst
);
  logic a, b, c, d, e;
  assign {a, b, c, d, e} = abcde;
  assign pqrst = {(~b & ~c & ~a) ^ e, b ^ c, c, ~d, ~b};
endmodule
