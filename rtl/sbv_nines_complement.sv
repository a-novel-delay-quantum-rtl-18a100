// sbv_nines_complement: nine's complement of one BCD digit with one SBV gate.
// The digit B3..B0 drives the SBV inputs A..D and E is tied to 0. The outputs
// are then P = B3'B2'B1', Q = B2 xor B1, R = B1, S = B0', which is 9 - B for
// every digit 0..9; T = B2' is the single garbage output. Inputs 10..15 are
// not BCD digits and give no meaningful result.
// Interface: bcd[3:0] -> nines[3:0], garbage. Purely combinational.
// The input mapping and the constant on E follow the published use of the
// SBV gate as a nine's complementer.
module sbv_nines_complement (
  input  logic [3:0] bcd,
  output logic [3:0] nines,
  output logic       garbage
);
  logic [4:0] outs;
  sbv_gate u_sbv (.abcde({bcd, 1'b0}), .pqrst(outs));
  assign nines   = outs[4:1];
  assign garbage = outs[0];
endmodule
