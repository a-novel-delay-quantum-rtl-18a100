// reversible_ram_top: the reversible RAM together with the reversible gate
// library it is drawn from.
// The (2^i x j) RAM (rram) is the main design; it is built from Feynman and
// Fredkin gates, the Fredkin AND and OR, the reversible decoder and the
// write-enabled D flip-flop. The remaining gates of the library (NOT, Peres,
// TR, URG, COG, SBV and the SBV nine's complementer) do not connect to the
// RAM and stand beside it, each with its own ports.
// Interface: the RAM ports (clk, rst_n, we, addr, din, dout), then one input
// and one output vector per stand-alone gate, packed with the first named
// line (A, P) as the MSB.
// Timing: only the RAM is clocked (see rram); every gate is combinational.
// Placing the unrelated gates beside the RAM, and the default sizes i = 2,
// j = 4, are this design's choices.
module reversible_ram_top #(
  parameter int unsigned ADDR_W = 2,
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,

  input  logic              not_a,
  output logic              not_p,
  input  logic [2:0]        peres_in,
  output logic [2:0]        peres_out,
  input  logic [2:0]        tr_in,
  output logic [2:0]        tr_out,
  input  logic [2:0]        urg_in,
  output logic [2:0]        urg_out,
  input  logic [2:0]        cog_in,
  output logic [2:0]        cog_out,
  input  logic [4:0]        sbv_in,
  output logic [4:0]        sbv_out,
  input  logic [3:0]        bcd_in,
  output logic [3:0]        nines_out,
  output logic              nines_garbage
);
  rram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .din(din), .dout(dout)
  );

  not_gate             u_not   (.a(not_a), .p(not_p));
  peres_gate           u_peres (.abc(peres_in), .pqr(peres_out));
  tr_gate              u_tr    (.abc(tr_in), .pqr(tr_out));
  urg_gate             u_urg   (.abc(urg_in), .pqr(urg_out));
  cog_gate             u_cog   (.abc(cog_in), .pqr(cog_out));
  sbv_gate             u_sbv   (.abcde(sbv_in), .pqrst(sbv_out));
  sbv_nines_complement u_nines (.bcd(bcd_in), .nines(nines_out), .garbage(nines_garbage));
endmodule
