// rram: (2^i x j) random access memory built from reversible gates.
// The memory is a two-dimensional array of 2^ADDR_W words of DATA_W
// one-bit cells (we_ms_dff). The address goes through the reversible
// decoder, which raises exactly one word line.
// Write: for every row a Fredkin AND (x = we, y = word line) makes the row's
// write strobe; the cells of that row take din at the rising clock edge,
// all other cells hold.
// Read: for every cell a Fredkin AND (x = word line, y = stored bit) passes the
// bit of the addressed row only; in each bit column a chain of Fredkin ORs
// combines the rows, so dout shows the addressed word.
// Interface: clk, rst_n (active-low, asynchronous, clears every cell), we,
// addr, din -> dout.
// Timing: read is combinational (dout follows addr in the same cycle); a
// write takes effect at the rising edge, and a read of the same address shows
// the new word after that edge.
// The organisation (decoder plus 2-D array of write-enabled D flip-flops)
// follows the published RAM; the read path, the write strobes, the reset and
// the use of plain wires for fanning out we, din and the word lines are this
// design's own choices, as are the default sizes i = 2, j = 4.
module rram #(
  parameter int unsigned ADDR_W = 2,
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  localparam int unsigned ROWS = 2 ** ADDR_W;

  logic [ROWS-1:0]              wl;          // one-hot word lines
  logic [ADDR_W-1:0]            addr_garbage;
  logic [ROWS-1:0]              wr;          // per-row write strobes
  logic [ROWS-1:0][DATA_W-1:0]  cell_q;      // stored bits
  logic [ROWS-1:0][DATA_W-1:0]  rd;          // word line AND stored bit
  logic [ROWS-1:0][DATA_W-1:0]  col;         // running OR down each column

  rev_decoder #(.ADDR_W(ADDR_W)) u_dec (.addr(addr), .wl(wl), .addr_garbage(addr_garbage));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic we_pass, strobe_garbage;
    fredkin_and u_wr (.x(we), .y(wl[r]), .x_o(we_pass), .g(strobe_garbage), .xy(wr[r]));

    for (genvar b = 0; b < DATA_W; b++) begin : g_bit
      logic wl_pass, rd_garbage;
      we_ms_dff u_cell (
        .clk(clk), .rst_n(rst_n), .we(wr[r]), .d(din[b]), .q(cell_q[r][b])
      );
      fredkin_and u_rd (
        .x(wl[r]), .y(cell_q[r][b]), .x_o(wl_pass), .g(rd_garbage), .xy(rd[r][b])
      );
      if (r == 0) begin : g_first
        assign col[r][b] = rd[r][b];
      end else begin : g_or
        logic acc_pass, or_garbage;
        fredkin_or u_or (
          .x(col[r-1][b]), .y(rd[r][b]), .x_o(acc_pass), .x_or_y(col[r][b]), .g(or_garbage)
        );
      end
    end
  end

  assign dout = col[ROWS-1];

  // The decoder must raise exactly one word line, in or out of reset.
  a_one_word_line : assert property (@(posedge clk) $onehot(wl));
endmodule
