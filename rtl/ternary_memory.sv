// ternary_memory: DEPTH one-trit storage cells built from ternary D flip-flops.
//
// Each cell is a ternary_dff whose input is chosen every clock: 0 when clr
// is high (all cells are cleared at once), wdata when we is high and addr
// selects the cell, otherwise the cell's own output (hold). The cell chosen
// by addr is read combinationally on rdata; an addr of DEPTH or more reads 0
// and writes nothing. Writes and clears take effect at the rising clock edge.
// That the memory is made of ternary flip-flops and holds nine trits follows
// the described system; the binary cell index, the combinational read port
// and clear-all are this design's own choices.
module ternary_memory
  import ternary_pkg::*;
#(
  parameter int DEPTH = 9,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic          clr,
  input  logic [AW-1:0] addr,
  input  trit_t         wdata,
  output trit_t         rdata
);
  trit_t cell_q [DEPTH];
  trit_t cell_d [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_cell
    always_comb begin
      if (clr)                            cell_d[i] = T0;
      else if (we && addr == AW'(i))      cell_d[i] = legal(wdata);
      else                                cell_d[i] = cell_q[i];
    end

    ternary_dff u_dff (.clk(clk), .data(cell_d[i]), .o(cell_q[i]));
  end

  always_comb begin
    rdata = T0;
    for (int i = 0; i < DEPTH; i++)
      if (addr == AW'(i)) rdata = cell_q[i];
  end
endmodule
