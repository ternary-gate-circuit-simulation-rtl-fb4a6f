// ternary_dff: ternary D flip-flop holding one trit.
//
// On every rising edge of clk the output o takes the trit on data; it holds
// that trit until the next rising edge, so it stores three values where a
// binary flip-flop stores two. The ports (clk, data, o) are those of the
// described flip-flop; the choice of the rising edge and the absence of a
// reset (none is listed) follow from that description, so whoever reads o
// must first have written it. The trit is carried on two wires (00 = 0,
// 01 = 1, 10 = 2).
module ternary_dff
  import ternary_pkg::*;
(
  input  logic  clk,
  input  trit_t data,
  output trit_t o
);
  always_ff @(posedge clk) o <= data;
endmodule
