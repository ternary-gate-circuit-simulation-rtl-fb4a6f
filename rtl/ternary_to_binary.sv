// ternary_to_binary: registered unsigned ternary to binary converter.
//
// The TRITS input trits (ternary_input[0] least significant) are weighted
// by powers of three and summed: value = sum(ternary_input[i] * 3**i). The
// low BIN_W bits of that value are registered on binary_output one rising
// clock edge after the trits are presented. Six trits can reach 728, more
// than eight bits hold; such values wrap modulo 256. A synchronous,
// active-high reset clears the output to 0. Ports and widths follow the
// described converter; the latency, the reset style, the wrap-around and
// reading the illegal trit code 11 as 2 are this design's choices.
module ternary_to_binary
  import ternary_pkg::*;
#(
  parameter int BIN_W = 8,
  parameter int TRITS = 6
) (
  input  logic             clk,
  input  logic             reset,
  input  trit_t            ternary_input [TRITS],
  output logic [BIN_W-1:0] binary_output
);
  logic [BIN_W-1:0] value;

  always_comb begin
    logic [BIN_W-1:0] w;
    value = '0;
    w     = BIN_W'(1);
    for (int i = 0; i < TRITS; i++) begin
      value = value + BIN_W'(legal(ternary_input[i])) * w;
      w     = w * BIN_W'(3);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) binary_output <= '0;
    else       binary_output <= value;
  end
endmodule
