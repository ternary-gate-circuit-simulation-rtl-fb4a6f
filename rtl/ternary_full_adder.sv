// ternary_full_adder: one-trit unsigned ternary full adder.
//
// Adds the trits a and b and the carry-in cin and splits the total
// (0 .. 6) into a sum trit (total mod 3) and a carry trit (total div 3).
// With a carry-in of 0 or 1, as in the ALU's ripple chain, the carry-out is
// also 0 or 1. Purely combinational. The full adder is named as the heart of
// the ternary ALU; its arithmetic definition here is the usual radix-3 one,
// and the two-wire trit code (illegal 11 read as 2) is this design's choice.
module ternary_full_adder
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  input  trit_t cin,
  output trit_t sum,
  output trit_t cout
);
  logic [2:0] total;

  always_comb begin
    total = 3'(legal(a)) + 3'(legal(b)) + 3'(legal(cin));
    sum   = trit_t'(total % 3'd3);
    cout  = trit_t'(total / 3'd3);
  end
endmodule
