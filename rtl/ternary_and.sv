// ternary_and: two-input ternary AND gate.
//
// The output is the smaller of the two input trits (min(a, b)), which is the
// ternary AND truth table: any 0 gives 0, 1 and 1 or 2 give 1, 2 and 2 give 2.
// Purely combinational. Trits use the two-wire code of ternary_pkg; the
// illegal code 11 is read as 2 (this design's choice).
module ternary_and
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t z
);
  always_comb z = tand(a, b);
endmodule
