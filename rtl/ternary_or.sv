// ternary_or: two-input ternary OR gate.
//
// The output is the larger of the two input trits (max(a, b)), which is the
// ternary OR truth table: any 2 gives 2, otherwise any 1 gives 1, 0 and 0
// give 0. Purely combinational. Trits use the two-wire code of ternary_pkg;
// the illegal code 11 is read as 2 (this design's choice).
module ternary_or
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t z
);
  always_comb z = tor(a, b);
endmodule
