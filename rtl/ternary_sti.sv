// ternary_sti: standard ternary inverter (STI), one trit in, one trit out.
//
// Output is 2 - a: 0 -> 2, 1 -> 1, 2 -> 0, the STI column of the inverter
// truth table. Purely combinational. Trits use the two-wire code of
// ternary_pkg (00 = 0, 01 = 1, 10 = 2); the illegal code 11 is read as 2,
// which is this design's own choice.
module ternary_sti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);
  always_comb y = sti(a);
endmodule
