// ternary_pti: positive ternary inverter (PTI), one trit in, one trit out.
//
// Output is 0 only for input 2, otherwise 2 (0 -> 2, 1 -> 2, 2 -> 0), the
// PTI column of the inverter truth table. It therefore detects logic 2.
// Purely combinational. Trits use the two-wire code of ternary_pkg; the
// illegal code 11 is read as 2 (this design's choice).
module ternary_pti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);
  always_comb y = pti(a);
endmodule
