// ternary_nti: negative ternary inverter (NTI), one trit in, one trit out.
//
// Output is 2 only for input 0, otherwise 0 (0 -> 2, 1 -> 0, 2 -> 0), the
// NTI column of the inverter truth table. It therefore detects logic 0.
// Purely combinational. Trits use the two-wire code of ternary_pkg; the
// illegal code 11 is read as 2 (this design's choice).
module ternary_nti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);
  always_comb y = nti(a);
endmodule
