// binary_to_ternary: registered binary to unsigned ternary converter.
//
// binary_input (BIN_W bits) is rewritten as TRITS ternary digits,
// ternary_output[0] being the least significant: digit i is
// (binary_input / 3**i) mod 3. Six trits hold every 8-bit value, since
// 3**6 = 729 > 255. The result is registered: it appears on ternary_output
// one rising clock edge after binary_input is presented. A synchronous,
// active-high reset clears every output trit to 0. The 8-bit input, the
// six two-wire output trits, clk and reset follow the described converter;
// the one-cycle latency and the synchronous reset are this design's choices.
// The nominal clock is 6.25 MHz; nothing in the logic depends on it.
module binary_to_ternary
  import ternary_pkg::*;
#(
  parameter int BIN_W = 8,
  parameter int TRITS = 6
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [BIN_W-1:0] binary_input,
  output trit_t            ternary_output [TRITS]
);
  trit_t digits [TRITS];

  always_comb begin
    logic [BIN_W-1:0] v;
    v = binary_input;
    for (int i = 0; i < TRITS; i++) begin
      digits[i] = trit_t'(v % BIN_W'(3));
      v         = v / BIN_W'(3);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < TRITS; i++) ternary_output[i] <= T0;
    end else begin
      ternary_output <= digits;
    end
  end
endmodule
