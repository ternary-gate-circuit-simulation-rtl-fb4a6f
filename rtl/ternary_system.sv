// ternary_system: a ternary processing system behind a binary interface.
//
// A binary host sends an operand pair and an operation code as 8-bit binary
// numbers. Three binary_to_ternary converters turn them into six-trit words
// (registered, one clock). The 4-trit ALU works on the low four trits of
// each word: operand A from bin_a, operand B either from bin_b or, when
// b_from_mem is high, from the trit last read by the MMU (as the value
// 0..2), and the operation from bin_op (1 = or ... 8 = subtract). The ALU
// result and its carry/borrow trit form the ternary word {bc, c}, worth
// c + 81 * bc (the true sum for an addition), which a ternary_to_binary
// converter returns to the host on bin_out, registered one more clock.
// The ALU's least significant result trit c[0] is the data the MMU writes:
// mem_rwc (0 = read, 1 = write, 2 = clear) and the two-trit index mem_ind
// act at the next rising edge, and mem_out shows the MMU's output trit.
//
// Timing: bin_a/bin_b/bin_op presented before edge k are converted at edge
// k; the ALU result of cycle k (using b_from_mem and mem_out of that cycle)
// is written to memory at edge k+1 if mem_rwc = 1, and appears on bin_out
// after edge k+1. The MMU has no reset: issue a clear before reading it.
// The chain binary -> converter -> ALU <-> MMU -> ternary memory ->
// converter -> binary follows the described system; the three input
// converters, the use of the low four trits, which ALU trit the memory
// stores and the b_from_mem path are this design's own choices.
module ternary_system
  import ternary_pkg::*;
#(
  parameter int BIN_W      = 8,
  parameter int CONV_TRITS = 6,
  parameter int ALU_TRITS  = 4,
  parameter int ADDR_TRITS = 2
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [BIN_W-1:0] bin_a,
  input  logic [BIN_W-1:0] bin_b,
  input  logic [BIN_W-1:0] bin_op,
  input  logic             b_from_mem,
  input  trit_t            mem_rwc,
  input  trit_t            mem_ind [ADDR_TRITS],
  output logic [BIN_W-1:0] bin_out,
  output trit_t            mem_out
);
  trit_t ta [CONV_TRITS];
  trit_t tb [CONV_TRITS];
  trit_t top_code [CONV_TRITS];

  trit_t alu_a [ALU_TRITS];
  trit_t alu_b [ALU_TRITS];
  trit_t alu_o [ALU_TRITS];
  trit_t alu_c [ALU_TRITS];
  trit_t alu_bc;

  trit_t result [CONV_TRITS];

  binary_to_ternary #(.BIN_W(BIN_W), .TRITS(CONV_TRITS)) u_b2t_a (
    .clk(clk), .reset(reset), .binary_input(bin_a), .ternary_output(ta));
  binary_to_ternary #(.BIN_W(BIN_W), .TRITS(CONV_TRITS)) u_b2t_b (
    .clk(clk), .reset(reset), .binary_input(bin_b), .ternary_output(tb));
  binary_to_ternary #(.BIN_W(BIN_W), .TRITS(CONV_TRITS)) u_b2t_op (
    .clk(clk), .reset(reset), .binary_input(bin_op), .ternary_output(top_code));

  always_comb begin
    for (int i = 0; i < ALU_TRITS; i++) begin
      alu_a[i] = ta[i];
      alu_o[i] = top_code[i];
      if (b_from_mem) alu_b[i] = (i == 0) ? mem_out : T0;
      else            alu_b[i] = tb[i];
    end
  end

  ternary_alu #(.N_TRITS(ALU_TRITS)) u_alu (
    .a(alu_a), .b(alu_b), .o(alu_o), .c(alu_c), .bc(alu_bc));

  ternary_mmu #(.ADDR_TRITS(ADDR_TRITS)) u_mmu (
    .clk        (clk),
    .ind        (mem_ind),
    .input_data (alu_c[0]),
    .rwc        (mem_rwc),
    .output_data(mem_out)
  );

  always_comb begin
    for (int i = 0; i < CONV_TRITS; i++) begin
      if (i < ALU_TRITS)       result[i] = alu_c[i];
      else if (i == ALU_TRITS) result[i] = alu_bc;
      else                     result[i] = T0;
    end
  end

  ternary_to_binary #(.BIN_W(BIN_W), .TRITS(CONV_TRITS)) u_t2b (
    .clk(clk), .reset(reset), .ternary_input(result), .binary_output(bin_out));
endmodule
