// ternary_alu: N_TRITS-trit ternary arithmetic and logic unit.
//
// Operands a and b and result c are unsigned ternary words (index 0 = least
// significant trit). The operation input o is itself a ternary number
// (sum(o[i] * 3**i)) selecting one of eight operations:
//   1 or    c[i] = max(a[i], b[i])            (ternary OR gates)
//   2 and   c[i] = min(a[i], b[i])            (ternary AND gates)
//   3 nor   STI of or
//   4 nand  STI of and
//   5 xor   max(min(a, STI b), min(STI a, b)), trit by trit
//   6 xnor  STI of xor
//   7 add   c = (a + b) mod 3**N, bc = carry out (0 or 1)
//   8 sub   c = (a - b) mod 3**N, bc = borrow (1 when a < b)
// Any other code gives c = 0 and bc = 0; the logic operations give bc = 0.
// Addition is a ripple chain of ternary full adders. Subtraction reuses the
// chain in radix complement: STI turns every trit of b into 2 - b[i], i.e.
// the word into (3**N - 1) - b; adding it to a with a carry-in of 1 yields
// a - b + 3**N, so the chain's carry-out is 1 exactly when no borrow
// occurred (an assertion checks that the carry-out is only ever 0 or 1).
// The unit is purely combinational.
// The eight operations, their numbering, the 4-trit operands, result and
// operation inputs and the carry/borrow trit follow the described ALU; the
// min/max form of xor, the complement subtraction and the treatment of
// unused codes are this design's own choices.
module ternary_alu
  import ternary_pkg::*;
#(
  parameter int N_TRITS = 4
) (
  input  trit_t a  [N_TRITS],
  input  trit_t b  [N_TRITS],
  input  trit_t o  [N_TRITS],
  output trit_t c  [N_TRITS],
  output trit_t bc
);
  alu_op_e op;
  logic    is_sub;

  trit_t and_t  [N_TRITS];
  trit_t or_t   [N_TRITS];
  trit_t nand_t [N_TRITS];
  trit_t nor_t  [N_TRITS];
  trit_t sti_a  [N_TRITS];
  trit_t sti_b  [N_TRITS];
  trit_t x1     [N_TRITS];
  trit_t x2     [N_TRITS];
  trit_t xor_t  [N_TRITS];
  trit_t xnor_t [N_TRITS];
  trit_t add_b  [N_TRITS];
  trit_t sum_t  [N_TRITS];
  trit_t carry  [N_TRITS+1];

  // Operation code: ternary number on o.
  always_comb begin
    int unsigned v;
    int unsigned w;
    v = 0;
    w = 1;
    for (int i = 0; i < N_TRITS; i++) begin
      v = v + 32'(legal(o[i])) * w;
      w = w * 3;
    end
    op = (v >= 1 && v <= 8) ? alu_op_e'(v[3:0]) : OP_NONE;
  end

  assign is_sub   = (op == OP_SUB);
  assign carry[0] = is_sub ? T1 : T0;

  for (genvar i = 0; i < N_TRITS; i++) begin : g_trit
    ternary_and u_and  (.a(a[i]),     .b(b[i]),     .z(and_t[i]));
    ternary_or  u_or   (.a(a[i]),     .b(b[i]),     .z(or_t[i]));
    ternary_sti u_nand (.a(and_t[i]),               .y(nand_t[i]));
    ternary_sti u_nor  (.a(or_t[i]),                .y(nor_t[i]));
    ternary_sti u_sa   (.a(a[i]),                   .y(sti_a[i]));
    ternary_sti u_sb   (.a(b[i]),                   .y(sti_b[i]));
    ternary_and u_x1   (.a(a[i]),     .b(sti_b[i]), .z(x1[i]));
    ternary_and u_x2   (.a(sti_a[i]), .b(b[i]),     .z(x2[i]));
    ternary_or  u_xor  (.a(x1[i]),    .b(x2[i]),    .z(xor_t[i]));
    ternary_sti u_xnor (.a(xor_t[i]),               .y(xnor_t[i]));

    assign add_b[i] = is_sub ? sti_b[i] : legal(b[i]);

    ternary_full_adder u_fa (
      .a   (a[i]),
      .b   (add_b[i]),
      .cin (carry[i]),
      .sum (sum_t[i]),
      .cout(carry[i+1])
    );
  end

  always_comb begin
    bc = T0;
    for (int i = 0; i < N_TRITS; i++) begin
      unique case (op)
        OP_OR:   c[i] = or_t[i];
        OP_AND:  c[i] = and_t[i];
        OP_NOR:  c[i] = nor_t[i];
        OP_NAND: c[i] = nand_t[i];
        OP_XOR:  c[i] = xor_t[i];
        OP_XNOR: c[i] = xnor_t[i];
        OP_ADD,
        OP_SUB:  c[i] = sum_t[i];
        default: c[i] = T0;
      endcase
    end
    if (op == OP_ADD) bc = carry[N_TRITS];
    if (op == OP_SUB) bc = (carry[N_TRITS] == T0) ? T1 : T0;
  end

  // With a carry-in of 0 or 1 every stage totals at most 2 + 2 + 1 = 5, so
  // the chain's carry-out can only be 0 or 1.
  always_comb
    assert (carry[N_TRITS] == T0 || carry[N_TRITS] == T1)
      else $error("ternary_alu: carry-out %0d out of range", carry[N_TRITS]);
endmodule
