// ternary_pkg: types, constants and logic functions shared by the ternary blocks.
//
// A trit (ternary digit) is carried on two binary wires as an unsigned code:
// 2'b00 = logic 0, 2'b01 = logic 1 (intermediate), 2'b10 = logic 2. The code
// 2'b11 is not a legal trit; every function here reads it as logic 2 so that
// no input can produce an illegal output code. The three levels and the gate
// truth tables (STI, NTI, PTI, AND = minimum, OR = maximum) follow the
// standard ternary gate definitions; the two-wire code and the handling of
// 2'b11 are this design's own choices.
package ternary_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;
  localparam trit_t T2 = 2'd2;

  // Operation codes of the ALU, as the unsigned ternary number on its
  // operation input (1 = or ... 8 = subtract).
  typedef enum logic [3:0] {
    OP_NONE = 4'd0,
    OP_OR   = 4'd1,
    OP_AND  = 4'd2,
    OP_NOR  = 4'd3,
    OP_NAND = 4'd4,
    OP_XOR  = 4'd5,
    OP_XNOR = 4'd6,
    OP_ADD  = 4'd7,
    OP_SUB  = 4'd8
  } alu_op_e;

  // Map any two-wire code onto a legal trit (2'b11 reads as 2).
  function automatic trit_t legal(input trit_t a);
    return (a == 2'b11) ? T2 : a;
  endfunction

  // Standard ternary inverter: 0->2, 1->1, 2->0.
  function automatic trit_t sti(input trit_t a);
    return trit_t'(2'd2 - legal(a));
  endfunction

  // Negative ternary inverter: 0->2, 1->0, 2->0.
  function automatic trit_t nti(input trit_t a);
    return (legal(a) == T0) ? T2 : T0;
  endfunction

  // Positive ternary inverter: 0->2, 1->2, 2->0.
  function automatic trit_t pti(input trit_t a);
    return (legal(a) == T2) ? T0 : T2;
  endfunction

  // Ternary AND is the minimum of its inputs.
  function automatic trit_t tand(input trit_t a, input trit_t b);
    return (legal(a) < legal(b)) ? legal(a) : legal(b);
  endfunction

  // Ternary OR is the maximum of its inputs.
  function automatic trit_t tor(input trit_t a, input trit_t b);
    return (legal(a) > legal(b)) ? legal(a) : legal(b);
  endfunction

endpackage
