// tb_ternary_alu: self-checking test of the 4-trit ternary ALU.
//
// For every operation code 0..12 (1..8 are the operations, the rest must
// give a zero result) the test applies corner operands (0, 1, 40, 79, 80 in
// every pairing) and 150 random operand pairs in 0..80. Expected results come
// from an integer model: add and subtract are done on integers and then
// split into trits (carry = sum >= 81, borrow = a < b); the logic operations
// are computed trit by trit from min, max and 2 - x written out here.
module tb_ternary_alu;
  import ternary_pkg::*;

  localparam int N = 4;
  localparam int MODV = 81;

  trit_t a [N], b [N], o [N], c [N];
  trit_t bc;
  int checks = 0, failures = 0;
  int op_seen [9];

  ternary_alu #(.N_TRITS(N)) dut (.a(a), .b(b), .o(o), .c(c), .bc(bc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(input int v, input int i);
    int p = 1;
    for (int k = 0; k < i; k++) p *= 3;
    return (v / p) % 3;
  endfunction

  function automatic int mn(input int x, input int y);
    return (x < y) ? x : y;
  endfunction

  function automatic int mx(input int x, input int y);
    return (x > y) ? x : y;
  endfunction

  task automatic apply(input int av, input int bv, input int opv);
    int exp_c [N];
    int exp_bc, r, da, db, p;
    for (int i = 0; i < N; i++) begin
      a[i] = trit_t'(digit(av, i));
      b[i] = trit_t'(digit(bv, i));
      o[i] = trit_t'(digit(opv, i));
    end
    #1;
    exp_bc = 0;
    r = 0;
    if (opv == 7) begin
      r = av + bv;
      exp_bc = (r >= MODV) ? 1 : 0;
      r = r % MODV;
    end else if (opv == 8) begin
      r = av - bv;
      exp_bc = (r < 0) ? 1 : 0;
      r = (r + MODV) % MODV;
    end
    for (int i = 0; i < N; i++) begin
      da = digit(av, i);
      db = digit(bv, i);
      case (opv)
        1: exp_c[i] = mx(da, db);
        2: exp_c[i] = mn(da, db);
        3: exp_c[i] = 2 - mx(da, db);
        4: exp_c[i] = 2 - mn(da, db);
        5: exp_c[i] = mx(mn(da, 2 - db), mn(2 - da, db));
        6: exp_c[i] = 2 - mx(mn(da, 2 - db), mn(2 - da, db));
        7, 8: exp_c[i] = digit(r, i);
        default: exp_c[i] = 0;
      endcase
    end
    checks++;
    p = 0;
    for (int i = 0; i < N; i++) if (c[i] !== trit_t'(exp_c[i])) p = 1;
    if (bc !== trit_t'(exp_bc)) p = 1;
    if (p != 0) begin
      failures++;
      $display("FAIL: op=%0d a=%0d b=%0d bc=%0d expected bc=%0d", opv, av, bv, bc, exp_bc);
    end
    if (opv >= 1 && opv <= 8) op_seen[opv]++;
  endtask

  initial begin
    int corner [5] = '{0, 1, 40, 79, 80};
    for (int opv = 0; opv <= 12; opv++) begin
      foreach (corner[i])
        foreach (corner[j])
          apply(corner[i], corner[j], opv);
      repeat (150) apply(int'($urandom_range(80)), int'($urandom_range(80)), opv);
    end
    // An operation code with a high trit set (9 * k + 7) is not an addition.
    apply(5, 6, 16);
    apply(5, 6, 34);
    for (int k = 1; k <= 8; k++) begin
      checks++;
      if (op_seen[k] == 0) begin
        failures++;
        $display("FAIL: operation %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
