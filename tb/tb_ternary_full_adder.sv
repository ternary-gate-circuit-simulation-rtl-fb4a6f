// tb_ternary_full_adder: exhaustive self-checking test of the ternary full adder.
//
// Every combination of a, b and cin in 0..2 is applied; the expected sum and
// carry are worked out as (a + b + cin) mod 3 and div 3 with integer
// arithmetic. The illegal code 11 on a is also applied and must act as 2.
module tb_ternary_full_adder;
  import ternary_pkg::*;

  trit_t a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  ternary_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int ai, input int bi, input int ci, input int av);
    int total;
    a   = trit_t'(ai);
    b   = trit_t'(bi);
    cin = trit_t'(ci);
    #1;
    total = av + bi + ci;
    checks++;
    if (sum !== trit_t'(total % 3) || cout !== trit_t'(total / 3)) begin
      failures++;
      $display("FAIL: a=%0d b=%0d cin=%0d -> sum=%0d cout=%0d", ai, bi, ci, sum, cout);
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++)
          apply(i, j, k, i);
    apply(3, 1, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
