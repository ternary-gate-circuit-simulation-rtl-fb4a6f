// tb_ternary_or: exhaustive self-checking test of the two-input ternary OR gate.
//
// Applies all 16 pairs of two-wire input codes and compares the output with
// the 3x3 truth table below (rows a = 0..2, columns b = 0..2); the illegal
// code 11 is expected to behave as 2.
module tb_ternary_or;
  import ternary_pkg::*;

  trit_t a, b, z;
  int checks = 0, failures = 0;
  localparam trit_t TABLE [3][3] = '{'{trit_t'(0), trit_t'(1), trit_t'(2)},
                                      '{trit_t'(1), trit_t'(1), trit_t'(2)},
                                      '{trit_t'(2), trit_t'(2), trit_t'(2)}};

  ternary_or dut (.a(a), .b(b), .z(z));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = trit_t'(i);
        b = trit_t'(j);
        #1;
        checks++;
        if (z !== TABLE[(i > 2) ? 2 : i][(j > 2) ? 2 : j]) begin
          failures++;
          $display("FAIL: a=%0d b=%0d z=%0d", i, j, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
