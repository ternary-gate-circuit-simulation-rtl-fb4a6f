// tb_ternary_sti: exhaustive self-checking test of the standard ternary inverter (STI).
//
// Applies all four two-wire input codes (the three trits and the illegal
// code 11, expected to behave as 2) and compares the output with the
// inverter truth table: input 0 -> 2, 1 -> 1, 2 -> 0.
module tb_ternary_sti;
  import ternary_pkg::*;

  trit_t a, y;
  int checks = 0, failures = 0;
  localparam trit_t EXPECT [4] = '{trit_t'(2), trit_t'(1), trit_t'(0), trit_t'(0)};

  ternary_sti dut (.a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = trit_t'(i);
      #1;
      checks++;
      if (y !== EXPECT[i]) begin
        failures++;
        $display("FAIL: in=%0d out=%0d expected=%0d", i, y, EXPECT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
