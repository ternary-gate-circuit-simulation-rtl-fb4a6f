// tb_ternary_dff: self-checking test of the ternary D flip-flop.
//
// Drives a sequence of trits (all nine transitions between 0, 1 and 2, then
// random values) and checks that after each rising edge the output equals
// the trit presented before that edge, and that a data change between edges
// does not reach the output until the next rising edge.
module tb_ternary_dff;
  import ternary_pkg::*;

  logic  clk = 1'b0;
  trit_t data, o;
  int checks = 0, failures = 0;
  int cycles = 0;

  ternary_dff dut (.clk(clk), .data(data), .o(o));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input trit_t d);
    trit_t other;
    @(negedge clk);
    data = d;
    @(posedge clk);
    #1;
    checks++;
    if (o !== d) begin
      failures++;
      $display("FAIL: stored %0d expected %0d", o, d);
    end
    // Change data in mid-cycle: the output must hold.
    other = (d == T2) ? T0 : trit_t'(d + 2'd1);
    data = other;
    #2;
    checks++;
    if (o !== d) begin
      failures++;
      $display("FAIL: output followed data between edges");
    end
  endtask

  initial begin
    data = T0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        step(trit_t'(i));
        step(trit_t'(j));
      end
    repeat (50) step(trit_t'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
