// tb_binary_to_ternary: self-checking test of the binary to ternary converter.
//
// After a reset (all six output trits must read 0) every 8-bit value 0..255
// is presented, in order and then in random order, and the six output trits
// are checked one clock later against digits worked out by repeated
// subtraction of powers of three. A reset in mid-stream must clear the
// output again. The one-cycle latency is checked by sampling the output
// just before and just after the edge.
module tb_binary_to_ternary;
  import ternary_pkg::*;

  localparam int BW = 8;
  localparam int NT = 6;

  logic          clk = 1'b0;
  logic          reset;
  logic [BW-1:0] bin;
  trit_t         tern [NT];
  int checks = 0, failures = 0;
  int cycles = 0;
  int prev_v = 0;

  binary_to_ternary #(.BIN_W(BW), .TRITS(NT)) dut (
    .clk(clk), .reset(reset), .binary_input(bin), .ternary_output(tern));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit digits_ok(input int v);
    int pw [NT] = '{1, 3, 9, 27, 81, 243};
    int rest = v;
    for (int i = NT - 1; i >= 0; i--) begin
      int d = 0;
      while (rest >= pw[i]) begin
        rest -= pw[i];
        d++;
      end
      if (tern[i] !== trit_t'(d)) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic convert(input int v);
    @(negedge clk);
    bin = BW'(v);
    #1;
    checks++;
    if (!digits_ok(prev_v)) begin
      failures++;
      $display("FAIL: output changed before the clock edge (value %0d)", v);
    end
    @(posedge clk);
    #1;
    checks++;
    if (!digits_ok(v)) begin
      failures++;
      $display("FAIL: %0d converted wrongly", v);
    end
    prev_v = v;
  endtask

  initial begin
    reset = 1'b1;
    bin = 8'd200;
    @(posedge clk);
    #1;
    checks++;
    if (!digits_ok(0)) begin
      failures++;
      $display("FAIL: reset did not clear the output");
    end
    @(negedge clk);
    reset = 1'b0;
    prev_v = 200;  // converted at the next edge, before the first new value
    for (int v = 0; v < 256; v++) convert(v);
    repeat (200) convert(int'($urandom_range(255)));
    @(negedge clk);
    reset = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (!digits_ok(0)) begin
      failures++;
      $display("FAIL: reset in mid-stream did not clear the output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
