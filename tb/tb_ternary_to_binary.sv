// tb_ternary_to_binary: self-checking test of the ternary to binary converter.
//
// After a reset (output 0) every six-trit word 0..728 is presented and the
// binary output is checked one clock later against the value worked out by
// Horner's rule from the most significant trit, taken modulo 256. The
// output must not change before the clock edge. A word holding the illegal
// code 11 must convert as if that trit were 2, and a reset in mid-stream
// must clear the output.
module tb_ternary_to_binary;
  import ternary_pkg::*;

  localparam int BW = 8;
  localparam int NT = 6;

  logic          clk = 1'b0;
  logic          reset;
  trit_t         tern [NT];
  logic [BW-1:0] bin;
  int checks = 0, failures = 0;
  int cycles = 0;
  int prev_v = 0;

  ternary_to_binary #(.BIN_W(BW), .TRITS(NT)) dut (
    .clk(clk), .reset(reset), .ternary_input(tern), .binary_output(bin));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int horner(input int d [NT]);
    int v = 0;
    for (int i = NT - 1; i >= 0; i--) v = v * 3 + d[i];
    return v;
  endfunction

  task automatic present(input int d [NT], input int codes [NT]);
    int v = horner(d) % 256;
    @(negedge clk);
    for (int i = 0; i < NT; i++) tern[i] = trit_t'(codes[i]);
    #1;
    checks++;
    if (int'(bin) != prev_v) begin
      failures++;
      $display("FAIL: output changed before the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    if (int'(bin) != v) begin
      failures++;
      $display("FAIL: word %0d gave %0d expected %0d", horner(d), bin, v);
    end
    prev_v = v;
  endtask

  initial begin
    int d [NT];
    int codes [NT];
    reset = 1'b1;
    for (int i = 0; i < NT; i++) tern[i] = T2;
    @(posedge clk);
    #1;
    checks++;
    if (bin !== '0) begin
      failures++;
      $display("FAIL: reset did not clear the output");
    end
    @(negedge clk);
    reset = 1'b0;
    prev_v = 728 % 256;  // the all-2 word is converted at the next edge
    for (int w = 0; w < 729; w++) begin
      int r;
      r = w;
      for (int i = 0; i < NT; i++) begin
        d[i] = r % 3;
        r = r / 3;
      end
      present(d, d);
    end
    d = '{1, 0, 2, 0, 0, 1};
    codes = '{1, 0, 3, 0, 0, 1};
    present(d, codes);
    @(negedge clk);
    reset = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (bin !== '0) begin
      failures++;
      $display("FAIL: reset in mid-stream did not clear the output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
