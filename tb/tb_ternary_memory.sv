// tb_ternary_memory: self-checking test of the nine-trit ternary memory.
//
// Keeps a reference array of the nine cells. It writes every cell with a
// distinct pattern, reads them all back, clears the memory and checks that
// every cell reads 0, then runs 300 random cycles of writes, idle cycles and
// occasional clears, checking the read port against the reference each time.
module tb_ternary_memory;
  import ternary_pkg::*;

  localparam int DEPTH = 9;
  localparam int AW = 4;

  logic          clk = 1'b0;
  logic          we, clr;
  logic [AW-1:0] addr;
  trit_t         wdata, rdata;
  trit_t         model [DEPTH];
  int checks = 0, failures = 0;
  int cycles = 0;

  ternary_memory #(.DEPTH(DEPTH)) dut (
    .clk(clk), .we(we), .clr(clr), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic w, input logic c, input int ad, input trit_t d);
    @(negedge clk);
    we = w; clr = c; addr = AW'(ad); wdata = d;
    @(posedge clk);
    if (c) begin
      foreach (model[i]) model[i] = T0;
    end else if (w && ad < DEPTH) begin
      model[ad] = d;
    end
    #1;
    we = 1'b0; clr = 1'b0;
  endtask

  task automatic check_read(input int ad);
    @(negedge clk);
    addr = AW'(ad);
    #1;
    checks++;
    if (rdata !== ((ad < DEPTH) ? model[ad] : T0)) begin
      failures++;
      $display("FAIL: cell %0d reads %0d expected %0d", ad, rdata, model[ad]);
    end
  endtask

  initial begin
    we = 1'b0; clr = 1'b0; addr = '0; wdata = T0;
    cycle(1'b0, 1'b1, 0, T0);
    for (int i = 0; i < DEPTH; i++) cycle(1'b1, 1'b0, i, trit_t'((i + 1) % 3));
    for (int i = 0; i < DEPTH; i++) check_read(i);
    cycle(1'b0, 1'b1, 0, T0);
    for (int i = 0; i < DEPTH; i++) check_read(i);
    repeat (300) begin
      int r;
      r = int'($urandom_range(19));
      cycle(r < 14, r == 19, int'($urandom_range(DEPTH - 1)), trit_t'($urandom_range(2)));
      check_read(int'($urandom_range(DEPTH - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
