// tb_ternary_mmu: self-checking test of the ternary memory management unit.
//
// The unit is driven through its ternary ports only: a two-trit index, a
// data trit and the rwc trit (0 = read, 1 = write, 2 = clear). A reference
// array of nine cells is addressed by ind[0] + 3 * ind[1]. After a clear,
// every idx is written, read back (output_data is checked one clock after
// the read), cleared and read again; then 400 random operations follow.
// Writes must leave output_data unchanged. The number of reads, writes and
// clears is counted, and each must have happened.
module tb_ternary_mmu;
  import ternary_pkg::*;

  localparam int AT = 2;
  localparam int DEPTH = 9;

  logic  clk = 1'b0;
  trit_t ind [AT];
  trit_t input_data, rwc, output_data;
  trit_t model [DEPTH];
  trit_t model_out;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_read = 0, n_write = 0, n_clear = 0;

  ternary_mmu #(.ADDR_TRITS(AT)) dut (
    .clk(clk), .ind(ind), .input_data(input_data), .rwc(rwc), .output_data(output_data));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_op(input int code, input int idx, input trit_t d);
    @(negedge clk);
    rwc = trit_t'(code);
    ind[0] = trit_t'(idx % 3);
    ind[1] = trit_t'(idx / 3);
    input_data = d;
    @(posedge clk);
    case (code)
      0: begin model_out = model[idx]; n_read++; end
      1: begin model[idx] = d; n_write++; end
      default: begin
        foreach (model[i]) model[i] = T0;
        model_out = T0;
        n_clear++;
      end
    endcase
    #1;
    if (code != 2 || n_clear > 1) begin
      checks++;
      if (output_data !== model_out) begin
        failures++;
        $display("FAIL: rwc=%0d idx=%0d output=%0d expected=%0d", code, idx, output_data, model_out);
      end
    end
  endtask

  initial begin
    rwc = T0; input_data = T0; ind[0] = T0; ind[1] = T0;
    do_op(2, 0, T0);
    checks++;
    if (output_data !== T0) begin
      failures++;
      $display("FAIL: clear did not zero the output");
    end
    for (int i = 0; i < DEPTH; i++) do_op(1, i, trit_t'((i % 2) + 1));
    for (int i = 0; i < DEPTH; i++) do_op(0, i, T0);
    do_op(2, 4, T1);
    for (int i = 0; i < DEPTH; i++) do_op(0, i, T0);
    repeat (400) begin
      int r, code;
      r = int'($urandom_range(15));
      if (r < 7)       code = 0;
      else if (r < 15) code = 1;
      else             code = 2;
      do_op(code, int'($urandom_range(DEPTH - 1)), trit_t'($urandom_range(2)));
    end
    checks++;
    if ((n_read == 0) || (n_write == 0) || (n_clear <= 1)) begin
      failures++;
      $display("FAIL: an operation was never exercised");
    end
    $display("reads=%0d writes=%0d clears=%0d", n_read, n_write, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
