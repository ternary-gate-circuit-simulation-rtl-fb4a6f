// tb_ternary_system: end-to-end self-checking test of the ternary system.
//
// Runs the top at its default sizes (8-bit binary ports, six-trit
// converters, 4-trit ALU, nine-trit memory). A cycle-level reference model,
// written with plain integers, mirrors the design: at each rising edge the
// three operand/operation registers load the new binary inputs, the ALU
// result of the ending cycle (operand B from bin_b or from the memory's
// output trit) is converted to bin_out as c + 81 * bc, and the memory
// performs the read/write/clear on the ALU's lowest result trit. After every
// edge bin_out and mem_out are compared with the model.
//
// The test starts with reset held while the memory is cleared, then runs a
// directed sequence (every operation, an add with carry, a subtract with
// borrow, a store of an ALU trit, a read back, use of the read trit as
// operand B, a clear, operands above 80 whose high trits the ALU drops, a
// mid-run reset) followed by 3000 random cycles. It counts how often each
// of these mechanisms occurred and fails if any never did.
module tb_ternary_system;
  import ternary_pkg::*;

  localparam int MODV = 81;

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] bin_a, bin_b, bin_op;
  logic       b_from_mem;
  trit_t      mem_rwc;
  trit_t      mem_ind [2];
  logic [7:0] bin_out;
  trit_t      mem_out;

  int checks = 0, failures = 0;
  int cycles = 0;

  // Reference state.
  int m_a, m_b, m_op, m_out, m_mem_out;
  int m_mem [9];
  bit mem_known;

  // Mechanism counters.
  int n_op [9];
  int n_carry, n_borrow, n_write, n_read, n_clear, n_from_mem, n_high, n_reset;

  ternary_system dut (
    .clk(clk), .reset(reset), .bin_a(bin_a), .bin_b(bin_b), .bin_op(bin_op),
    .b_from_mem(b_from_mem), .mem_rwc(mem_rwc), .mem_ind(mem_ind),
    .bin_out(bin_out), .mem_out(mem_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
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

  // ALU model: returns c + 81 * bc.
  function automatic int alu_model(input int av, input int bv, input int opv);
    int r = 0, bc = 0, p = 1, da, db, t;
    if (opv == 7) begin
      r = av + bv;
      bc = (r >= MODV) ? 1 : 0;
      return (r % MODV) + MODV * bc;
    end
    if (opv == 8) begin
      r = av - bv;
      bc = (r < 0) ? 1 : 0;
      return ((r + MODV) % MODV) + MODV * bc;
    end
    for (int i = 0; i < 4; i++) begin
      da = digit(av, i);
      db = digit(bv, i);
      case (opv)
        1: t = mx(da, db);
        2: t = mn(da, db);
        3: t = 2 - mx(da, db);
        4: t = 2 - mn(da, db);
        5: t = mx(mn(da, 2 - db), mn(2 - da, db));
        6: t = 2 - mx(mn(da, 2 - db), mn(2 - da, db));
        default: t = 0;
      endcase
      r += t * p;
      p *= 3;
    end
    return r;
  endfunction

  // One clock: drive the inputs, advance the model, compare after the edge.
  task automatic tick(input logic rst, input int a, input int b, input int op,
                      input logic from_mem, input int rwc, input int idx);
    int av, bv, opv, res, code;
    @(negedge clk);
    reset      = rst;
    bin_a      = 8'(a);
    bin_b      = 8'(b);
    bin_op     = 8'(op);
    b_from_mem = from_mem;
    mem_rwc    = trit_t'(rwc);
    mem_ind[0] = trit_t'(idx % 3);
    mem_ind[1] = trit_t'(idx / 3);
    @(posedge clk);
    // Model of the cycle that just ended.
    av   = m_a % MODV;
    bv   = from_mem ? m_mem_out : (m_b % MODV);
    code = m_op % MODV;
    opv  = (code >= 1 && code <= 8) ? code : 0;
    res  = alu_model(av, bv, opv);
    if (!rst) begin
      if (opv != 0) n_op[opv]++;
      if (opv == 7 && res >= MODV) n_carry++;
      if (opv == 8 && res >= MODV) n_borrow++;
      if (from_mem && mem_known) n_from_mem++;
      if (m_a >= MODV || m_b >= MODV) n_high++;
    end
    case (rwc)
      0: begin m_mem_out = m_mem[idx]; if (mem_known) n_read++; end
      1: begin m_mem[idx] = res % 3; n_write++; end
      default: begin
        foreach (m_mem[i]) m_mem[i] = 0;
        m_mem_out = 0;
        mem_known = 1'b1;
        n_clear++;
      end
    endcase
    if (rst) begin
      m_a = 0; m_b = 0; m_op = 0; m_out = 0;
      n_reset++;
    end else begin
      m_out = res % 256;
      m_a = a; m_b = b; m_op = op;
    end
    #1;
    checks++;
    if (int'(bin_out) != m_out) begin
      failures++;
      $display("FAIL: cycle %0d bin_out=%0d expected %0d", cycles, bin_out, m_out);
    end
    if (mem_known) begin
      checks++;
      if (int'(mem_out) != m_mem_out) begin
        failures++;
        $display("FAIL: cycle %0d mem_out=%0d expected %0d", cycles, mem_out, m_mem_out);
      end
    end
  endtask

  initial begin
    mem_known = 1'b0;
    m_mem_out = 0;
    foreach (m_mem[i]) m_mem[i] = 0;
    // Reset while clearing the memory.
    tick(1, 0, 0, 0, 0, 2, 0);
    tick(1, 0, 0, 0, 0, 2, 0);
    // Every operation on fixed operands (the result of each appears one
    // cycle later, while the next one is loaded).
    for (int op = 1; op <= 8; op++) tick(0, 50, 23, op, 0, 0, 0);
    // Add with carry: 70 + 40 = 110 = 29 + 81.
    tick(0, 70, 40, 7, 0, 0, 0);
    // Subtract with borrow: 10 - 30.
    tick(0, 10, 30, 8, 0, 1, 4);   // stores the add result's low trit in cell 4
    tick(0, 0, 0, 0, 0, 1, 5);     // stores the subtract result's low trit in cell 5
    tick(0, 0, 0, 0, 0, 0, 4);     // read cell 4
    tick(0, 5, 0, 7, 0, 0, 5);     // read cell 5, load 5 + mem
    tick(0, 0, 0, 0, 1, 0, 0);     // ALU adds the read trit as operand B
    // Operands above 80: the ALU keeps the low four trits.
    tick(0, 200, 170, 7, 0, 0, 0);
    tick(0, 255, 81, 8, 0, 0, 0);
    tick(0, 0, 0, 0, 0, 2, 0);     // clear
    // Mid-run reset.
    tick(1, 9, 9, 7, 0, 0, 0);
    tick(0, 9, 9, 7, 0, 0, 0);
    repeat (3000) begin
      int a, b, op, rwc, r;
      r = int'($urandom_range(99));
      a = (r < 80) ? int'($urandom_range(80)) : int'($urandom_range(255));
      b = (r < 80) ? int'($urandom_range(80)) : int'($urandom_range(255));
      op = (r < 95) ? int'($urandom_range(9)) : int'($urandom_range(255));
      r = int'($urandom_range(19));
      if (r < 9)       rwc = 0;
      else if (r < 18) rwc = 1;
      else             rwc = 2;
      tick($urandom_range(199) == 0, a, b, op, $urandom_range(3) == 0, rwc,
           int'($urandom_range(8)));
    end
    // Every mechanism must have occurred.
    for (int k = 1; k <= 8; k++) begin
      checks++;
      if (n_op[k] == 0) begin
        failures++;
        $display("FAIL: operation %0d never occurred", k);
      end
    end
    checks++;
    if (n_carry == 0 || n_borrow == 0 || n_write == 0 || n_read == 0 || n_clear == 0 ||
        n_from_mem == 0 || n_high == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("ops or=%0d and=%0d nor=%0d nand=%0d xor=%0d xnor=%0d add=%0d sub=%0d",
             n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8]);
    $display("carry=%0d borrow=%0d write=%0d read=%0d clear=%0d b_from_mem=%0d high_operand=%0d reset=%0d",
             n_carry, n_borrow, n_write, n_read, n_clear, n_from_mem, n_high, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
