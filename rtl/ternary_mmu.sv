// ternary_mmu: memory management unit in front of the ternary memory.
//
// The unit takes a ternary cell index ind of ADDR_TRITS trits (two trits
// address 3**2 = 9 cells), turns it into the binary cell number
// sum(ind[i] * 3**i) that the memory uses, and carries out the operation
// coded on the rwc trit: 0 = read, 1 = write, 2 = clear. The rwc trit is
// decoded with the ternary literal gates: an NTI gives 2 only for a 0
// (read), a PTI gives 0 only for a 2 (clear), anything else is a write.
//   read : at the rising edge output_data takes the addressed cell's trit
//   write: at the rising edge the addressed cell takes input_data
//   clear: at the rising edge every cell and output_data become 0
// output_data is a ternary flip-flop and keeps its value on write cycles.
// There is no reset (none is listed for the unit); a clear brings it to a
// known state. The ports (ind, input_data, rwc, output_data), the nine-trit
// size and the two-trit index follow the described unit; the rwc code
// values, the one-cycle read latency, clear-all and the added clk are this
// design's own choices.
module ternary_mmu
  import ternary_pkg::*;
#(
  parameter int ADDR_TRITS = 2,
  localparam int DEPTH     = 3 ** ADDR_TRITS,
  localparam int AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic  clk,
  input  trit_t ind [ADDR_TRITS],
  input  trit_t input_data,
  input  trit_t rwc,
  output trit_t output_data
);
  trit_t          rwc_nti, rwc_pti;
  logic           is_read, is_clear, is_write;
  logic [AW-1:0]  addr;
  trit_t          rdata;
  trit_t          out_d;

  ternary_nti u_nti (.a(rwc), .y(rwc_nti));
  ternary_pti u_pti (.a(rwc), .y(rwc_pti));

  always_comb begin
    is_read  = (rwc_nti == T2);
    is_clear = (rwc_pti == T0);
    is_write = !is_read && !is_clear;
  end

  // Ternary index to binary cell number.
  always_comb begin
    int unsigned v;
    int unsigned w;
    v = 0;
    w = 1;
    for (int i = 0; i < ADDR_TRITS; i++) begin
      v = v + 32'(legal(ind[i])) * w;
      w = w * 3;
    end
    addr = AW'(v);
  end

  ternary_memory #(.DEPTH(DEPTH)) u_mem (
    .clk  (clk),
    .we   (is_write),
    .clr  (is_clear),
    .addr (addr),
    .wdata(input_data),
    .rdata(rdata)
  );

  always_comb begin
    if (is_clear)     out_d = T0;
    else if (is_read) out_d = rdata;
    else              out_d = output_data;
  end

  ternary_dff u_out (.clk(clk), .data(out_d), .o(output_data));
endmodule
