// mbc_unit: memory-based execution unit that takes over additions and
// multiplications from bypassed functional units.
//
// An accepted operation is first ordered by the 32-bit comparator: for an
// addition the smaller operand becomes X, the slice that tags the table line,
// so that a + b and b + a share lines and small operands share the line X = 0;
// for a multiplication the smaller operand becomes the multiplier, which
// bounds the number of additions. Additions go straight to the memory-based
// adder; multiplications go to the shift-and-add multiplier, which borrows the
// same adder. The adder's slice lookups go to the L1/L2/main-memory lookup
// hierarchy, whose table page is at `pagebase`.
//
// Interfaces
//   in_valid/in_ready with op, a, b and a destination tag; one operation at a
//   time. in_ready stays low until pagebase_valid, that is until the tables
//   have been loaded.
//   out_valid pulses for one cycle with out_tag and out_result (low 32 bits
//   of the product for a multiplication).
//   mem_* : line fetch port to main memory (see mbc_lookup).
//   events: cache event pulses; swapped pulses when the comparator swapped
//   the operands; mul_add pulses per addition of a multiplication.
// Operand ordering by a comparator is how this design reads the described
// use of the comparator; sharing one adder is this design's choice.
module mbc_unit
  import mbc_pkg::*;
#(
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned L1_WAYS = 2,
  parameter int unsigned L1_SETS = 16,
  parameter int unsigned L2_WAYS = 4,
  parameter int unsigned L2_SETS = 64,
  parameter int unsigned L2_LAT  = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PAGEBASE_W-1:0] pagebase,
  input  logic                  pagebase_valid,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  mbc_op_e               op,
  input  logic [31:0]           a,
  input  logic [31:0]           b,
  input  logic [TAG_W-1:0]      tag,
  output logic                  out_valid,
  output logic [TAG_W-1:0]      out_tag,
  output logic [31:0]           out_result,
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic [PA_W-1:0]       mem_req_addr,
  input  logic                  mem_rdata_valid,
  input  chunk_t                mem_rdata,
  output mbc_events_t           events,
  output logic                  swapped,
  output logic                  mul_add
);

  logic        busy_q;
  mbc_op_e     op_q;
  logic [TAG_W-1:0] tag_q;

  logic        lt, eq;
  logic [31:0] lo, hi;
  comparator32 u_cmp (.a(a), .b(b), .lt(lt), .eq(eq));
  assign lo = lt ? a : b;     // smaller operand
  assign hi = lt ? b : a;

  logic accept;
  assign in_ready = !busy_q && pagebase_valid;
  assign accept   = in_valid && in_ready;
  assign swapped  = accept && !lt && !eq;

  // adder: driven by the unit for an addition, by the multiplier otherwise
  logic        add_in_valid, add_in_ready, add_out_valid, add_cout;
  logic [31:0] add_a, add_b, add_sum;
  logic        m_add_valid;
  logic [31:0] m_add_a, m_add_b;
  logic        mul_in_ready, mul_out_valid;
  logic [31:0] mul_product;

  logic        lk_valid, lk_ready, lk_resp_valid;
  logic [31:0] lk_a, lk_b;
  logic [1:0]  lk_slice;
  lut_entry_t  lk_entry;

  always_comb begin
    if (accept && op == OP_ADD) begin
      add_in_valid = 1'b1;
      add_a        = lo;
      add_b        = hi;
    end else begin
      add_in_valid = busy_q && op_q == OP_MUL && m_add_valid;
      add_a        = m_add_a;
      add_b        = m_add_b;
    end
  end

  mbc_adder u_add (
    .clk, .rst_n,
    .in_valid(add_in_valid), .in_ready(add_in_ready), .a(add_a), .b(add_b), .cin(1'b0),
    .out_valid(add_out_valid), .sum(add_sum), .cout(add_cout),
    .lk_valid(lk_valid), .lk_ready(lk_ready), .lk_a(lk_a), .lk_b(lk_b), .lk_slice(lk_slice),
    .lk_resp_valid(lk_resp_valid), .lk_resp_entry(lk_entry)
  );

  mbc_multiplier u_mul (
    .clk, .rst_n,
    .in_valid(accept && op == OP_MUL), .in_ready(mul_in_ready),
    .mcand(hi), .mplier(lo),
    .out_valid(mul_out_valid), .product(mul_product),
    .add_valid(m_add_valid), .add_ready(add_in_ready && busy_q && op_q == OP_MUL),
    .add_a(m_add_a), .add_b(m_add_b),
    .add_done(add_out_valid && op_q == OP_MUL), .add_sum(add_sum),
    .add_issued(mul_add)
  );

  mbc_lookup #(
    .L1_WAYS(L1_WAYS), .L1_SETS(L1_SETS), .L1_LAT(1),
    .L2_WAYS(L2_WAYS), .L2_SETS(L2_SETS), .L2_LAT(L2_LAT)
  ) u_lookup (
    .clk, .rst_n, .pagebase,
    .req_valid(lk_valid), .req_ready(lk_ready), .req_a(lk_a), .req_b(lk_b), .req_slice(lk_slice),
    .resp_valid(lk_resp_valid), .resp_entry(lk_entry),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rdata_valid, .mem_rdata,
    .events
  );

  // the carry out of a 32-bit integer add is not architecturally kept
  logic unused_ok;
  assign unused_ok = add_cout ^ mul_in_ready;

  always_comb begin
    out_valid  = busy_q && ((op_q == OP_ADD) ? add_out_valid : mul_out_valid);
    out_tag    = tag_q;
    out_result = (op_q == OP_ADD) ? add_sum : mul_product;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      op_q   <= OP_ADD;
      tag_q  <= '0;
    end else begin
      if (accept) begin
        busy_q <= 1'b1;
        op_q   <= op;
        tag_q  <= tag;
      end else if (out_valid) begin
        busy_q <= 1'b0;
      end
    end
  end

  a_idle_units: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> add_in_ready && mul_in_ready);

endmodule
