// mbc_addr_gen: address generation for a memory-based lookup.
//
// The operands of a redirected operation come here together with the number
// of the 8-bit slice being looked up. The unit selects the slice pair
// X = a[8s+7:8s], Y = b[8s+7:8s] and forms from it:
//   L1 virtual address : tag = X, index = X mod L1_SETS, block offset = Y
//   L2 virtual address : tag = X, index = X mod L2_SETS, block offset = Y
//   physical address   : {pagebase, X, 8'b0}, the byte address of the line of
//                        the result page that holds X + (every Y)
// The page base is the one the operating system returned when it loaded the
// result tables; with a single table page no page table or TLB is needed. The
// modulo is computed for any set count, so set counts need not be powers of
// two. The low 8 bits of the physical address are always zero, and its top
// 16 bits are the page base unchanged. The address fields follow the
// described scheme; the byte layout of the physical address (one 256-byte
// line per X in a 64 KB page) and selecting the slice here are this design's.
// Purely combinational.
module mbc_addr_gen
  import mbc_pkg::*;
#(
  parameter int unsigned L1_SETS = 16,
  parameter int unsigned L2_SETS = 64,
  localparam int unsigned L1_IDX_W = (L1_SETS > 1) ? $clog2(L1_SETS) : 1,
  localparam int unsigned L2_IDX_W = (L2_SETS > 1) ? $clog2(L2_SETS) : 1
) (
  input  logic [OPND_W-1:0]      a,
  input  logic [OPND_W-1:0]      b,
  input  logic [SLICE_SEL_W-1:0] slice,
  input  logic [PAGEBASE_W-1:0]  pagebase,
  output logic [SLICE_W-1:0]     l1_tag,
  output logic [L1_IDX_W-1:0]    l1_index,
  output logic [SLICE_W-1:0]     l1_offset,
  output logic [SLICE_W-1:0]     l2_tag,
  output logic [L2_IDX_W-1:0]    l2_index,
  output logic [SLICE_W-1:0]     l2_offset,
  output logic [PA_W-1:0]        pa
);

  logic [SLICE_W-1:0] x, y;
  logic [31:0]        x_mod_l1, x_mod_l2;

  always_comb begin
    x         = a[slice*SLICE_W +: SLICE_W];
    y         = b[slice*SLICE_W +: SLICE_W];
    x_mod_l1  = 32'(x) % L1_SETS;
    x_mod_l2  = 32'(x) % L2_SETS;
    l1_tag    = x;
    l1_index  = L1_IDX_W'(x_mod_l1);
    l1_offset = y;
    l2_tag    = x;
    l2_index  = L2_IDX_W'(x_mod_l2);
    l2_offset = y;
    pa        = {pagebase, x, {(PA_W - PAGEBASE_W - SLICE_W){1'b0}}};
  end

endmodule
