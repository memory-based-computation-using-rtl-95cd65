// mbc_pkg: types and constants shared by the memory-based computation blocks.
//
// Addition results are stored as a look-up table indexed by two 8-bit operand
// slices X and Y. One table entry holds the result of X + Y for both values of
// the incoming carry, so that a single lookup serves a carry-select adder:
// {c1, s1} = X + Y + 1 and {c0, s0} = X + Y. A table line holds the entries of
// one X against all 256 values of Y; the cache moves lines in chunks of
// CHUNK_ENTRIES entries. The two-carry entry follows the described table
// organisation; the chunk size is a choice of this design.
package mbc_pkg;

  localparam int unsigned OPND_W        = 32;                      // integer operand width
  localparam int unsigned SLICE_W       = 8;                       // operand slice width
  localparam int unsigned NUM_SLICES    = OPND_W / SLICE_W;        // slices per operand
  localparam int unsigned SLICE_SEL_W   = $clog2(NUM_SLICES);
  localparam int unsigned LINE_ENTRIES  = 1 << SLICE_W;            // entries in a table line
  localparam int unsigned CHUNK_ENTRIES = 16;                      // entries moved per beat
  localparam int unsigned CHUNKS        = LINE_ENTRIES / CHUNK_ENTRIES;
  localparam int unsigned CHUNK_IDX_W   = $clog2(CHUNKS);
  localparam int unsigned PAGEBASE_W    = 16;                      // 64 KB pages in a 32-bit space
  localparam int unsigned PA_W          = 32;

  typedef struct packed {
    logic                c1;   // carry out when carry in = 1
    logic [SLICE_W-1:0]  s1;   // sum when carry in = 1
    logic                c0;   // carry out when carry in = 0
    logic [SLICE_W-1:0]  s0;   // sum when carry in = 0
  } lut_entry_t;

  localparam int unsigned ENTRY_W = $bits(lut_entry_t);           // 18
  localparam int unsigned CHUNK_W = ENTRY_W * CHUNK_ENTRIES;       // 288

  typedef logic [CHUNK_W-1:0] chunk_t;

  typedef enum logic [0:0] {
    OP_ADD = 1'b0,
    OP_MUL = 1'b1
  } mbc_op_e;

  // One-cycle event pulses, for performance counting.
  typedef struct packed {
    logic l1_hit;       // slice lookup served by L1
    logic l1_miss;      // L1 lookup missed
    logic l2_hit;       // L1 miss served by L2
    logic mem_fetch;    // L2 miss, line fetched from main memory
    logic l1_evict;     // valid L1 line written back into L2
  } mbc_events_t;

endpackage
