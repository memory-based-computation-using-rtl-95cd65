// lut_cache: set-associative, virtually indexed and virtually tagged cache of
// addition look-up-table lines, used both as the L1 and as the L2 of the
// memory-based computation hierarchy.
//
// A line holds the 256 table entries of one operand slice X (against every
// value of Y). The tag is X itself and the set index is X mod SETS, both
// supplied by the address generator; the block offset is Y. Because the
// operand is the tag, no two virtual addresses name the same line and no
// translation is needed on a cache access. Replacement is least recently used
// (age counters per way; an invalid way is always chosen first).
//
// Ports
//   lookup : lk_valid with tag/index/offset. LAT cycles later lk_done pulses
//            with lk_hit, the hit way and the entry. A hit makes the way most recently used.
//   read   : rd_valid with index/way/chunk; rd_data is valid the next cycle
//            (rd_done). Used to copy a line out (eviction, L2 to L1 copy).
//            A lookup and a read must not start in the same cycle.
//   write  : wr_valid with index/way/chunk/data. Any write clears the line's
//            valid bit; the write with wr_last sets valid and the tag and makes
//            the way most recently used.
//   victim : combinational. For set vc_index, the way a fill should use and
//            whether it currently holds a valid line (and its tag).
// Geometry (ways, sets, latency) follows the evaluated configuration; the
// chunked line transfer and the port set are choices of this design.
module lut_cache
  import mbc_pkg::*;
#(
  parameter int unsigned WAYS = 2,
  parameter int unsigned SETS = 16,
  parameter int unsigned LAT  = 1,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // lookup
  input  logic                  lk_valid,
  input  logic [SLICE_W-1:0]    lk_tag,
  input  logic [IDX_W-1:0]      lk_index,
  input  logic [SLICE_W-1:0]    lk_offset,
  output logic                  lk_done,
  output logic                  lk_hit,
  output logic [WAY_W-1:0]      lk_way,
  output lut_entry_t            lk_entry,
  // line read
  input  logic                  rd_valid,
  input  logic [IDX_W-1:0]      rd_index,
  input  logic [WAY_W-1:0]      rd_way,
  input  logic [CHUNK_IDX_W-1:0] rd_chunk,
  output logic                  rd_done,
  output chunk_t                rd_data,
  // line write
  input  logic                  wr_valid,
  input  logic [IDX_W-1:0]      wr_index,
  input  logic [WAY_W-1:0]      wr_way,
  input  logic [CHUNK_IDX_W-1:0] wr_chunk,
  input  chunk_t                wr_data,
  input  logic                  wr_last,
  input  logic [SLICE_W-1:0]    wr_tag,
  // victim selection
  input  logic [IDX_W-1:0]      vc_index,
  output logic [WAY_W-1:0]      vc_way,
  output logic                  vc_valid,
  output logic [SLICE_W-1:0]    vc_tag
);

  localparam int unsigned ROWS = SETS * CHUNKS;
  localparam int unsigned OFS_W = $clog2(CHUNK_ENTRIES);

  // ---------------- state ----------------
  logic [SLICE_W-1:0] tag_q   [WAYS][SETS];
  logic               valid_q [WAYS][SETS];
  logic [WAY_W-1:0]   age_q   [WAYS][SETS];   // 0 = most recently used

  chunk_t rdata [WAYS];

  // ---------------- data arrays (one per way) ----------------
  logic [IDX_W-1:0]       acc_index;
  logic [CHUNK_IDX_W-1:0] acc_chunk;
  assign acc_index = lk_valid ? lk_index : rd_index;
  assign acc_chunk = lk_valid ? lk_offset[SLICE_W-1:OFS_W] : rd_chunk;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    chunk_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (wr_valid && wr_way == WAY_W'(w))
        mem[{wr_index, wr_chunk}] <= wr_data;
      if (lk_valid || rd_valid)
        rdata[w] <= mem[{acc_index, acc_chunk}];
    end
  end

  // ---------------- stage 1: tag compare ----------------
  logic                  s1_lk, s1_rd;
  logic [SLICE_W-1:0]    s1_tag;
  logic [IDX_W-1:0]      s1_index;
  logic [OFS_W-1:0]      s1_word;
  logic [WAY_W-1:0]      s1_rd_way;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_lk <= 1'b0;
      s1_rd <= 1'b0;
      s1_tag <= '0;
      s1_index <= '0;
      s1_word <= '0;
      s1_rd_way <= '0;
    end else begin
      s1_lk <= lk_valid;
      s1_rd <= rd_valid && !lk_valid;
      if (lk_valid) begin
        s1_tag   <= lk_tag;
        s1_index <= lk_index;
        s1_word  <= lk_offset[OFS_W-1:0];
      end
      if (rd_valid) s1_rd_way <= rd_way;
    end
  end

  logic             s1_hit;
  logic [WAY_W-1:0] s1_way;
  lut_entry_t       s1_entry;

  always_comb begin
    s1_hit = 1'b0;
    s1_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[w][s1_index] && tag_q[w][s1_index] == s1_tag) begin
        s1_hit = 1'b1;
        s1_way = WAY_W'(w);
      end
    end
    s1_entry = rdata[s1_way][s1_word*ENTRY_W +: ENTRY_W];
  end

  assign rd_done = s1_rd;
  assign rd_data = rdata[s1_rd_way];

  // ---------------- result delay to LAT cycles ----------------
  if (LAT <= 1) begin : g_lat1
    assign lk_done  = s1_lk;
    assign lk_hit   = s1_hit;
    assign lk_way   = s1_way;
    assign lk_entry = s1_entry;
  end else begin : g_latn
    logic       d_done  [LAT-1];
    logic       d_hit   [LAT-1];
    logic [WAY_W-1:0] d_way [LAT-1];
    lut_entry_t d_entry [LAT-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT-1; i++) begin
          d_done[i]  <= 1'b0;
          d_hit[i]   <= 1'b0;
          d_way[i]   <= '0;
          d_entry[i] <= '0;
        end
      end else begin
        d_done[0]  <= s1_lk;
        d_hit[0]   <= s1_hit;
        d_way[0]   <= s1_way;
        d_entry[0] <= s1_entry;
        for (int i = 1; i < LAT-1; i++) begin
          d_done[i]  <= d_done[i-1];
          d_hit[i]   <= d_hit[i-1];
          d_way[i]   <= d_way[i-1];
          d_entry[i] <= d_entry[i-1];
        end
      end
    end
    assign lk_done  = d_done[LAT-2];
    assign lk_hit   = d_hit[LAT-2];
    assign lk_way   = d_way[LAT-2];
    assign lk_entry = d_entry[LAT-2];
  end

  // ---------------- victim choice ----------------
  always_comb begin
    vc_way   = '0;
    vc_valid = 1'b1;
    // the least recently used way
    for (int w = 0; w < WAYS; w++)
      if (age_q[w][vc_index] == WAY_W'(WAYS-1)) vc_way = WAY_W'(w);
    // an invalid way takes precedence (lowest numbered)
    for (int w = WAYS-1; w >= 0; w--)
      if (!valid_q[w][vc_index]) begin
        vc_way   = WAY_W'(w);
        vc_valid = 1'b0;
      end
    vc_tag = tag_q[vc_way][vc_index];
  end

  // ---------------- tags, valid bits, LRU ages ----------------
  logic             touch;
  logic [IDX_W-1:0] touch_set;
  logic [WAY_W-1:0] touch_way;
  always_comb begin
    touch     = 1'b0;
    touch_set = s1_index;
    touch_way = s1_way;
    if (wr_valid && wr_last) begin
      touch     = 1'b1;
      touch_set = wr_index;
      touch_way = wr_way;
    end else if (s1_lk && s1_hit) begin
      touch = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++) begin
          valid_q[w][s] <= 1'b0;
          tag_q[w][s]   <= '0;
          age_q[w][s]   <= WAY_W'(w);
        end
    end else begin
      if (wr_valid) begin
        valid_q[wr_way][wr_index] <= wr_last;
        if (wr_last) tag_q[wr_way][wr_index] <= wr_tag;
      end
      if (touch) begin
        for (int w = 0; w < WAYS; w++)
          if (age_q[w][touch_set] < age_q[touch_way][touch_set])
            age_q[w][touch_set] <= age_q[w][touch_set] + 1'b1;
        age_q[touch_way][touch_set] <= '0;
      end
    end
  end

endmodule
