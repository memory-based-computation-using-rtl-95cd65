// mbc_lookup: the cache hierarchy behind one memory-based 8-bit slice lookup.
//
// A request carries the two operands and the number of an 8-bit slice; the
// address generator picks the slices X and Y. It returns the table entry for
// X + Y (sum and carry out for carry in 0 and 1). The entry is looked up in a
// small L1 (LAT 1) with tag X, index X mod L1_SETS, offset Y. On an L1 miss the
// L2 (LAT L2_LAT) is looked up the same way. On an L2 miss the line of the
// result page selected by X is fetched from main memory at {pagebase, X} and
// written into the least recently used L2 way. An L2 hit answers the request
// at once with the L2 entry; a memory fetch answers it with the entry taken
// from the fetched line once the line is in L2. In both cases the line is
// then copied from L2 into L1 while the controller stays busy; if the L1 way
// it replaces holds a valid line that L2 does not have, that line is first
// written back into L2.
//
// Interfaces
//   request  : req_valid/req_ready with req_a, req_b, req_slice; one request
//              at a time.
//   response : resp_valid pulses for one cycle with resp_entry. An L1 hit
//              answers in exactly L1_LAT cycles after the request is accepted,
//              an L2 hit in L1_LAT + 1 + L2_LAT cycles. After a miss the next
//              request waits for the L1 fill to end.
//   memory   : mem_req_valid/mem_req_ready with the physical line address (a
//              line is 256-byte aligned, so its low 8 bits are always 0); the
//              memory then returns CHUNKS beats on mem_rdata_valid/mem_rdata,
//              chunk 0 first, at whatever spacing it needs.
//   events   : one-cycle pulses for hit/miss/fetch/eviction counting.
// The hierarchy, the addressing, LRU and the L1-to-L2 eviction follow the
// described scheme. The chunked line moves (one chunk per two cycles between
// the caches) and answering a memory fetch only once the whole line is in L2
// are this design's.
module mbc_lookup
  import mbc_pkg::*;
#(
  parameter int unsigned L1_WAYS = 2,
  parameter int unsigned L1_SETS = 16,
  parameter int unsigned L1_LAT  = 1,
  parameter int unsigned L2_WAYS = 4,
  parameter int unsigned L2_SETS = 64,
  parameter int unsigned L2_LAT  = 6,
  localparam int unsigned L1_IDX_W = (L1_SETS > 1) ? $clog2(L1_SETS) : 1,
  localparam int unsigned L2_IDX_W = (L2_SETS > 1) ? $clog2(L2_SETS) : 1,
  localparam int unsigned L1_WAY_W = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1,
  localparam int unsigned L2_WAY_W = (L2_WAYS > 1) ? $clog2(L2_WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PAGEBASE_W-1:0] pagebase,
  // request / response
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [OPND_W-1:0]     req_a,
  input  logic [OPND_W-1:0]     req_b,
  input  logic [SLICE_SEL_W-1:0] req_slice,
  output logic                  resp_valid,
  output lut_entry_t            resp_entry,
  // main memory
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic [PA_W-1:0]       mem_req_addr,
  input  logic                  mem_rdata_valid,
  input  chunk_t                mem_rdata,
  // events
  output mbc_events_t           events
);

  typedef enum logic [3:0] {
    S_IDLE, S_L1_WAIT, S_L2_REQ, S_L2_WAIT, S_MEM_REQ, S_MEM_DATA,
    S_L1_VICT, S_EV_PROBE, S_EV_PWAIT, S_EV_RD, S_EV_WR, S_CP_RD, S_CP_WR
  } state_e;

  state_e state_q, state_d;

  logic [OPND_W-1:0]      a_q, b_q;
  logic [SLICE_SEL_W-1:0] slice_q;
  logic [SLICE_W-1:0]     ev_tag_q;
  logic                   resp_pend_q;  // memory fetch not yet answered
  lut_entry_t             mem_entry_q;  // requested entry seen in the fetched line
  logic [CHUNK_IDX_W-1:0] cnt_q;
  logic [L1_WAY_W-1:0]    l1_way_q;     // L1 way being filled
  logic [L2_WAY_W-1:0]    l2_way_q;     // L2 way holding X's line
  logic [L2_WAY_W-1:0]    l2_ev_way_q;  // L2 way receiving the evicted line

  // ---------------- addresses ----------------
  logic [OPND_W-1:0]      cur_a, cur_b;
  logic [SLICE_SEL_W-1:0] cur_slice;
  assign cur_a     = (state_q == S_IDLE) ? req_a : a_q;
  assign cur_b     = (state_q == S_IDLE) ? req_b : b_q;
  assign cur_slice = (state_q == S_IDLE) ? req_slice : slice_q;

  logic [SLICE_W-1:0]  l1_tag, l1_off, l2_tag, l2_off;
  logic [L1_IDX_W-1:0] l1_idx;
  logic [L2_IDX_W-1:0] l2_idx;
  logic [PA_W-1:0]     pa;

  mbc_addr_gen #(.L1_SETS(L1_SETS), .L2_SETS(L2_SETS)) u_addr (
    .a(cur_a), .b(cur_b), .slice(cur_slice), .pagebase(pagebase),
    .l1_tag(l1_tag), .l1_index(l1_idx), .l1_offset(l1_off),
    .l2_tag(l2_tag), .l2_index(l2_idx), .l2_offset(l2_off), .pa(pa)
  );

  // addresses of the line evicted from L1
  logic [SLICE_W-1:0]  ev_l2_tag;
  logic [L2_IDX_W-1:0] ev_l2_idx;
  mbc_addr_gen #(.L1_SETS(L1_SETS), .L2_SETS(L2_SETS)) u_ev_addr (
    .a(OPND_W'(ev_tag_q)), .b('0), .slice('0), .pagebase(pagebase),
    .l1_tag(), .l1_index(), .l1_offset(),
    .l2_tag(ev_l2_tag), .l2_index(ev_l2_idx), .l2_offset(), .pa()
  );

  // ---------------- caches ----------------
  logic                l1_lk_valid, l1_lk_done, l1_lk_hit;
  logic [L1_WAY_W-1:0] l1_lk_way;
  lut_entry_t          l1_lk_entry;
  logic                l1_rd_valid, l1_rd_done;
  chunk_t              l1_rd_data;
  logic                l1_wr_valid, l1_wr_last;
  logic [L1_WAY_W-1:0] l1_vc_way;
  logic                l1_vc_valid;
  logic [SLICE_W-1:0]  l1_vc_tag;

  logic                l2_lk_valid, l2_lk_done, l2_lk_hit;
  logic [L2_WAY_W-1:0] l2_lk_way;
  lut_entry_t          l2_lk_entry;
  logic [SLICE_W-1:0]  l2_lk_tag;
  logic [L2_IDX_W-1:0] l2_lk_idx, l2_vc_idx, l2_wr_idx;
  logic                l2_rd_valid, l2_rd_done;
  chunk_t              l2_rd_data;
  logic                l2_wr_valid, l2_wr_last;
  logic [L2_WAY_W-1:0] l2_wr_way, l2_vc_way;
  logic [SLICE_W-1:0]  l2_wr_tag, l2_vc_tag;
  logic                l2_vc_valid;
  chunk_t              l2_wr_data;

  lut_cache #(.WAYS(L1_WAYS), .SETS(L1_SETS), .LAT(L1_LAT)) u_l1 (
    .clk, .rst_n,
    .lk_valid(l1_lk_valid), .lk_tag(l1_tag), .lk_index(l1_idx), .lk_offset(l1_off),
    .lk_done(l1_lk_done), .lk_hit(l1_lk_hit), .lk_way(l1_lk_way), .lk_entry(l1_lk_entry),
    .rd_valid(l1_rd_valid), .rd_index(l1_idx), .rd_way(l1_way_q), .rd_chunk(cnt_q),
    .rd_done(l1_rd_done), .rd_data(l1_rd_data),
    .wr_valid(l1_wr_valid), .wr_index(l1_idx), .wr_way(l1_way_q), .wr_chunk(cnt_q),
    .wr_data(l2_rd_data), .wr_last(l1_wr_last), .wr_tag(l1_tag),
    .vc_index(l1_idx), .vc_way(l1_vc_way), .vc_valid(l1_vc_valid), .vc_tag(l1_vc_tag)
  );

  lut_cache #(.WAYS(L2_WAYS), .SETS(L2_SETS), .LAT(L2_LAT)) u_l2 (
    .clk, .rst_n,
    .lk_valid(l2_lk_valid), .lk_tag(l2_lk_tag), .lk_index(l2_lk_idx), .lk_offset(l2_off),
    .lk_done(l2_lk_done), .lk_hit(l2_lk_hit), .lk_way(l2_lk_way), .lk_entry(l2_lk_entry),
    .rd_valid(l2_rd_valid), .rd_index(l2_idx), .rd_way(l2_way_q), .rd_chunk(cnt_q),
    .rd_done(l2_rd_done), .rd_data(l2_rd_data),
    .wr_valid(l2_wr_valid), .wr_index(l2_wr_idx), .wr_way(l2_wr_way), .wr_chunk(cnt_q),
    .wr_data(l2_wr_data), .wr_last(l2_wr_last), .wr_tag(l2_wr_tag),
    .vc_index(l2_vc_idx), .vc_way(l2_vc_way), .vc_valid(l2_vc_valid), .vc_tag(l2_vc_tag)
  );

  // the L2 entry itself is not used: after a fill the L1 answers
  logic unused_ok;
  assign unused_ok = ^{l1_lk_way, l2_vc_valid, l2_vc_tag};

  localparam int unsigned WORD_W = $clog2(CHUNK_ENTRIES);

  logic last_chunk;
  assign last_chunk = (cnt_q == CHUNK_IDX_W'(CHUNKS-1));

  // the requested entry (offset Y) within a chunk of the fetched line
  logic       y_chunk_here;
  lut_entry_t y_entry;
  assign y_chunk_here = (cnt_q == l1_off[SLICE_W-1:WORD_W]);
  assign y_entry      = mem_rdata[l1_off[WORD_W-1:0]*ENTRY_W +: ENTRY_W];

  // ---------------- control ----------------
  always_comb begin
    state_d       = state_q;
    req_ready     = (state_q == S_IDLE);
    resp_valid    = 1'b0;
    resp_entry    = l1_lk_entry;
    mem_req_valid = (state_q == S_MEM_REQ);
    mem_req_addr  = pa;
    events        = '0;

    l1_lk_valid = 1'b0;
    l1_rd_valid = 1'b0;
    l1_wr_valid = 1'b0;
    l1_wr_last  = 1'b0;

    l2_lk_valid = 1'b0;
    l2_lk_tag   = l2_tag;
    l2_lk_idx   = l2_idx;
    l2_vc_idx   = l2_idx;
    l2_rd_valid = 1'b0;
    l2_wr_valid = 1'b0;
    l2_wr_last  = last_chunk;
    l2_wr_idx   = l2_idx;
    l2_wr_way   = l2_way_q;
    l2_wr_tag   = l2_tag;
    l2_wr_data  = mem_rdata;

    unique case (state_q)
      S_IDLE: if (req_valid) begin
        l1_lk_valid = 1'b1;
        state_d     = S_L1_WAIT;
      end
      S_L1_WAIT: if (l1_lk_done) begin
        if (l1_lk_hit) begin
          resp_valid    = 1'b1;
          events.l1_hit = 1'b1;
          state_d       = S_IDLE;
        end else begin
          events.l1_miss = 1'b1;
          state_d        = S_L2_REQ;
        end
      end
      S_L2_REQ: begin
        l2_lk_valid = 1'b1;
        state_d     = S_L2_WAIT;
      end
      S_L2_WAIT: if (l2_lk_done) begin
        events.l2_hit = l2_lk_hit;
        resp_valid    = l2_lk_hit;
        resp_entry    = l2_lk_entry;
        state_d       = l2_lk_hit ? S_L1_VICT : S_MEM_REQ;
      end
      S_MEM_REQ: if (mem_req_ready) begin
        events.mem_fetch = 1'b1;
        state_d          = S_MEM_DATA;
      end
      S_MEM_DATA: if (mem_rdata_valid) begin
        l2_wr_valid = 1'b1;
        if (last_chunk) state_d = S_L1_VICT;
      end
      S_L1_VICT: begin
        resp_valid = resp_pend_q;
        resp_entry = mem_entry_q;
        state_d    = l1_vc_valid ? S_EV_PROBE : S_CP_RD;
      end
      S_EV_PROBE: begin
        l2_lk_valid = 1'b1;
        l2_lk_tag   = ev_l2_tag;
        l2_lk_idx   = ev_l2_idx;
        state_d     = S_EV_PWAIT;
      end
      S_EV_PWAIT: begin
        l2_vc_idx = ev_l2_idx;
        if (l2_lk_done) state_d = l2_lk_hit ? S_CP_RD : S_EV_RD;
      end
      S_EV_RD: begin
        l1_rd_valid = 1'b1;
        state_d     = S_EV_WR;
      end
      S_EV_WR: if (l1_rd_done) begin
        l2_wr_valid = 1'b1;
        l2_wr_idx   = ev_l2_idx;
        l2_wr_way   = l2_ev_way_q;
        l2_wr_tag   = ev_tag_q;
        l2_wr_data  = l1_rd_data;
        events.l1_evict = last_chunk;
        state_d     = last_chunk ? S_CP_RD : S_EV_RD;
      end
      S_CP_RD: begin
        l2_rd_valid = 1'b1;
        state_d     = S_CP_WR;
      end
      S_CP_WR: if (l2_rd_done) begin
        l1_wr_valid = 1'b1;
        l1_wr_last  = last_chunk;
        state_d     = last_chunk ? S_IDLE : S_CP_RD;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      a_q         <= '0;
      b_q         <= '0;
      slice_q     <= '0;
      ev_tag_q    <= '0;
      resp_pend_q <= 1'b0;
      mem_entry_q <= '0;
      cnt_q       <= '0;
      l1_way_q    <= '0;
      l2_way_q    <= '0;
      l2_ev_way_q <= '0;
    end else begin
      state_q <= state_d;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          a_q     <= req_a;
          b_q     <= req_b;
          slice_q <= req_slice;
        end
        S_L2_WAIT: if (l2_lk_done) l2_way_q <= l2_lk_way;
        S_MEM_REQ: if (mem_req_ready) begin
          l2_way_q <= l2_vc_way;
          cnt_q    <= '0;
        end
        S_MEM_DATA: if (mem_rdata_valid) begin
          cnt_q <= cnt_q + 1'b1;
          if (y_chunk_here) mem_entry_q <= y_entry;
          if (last_chunk) resp_pend_q <= 1'b1;
        end
        S_L1_VICT: begin
          resp_pend_q <= 1'b0;
          l1_way_q <= l1_vc_way;
          ev_tag_q <= l1_vc_tag;
          cnt_q    <= '0;
        end
        S_EV_PWAIT: if (l2_lk_done) l2_ev_way_q <= l2_vc_way;
        S_EV_WR: if (l1_rd_done) cnt_q <= cnt_q + 1'b1;
        S_CP_WR: if (l2_rd_done) cnt_q <= cnt_q + 1'b1;
        default: ;
      endcase
    end
  end

  // the memory must not return data that was not asked for
  a_no_stray_data: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rdata_valid |-> state_q == S_MEM_DATA);

endmodule
