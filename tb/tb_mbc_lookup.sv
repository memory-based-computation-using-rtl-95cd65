// tb_mbc_lookup: self-checking test of the slice lookup hierarchy.
// Runs a sequence of (X, Y) lookups against the behavioural main memory and
// checks every returned entry against X + Y computed here, the one-cycle L1 hit
// latency, the eight-cycle L2 hit (L1 miss, one cycle, six-cycle L2 lookup),
// and that each path (L1 hit, L2 hit, memory fetch, L1 eviction into L2) was
// taken. L2 is reduced to 16 sets (see below).
module tb_mbc_lookup;
  import mbc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] PAGE = 16'h4A00;

  logic req_valid, req_ready, resp_valid;
  logic [31:0] req_a, req_b; logic [1:0] req_slice;
  lut_entry_t resp_entry;
  logic mem_req_valid, mem_req_ready, mem_rdata_valid;
  logic [31:0] mem_req_addr;
  chunk_t mem_rdata;
  mbc_events_t ev;
  int unsigned n_req, n_bad;

  // L2 reduced to 16 sets so that L2 drops lines that L1 still holds and L1
  // evictions have to be written back (with 64 sets L2 holds the whole page).
  mbc_lookup #(.L2_SETS(16)) dut (
    .clk, .rst_n, .pagebase(PAGE),
    .req_valid, .req_ready, .req_a, .req_b, .req_slice, .resp_valid, .resp_entry,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rdata_valid, .mem_rdata,
    .events(ev)
  );

  main_mem_model #(.FIRST_LAT(100), .NEXT_LAT(4)) u_mem (
    .clk, .rst_n, .page(PAGE), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .rdata_valid(mem_rdata_valid), .rdata(mem_rdata),
    .n_req, .n_bad
  );

  int checks = 0, failures = 0;
  int n_l1_hit = 0, n_l1_miss = 0, n_l2_hit = 0, n_fetch = 0, n_evict = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev.l1_hit) n_l1_hit++;
    if (ev.l1_miss) n_l1_miss++;
    if (ev.l2_hit) n_l2_hit++;
    if (ev.mem_fetch) n_fetch++;
    if (ev.l1_evict) n_evict++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one lookup; returns the cycles from acceptance to response
  task automatic lookup(input logic [7:0] x, input logic [7:0] y, output int lat);
    logic [8:0] a0, a1;
    int t0;
    @(negedge clk);
    // X and Y placed in a random slice of otherwise random operands
    req_valid = 1; req_slice = 2'($urandom); req_a = $urandom; req_b = $urandom;
    req_a[req_slice*8 +: 8] = x; req_b[req_slice*8 +: 8] = y;
    do @(posedge clk); while (!req_ready);
    t0 = cyc;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - t0;
    a0 = {1'b0, x} + {1'b0, y};
    a1 = a0 + 1;
    check(resp_entry == {a1[8], a1[7:0], a0[8], a0[7:0]},
          $sformatf("entry x=%0d y=%0d got %h", x, y, resp_entry));
  endtask

  int lat, l1_before;
  initial begin
    req_valid = 0; req_a = 0; req_b = 0; req_slice = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // cold miss: memory fetch
    lookup(8'd3, 8'd250, lat);
    check(lat > 100 + 4*15, $sformatf("cold miss latency %0d", lat));
    // same line: L1 hit in 1 cycle
    l1_before = n_l1_hit;
    lookup(8'd3, 8'd7, lat);
    check(lat == 1, $sformatf("L1 hit latency %0d", lat));
    @(posedge clk); #1;
    check(n_l1_hit == l1_before + 1, "L1 hit event");
    // X = 19 and 35 share L1 set 3 (16 sets, 2 ways): third one evicts X = 3
    lookup(8'd19, 8'd255, lat);
    lookup(8'd35, 8'd1, lat);
    // X = 3 now misses in L1 but hits in L2
    lookup(8'd3, 8'd255, lat);
    @(posedge clk); #1;
    check(n_l2_hit >= 1, "L2 hit after L1 eviction");
    // write-back: X = 1 stays in L1 (kept most recently used by L1 hits, which
    // do not touch L2) while L2 set 1 drops it; evicting it from L1 must then
    // write it back, so that the next access is an L2 hit, not a fetch.
    lookup(8'd1, 8'd0, lat);
    lookup(8'd17, 8'd0, lat);
    lookup(8'd1, 8'd1, lat);
    lookup(8'd33, 8'd0, lat);
    lookup(8'd1, 8'd2, lat);
    lookup(8'd49, 8'd0, lat);
    lookup(8'd1, 8'd3, lat);
    lookup(8'd65, 8'd0, lat);    // L2 drops X = 1
    lookup(8'd81, 8'd0, lat);    // L1 evicts X = 1: written back into L2
    begin
      int f0;
      @(posedge clk); #1;
      f0 = n_fetch;
      lookup(8'd1, 8'd200, lat);
      check(lat == 8, $sformatf("written-back line found in L2, latency %0d", lat));
      @(posedge clk); #1;
      check(n_fetch == f0, "written-back line not fetched again");
    end
    // random traffic
    for (int i = 0; i < 300; i++) begin
      logic [7:0] xr;
      xr = 8'($urandom_range(0, 127));
      lookup(xr, 8'($urandom), lat);
    end
    // L2 hit latency: force an L1 miss on a line L2 holds
    lookup(8'd200, 8'd1, lat);
    lookup(8'd216, 8'd1, lat);
    lookup(8'd232, 8'd1, lat);   // evicts 200 from L1 (set 8)
    lookup(8'd200, 8'd9, lat);   // L1 miss (1) + L2 hit (6) + copy/refill
    check(lat == 1 + 1 + 6, $sformatf("L2 hit latency %0d", lat));
    lookup(8'd200, 8'd10, lat);  // line now copied into L1
    check(lat == 1, $sformatf("L1 hit after L2 hit, latency %0d", lat));
    check(n_l1_miss > 0, "L1 misses seen");
    check(n_fetch > 0 && n_fetch == int'(n_req), $sformatf("fetches %0d mem requests %0d", n_fetch, n_req));
    check(n_evict > 0, "L1 evictions into L2 seen");
    check(n_bad == 0, "memory addresses inside the page");
    $display("l1_hit=%0d l1_miss=%0d l2_hit=%0d fetch=%0d evict=%0d", n_l1_hit, n_l1_miss, n_l2_hit, n_fetch, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
