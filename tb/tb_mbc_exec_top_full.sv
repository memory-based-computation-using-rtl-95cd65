// tb_mbc_exec_top_full: end-to-end test of the execution cluster with every
// parameter at its default (8 KB 2-way L1, 64 KB 4-way L2, 6 adders, 2
// multipliers), driven by a scripted scheduler, operating system and thermal
// scenario, against the behavioural main memory.
//
// Phases: (1) all units in service; (2) ALU 0 heats past 100 C and its work
// moves to the memory-based unit, which first makes the OS load the tables;
// (3) two adders and one multiplier are marked defective (the first defect
// configuration evaluated for this scheme); (4) ALU 0 cools and returns to
// service; (5) four adders and one multiplier are defective (the second
// configuration). Every result is compared with a reference computed here and must
// come from the path (functional unit or memory-based unit) the bypass state
// implies. Thermal trip and release, the OS request, issue stalls, L1 hits
// and misses, L2 hits, memory fetches, operand swaps and memory-based
// multiplies are counted and must occur. At this size the L2 holds the whole
// table page, so an L1 write-back into L2 cannot happen (tb_mbc_exec_top,
// with a smaller L2, covers it).
module tb_mbc_exec_top_full;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NFU = 8;
  localparam logic [15:0] PAGE = 16'h3C00;

  logic iss_valid, iss_ready; logic [2:0] iss_fu; logic [31:0] iss_a, iss_b; logic [7:0] iss_tag;
  logic [NFU-1:0] fu_res_valid; logic [7:0] fu_res_tag [NFU]; logic [31:0] fu_res_value [NFU];
  logic mbc_res_valid; logic [7:0] mbc_res_tag; logic [31:0] mbc_res_value;
  logic [NFU-1:0] fault; logic [7:0] temp [NFU];
  logic os_req, os_ack; logic [15:0] os_pagebase;
  logic mem_req_valid, mem_req_ready, mem_rdata_valid; logic [31:0] mem_req_addr; chunk_t mem_rdata;
  logic [NFU-1:0] bypass, trip, rel; mbc_events_t ev; logic swapped, mul_add;
  int unsigned n_req, n_bad;

  mbc_exec_top dut (.*, .thermal_trip(trip), .thermal_release(rel), .events(ev),
    .mbc_swapped(swapped), .mbc_mul_add(mul_add));

  main_mem_model u_mem (.clk, .rst_n, .page(PAGE), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .rdata_valid(mem_rdata_valid), .rdata(mem_rdata), .n_req, .n_bad);

  // operating system: answers a table request after 50 cycles
  int os_timer = 0, n_os = 0;
  always @(posedge clk) begin
    os_ack <= 1'b0;
    if (os_req && !os_ack) begin
      os_timer <= os_timer + 1;
      if (os_timer == 50) begin os_ack <= 1'b1; os_timer <= 0; n_os++; end
    end
  end
  assign os_pagebase = PAGE;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // scoreboard indexed by tag
  logic [31:0] exp_val [256];
  bit          exp_mbc [256];
  bit          pending [256];
  int n_fu_res = 0, n_mbc_res = 0, n_mbc_add = 0, n_mbc_mul = 0;
  int n_trip = 0, n_rel = 0, n_stall = 0, n_l1h = 0, n_l1m = 0, n_l2h = 0, n_fetch = 0, n_evict = 0;
  int n_swap = 0, n_madd = 0, n_defect = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NFU; i++) if (fu_res_valid[i]) begin
      n_fu_res++;
      chk(pending[fu_res_tag[i]] && !exp_mbc[fu_res_tag[i]] && fu_res_value[i] == exp_val[fu_res_tag[i]],
          $sformatf("FU %0d result tag %0d value %h", i, fu_res_tag[i], fu_res_value[i]));
      pending[fu_res_tag[i]] = 0;
    end
    if (mbc_res_valid) begin
      n_mbc_res++;
      chk(pending[mbc_res_tag] && exp_mbc[mbc_res_tag] && mbc_res_value == exp_val[mbc_res_tag],
          $sformatf("MBC result tag %0d value %h exp %h", mbc_res_tag, mbc_res_value, exp_val[mbc_res_tag]));
      pending[mbc_res_tag] = 0;
    end
    n_trip += $countones(trip);
    n_rel  += $countones(rel);
    if (iss_valid && !iss_ready) n_stall++;
    if (ev.l1_hit) n_l1h++;
    if (ev.l1_miss) n_l1m++;
    if (ev.l2_hit) n_l2h++;
    if (ev.mem_fetch) n_fetch++;
    if (ev.l1_evict) n_evict++;
    if (swapped) n_swap++;
    if (mul_add) n_madd++;
  end

  int tagc = 0;
  // issue one operation to unit fu; waits while the cluster stalls
  task automatic issue(input int fu, input logic [31:0] a, input logic [31:0] b);
    logic [7:0] t;
    t = 8'(tagc); tagc++;
    while (pending[t]) @(negedge clk);
    @(negedge clk);
    iss_valid = 1; iss_fu = 3'(fu); iss_a = a; iss_b = b; iss_tag = t;
    exp_val[t] = (fu < 6) ? a + b : 32'(a * b);
    #1;
    while (!iss_ready) @(negedge clk);
    // accepted at the coming edge: the bypass state now decides the path
    exp_mbc[t] = bypass[fu];
    pending[t] = 1;
    if (bypass[fu]) begin
      if (fu < 6) n_mbc_add++; else n_mbc_mul++;
      if (fault[fu]) n_defect++;
    end
    @(posedge clk);
    #1 iss_valid = 0;
  endtask

  // operands with the locality of real programs: mostly small values
  function automatic logic [31:0] operand();
    case ($urandom_range(0, 3))
      0: return $urandom_range(0, 255);
      1: return $urandom_range(0, 4095);
      2: return 32'h1000 + $urandom_range(0, 63) * 4;   // addresses in a small array
      default: return $urandom & 32'h00FF_FFFF;
    endcase
  endfunction

  task automatic burst(input int n);
    for (int k = 0; k < n; k++) begin
      int fu;
      fu = (k % 4 == 3) ? 6 + $urandom_range(0, 1) : $urandom_range(0, 5);
      issue(fu, operand(), (fu >= 6) ? 32'($urandom_range(0, 300)) : operand());
    end
  endtask

  initial begin
    iss_valid = 0; iss_fu = 0; iss_a = 0; iss_b = 0; iss_tag = 0; fault = 0;
    for (int i = 0; i < NFU; i++) temp[i] = 8'd70;
    for (int i = 0; i < 256; i++) begin pending[i] = 0; exp_mbc[i] = 0; exp_val[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // (1) normal operation
    burst(40);
    chk(n_mbc_res == 0 && !os_req, "no activity transfer while all units are healthy");
    // (2) ALU 0 overheats
    temp[0] = 8'd104;
    for (int k = 0; k < 60; k++) issue((k % 2 == 0) ? 0 : $urandom_range(1, 7), operand(), 32'($urandom_range(0, 200)));
    // (3) two adders and one multiplier defective
    fault = 8'b0100_0110;
    burst(150);
    // (4) ALU 0 cools down
    temp[0] = 8'd90;
    for (int k = 0; k < 20; k++) issue(0, operand(), operand());
    burst(60);
    // (5) four adders and one multiplier defective
    fault = 8'b0101_1110;
    burst(150);
    repeat (2000) @(posedge clk);
    begin
      int left = 0;
      for (int i = 0; i < 256; i++) left += pending[i];
      chk(left == 0, $sformatf("%0d operations without result", left));
    end
    $display("fu_res=%0d mbc_res=%0d mbc_add=%0d mbc_mul=%0d defect_moves=%0d trip=%0d release=%0d os=%0d stall_cycles=%0d",
             n_fu_res, n_mbc_res, n_mbc_add, n_mbc_mul, n_defect, n_trip, n_rel, n_os, n_stall);
    $display("l1_hit=%0d l1_miss=%0d l2_hit=%0d fetch=%0d l1_writeback=%0d swap=%0d mul_add=%0d",
             n_l1h, n_l1m, n_l2h, n_fetch, n_evict, n_swap, n_madd);
    chk(n_defect > 0, "operations moved away from defective units");
    chk(n_trip > 0, "thermal trip happened");
    chk(n_rel > 0, "thermal release happened");
    chk(n_os == 1, "one OS table request");
    chk(n_stall > 0, "issue stall happened");
    chk(n_mbc_add > 0 && n_mbc_mul > 0, "memory-based add and multiply happened");
    chk(n_l1h > 0 && n_l1m > 0 && n_l2h > 0 && n_fetch > 0, "L1 hit, L1 miss, L2 hit and fetch happened");
    chk(n_evict == 0, "no L1 write-back needed when L2 holds the whole page");
    chk(n_swap > 0, "operand swap happened");
    chk(n_madd > 0, "memory-based multiply additions happened");
    chk(n_bad == 0, "all fetches inside the table page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
