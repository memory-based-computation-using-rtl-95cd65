// tb_mbc_adder: the memory-based adder on the real lookup hierarchy and the
// behavioural main memory. Random and carry-chain operands are compared with
// a + b + cin; once the needed lines are in L1 an addition must take exactly
// 9 cycles (four slices of two cycles, plus the carry select).
module tb_mbc_adder;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam logic [15:0] PAGE = 16'h0123;

  logic in_valid, in_ready, cin, out_valid, cout;
  logic [31:0] a, b, sum;
  logic lk_valid, lk_ready, lk_resp_valid; logic [31:0] lk_a, lk_b; logic [1:0] lk_slice; lut_entry_t lk_entry;
  logic mem_req_valid, mem_req_ready, mem_rdata_valid; logic [31:0] mem_req_addr; chunk_t mem_rdata;
  mbc_events_t ev; int unsigned n_req, n_bad;

  mbc_adder dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .cin, .out_valid, .sum, .cout,
    .lk_valid, .lk_ready, .lk_a, .lk_b, .lk_slice, .lk_resp_valid, .lk_resp_entry(lk_entry));
  mbc_lookup u_lk (.clk, .rst_n, .pagebase(PAGE), .req_valid(lk_valid), .req_ready(lk_ready),
    .req_a(lk_a), .req_b(lk_b), .req_slice(lk_slice), .resp_valid(lk_resp_valid), .resp_entry(lk_entry),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rdata_valid, .mem_rdata, .events(ev));
  main_mem_model u_mem (.clk, .rst_n, .page(PAGE), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .rdata_valid(mem_rdata_valid), .rdata(mem_rdata), .n_req, .n_bad);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic add(input logic [31:0] av, input logic [31:0] bv, input logic c, output int lat);
    int t0; logic [32:0] r;
    @(negedge clk); in_valid = 1; a = av; b = bv; cin = c;
    do @(posedge clk); while (!in_ready);
    t0 = cyc;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    lat = cyc - t0;
    r = {1'b0, av} + {1'b0, bv} + 33'(c);
    checks++;
    if ({cout, sum} != r) begin failures++; $display("FAIL %h + %h + %0d = %h got %h", av, bv, c, r, {cout, sum}); end
  endtask

  int lat;
  initial begin
    in_valid = 0; a = 0; b = 0; cin = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    add(32'h0000_00FF, 32'h0000_0001, 0, lat);                 // carry across a slice
    add(32'h0000_00FF, 32'h0000_0001, 0, lat);                 // same lines: all L1 hits
    checks++; if (lat != 9) begin failures++; $display("FAIL L1-hit add latency %0d", lat); end
    add(32'hFFFF_FFFF, 32'h0000_0000, 1, lat);                 // full carry chain
    add(32'hFFFF_FFFF, 32'h0000_0000, 1, lat);
    checks++; if (lat != 9) begin failures++; $display("FAIL L1-hit add latency %0d", lat); end
    for (int n = 0; n < 150; n++) begin
      logic [31:0] av, bv;
      av = $urandom & 32'h0F0F_0F0F; bv = $urandom;   // X slices from a small set
      if (n % 5 == 0) bv = ~av;
      add(av, bv, 1'($urandom), lat);
    end
    checks++; if (n_bad != 0) begin failures++; $display("FAIL address outside page"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
