// tb_workload_configs: runs one fixed stream of integer operations through
// the execution cluster (all parameters at their defaults) under each
// condition the scheme was evaluated in, and reports the cycles taken:
//   healthy      : all units in service
//   thermal      : ALU 0 above 100 C for the whole run
//   defects 1    : two adders and one multiplier defective
//   defects 2    : four adders and one multiplier defective
// The cluster is reset between runs, so each starts with empty table caches
// and must ask the operating system for the table page again. The scheduler
// deals operations round-robin over the units of the right type, whether or
// not they are bypassed, so redirected work queues at the memory-based unit.
// Every result is checked against a reference. The cycle counts must rise
// with the number of bypassed units. They measure this single-issue cluster
// in isolation, not a whole out-of-order processor.
module tb_workload_configs;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NFU = 8;
  localparam int NOPS = 400;
  localparam logic [15:0] PAGE = 16'h5100;

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
  int os_timer = 0;
  always @(posedge clk) begin
    os_ack <= 1'b0;
    if (os_req && !os_ack) begin
      os_timer <= os_timer + 1;
      if (os_timer == 50) begin os_ack <= 1'b1; os_timer <= 0; end
    end
  end
  assign os_pagebase = PAGE;

  int checks = 0, failures = 0, cyc = 0, n_fetch = 0, n_l1hit = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ev.mem_fetch) n_fetch <= n_fetch + 1;
    if (rst_n && ev.l1_hit) n_l1hit <= n_l1hit + 1;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // the operation stream, generated once
  logic [31:0] op_a [NOPS], op_b [NOPS];
  bit          op_mul [NOPS];
  logic [31:0] exp_val [256];
  bit          pending [256];
  int          n_done;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NFU; i++) if (fu_res_valid[i]) begin
      chk(pending[fu_res_tag[i]] && fu_res_value[i] == exp_val[fu_res_tag[i]], "FU result");
      pending[fu_res_tag[i]] = 0; n_done++;
    end
    if (mbc_res_valid) begin
      chk(pending[mbc_res_tag] && mbc_res_value == exp_val[mbc_res_tag], "memory-based result");
      pending[mbc_res_tag] = 0; n_done++;
    end
  end

  task automatic run(input string name, input logic [NFU-1:0] f, input bit hot0, output int cycles);
    int t0, next_alu = 0, next_mul = 0;
    fault = f;
    for (int i = 0; i < NFU; i++) temp[i] = 8'd70;
    if (hot0) temp[0] = 8'd105;
    rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    n_done = 0; n_fetch = 0; n_l1hit = 0;
    for (int i = 0; i < 256; i++) pending[i] = 0;
    @(negedge clk); t0 = cyc;
    for (int k = 0; k < NOPS; k++) begin
      int fu; logic [7:0] t;
      t = 8'(k);
      while (pending[t]) @(negedge clk);
      if (op_mul[k]) begin fu = 6 + next_mul; next_mul = (next_mul + 1) % 2; end
      else           begin fu = next_alu;     next_alu = (next_alu + 1) % 6; end
      iss_valid = 1; iss_fu = 3'(fu); iss_a = op_a[k]; iss_b = op_b[k]; iss_tag = t;
      exp_val[t] = op_mul[k] ? 32'(op_a[k] * op_b[k]) : op_a[k] + op_b[k];
      #1;
      while (!iss_ready) @(negedge clk);
      pending[t] = 1;
      @(posedge clk); #1 iss_valid = 0;
      @(negedge clk);
    end
    while (n_done < NOPS && cyc - t0 < 2000000) @(negedge clk);
    cycles = cyc - t0;
    chk(n_done == NOPS, $sformatf("%s: %0d of %0d results", name, n_done, NOPS));
    $display("%-10s bypassed units %b : %0d cycles for %0d operations, %0d line fetches from memory, %0d L1 hits",
             name, dut.bypass, cycles, NOPS, n_fetch, n_l1hit);
  endtask

  int c_ok, c_hot, c_d1, c_d2;
  initial begin
    iss_valid = 0; iss_fu = 0; iss_a = 0; iss_b = 0; iss_tag = 0; fault = 0;
    for (int i = 0; i < NFU; i++) temp[i] = 8'd70;
    // operands with locality: loop counters, small constants, array addresses
    for (int k = 0; k < NOPS; k++) begin
      op_mul[k] = (k % 5 == 4);
      case (k % 4)
        0: begin op_a[k] = 32'(k);              op_b[k] = 32'd1; end
        1: begin op_a[k] = 32'h2000 + 32'(4*k); op_b[k] = 32'd4; end
        2: begin op_a[k] = $urandom_range(0, 1000); op_b[k] = $urandom_range(0, 1000); end
        default: begin op_a[k] = $urandom; op_b[k] = $urandom_range(0, 255); end
      endcase
      if (op_mul[k]) op_b[k] = $urandom_range(0, 100);
    end
    run("healthy",   8'b0000_0000, 0, c_ok);
    run("thermal",   8'b0000_0000, 1, c_hot);
    run("defects 1", 8'b0100_0110, 0, c_d1);
    run("defects 2", 8'b0101_1110, 0, c_d2);
    chk(c_hot > c_ok, "thermal bypass costs cycles");
    chk(c_d1 > c_ok, "defect configuration 1 costs cycles");
    chk(c_d2 > c_d1, "configuration 2 costs more than configuration 1");
    chk(n_bad == 0, "all fetches inside the table page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
