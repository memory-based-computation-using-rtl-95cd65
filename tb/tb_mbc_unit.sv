// tb_mbc_unit: the memory-based execution unit with the behavioural main
// memory. Checks that nothing is accepted before the table page is known,
// that additions and multiplications give a + b and the low word of a * b
// with the right tags, that the comparator puts the smaller operand first
// (operands are swapped exactly when a > b) and that a multiplication uses
// as many additions as the smaller operand has set bits.
module tb_mbc_unit;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam logic [15:0] PAGE = 16'h7777;

  logic pb_valid, in_valid, in_ready, out_valid, swapped, mul_add;
  mbc_op_e op; logic [31:0] a, b, out_result; logic [7:0] tag, out_tag;
  logic mem_req_valid, mem_req_ready, mem_rdata_valid; logic [31:0] mem_req_addr; chunk_t mem_rdata;
  mbc_events_t ev; int unsigned n_req, n_bad;

  mbc_unit dut (.clk, .rst_n, .pagebase(PAGE), .pagebase_valid(pb_valid), .in_valid, .in_ready,
    .op, .a, .b, .tag, .out_valid, .out_tag, .out_result,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rdata_valid, .mem_rdata,
    .events(ev), .swapped, .mul_add);
  main_mem_model u_mem (.clk, .rst_n, .page(PAGE), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .rdata_valid(mem_rdata_valid), .rdata(mem_rdata), .n_req, .n_bad);

  int checks = 0, failures = 0, n_swaps = 0, n_madds = 0;
  always @(posedge clk) begin
    if (swapped) n_swaps++;
    if (mul_add) n_madds++;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic run(input mbc_op_e o, input logic [31:0] av, input logic [31:0] bv, input logic [7:0] t);
    int s0, m0; logic [31:0] exp_r;
    @(negedge clk); in_valid = 1; op = o; a = av; b = bv; tag = t;
    s0 = n_swaps; m0 = n_madds;
    do @(posedge clk); while (!in_ready);
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    exp_r = (o == OP_ADD) ? av + bv : 32'(av * bv);
    chk(out_result == exp_r && out_tag == t, $sformatf("op %0d %h %h got %h tag %0d", o, av, bv, out_result, out_tag));
    @(posedge clk); #1;
    chk((n_swaps - s0) == int'(av > bv), "comparator swap");
    if (o == OP_MUL)
      chk((n_madds - m0) == $countones(av < bv ? av : bv), "additions = set bits of smaller operand");
  endtask

  initial begin
    pb_valid = 0; in_valid = 0; op = OP_ADD; a = 0; b = 0; tag = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    chk(!in_ready, "not ready before the page base is known");
    pb_valid = 1;
    run(OP_ADD, 32'd100, 32'd23, 8'd1);
    run(OP_ADD, 32'd23, 32'd100, 8'd2);
    run(OP_MUL, 32'd3, 32'h0001_0000, 8'd3);
    run(OP_MUL, 32'h0001_0000, 32'd3, 8'd4);
    for (int n = 0; n < 60; n++)
      run((n % 3 == 0) ? OP_MUL : OP_ADD, $urandom & 32'h00FF_FFFF, $urandom & 32'h0000_0FFF, 8'(n));
    chk(n_swaps > 0, "swaps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
