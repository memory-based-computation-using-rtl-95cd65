// tb_mbc_multiplier: the shift-and-add multiplier on a memory-based adder,
// lookup hierarchy and behavioural main memory. Products are compared with
// the low 32 bits of a * b; the number of additions must equal the number of
// set bits of the multiplier, and a zero multiplier must take none.
module tb_mbc_multiplier;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam logic [15:0] PAGE = 16'h0042;

  logic in_valid, in_ready, out_valid; logic [31:0] mcand, mplier, product;
  logic add_valid, add_ready, add_done, add_issued; logic [31:0] add_a, add_b, add_sum;
  logic add_cout;
  logic lk_valid, lk_ready, lk_resp_valid; logic [31:0] lk_a, lk_b; logic [1:0] lk_slice; lut_entry_t lk_entry;
  logic mem_req_valid, mem_req_ready, mem_rdata_valid; logic [31:0] mem_req_addr; chunk_t mem_rdata;
  mbc_events_t ev; int unsigned n_req, n_bad;

  mbc_multiplier dut (.clk, .rst_n, .in_valid, .in_ready, .mcand, .mplier, .out_valid, .product,
    .add_valid, .add_ready, .add_a, .add_b, .add_done, .add_sum, .add_issued);
  mbc_adder u_add (.clk, .rst_n, .in_valid(add_valid), .in_ready(add_ready), .a(add_a), .b(add_b),
    .cin(1'b0), .out_valid(add_done), .sum(add_sum), .cout(add_cout),
    .lk_valid, .lk_ready, .lk_a, .lk_b, .lk_slice, .lk_resp_valid, .lk_resp_entry(lk_entry));
  mbc_lookup u_lk (.clk, .rst_n, .pagebase(PAGE), .req_valid(lk_valid), .req_ready(lk_ready),
    .req_a(lk_a), .req_b(lk_b), .req_slice(lk_slice), .resp_valid(lk_resp_valid), .resp_entry(lk_entry),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rdata_valid, .mem_rdata, .events(ev));
  main_mem_model u_mem (.clk, .rst_n, .page(PAGE), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .rdata_valid(mem_rdata_valid), .rdata(mem_rdata), .n_req, .n_bad);

  int checks = 0, failures = 0, n_adds = 0;
  always @(posedge clk) if (add_issued) n_adds++;

  task automatic mul(input logic [31:0] x, input logic [31:0] y);
    int adds0;
    @(negedge clk); in_valid = 1; mcand = x; mplier = y;
    do @(posedge clk); while (!in_ready);
    adds0 = n_adds;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (product != 32'(x * y)) begin failures++; $display("FAIL %h * %h got %h", x, y, product); end
    checks++;
    if (n_adds - adds0 != $countones(y)) begin failures++; $display("FAIL additions %0d for %h", n_adds - adds0, y); end
  endtask

  initial begin
    in_valid = 0; mcand = 0; mplier = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    mul(32'd12345, 32'd0);
    mul(32'd0, 32'd77);
    mul(32'd7, 32'd6);
    mul(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    mul(32'h8000_0001, 32'h0000_0100);
    for (int n = 0; n < 40; n++) mul($urandom, $urandom & 32'h0000_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
