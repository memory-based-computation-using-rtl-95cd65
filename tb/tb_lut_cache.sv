// tb_lut_cache: directed test of one cache (2 ways, 4 sets, latency 3).
// Fills lines chunk by chunk, looks entries up (hit data and hit way, miss on
// an absent tag, result exactly LAT cycles after the request), reads chunks
// back, and checks that the victim is an invalid way first and then the least
// recently used way.
module tb_lut_cache;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int LAT = 3;
  logic lk_valid, lk_done, lk_hit; logic [7:0] lk_tag, lk_offset; logic [1:0] lk_index;
  logic lk_way; lut_entry_t lk_entry;
  logic rd_valid, rd_done; logic [1:0] rd_index; logic rd_way; logic [3:0] rd_chunk; chunk_t rd_data;
  logic wr_valid, wr_last; logic [1:0] wr_index; logic wr_way; logic [3:0] wr_chunk; chunk_t wr_data; logic [7:0] wr_tag;
  logic [1:0] vc_index; logic vc_way, vc_valid; logic [7:0] vc_tag;

  lut_cache #(.WAYS(2), .SETS(4), .LAT(LAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // line content used in this test: entry e of the line tagged t
  function automatic lut_entry_t ent(input logic [7:0] t, input int e);
    return lut_entry_t'(18'({t, 8'(e)} * 3 + 1));
  endfunction

  task automatic fill(input logic [7:0] t, input logic [1:0] idx, input logic way);
    for (int c = 0; c < CHUNKS; c++) begin
      @(negedge clk);
      wr_valid = 1; wr_index = idx; wr_way = way; wr_chunk = 4'(c); wr_tag = t;
      wr_last = (c == CHUNKS-1);
      for (int e = 0; e < CHUNK_ENTRIES; e++) wr_data[e*ENTRY_W +: ENTRY_W] = ent(t, c*CHUNK_ENTRIES + e);
    end
    @(negedge clk); wr_valid = 0; wr_last = 0;
  endtask

  task automatic look(input logic [7:0] t, input logic [1:0] idx, input logic [7:0] off,
                      input bit exp_hit, input logic exp_way);
    int n;
    @(negedge clk);
    lk_valid = 1; lk_tag = t; lk_index = idx; lk_offset = off;
    @(negedge clk); lk_valid = 0;
    n = 1;
    while (!lk_done) begin @(negedge clk); n++; end
    chk(n == LAT, $sformatf("lookup latency %0d", n));
    chk(lk_hit == exp_hit, $sformatf("hit t=%0d idx=%0d", t, idx));
    if (exp_hit) begin
      chk(lk_entry == ent(t, off), $sformatf("entry t=%0d off=%0d", t, off));
      chk(lk_way == exp_way, "hit way");
    end
  endtask

  initial begin
    lk_valid = 0; rd_valid = 0; wr_valid = 0; wr_last = 0; lk_tag = 0; lk_index = 0; lk_offset = 0;
    rd_index = 0; rd_way = 0; rd_chunk = 0; wr_index = 0; wr_way = 0; wr_chunk = 0; wr_data = '0; wr_tag = 0;
    vc_index = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(!vc_valid && vc_way == 0, "empty set: invalid way 0 is victim");
    look(8'd5, 2'd1, 8'd9, 0, 0);
    fill(8'd5, 2'd1, 1'b0);
    #1 chk(!vc_valid && vc_way == 1, "way 1 still invalid");
    fill(8'd9, 2'd1, 1'b1);
    #1 chk(vc_valid && vc_way == 0 && vc_tag == 8'd5, "LRU victim is way 0 (tag 5)");
    for (int n = 0; n < 40; n++) look(8'd5, 2'd1, 8'($urandom), 1, 0);
    #1 chk(vc_valid && vc_way == 1 && vc_tag == 8'd9, "after hits on tag 5 the victim is way 1");
    look(8'd9, 2'd1, 8'd255, 1, 1);
    #1 chk(vc_way == 0, "after hit on tag 9 the victim is way 0");
    look(8'd13, 2'd1, 8'd0, 0, 0);
    look(8'd5, 2'd2, 8'd0, 0, 0);     // same tag, other set
    // chunk read-back
    for (int c = 0; c < CHUNKS; c++) begin
      @(negedge clk); rd_valid = 1; rd_index = 1; rd_way = 1; rd_chunk = 4'(c);
      @(negedge clk); rd_valid = 0;
      chk(rd_done && rd_data[0 +: ENTRY_W] == ent(8'd9, c*CHUNK_ENTRIES), $sformatf("read chunk %0d", c));
    end
    // replacing a line: tag 9 overwritten by 77
    fill(8'd77, 2'd1, 1'b1);
    look(8'd9, 2'd1, 8'd3, 0, 0);
    look(8'd77, 2'd1, 8'd3, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
