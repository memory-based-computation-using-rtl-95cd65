// tb_bypass_ctrl: bypass decisions and the OS handshake. A unit heated past
// 100 C is bypassed (100 C itself is not enough) until it cools below 95 C; a
// faulty unit is bypassed at once; the first bypass raises the OS request,
// which is held until acknowledged, and the page base is captured.
module tb_bypass_ctrl;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] fault; logic [7:0] temp [8];
  logic [7:0] bypass, hot, trip, rel;
  logic os_req, os_ack, pb_valid; logic [15:0] os_pb, pb;
  int checks = 0, failures = 0;

  bypass_ctrl dut (.clk, .rst_n, .fault, .temp, .bypass, .hot, .trip, .release_(rel),
    .os_req, .os_ack, .os_pagebase(os_pb), .pagebase(pb), .pagebase_valid(pb_valid));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    fault = 0; os_ack = 0; os_pb = 16'hBEEF;
    for (int i = 0; i < 8; i++) temp[i] = 8'd60;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(bypass == 0 && !os_req && !pb_valid, "idle after reset");
    temp[2] = 8'd100; @(negedge clk); @(negedge clk);
    chk(bypass == 0, "100 C is not above the threshold");
    temp[2] = 8'd101; @(negedge clk);
    chk(bypass == 8'b0000_0100, "unit 2 bypassed above 100 C");
    @(negedge clk);
    chk(os_req, "OS request raised");
    repeat (5) @(negedge clk);
    chk(os_req && !pb_valid, "request held until acknowledged");
    os_ack = 1; @(negedge clk); os_ack = 0;
    chk(pb_valid && pb == 16'hBEEF && !os_req, "page base captured");
    temp[2] = 8'd97; repeat (3) @(negedge clk);
    chk(bypass[2], "still bypassed at 97 C (hysteresis)");
    temp[2] = 8'd94; @(negedge clk);
    chk(!bypass[2], "back in service below 95 C");
    fault[6] = 1; #1;
    chk(bypass == 8'b0100_0000, "faulty multiplier bypassed");
    repeat (3) @(negedge clk);
    chk(!os_req, "no second OS request once tables are loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
