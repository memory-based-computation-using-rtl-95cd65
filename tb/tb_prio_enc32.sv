// tb_prio_enc32: checks the priority encoder on zero, every single bit, and
// random words, against a reference scan for the lowest set bit.
module tb_prio_enc32;
  logic [31:0] v;
  logic valid;
  logic [4:0] idx;
  int checks = 0, failures = 0;
  prio_enc32 dut (.v(v), .valid(valid), .idx(idx));

  task automatic try(input logic [31:0] val);
    int exp_idx; bit exp_valid;
    v = val; #1;
    exp_valid = (val != 0); exp_idx = 0;
    for (int i = 0; i < 32; i++) if (val[i]) begin exp_idx = i; break; end
    checks++;
    if (valid != exp_valid || (exp_valid && idx != 5'(exp_idx))) begin
      failures++; $display("FAIL v=%h valid=%0d idx=%0d exp %0d", val, valid, idx, exp_idx);
    end
  endtask

  initial begin
    try(0);
    for (int i = 0; i < 32; i++) try(32'h1 << i);
    for (int i = 0; i < 32; i++) try(32'hFFFF_FFFF << i);
    for (int n = 0; n < 1000; n++) try($urandom & $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
