// tb_shifter32: checks every shift amount on random words against the shift
// operator.
module tb_shifter32;
  logic [31:0] in, out;
  logic [4:0] sh;
  int checks = 0, failures = 0;
  shifter32 dut (.in(in), .sh(sh), .out(out));
  initial begin
    for (int n = 0; n < 200; n++)
      for (int s = 0; s < 32; s++) begin
        in = (n == 0) ? 32'hFFFF_FFFF : $urandom; sh = 5'(s); #1;
        checks++;
        if (out != (in << s)) begin
          failures++; $display("FAIL in=%h sh=%0d out=%h", in, s, out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
