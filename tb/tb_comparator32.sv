// tb_comparator32: checks less-than and equal on random, equal and
// one-bit-apart operand pairs against the relational operators.
module tb_comparator32;
  logic [31:0] a, b;
  logic lt, eq;
  int checks = 0, failures = 0;
  comparator32 dut (.a(a), .b(b), .lt(lt), .eq(eq));
  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = $urandom;
      case (n % 3)
        0: b = $urandom;
        1: b = a;
        default: b = a ^ (32'h1 << (n % 32));
      endcase
      #1;
      checks++;
      if (lt != (a < b) || eq != (a == b)) begin
        failures++; $display("FAIL a=%h b=%h lt=%0d eq=%0d", a, b, lt, eq);
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
