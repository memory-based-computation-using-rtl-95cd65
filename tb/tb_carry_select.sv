// tb_carry_select: checks the carry-select combination against a reference
// addition. Entries are built from random operand slices as a table would
// hold them, and the combined sum and carry out are compared with a + b + cin.
module tb_carry_select;
  import mbc_pkg::*;
  lut_entry_t ent [4];
  logic cin, cout;
  logic [31:0] sum;
  int checks = 0, failures = 0;

  carry_select #(.SLICES(4)) dut (.ent(ent), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a, b;
      logic [32:0] ref_sum;
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n % 4 == 0) b = ~a;            // long carry chains
      if (n % 7 == 0) a = 32'hFFFF_FFFF;
      for (int i = 0; i < 4; i++) begin
        logic [8:0] s0, s1;
        s0 = {1'b0, a[8*i +: 8]} + {1'b0, b[8*i +: 8]};
        s1 = s0 + 9'd1;
        ent[i] = {s1[8], s1[7:0], s0[8], s0[7:0]};
      end
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + 33'(cin);
      checks++;
      if ({cout, sum} != ref_sum) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout, sum}, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
