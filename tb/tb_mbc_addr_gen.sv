// tb_mbc_addr_gen: checks slice selection and the address fields for all 256
// values of X in every slice position, with the default set counts and with
// a set count that is not a power of two.
module tb_mbc_addr_gen;
  import mbc_pkg::*;
  logic [31:0] a, b;
  logic [1:0] sl;
  logic [15:0] pb;
  logic [7:0] t1, o1, t2, o2, t3;
  logic [3:0] i1;
  logic [5:0] i2;
  logic [3:0] i3;
  logic [31:0] pa;
  int checks = 0, failures = 0;

  mbc_addr_gen dut (.a, .b, .slice(sl), .pagebase(pb), .l1_tag(t1), .l1_index(i1), .l1_offset(o1),
                    .l2_tag(t2), .l2_index(i2), .l2_offset(o2), .pa(pa));
  // 12 sets: index must be X mod 12, not a bit field
  mbc_addr_gen #(.L1_SETS(12), .L2_SETS(64)) dut12 (.a, .b, .slice(sl), .pagebase(pb), .l1_tag(t3),
                    .l1_index(i3), .l1_offset(), .l2_tag(), .l2_index(), .l2_offset(), .pa());

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int s = 0; s < 4; s++)
      for (int xv = 0; xv < 256; xv++) begin
        logic [7:0] y;
        a = $urandom; b = $urandom; y = 8'($urandom);
        a[s*8 +: 8] = 8'(xv); b[s*8 +: 8] = y;
        sl = 2'(s); pb = 16'($urandom); #1;
        chk(t1 == 8'(xv) && o1 == y && i1 == 4'(xv % 16), $sformatf("L1 s=%0d x=%0d", s, xv));
        chk(t2 == 8'(xv) && o2 == y && i2 == 6'(xv % 64), $sformatf("L2 s=%0d x=%0d", s, xv));
        chk(pa == {pb, 8'(xv), 8'h00}, $sformatf("PA s=%0d x=%0d", s, xv));
        chk(t3 == 8'(xv) && i3 == 4'(xv % 12), $sformatf("mod 12 x=%0d idx=%0d", xv, i3));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
