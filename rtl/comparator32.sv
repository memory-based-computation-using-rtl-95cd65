// comparator32: 32-bit unsigned magnitude comparator that orders the two
// operands before a memory-based addition or multiplication. lt is set when
// a < b, eq when a == b. The comparison is done most significant bit first:
// the first differing bit decides. Combinational.
module comparator32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        lt,
  output logic        eq
);
  always_comb begin
    lt = 1'b0;
    eq = 1'b1;
    for (int i = 31; i >= 0; i--)
      if (eq && a[i] != b[i]) begin
        eq = 1'b0;
        lt = b[i];
      end
  end
endmodule
