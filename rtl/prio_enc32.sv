// prio_enc32: 32-bit priority encoder of the memory-based multiplier.
// Gives the position of the lowest set bit of the multiplier (idx) and
// whether any bit is set (valid); idx is 0 when no bit is set. The multiplier
// retires one set bit per memory-based addition, so zero bits of the
// multiplier cost no addition. Combinational. Which end has priority is this
// design's choice; the unit itself is part of the described glue logic.
module prio_enc32 (
  input  logic [31:0] v,
  output logic        valid,
  output logic [4:0]  idx
);
  always_comb begin
    valid = 1'b0;
    idx   = '0;
    for (int i = 31; i >= 0; i--)
      if (v[i]) begin
        valid = 1'b1;
        idx   = 5'(i);
      end
  end
endmodule
