// shifter32: 32-bit logarithmic left shifter of the memory-based multiplier.
// Produces the multiplicand weighted by the multiplier bit being retired,
// out = in << sh, bits shifted past bit 31 dropped. Built as five stages that
// shift by 1, 2, 4, 8 and 16 positions. Combinational.
module shifter32 (
  input  logic [31:0] in,
  input  logic [4:0]  sh,
  output logic [31:0] out
);
  logic [31:0] stage [6];
  assign stage[0] = in;
  for (genvar s = 0; s < 5; s++) begin : g_stage
    assign stage[s+1] = sh[s] ? {stage[s][31-(1<<s):0], {(1<<s){1'b0}}} : stage[s];
  end
  assign out = stage[5];
endmodule
