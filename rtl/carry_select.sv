// carry_select: combines the per-slice table entries of a memory-based
// addition into the full sum, carry-select style.
//
// Each 8-bit slice i has been looked up once and delivers both candidate
// results, {c0, s0} for carry in 0 and {c1, s1} for carry in 1. Starting from
// the adder's carry in, the carry into each slice selects that slice's sum and
// its carry out, which in turn selects for the next slice. Slice 0 is the least
// significant. Purely combinational; this is the second of the two steps of a
// memory-based addition (lookup, then carry select), as described.
module carry_select
  import mbc_pkg::*;
#(
  parameter int unsigned SLICES = 4
) (
  input  lut_entry_t                  ent [SLICES],
  input  logic                        cin,
  output logic [SLICES*SLICE_W-1:0]   sum,
  output logic                        cout
);

  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < SLICES; i++) begin
      sum[i*SLICE_W +: SLICE_W] = c ? ent[i].s1 : ent[i].s0;
      c = c ? ent[i].c1 : ent[i].c0;
    end
    cout = c;
  end

endmodule
